// secded_enc: check-bit encoder ("CD") for the stores.
//
// Computes the check part of a systematic SEC-DED Hamming code for K data bits.
// Data bit i occupies Hamming position ham_pos(i) (3, 5, 6, 7, 9, ...); check
// bit j is the XOR of every data bit whose position has bit j set. The last
// check bit is the overall parity of data and Hamming check bits, which lets
// the decoder tell single from double errors.
// The check bits are written into the additional store beside the data word,
// in the same cycle, as the document describes for write mode; the choice of a
// Hamming SEC-DED code is this design's own.
//
// Interface: data_i (K bits) -> chk_o (ham_r(K)+1 bits). Purely combinational.
module secded_enc
  import gost_pkg::ham_r, gost_pkg::ham_mask;
#(
  parameter int K = 32,
  parameter int R = ham_r(K) + 1
) (
  input  logic [K-1:0] data_i,
  output logic [R-1:0] chk_o
);

  for (genvar j = 0; j < R - 1; j++) begin : g_chk
    localparam logic [63:0] MASK = ham_mask(K, j);
    assign chk_o[j] = ^(data_i & MASK[K-1:0]);
  end
  assign chk_o[R-1] = (^data_i) ^ (^chk_o[R-2:0]);

endmodule

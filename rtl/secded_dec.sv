// secded_dec: read-side decoder ("DC") for the stores.
//
// Takes a data word and its stored check bits, recomputes the check bits with
// secded_enc and forms the syndrome. With the overall parity it classifies the
// read:
//   * syndrome 0, parity good      - no error
//   * parity bad                   - single error: a data bit is flipped back
//                                    when the syndrome names its position; an
//                                    error in a check bit leaves the data as is
//   * parity good, syndrome not 0  - double error, reported as uncorrectable
// Correcting errors at read-out follows the document; the SEC-DED code itself
// is this design's choice.
//
// Interface: data_i/chk_i in; data_o (corrected), corr_o (a single error was
// seen and corrected), uncorr_o (an error that cannot be corrected).
// Purely combinational.
module secded_dec
  import gost_pkg::ham_r, gost_pkg::ham_pos;
#(
  parameter int K = 32,
  parameter int R = ham_r(K) + 1
) (
  input  logic [K-1:0] data_i,
  input  logic [R-1:0] chk_i,
  output logic [K-1:0] data_o,
  output logic         corr_o,
  output logic         uncorr_o
);

  logic [R-1:0] chk_calc;
  logic [R-2:0] syn;
  logic         par_bad;
  logic         hit;

  secded_enc #(.K(K), .R(R)) u_enc (.data_i(data_i), .chk_o(chk_calc));

  assign syn     = chk_calc[R-2:0] ^ chk_i[R-2:0];
  // overall parity of the read word, from the recomputed parity bit
  assign par_bad = chk_calc[R-1] ^ chk_i[R-1] ^ (^syn);

  logic [K-1:0] flip;
  for (genvar i = 0; i < K; i++) begin : g_flip
    localparam int POS = ham_pos(i);
    assign flip[i] = par_bad && (32'(syn) == POS);
  end
  assign data_o = data_i ^ flip;
  assign hit    = |flip;

  always_comb begin
    corr_o = 1'b0;
    uncorr_o = 1'b0;
    if (par_bad) begin
      // a single error in a data bit, a check bit or the parity bit itself
      if (hit || (syn == '0) || ((syn & (syn - 1'b1)) == '0)) corr_o = 1'b1;
      else uncorr_o = 1'b1;                       // syndrome points outside the word
    end else if (syn != '0) begin
      uncorr_o = 1'b1;                            // double error
    end
  end

endmodule

// ecc_store: a main store with its additional check-bit store (X/X_r, N_i/N_ir,
// one bank of K/K_r).
//
// Each word is kept as W data bits plus the SEC-DED check bits that
// secded_enc computes in the same cycle the word is written. Reads are
// asynchronous and pass through secded_dec, so a single flipped bit is
// corrected on the fly and reported on rd_corr_o; a double error is reported
// on rd_uncorr_o. The stored word itself is not rewritten by a read.
//
// A fault-injection port (inj_i, inj_addr_i, inj_mask_i) XORs a mask into the
// stored codeword {check, data} of one word, to emulate an upset in the store;
// it is a test feature of this design, not part of the document. A write and
// an injection to the same word in one cycle both take effect.
//
// Timing: write on the rising clock edge; read data valid in the same cycle
// as the address. Reset clears data and check bits (a valid all-zero codeword).
module ecc_store
  import gost_pkg::ham_r;
#(
  parameter int W     = 32,
  parameter int DEPTH = 8,
  parameter int R     = ham_r(W) + 1,
  parameter int AW    = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic           clk,
  input  logic           rst_n,
  // write port
  input  logic           we_i,
  input  logic [AW-1:0]  waddr_i,
  input  logic [W-1:0]   wdata_i,
  // read port
  input  logic [AW-1:0]  raddr_i,
  output logic [W-1:0]   rdata_o,
  output logic           rd_corr_o,
  output logic           rd_uncorr_o,
  // fault injection
  input  logic           inj_i,
  input  logic [AW-1:0]  inj_addr_i,
  input  logic [W+R-1:0] inj_mask_i
);

  logic [W-1:0] data_q [DEPTH];   // main store
  logic [R-1:0] chk_q  [DEPTH];   // additional store
  logic [R-1:0] wchk;

  secded_enc #(.K(W), .R(R)) u_cd (.data_i(wdata_i), .chk_o(wchk));

  for (genvar a = 0; a < DEPTH; a++) begin : g_word
    logic [W+R-1:0] cw;
    always_comb begin
      cw = {chk_q[a], data_q[a]};
      if (we_i && (int'(waddr_i) == a)) cw = {wchk, wdata_i};
      if (inj_i && (int'(inj_addr_i) == a)) cw = cw ^ inj_mask_i;
    end
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        data_q[a] <= '0;
        chk_q[a]  <= '0;
      end else begin
        {chk_q[a], data_q[a]} <= cw;
      end
    end
  end

  logic [W-1:0] rd_data_raw;
  logic [R-1:0] rd_chk_raw;
  always_comb begin
    rd_data_raw = data_q[0];
    rd_chk_raw  = chk_q[0];
    for (int a = 0; a < DEPTH; a++) begin
      if (int'(raddr_i) == a) begin
        rd_data_raw = data_q[a];
        rd_chk_raw  = chk_q[a];
      end
    end
  end

  secded_dec #(.K(W), .R(R)) u_dc (
    .data_i  (rd_data_raw),
    .chk_i   (rd_chk_raw),
    .data_o  (rdata_o),
    .corr_o  (rd_corr_o),
    .uncorr_o(rd_uncorr_o)
  );

endmodule

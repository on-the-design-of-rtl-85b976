// sbox_unit: the substitution unit K (tables K1..K8) with its additional store
// K_r and decoders.
//
// The 32-bit input is cut into eight 4-bit digits; digit i (bits 4i+3..4i)
// addresses table K(i+1), a 16-entry table of 4-bit values, and the eight
// results are put back in the same digit positions. This is the GOST
// 28147-89 substitution, as the figure's K8..K1 row shows. Each table entry is
// stored with its own 4 SEC-DED check bits (an (8,4) Hamming code), so all
// eight digits can be read and corrected in parallel; organising the check
// bits per entry rather than per 32-bit word is this design's choice.
//
// Tables are loaded one entry per cycle through the write port (tab_i selects
// K1..K8 as 0..7). The document treats the table contents as loaded data and
// gives no values. Fault injection addresses one entry as {tab, addr}.
//
// Timing: loads on the rising edge; substitution is combinational.
module sbox_unit
  import gost_pkg::W_ENTRY, gost_pkg::R_ENTRY;
(
  input  logic                       clk,
  input  logic                       rst_n,
  // table load
  input  logic                       we_i,
  input  logic [2:0]                 wtab_i,
  input  logic [3:0]                 waddr_i,
  input  logic [3:0]                 wdata_i,
  // substitution
  input  logic [31:0]                x_i,
  output logic [31:0]                y_o,
  output logic                       corr_o,
  output logic                       uncorr_o,
  // fault injection
  input  logic                       inj_i,
  input  logic [6:0]                 inj_addr_i,
  input  logic [W_ENTRY+R_ENTRY-1:0] inj_mask_i
);

  logic [7:0] corr, uncorr;

  for (genvar t = 0; t < 8; t++) begin : g_tab
    ecc_store #(.W(W_ENTRY), .DEPTH(16), .R(R_ENTRY)) u_tab (
      .clk        (clk),
      .rst_n      (rst_n),
      .we_i       (we_i && (wtab_i == 3'(t))),
      .waddr_i    (waddr_i),
      .wdata_i    (wdata_i),
      .raddr_i    (x_i[4*t +: 4]),
      .rdata_o    (y_o[4*t +: 4]),
      .rd_corr_o  (corr[t]),
      .rd_uncorr_o(uncorr[t]),
      .inj_i      (inj_i && (inj_addr_i[6:4] == 3'(t))),
      .inj_addr_i (inj_addr_i[3:0]),
      .inj_mask_i (inj_mask_i)
    );
  end

  assign corr_o   = |corr;
  assign uncorr_o = |uncorr;

endmodule

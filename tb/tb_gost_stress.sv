// tb_gost_stress: randomised fault campaign on the fault-tolerant GOST unit
// at its default parameters.
//
// Long gamma and gamma-with-feedback messages are enciphered while, at
// random moments, single-bit transient faults are armed in the round units
// (Cm1, R, Cm2) and single bits of the working registers N1 and N2 are
// flipped. Every output block must still equal the behavioural model, no
// operation may abort, every armed fault must be detected, and register
// upsets must have been corrected.
module tb_gost_stress;
  import gost_pkg::*;
  import gost_ref_pkg::*;

  localparam int BLOCKS = 60;

  logic        clk = 0, rst_n = 0;
  logic        key_we = 0;
  logic [2:0]  key_addr = '0;
  logic [31:0] key_data = '0;
  logic        sbox_we = 0;
  logic [2:0]  sbox_tab = '0;
  logic [3:0]  sbox_addr = '0, sbox_data = '0;
  logic        start = 0;
  mode_e       mode = MODE_GAMMA;
  logic [63:0] iv = '0;
  logic        busy, in_valid = 0, in_ready, in_last = 0, out_valid, retry, abort_, fatal;
  logic [63:0] in_data = '0, out_data;
  logic [N_UNITS-1:0]  chk_err;
  logic [N_STORES-1:0] ecc_corr, ecc_unc;
  logic        fi_arm = 0;
  unit_e       fi_unit = U_CM1;
  logic [31:0] fi_mask = '0;
  logic        mi_valid = 0;
  store_e      mi_store = ST_N1;
  logic [6:0]  mi_addr = '0;
  logic [38:0] mi_mask = '0;

  key_t  key;
  sbox_t sb;
  int checks = 0, failures = 0;
  int unit_errs = 0, corr_reads = 0, armed = 0, flips = 0, aborts = 0;

  always #5 clk = ~clk;

  gost_top dut (
    .clk(clk), .rst_n(rst_n),
    .key_we_i(key_we), .key_addr_i(key_addr), .key_data_i(key_data),
    .sbox_we_i(sbox_we), .sbox_tab_i(sbox_tab), .sbox_addr_i(sbox_addr), .sbox_data_i(sbox_data),
    .start_i(start), .mode_i(mode), .iv_i(iv), .busy_o(busy),
    .in_valid_i(in_valid), .in_ready_o(in_ready), .in_data_i(in_data), .in_last_i(in_last),
    .out_valid_o(out_valid), .out_data_o(out_data),
    .chk_err_o(chk_err), .ecc_corr_o(ecc_corr), .ecc_uncorr_o(ecc_unc),
    .retry_o(retry), .abort_o(abort_), .fatal_o(fatal),
    .fi_arm_i(fi_arm), .fi_unit_i(fi_unit), .fi_mask_i(fi_mask),
    .mi_valid_i(mi_valid), .mi_store_i(mi_store), .mi_addr_i(mi_addr), .mi_mask_i(mi_mask));

  always @(posedge clk) if (rst_n) begin
    if (|chk_err) unit_errs++;
    if (abort_) aborts++;
  end

  // a flipped register word is read (and corrected) at most a few times
  // before it is rewritten; count words that were corrected at least once
  logic [N_STORES-1:0] corr_q;
  always @(posedge clk) if (rst_n) begin
    for (int s = 0; s < N_STORES; s++) if (ecc_corr[s] && !corr_q[s]) corr_reads++;
    corr_q <= ecc_corr;
  end

  task automatic run_msg(input mode_e m);
    logic [63:0] blk [BLOCKS];
    logic [63:0] exp [BLOCKS];
    logic [63:0] n, g, fb, v;
    v = {$urandom, $urandom};
    foreach (blk[i]) blk[i] = {$urandom, $urandom};
    n = gost_ecb(v, key, sb, 1'b0);
    fb = v;
    foreach (blk[i]) begin
      if (m == MODE_GAMMA) begin
        n = gamma_step(n);
        g = gost_ecb(n, key, sb, 1'b0);
      end else begin
        g = gost_ecb(fb, key, sb, 1'b0);
      end
      exp[i] = blk[i] ^ g;
      fb = exp[i];
    end
    @(negedge clk);
    start = 1; mode = m; iv = v;
    @(negedge clk);
    start = 0;
    foreach (blk[i]) begin
      int fi_at, mi_at, lat;
      while (!in_ready) @(negedge clk);
      in_valid = 1; in_data = blk[i]; in_last = (i == BLOCKS - 1);
      @(negedge clk);
      in_valid = 0;
      fi_at = ($urandom_range(1) == 1) ? $urandom_range(60) : -1;
      mi_at = ($urandom_range(1) == 1) ? $urandom_range(60) : -1;
      lat = 0;
      while (!out_valid && lat < 1000) begin
        if (lat == fi_at) begin
          fi_arm = 1;
          fi_unit = unit_e'($urandom_range(2));     // Cm1, R or Cm2: busy every round
          fi_mask = 32'd1 << $urandom_range(31);
          armed++;
        end
        if (lat == mi_at) begin
          mi_valid = 1;
          mi_store = ($urandom_range(1) == 1) ? ST_N2 : ST_N1;
          mi_mask = 39'd1 << $urandom_range(38);
          flips++;
        end
        @(negedge clk);
        fi_arm = 0;
        mi_valid = 0;
        lat++;
      end
      checks++;
      if (out_data !== exp[i]) begin
        failures++;
        $display("FAIL mode %0d block %0d: %h exp %h", m, i, out_data, exp[i]);
      end
      @(negedge clk);
    end
    while (busy) @(negedge clk);
  endtask

  initial begin
    for (int i = 0; i < 8; i++) key[i] = $urandom;
    for (int t = 0; t < 8; t++) for (int a = 0; a < 16; a++) sb[t][a] = 4'($urandom);
    corr_q = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < 8; i++) begin
      @(negedge clk);
      key_we = 1; key_addr = 3'(i); key_data = key[i];
    end
    for (int t = 0; t < 8; t++)
      for (int a = 0; a < 16; a++) begin
        @(negedge clk);
        key_we = 0;
        sbox_we = 1; sbox_tab = 3'(t); sbox_addr = 4'(a); sbox_data = sb[t][a];
      end
    @(negedge clk);
    sbox_we = 0;

    run_msg(MODE_GAMMA);
    run_msg(MODE_GFB_ENC);

    // every armed round-unit fault strikes within the block and is detected
    checks++;
    if (unit_errs < armed) begin
      failures++;
      $display("FAIL %0d faults armed, %0d detected", armed, unit_errs);
    end
    checks++;
    if (aborts != 0) begin
      failures++;
      $display("FAIL %0d operations aborted", aborts);
    end
    checks++;
    if (flips == 0 || corr_reads == 0) begin
      failures++;
      $display("FAIL no register upsets corrected");
    end
    $display("faults armed %0d, unit errors seen %0d, register flips %0d, corrected words %0d",
             armed, unit_errs, flips, corr_reads);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_gost_top: end-to-end test of the fault-tolerant GOST 28147-89 unit at
// its default parameters.
//
// Loads a random key and random substitution tables, then runs every mode
// (simple replacement encryption and decryption, gamma, gamma with feedback
// in both directions) on multi-block messages and compares each output block
// with a behavioural cipher model. On top of that it
//   * arms a transient fault in each check unit (Cm1, R, Cm2, Cm3, Cm4, Cm5)
//     and expects the error to be seen, the step repeated and the result
//     still correct;
//   * flips one bit in each store (X, K, N1..N6) and expects a corrected read
//     and a correct result;
//   * flips two bits of a key word and expects the operation to abort;
//   * holds a fault on Cm1 and expects the retry limit to abort the operation;
//   * enciphers and deciphers a published known-answer block (key
//     ffeeddcc..fcfdfeff, block fedcba9876543210 -> 4ee901e5c2d8ca3d, with
//     bits [31:0] of the block in N1).
// It counts how often each mechanism happened and fails any that never did.
// Fault-free blocks must appear 65 cycles after they are accepted (66 in
// gamma mode, which adds the counter step).
module tb_gost_top;
  import gost_pkg::*;
  import gost_ref_pkg::*;

  logic        clk = 0, rst_n = 0;
  logic        key_we = 0;
  logic [2:0]  key_addr = '0;
  logic [31:0] key_data = '0;
  logic        sbox_we = 0;
  logic [2:0]  sbox_tab = '0;
  logic [3:0]  sbox_addr = '0, sbox_data = '0;
  logic        start = 0;
  mode_e       mode = MODE_ECB_ENC;
  logic [63:0] iv = '0;
  logic        busy, in_valid = 0, in_ready, in_last = 0, out_valid, retry, abort_, fatal;
  logic [63:0] in_data = '0, out_data;
  logic [N_UNITS-1:0]  chk_err;
  logic [N_STORES-1:0] ecc_corr, ecc_unc;
  logic        fi_arm = 0;
  unit_e       fi_unit = U_CM1;
  logic [31:0] fi_mask = '0;
  logic        mi_valid = 0;
  store_e      mi_store = ST_X;
  logic [6:0]  mi_addr = '0;
  logic [38:0] mi_mask = '0;

  // substitution tables of the published test vector (K1 first, entry 0 first)
  localparam logic [3:0] KAT_SBOX [8][16] = '{
    '{4'd12, 4'd4,  4'd6,  4'd2,  4'd10, 4'd5,  4'd11, 4'd9,  4'd14, 4'd8,  4'd13, 4'd7,  4'd0,  4'd3,  4'd15, 4'd1},
    '{4'd6,  4'd8,  4'd2,  4'd3,  4'd9,  4'd10, 4'd5,  4'd12, 4'd1,  4'd14, 4'd4,  4'd7,  4'd11, 4'd13, 4'd0,  4'd15},
    '{4'd11, 4'd3,  4'd5,  4'd8,  4'd2,  4'd15, 4'd10, 4'd13, 4'd14, 4'd1,  4'd7,  4'd4,  4'd12, 4'd9,  4'd6,  4'd0},
    '{4'd12, 4'd8,  4'd2,  4'd1,  4'd13, 4'd4,  4'd15, 4'd6,  4'd7,  4'd0,  4'd10, 4'd5,  4'd3,  4'd14, 4'd9,  4'd11},
    '{4'd7,  4'd15, 4'd5,  4'd10, 4'd8,  4'd1,  4'd6,  4'd13, 4'd0,  4'd9,  4'd3,  4'd14, 4'd11, 4'd4,  4'd2,  4'd12},
    '{4'd5,  4'd13, 4'd15, 4'd6,  4'd9,  4'd2,  4'd12, 4'd10, 4'd11, 4'd7,  4'd8,  4'd1,  4'd4,  4'd3,  4'd14, 4'd0},
    '{4'd8,  4'd14, 4'd2,  4'd5,  4'd6,  4'd9,  4'd1,  4'd12, 4'd15, 4'd4,  4'd11, 4'd0,  4'd13, 4'd10, 4'd3,  4'd7},
    '{4'd1,  4'd7,  4'd14, 4'd13, 4'd0,  4'd5,  4'd8,  4'd3,  4'd4,  4'd15, 4'd10, 4'd6,  4'd9,  4'd12, 4'd11, 4'd2}};

  key_t  key;
  sbox_t sb;
  int checks = 0, failures = 0;
  int unit_err_cnt [N_UNITS];
  int corr_cnt [N_STORES];
  int retry_cnt = 0, abort_cnt = 0, unc_cnt = 0, out_cnt = 0;
  int mode_cnt [5];
  longint cyc = 0;

  always #5 clk = ~clk;
  always @(posedge clk) cyc++;

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

  // event counters
  always @(posedge clk) if (rst_n) begin
    for (int u = 0; u < N_UNITS; u++) if (chk_err[u]) unit_err_cnt[u]++;
    for (int s = 0; s < N_STORES; s++) if (ecc_corr[s]) corr_cnt[s]++;
    if (retry) retry_cnt++;
    if (abort_) abort_cnt++;
    if (|ecc_unc) unc_cnt++;
  end

  task automatic fail(input string msg);
    failures++;
    $display("FAIL @%0d: %s", cyc, msg);
  endtask

  // --------------------------------------------------------------- loading
  task automatic load_key();
    for (int i = 0; i < 8; i++) begin
      @(negedge clk);
      key_we = 1; key_addr = 3'(i); key_data = key[i];
    end
    @(negedge clk);
    key_we = 0;
  endtask

  task automatic load_sbox();
    for (int t = 0; t < 8; t++)
      for (int a = 0; a < 16; a++) begin
        @(negedge clk);
        sbox_we = 1; sbox_tab = 3'(t); sbox_addr = 4'(a); sbox_data = sb[t][a];
      end
    @(negedge clk);
    sbox_we = 0;
  endtask

  // --------------------------------------------------------------- reference
  function automatic void model(input mode_e m, input logic [63:0] v,
                                input logic [63:0] blk [], output logic [63:0] exp []);
    logic [63:0] n, g, fb;
    exp = new[blk.size()];
    case (m)
      MODE_ECB_ENC: foreach (blk[i]) exp[i] = gost_ecb(blk[i], key, sb, 1'b0);
      MODE_ECB_DEC: foreach (blk[i]) exp[i] = gost_ecb(blk[i], key, sb, 1'b1);
      MODE_GAMMA: begin
        n = gost_ecb(v, key, sb, 1'b0);
        foreach (blk[i]) begin
          n = gamma_step(n);
          g = gost_ecb(n, key, sb, 1'b0);
          exp[i] = blk[i] ^ g;
        end
      end
      default: begin
        fb = v;
        foreach (blk[i]) begin
          g = gost_ecb(fb, key, sb, 1'b0);
          exp[i] = blk[i] ^ g;
          fb = (m == MODE_GFB_ENC) ? exp[i] : blk[i];
        end
      end
    endcase
  endfunction

  // --------------------------------------------------------------- one operation
  // Runs a message through the unit. Faults are injected by the caller's
  // hook through the globals below: at block index inj_blk, inj_delay cycles
  // after the block is accepted.
  int     inj_blk = -1, inj_delay = 0;
  int     inj_kind = 0;         // 1: unit fault, 2: store flip
  unit_e  inj_unit;
  store_e inj_store;
  logic [6:0]  inj_addr;
  logic [38:0] inj_mask;
  bit     expect_abort = 0;
  bit     timed = 1;

  task automatic run_op(input mode_e m, input logic [63:0] v, input logic [63:0] blk [],
                        output logic [63:0] got []);
    logic [63:0] exp [];
    longint t_acc;
    bit aborted;
    model(m, v, blk, exp);
    got = new[blk.size()];
    aborted = 0;
    @(negedge clk);
    start = 1; mode = m; iv = v;
    @(negedge clk);
    start = 0;
    mode_cnt[m]++;
    for (int i = 0; i < blk.size() && !aborted; i++) begin
      bit done;
      int lat;
      in_valid = 1; in_data = blk[i]; in_last = (i == blk.size() - 1);
      while (!in_ready) begin
        @(negedge clk);
        if (!busy) begin
          aborted = 1;
          break;
        end
      end
      if (aborted) break;
      @(posedge clk);
      t_acc = cyc;
      @(negedge clk);
      in_valid = 0;
      done = 0;
      lat = 0;
      while (!done) begin
        if (i == inj_blk && lat == inj_delay) begin
          if (inj_kind == 1) begin
            fi_arm = 1; fi_unit = inj_unit; fi_mask = 32'd1 << $urandom_range(31);
          end else if (inj_kind == 2) begin
            mi_valid = 1; mi_store = inj_store; mi_addr = inj_addr; mi_mask = inj_mask;
          end
        end
        @(posedge clk);
        #1;
        fi_arm = 0;
        mi_valid = 0;
        lat++;
        if (out_valid) begin
          done = 1;
          got[i] = out_data;
          out_cnt++;
          checks++;
          if (out_data !== exp[i])
            fail($sformatf("mode %0d block %0d: got %h exp %h", m, i, out_data, exp[i]));
          if (timed && !(i == inj_blk)) begin
            int want;
            want = (m == MODE_GAMMA) ? 66 : 65;
            checks++;
            if (int'(cyc - t_acc) != want)
              fail($sformatf("latency %0d, expected %0d", cyc - t_acc, want));
          end
        end
        if (!busy) begin
          aborted = 1;
          done = 1;
        end
        if (lat > 2000) begin
          fail("no output");
          done = 1;
        end
        @(negedge clk);
      end
    end
    in_valid = 0;
    checks++;
    if (aborted != expect_abort) fail($sformatf("abort=%0b, expected %0b", aborted, expect_abort));
    if (expect_abort) begin
      checks++;
      if (!fatal) fail("fatal_o not set after abort");
    end
    while (busy) @(negedge clk);
  endtask

  function automatic void rand_msg(input int n, output logic [63:0] blk []);
    blk = new[n];
    foreach (blk[i]) blk[i] = {$urandom, $urandom};
  endfunction

  // --------------------------------------------------------------- main
  initial begin
    logic [63:0] p [], c [], d [];
    logic [63:0] v;
    for (int u = 0; u < N_UNITS; u++) unit_err_cnt[u] = 0;
    for (int s = 0; s < N_STORES; s++) corr_cnt[s] = 0;
    for (int m = 0; m < 5; m++) mode_cnt[m] = 0;
    for (int i = 0; i < 8; i++) key[i] = $urandom;
    for (int t = 0; t < 8; t++) for (int a = 0; a < 16; a++) sb[t][a] = 4'($urandom);
    repeat (3) @(negedge clk);
    rst_n = 1;
    load_key();
    load_sbox();

    // ---- fault-free runs of every mode, with decryption round trips
    rand_msg(4, p);
    run_op(MODE_ECB_ENC, '0, p, c);
    run_op(MODE_ECB_DEC, '0, c, d);
    foreach (p[i]) begin
      checks++;
      if (d[i] !== p[i]) fail("ECB round trip");
    end
    v = {$urandom, $urandom};
    run_op(MODE_GAMMA, v, p, c);
    run_op(MODE_GAMMA, v, c, d);
    foreach (p[i]) begin
      checks++;
      if (d[i] !== p[i]) fail("gamma round trip");
    end
    run_op(MODE_GFB_ENC, v, p, c);
    run_op(MODE_GFB_DEC, v, c, d);
    foreach (p[i]) begin
      checks++;
      if (d[i] !== p[i]) fail("gamma-feedback round trip");
    end

    // ---- transient faults in each check unit
    timed = 0;
    inj_kind = 1;
    for (int u = 0; u < N_UNITS; u++) begin
      inj_unit = unit_e'(u);
      inj_blk = 1;
      inj_delay = $urandom_range(20);
      rand_msg(3, p);
      run_op((u == U_CM1 || u == U_R || u == U_CM2) ? MODE_GFB_ENC : MODE_GAMMA,
             {$urandom, $urandom}, p, c);
    end

    // ---- single-bit upsets in each store
    inj_kind = 2;
    for (int s = 0; s < N_STORES; s++) begin
      inj_store = store_e'(s);
      inj_blk = 1;
      inj_addr = (s == ST_X) ? 7'($urandom_range(7)) :
                 (s == ST_K) ? 7'($urandom_range(127)) : 7'd0;
      inj_mask = (s == ST_K) ? 39'd1 << $urandom_range(7) : 39'd1 << $urandom_range(38);
      inj_delay = (s == ST_N3 || s == ST_N4 || s == ST_N5 || s == ST_N6) ? 0 : 10;
      rand_msg(3, p);
      if (s == ST_N3 || s == ST_N4 || s == ST_N5 || s == ST_N6) begin
        // stores only read in the counter step: flip them while the unit
        // waits for block 2, then check the rest of the message
        run_gamma_with_wait_flip(store_e'(s), p);
      end else begin
        run_op(MODE_GAMMA, {$urandom, $urandom}, p, c);
      end
      // repair a corrupted key word or table entry for later tests
      if (s == ST_X || s == ST_K) begin
        load_key();
        load_sbox();
      end
    end

    // ---- double error in the key store: operation aborted
    inj_store = ST_X;
    inj_addr = 7'd0;
    inj_mask = 39'h3;
    inj_blk = 0;
    inj_delay = 0;
    expect_abort = 1;
    rand_msg(2, p);
    run_op(MODE_ECB_ENC, '0, p, c);
    load_key();

    // ---- permanent fault in Cm1: retry limit reached
    inj_kind = 0;
    fork
      begin
        rand_msg(1, p);
        run_op(MODE_ECB_ENC, '0, p, c);
      end
      begin
        @(negedge clk);
        while (!in_ready) @(negedge clk);
        @(negedge clk);
        fi_unit = U_CM1; fi_mask = 32'h10;
        while (busy) begin
          force_arm();
          @(negedge clk);
        end
      end
    join
    expect_abort = 0;

    // ---- the unit still works afterwards
    timed = 1;
    rand_msg(2, p);
    run_op(MODE_ECB_ENC, '0, p, c);

    // ---- known-answer test: published GOST test key, tables and block
    key = '{32'hffeeddcc, 32'hbbaa9988, 32'h77665544, 32'h33221100,
            32'hf0f1f2f3, 32'hf4f5f6f7, 32'hf8f9fafb, 32'hfcfdfeff};
    for (int t = 0; t < 8; t++) for (int a = 0; a < 16; a++) sb[t][a] = KAT_SBOX[t][a];
    load_key();
    load_sbox();
    p = new[1];
    p[0] = 64'hfedcba98_76543210;
    run_op(MODE_ECB_ENC, '0, p, c);
    checks++;
    if (c[0] !== 64'h4ee901e5_c2d8ca3d) fail($sformatf("known answer: got %h", c[0]));
    run_op(MODE_ECB_DEC, '0, c, d);
    checks++;
    if (d[0] !== p[0]) fail("known answer decryption");

    // ---- every mechanism must have happened
    for (int u = 0; u < N_UNITS; u++) begin
      checks++;
      if (unit_err_cnt[u] == 0) fail($sformatf("check unit %0d never fired", u));
    end
    for (int s = 0; s < N_STORES; s++) begin
      checks++;
      if (corr_cnt[s] == 0) fail($sformatf("store %0d never corrected", s));
    end
    for (int m = 0; m < 5; m++) begin
      checks++;
      if (mode_cnt[m] == 0) fail($sformatf("mode %0d never run", m));
    end
    checks++; if (retry_cnt == 0) fail("no retry");
    checks++; if (abort_cnt < 2) fail("fewer than two aborts");
    checks++; if (unc_cnt == 0) fail("no uncorrectable error");
    $display("mechanisms: unit errors %p, corrections %p, retries %0d, aborts %0d, blocks %0d",
             unit_err_cnt, corr_cnt, retry_cnt, abort_cnt, out_cnt);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // keep a Cm1 fault armed (used for the retry-limit test)
  task automatic force_arm();
    fi_arm = 1;
    @(posedge clk);
    #1;
    fi_arm = 0;
  endtask

  // gamma run where a counter store is flipped between blocks 1 and 2
  task automatic run_gamma_with_wait_flip(input store_e s, input logic [63:0] blk []);
    logic [63:0] exp [];
    logic [63:0] v;
    v = {$urandom, $urandom};
    model(MODE_GAMMA, v, blk, exp);
    @(negedge clk);
    start = 1; mode = MODE_GAMMA; iv = v;
    @(negedge clk);
    start = 0;
    mode_cnt[MODE_GAMMA]++;
    foreach (blk[i]) begin
      int lat;
      while (!in_ready) @(negedge clk);
      if (i == 1) begin
        mi_valid = 1; mi_store = s; mi_addr = '0; mi_mask = 39'd1 << $urandom_range(38);
        @(negedge clk);
        mi_valid = 0;
      end
      in_valid = 1; in_data = blk[i]; in_last = (i == blk.size() - 1);
      @(negedge clk);
      in_valid = 0;
      lat = 0;
      while (!out_valid && lat < 2000) begin
        @(negedge clk);
        lat++;
      end
      checks++;
      if (out_data !== exp[i]) fail($sformatf("gamma with %0d flipped: block %0d", s, i));
      @(negedge clk);
    end
    while (busy) @(negedge clk);
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

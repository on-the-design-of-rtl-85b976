// gost_top: a GOST 28147-89 encryption/decryption unit with error detection
// and correction built into its stores and its arithmetic and logic units.
//
// Datapath (one round of the cipher, two clock cycles):
//   cycle A: t = N1 + X[k]  (Cm1, mod 2^32, residue-checked)
//            y = K(t)       (eight 4-bit tables K1..K8, SEC-DED per entry)
//            R <= rol11(y)  (R register, shift checked when R is read)
//   cycle B: g = R xor N2   (Cm2, residue-checked)
//            N1 <= g, N2 <= N1      (rounds 1..31)
//            N2 <= g, N1 unchanged  (round 32)
// Every store (key store X, tables K, N1..N6) keeps SEC-DED check bits in an
// additional store: check bits are computed as a word is written and single
// errors are corrected as it is read. A check unit that sees a residue
// mismatch makes the controller repeat the step (the stores are not written
// in that cycle); after MAX_RETRY repeats of the same step, or on a double
// error in a store, the operation is aborted and fatal_o is set.
//
// Modes (mode_i, sampled with start_i):
//   MODE_ECB_ENC/DEC  simple replacement: each accepted 64-bit block is
//                     enciphered with the standard key order
//                     (enc: X0..X7 three times then X7..X0; dec: the reverse)
//   MODE_GAMMA        gamma mode: iv_i is enciphered once and copied to N3/N4;
//                     per block N3 += C2 (Cm3, mod 2^32), N4 += C1 (Cm4,
//                     mod 2^32-1), N1/N2 <= N3/N4, enciphered, and the gamma
//                     is XORed with the block in Cm5
//   MODE_GFB_ENC/DEC  gamma with feedback: the gamma for block i is the
//                     encipherment of ciphertext block i-1 (iv_i for block 1)
// The constants C1, C2 live in stores N6, N5 and are written at each start.
// The round structure, key order and modes are those of GOST 28147-89; the
// two-cycle round, the handshake and the retry limit are this design's choices.
//
// Interface:
//   key_we_i/key_addr_i/key_data_i      load key word X[addr]
//   sbox_we_i/sbox_tab_i/...            load entry addr of table K(tab+1)
//   start_i/mode_i/iv_i                 begin an operation (when busy_o = 0)
//   in_valid_i/in_ready_o/in_data_i/in_last_i   block input; in_last_i ends
//                                       the operation after that block
//   out_valid_o/out_data_o              one-cycle result pulse, no back-pressure
//   chk_err_o[u]                        check unit u (unit_e) saw an error
//   ecc_corr_o[s]/ecc_uncorr_o[s]       store s (store_e) was read with a
//                                       corrected / uncorrectable error
//   retry_o, abort_o, fatal_o           step repeated; operation aborted
//   fi_*                                arm a one-shot fault in a unit's result
//   mi_*                                flip bits of a stored codeword
// Block bits [31:0] are N1, [63:32] are N2.
// Latency: 64 cycles for 32 rounds plus one cycle each for the block
// hand-over, the counter step (gamma) and the output.
module gost_top
  import gost_pkg::*;
#(
  parameter int MAX_RETRY = 4
) (
  input  logic                       clk,
  input  logic                       rst_n,
  // key store X
  input  logic                       key_we_i,
  input  logic [2:0]                 key_addr_i,
  input  logic [31:0]                key_data_i,
  // substitution tables K
  input  logic                       sbox_we_i,
  input  logic [2:0]                 sbox_tab_i,
  input  logic [3:0]                 sbox_addr_i,
  input  logic [3:0]                 sbox_data_i,
  // operation control
  input  logic                       start_i,
  input  mode_e                      mode_i,
  input  logic [63:0]                iv_i,
  output logic                       busy_o,
  // block stream
  input  logic                       in_valid_i,
  output logic                       in_ready_o,
  input  logic [63:0]                in_data_i,
  input  logic                       in_last_i,
  output logic                       out_valid_o,
  output logic [63:0]                out_data_o,
  // error reporting
  output logic [N_UNITS-1:0]         chk_err_o,
  output logic [N_STORES-1:0]        ecc_corr_o,
  output logic [N_STORES-1:0]        ecc_uncorr_o,
  output logic                       retry_o,
  output logic                       abort_o,
  output logic                       fatal_o,
  // fault injection into a unit's result (one shot, at the unit's next use)
  input  logic                       fi_arm_i,
  input  unit_e                      fi_unit_i,
  input  logic [31:0]                fi_mask_i,
  // fault injection into a stored codeword {check, data}
  input  logic                       mi_valid_i,
  input  store_e                     mi_store_i,
  input  logic [6:0]                 mi_addr_i,
  input  logic [W_WORD+R_WORD-1:0]   mi_mask_i
);

  typedef enum logic [2:0] {
    S_IDLE, S_WAIT, S_CNT, S_RA, S_RB, S_COPY, S_OUT
  } state_e;

  state_e      state_q;
  mode_e       mode_q;
  logic [4:0]  round_q;
  logic        pre_q;                 // gamma mode: enciphering the iv
  logic        last_q;
  logic [63:0] tin_q;                 // block being processed (To / Tsh)
  logic [$clog2(MAX_RETRY+1)-1:0] retry_q;
  logic        fatal_q;
  logic        fi_pend_q;
  unit_e       fi_unit_q;
  logic [31:0] fi_mask_q;

  // ------------------------------------------------------------ stores
  logic [31:0] n_rd   [1:6];
  logic        n_corr [1:6];
  logic        n_unc  [1:6];
  logic        n_we   [1:6];
  logic [31:0] n_wd   [1:6];
  logic [31:0] x_rd;
  logic        x_corr, x_unc;
  logic [31:0] k_out;
  logic        k_corr, k_unc;
  logic [2:0]  kidx;

  ecc_store #(.W(32), .DEPTH(8)) u_x (
    .clk(clk), .rst_n(rst_n),
    .we_i(key_we_i), .waddr_i(key_addr_i), .wdata_i(key_data_i),
    .raddr_i(kidx), .rdata_o(x_rd), .rd_corr_o(x_corr), .rd_uncorr_o(x_unc),
    .inj_i(mi_valid_i && mi_store_i == ST_X), .inj_addr_i(mi_addr_i[2:0]),
    .inj_mask_i(mi_mask_i)
  );

  for (genvar i = 1; i <= 6; i++) begin : g_n
    ecc_store #(.W(32), .DEPTH(1)) u_n (
      .clk(clk), .rst_n(rst_n),
      .we_i(n_we[i]), .waddr_i(1'b0), .wdata_i(n_wd[i]),
      .raddr_i(1'b0), .rdata_o(n_rd[i]), .rd_corr_o(n_corr[i]),
      .rd_uncorr_o(n_unc[i]),
      .inj_i(mi_valid_i && (int'(mi_store_i) == int'(ST_N1) + i - 1)),
      .inj_addr_i(1'b0), .inj_mask_i(mi_mask_i)
    );
  end

  // ------------------------------------------------------------ units
  logic [31:0] f_cm1, f_r, f_cm2, f_cm3, f_cm4, f_cm5;
  logic [31:0] cm1_sum, cm2_g, cm3_sum, cm4_sum, r_q;
  logic [63:0] cm5_g;
  logic        cm1_err, cm2_err, cm3_err, cm4_err, cm5_err_lo, cm5_err_hi, r_err;
  logic        r_load;

  add_chk #(.END_AROUND(1'b0)) u_cm1 (
    .a_i(n_rd[1]), .b_i(x_rd), .fault_i(f_cm1), .sum_o(cm1_sum), .err_o(cm1_err));

  sbox_unit u_k (
    .clk(clk), .rst_n(rst_n),
    .we_i(sbox_we_i), .wtab_i(sbox_tab_i), .waddr_i(sbox_addr_i), .wdata_i(sbox_data_i),
    .x_i(cm1_sum), .y_o(k_out), .corr_o(k_corr), .uncorr_o(k_unc),
    .inj_i(mi_valid_i && mi_store_i == ST_K), .inj_addr_i(mi_addr_i),
    .inj_mask_i(mi_mask_i[W_ENTRY+R_ENTRY-1:0])
  );

  r_reg #(.SHIFT(11)) u_r (
    .clk(clk), .rst_n(rst_n), .load_i(r_load), .d_i(k_out), .fault_i(f_r),
    .q_o(r_q), .err_o(r_err));

  xor_chk u_cm2 (.e_i(r_q), .f_i(n_rd[2]), .fault_i(f_cm2), .g_o(cm2_g), .err_o(cm2_err));

  add_chk #(.END_AROUND(1'b0)) u_cm3 (
    .a_i(n_rd[3]), .b_i(n_rd[5]), .fault_i(f_cm3), .sum_o(cm3_sum), .err_o(cm3_err));

  add_chk #(.END_AROUND(1'b1)) u_cm4 (
    .a_i(n_rd[4]), .b_i(n_rd[6]), .fault_i(f_cm4), .sum_o(cm4_sum), .err_o(cm4_err));

  xor_chk u_cm5_lo (.e_i(tin_q[31:0]), .f_i(n_rd[1]), .fault_i(f_cm5),
                    .g_o(cm5_g[31:0]), .err_o(cm5_err_lo));
  xor_chk u_cm5_hi (.e_i(tin_q[63:32]), .f_i(n_rd[2]), .fault_i(32'd0),
                    .g_o(cm5_g[63:32]), .err_o(cm5_err_hi));

  // ------------------------------------------------------------ control
  logic is_ecb, is_gamma, is_gfb, dec_order;
  assign is_ecb    = (mode_q == MODE_ECB_ENC) || (mode_q == MODE_ECB_DEC);
  assign is_gamma  = (mode_q == MODE_GAMMA);
  assign is_gfb    = (mode_q == MODE_GFB_ENC) || (mode_q == MODE_GFB_DEC);
  assign dec_order = (mode_q == MODE_ECB_DEC);

  // key order: enc X0..X7 x3 then X7..X0; dec X0..X7 then X7..X0 x3
  always_comb begin
    if (!dec_order) kidx = (round_q < 5'd24) ? round_q[2:0] : ~round_q[2:0];
    else            kidx = (round_q < 5'd8)  ? round_q[2:0] : ~round_q[2:0];
  end

  // a fault armed for unit u is applied in the state that uses u
  logic [N_UNITS-1:0] unit_busy;
  always_comb begin
    unit_busy           = '0;
    unit_busy[U_CM1]    = (state_q == S_RA);
    unit_busy[U_R]      = (state_q == S_RA);
    unit_busy[U_CM2]    = (state_q == S_RB);
    unit_busy[U_CM3]    = (state_q == S_CNT);
    unit_busy[U_CM4]    = (state_q == S_CNT);
    unit_busy[U_CM5]    = (state_q == S_OUT) && !is_ecb;
  end

  logic fi_fire;
  assign fi_fire = fi_pend_q && unit_busy[fi_unit_q];
  assign f_cm1 = (fi_fire && fi_unit_q == U_CM1) ? fi_mask_q : '0;
  assign f_r   = (fi_fire && fi_unit_q == U_R)   ? fi_mask_q : '0;
  assign f_cm2 = (fi_fire && fi_unit_q == U_CM2) ? fi_mask_q : '0;
  assign f_cm3 = (fi_fire && fi_unit_q == U_CM3) ? fi_mask_q : '0;
  assign f_cm4 = (fi_fire && fi_unit_q == U_CM4) ? fi_mask_q : '0;
  assign f_cm5 = (fi_fire && fi_unit_q == U_CM5) ? fi_mask_q : '0;

  // check-unit events of the current step
  always_comb begin
    chk_err_o        = '0;
    chk_err_o[U_CM1] = unit_busy[U_CM1] && cm1_err;
    chk_err_o[U_R]   = (state_q == S_RB) && r_err;
    chk_err_o[U_CM2] = unit_busy[U_CM2] && cm2_err;
    chk_err_o[U_CM3] = unit_busy[U_CM3] && cm3_err;
    chk_err_o[U_CM4] = unit_busy[U_CM4] && cm4_err;
    chk_err_o[U_CM5] = unit_busy[U_CM5] && (cm5_err_lo || cm5_err_hi);
  end

  // store reads used by the current step
  logic [N_STORES-1:0] rd_use, st_corr, st_unc;
  always_comb begin
    rd_use        = '0;
    rd_use[ST_X]  = (state_q == S_RA);
    rd_use[ST_K]  = (state_q == S_RA);
    rd_use[ST_N1] = (state_q == S_RA) || (state_q == S_RB) || (state_q == S_COPY)
                    || (state_q == S_OUT);
    rd_use[ST_N2] = (state_q == S_RB) || (state_q == S_COPY) || (state_q == S_OUT);
    rd_use[ST_N3] = (state_q == S_CNT);
    rd_use[ST_N4] = (state_q == S_CNT);
    rd_use[ST_N5] = (state_q == S_CNT);
    rd_use[ST_N6] = (state_q == S_CNT);
    st_corr = {n_corr[6], n_corr[5], n_corr[4], n_corr[3], n_corr[2], n_corr[1],
               k_corr, x_corr};
    st_unc  = {n_unc[6], n_unc[5], n_unc[4], n_unc[3], n_unc[2], n_unc[1],
               k_unc, x_unc};
  end
  assign ecc_corr_o   = st_corr & rd_use;
  assign ecc_uncorr_o = st_unc & rd_use;

  logic step_err, fatal_err, retry_hit;
  assign step_err  = |chk_err_o;
  assign fatal_err = |ecc_uncorr_o;
  assign retry_hit = step_err && (int'(retry_q) >= MAX_RETRY - 1);

  assign in_ready_o  = (state_q == S_WAIT);
  assign busy_o      = (state_q != S_IDLE);
  assign fatal_o     = fatal_q;
  assign retry_o     = step_err && !fatal_err && !retry_hit;
  assign abort_o     = fatal_err || retry_hit;
  assign out_valid_o = (state_q == S_OUT) && !step_err && !fatal_err;
  assign out_data_o  = is_ecb ? {n_rd[2], n_rd[1]} : cm5_g;
  assign r_load      = (state_q == S_RA) && !step_err && !fatal_err;

  logic ok;            // the current step completes this cycle
  assign ok = !step_err && !fatal_err;

  // store write ports
  always_comb begin
    for (int i = 1; i <= 6; i++) begin
      n_we[i] = 1'b0;
      n_wd[i] = '0;
    end
    unique case (state_q)
      S_IDLE: if (start_i) begin
        n_we[5] = 1'b1;  n_wd[5] = C2;
        n_we[6] = 1'b1;  n_wd[6] = C1;
        if (mode_i == MODE_GAMMA || mode_i == MODE_GFB_ENC || mode_i == MODE_GFB_DEC) begin
          n_we[1] = 1'b1;  n_wd[1] = iv_i[31:0];
          n_we[2] = 1'b1;  n_wd[2] = iv_i[63:32];
        end
      end
      S_WAIT: if (in_valid_i && is_ecb) begin
        n_we[1] = 1'b1;  n_wd[1] = in_data_i[31:0];
        n_we[2] = 1'b1;  n_wd[2] = in_data_i[63:32];
      end
      S_CNT: if (ok) begin
        n_we[3] = 1'b1;  n_wd[3] = cm3_sum;
        n_we[4] = 1'b1;  n_wd[4] = cm4_sum;
        n_we[1] = 1'b1;  n_wd[1] = cm3_sum;
        n_we[2] = 1'b1;  n_wd[2] = cm4_sum;
      end
      S_RB: if (ok) begin
        if (round_q != 5'd31) begin
          n_we[1] = 1'b1;  n_wd[1] = cm2_g;
          n_we[2] = 1'b1;  n_wd[2] = n_rd[1];
        end else begin
          n_we[2] = 1'b1;  n_wd[2] = cm2_g;
        end
      end
      S_COPY: if (ok) begin
        n_we[3] = 1'b1;  n_wd[3] = n_rd[1];
        n_we[4] = 1'b1;  n_wd[4] = n_rd[2];
      end
      S_OUT: if (ok && is_gfb) begin
        n_we[1] = 1'b1;
        n_we[2] = 1'b1;
        if (mode_q == MODE_GFB_ENC) {n_wd[2], n_wd[1]} = cm5_g;
        else                        {n_wd[2], n_wd[1]} = tin_q;
      end
      default: ;
    endcase
  end

  // sequencing
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q   <= S_IDLE;
      mode_q    <= MODE_ECB_ENC;
      round_q   <= '0;
      pre_q     <= 1'b0;
      last_q    <= 1'b0;
      tin_q     <= '0;
      retry_q   <= '0;
      fatal_q   <= 1'b0;
      fi_pend_q <= 1'b0;
      fi_unit_q <= U_CM1;
      fi_mask_q <= '0;
    end else begin
      if (fi_arm_i) begin
        fi_pend_q <= 1'b1;
        fi_unit_q <= fi_unit_i;
        fi_mask_q <= fi_mask_i;
      end else if (fi_fire) begin
        fi_pend_q <= 1'b0;
      end

      if (state_q != S_IDLE && state_q != S_WAIT) begin
        if (abort_o)       retry_q <= '0;
        else if (step_err) retry_q <= retry_q + 1'b1;
        else               retry_q <= '0;
      end

      if (abort_o) begin
        fatal_q <= 1'b1;
        state_q <= S_IDLE;
      end else begin
        unique case (state_q)
          S_IDLE: if (start_i) begin
            mode_q  <= mode_i;
            fatal_q <= 1'b0;
            round_q <= '0;
            retry_q <= '0;
            pre_q   <= (mode_i == MODE_GAMMA);
            state_q <= (mode_i == MODE_GAMMA) ? S_RA : S_WAIT;
          end
          S_WAIT: if (in_valid_i) begin
            tin_q   <= in_data_i;
            last_q  <= in_last_i;
            round_q <= '0;
            state_q <= is_gamma ? S_CNT : S_RA;
          end
          S_CNT: if (ok) state_q <= S_RA;
          S_RA:  if (ok) state_q <= S_RB;
          S_RB: begin
            if (r_err) begin
              state_q <= S_RA;               // reload R and check again
            end else if (ok) begin
              round_q <= round_q + 1'b1;
              if (round_q != 5'd31) state_q <= S_RA;
              else if (pre_q)       state_q <= S_COPY;
              else                  state_q <= S_OUT;
            end
          end
          S_COPY: begin
            pre_q   <= 1'b0;
            state_q <= S_WAIT;
          end
          S_OUT: if (ok) state_q <= last_q ? S_IDLE : S_WAIT;
          default: state_q <= S_IDLE;
        endcase
      end
    end
  end

`ifndef SYNTHESIS
  // the block stream handshake: no output while idle, input only when ready
  a_out_busy: assert property (@(posedge clk) out_valid_o |-> busy_o);
  a_in_ready: assert property (@(posedge clk) in_ready_o |-> busy_o && !out_valid_o);
`endif

endmodule

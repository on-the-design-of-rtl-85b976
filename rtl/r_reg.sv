// r_reg: the R register, which holds the substitution output circularly
// shifted by 11 places towards the high bits, and its shift check unit.
//
// On load_i the register takes rol11(d_i) and, beside it, the residue r_D of
// the unshifted value. The check unit works on what the register holds: it
// shifts r_D circularly one bit at a time, eleven times (eqs. 7, 8: the
// shifted code plus its former high bit, modulo 2^s - 1), and compares the
// result with the residue of the register contents (eq. 6). err_o is high
// while they differ, so an error in the shift or in the register itself is
// seen when R is read. Keeping r_D in a register is this design's choice.
//
// fault_i is XORed into the value being loaded to model a transient fault;
// tie it to 0 in normal use.
// Timing: load on the rising edge; q_o and err_o follow the register.
module r_reg
  import gost_pkg::res_t, gost_pkg::res_of, gost_pkg::res_rol1;
#(
  parameter int SHIFT = 11
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        load_i,
  input  logic [31:0] d_i,
  input  logic [31:0] fault_i,
  output logic [31:0] q_o,
  output logic        err_o
);

  logic [31:0] q;
  res_t        rd_q;
  res_t        r_shift;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      q    <= '0;
      rd_q <= '0;
    end else if (load_i) begin
      q    <= {d_i[31-SHIFT:0], d_i[31:32-SHIFT]} ^ fault_i;
      rd_q <= res_of(d_i);
    end
  end

  always_comb begin
    r_shift = rd_q;
    for (int i = 0; i < SHIFT; i++) r_shift = res_rol1(r_shift);
    err_o = (res_of(q) != r_shift);
  end

  assign q_o = q;

endmodule

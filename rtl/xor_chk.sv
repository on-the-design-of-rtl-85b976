// xor_chk: a 32-bit modulo-2 adder (Cm2 or Cm5) with its residue check unit.
//
// G = E xor F. Since E + F = (E xor F) + 2(E and F), the residue of G modulo
// p = 2^s - 1 must equal
//   r_xor = r_E + r_F + inv(rol1(r_{E and F}))   (eq. 10)
// where rol1 (a one-bit circular shift of the residue) doubles it and the
// ones complement negates it modulo p. The check unit compares r_G with
// r_xor and raises err_o on a mismatch.
//
// fault_i is XORed into G to model a transient fault; tie it to 0 in normal
// use. Purely combinational.
module xor_chk
  import gost_pkg::res_t, gost_pkg::res_of, gost_pkg::res_add, gost_pkg::res_neg, gost_pkg::res_rol1;
(
  input  logic [31:0] e_i,
  input  logic [31:0] f_i,
  input  logic [31:0] fault_i,
  output logic [31:0] g_o,
  output logic        err_o
);

  res_t r_pred;

  assign g_o = (e_i ^ f_i) ^ fault_i;

  always_comb begin
    r_pred = res_add(res_add(res_of(e_i), res_of(f_i)),
                     res_neg(res_rol1(res_of(e_i & f_i))));
    err_o  = (res_of(g_o) != r_pred);
  end

endmodule

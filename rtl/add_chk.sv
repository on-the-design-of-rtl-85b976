// add_chk: a 32-bit adder (Cm1, Cm3 or Cm4) with its residue check unit.
//
// END_AROUND = 0 gives addition modulo 2^32 (Cm1: data + key, Cm3: N3 + C2);
// END_AROUND = 1 gives addition modulo 2^32 - 1 (Cm4: N4 + C1), in which the
// carry out is added back in at bit 0.
//
// The check unit forms the residues r_A, r_B and r_C of the operands and of
// the sum modulo p = 2^s - 1 (sum of s-bit digits) and compares r_C with the
// residue predicted from the operands:
//   modulo 2^32     r_C' = r_A + r_B - alpha  (alpha = carry out, eq. 4)
//   modulo 2^32-1   r_C' = r_A + r_B          (eq. 11)
// (both because 2^32 == 1 mod p). A mismatch raises err_o for that cycle; the
// controller then repeats the operation, as the document prescribes.
//
// fault_i is XORed into the adder's result before it leaves the unit. It
// models a transient fault so that the check can be exercised; tie it to 0
// in normal use. Purely combinational.
module add_chk
  import gost_pkg::res_t, gost_pkg::res_of, gost_pkg::res_add, gost_pkg::res_neg;
#(
  parameter bit END_AROUND = 1'b0
) (
  input  logic [31:0] a_i,
  input  logic [31:0] b_i,
  input  logic [31:0] fault_i,
  output logic [31:0] sum_o,
  output logic        err_o
);

  logic [32:0] raw;
  logic        alpha;
  logic [31:0] sum;
  res_t        r_pred;

  // the adder (Cm)
  assign raw   = {1'b0, a_i} + {1'b0, b_i};
  assign alpha = raw[32];
  assign sum   = END_AROUND ? (raw[31:0] + {31'd0, alpha}) : raw[31:0];
  assign sum_o = sum ^ fault_i;

  // the check unit
  always_comb begin
    r_pred = res_add(res_of(a_i), res_of(b_i));
    if (!END_AROUND && alpha) r_pred = res_add(r_pred, res_neg(res_t'(1)));
    err_o = (res_of(sum_o) != r_pred);
  end

endmodule

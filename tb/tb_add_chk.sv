// tb_add_chk: checks both adder variants with their check units: modulo 2^32
// (Cm1, Cm3) and modulo 2^32-1 with end-around carry (Cm4). Sums are compared
// with 64-bit arithmetic; with no fault the check must stay quiet, a
// single-bit fault must always raise it, and for random faults the error flag
// must match whether the residue modulo 255 of the result changed.
module tb_add_chk;
  import gost_ref_pkg::*;

  logic [31:0] a, b, f;
  logic [31:0] s0, s1;
  logic        e0, e1;
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  add_chk #(.END_AROUND(1'b0)) dut0 (.a_i(a), .b_i(b), .fault_i(f), .sum_o(s0), .err_o(e0));
  add_chk #(.END_AROUND(1'b1)) dut1 (.a_i(a), .b_i(b), .fault_i(f), .sum_o(s1), .err_o(e1));

  task automatic run(input logic [31:0] va, input logic [31:0] vb, input logic [31:0] vf);
    longint unsigned t;
    logic [31:0] r0, r1;
    bit x0, x1;
    a = va; b = vb; f = vf;
    #1;
    t  = longint'(va) + longint'(vb);
    r0 = t[31:0];
    r1 = (t >= 64'h1_0000_0000) ? 32'(t - 64'hFFFF_FFFF) : t[31:0];
    x0 = ref_res(r0 ^ vf, 8) != ref_res(r0, 8);
    x1 = ref_res(r1 ^ vf, 8) != ref_res(r1, 8);
    checks += 2;
    if (s0 !== (r0 ^ vf) || e0 !== x0) begin
      failures++;
      $display("FAIL mod2^32 %h+%h f=%h: %h err=%b", va, vb, vf, s0, e0);
    end
    if (s1 !== (r1 ^ vf) || e1 !== x1) begin
      failures++;
      $display("FAIL mod2^32-1 %h+%h f=%h: %h err=%b", va, vb, vf, s1, e1);
    end
  endtask

  initial begin
    run(32'hFFFF_FFFF, 32'h0000_0001, 0);
    run(32'hFFFF_FFFF, 32'hFFFF_FFFF, 0);
    run(32'hFFFF_FFFE, 32'h0000_0001, 0);
    run(32'h8000_0000, 32'h8000_0000, 0);
    for (int n = 0; n < 500; n++) run($urandom, $urandom, 0);
    for (int n = 0; n < 500; n++) run($urandom, $urandom, 32'd1 << $urandom_range(31));
    for (int n = 0; n < 500; n++) run($urandom, $urandom, $urandom);
    // a single-bit fault must always be seen
    for (int n = 0; n < 200; n++) begin
      a = $urandom; b = $urandom; f = 32'd1 << $urandom_range(31);
      #1;
      checks++;
      if (!e0 || !e1) begin
        failures++;
        $display("FAIL single-bit fault not detected");
      end
    end
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

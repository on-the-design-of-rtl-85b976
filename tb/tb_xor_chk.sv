// tb_xor_chk: checks the modulo-2 adder (Cm2, Cm5) and its check unit: the
// result must be E xor F, the check must be quiet with no fault, always fire
// on a single-bit fault, and for random faults follow whether the residue
// modulo 255 of the result changed.
module tb_xor_chk;
  import gost_ref_pkg::*;

  logic [31:0] e, f, fl, g;
  logic        err;
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  xor_chk dut (.e_i(e), .f_i(f), .fault_i(fl), .g_o(g), .err_o(err));

  task automatic run(input logic [31:0] ve, input logic [31:0] vf, input logic [31:0] vfl);
    logic [31:0] r;
    bit x;
    e = ve; f = vf; fl = vfl;
    #1;
    r = ve ^ vf;
    x = ref_res(r ^ vfl, 8) != ref_res(r, 8);
    checks++;
    if (g !== (r ^ vfl) || err !== x) begin
      failures++;
      $display("FAIL %h^%h f=%h: %h err=%b exp_err=%b", ve, vf, vfl, g, err, x);
    end
  endtask

  initial begin
    run(32'hFFFF_FFFF, 32'hFFFF_FFFF, 0);
    run(32'hFFFF_FFFF, 32'h0, 0);
    run(32'h0, 32'h0, 0);
    for (int n = 0; n < 1000; n++) run($urandom, $urandom, 0);
    for (int n = 0; n < 500; n++) run($urandom, $urandom, 32'd1 << $urandom_range(31));
    for (int n = 0; n < 500; n++) run($urandom, $urandom, $urandom);
    for (int n = 0; n < 200; n++) begin
      e = $urandom; f = $urandom; fl = 32'd1 << $urandom_range(31);
      #1;
      checks++;
      if (!err) begin
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

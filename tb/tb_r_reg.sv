// tb_r_reg: loads random words into the R register and checks that it holds
// them rotated left by 11, that it keeps its value without load, that the
// shift check is quiet for a correct shift, and that a fault injected into the
// loaded value raises the check (always for one bit; for random masks exactly
// when the residue modulo 255 changes).
module tb_r_reg;
  import gost_ref_pkg::*;

  logic        clk = 0, rst_n = 0, load = 0;
  logic [31:0] d = '0, f = '0, q;
  logic        err;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  r_reg dut (.clk(clk), .rst_n(rst_n), .load_i(load), .d_i(d), .fault_i(f), .q_o(q), .err_o(err));

  task automatic ld(input logic [31:0] v, input logic [31:0] m);
    logic [31:0] r;
    bit x;
    @(negedge clk);
    load = 1; d = v; f = m;
    @(negedge clk);
    load = 0; d = $urandom; f = $urandom;
    r = (v << 11) | (v >> 21);
    x = ref_res(r ^ m, 8) != ref_res(r, 8);
    checks++;
    if (q !== (r ^ m) || err !== x) begin
      failures++;
      $display("FAIL d=%h q=%h exp=%h err=%b exp_err=%b", v, q, r ^ m, err, x);
    end
    @(negedge clk);
    checks++;
    if (q !== (r ^ m)) begin
      failures++;
      $display("FAIL R did not hold its value");
    end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < 300; n++) ld($urandom, 0);
    for (int n = 0; n < 200; n++) ld($urandom, 32'd1 << $urandom_range(31));
    for (int n = 0; n < 200; n++) ld($urandom, $urandom);
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

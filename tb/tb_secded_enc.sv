// tb_secded_enc: checks the SEC-DED check-bit encoder for 32-bit words and
// 4-bit entries against check bits computed from an explicit position table,
// for walking-one and random data.
module tb_secded_enc;
  import gost_ref_pkg::*;

  logic [31:0] d32;
  logic [6:0]  c32;
  logic [3:0]  d4;
  logic [3:0]  c4;
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  secded_enc #(.K(32)) dut32 (.data_i(d32), .chk_o(c32));
  secded_enc #(.K(4))  dut4  (.data_i(d4),  .chk_o(c4));

  task automatic check32(input logic [31:0] d);
    logic [7:0] exp;
    d32 = d;
    #1;
    exp = ref_chk(d, 32, 7);
    checks++;
    if (c32 !== exp[6:0]) begin
      failures++;
      $display("FAIL d=%h chk=%h exp=%h", d, c32, exp[6:0]);
    end
  endtask

  task automatic check4(input logic [3:0] d);
    logic [7:0] exp;
    d4 = d;
    #1;
    exp = ref_chk({28'd0, d}, 4, 4);
    checks++;
    if (c4 !== exp[3:0]) begin
      failures++;
      $display("FAIL d4=%h chk=%h exp=%h", d, c4, exp[3:0]);
    end
  endtask

  initial begin
    for (int i = 0; i < 32; i++) check32(32'd1 << i);
    for (int i = 0; i < 200; i++) check32($urandom);
    for (int i = 0; i < 16; i++) check4(4'(i));
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

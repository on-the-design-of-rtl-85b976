// tb_secded_dec: checks the SEC-DED decoder. Codewords are built with the
// reference check bits; every single-bit error (data, check or parity bit)
// must be corrected and flagged as corrected, random double errors must be
// flagged as uncorrectable, and clean words must pass unchanged.
module tb_secded_dec;
  import gost_ref_pkg::*;

  logic [31:0] d, q;
  logic [6:0]  c;
  logic        corr, unc;
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  secded_dec #(.K(32)) dut (.data_i(d), .chk_i(c), .data_o(q), .corr_o(corr), .uncorr_o(unc));

  task automatic expect_(input logic [31:0] ed, input bit ec, input bit eu, input string what);
    #1;
    checks++;
    if (q !== ed || corr !== ec || unc !== eu) begin
      failures++;
      $display("FAIL %s: q=%h exp=%h corr=%b unc=%b", what, q, ed, corr, unc);
    end
  endtask

  initial begin
    for (int n = 0; n < 60; n++) begin
      logic [31:0] data;
      logic [6:0]  chk;
      logic [38:0] cw, m;
      logic [7:0]  rc;
      data = $urandom;
      rc   = ref_chk(data, 32, 7);
      chk  = rc[6:0];
      cw   = {chk, data};
      {c, d} = cw;
      expect_(data, 1'b0, 1'b0, "clean");
      for (int b = 0; b < 39; b++) begin
        {c, d} = cw ^ (39'd1 << b);
        expect_(data, 1'b1, 1'b0, "single");
      end
      for (int t = 0; t < 20; t++) begin
        int b1, b2;
        b1 = $urandom_range(38);
        b2 = (b1 + 1 + $urandom_range(37)) % 39;
        m  = (39'd1 << b1) | (39'd1 << b2);
        {c, d} = cw ^ m;
        #1;
        checks++;
        if (unc !== 1'b1 || corr !== 1'b0) begin
          failures++;
          $display("FAIL double %0d %0d", b1, b2);
        end
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

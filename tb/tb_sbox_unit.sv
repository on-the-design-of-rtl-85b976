// tb_sbox_unit: loads random 4-bit tables K1..K8, checks the substitution of
// random words against a table model, then flips one bit of a table entry
// (corrected, flagged) and two bits (flagged uncorrectable).
module tb_sbox_unit;
  logic        clk = 0, rst_n = 0;
  logic        we = 0, inj = 0;
  logic [2:0]  wtab = '0;
  logic [3:0]  waddr = '0, wdata = '0;
  logic [31:0] x = '0, y;
  logic        corr, unc;
  logic [6:0]  iaddr = '0;
  logic [7:0]  imask = '0;
  logic [3:0]  tab [8][16];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  sbox_unit dut (.clk(clk), .rst_n(rst_n), .we_i(we), .wtab_i(wtab), .waddr_i(waddr),
                 .wdata_i(wdata), .x_i(x), .y_o(y), .corr_o(corr), .uncorr_o(unc),
                 .inj_i(inj), .inj_addr_i(iaddr), .inj_mask_i(imask));

  function automatic logic [31:0] subst(input logic [31:0] v);
    logic [31:0] r;
    for (int i = 0; i < 8; i++) r[4*i +: 4] = tab[i][v[4*i +: 4]];
    return r;
  endfunction

  task automatic look(input logic [31:0] v, input bit ec, input bit eu);
    x = v;
    #1;
    checks++;
    if ((!eu && y !== subst(v)) || corr !== ec || unc !== eu) begin
      failures++;
      $display("FAIL x=%h y=%h exp=%h corr=%b unc=%b", v, y, subst(v), corr, unc);
    end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 8; t++)
      for (int a = 0; a < 16; a++) begin
        tab[t][a] = 4'($urandom);
        @(negedge clk);
        we = 1; wtab = 3'(t); waddr = 4'(a); wdata = tab[t][a];
      end
    @(negedge clk);
    we = 0;
    for (int n = 0; n < 200; n++) look($urandom, 0, 0);
    for (int n = 0; n < 40; n++) begin
      int t, a, b;
      logic [31:0] v;
      t = $urandom_range(7);
      a = $urandom_range(15);
      b = $urandom_range(7);
      v = $urandom;
      v[4*t +: 4] = 4'(a);
      @(negedge clk);
      inj = 1; iaddr = {3'(t), 4'(a)}; imask = 8'd1 << b;
      @(negedge clk);
      inj = 0;
      look(v, 1, 0);
      @(negedge clk);
      inj = 1; imask = 8'd1 << ((b + 1) % 8);
      @(negedge clk);
      inj = 0;
      look(v, 0, 1);
      // restore the entry
      @(negedge clk);
      we = 1; wtab = 3'(t); waddr = 4'(a); wdata = tab[t][a];
      @(negedge clk);
      we = 0;
      look(v, 0, 0);
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

// tb_ecc_store: writes random words into an 8-word store, reads them back,
// then flips one and two bits of stored codewords through the injection port
// and checks that single errors are corrected (and flagged) and double errors
// flagged. Also checks that a rewrite clears an injected error.
module tb_ecc_store;
  logic        clk = 0, rst_n = 0;
  logic        we = 0, inj = 0;
  logic [2:0]  waddr = '0, raddr = '0, iaddr = '0;
  logic [31:0] wdata = '0, rdata;
  logic [38:0] imask = '0;
  logic        corr, unc;
  logic [31:0] model [8];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  ecc_store #(.W(32), .DEPTH(8)) dut (
    .clk(clk), .rst_n(rst_n), .we_i(we), .waddr_i(waddr), .wdata_i(wdata),
    .raddr_i(raddr), .rdata_o(rdata), .rd_corr_o(corr), .rd_uncorr_o(unc),
    .inj_i(inj), .inj_addr_i(iaddr), .inj_mask_i(imask));

  task automatic wr(input int a, input logic [31:0] v);
    @(negedge clk);
    we = 1; waddr = 3'(a); wdata = v;
    @(negedge clk);
    we = 0;
    model[a] = v;
  endtask

  task automatic flip(input int a, input logic [38:0] m);
    @(negedge clk);
    inj = 1; iaddr = 3'(a); imask = m;
    @(negedge clk);
    inj = 0;
  endtask

  task automatic rd(input int a, input bit ec, input bit eu);
    raddr = 3'(a);
    #1;
    checks++;
    if ((!eu && rdata !== model[a]) || corr !== ec || unc !== eu) begin
      failures++;
      $display("FAIL addr %0d: %h exp %h corr=%b unc=%b", a, rdata, model[a], corr, unc);
    end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int a = 0; a < 8; a++) model[a] = '0;
    for (int a = 0; a < 8; a++) rd(a, 0, 0);
    for (int a = 0; a < 8; a++) wr(a, $urandom);
    for (int a = 0; a < 8; a++) rd(a, 0, 0);
    for (int n = 0; n < 100; n++) begin
      int a, b;
      a = $urandom_range(7);
      b = $urandom_range(38);
      flip(a, 39'd1 << b);
      rd(a, 1, 0);
      flip(a, 39'd1 << ((b + 3) % 39));
      rd(a, 0, 1);
      wr(a, $urandom);
      rd(a, 0, 0);
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

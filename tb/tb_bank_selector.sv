// tb_bank_selector: for every tag LSB value, checks the one-hot bank enable
// and that one cycle later the output carries the selected bank's data,
// even when the select inputs have changed meanwhile; no enable without
// an access.
module tb_bank_selector;
  localparam int unsigned N = 3, LB = 16, BANKS = 8;
  logic clk = 0, rst_n = 1'b1, access = 0;
  always #5 clk = ~clk;
  initial #1 rst_n = 1'b0;   // falling edge so the asynchronous reset acts
  logic [N-1:0] tag_lsb = '0;
  logic [BANKS-1:0] bank_en;
  logic [LB-1:0] bank_rdata [BANKS], rdata;
  bank_selector #(.N(N), .LINE_BITS(LB)) dut (.*);
  int checks = 0, failures = 0;
  task automatic chk(input logic c, input string what);
    checks++; if (!c) begin failures++; $display("FAIL: %s", what); end
  endtask
  initial begin repeat (10000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
  initial begin
    foreach (bank_rdata[b]) bank_rdata[b] = LB'(16'hA000 + b * 16'h111);
    repeat (2) @(negedge clk); rst_n = 1;
    for (int it = 0; it < 200; it++) begin
      int s;
      s = $urandom_range(0, BANKS - 1);
      @(negedge clk); access = 1; tag_lsb = N'(s); #1;
      chk(bank_en == BANKS'(1) << s, $sformatf("enable for %0d is %b", s, bank_en));
      @(negedge clk); access = 0; tag_lsb = N'(s + 3); #1;
      chk(bank_en == '0, "no enable without access");
      chk(rdata == LB'(16'hA000 + s * 16'h111), $sformatf("output for bank %0d", s));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

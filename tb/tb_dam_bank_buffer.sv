// tb_dam_bank_buffer: for bank 5 of an N = 3 design, checks the bank enable
// for every round and key against the rule "the matched partner group of
// round k covers the banks agreeing with the key in bits N-1..k-1", and that
// the line read from the bank is captured one cycle later, kept, and
// dropped on clear.
module tb_dam_bank_buffer;
  localparam int unsigned N = 3, BANK = 5, LB = 16;
  logic clk = 0, rst_n = 1'b1, en = 1, clear = 0, capture = 0;
  always #5 clk = ~clk;
  initial #1 rst_n = 1'b0;   // falling edge so the asynchronous reset acts
  logic [1:0] round = '0;
  logic [N-1:0] key_lsb = '0;
  logic bank_rd_en, buf_valid;
  logic [LB-1:0] bank_rdata = '0, buf_data;
  dam_bank_buffer #(.N(N), .BANK(BANK), .LINE_BITS(LB)) dut (.*);
  int checks = 0, failures = 0;
  task automatic chk(input logic c, input string what);
    checks++; if (!c) begin failures++; $display("FAIL: %s", what); end
  endtask
  initial begin repeat (10000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
  initial begin
    repeat (2) @(negedge clk); rst_n = 1;
    for (int k = 1; k <= N; k++) for (int key = 0; key < 8; key++) begin
      logic exp;
      exp = ((BANK >> (k - 1)) == (key >> (k - 1)));
      @(negedge clk); clear = 1; @(negedge clk); clear = 0;
      chk(!buf_valid, "clear empties buffer");
      capture = 1; round = 2'(k); key_lsb = N'(key); #1;
      chk(bank_rd_en == exp, $sformatf("round %0d key %0d enable %0d", k, key, bank_rd_en));
      @(negedge clk); capture = 0; bank_rdata = LB'(16'h5000 + k * 16 + key); #1;
      chk(!bank_rd_en, "no enable without capture");
      @(negedge clk); bank_rdata = 16'hdead;
      chk(buf_valid == exp, "buffer valid after capture");
      if (exp) chk(buf_data == LB'(16'h5000 + k * 16 + key), "captured data");
      @(negedge clk);
      if (exp) chk(buf_data == LB'(16'h5000 + k * 16 + key), "data kept");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

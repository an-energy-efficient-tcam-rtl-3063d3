// tb_dam_da_logic: DA rises the cycle after a miss, stays high through
// further misses (which give no start pulse) and falls after finish.
module tb_dam_da_logic;
  logic clk = 0, rst_n = 1'b1, miss = 0, finish = 0, da, start;
  always #5 clk = ~clk;
  initial #1 rst_n = 1'b0;   // falling edge so the asynchronous reset acts
  dam_da_logic dut (.*);
  int checks = 0, failures = 0;
  task automatic chk(input logic c, input string what);
    checks++; if (!c) begin failures++; $display("FAIL: %s", what); end
  endtask
  initial begin repeat (10000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
  initial begin
    repeat (2) @(negedge clk); rst_n = 1;
    for (int it = 0; it < 20; it++) begin
      int len;
      len = $urandom_range(1, 6);
      @(negedge clk); chk(!da, "idle");
      miss = 1; #1 chk(start, "start pulse on miss");
      @(negedge clk); #1 chk(da && !start, "DA set, no second start");
      repeat (len) begin @(negedge clk); chk(da, "DA held"); end
      miss = 0; finish = 1; @(negedge clk); finish = 0;
      chk(!da, "DA cleared by finish");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_aggregation_counter: loads every AC value and checks the count and the
// thermometer don't-care mask against a mask computed in the testbench;
// checks that the count holds without `load` and clears on reset.
module tb_aggregation_counter;
  localparam int unsigned N = 3, AC_W = 2;
  logic clk = 0, rst_n = 1'b1, load = 0;
  logic [AC_W-1:0] load_val = '0, ac;
  logic [N-1:0] dc_mask;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;
  initial #1 rst_n = 1'b0;   // falling edge so the asynchronous reset acts
  aggregation_counter #(.N(N)) dut (.*);
  task automatic chk(input logic c, input string what);
    checks++; if (!c) begin failures++; $display("FAIL: %s", what); end
  endtask
  initial begin repeat (1000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
  initial begin
    repeat (2) @(negedge clk);
    chk(ac == 0 && dc_mask == 0, "reset value");
    rst_n = 1;
    for (int v = 0; v <= N; v++) begin
      @(negedge clk); load = 1; load_val = AC_W'(v);
      @(negedge clk); load = 0;
      chk(ac == AC_W'(v), $sformatf("ac after load %0d", v));
      chk(dc_mask == N'((1 << v) - 1), $sformatf("mask for ac %0d is %b", v, dc_mask));
      load_val = AC_W'(v + 1);
      @(negedge clk);
      chk(ac == AC_W'(v), "holds without load");
    end
    rst_n = 1'b0; @(negedge clk);
    chk(ac == 0, "async reset clears");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_lru_tracker: random touches in a 2-set x 4-way tracker against a
// recency-list model in the testbench; checks that the victim is the first
// invalid way of the set, or else the least recently touched way.
module tb_lru_tracker;
  localparam int unsigned SETS = 2, WAYS = 4, ROWS = 8;
  logic clk = 0, rst_n = 1'b1, touch_en = 0;
  always #5 clk = ~clk;
  initial #1 rst_n = 1'b0;   // falling edge so the asynchronous reset acts
  logic [2:0] touch_row = '0, victim_row;
  logic [0:0] victim_set = '0;
  logic [ROWS-1:0] valid_vec = '1;
  lru_tracker #(.SETS(SETS), .WAYS(WAYS)) dut (.*);
  int checks = 0, failures = 0;
  int order [SETS][$];   // front = most recently used way
  task automatic chk(input logic c, input string what);
    checks++; if (!c) begin failures++; $display("FAIL: %s", what); end
  endtask
  initial begin repeat (100000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
  initial begin
    for (int s = 0; s < SETS; s++) for (int w = 0; w < WAYS; w++) order[s].push_back(w);
    repeat (2) @(negedge clk); rst_n = 1;
    for (int it = 0; it < 3000; it++) begin
      int s, w, exp;
      s = $urandom_range(0, SETS - 1); w = $urandom_range(0, WAYS - 1);
      @(negedge clk);
      touch_en = 1; touch_row = 3'(s * WAYS + w);
      foreach (order[s][i]) if (order[s][i] == w) begin order[s].delete(i); break; end
      order[s].push_front(w);
      @(negedge clk); touch_en = 0;
      s = $urandom_range(0, SETS - 1);
      victim_set = 1'(s);
      valid_vec = ($urandom_range(0, 2) == 0) ? ROWS'($urandom) : '1;
      #1;
      exp = -1;
      for (int q = 0; q < WAYS; q++) if (!valid_vec[s * WAYS + q] && exp < 0) exp = q;
      if (exp < 0) exp = order[s][WAYS - 1];
      chk(victim_row == 3'(s * WAYS + exp), $sformatf("set %0d victim %0d exp way %0d", s, victim_row, exp));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

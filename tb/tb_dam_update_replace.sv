// tb_dam_update_replace: checks Replace for a level-0 decision, Update for
// any other level, both held until finish, and the invalidation of REGB one
// cycle after a round hit in round 2 or later (none after round 1).
module tb_dam_update_replace;
  localparam int unsigned N = 3, ROW_W = 7;
  logic clk = 0, rst_n = 1'b1, en = 1, start = 0, finish = 0, decide = 0, round_hit = 0, regb_valid = 0;
  always #5 clk = ~clk;
  initial #1 rst_n = 1'b0;   // falling edge so the asynchronous reset acts
  logic [1:0] level_next = '0, count = '0;
  logic [ROW_W-1:0] regb = '0, inv_row;
  logic replace, update, inv_en;
  dam_update_replace #(.N(N), .ROW_W(ROW_W)) dut (.*);
  int checks = 0, failures = 0;
  task automatic chk(input logic c, input string what);
    checks++; if (!c) begin failures++; $display("FAIL: %s", what); end
  endtask
  initial begin repeat (10000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
  initial begin
    repeat (2) @(negedge clk); rst_n = 1;
    for (int lv = 0; lv <= N; lv++) begin
      @(negedge clk); start = 1; @(negedge clk); start = 0;
      chk(!replace && !update, "cleared at start");
      for (int k = 1; k <= lv; k++) begin
        round_hit = 1; count = 2'(k); regb = ROW_W'(10 * k); regb_valid = (k > 1);
        @(negedge clk); round_hit = 0;
        regb = ROW_W'(10 * k - 3); regb_valid = 1; #1;
        chk(inv_en == (k > 1), $sformatf("invalidate after round %0d hit", k));
        if (k > 1) chk(inv_row == ROW_W'(10 * k - 3), "invalidates REGB");
      end
      decide = 1; level_next = 2'(lv); @(negedge clk); decide = 0;
      chk(!inv_en, "no invalidate after decision");
      chk(replace == (lv == 0) && update == (lv != 0), $sformatf("level %0d command", lv));
      repeat (3) @(negedge clk);
      chk(replace == (lv == 0) && update == (lv != 0), "held");
      finish = 1; @(negedge clk); finish = 0;
      chk(!replace && !update, "cleared by finish");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

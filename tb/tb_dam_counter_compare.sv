// tb_dam_counter_compare: plays scripted tag-array answers for each round
// and checks the outcome level, the number of rounds, the AC qualification
// of a hit (a match whose AC is not k-1 ends the search) and the OR of the
// dirty bits of the matched entries.
module tb_dam_counter_compare;
  import tcam_pkg::*;
  localparam int unsigned N = 3;
  logic clk = 0, rst_n = 1'b1, en = 0, start = 0, finish = 0;
  always #5 clk = ~clk;
  initial #1 rst_n = 1'b0;   // falling edge so the asynchronous reset acts
  logic match_hit = 0, match_dirty = 0;
  logic [1:0] match_ac = '0, count, level, level_next;
  logic round_hit, step, decide, dirty_acc;
  dam_state_e state;
  dam_counter_compare #(.N(N)) dut (.*);
  int checks = 0, failures = 0;
  task automatic chk(input logic c, input string what);
    checks++; if (!c) begin failures++; $display("FAIL: %s", what); end
  endtask
  // hits[k-1]: does round k match; acs[k-1]: AC of that match
  task automatic run(input int nhit_rounds, input int bad_ac_round, input logic [2:0] dirty,
                     input int exp_level, input int exp_rounds);
    int rounds;
    @(negedge clk); start = 1; en = 1; @(negedge clk); start = 0;
    rounds = 0;
    while (state == DAM_SEARCH && rounds < 10) begin
      rounds++;
      match_hit = (rounds <= nhit_rounds) || (rounds == bad_ac_round);
      match_ac = (rounds == bad_ac_round) ? 2'(rounds) : 2'(rounds - 1);
      match_dirty = dirty[rounds - 1];
      #1 chk(count == 2'(rounds), "counter steps once per round");
      @(negedge clk);
    end
    match_hit = 0;
    chk(state == DAM_WAIT, "waits after decision");
    chk(rounds == exp_rounds, $sformatf("rounds %0d exp %0d", rounds, exp_rounds));
    chk(level == 2'(exp_level), $sformatf("level %0d exp %0d", level, exp_level));
    chk(dirty_acc == |(dirty & 3'((1 << exp_level) - 1)), "dirty OR");
    @(negedge clk); chk(state == DAM_WAIT, "holds until finish");
    finish = 1; @(negedge clk); finish = 0;
    chk(state == DAM_IDLE, "idle after finish");
  endtask
  initial begin repeat (10000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
  initial begin
    repeat (2) @(negedge clk); rst_n = 1;
    run(0, 0, 3'b000, 0, 1);   // round 1 misses: replace
    run(1, 0, 3'b001, 1, 2);   // 1-bit aggregation
    run(2, 0, 3'b010, 2, 3);   // 2-bit aggregation
    run(3, 0, 3'b100, 3, 3);   // full 3-bit aggregation
    run(1, 2, 3'b011, 1, 2);   // round 2 matches an entry with the wrong AC
    run(0, 1, 3'b001, 0, 1);   // round 1 matches an aggregated entry: no hit
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

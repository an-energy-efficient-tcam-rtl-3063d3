// tb_dynamic_aggregator_module: runs the DAM against a small behavioural
// tag array (ternary match on the key it drives) and data banks (each
// returns bank*256+row one cycle after a read). Three misses are checked:
//   full 3-bit aggregation: partners 001, 01X and 1XX present -> Update at
//     level 3 into the 1XX row, the two earlier partner rows invalidated,
//     buffers of banks 1..7 filled from the right rows, dirty bits OR-ed;
//   no partner -> Replace, nothing invalidated or buffered;
//   a round-2 match with the wrong AC -> Update at level 1 only.
// It also checks DA and that `done` comes within N+3 cycles of the miss.
module tb_dynamic_aggregator_module;
  localparam int unsigned W = 8, N = 3, ROW_W = 3, LB = 16, ROWS = 8, BANKS = 8;
  logic clk = 0, rst_n = 1'b1, miss = 0, finish = 0;
  always #5 clk = ~clk;
  initial #1 rst_n = 1'b0;   // falling edge so the asynchronous reset acts
  logic [W-1:0] miss_tag = '0, search_key, final_tag;
  logic da, searching, match_hit, match_dirty, inv_en, done, replace, update, final_dirty;
  logic [ROW_W-1:0] match_row, bank_rd_row, inv_row, final_row;
  logic [1:0] match_ac, final_ac;
  logic [BANKS-1:0] bank_rd_en, buf_valid;
  logic [LB-1:0] bank_rdata [BANKS], buf_data [BANKS];
  dynamic_aggregator_module #(.W(W), .N(N), .ROW_W(ROW_W), .LINE_BITS(LB)) dut (.*);

  logic [W-1:0] e_tag [ROWS]; int e_ac [ROWS]; logic e_v [ROWS], e_d [ROWS];
  int checks = 0, failures = 0;
  task automatic chk(input logic c, input string what);
    checks++; if (!c) begin failures++; $display("FAIL: %s", what); end
  endtask

  always_comb begin
    match_hit = 0; match_row = '0; match_ac = '0; match_dirty = 0;
    for (int r = 0; r < ROWS; r++)
      if (e_v[r] && ((e_tag[r] ^ search_key) & ~W'((1 << e_ac[r]) - 1)) == 0) begin
        match_hit = 1; match_row = ROW_W'(r); match_ac = 2'(e_ac[r]); match_dirty = e_d[r];
      end
  end
  always @(posedge clk) begin
    for (int b = 0; b < BANKS; b++) if (bank_rd_en[b]) bank_rdata[b] <= LB'(b * 256 + bank_rd_row);
    if (inv_en) e_v[inv_row] <= 1'b0;
  end

  task automatic clear_entries();
    for (int r = 0; r < ROWS; r++) begin e_v[r] = 0; e_d[r] = 0; e_ac[r] = 0; e_tag[r] = '0; end
  endtask
  task automatic put(input int r, input logic [W-1:0] t, input int ac, input logic d);
    e_v[r] = 1; e_tag[r] = t; e_ac[r] = ac; e_d[r] = d;
  endtask
  task automatic do_miss(input logic [W-1:0] t, output int cycles);
    @(negedge clk); miss = 1; miss_tag = t;
    @(negedge clk); miss = 0; miss_tag = '0;
    chk(da, "DA raised");
    cycles = 1;
    while (!done && cycles < 20) begin @(negedge clk); cycles++; end
  endtask
  task automatic do_finish();
    finish = 1; @(negedge clk); finish = 0;
    chk(!da, "DA dropped after finish");
  endtask

  initial begin repeat (10000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
  initial begin
    int cyc;
    clear_entries();
    repeat (2) @(negedge clk); rst_n = 1;
    // 1: full aggregation of 0x80 with 0x81 (row 2), 0x82/01X (row 5), 0x84/1XX (row 6)
    put(2, 8'h81, 0, 0); put(5, 8'h83, 1, 1); put(6, 8'h84, 2, 0); put(0, 8'h40, 3, 1);
    do_miss(8'h80, cyc);
    chk(cyc <= N + 3, $sformatf("done after %0d cycles", cyc));
    chk(update && !replace, "update");
    chk(final_ac == 2'd3 && final_row == 3'd6 && final_tag == 8'h80, "final entry");
    chk(!e_v[2] && !e_v[5] && e_v[6] && e_v[0], "partner rows 2 and 5 invalidated, row 6 kept");
    chk(final_dirty, "dirty OR");
    chk(buf_valid == 8'b1111_1110, $sformatf("buffers %b", buf_valid));
    chk(buf_data[1] == LB'(1 * 256 + 2), "bank 1 from row 2");
    chk(buf_data[2] == LB'(2 * 256 + 5) && buf_data[3] == LB'(3 * 256 + 5), "banks 2,3 from row 5");
    for (int b = 4; b < 8; b++) chk(buf_data[b] == LB'(b * 256 + 6), "banks 4..7 from row 6");
    do_finish();
    // 2: no partner: 0x48 (0x49 absent; row 0 covers 0x40..0x47 only)
    do_miss(8'h48, cyc);
    chk(replace && !update, "replace");
    chk(buf_valid == '0, "no buffers");
    chk(e_v[0] && e_v[6], "nothing invalidated");
    do_finish();
    // 3: 0x30 with 0x31 (row 1); 0x32 alone in row 3 has AC 0, so round 2 fails
    clear_entries();
    put(1, 8'h31, 0, 0); put(3, 8'h32, 0, 1);
    do_miss(8'h30, cyc);
    chk(update && final_ac == 2'd1 && final_row == 3'd1, "update at level 1");
    chk(e_v[1] && e_v[3], "no invalidation");
    chk(buf_valid == 8'b0000_0010 && buf_data[1] == LB'(256 + 1), "bank 1 buffered");
    chk(!final_dirty, "dirty of rejected entry not taken");
    do_finish();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

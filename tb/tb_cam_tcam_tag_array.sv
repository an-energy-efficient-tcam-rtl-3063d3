// tb_cam_tcam_tag_array: random writes, invalidations and dirty marks on a
// 2-set x 4-way array with 3 ternary bits; after every operation a random
// search is compared with a reference model of ternary matching kept in the
// testbench. Entries get distinct upper tag bits so that no two entries
// overlap (the array's one-match rule). Also checks the read port.
module tb_cam_tcam_tag_array;
  localparam int unsigned SETS = 2, WAYS = 4, W = 8, N = 3, AC_W = 2, ROWS = 8, ROW_W = 3, SET_W = 1;
  logic clk = 0, rst_n = 1'b1;
  always #5 clk = ~clk;
  initial #1 rst_n = 1'b0;   // falling edge so the asynchronous reset acts
  logic [SET_W-1:0] search_set = '0;
  logic [W-1:0] search_key = '0, rd_tag, wr_tag = '0;
  logic match_hit, match_dirty, rd_valid, rd_dirty, wr_en = 0, wr_dirty = 0, inv_en = 0, dirty_en = 0;
  logic [ROW_W-1:0] match_row, rd_row = '0, wr_row = '0, inv_row = '0, dirty_row = '0;
  logic [AC_W-1:0] match_ac, rd_ac, wr_ac = '0;
  logic [ROWS-1:0] valid_vec;
  cam_tcam_tag_array #(.SETS(SETS), .WAYS(WAYS), .W(W), .N(N)) dut (.*);
  int checks = 0, failures = 0;
  logic [W-1:0] m_tag [ROWS]; int m_ac [ROWS]; logic m_v [ROWS], m_d [ROWS];
  task automatic chk(input logic c, input string what);
    checks++; if (!c) begin failures++; $display("FAIL: %s", what); end
  endtask
  initial begin repeat (100000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
  initial begin
    foreach (m_v[r]) begin m_v[r] = 0; m_d[r] = 0; m_ac[r] = 0; m_tag[r] = '0; end
    repeat (2) @(negedge clk); rst_n = 1;
    for (int it = 0; it < 3000; it++) begin
      int op, r; int exp_row; logic exp_hit;
      op = $urandom_range(0, 3); r = $urandom_range(0, ROWS - 1);
      @(negedge clk);
      if (op <= 1) begin
        wr_en = 1; wr_row = ROW_W'(r); wr_ac = AC_W'($urandom_range(0, N));
        wr_tag = {5'(r + 1 + 8 * $urandom_range(0, 1)), 3'($urandom)};
        wr_dirty = 1'($urandom);
        m_v[r] = 1; m_tag[r] = wr_tag; m_ac[r] = wr_ac; m_d[r] = wr_dirty;
      end else if (op == 2) begin
        inv_en = 1; inv_row = ROW_W'(r); m_v[r] = 0;
      end else begin
        dirty_en = 1; dirty_row = ROW_W'(r); m_d[r] = 1;
      end
      @(negedge clk);
      wr_en = 0; inv_en = 0; dirty_en = 0;
      // random search, biased to hit
      r = $urandom_range(0, ROWS - 1);
      search_set = SET_W'(r / WAYS);
      search_key = ($urandom_range(0, 2) != 0) ? (m_tag[r] ^ W'($urandom_range(0, 7))) : W'($urandom);
      #1;
      exp_hit = 0; exp_row = 0;
      for (int q = 0; q < ROWS; q++) begin
        logic [W-1:0] care;
        care = ~W'((1 << m_ac[q]) - 1);
        if (m_v[q] && q / WAYS == int'(search_set) && ((m_tag[q] ^ search_key) & care) == 0) begin
          exp_hit = 1; exp_row = q;
        end
      end
      chk(match_hit == exp_hit, $sformatf("hit %0d exp %0d key %h", match_hit, exp_hit, search_key));
      if (exp_hit) begin
        chk(match_row == ROW_W'(exp_row), "match row");
        chk(match_ac == AC_W'(m_ac[exp_row]), "match ac");
        chk(match_dirty == m_d[exp_row], "match dirty");
      end
      rd_row = ROW_W'($urandom_range(0, ROWS - 1)); #1;
      chk(rd_valid == m_v[rd_row] && rd_dirty == m_d[rd_row] && rd_ac == AC_W'(m_ac[rd_row])
          && (!m_v[rd_row] || rd_tag == m_tag[rd_row]), "read port");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

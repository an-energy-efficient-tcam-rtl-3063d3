// tb_data_bank: random word-masked writes and reads of a 16-row bank with
// 4 words per line, compared with a reference array; checks the one-cycle
// read latency and that the output holds while the bank is not enabled.
module tb_data_bank;
  localparam int unsigned ROWS = 16, LW = 4, WB = 8, ROW_W = 4;
  logic clk = 0, en = 0, we = 0;
  always #5 clk = ~clk;
  logic [LW-1:0] wmask = '0;
  logic [ROW_W-1:0] row = '0;
  logic [LW*WB-1:0] wdata = '0, rdata, model [ROWS], held;
  data_bank #(.ROWS(ROWS), .LINE_WORDS(LW), .WORD_BITS(WB)) dut (.*);
  int checks = 0, failures = 0;
  task automatic chk(input logic c, input string what);
    checks++; if (!c) begin failures++; $display("FAIL: %s", what); end
  endtask
  initial begin repeat (100000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
  initial begin
    for (int r = 0; r < ROWS; r++) begin
      @(negedge clk); en = 1; we = 1; wmask = '1; row = ROW_W'(r); wdata = LW*WB'($urandom); model[r] = wdata;
    end
    for (int it = 0; it < 2000; it++) begin
      @(negedge clk);
      row = ROW_W'($urandom_range(0, ROWS - 1));
      en = 1;
      if ($urandom_range(0, 1)) begin
        we = 1; wmask = LW'($urandom); wdata = LW*WB'($urandom);
        for (int w = 0; w < LW; w++) if (wmask[w]) model[row][w*WB +: WB] = wdata[w*WB +: WB];
      end else begin
        we = 0;
        @(negedge clk);
        chk(rdata == model[row], $sformatf("row %0d read %h exp %h", row, rdata, model[row]));
        held = rdata; en = 0; row = row + 1'b1;
        @(negedge clk);
        chk(rdata == held, "output holds while idle");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

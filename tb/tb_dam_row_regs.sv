// tb_dam_row_regs: loads a sequence of rows and checks that REGA takes the
// newest, REGB the previous one, the valid flags follow, loads without the
// DA enable are ignored and clear drops both flags.
module tb_dam_row_regs;
  localparam int unsigned ROW_W = 7;
  logic clk = 0, rst_n = 1'b1, en = 1, clear = 0, load = 0;
  always #5 clk = ~clk;
  initial #1 rst_n = 1'b0;   // falling edge so the asynchronous reset acts
  logic [ROW_W-1:0] new_row = '0, rega, regb;
  logic rega_valid, regb_valid;
  dam_row_regs #(.ROW_W(ROW_W)) dut (.*);
  int checks = 0, failures = 0;
  task automatic chk(input logic c, input string what);
    checks++; if (!c) begin failures++; $display("FAIL: %s", what); end
  endtask
  initial begin repeat (10000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
  initial begin
    repeat (2) @(negedge clk); rst_n = 1;
    for (int it = 0; it < 50; it++) begin
      logic [ROW_W-1:0] r1, r2, r3;
      r1 = ROW_W'($urandom); r2 = ROW_W'($urandom); r3 = ROW_W'($urandom);
      @(negedge clk); clear = 1; @(negedge clk); clear = 0;
      chk(!rega_valid && !regb_valid, "clear");
      load = 1; new_row = r1; @(negedge clk);
      chk(rega == r1 && rega_valid && !regb_valid, "first load");
      new_row = r2; @(negedge clk);
      chk(rega == r2 && regb == r1 && regb_valid, "second load shifts");
      en = 0; new_row = r3; @(negedge clk);
      chk(rega == r2 && regb == r1, "held without DA");
      en = 1; @(negedge clk); load = 0;
      chk(rega == r3 && regb == r2, "third load shifts");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

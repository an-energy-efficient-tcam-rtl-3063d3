// tb_dam_temp_register: loads random tags and checks that round k's search
// key is the tag with its k least significant bits inverted (k = 1..N),
// that the stored tag is kept unchanged, and that steps without the DA
// enable are ignored.
module tb_dam_temp_register;
  localparam int unsigned W = 12, N = 3;
  logic clk = 0, rst_n = 1'b1, en = 0, load = 0, step = 0;
  always #5 clk = ~clk;
  initial #1 rst_n = 1'b0;   // falling edge so the asynchronous reset acts
  logic [W-1:0] load_tag = '0, tag, key;
  dam_temp_register #(.W(W), .N(N)) dut (.*);
  int checks = 0, failures = 0;
  task automatic chk(input logic c, input string what);
    checks++; if (!c) begin failures++; $display("FAIL: %s", what); end
  endtask
  initial begin repeat (10000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
  initial begin
    repeat (2) @(negedge clk); rst_n = 1;
    for (int it = 0; it < 100; it++) begin
      logic [W-1:0] t;
      t = W'($urandom);
      @(negedge clk); load = 1; load_tag = t; en = 1;
      @(negedge clk); load = 0; load_tag = ~t;
      for (int k = 1; k <= N; k++) begin
        chk(key == (t ^ W'((1 << k) - 1)), $sformatf("round %0d key %h for tag %h", k, key, t));
        chk(tag == t, "tag kept");
        en = 0; step = 1; @(negedge clk);
        chk(key == (t ^ W'((1 << k) - 1)), "step ignored without DA");
        en = 1; @(negedge clk); step = 0;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// main_memory_model: behavioural model of the off-chip memory behind the
// cache (main memory for the L1 case, the page-table walk for the TLB case).
// Not synthesizable.
//
// Read channel: a line request is accepted (ready is always high while no
// read is outstanding) and its data appears on fill_valid/fill_data exactly
// LATENCY cycles after the accepting clock edge. Lines that were never
// written hold a fixed pattern computed from the line address (see
// `pattern`), so a testbench can predict every value. Write channel: accepts
// a line when `wr_ready` (which stalls one cycle in four when STALL_WR is
// set) and stores it. `reads` and `writes` count the transfers.
module main_memory_model #(
  parameter int unsigned LADDR_W    = 29,
  parameter int unsigned LINE_WORDS = 1,
  parameter int unsigned WORD_BITS  = 32,
  parameter int unsigned LATENCY    = 400,
  parameter bit          STALL_WR   = 1'b1
) (
  input  logic                            clk,
  input  logic                            rd_valid,
  output logic                            rd_ready,
  input  logic [LADDR_W-1:0]              rd_addr,
  output logic                            fill_valid,
  output logic [LINE_WORDS*WORD_BITS-1:0] fill_data,
  input  logic                            wr_valid,
  output logic                            wr_ready,
  input  logic [LADDR_W-1:0]              wr_addr,
  input  logic [LINE_WORDS*WORD_BITS-1:0] wr_data,
  output int                              reads,
  output int                              writes
);

  logic [LINE_WORDS*WORD_BITS-1:0] store [logic [LADDR_W-1:0]];
  logic                 busy = 1'b0;
  int                   timer = 0;
  logic [LADDR_W-1:0]   addr_q;
  int                   cyc = 0;

  function automatic logic [WORD_BITS-1:0] pattern(input logic [LADDR_W-1:0] a, input int w);
    logic [63:0] h;
    h = 64'(a) * 64'h9E37_79B9 + 64'(w) * 64'h85EB_CA6B + 64'h1234_5678;
    return WORD_BITS'(h ^ (h >> 17));
  endfunction

  function automatic logic [LINE_WORDS*WORD_BITS-1:0] line(input logic [LADDR_W-1:0] a);
    logic [LINE_WORDS*WORD_BITS-1:0] l;
    if (store.exists(a)) return store[a];
    for (int w = 0; w < LINE_WORDS; w++) l[w*WORD_BITS +: WORD_BITS] = pattern(a, w);
    return l;
  endfunction

  initial begin reads = 0; writes = 0; fill_valid = 1'b0; fill_data = '0; end

  assign rd_ready = !busy;
  assign wr_ready = !STALL_WR || (cyc % 4 != 3);

  always @(posedge clk) begin
    cyc <= cyc + 1;
    fill_valid <= 1'b0;
    if (busy) begin
      if (timer == 1) begin
        fill_valid <= 1'b1;
        fill_data  <= line(addr_q);
        busy       <= 1'b0;
      end
      timer <= timer - 1;
    end else if (rd_valid) begin
      busy   <= 1'b1;
      timer  <= LATENCY;
      addr_q <= rd_addr;
      reads  <= reads + 1;
    end
    if (wr_valid && wr_ready) begin
      store[wr_addr] = wr_data;
      writes <= writes + 1;
    end
  end

endmodule

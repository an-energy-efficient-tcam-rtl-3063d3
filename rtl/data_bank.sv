// data_bank: one data bank of the TCAM enhanced cache.
//
// The data array is split into 2^N banks; bank b holds, for every tag entry,
// the line whose tag LSBs equal b. Each bank therefore has one row per tag
// entry (ROWS = SETS * WAYS) and is the size of the data array of a
// conventional cache with the same number of tag entries. A line is
// LINE_WORDS words of WORD_BITS bits; writes use a per-word enable so that
// a store hit updates one word and a fill writes the whole line.
//
// Timing: synchronous single-port SRAM. A read with `en` and `!we` returns
// the row on `rdata` after the next rising edge; `rdata` holds its value
// while `en` is low. A write with `en` and `we` writes the enabled words.
module data_bank #(
  parameter int unsigned ROWS       = 128,
  parameter int unsigned LINE_WORDS = 1,
  parameter int unsigned WORD_BITS  = 32,
  parameter int unsigned ROW_W      = (ROWS > 1) ? $clog2(ROWS) : 1
) (
  input  logic                              clk,
  input  logic                              en,
  input  logic                              we,
  input  logic [LINE_WORDS-1:0]             wmask,
  input  logic [ROW_W-1:0]                  row,
  input  logic [LINE_WORDS*WORD_BITS-1:0]   wdata,
  output logic [LINE_WORDS*WORD_BITS-1:0]   rdata
);

  logic [LINE_WORDS*WORD_BITS-1:0] mem [ROWS];

  always_ff @(posedge clk) begin
    if (en) begin
      if (we) begin
        for (int w = 0; w < LINE_WORDS; w++)
          if (wmask[w]) mem[row][w*WORD_BITS +: WORD_BITS] <= wdata[w*WORD_BITS +: WORD_BITS];
      end else begin
        rdata <= mem[row];
      end
    end
  end

endmodule

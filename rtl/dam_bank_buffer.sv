// dam_bank_buffer: Bank Enable Logic and one-line buffer of one data bank.
//
// During aggregation each data bank has a buffer that can hold one line.
// When round k finds a partner entry (AC = k-1), that entry's lines sit in
// the 2^(k-1) banks whose index agrees with the search key in bits N-1 down
// to k-1. This unit's Bank Enable Logic raises `bank_rd_en` for its own
// bank (index BANK) exactly when it is one of those, so the bank reads the
// matched row; the line is captured into the buffer on the following edge.
// At the end of the miss the cache writes every valid buffer back into the
// row of the final aggregated entry.
//
// Timing: `bank_rd_en` is combinational from `capture`, `round` and
// `key_lsb`; `buf_data`/`buf_valid` update one cycle after the enable
// (the bank read latency). `clear` empties the buffer at the start of a
// miss. Reset empties it too.
module dam_bank_buffer
  import tcam_pkg::*;
#(
  parameter int unsigned N          = 3,
  parameter int unsigned BANK       = 0,
  parameter int unsigned LINE_BITS  = 32,
  parameter int unsigned AC_W       = $clog2(N + 1)
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 en,        // DA: gated-clock enable
  input  logic                 clear,
  input  logic                 capture,   // round hit this cycle
  input  logic [AC_W-1:0]      round,     // k, the current round (1..N)
  input  logic [N-1:0]         key_lsb,   // search key LSBs of this round
  output logic                 bank_rd_en,
  input  logic [LINE_BITS-1:0] bank_rdata,
  output logic [LINE_BITS-1:0] buf_data,
  output logic                 buf_valid
);

  logic rd_pending;

  assign bank_rd_en = en && capture && round != '0
                      && bank_in_group(BANK, int'(key_lsb), int'(round) - 1);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rd_pending <= 1'b0;
      buf_valid  <= 1'b0;
      buf_data   <= '0;
    end else if (clear) begin
      rd_pending <= 1'b0;
      buf_valid  <= 1'b0;
    end else if (en) begin
      rd_pending <= bank_rd_en;
      if (rd_pending) begin
        buf_data  <= bank_rdata;
        buf_valid <= 1'b1;
      end
    end
  end

endmodule

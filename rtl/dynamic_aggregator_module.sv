// dynamic_aggregator_module: the Dynamic Aggregator Module (DAM).
//
// On every cache miss the DAM tries to merge the missed tag with the tag
// entries already in the cache, while the missed line is being fetched, so
// the work is hidden behind the memory latency. It is built from the seven
// units the architecture names: the Temporary Register (TR), one Bank
// Enable Logic unit with a line buffer per data bank, the DA Logic, the
// per-entry Aggregation Counters (kept in the tag array), the REGA/REGB row
// registers, the Counter and Comparison Logic and the Update/Replace Logic.
//
// Sequence for a miss on tag T (one clock per round, k = 1..N):
//   round k searches T ^ (2^k-1); a hit needs a match with AC = k-1.
//   hit : REGA <= matched row (old REGA -> REGB, then invalidated); the
//         matched super-block's lines are read into the bank buffers.
//   miss: stop. Round 1 miss -> Replace; otherwise -> Update of REGA.
// The cache controller performs Replace/Update when the line arrives and
// pulses `finish`, which returns the DAM to idle (DA = 0).
//
// Interface: `miss` starts the DAM with `miss_tag`; `search_key` drives the
// tag array while `searching`; the tag array's match result comes back
// combinationally in the same cycle. `bank_rd_en` reads row `bank_rd_row`
// of the enabled banks and `bank_rdata` is sampled one cycle later.
// Timing: a miss takes at most N search cycles plus one cycle to settle the
// last buffer, after which `done` is high.
module dynamic_aggregator_module
  import tcam_pkg::*;
#(
  parameter int unsigned W         = 29,
  parameter int unsigned N         = 3,
  parameter int unsigned ROW_W     = 7,
  parameter int unsigned LINE_BITS = 32,
  parameter int unsigned AC_W      = $clog2(N + 1),
  parameter int unsigned BANKS     = 1 << N
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 miss,
  input  logic [W-1:0]         miss_tag,
  input  logic                 finish,
  output logic                 da,
  output logic                 searching,
  output logic [W-1:0]         search_key,
  input  logic                 match_hit,
  input  logic [ROW_W-1:0]     match_row,
  input  logic [AC_W-1:0]      match_ac,
  input  logic                 match_dirty,
  output logic [BANKS-1:0]     bank_rd_en,
  output logic [ROW_W-1:0]     bank_rd_row,
  input  logic [LINE_BITS-1:0] bank_rdata [BANKS],
  output logic                 inv_en,
  output logic [ROW_W-1:0]     inv_row,
  output logic                 done,
  output logic                 replace,
  output logic                 update,
  output logic [W-1:0]         final_tag,
  output logic [ROW_W-1:0]     final_row,
  output logic [AC_W-1:0]      final_ac,
  output logic                 final_dirty,
  output logic [BANKS-1:0]     buf_valid,
  output logic [LINE_BITS-1:0] buf_data [BANKS]
);

  logic            start;
  dam_state_e      state;
  logic [AC_W-1:0] count, level, level_next;
  logic            round_hit, step, decide;
  logic [ROW_W-1:0] rega, regb;
  logic            rega_valid, regb_valid;
  logic            settle;   // last buffer capture still in flight

  dam_da_logic u_da (
    .clk(clk), .rst_n(rst_n), .miss(miss), .finish(finish), .da(da), .start(start)
  );

  dam_temp_register #(.W(W), .N(N)) u_tr (
    .clk(clk), .rst_n(rst_n), .en(da), .load(start), .load_tag(miss_tag),
    .step(step), .tag(final_tag), .key(search_key)
  );

  dam_counter_compare #(.N(N), .AC_W(AC_W)) u_cc (
    .clk(clk), .rst_n(rst_n), .en(da), .start(start), .finish(finish),
    .match_hit(match_hit), .match_ac(match_ac), .match_dirty(match_dirty),
    .state(state), .count(count), .round_hit(round_hit), .step(step),
    .decide(decide), .level(level), .level_next(level_next), .dirty_acc(final_dirty)
  );

  dam_row_regs #(.ROW_W(ROW_W)) u_rows (
    .clk(clk), .rst_n(rst_n), .en(da), .clear(start), .load(round_hit),
    .new_row(match_row), .rega(rega), .rega_valid(rega_valid),
    .regb(regb), .regb_valid(regb_valid)
  );

  dam_update_replace #(.N(N), .AC_W(AC_W), .ROW_W(ROW_W)) u_ur (
    .clk(clk), .rst_n(rst_n), .en(da), .start(start), .finish(finish),
    .decide(decide), .level_next(level_next), .round_hit(round_hit), .count(count),
    .regb(regb), .regb_valid(regb_valid),
    .replace(replace), .update(update), .inv_en(inv_en), .inv_row(inv_row)
  );

  for (genvar b = 0; b < BANKS; b++) begin : g_buf
    dam_bank_buffer #(.N(N), .BANK(b), .LINE_BITS(LINE_BITS), .AC_W(AC_W)) u_buf (
      .clk(clk), .rst_n(rst_n), .en(da), .clear(start), .capture(round_hit),
      .round(count), .key_lsb(search_key[N-1:0]), .bank_rd_en(bank_rd_en[b]),
      .bank_rdata(bank_rdata[b]), .buf_data(buf_data[b]), .buf_valid(buf_valid[b])
    );
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) settle <= 1'b0;
    else        settle <= |bank_rd_en;
  end

  assign searching   = state == DAM_SEARCH;
  assign bank_rd_row = match_row;
  assign final_row   = rega;
  assign final_ac    = level;
  assign done        = state == DAM_WAIT && !settle && (replace || (update && rega_valid));

endmodule

// dam_counter_compare: Counter and Comparison Logic of the Dynamic
// Aggregator Module.
//
// Sequences the aggregation rounds of one miss. A counter steps k = 1..N,
// one round per clock: in round k the tag array is searched with the TR's
// key, and the round hits only if an entry matches AND its AC equals k-1,
// i.e. the entry found is exactly the partner group of the missed tag at
// level k-1 (a match with another AC is an unaggregated entry that merely
// overlaps the key and cannot be merged). A hit advances the counter; the
// first round that fails, or a hit in round N, ends the search:
//   round 1 fails          -> level 0, the miss needs a replacement
//   round k > 1 fails      -> level k-1, the last matched entry is updated
//   round N hits           -> level N
// The dirty bits of all matched entries are OR-ed, since the merged
// super-block has a single dirty bit.
//
// Timing: `round_hit`, `step` and `decide` are combinational from the
// current round's search result; `decide` is a one-cycle pulse, after which
// the unit waits in DAM_WAIT until `finish`. Reset returns to DAM_IDLE.
module dam_counter_compare
  import tcam_pkg::*;
#(
  parameter int unsigned N    = 3,
  parameter int unsigned AC_W = $clog2(N + 1)
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            en,          // DA: gated-clock enable
  input  logic            start,
  input  logic            finish,
  input  logic            match_hit,
  input  logic [AC_W-1:0] match_ac,
  input  logic            match_dirty,
  output dam_state_e      state,
  output logic [AC_W-1:0] count,
  output logic            round_hit,
  output logic            step,
  output logic            decide,
  output logic [AC_W-1:0] level,
  output logic [AC_W-1:0] level_next,
  output logic            dirty_acc
);

  assign round_hit  = state == DAM_SEARCH && match_hit && match_ac == count - 1'b1;
  assign decide     = state == DAM_SEARCH && (!round_hit || count == AC_W'(N));
  assign step       = state == DAM_SEARCH && round_hit && count != AC_W'(N);
  assign level_next = round_hit ? count : level;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= DAM_IDLE;
      count     <= '0;
      level     <= '0;
      dirty_acc <= 1'b0;
    end else if (start) begin
      state     <= DAM_SEARCH;
      count     <= AC_W'(1);
      level     <= '0;
      dirty_acc <= 1'b0;
    end else if (en) begin
      unique case (state)
        DAM_SEARCH: begin
          if (round_hit) begin
            level     <= count;
            dirty_acc <= dirty_acc | match_dirty;
          end
          if (decide)    state <= DAM_WAIT;
          else if (step) count <= count + 1'b1;
        end
        DAM_WAIT:   if (finish) state <= DAM_IDLE;
        default:    state <= DAM_IDLE;
      endcase
    end
  end

endmodule

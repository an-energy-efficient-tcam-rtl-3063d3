// dam_update_replace: Update/Replace Logic of the Dynamic Aggregator Module.
//
// Turns the outcome of the aggregation rounds into the two commands the
// cache's fill logic (the MMU role in the document) acts on:
//   Replace - no partner was found (level 0): the missed line goes into the
//             LRU entry as a new, unaggregated entry.
//   Update  - at least one round hit: the entry in REGA is rewritten with
//             the missed tag and AC = level, and the buffered lines plus the
//             missed line are written into its row.
// Both are held from the decision until `finish`. The unit also invalidates
// the entry matched in the previous round once a later round hits (that
// entry is REGB after the row registers shift), because its lines now sit
// in the bank buffers and belong to the larger super-block.
//
// Timing: `replace`/`update` are registered (one cycle after `decide`);
// `inv_en` is registered one cycle after a round hit with k > 1 and uses
// REGB of that cycle. `inv_row` is REGB itself, wired straight through: the
// unit decides only when that row is invalidated. Reset clears everything.
module dam_update_replace #(
  parameter int unsigned N     = 3,
  parameter int unsigned AC_W  = $clog2(N + 1),
  parameter int unsigned ROW_W = 7
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             en,          // DA: gated-clock enable
  input  logic             start,
  input  logic             finish,
  input  logic             decide,
  input  logic [AC_W-1:0]  level_next,
  input  logic             round_hit,
  input  logic [AC_W-1:0]  count,
  input  logic [ROW_W-1:0] regb,
  input  logic             regb_valid,
  output logic             replace,
  output logic             update,
  output logic             inv_en,
  output logic [ROW_W-1:0] inv_row
);

  logic inv_pending;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      replace     <= 1'b0;
      update      <= 1'b0;
      inv_pending <= 1'b0;
    end else if (start || finish) begin
      replace     <= 1'b0;
      update      <= 1'b0;
      inv_pending <= 1'b0;
    end else if (en) begin
      inv_pending <= round_hit && count > AC_W'(1);
      if (decide) begin
        replace <= level_next == '0;
        update  <= level_next != '0;
      end
    end
  end

  assign inv_en  = inv_pending && regb_valid;
  assign inv_row = regb;

endmodule

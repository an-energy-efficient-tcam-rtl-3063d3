// dam_row_regs: Register A and Register B of the Dynamic Aggregator Module.
//
// REGA holds the row address of the tag entry matched in the latest
// aggregation round, REGB the row REGA held before it. When a new round
// hits, the old REGA moves to REGB (that entry is then invalidated, its
// lines being in the bank buffers) and the new match goes to REGA. At the
// end of the miss REGA is the row that receives the aggregated entry.
// Each register has a valid flag, cleared at the start of a miss.
//
// Timing: `clear` and `load` act at the rising edge. Reset clears all.
module dam_row_regs #(
  parameter int unsigned ROW_W = 7
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             en,        // DA: gated-clock enable
  input  logic             clear,
  input  logic             load,
  input  logic [ROW_W-1:0] new_row,
  output logic [ROW_W-1:0] rega,
  output logic             rega_valid,
  output logic [ROW_W-1:0] regb,
  output logic             regb_valid
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rega <= '0; regb <= '0;
      rega_valid <= 1'b0; regb_valid <= 1'b0;
    end else if (clear) begin
      rega_valid <= 1'b0; regb_valid <= 1'b0;
    end else if (en && load) begin
      regb       <= rega;
      regb_valid <= rega_valid;
      rega       <= new_row;
      rega_valid <= 1'b1;
    end
  end

endmodule

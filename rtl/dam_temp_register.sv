// dam_temp_register: Temporary Register (TR) of the Dynamic Aggregator Module.
//
// On a miss the TR stores the missed W-bit tag. Aggregation round k searches
// the tag array for the partner group of the missed tag at level k-1, which
// is the missed tag with bit k-1 inverted. The TR does this cumulatively, as
// the document describes: round 1 inverts the LSB, every later round
// inverts one more bit, so round k searches tag ^ (2^k - 1). The bits below
// k-1 are don't cares in the entry being sought, so their value in the key
// does not matter; the Comparison Logic tells an aggregated partner from a
// plain entry by its AC.
//
// Timing: `load` (the miss) and `step` (next round) act at the rising edge;
// `key` is combinational from the register. `tag` keeps the missed tag for
// the final tag write. Reset clears both registers.
module dam_temp_register #(
  parameter int unsigned W = 29,
  parameter int unsigned N = 3
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         en,      // DA: gated-clock enable of the DAM
  input  logic         load,
  input  logic [W-1:0] load_tag,
  input  logic         step,
  output logic [W-1:0] tag,
  output logic [W-1:0] key
);

  logic [N-1:0] inv_q;   // bits of the tag inverted for the current round

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      tag   <= '0;
      inv_q <= '0;
    end else if (load) begin
      tag   <= load_tag;
      inv_q <= N'(1);
    end else if (en && step) begin
      inv_q <= (inv_q << 1) | N'(1);
    end
  end

  assign key = tag ^ W'(inv_q);

endmodule

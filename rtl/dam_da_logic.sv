// dam_da_logic: Dynamic Aggregator (DA) Logic.
//
// Raises DA on a cache miss and holds it until the miss has been completed
// (the missed line has been written into the cache), then drops it. DA is
// the enable of every clock-gated register of the aggregator, so the module
// is idle between misses. A miss while DA is already high is ignored (the
// cache is blocking and cannot start a second miss). `start` is a one-cycle
// pulse marking the cycle in which a new aggregation begins.
//
// Timing: `da` is registered; `start` is combinational (miss && !da).
// Reset drops DA.
module dam_da_logic (
  input  logic clk,
  input  logic rst_n,
  input  logic miss,
  input  logic finish,
  output logic da,
  output logic start
);

  assign start = miss && !da;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)      da <= 1'b0;
    else if (start)  da <= 1'b1;
    else if (finish) da <= 1'b0;
  end

endmodule

// aggregation_counter: the Aggregation Counter (AC) of one tag array entry.
//
// The AC records how many of the entry's N ternary tag LSBs currently hold
// the don't-care value. The document gives a 2-bit AC for its 3-bit design;
// here the width is $clog2(N+1) so that any N works. The counter is loaded
// (not stepped) when an entry is written: a new entry gets 0, an entry
// completed by dynamic aggregation gets the number of rounds that hit.
// The don't-care mask of the ternary cells is decoded from the count as a
// thermometer code (mask bit i is set when AC > i).
//
// Timing: `load` takes effect at the next rising clock edge; `ac` and
// `dc_mask` are the registered value and its combinational decode.
// Reset clears the count.
module aggregation_counter #(
  parameter int unsigned N      = 3,
  parameter int unsigned AC_W   = $clog2(N + 1)
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            load,
  input  logic [AC_W-1:0] load_val,
  output logic [AC_W-1:0] ac,
  output logic [N-1:0]    dc_mask
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)    ac <= '0;
    else if (load) ac <= load_val;
  end

  always_comb begin
    for (int i = 0; i < N; i++) dc_mask[i] = (ac > AC_W'(i));
  end

endmodule

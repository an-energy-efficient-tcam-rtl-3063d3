// lru_tracker: least-recently-used replacement state for every set.
//
// Each entry keeps an age in 0..WAYS-1; the ages of a set are always a
// permutation, 0 being the most recently used way. Touching a way makes it
// age 0 and ages by one every way of the same set that was younger. The
// victim of a set is its first invalid way if it has one, otherwise the
// way of age WAYS-1. Invalid ways are preferred because aggregation frees
// entries (their rows are invalidated) and those should be refilled before
// any live super-block is evicted.
//
// Timing: `touch_en` acts at the rising edge; `victim_row` is
// combinational from `victim_set`, the ages and `valid_vec`. Reset sets the
// age of way w to w.
module lru_tracker #(
  parameter int unsigned SETS  = 1,
  parameter int unsigned WAYS  = 128,
  parameter int unsigned ROWS  = SETS * WAYS,
  parameter int unsigned ROW_W = (ROWS > 1) ? $clog2(ROWS) : 1,
  parameter int unsigned SET_W = (SETS > 1) ? $clog2(SETS) : 1,
  parameter int unsigned WAY_W = (WAYS > 1) ? $clog2(WAYS) : 1
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             touch_en,
  input  logic [ROW_W-1:0] touch_row,
  input  logic [SET_W-1:0] victim_set,
  input  logic [ROWS-1:0]  valid_vec,
  output logic [ROW_W-1:0] victim_row
);

  logic [WAY_W-1:0] age [ROWS];
  logic [WAY_W-1:0] touched_age;

  assign touched_age = age[touch_row];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int r = 0; r < ROWS; r++) age[r] <= WAY_W'(r % WAYS);
    end else if (touch_en) begin
      for (int r = 0; r < ROWS; r++) begin
        if (r / WAYS == int'(touch_row) / WAYS) begin
          if (ROW_W'(r) == touch_row)   age[r] <= '0;
          else if (age[r] < touched_age) age[r] <= age[r] + 1'b1;
        end
      end
    end
  end

  always_comb begin
    logic found_invalid;
    logic [ROW_W-1:0] oldest;
    found_invalid = 1'b0;
    victim_row    = '0;
    oldest        = '0;
    for (int w = WAYS - 1; w >= 0; w--) begin
      logic [ROW_W-1:0] r;
      r = ROW_W'((SETS == 1 ? 0 : int'(victim_set)) * WAYS + w);
      if (!valid_vec[r]) begin
        found_invalid = 1'b1;
        victim_row    = r;
      end
      if (age[r] == WAY_W'(WAYS - 1)) oldest = r;
    end
    if (!found_invalid) victim_row = oldest;
  end

endmodule

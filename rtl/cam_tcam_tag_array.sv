// cam_tcam_tag_array: CAM/TCAM tag array of the TCAM enhanced cache.
//
// Each of the SETS*WAYS entries stores a W-bit tag: the W-N upper bits in
// binary CAM cells and the N lower bits in ternary cells whose don't-care
// state is given by the entry's Aggregation Counter (AC = k means the k
// lowest bits are don't care). One valid and one dirty bit cover the whole
// super-block the entry maps. Row r belongs to set r / WAYS; a search only
// compares the entries of the addressed set, as in the modified
// set-associative organisation (SETS = 1 gives a fully associative array).
//
// Entries never overlap (aggregation runs on every miss), so at most one
// entry matches a search; the matching row is encoded by OR-ing the row
// numbers of the match lines, with no priority encoder. An assertion checks
// the one-match rule.
//
// Ports: a combinational search port (key -> hit, row, AC, dirty), a
// combinational read port used for victim write-back, and three update
// ports that act at the rising edge: write (tag, AC, dirty; sets valid),
// invalidate and set-dirty. A write wins over an invalidate of the same row.
// Reset clears every valid bit.
module cam_tcam_tag_array
  import tcam_pkg::*;
#(
  parameter int unsigned SETS  = 1,
  parameter int unsigned WAYS  = 128,
  parameter int unsigned W     = 29,
  parameter int unsigned N     = 3,
  parameter int unsigned AC_W  = $clog2(N + 1),
  parameter int unsigned ROWS  = SETS * WAYS,
  parameter int unsigned ROW_W = (ROWS > 1) ? $clog2(ROWS) : 1,
  parameter int unsigned SET_W = (SETS > 1) ? $clog2(SETS) : 1
) (
  input  logic             clk,
  input  logic             rst_n,
  // search
  input  logic [SET_W-1:0] search_set,
  input  logic [W-1:0]     search_key,
  output logic             match_hit,
  output logic [ROW_W-1:0] match_row,
  output logic [AC_W-1:0]  match_ac,
  output logic             match_dirty,
  // read (victim inspection)
  input  logic [ROW_W-1:0] rd_row,
  output logic [W-1:0]     rd_tag,
  output logic [AC_W-1:0]  rd_ac,
  output logic             rd_valid,
  output logic             rd_dirty,
  output logic [ROWS-1:0]  valid_vec,
  // write a whole entry
  input  logic             wr_en,
  input  logic [ROW_W-1:0] wr_row,
  input  logic [W-1:0]     wr_tag,
  input  logic [AC_W-1:0]  wr_ac,
  input  logic             wr_dirty,
  // invalidate one entry
  input  logic             inv_en,
  input  logic [ROW_W-1:0] inv_row,
  // mark one entry dirty (store hit)
  input  logic             dirty_en,
  input  logic [ROW_W-1:0] dirty_row
);

  logic [W-1:0]    tag_q   [ROWS];
  logic [ROWS-1:0] valid_q;
  logic [ROWS-1:0] dirty_q;
  logic [AC_W-1:0] ac      [ROWS];
  logic [N-1:0]    dcm     [ROWS];
  logic [ROWS-1:0] match;

  for (genvar r = 0; r < ROWS; r++) begin : g_entry
    aggregation_counter #(.N(N), .AC_W(AC_W)) u_ac (
      .clk     (clk),
      .rst_n   (rst_n),
      .load    (wr_en && wr_row == ROW_W'(r)),
      .load_val(wr_ac),
      .ac      (ac[r]),
      .dc_mask (dcm[r])
    );

    // One match line: binary cells compare all upper bits, ternary cells
    // compare a lower bit only when it is not a don't care.
    logic [W-1:0] care;
    assign care     = {{(W-N){1'b1}}, ~dcm[r]};
    assign match[r] = valid_q[r] && (SETS == 1 || SET_W'(r / WAYS) == search_set)
                      && (((tag_q[r] ^ search_key) & care) == '0);
  end

  always_comb begin
    match_hit   = |match;
    match_row   = '0;
    match_ac    = '0;
    match_dirty = 1'b0;
    for (int r = 0; r < ROWS; r++) begin
      if (match[r]) begin
        match_row   = match_row | ROW_W'(r);
        match_ac    = match_ac | ac[r];
        match_dirty = match_dirty | dirty_q[r];
      end
    end
  end

  assign rd_tag    = tag_q[rd_row];
  assign rd_ac     = ac[rd_row];
  assign rd_valid  = valid_q[rd_row];
  assign rd_dirty  = dirty_q[rd_row];
  assign valid_vec = valid_q;

  always_ff @(posedge clk) begin
    if (wr_en) tag_q[wr_row] <= wr_tag;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      valid_q <= '0;
      dirty_q <= '0;
    end else begin
      if (inv_en) valid_q[inv_row] <= 1'b0;
      if (dirty_en) dirty_q[dirty_row] <= 1'b1;
      if (wr_en) begin
        valid_q[wr_row] <= 1'b1;
        dirty_q[wr_row] <= wr_dirty;
      end
    end
  end

  // Aggregation on every miss keeps entries disjoint: one match at most.
  a_one_match: assert property (@(posedge clk) disable iff (!rst_n) $onehot0(match))
    else $error("cam_tcam_tag_array: several entries match one search key");

endmodule

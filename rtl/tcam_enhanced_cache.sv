// tcam_enhanced_cache: highly-associative cache whose CAM tag array has N
// ternary (TCAM) cells per entry, so that one tag entry can map a
// super-block of up to 2^N consecutive lines ("dynamic tag aggregation").
//
// Organisation
//   * cam_tcam_tag_array: SETS x WAYS entries of W tag bits, the N LSBs
//     ternary, one valid and one dirty bit and an Aggregation Counter per
//     entry.
//   * 2^N data_bank instances: bank b holds, for every entry, the line whose
//     tag LSBs are b. A bank_selector enables the bank named by the request's
//     tag LSBs while the tag array is searched, so a hit reads one row of one
//     bank.
//   * dynamic_aggregator_module (DAM): on a miss, merges the missed tag with
//     its partner groups already in the array while the line is fetched.
//   * lru_tracker: LRU replacement per set (invalid ways first).
//   * The controller below acts on the DAM's Update/Replace commands (the
//     role the document gives the MMU) and writes back dirty super-blocks.
//
// Address split (modified set-associative mapping, so that all members of an
// aggregation group fall in one set):
//   req_addr = { tag[W-1:N], set, tag[N-1:0], word offset }
// with log2(SETS) set bits and log2(LINE_WORDS) offset bits (either may be
// zero). Memory is addressed by line: { tag[W-1:N], set, tag[N-1:0] }.
//
// Defaults are the document's L2 data-TLB case study: 128 tag entries,
// fully associative, 3-bit aggregation (1024 data entries in 8 banks),
// 32-bit entries and a 29-bit tag (bit counts inferred from the
// transistor-count table). The L1 case study is SETS=8, WAYS=16, N=2,
// LINE_WORDS=8, W=24.
//
// Interface and timing
//   req_valid/req_ready: a request is accepted when both are high; ready is
//   high whenever no miss is in progress (blocking cache).
//   A hit answers HIT_LATENCY cycles after acceptance (resp_valid,
//   resp_hit=1; 2 for the TLB, 1 for the L1 case study) and a new request
//   can be accepted every cycle. The tag search and bank read take one
//   cycle; HIT_LATENCY-1 register stages follow. A store hit writes one
//   word and sets the super-block's dirty bit.
//   A miss (write-allocate for stores) issues one line read on mem_rd_*; the
//   line returns on mem_fill_*. The request goes out the cycle after the
//   miss, the returning line is registered, committed the next cycle and
//   answered as a hit would be, so a miss answers
//   memory latency + 3 + HIT_LATENCY cycles after acceptance.
//   Aggregation (at most N+2 cycles) and write-back of a dirty victim run
//   while the line is outstanding and add latency only if the memory
//   answers sooner than they finish.
//   mem_wr_*: valid/ready write channel for dirty lines. A replaced dirty
//   super-block writes back all its 2^AC lines, since one dirty bit covers
//   the whole super-block.
//   commit_*: one-cycle report of each completed miss (for statistics).
// Reset: asynchronous, active low; all entries invalid.
module tcam_enhanced_cache
  import tcam_pkg::*;
#(
  parameter int unsigned SETS       = 1,
  parameter int unsigned WAYS       = 128,
  parameter int unsigned N          = 3,
  parameter int unsigned W          = 29,
  parameter int unsigned LINE_WORDS = 1,
  parameter int unsigned WORD_BITS  = 32,
  parameter int unsigned HIT_LATENCY = 2,   // cycles from acceptance to a hit's answer, >= 1
  // derived
  parameter int unsigned ROWS      = SETS * WAYS,
  parameter int unsigned ROW_W     = (ROWS > 1) ? $clog2(ROWS) : 1,
  parameter int unsigned SET_W     = (SETS > 1) ? $clog2(SETS) : 1,
  parameter int unsigned SET_BITS  = $clog2(SETS),
  parameter int unsigned OFF_BITS  = $clog2(LINE_WORDS),
  parameter int unsigned OFF_W     = (LINE_WORDS > 1) ? OFF_BITS : 1,
  parameter int unsigned AC_W      = $clog2(N + 1),
  parameter int unsigned BANKS     = 1 << N,
  parameter int unsigned LINE_BITS = LINE_WORDS * WORD_BITS,
  parameter int unsigned LADDR_W   = W + SET_BITS,
  parameter int unsigned ADDR_W    = LADDR_W + OFF_BITS
) (
  input  logic                 clk,
  input  logic                 rst_n,
  // processor side
  input  logic                 req_valid,
  output logic                 req_ready,
  input  logic                 req_write,
  input  logic [ADDR_W-1:0]    req_addr,
  input  logic [WORD_BITS-1:0] req_wdata,
  output logic                 resp_valid,
  output logic                 resp_hit,
  output logic [WORD_BITS-1:0] resp_rdata,
  // memory read (line fetch)
  output logic                 mem_rd_valid,
  input  logic                 mem_rd_ready,
  output logic [LADDR_W-1:0]   mem_rd_addr,
  input  logic                 mem_fill_valid,
  input  logic [LINE_BITS-1:0] mem_fill_data,
  // memory write (dirty line write-back)
  output logic                 mem_wr_valid,
  input  logic                 mem_wr_ready,
  output logic [LADDR_W-1:0]   mem_wr_addr,
  output logic [LINE_BITS-1:0] mem_wr_data,
  // status
  output logic                 da,
  output logic                 commit_valid,
  output logic                 commit_update,
  output logic [AC_W-1:0]      commit_level
);

  // ---------------------------------------------------------------- address
  function automatic logic [W-1:0] addr_tag(input logic [ADDR_W-1:0] a);
    logic [ADDR_W-1:0] hi, lo;
    hi = a >> (OFF_BITS + N + SET_BITS);
    lo = (a >> OFF_BITS) & ADDR_W'(BANKS - 1);
    return W'((hi << N) | lo);
  endfunction
  function automatic logic [SET_W-1:0] addr_set(input logic [ADDR_W-1:0] a);
    return SET_W'((a >> (OFF_BITS + N)) & ADDR_W'(SETS - 1));
  endfunction
  function automatic logic [OFF_W-1:0] addr_off(input logic [ADDR_W-1:0] a);
    return OFF_W'(a & ADDR_W'(LINE_WORDS - 1));
  endfunction
  function automatic logic [LADDR_W-1:0] line_addr(input logic [W-1:0] tag,
                                                   input logic [SET_W-1:0] set);
    logic [LADDR_W-1:0] hi, s, lo;
    hi = LADDR_W'(tag >> N);
    s  = LADDR_W'(set) & LADDR_W'(SETS - 1);
    lo = LADDR_W'(tag) & LADDR_W'(BANKS - 1);
    return (((hi << SET_BITS) | s) << N) | lo;
  endfunction

  typedef enum logic [1:0] {C_IDLE, C_MISS} ctrl_state_e;
  typedef enum logic [2:0] {WB_IDLE, WB_CHECK, WB_SCAN, WB_SEND, WB_DONE} wb_state_e;

  ctrl_state_e state;
  wb_state_e   wb_state;

  // request held during a miss
  logic                 q_write;
  logic [W-1:0]         q_tag;
  logic [SET_W-1:0]     q_set;
  logic [OFF_W-1:0]     q_off;
  logic [WORD_BITS-1:0] q_wdata;

  logic [W-1:0]         in_tag;
  logic [SET_W-1:0]     in_set;
  logic [OFF_W-1:0]     in_off;
  assign in_tag = addr_tag(req_addr);
  assign in_set = addr_set(req_addr);
  assign in_off = addr_off(req_addr);

  // ---------------------------------------------------------------- tag array
  logic             t_match_hit, t_match_dirty;
  logic [ROW_W-1:0] t_match_row;
  logic [AC_W-1:0]  t_match_ac;
  logic [SET_W-1:0] t_search_set;
  logic [W-1:0]     t_search_key;
  logic [ROW_W-1:0] victim_row, victim_q;
  logic [W-1:0]     t_rd_tag;
  logic [AC_W-1:0]  t_rd_ac;
  logic             t_rd_valid, t_rd_dirty;
  logic [ROWS-1:0]  t_valid_vec;
  logic             t_wr_en, t_wr_dirty;
  logic [ROW_W-1:0] t_wr_row;
  logic [AC_W-1:0]  t_wr_ac;
  logic             t_dirty_en;

  // DAM
  logic                 dam_searching, dam_done, dam_replace, dam_update;
  logic                 dam_inv_en, dam_final_dirty, dam_finish, dam_miss;
  logic [W-1:0]         dam_key, dam_final_tag;
  logic [ROW_W-1:0]     dam_inv_row, dam_final_row, dam_rd_row;
  logic [AC_W-1:0]      dam_final_ac;
  logic [BANKS-1:0]     dam_rd_en, dam_buf_valid;
  logic [LINE_BITS-1:0] dam_buf_data [BANKS];

  // banks
  logic [BANKS-1:0]      b_en, b_we, lookup_en;
  logic [ROW_W-1:0]      b_row   [BANKS];
  logic [LINE_WORDS-1:0] b_wmask [BANKS];
  logic [LINE_BITS-1:0]  b_wdata [BANKS];
  logic [LINE_BITS-1:0]  b_rdata [BANKS];
  logic [LINE_BITS-1:0]  sel_rdata;

  // miss bookkeeping
  logic                 rd_sent, fill_got, victim_got, commit;
  logic [LINE_BITS-1:0] fill_q, fill_merged;
  logic [W-1:0]         wb_tag;
  logic [AC_W-1:0]      wb_ac;
  logic [N-1:0]         wb_bank;
  logic                 wb_rd;

  // responses
  logic                 hit_resp_q, miss_resp_q, resp_hit_q;
  logic [OFF_W-1:0]     resp_off_q;
  logic [WORD_BITS-1:0] miss_word_q;

  wire lookup     = state == C_IDLE && req_valid;
  wire lookup_hit = lookup && t_match_hit;

  assign req_ready = state == C_IDLE;
  assign dam_miss  = lookup && !t_match_hit;

  assign t_search_set = dam_searching ? q_set : in_set;
  assign t_search_key = dam_searching ? dam_key : in_tag;

  cam_tcam_tag_array #(.SETS(SETS), .WAYS(WAYS), .W(W), .N(N), .AC_W(AC_W)) u_tags (
    .clk(clk), .rst_n(rst_n),
    .search_set(t_search_set), .search_key(t_search_key),
    .match_hit(t_match_hit), .match_row(t_match_row), .match_ac(t_match_ac),
    .match_dirty(t_match_dirty),
    .rd_row(victim_q), .rd_tag(t_rd_tag), .rd_ac(t_rd_ac), .rd_valid(t_rd_valid),
    .rd_dirty(t_rd_dirty), .valid_vec(t_valid_vec),
    .wr_en(t_wr_en), .wr_row(t_wr_row), .wr_tag(dam_final_tag), .wr_ac(t_wr_ac),
    .wr_dirty(t_wr_dirty),
    .inv_en(dam_inv_en), .inv_row(dam_inv_row),
    .dirty_en(t_dirty_en), .dirty_row(t_match_row)
  );

  lru_tracker #(.SETS(SETS), .WAYS(WAYS)) u_lru (
    .clk(clk), .rst_n(rst_n),
    .touch_en(lookup_hit || commit), .touch_row(commit ? t_wr_row : t_match_row),
    .victim_set(q_set), .valid_vec(t_valid_vec), .victim_row(victim_row)
  );

  dynamic_aggregator_module #(.W(W), .N(N), .ROW_W(ROW_W), .LINE_BITS(LINE_BITS),
                              .AC_W(AC_W)) u_dam (
    .clk(clk), .rst_n(rst_n), .miss(dam_miss), .miss_tag(in_tag), .finish(dam_finish),
    .da(da), .searching(dam_searching), .search_key(dam_key),
    .match_hit(t_match_hit), .match_row(t_match_row), .match_ac(t_match_ac),
    .match_dirty(t_match_dirty),
    .bank_rd_en(dam_rd_en), .bank_rd_row(dam_rd_row), .bank_rdata(b_rdata),
    .inv_en(dam_inv_en), .inv_row(dam_inv_row),
    .done(dam_done), .replace(dam_replace), .update(dam_update),
    .final_tag(dam_final_tag), .final_row(dam_final_row), .final_ac(dam_final_ac),
    .final_dirty(dam_final_dirty), .buf_valid(dam_buf_valid), .buf_data(dam_buf_data)
  );

  bank_selector #(.N(N), .LINE_BITS(LINE_BITS)) u_sel (
    .clk(clk), .rst_n(rst_n), .access(lookup_hit), .tag_lsb(in_tag[N-1:0]),
    .bank_en(lookup_en), .bank_rdata(b_rdata), .rdata(sel_rdata)
  );

  // ---------------------------------------------------------------- commit
  wire wb_busy = wb_state != WB_IDLE && wb_state != WB_DONE;
  assign commit = state == C_MISS && dam_done && fill_got
                  && (dam_update || (victim_got && wb_state == WB_DONE));
  assign dam_finish = commit;

  assign t_wr_en    = commit;
  assign t_wr_row   = dam_update ? dam_final_row : victim_q;
  assign t_wr_ac    = dam_update ? dam_final_ac : '0;
  assign t_wr_dirty = q_write || (dam_update && dam_final_dirty);
  assign t_dirty_en = lookup_hit && req_write;

  always_comb begin
    fill_merged = fill_q;
    if (q_write) fill_merged[int'(q_off)*WORD_BITS +: WORD_BITS] = q_wdata;
  end

  // ---------------------------------------------------------------- banks
  for (genvar b = 0; b < BANKS; b++) begin : g_bank
    always_comb begin
      b_en[b]    = 1'b0;
      b_we[b]    = 1'b0;
      b_row[b]   = t_match_row;
      b_wmask[b] = '0;
      b_wdata[b] = {LINE_WORDS{req_wdata}};
      if (lookup_en[b]) begin
        b_en[b] = 1'b1;
        b_we[b] = req_write;
        b_wmask[b] = LINE_WORDS'(1) << in_off;
      end else if (commit) begin
        b_row[b]   = t_wr_row;
        b_wmask[b] = '1;
        if (N'(b) == dam_final_tag[N-1:0]) begin
          b_en[b]    = 1'b1;
          b_we[b]    = 1'b1;
          b_wdata[b] = fill_merged;
        end else if (dam_update && dam_buf_valid[b]) begin
          b_en[b]    = 1'b1;
          b_we[b]    = 1'b1;
          b_wdata[b] = dam_buf_data[b];
        end
      end else if (wb_rd && wb_bank == N'(b)) begin
        b_en[b]  = 1'b1;
        b_row[b] = victim_q;
      end else if (dam_rd_en[b]) begin
        b_en[b]  = 1'b1;
        b_row[b] = dam_rd_row;
      end
    end

    data_bank #(.ROWS(ROWS), .LINE_WORDS(LINE_WORDS), .WORD_BITS(WORD_BITS),
                .ROW_W(ROW_W)) u_bank (
      .clk(clk), .en(b_en[b]), .we(b_we[b]), .wmask(b_wmask[b]), .row(b_row[b]),
      .wdata(b_wdata[b]), .rdata(b_rdata[b])
    );
  end

  // ---------------------------------------------------------------- write-back
  // A replaced dirty super-block: read each of its lines from its bank
  // (WB_SCAN), then hand it to the memory write channel (WB_SEND).
  assign wb_rd        = wb_state == WB_SCAN && bank_in_group(int'(wb_bank), int'(wb_tag[N-1:0]), int'(wb_ac));
  assign mem_wr_valid = wb_state == WB_SEND;
  assign mem_wr_addr  = line_addr({wb_tag[W-1:N], wb_bank}, q_set);
  assign mem_wr_data  = b_rdata[wb_bank];

  assign mem_rd_valid = state == C_MISS && !rd_sent;
  assign mem_rd_addr  = line_addr(q_tag, q_set);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state      <= C_IDLE;
      wb_state   <= WB_IDLE;
      rd_sent    <= 1'b0;
      fill_got   <= 1'b0;
      victim_got <= 1'b0;
      victim_q   <= '0;
      wb_bank    <= '0;
      wb_tag     <= '0;
      wb_ac      <= '0;
      fill_q     <= '0;
      q_write    <= 1'b0;
      q_tag      <= '0;
      q_set      <= '0;
      q_off      <= '0;
      q_wdata    <= '0;
    end else begin
      unique case (state)
        C_IDLE: if (dam_miss) begin
          state      <= C_MISS;
          q_write    <= req_write;
          q_tag      <= in_tag;
          q_set      <= in_set;
          q_off      <= in_off;
          q_wdata    <= req_wdata;
          rd_sent    <= 1'b0;
          fill_got   <= 1'b0;
          victim_got <= 1'b0;
          wb_state   <= WB_IDLE;
        end
        C_MISS: begin
          if (mem_rd_valid && mem_rd_ready) rd_sent <= 1'b1;
          if (mem_fill_valid && rd_sent && !fill_got) begin
            fill_q   <= mem_fill_data;
            fill_got <= 1'b1;
          end
          // Replace: pick the LRU victim once, then write it back if dirty.
          if (dam_replace && !victim_got) begin
            victim_got <= 1'b1;
            victim_q   <= victim_row;
            wb_state   <= WB_CHECK;
          end
          unique case (wb_state)
            WB_CHECK: begin
              wb_tag  <= t_rd_tag;
              wb_ac   <= t_rd_ac;
              wb_bank <= '0;
              wb_state <= (t_rd_valid && t_rd_dirty) ? WB_SCAN : WB_DONE;
            end
            WB_SCAN: begin
              if (wb_rd)                         wb_state <= WB_SEND;
              else if (wb_bank == N'(BANKS - 1)) wb_state <= WB_DONE;
              else                               wb_bank  <= wb_bank + 1'b1;
            end
            WB_SEND: if (mem_wr_ready) begin
              if (wb_bank == N'(BANKS - 1)) wb_state <= WB_DONE;
              else begin
                wb_bank  <= wb_bank + 1'b1;
                wb_state <= WB_SCAN;
              end
            end
            default: ;
          endcase
          if (commit) state <= C_IDLE;
        end
        default: state <= C_IDLE;
      endcase
    end
  end

  // ---------------------------------------------------------------- response
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      hit_resp_q  <= 1'b0;
      miss_resp_q <= 1'b0;
      resp_hit_q  <= 1'b0;
      resp_off_q  <= '0;
      miss_word_q <= '0;
    end else begin
      hit_resp_q  <= lookup_hit && !req_write;
      miss_resp_q <= commit || (lookup_hit && req_write);
      if (lookup_hit) begin
        resp_hit_q  <= 1'b1;
        resp_off_q  <= in_off;
        miss_word_q <= req_wdata;
      end else if (commit) begin
        resp_hit_q  <= 1'b0;
        miss_word_q <= fill_merged[int'(q_off)*WORD_BITS +: WORD_BITS];
      end
    end
  end

  // Answer as it leaves the data banks, then HIT_LATENCY-1 further
  // register stages to match the access time of the configuration.
  logic                 r_valid [HIT_LATENCY];
  logic                 r_hit   [HIT_LATENCY];
  logic [WORD_BITS-1:0] r_data  [HIT_LATENCY];

  assign r_valid[0] = hit_resp_q || miss_resp_q;
  assign r_hit[0]   = resp_hit_q;
  assign r_data[0]  = hit_resp_q ? sel_rdata[int'(resp_off_q)*WORD_BITS +: WORD_BITS]
                                 : miss_word_q;

  for (genvar i = 1; i < HIT_LATENCY; i++) begin : g_resp_pipe
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        r_valid[i] <= 1'b0;
        r_hit[i]   <= 1'b0;
        r_data[i]  <= '0;
      end else begin
        r_valid[i] <= r_valid[i-1];
        r_hit[i]   <= r_hit[i-1];
        r_data[i]  <= r_data[i-1];
      end
    end
  end

  assign resp_valid = r_valid[HIT_LATENCY-1];
  assign resp_hit   = r_hit[HIT_LATENCY-1];
  assign resp_rdata = r_data[HIT_LATENCY-1];

  assign commit_valid  = commit;
  assign commit_update = dam_update;
  assign commit_level  = t_wr_ac;

  // ---------------------------------------------------------------- checks
  // Valid/ready rules of the two memory channels, and no commit while a
  // dirty victim is still being written back.
  a_rd_hold: assert property (@(posedge clk) disable iff (!rst_n)
    mem_rd_valid && !mem_rd_ready |=> mem_rd_valid && $stable(mem_rd_addr))
    else $error("mem_rd_valid dropped or address changed before mem_rd_ready");
  a_wr_hold: assert property (@(posedge clk) disable iff (!rst_n)
    mem_wr_valid && !mem_wr_ready |=> mem_wr_valid && $stable(mem_wr_addr))
    else $error("write-back request changed before mem_wr_ready");
  a_no_commit_in_wb: assert property (@(posedge clk) disable iff (!rst_n) !(commit && wb_busy))
    else $error("commit during write-back");

endmodule

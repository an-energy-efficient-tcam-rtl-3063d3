// tb_tcam_enhanced_cache: end-to-end test of the TCAM enhanced cache.
//
// Drives the cache with a mix of directed sequences and a random,
// spatially local read/write stream, backed by main_memory_model. Every
// read response is compared with a reference memory kept in the testbench
// (the last value written to each word, or the memory's initial pattern),
// so the check does not depend on how the cache placed or merged lines.
// Timing checks: a hit answers HIT_LAT cycles after acceptance; every miss answers
// exactly MEM_LAT + MISS_EXTRA cycles after acceptance whatever the
// aggregation depth, i.e. the aggregation and write-back work is hidden
// behind the memory access.
// Mechanism counts (each must occur): hits, read and write misses,
// Replace commits, Update commits at every level 1..N, rejected matches
// (a search hit whose AC does not qualify), entry invalidations during
// aggregation, dirty write-back of a single line and of a multi-line
// super-block, LRU eviction of a valid entry.
// This configuration is scaled down (2 sets x 4 ways) so capacity misses
// and evictions happen quickly.
module tb_tcam_enhanced_cache;
  localparam int unsigned SETS = 2, WAYS = 4, N = 3, W = 8, LINE_WORDS = 2, WORD_BITS = 16;
  localparam int unsigned MEM_LAT = 40;
  localparam int unsigned HIT_LAT = 2;
  localparam int unsigned MISS_EXTRA = 3 + HIT_LAT;
  localparam int unsigned NOPS = 1500;
  localparam int unsigned SPREAD = 40, DRIFT = 12;   // random stream: window size, drift per 100 runs
  localparam int unsigned WATCHDOG = 2000000;
  localparam int unsigned SET_BITS = $clog2(SETS), OFF_BITS = $clog2(LINE_WORDS);
  localparam int unsigned LADDR_W = W + SET_BITS, ADDR_W = LADDR_W + OFF_BITS;
  localparam int unsigned AC_W = $clog2(N + 1);
  localparam int unsigned LINE_BITS = LINE_WORDS * WORD_BITS;

  logic clk = 1'b0, rst_n = 1'b1;
  always #5 clk = ~clk;
  initial #1 rst_n = 1'b0;   // falling edge so the asynchronous reset acts

  logic                 req_valid = 1'b0, req_ready, req_write = 1'b0;
  logic [ADDR_W-1:0]    req_addr = '0;
  logic [WORD_BITS-1:0] req_wdata = '0;
  logic                 resp_valid, resp_hit;
  logic [WORD_BITS-1:0] resp_rdata;
  logic                 mem_rd_valid, mem_rd_ready, mem_fill_valid;
  logic [LADDR_W-1:0]   mem_rd_addr, mem_wr_addr;
  logic [LINE_BITS-1:0] mem_fill_data, mem_wr_data;
  logic                 mem_wr_valid, mem_wr_ready;
  logic                 da, commit_valid, commit_update;
  logic [AC_W-1:0]      commit_level;
  int                   mem_reads, mem_writes;

  tcam_enhanced_cache #(.SETS(SETS), .WAYS(WAYS), .N(N), .W(W), .LINE_WORDS(LINE_WORDS),
                        .WORD_BITS(WORD_BITS), .HIT_LATENCY(HIT_LAT)) dut (.*);

  main_memory_model #(.LADDR_W(LADDR_W), .LINE_WORDS(LINE_WORDS), .WORD_BITS(WORD_BITS),
                      .LATENCY(MEM_LAT)) u_mem (
    .clk(clk), .rd_valid(mem_rd_valid), .rd_ready(mem_rd_ready), .rd_addr(mem_rd_addr),
    .fill_valid(mem_fill_valid), .fill_data(mem_fill_data),
    .wr_valid(mem_wr_valid), .wr_ready(mem_wr_ready), .wr_addr(mem_wr_addr),
    .wr_data(mem_wr_data), .reads(mem_reads), .writes(mem_writes));

  int checks = 0, failures = 0;
  longint cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  // reference memory: word address -> value
  logic [WORD_BITS-1:0] ref_mem [logic [ADDR_W-1:0]];
  function automatic logic [WORD_BITS-1:0] ref_word(input logic [ADDR_W-1:0] a);
    if (ref_mem.exists(a)) return ref_mem[a];
    return u_mem.pattern(LADDR_W'(a >> OFF_BITS), int'(a & (LINE_WORDS - 1)));
  endfunction

  typedef struct { logic write; logic [WORD_BITS-1:0] exp; longint t; logic [ADDR_W-1:0] a; } pend_t;
  pend_t pend [$];

  // mechanism counters
  int n_hit = 0, n_rmiss = 0, n_wmiss = 0, n_replace = 0, n_reject = 0, n_inval = 0;
  int n_level [N + 1];
  int n_wb_single = 0, n_wb_multi = 0, n_evict = 0, wb_in_miss = 0;
  initial foreach (n_level[i]) n_level[i] = 0;

  // response checker
  always @(posedge clk) if (rst_n && resp_valid) begin
    pend_t p;
    if (pend.size() == 0) begin
      failures++; $display("FAIL: response with nothing pending");
    end else begin
      p = pend.pop_front();
      checks++;
      if (!p.write && resp_rdata !== p.exp) begin
        failures++;
        $display("FAIL: addr %h read %h expected %h", p.a, resp_rdata, p.exp);
      end
      checks++;
      if (resp_hit) begin
        n_hit++;
        if (cyc - p.t != HIT_LAT) begin failures++; $display("FAIL: hit latency %0d", cyc - p.t); end
      end else begin
        if (p.write) n_wmiss++; else n_rmiss++;
        if (cyc - p.t != MEM_LAT + MISS_EXTRA) begin
          failures++; $display("FAIL: miss latency %0d expected %0d", cyc - p.t, MEM_LAT + MISS_EXTRA);
        end
      end
    end
  end

  // mechanism observation
  always @(posedge clk) if (rst_n) begin
    if (dut.u_dam.searching && dut.t_match_hit && !dut.u_dam.round_hit) n_reject++;
    if (dut.dam_inv_en) n_inval++;
    if (mem_wr_valid && mem_wr_ready) wb_in_miss++;
    if (dut.u_dam.u_ur.replace && int'(dut.wb_state) == 1 /* WB_CHECK */ && dut.t_rd_valid) n_evict++;
    if (commit_valid) begin
      if (commit_update) n_level[commit_level]++; else n_replace++;
      if (wb_in_miss == 1) n_wb_single++;
      if (wb_in_miss > 1)  n_wb_multi++;
      wb_in_miss = 0;
    end
  end

  task automatic issue(input logic wr, input logic [ADDR_W-1:0] a, input logic [WORD_BITS-1:0] d);
    pend_t p;
    @(negedge clk);
    req_valid = 1'b1; req_write = wr; req_addr = a; req_wdata = d;
    while (!req_ready) @(negedge clk);
    @(posedge clk);
    p.write = wr; p.a = a; p.t = cyc; p.exp = ref_word(a);
    if (wr) ref_mem[a] = d;
    pend.push_back(p);
    #1 req_valid = 1'b0;
  endtask

  // address from line tag, set and word offset
  function automatic logic [ADDR_W-1:0] mk(input int tag, input int set, input int off);
    longint hi, lo;
    hi = tag >> N; lo = tag & ((1 << N) - 1);
    return ADDR_W'((((hi << SET_BITS | set) << N | lo) << OFF_BITS) | off);
  endfunction

  initial begin : watchdog
    repeat (WATCHDOG) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    // A: fill one aggregation group in order 0..7 -> levels 1, 2 and 3
    for (int t = 0; t < 8; t++) issue(1'b0, mk(t, 0, 0), '0);
    for (int t = 0; t < 8; t++) issue(1'b0, mk(t, 0, 1), '0);   // all hits now
    // B: rejected match: 0x12 present alone, 0x10 then 0x11
    issue(1'b0, mk(8'h12, 1, 0), '0);
    issue(1'b0, mk(8'h10, 1, 0), '0);
    issue(1'b0, mk(8'h11, 1, 1), '0);
    // C: random local stream with writes
    for (int i = 0; i < NOPS; i++) begin
      int base, len;
      base = (i / 100 * DRIFT + $urandom_range(0, SPREAD)) % (64'd1 << W);
      len  = $urandom_range(1, 8);
      for (int j = 0; j < len; j++) begin
        logic wr;
        wr = ($urandom_range(0, 3) == 0);
        issue(wr, mk((base + j) % (64'd1 << W), $urandom_range(0, SETS - 1),
                     $urandom_range(0, LINE_WORDS - 1)), WORD_BITS'($urandom));
      end
    end
    while (pend.size() != 0) @(posedge clk);
    repeat (5) @(posedge clk);
    $display("hits=%0d read_misses=%0d write_misses=%0d replace=%0d reject=%0d inval=%0d evict=%0d wb1=%0d wbN=%0d",
             n_hit, n_rmiss, n_wmiss, n_replace, n_reject, n_inval, n_evict, n_wb_single, n_wb_multi);
    for (int l = 1; l <= N; l++) $display("update level %0d: %0d", l, n_level[l]);
    checks++; if (n_hit == 0)       begin failures++; $display("FAIL: no hit"); end
    checks++; if (n_rmiss == 0)     begin failures++; $display("FAIL: no read miss"); end
    checks++; if (n_wmiss == 0)     begin failures++; $display("FAIL: no write miss"); end
    checks++; if (n_replace == 0)   begin failures++; $display("FAIL: no replace"); end
    checks++; if (n_reject == 0)    begin failures++; $display("FAIL: no rejected match"); end
    checks++; if (n_inval == 0)     begin failures++; $display("FAIL: no invalidation"); end
    checks++; if (n_evict == 0)     begin failures++; $display("FAIL: no eviction"); end
    checks++; if (n_wb_single == 0) begin failures++; $display("FAIL: no single-line write-back"); end
    checks++; if (n_wb_multi == 0)  begin failures++; $display("FAIL: no super-block write-back"); end
    for (int l = 1; l <= N; l++) begin
      checks++; if (n_level[l] == 0) begin failures++; $display("FAIL: no update at level %0d", l); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// cache_check: self-checking test of one wb_cache instance, shared by the
// DL1 and critical-cache testbenches (each sets the size and hit latency).
//
// Random loads and stores, word-aligned with random byte enables, fall in a
// region four times the cache size, so there are hits, misses, evictions and
// dirty write-backs. Requests are offered every cycle. Independently of the
// cache, the test keeps
//   - a reference memory (every store applied when the cache accepts it),
//   - a reference 2-way LRU tag model telling whether each access hits.
// It checks every load's data, its hit/miss flag, that a hit answers exactly
// HIT_LAT cycles after it was accepted, that a miss takes at least the level-2
// latency, that results arrive in order, and that the cache stays ready after
// a hit. Prints TB_RESULT and finishes.
module cache_check
  import mlc_pkg::*;
#(
  parameter int unsigned SIZE_BYTES = 1024,
  parameter int unsigned HIT_LAT    = 1,
  parameter int unsigned N_OPS      = 4000,
  parameter int unsigned L2_LAT     = 16
);
  localparam int unsigned SETS = SIZE_BYTES / (LINE_BYTES * 2);

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic      req_valid, req_ready, resp_valid;
  mem_req_t  req;
  mem_resp_t resp;
  logic      l2v [2], l2r [2], l2rv [2];
  l2_req_t   l2q [2];
  l2_resp_t  l2p [2];
  int        n_rd [2], n_wr [2];
  logic      ev_hit, ev_miss, ev_wb;

  wb_cache #(.SIZE_BYTES(SIZE_BYTES), .HIT_LAT(HIT_LAT)) dut (
    .clk, .rst_n, .req_valid, .req_ready, .req, .resp_valid, .resp,
    .l2_req_valid(l2v[0]), .l2_req_ready(l2r[0]), .l2_req(l2q[0]),
    .l2_resp_valid(l2rv[0]), .l2_resp(l2p[0]),
    .ev_hit, .ev_miss, .ev_wb
  );

  assign l2v[1] = 1'b0;
  assign l2q[1] = '0;
  dl2_model #(.LAT(L2_LAT)) l2 (
    .clk, .rst_n, .req_valid(l2v), .req_ready(l2r), .req(l2q),
    .resp_valid(l2rv), .resp(l2p), .n_reads(n_rd), .n_writes(n_wr)
  );

  int checks = 0, failures = 0;
  int cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL @%0d: %s", cycle, what);
    end
  endtask

  // ---------------- reference memory and tag model
  word_t refmem [addr_t];
  function automatic word_t ref_read(addr_t a);
    if (refmem.exists(a)) return refmem[a];
    return tb_mem_pkg::init_word(a);
  endfunction

  logic [LADDR_W-1:0] rtag [2][SETS];
  bit rval [2][SETS];
  bit rlru [SETS];

  function automatic bit ref_access(addr_t a);
    int s = int'(a[ADDR_W-1:OFFSET_W] % SETS);
    logic [LADDR_W-1:0] la = a[ADDR_W-1:OFFSET_W];
    int v;
    for (int w = 0; w < 2; w++)
      if (rval[w][s] && rtag[w][s] == la) begin
        rlru[s] = (w == 0);
        return 1'b1;
      end
    v = !rval[0][s] ? 0 : (!rval[1][s] ? 1 : int'(rlru[s]));
    rval[v][s] = 1'b1;
    rtag[v][s] = la;
    rlru[s]    = (v == 0);
    return 1'b0;
  endfunction

  typedef struct { id_t id; word_t data; bit hit; int t; } exp_t;
  exp_t expq [$];
  int n_hits = 0, n_misses = 0, n_loads = 0, n_stores = 0;
  bit last_acc_hit = 0;

  // ---------------- monitor
  always @(posedge clk) if (rst_n) begin
    if (last_acc_hit) check(req_ready, "cache not ready after a hit");
    last_acc_hit = 0;
    if (req_valid && req_ready) begin
      bit h;
      h = ref_access(req.addr);
      if (h) n_hits++; else n_misses++;
      check(ev_hit == h && ev_miss == !h, "hit/miss event differs from reference");
      last_acc_hit = h;
      if (req.store) begin
        word_t o;
        o = ref_read(req.addr);
        for (int b = 0; b < WORD_BYTES; b++)
          if (req.be[b]) o[b*8 +: 8] = req.wdata[b*8 +: 8];
        refmem[req.addr] = o;
        n_stores++;
      end else begin
        expq.push_back('{id: req.id, data: ref_read(req.addr), hit: h, t: cycle});
        n_loads++;
      end
    end
    if (resp_valid) begin
      if (expq.size() == 0) check(0, "response with nothing outstanding");
      else begin
        exp_t e;
        e = expq.pop_front();
        check(resp.id == e.id, "response id out of order");
        check(resp.rdata == e.data,
              $sformatf("load data %h expected %h", resp.rdata, e.data));
        check(resp.miss == !e.hit, "miss flag differs from reference");
        if (e.hit) check(cycle - e.t == HIT_LAT,
                         $sformatf("hit latency %0d, expected %0d", cycle - e.t, HIT_LAT));
        else       check(cycle - e.t >= HIT_LAT + L2_LAT, "miss answered too early");
      end
    end
  end

  // ---------------- stimulus
  addr_t base = 32'h0004_0000;
  initial begin
    req_valid = 0;
    req = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < N_OPS; i++) begin
      @(posedge clk); #1;
      req_valid   = 1;
      req.store   = ($urandom_range(0, 99) < 40);
      req.id      = id_t'(i);
      // Mostly a hot region the size of the cache, sometimes a cold one.
      if ($urandom_range(0, 3) != 0)
        req.addr = base + (($urandom % SIZE_BYTES) & ~32'h7);
      else
        req.addr = base + (($urandom % (4 * SIZE_BYTES)) & ~32'h7);
      req.wdata   = {$urandom, $urandom};
      req.be      = ($urandom_range(0, 1) == 0) ? 8'hFF : 8'($urandom);
      // Hold the request until accepted.
      do @(posedge clk); while (!req_ready);
      #1 req_valid = 0;
      if (i < N_OPS - 1) begin
        // Offer the next request straight away (back-to-back).
        i++;
        req_valid   = 1;
        req.store   = ($urandom_range(0, 99) < 40);
        req.id      = id_t'(i);
        req.addr    = base + (($urandom % SIZE_BYTES) & ~32'h7);
        req.wdata   = {$urandom, $urandom};
        req.be      = 8'hFF;
        do @(posedge clk); while (!req_ready);
        #1 req_valid = 0;
      end
    end
    repeat (HIT_LAT + L2_LAT * 3 + 10) @(posedge clk);
    check(expq.size() == 0, "loads left unanswered");
    check(n_hits > 0 && n_misses > 0, "no mix of hits and misses");
    check(n_wr[0] > 0, "no dirty write-back happened");
    $display("cache_check: size=%0d lat=%0d loads=%0d stores=%0d hits=%0d misses=%0d writebacks=%0d",
             SIZE_BYTES, HIT_LAT, n_loads, n_stores, n_hits, n_misses, n_wr[0]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (N_OPS * (L2_LAT + 8) * 2 + 1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// wb_cache: two-way set-associative write-back data cache with a fixed hit
// latency. The same module serves as the conventional DL1 cache (16 KB,
// 2-cycle hits by default) and, with other parameters, as the small 1-cycle
// critical cache of the multi-lateral cache.
//
// What follows the design: two ways, 32-byte lines, write-back policy, stores
// allocate a line (every store writes both caches, so a store may bring a
// line into the critical cache), the hit latencies of the configurations.
// This design's own choices: LRU replacement (one bit per set), a blocking
// miss path (one miss at a time, no new request while it is handled), loads
// that miss also allocate, and reset that clears only valid/dirty/LRU state.
//
// Interface:
//   req_valid/req_ready/req  one load or store per cycle, accepted when
//                            req_valid && req_ready (ready is low while a
//                            miss is being handled).
//   resp_valid/resp          load data; stores produce no response.
//   l2_req_*                 line read or dirty write-back to level 2, taken
//                            when l2_req_valid && l2_req_ready.
//   l2_resp_valid/l2_resp    line data for the outstanding read.
//   ev_hit/ev_miss/ev_wb     one-cycle event pulses for statistics.
//
// Timing: tags are compared in the cycle a request is accepted. A load hit
// is answered exactly HIT_LAT cycles later; a store hit updates the line in
// that same cycle, so a load accepted on the next cycle sees the new data.
// On a miss the cache writes back the victim if it is dirty, reads the line,
// installs it, and answers a load HIT_LAT cycles after the line arrives.
// Responses leave in the order their requests were accepted.
module wb_cache
  import mlc_pkg::*;
#(
  parameter int unsigned SIZE_BYTES = 16384,  // capacity
  parameter int unsigned HIT_LAT    = 2       // cycles from request to load data
) (
  input  logic      clk,
  input  logic      rst_n,

  input  logic      req_valid,
  output logic      req_ready,
  input  mem_req_t  req,

  output logic      resp_valid,
  output mem_resp_t resp,

  output logic      l2_req_valid,
  input  logic      l2_req_ready,
  output l2_req_t   l2_req,
  input  logic      l2_resp_valid,
  input  l2_resp_t  l2_resp,

  output logic      ev_hit,
  output logic      ev_miss,
  output logic      ev_wb
);

  localparam int unsigned WAYS  = 2;
  localparam int unsigned SETS  = SIZE_BYTES / (LINE_BYTES * WAYS);
  localparam int unsigned IDX_W = (SETS > 1) ? $clog2(SETS) : 1;
  localparam int unsigned TAG_W = LADDR_W - IDX_W;
  localparam int unsigned WSEL_W = $clog2(WORDS_PER_LINE);

  typedef logic [IDX_W-1:0] idx_t;
  typedef logic [TAG_W-1:0] tag_t;

  typedef enum logic [1:0] {S_IDLE, S_WB, S_RD, S_WAIT} state_e;

  // ---------------------------------------------------------------- arrays
  tag_t  tag_q   [WAYS][SETS];
  line_t data_q  [WAYS][SETS];
  logic  valid_q [WAYS][SETS];
  logic  dirty_q [WAYS][SETS];
  logic  lru_q   [SETS];          // way to replace next in the set

  state_e   state_q;
  mem_req_t mreq_q;               // request that missed
  logic     vway_q;               // victim way of the miss

  // ---------------------------------------------------------------- lookup
  function automatic idx_t idx_of(addr_t a);
    return a[OFFSET_W +: IDX_W];
  endfunction

  function automatic tag_t tag_of(addr_t a);
    return a[ADDR_W-1 -: TAG_W];
  endfunction

  function automatic logic [WSEL_W-1:0] wsel_of(addr_t a);
    return a[OFFSET_W-1 -: WSEL_W];
  endfunction

  // Merge a store's bytes into a line.
  function automatic line_t merge(line_t l, addr_t a, word_t d, logic [WORD_BYTES-1:0] be);
    line_t r = l;
    for (int b = 0; b < WORD_BYTES; b++)
      if (be[b]) r[(int'(wsel_of(a)) * WORD_BYTES + b) * 8 +: 8] = d[b*8 +: 8];
    return r;
  endfunction

  idx_t req_idx;
  tag_t req_tag;
  logic hit0, hit1, hit, hit_way;
  logic accept;

  always_comb begin
    req_idx = idx_of(req.addr);
    req_tag = tag_of(req.addr);
    hit0    = valid_q[0][req_idx] && (tag_q[0][req_idx] == req_tag);
    hit1    = valid_q[1][req_idx] && (tag_q[1][req_idx] == req_tag);
    hit     = hit0 || hit1;
    hit_way = hit1;
  end

  assign req_ready = (state_q == S_IDLE);
  assign accept    = req_valid && req_ready;

  // Victim: an invalid way first, else the least recently used one.
  logic victim_way;
  always_comb begin
    if (!valid_q[0][req_idx])      victim_way = 1'b0;
    else if (!valid_q[1][req_idx]) victim_way = 1'b1;
    else                           victim_way = lru_q[req_idx];
  end

  // ---------------------------------------------------------------- level 2
  idx_t m_idx;
  assign m_idx = idx_of(mreq_q.addr);

  always_comb begin
    l2_req_valid = (state_q == S_WB) || (state_q == S_RD);
    l2_req.write = (state_q == S_WB);
    l2_req.laddr = (state_q == S_WB) ? {tag_q[vway_q][m_idx], m_idx}
                                     : mreq_q.addr[ADDR_W-1:OFFSET_W];
    l2_req.wdata = data_q[vway_q][m_idx];
  end

  logic fill_done;
  assign fill_done = (state_q == S_WAIT) && l2_resp_valid;

  // ---------------------------------------------------------------- latency pipe
  logic      pv_q [HIT_LAT];
  mem_resp_t pd_q [HIT_LAT];
  logic      push;
  mem_resp_t push_d;

  always_comb begin
    push   = 1'b0;
    push_d = '{id: req.id, rdata: '0, miss: 1'b0};
    if (accept && hit && !req.store) begin
      push         = 1'b1;
      push_d.rdata = data_q[hit_way][req_idx][int'(wsel_of(req.addr)) * WORD_W +: WORD_W];
    end else if (fill_done && !mreq_q.store) begin
      push         = 1'b1;
      push_d.id    = mreq_q.id;
      push_d.rdata = l2_resp.rdata[int'(wsel_of(mreq_q.addr)) * WORD_W +: WORD_W];
      push_d.miss  = 1'b1;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int s = 0; s < HIT_LAT; s++) begin
        pv_q[s] <= 1'b0;
        pd_q[s] <= '0;
      end
    end else begin
      pv_q[0] <= push;
      pd_q[0] <= push_d;
      for (int s = 1; s < HIT_LAT; s++) begin
        pv_q[s] <= pv_q[s-1];
        pd_q[s] <= pd_q[s-1];
      end
    end
  end

  assign resp_valid = pv_q[HIT_LAT-1];
  assign resp       = pd_q[HIT_LAT-1];

  // ---------------------------------------------------------------- state
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q <= S_IDLE;
      mreq_q  <= '0;
      vway_q  <= 1'b0;
      for (int s = 0; s < SETS; s++) begin
        lru_q[s] <= 1'b0;
        for (int w = 0; w < WAYS; w++) begin
          valid_q[w][s] <= 1'b0;
          dirty_q[w][s] <= 1'b0;
        end
      end
    end else begin
      unique case (state_q)
        S_IDLE: if (accept) begin
          if (hit) begin
            lru_q[req_idx] <= ~hit_way;
            if (req.store) dirty_q[hit_way][req_idx] <= 1'b1;
          end else begin
            mreq_q <= req;
            vway_q <= victim_way;
            state_q <= (valid_q[victim_way][req_idx] && dirty_q[victim_way][req_idx]) ? S_WB : S_RD;
          end
        end
        S_WB:   if (l2_req_ready) state_q <= S_RD;
        S_RD:   if (l2_req_ready) state_q <= S_WAIT;
        S_WAIT: if (l2_resp_valid) begin
          valid_q[vway_q][m_idx] <= 1'b1;
          dirty_q[vway_q][m_idx] <= mreq_q.store;
          lru_q[m_idx] <= ~vway_q;
          state_q      <= S_IDLE;
        end
        default: state_q <= S_IDLE;
      endcase
    end
  end

  // Tag and data arrays hold no reset state: they are only read through a
  // valid bit, so they can map onto plain memories.
  always_ff @(posedge clk) begin
    if (accept && hit && req.store)
      data_q[hit_way][req_idx] <= merge(data_q[hit_way][req_idx], req.addr, req.wdata, req.be);
    if (fill_done) begin
      tag_q[vway_q][m_idx]  <= tag_of(mreq_q.addr);
      data_q[vway_q][m_idx] <= mreq_q.store
                               ? merge(l2_resp.rdata, mreq_q.addr, mreq_q.wdata, mreq_q.be)
                               : l2_resp.rdata;
    end
  end

  assign ev_hit  = accept && hit;
  assign ev_miss = accept && !hit;
  assign ev_wb   = (state_q == S_WB) && l2_req_ready;

  // ---------------------------------------------------------------- checks
  initial begin
    assert (HIT_LAT >= 1) else $error("wb_cache: HIT_LAT must be at least 1");
    assert (SETS >= 2 && (SETS & (SETS - 1)) == 0)
      else $error("wb_cache: SIZE_BYTES must give a power-of-two number of sets");
  end

  // A line read is only answered while one is outstanding.
  assert property (@(posedge clk) disable iff (!rst_n) l2_resp_valid |-> state_q == S_WAIT);
  // A line is never held in both ways of a set.
  assert property (@(posedge clk) disable iff (!rst_n) accept && hit |-> !(hit0 && hit1));

endmodule

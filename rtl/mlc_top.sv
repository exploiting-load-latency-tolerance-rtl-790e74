// mlc_top: multi-lateral level-1 data cache with a critical cache.
//
// A conventional DL1 data cache (16 KB, 2-way, 32-byte lines, 2-cycle hits)
// is joined by a small, fast critical cache (1 KB, 2-way, 32-byte lines,
// 1-cycle hits). Loads that profiling found latency intolerant ("critical")
// read both caches and take whichever answers first; all other loads read
// only the DL1 cache; every store writes both. Each cache has its own port
// to the level-2 cache. These sizes, latencies and the steering follow the
// design's main configuration; the level-2 cache itself is outside this
// module and its two ports are brought out.
//
// The criticality of a load is decided at decode time, either by a bit in
// the instruction or by the crit_table lookup included here. The table's
// answer (dec_crit) is carried with the load through the core's pipeline
// and comes back as core_crit when the load issues to the cache, so the
// caller may also drive core_crit from an instruction bit.
//
// Interface (all synchronous to clk, active-low asynchronous reset):
//   cfg_*          write the critical-load PC table
//   dec_*          decode-time lookup, answered one cycle later
//   core_req_*     loads and stores (valid/ready), core_crit with each load
//   ldc_*, ldd_*   load results from the critical cache and the DL1 cache
//   dl1_l2_*, cc_l2_*  line read / write-back ports of the two caches
//   cnt_*          statistics counters (operations, misses, write-backs)
// Timing: a critical load that hits the critical cache returns 1 cycle after
// issue; any load that hits the DL1 returns 2 cycles after issue; misses wait
// for the level-2 line and then return after the cache's hit latency.
module mlc_top
  import mlc_pkg::*;
#(
  parameter int unsigned DL1_SIZE   = 16384,
  parameter int unsigned DL1_LAT    = 2,
  parameter int unsigned CC_SIZE    = 1024,
  parameter int unsigned CC_LAT     = 1,
  parameter int unsigned CT_ENTRIES = 128,
  parameter int unsigned PC_W       = 32
) (
  input  logic                          clk,
  input  logic                          rst_n,

  input  logic                          cfg_we,
  input  logic [$clog2(CT_ENTRIES)-1:0] cfg_idx,
  input  logic [PC_W-1:0]               cfg_pc,
  input  logic                          cfg_set,

  input  logic                          dec_valid,
  input  logic [PC_W-1:0]               dec_pc,
  output logic                          dec_crit_valid,
  output logic                          dec_crit,

  input  logic                          core_req_valid,
  output logic                          core_req_ready,
  input  mem_req_t                      core_req,
  input  logic                          core_crit,

  output logic                          ldc_valid,
  output mem_resp_t                     ldc_resp,
  output logic                          ldd_valid,
  output mem_resp_t                     ldd_resp,

  output logic                          dl1_l2_req_valid,
  input  logic                          dl1_l2_req_ready,
  output l2_req_t                       dl1_l2_req,
  input  logic                          dl1_l2_resp_valid,
  input  l2_resp_t                      dl1_l2_resp,

  output logic                          cc_l2_req_valid,
  input  logic                          cc_l2_req_ready,
  output l2_req_t                       cc_l2_req,
  input  logic                          cc_l2_resp_valid,
  input  l2_resp_t                      cc_l2_resp,

  output logic [31:0]                   cnt_loads,
  output logic [31:0]                   cnt_crit_loads,
  output logic [31:0]                   cnt_cc_served,
  output logic [31:0]                   cnt_stores,
  output logic [31:0]                   cnt_stall,
  output logic [31:0]                   cnt_cc_miss,
  output logic [31:0]                   cnt_dl1_miss,
  output logic [31:0]                   cnt_cc_wb,
  output logic [31:0]                   cnt_dl1_wb
);

  crit_table #(.ENTRIES(CT_ENTRIES), .PC_W(PC_W)) u_table (
    .clk, .rst_n,
    .cfg_we, .cfg_idx, .cfg_pc, .cfg_set,
    .dec_valid, .dec_pc,
    .crit_valid (dec_crit_valid),
    .crit       (dec_crit)
  );

  logic      dl1_req_valid, dl1_req_ready, dl1_resp_valid;
  mem_req_t  dl1_req;
  mem_resp_t dl1_resp;
  logic      cc_req_valid, cc_req_ready, cc_resp_valid;
  mem_req_t  cc_req;
  mem_resp_t cc_resp;

  mlc_ctrl u_ctrl (
    .clk, .rst_n,
    .core_req_valid, .core_req_ready, .core_req, .core_crit,
    .dl1_req_valid, .dl1_req_ready, .dl1_req, .dl1_resp_valid, .dl1_resp,
    .cc_req_valid, .cc_req_ready, .cc_req, .cc_resp_valid, .cc_resp,
    .ldc_valid, .ldc_resp, .ldd_valid, .ldd_resp,
    .cnt_loads, .cnt_crit_loads, .cnt_cc_served, .cnt_stores, .cnt_stall
  );

  logic dl1_miss, dl1_wb, cc_miss, cc_wb;

  wb_cache #(.SIZE_BYTES(DL1_SIZE), .HIT_LAT(DL1_LAT)) u_dl1 (
    .clk, .rst_n,
    .req_valid     (dl1_req_valid),
    .req_ready     (dl1_req_ready),
    .req           (dl1_req),
    .resp_valid    (dl1_resp_valid),
    .resp          (dl1_resp),
    .l2_req_valid  (dl1_l2_req_valid),
    .l2_req_ready  (dl1_l2_req_ready),
    .l2_req        (dl1_l2_req),
    .l2_resp_valid (dl1_l2_resp_valid),
    .l2_resp       (dl1_l2_resp),
    .ev_hit        (),
    .ev_miss       (dl1_miss),
    .ev_wb         (dl1_wb)
  );

  wb_cache #(.SIZE_BYTES(CC_SIZE), .HIT_LAT(CC_LAT)) u_cc (
    .clk, .rst_n,
    .req_valid     (cc_req_valid),
    .req_ready     (cc_req_ready),
    .req           (cc_req),
    .resp_valid    (cc_resp_valid),
    .resp          (cc_resp),
    .l2_req_valid  (cc_l2_req_valid),
    .l2_req_ready  (cc_l2_req_ready),
    .l2_req        (cc_l2_req),
    .l2_resp_valid (cc_l2_resp_valid),
    .l2_resp       (cc_l2_resp),
    .ev_hit        (),
    .ev_miss       (cc_miss),
    .ev_wb         (cc_wb)
  );

  // Misses (loads and stores together) and dirty-line write-backs of each
  // cache.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt_cc_miss  <= '0;
      cnt_dl1_miss <= '0;
      cnt_cc_wb    <= '0;
      cnt_dl1_wb   <= '0;
    end else begin
      if (cc_miss)  cnt_cc_miss  <= cnt_cc_miss + 1;
      if (dl1_miss) cnt_dl1_miss <= cnt_dl1_miss + 1;
      if (cc_wb)    cnt_cc_wb    <= cnt_cc_wb + 1;
      if (dl1_wb)   cnt_dl1_wb   <= cnt_dl1_wb + 1;
    end
  end

endmodule

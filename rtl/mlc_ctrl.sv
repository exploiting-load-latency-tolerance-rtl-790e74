// mlc_ctrl: request steering and result selection of the multi-lateral cache.
//
// Every load goes to the conventional DL1 cache. A load marked critical goes
// to the critical cache as well, and every store goes to both caches, which
// keeps the two write-back caches coherent with no other mechanism. This is
// the steering of the design. How the two copies of a critical load's result
// are merged is this design's own choice: the first cache to answer delivers
// the data and the later copy is dropped. When both answer in the same cycle
// the critical cache's copy is used.
//
// An operation that goes to both caches is issued only when both accept in
// the same cycle, so the two caches see stores and critical loads in one
// order. A non-critical load needs only the DL1 cache. A load whose id still
// has a copy of an earlier critical load's result outstanding waits (the core
// must otherwise keep ids of in-flight loads unique).
//
// Interface:
//   core_req_*      operation from the core; core_crit marks a critical load
//   dl1_*, cc_*     request and response ports of the two caches
//   ldc_*           load results delivered by the critical cache
//   ldd_*           load results delivered by the DL1 cache
//   The two result ports may both be valid in one cycle (for different ids).
//   cnt_*           statistics: loads, critical loads, critical loads whose
//                   result came from the critical cache, stores, and cycles
//                   an operation waited.
//
// Timing: purely combinational from request to the caches and from cache
// responses to the result ports; only the per-id bookkeeping is registered.
module mlc_ctrl
  import mlc_pkg::*;
(
  input  logic      clk,
  input  logic      rst_n,

  input  logic      core_req_valid,
  output logic      core_req_ready,
  input  mem_req_t  core_req,
  input  logic      core_crit,

  output logic      dl1_req_valid,
  input  logic      dl1_req_ready,
  output mem_req_t  dl1_req,
  input  logic      dl1_resp_valid,
  input  mem_resp_t dl1_resp,

  output logic      cc_req_valid,
  input  logic      cc_req_ready,
  output mem_req_t  cc_req,
  input  logic      cc_resp_valid,
  input  mem_resp_t cc_resp,

  output logic      ldc_valid,
  output mem_resp_t ldc_resp,
  output logic      ldd_valid,
  output mem_resp_t ldd_resp,

  output logic [31:0] cnt_loads,
  output logic [31:0] cnt_crit_loads,
  output logic [31:0] cnt_cc_served,
  output logic [31:0] cnt_stores,
  output logic [31:0] cnt_stall
);

  localparam int unsigned NID = 1 << ID_W;

  // Per-id state of a critical load: waiting for its first result, or
  // waiting for the second copy, which is dropped.
  typedef enum logic [1:0] {T_NONE, T_FIRST, T_DROP} track_e;
  track_e trk_q [NID];

  // ------------------------------------------------------------ issue
  logic to_both, id_busy, issue;

  always_comb begin
    to_both = core_req.store || core_crit;
    id_busy = !core_req.store && (trk_q[core_req.id] != T_NONE);
    if (id_busy)      core_req_ready = 1'b0;
    else if (to_both) core_req_ready = dl1_req_ready && cc_req_ready;
    else              core_req_ready = dl1_req_ready;
    issue = core_req_valid && core_req_ready;

    dl1_req_valid = issue;
    dl1_req       = core_req;
    cc_req_valid  = issue && to_both;
    cc_req        = core_req;
  end

  // ------------------------------------------------------------ results
  logic cc_first, dl1_first, dl1_drop, cc_drop, same_cycle;

  always_comb begin
    same_cycle = cc_resp_valid && dl1_resp_valid && (cc_resp.id == dl1_resp.id);
    // The critical cache only ever answers critical loads.
    cc_first   = cc_resp_valid && trk_q[cc_resp.id] == T_FIRST;
    cc_drop    = cc_resp_valid && trk_q[cc_resp.id] == T_DROP;
    dl1_drop   = dl1_resp_valid &&
                 (trk_q[dl1_resp.id] == T_DROP || (same_cycle && cc_first));
    dl1_first  = dl1_resp_valid && !dl1_drop && trk_q[dl1_resp.id] == T_FIRST;

    ldc_valid = cc_first;
    ldc_resp  = cc_resp;
    ldd_valid = dl1_resp_valid && !dl1_drop;
    ldd_resp  = dl1_resp;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < NID; i++) trk_q[i] <= T_NONE;
    end else begin
      // Responses first; a new critical load may reuse an id only once its
      // entry is T_NONE, so an issue never collides with a response update.
      if (cc_first)  trk_q[cc_resp.id]  <= same_cycle ? T_NONE : T_DROP;
      if (cc_drop)   trk_q[cc_resp.id]  <= T_NONE;
      if (dl1_first) trk_q[dl1_resp.id] <= T_DROP;
      if (dl1_drop && !same_cycle) trk_q[dl1_resp.id] <= T_NONE;
      if (issue && core_crit && !core_req.store) trk_q[core_req.id] <= T_FIRST;
    end
  end

  // ------------------------------------------------------------ statistics
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt_loads      <= '0;
      cnt_crit_loads <= '0;
      cnt_cc_served  <= '0;
      cnt_stores     <= '0;
      cnt_stall      <= '0;
    end else begin
      if (issue && !core_req.store)              cnt_loads      <= cnt_loads + 1;
      if (issue && !core_req.store && core_crit) cnt_crit_loads <= cnt_crit_loads + 1;
      if (cc_first)                              cnt_cc_served  <= cnt_cc_served + 1;
      if (issue && core_req.store)               cnt_stores     <= cnt_stores + 1;
      if (core_req_valid && !core_req_ready)     cnt_stall      <= cnt_stall + 1;
    end
  end

  // ------------------------------------------------------------ rules
  // A result must belong to a load that is still expected.
  assert property (@(posedge clk) disable iff (!rst_n)
                   cc_resp_valid |-> trk_q[cc_resp.id] != T_NONE);
  // The DL1 and critical cache never both deliver the same load.
  assert property (@(posedge clk) disable iff (!rst_n)
                   !(ldc_valid && ldd_valid && ldc_resp.id == ldd_resp.id));

endmodule

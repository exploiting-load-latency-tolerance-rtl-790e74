// tb_mlc_top: end-to-end test of the multi-lateral cache at its default
// sizes (16 KB 2-cycle DL1, 1 KB 1-cycle critical cache, 128-entry table),
// with a 16-cycle level-2 model behind both caches.
//
// The test programs the criticality table with the PCs of one third of 48
// static loads, then runs a random program of loads and stores. Each load is
// first decoded (table lookup, answer one cycle later, checked against the
// test's own list) and then issued with the table's answer as its critical
// bit. Address streams are chosen so that critical loads mostly hit a small
// hot region, some critical loads sweep a region larger than the critical
// cache, and the non-critical loads and the stores sweep a region larger
// than the DL1.
//
// Checked independently of the design: the data of every load against a
// reference memory, that each load is answered exactly once, that a result
// from the critical cache only comes for a critical load, the hit latencies
// (1 cycle critical cache, 2 cycles DL1), and the statistics counters.
// Every mechanism of the design must occur at least once: critical-cache
// hits, critical loads answered by the DL1 because the critical cache
// missed, critical-cache refills, DL1 misses, dirty write-backs from both
// caches, controller stalls, and non-critical loads.
module tb_mlc_top;
  import mlc_pkg::*;

  localparam int N_OPS   = 20000;
  localparam int N_LOADS = 48;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic        cfg_we = 0, cfg_set = 0;
  logic [6:0]  cfg_idx = '0;
  logic [31:0] cfg_pc = '0;
  logic        dec_valid = 0;
  logic [31:0] dec_pc = '0;
  logic        dec_crit_valid, dec_crit;
  logic        core_req_valid = 0, core_req_ready, core_crit = 0;
  mem_req_t    core_req = '0;
  logic        ldc_valid, ldd_valid;
  mem_resp_t   ldc_resp, ldd_resp;
  logic        l2v [2], l2r [2], l2rv [2];
  l2_req_t     l2q [2];
  l2_resp_t    l2p [2];
  int          n_rd [2], n_wr [2];
  logic [31:0] cnt_loads, cnt_crit_loads, cnt_cc_served, cnt_stores, cnt_stall;
  logic [31:0] cnt_cc_miss, cnt_dl1_miss, cnt_cc_wb, cnt_dl1_wb;

  mlc_top dut (
    .clk, .rst_n,
    .cfg_we, .cfg_idx, .cfg_pc, .cfg_set,
    .dec_valid, .dec_pc, .dec_crit_valid, .dec_crit,
    .core_req_valid, .core_req_ready, .core_req, .core_crit,
    .ldc_valid, .ldc_resp, .ldd_valid, .ldd_resp,
    .dl1_l2_req_valid(l2v[0]), .dl1_l2_req_ready(l2r[0]), .dl1_l2_req(l2q[0]),
    .dl1_l2_resp_valid(l2rv[0]), .dl1_l2_resp(l2p[0]),
    .cc_l2_req_valid(l2v[1]), .cc_l2_req_ready(l2r[1]), .cc_l2_req(l2q[1]),
    .cc_l2_resp_valid(l2rv[1]), .cc_l2_resp(l2p[1]),
    .cnt_loads, .cnt_crit_loads, .cnt_cc_served, .cnt_stores, .cnt_stall,
    .cnt_cc_miss, .cnt_dl1_miss, .cnt_cc_wb, .cnt_dl1_wb
  );

  dl2_model #(.LAT(16)) l2 (
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

  // ---------------- reference state
  word_t refmem [addr_t];
  function automatic word_t ref_read(addr_t a);
    if (refmem.exists(a)) return refmem[a];
    return tb_mem_pkg::init_word(a);
  endfunction

  function automatic logic [31:0] load_pc(int k);
    return 32'h0001_2000 + 32'(k) * 4 * 7;
  endfunction
  function automatic bit is_crit(int k);
    return (k % 3) == 0;
  endfunction

  bit    outst [16];
  word_t exp_d [16];
  bit    exp_c [16];
  int    t_iss [16];

  int n_loads = 0, n_crit = 0, n_stores = 0;
  int m_cc_hit = 0, m_cc_fill = 0, m_dl1_for_crit = 0, m_dl1_hit = 0, m_dl1_miss = 0;
  int m_noncrit = 0, m_ldc = 0;

  // ---------------- issue monitor and result checker
  always @(posedge clk) if (rst_n) begin
    if (core_req_valid && core_req_ready) begin
      if (core_req.store) begin
        word_t o;
        o = ref_read(core_req.addr);
        for (int b = 0; b < WORD_BYTES; b++)
          if (core_req.be[b]) o[b*8 +: 8] = core_req.wdata[b*8 +: 8];
        refmem[core_req.addr] = o;
        n_stores++;
      end else begin
        check(!outst[core_req.id], "load issued on an id still in use");
        outst[core_req.id] = 1;
        exp_d[core_req.id] = ref_read(core_req.addr);
        exp_c[core_req.id] = core_crit;
        t_iss[core_req.id] = cycle;
        n_loads++;
        if (core_crit) n_crit++;
      end
    end
    if (ldc_valid) begin
      id_t i;
      i = ldc_resp.id;
      m_ldc++;
      check(outst[i] && exp_c[i], "critical-cache result for no outstanding critical load");
      check(ldc_resp.rdata == exp_d[i], $sformatf("critical cache data %h expected %h",
                                                   ldc_resp.rdata, exp_d[i]));
      if (!ldc_resp.miss) begin
        m_cc_hit++;
        check(cycle - t_iss[i] == 1, $sformatf("critical hit latency %0d", cycle - t_iss[i]));
      end else m_cc_fill++;
      outst[i] = 0;
    end
    if (ldd_valid) begin
      id_t i;
      i = ldd_resp.id;
      check(outst[i], "DL1 result for no outstanding load");
      check(ldd_resp.rdata == exp_d[i], $sformatf("DL1 data %h expected %h",
                                                   ldd_resp.rdata, exp_d[i]));
      if (!ldd_resp.miss) begin
        m_dl1_hit++;
        check(cycle - t_iss[i] == 2, $sformatf("DL1 hit latency %0d", cycle - t_iss[i]));
      end else m_dl1_miss++;
      if (exp_c[i]) m_dl1_for_crit++; else m_noncrit++;
      outst[i] = 0;
    end
  end

  // ---------------- stimulus
  task automatic decode(int k, output bit crit);
    @(posedge clk); #1;
    dec_valid = 1; dec_pc = load_pc(k);
    @(posedge clk); #1;
    dec_valid = 0;
    check(dec_crit_valid && dec_crit == is_crit(k), "table classification wrong");
    crit = dec_crit;
  endtask

  task automatic issue(bit store, bit crit, addr_t a, int id);
    core_req_valid = 1;
    core_req.store = store;
    core_req.id    = id_t'(id);
    core_req.addr  = a;
    core_req.wdata = {$urandom, $urandom};
    core_req.be    = store && $urandom_range(0, 3) == 0 ? 8'($urandom) : 8'hFF;
    core_crit      = crit;
    do @(posedge clk); while (!core_req_ready);
    #1 core_req_valid = 0;
  endtask

  int next_id = 0;
  initial begin
    for (int i = 0; i < 16; i++) outst[i] = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    // Program the table with the critical static loads.
    for (int k = 0, e = 0; k < N_LOADS; k++)
      if (is_crit(k)) begin
        @(posedge clk); #1;
        cfg_we = 1; cfg_idx = 7'(e); cfg_pc = load_pc(k); cfg_set = 1;
        e++;
      end
    @(posedge clk); #1 cfg_we = 0;

    for (int n = 0; n < N_OPS; n++) begin
      int    r, k;
      bit    crit;
      addr_t a;
      r = $urandom_range(0, 99);
      if (r < 30) begin
        // Stores: half to the hot region, half over 32 KB.
        if ($urandom_range(0, 1) != 0) a = 32'h0010_0000 + (($urandom % 512) & ~32'h7);
        else                      a = 32'h0020_0000 + (($urandom % 32768) & ~32'h7);
        issue(1, 0, a, 0);
      end else begin
        k = $urandom_range(0, N_LOADS - 1);
        decode(k, crit);
        if (is_crit(k) && k < 36)  a = 32'h0010_0000 + (($urandom % 512) & ~32'h7);
        else if (is_crit(k))       a = 32'h0030_0000 + (($urandom % 4096) & ~32'h7);
        else                       a = 32'h0020_0000 + (($urandom % 32768) & ~32'h7);
        // Use an id whose result has come back.
        while (outst[next_id]) @(posedge clk);
        issue(0, crit, a, next_id);
        next_id = (next_id + 1) % 16;
      end
    end
    repeat (100) @(posedge clk);
    for (int i = 0; i < 16; i++) check(!outst[i], "load never answered");
    check(cnt_loads == n_loads && cnt_crit_loads == n_crit && cnt_stores == n_stores,
          "operation counters");
    check(cnt_cc_served == m_ldc, "critical-cache-served counter");
    check(cnt_dl1_wb == n_wr[0] && cnt_cc_wb == n_wr[1], "write-back counters");
    // Every mechanism must have happened.
    check(m_cc_hit > 0,       "no critical-cache hit");
    check(m_dl1_for_crit > 0, "no critical load answered by the DL1");
    check(m_cc_fill > 0,      "no critical load answered by a critical-cache refill");
    check(m_dl1_miss > 0,     "no DL1 miss");
    check(cnt_dl1_wb > 0,     "no DL1 write-back");
    check(cnt_cc_wb > 0,      "no critical-cache write-back (stores never reached it)");
    check(cnt_stall > 0,      "no controller stall");
    check(m_noncrit > 0,      "no non-critical load");
    $display("mlc_top: loads=%0d critical=%0d stores=%0d", n_loads, n_crit, n_stores);
    $display("  critical: cc_hit=%0d cc_refill_first=%0d dl1_first=%0d (cc load share %0d%%)",
             m_cc_hit, m_cc_fill, m_dl1_for_crit, n_loads != 0 ? 100 * n_crit / n_loads : 0);
    $display("  dl1: hits=%0d misses=%0d  misses dl1=%0d cc=%0d  writebacks dl1=%0d cc=%0d  stall_cycles=%0d",
             m_dl1_hit, m_dl1_miss, cnt_dl1_miss, cnt_cc_miss, cnt_dl1_wb, cnt_cc_wb, cnt_stall);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (N_OPS * 60 + 5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

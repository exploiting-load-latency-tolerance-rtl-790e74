// tb_mlc_ctrl: self-checking test of the steering and result selection.
//
// The testbench plays the core and both caches. Cache ready signals are
// random; each cache answers the loads it received, in order, after a random
// delay. For every cycle the test works out on its own
//   - whether the controller may accept the offered operation (both caches
//     ready for stores and critical loads, DL1 ready for other loads, and the
//     load's id free of an outstanding second copy),
//   - which cache(s) must receive it,
//   - which result port must deliver each load, and when: the earlier of the
//     two copies for a critical load (the critical cache on a tie), the DL1
//     copy for any other load, and never a second copy,
// and compares. The statistics counters are compared at the end.
module tb_mlc_ctrl;
  import mlc_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic      core_req_valid = 0, core_req_ready, core_crit = 0;
  mem_req_t  core_req = '0;
  logic      dl1_req_valid, dl1_req_ready = 0, dl1_resp_valid = 0;
  mem_req_t  dl1_req;
  mem_resp_t dl1_resp = '0;
  logic      cc_req_valid, cc_req_ready = 0, cc_resp_valid = 0;
  mem_req_t  cc_req;
  mem_resp_t cc_resp = '0;
  logic      ldc_valid, ldd_valid;
  mem_resp_t ldc_resp, ldd_resp;
  logic [31:0] cnt_loads, cnt_crit_loads, cnt_cc_served, cnt_stores, cnt_stall;

  mlc_ctrl dut (.*);

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL @%0t: %s", $time, what);
    end
  endtask

  typedef struct { id_t id; word_t data; int due; } rsp_t;
  rsp_t q_dl1 [$], q_cc [$];
  int   last_dl1_due = 0, last_cc_due = 0;
  int   busy_until [16];       // last cycle a copy of this id is returned
  int   first_due  [16];       // cycle the first copy is due
  // Expected deliveries: port 0 = critical cache, 1 = DL1.
  typedef struct { bit port; id_t id; word_t data; int due; } del_t;
  del_t dels [$];

  int n_loads = 0, n_crit = 0, n_cc = 0, n_stores = 0, n_stall = 0;
  int n_dup_drop = 0, n_tie = 0, n_id_busy = 0, n_dl1_first = 0;
  int now = 0;
  bit have_req = 0;
  int issued = 0;
  localparam int N_OPS = 3000;

  function automatic int max2(int a, int b); return a > b ? a : b; endfunction

  task automatic new_req();
    int r, pick;
    bit busy_pick;
    r = $urandom_range(0, 99);
    core_req.store = (r < 30);
    core_crit      = (r >= 30 && r < 65);
    core_req.addr  = {$urandom} & ~32'h7;
    core_req.wdata = {$urandom, $urandom};
    core_req.be    = 8'hFF;
    // Usually a free id; sometimes one whose second copy is still due.
    busy_pick = 0;
    if (!core_req.store && $urandom_range(0, 9) == 0)
      for (int i = 0; i < 16; i++)
        if (first_due[i] < now && busy_until[i] >= now) begin
          pick = i; busy_pick = 1;
        end
    if (!busy_pick) begin
      pick = -1;
      for (int k = 0; k < 16 && pick < 0; k++) begin
        int c = (issued + k) % 16;
        if (busy_until[c] < now) pick = c;
      end
      if (pick < 0) pick = 0;
    end
    core_req.id = id_t'(pick);
    have_req = 1;
  endtask

  initial begin
    for (int i = 0; i < 16; i++) begin busy_until[i] = -1; first_due[i] = -1; end
    repeat (2) @(posedge clk);
    rst_n = 1;
    forever begin
      @(posedge clk);
      // ---------------- sample cycle now
      begin
        bit to_both, exp_ready, id_b;
        to_both   = core_req.store || core_crit;
        id_b      = !core_req.store && busy_until[core_req.id] >= now;
        exp_ready = !id_b && dl1_req_ready && (!to_both || cc_req_ready);
        if (core_req_valid) begin
          check(core_req_ready == exp_ready,
                $sformatf("ready %0d expected %0d", core_req_ready, exp_ready));
          check(dl1_req_valid == exp_ready, "DL1 request valid wrong");
          check(cc_req_valid == (exp_ready && to_both), "critical cache request valid wrong");
          if (exp_ready) check(dl1_req == core_req && (!to_both || cc_req == core_req),
                               "request not passed on unchanged");
          if (!exp_ready) n_stall++;
          if (id_b) n_id_busy++;
        end else begin
          check(!dl1_req_valid && !cc_req_valid, "request to a cache without a core request");
        end
        if (core_req_valid && exp_ready) begin
          have_req = 0;
          issued++;
          if (core_req.store) n_stores++;
          else begin
            int dd, dc;
            word_t d;
            d  = {$urandom, $urandom};
            n_loads++;
            dd = max2(last_dl1_due + 1, now + $urandom_range(1, 6));
            last_dl1_due = dd;
            q_dl1.push_back('{id: core_req.id, data: d, due: dd});
            if (core_crit) begin
              n_crit++;
              dc = max2(last_cc_due + 1, now + $urandom_range(1, 6));
              last_cc_due = dc;
              q_cc.push_back('{id: core_req.id, data: d, due: dc});
              if (dc <= dd) begin
                dels.push_back('{port: 0, id: core_req.id, data: d, due: dc});
                n_cc++;
                if (dc == dd) n_tie++;
              end else begin
                dels.push_back('{port: 1, id: core_req.id, data: d, due: dd});
                n_dl1_first++;
              end
              busy_until[core_req.id] = max2(dc, dd);
              first_due[core_req.id]  = dc < dd ? dc : dd;
              n_dup_drop++;
            end else begin
              dels.push_back('{port: 1, id: core_req.id, data: d, due: dd});
              busy_until[core_req.id] = dd;
              first_due[core_req.id]  = dd;
            end
          end
        end
        // Result ports.
        for (int p = 0; p < 2; p++) begin
          bit v, found;
          mem_resp_t r;
          v = p == 0 ? ldc_valid : ldd_valid;
          r = p == 0 ? ldc_resp : ldd_resp;
          found = 0;
          for (int k = 0; k < dels.size(); k++)
            if (dels[k].port == p[0] && dels[k].due == now) begin
              found = 1;
              check(v && r.id == dels[k].id && r.rdata == dels[k].data,
                    $sformatf("port %0d: result for id %0d missing or wrong", p, dels[k].id));
              dels.delete(k);
              break;
            end
          if (!found) check(!v, $sformatf("port %0d: unexpected result", p));
        end
      end
      // ---------------- drive cycle now+1
      #1;
      now++;
      dl1_req_ready = ($urandom_range(0, 3) != 0);
      cc_req_ready  = ($urandom_range(0, 3) != 0);
      dl1_resp_valid = 0;
      cc_resp_valid  = 0;
      if (q_dl1.size() > 0 && q_dl1[0].due == now) begin
        rsp_t e;
        e = q_dl1.pop_front();
        dl1_resp_valid = 1;
        dl1_resp = '{id: e.id, rdata: e.data, miss: 1'b0};
      end
      if (q_cc.size() > 0 && q_cc[0].due == now) begin
        rsp_t e;
        e = q_cc.pop_front();
        cc_resp_valid = 1;
        cc_resp = '{id: e.id, rdata: e.data, miss: 1'b0};
      end
      if (!have_req && issued < N_OPS) new_req();
      core_req_valid = have_req;
      if (issued >= N_OPS && q_dl1.size() == 0 && q_cc.size() == 0 && dels.size() == 0) break;
    end
    @(posedge clk);
    check(cnt_loads == n_loads, "load counter");
    check(cnt_crit_loads == n_crit, "critical load counter");
    check(cnt_cc_served == n_cc, "critical-cache-served counter");
    check(cnt_stores == n_stores, "store counter");
    check(cnt_stall == n_stall, "stall counter");
    check(n_tie > 0 && n_dl1_first > 0 && n_id_busy > 0 && n_stall > 0,
          "a case never happened");
    $display("mlc_ctrl: loads=%0d critical=%0d cc_first=%0d dl1_first=%0d ties=%0d stores=%0d stall_cycles=%0d id_busy=%0d",
             n_loads, n_crit, n_cc, n_dl1_first, n_tie, n_stores, n_stall, n_id_busy);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (N_OPS * 20 + 1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

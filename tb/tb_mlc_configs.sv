// tb_mlc_configs: runs the end-to-end test (mlc_run) on three more of the
// evaluated configurations side by side: 8 KB 2-cycle DL1 with a 2 KB
// critical cache, 16 KB 2-cycle DL1 with a 2 KB critical cache, and 32 KB
// 3-cycle DL1 with a 1 KB critical cache. Each run checks load data,
// single delivery, the hit latencies of its configuration and that every
// mechanism occurred. The checks of all runs are summed into one result.
module tb_mlc_configs;
  int  c [3], f [3];
  bit  d [3];

  mlc_run #(.DL1_SIZE(8192),  .DL1_LAT(2), .CC_SIZE(2048)) r8k2k  (.checks(c[0]), .failures(f[0]), .done(d[0]));
  mlc_run #(.DL1_SIZE(16384), .DL1_LAT(2), .CC_SIZE(2048)) r16k2k (.checks(c[1]), .failures(f[1]), .done(d[1]));
  mlc_run #(.DL1_SIZE(32768), .DL1_LAT(3), .CC_SIZE(1024)) r32k1k (.checks(c[2]), .failures(f[2]), .done(d[2]));

  initial begin
    int checks, failures;
    wait (d[0] && d[1] && d[2]);
    checks   = c[0] + c[1] + c[2];
    failures = f[0] + f[1] + f[2];
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #50ms;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", c[0] + c[1] + c[2], f[0] + f[1] + f[2] + 1);
    $finish;
  end
endmodule

// tb_critical_cache: the critical-cache configuration of wb_cache (1 KB,
// 2-way, 1-cycle hits) under random loads and stores; see cache_check for
// what is checked.
module tb_critical_cache;
  cache_check #(.SIZE_BYTES(1024), .HIT_LAT(1), .N_OPS(4000)) t ();
endmodule

// tb_dl1_cache: the DL1 configuration of wb_cache (16 KB, 2-way, 2-cycle
// hits) under random loads and stores; see cache_check for what is checked.
module tb_dl1_cache;
  cache_check #(.SIZE_BYTES(16384), .HIT_LAT(2), .N_OPS(6000)) t ();
endmodule

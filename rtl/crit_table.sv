// crit_table: decode-time criticality lookup for load instructions.
//
// Loads are classified offline (statically) as critical or non-critical by
// profiling their latency tolerance; the classification never changes while
// the program runs. One way the design offers to deliver that class to the
// hardware is a table consulted at decode time; this module is that table.
// It holds the program counters of the critical loads, written by software
// before the program starts, and answers for each decoded instruction whether
// its PC is in the table. The other delivery method, a criticality bit in the
// instruction encoding, needs no table and enters the cache controller
// directly.
//
// Organisation (this design's own choice): a fully associative table of
// ENTRIES PC tags with a valid bit each, so no two loads alias. 128 entries
// cover the largest set of critical static loads of the profiled benchmarks
// (107). Instructions are 4-byte aligned, so the two low PC bits are not kept.
//
// Interface:
//   cfg_we, cfg_idx, cfg_pc, cfg_set  write entry cfg_idx: set it to cfg_pc
//                                     (cfg_set=1) or invalidate it (cfg_set=0)
//   dec_valid, dec_pc                 instruction being decoded
//   crit_valid, crit                  registered result, one cycle later
//
// Timing: a lookup presented in cycle t is answered in cycle t+1 (the decode
// stage register). A write in cycle t is seen by lookups from cycle t+1 on.
module crit_table #(
  parameter int unsigned ENTRIES = 128,
  parameter int unsigned PC_W    = 32
) (
  input  logic                       clk,
  input  logic                       rst_n,

  input  logic                       cfg_we,
  input  logic [$clog2(ENTRIES)-1:0] cfg_idx,
  input  logic [PC_W-1:0]            cfg_pc,
  input  logic                       cfg_set,

  input  logic                       dec_valid,
  input  logic [PC_W-1:0]            dec_pc,
  output logic                       crit_valid,
  output logic                       crit
);

  typedef logic [PC_W-3:0] pc_tag_t;

  pc_tag_t tag_q   [ENTRIES];
  logic    valid_q [ENTRIES];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < ENTRIES; i++) valid_q[i] <= 1'b0;
    end else if (cfg_we) begin
      valid_q[cfg_idx] <= cfg_set;
    end
  end

  always_ff @(posedge clk) begin
    if (cfg_we) tag_q[cfg_idx] <= cfg_pc[PC_W-1:2];
  end

  logic match;
  always_comb begin
    match = 1'b0;
    for (int i = 0; i < ENTRIES; i++)
      if (valid_q[i] && tag_q[i] == dec_pc[PC_W-1:2]) match = 1'b1;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      crit_valid <= 1'b0;
      crit       <= 1'b0;
    end else begin
      crit_valid <= dec_valid;
      crit       <= dec_valid && match;
    end
  end

endmodule

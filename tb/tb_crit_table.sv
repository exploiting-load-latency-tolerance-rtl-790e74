// tb_crit_table: self-checking test of the decode-time criticality table.
// Fills the table with random load PCs, looks up PCs that are and are not
// in it, invalidates some entries and overwrites others, and compares each
// answer, one cycle after the lookup, with a reference list of PCs kept in
// the testbench.
module tb_crit_table;
  localparam int unsigned ENTRIES = 128;   // the table's default size
  localparam int unsigned PC_W    = 32;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic                       cfg_we = 0, cfg_set = 0;
  logic [$clog2(ENTRIES)-1:0] cfg_idx = '0;
  logic [PC_W-1:0]            cfg_pc = '0;
  logic                       dec_valid = 0;
  logic [PC_W-1:0]            dec_pc = '0;
  logic                       crit_valid, crit;

  crit_table dut (.*);

  int checks = 0, failures = 0;
  logic [PC_W-1:0] ref_pc [ENTRIES];
  bit              ref_v  [ENTRIES];

  function automatic bit ref_match(logic [PC_W-1:0] pc);
    for (int i = 0; i < ENTRIES; i++)
      if (ref_v[i] && ref_pc[i][PC_W-1:2] == pc[PC_W-1:2]) return 1;
    return 0;
  endfunction

  task automatic write_entry(int idx, logic [PC_W-1:0] pc, bit set);
    @(posedge clk); #1;
    cfg_we = 1; cfg_idx = idx[$clog2(ENTRIES)-1:0]; cfg_pc = pc; cfg_set = set;
    @(posedge clk); #1;
    cfg_we = 0;
    ref_pc[idx] = pc; ref_v[idx] = set;
  endtask

  int n_true = 0, n_false = 0;
  task automatic lookup(logic [PC_W-1:0] pc);
    bit e;
    e = ref_match(pc);
    @(posedge clk); #1;
    dec_valid = 1; dec_pc = pc;
    @(posedge clk); #1;
    dec_valid = 0;
    checks++;
    if (!(crit_valid && crit == e)) begin
      failures++;
      $display("FAIL pc=%h crit=%0d expected %0d", pc, crit, e);
    end
    if (e) n_true++; else n_false++;
  endtask

  initial begin
    for (int i = 0; i < ENTRIES; i++) begin ref_v[i] = 0; ref_pc[i] = '0; end
    repeat (2) @(posedge clk);
    rst_n = 1;
    // Nothing is critical after reset.
    lookup(32'h0001_0000);
    for (int i = 0; i < ENTRIES; i++)
      write_entry(i, 32'h0040_0000 + ($urandom_range(0, 4095) << 2), 1);
    for (int n = 0; n < 600; n++) begin
      if ($urandom_range(0, 1) != 0) lookup(ref_pc[$urandom_range(0, ENTRIES - 1)]);
      else                      lookup(32'h0040_0000 + ($urandom_range(0, 4095) << 2));
      if (n % 50 == 10) write_entry($urandom_range(0, ENTRIES - 1), '0, 0);
      if (n % 50 == 30) write_entry($urandom_range(0, ENTRIES - 1),
                                    32'h0080_0000 + ($urandom_range(0, 255) << 2), 1);
    end
    // Invalidated entries no longer match, even for their old PC.
    for (int i = 0; i < 8; i++) begin
      logic [PC_W-1:0] old;
      old = ref_pc[i];
      write_entry(i, old, 0);
      if (!ref_match(old)) lookup(old);
    end
    // The valid output follows the decode valid with one cycle of delay.
    @(posedge clk); #1;
    checks++;
    if (crit_valid) begin failures++; $display("FAIL crit_valid without lookup"); end
    checks++;
    if (n_true == 0 || n_false == 0) begin failures++; $display("FAIL lookups not mixed"); end
    $display("crit_table: %0d critical and %0d non-critical lookups", n_true, n_false);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// dl2_model: behavioural level-2 cache for the testbenches, not a design
// block. It has two line ports, one per level-1 cache, and one shared store
// of lines. A write (dirty write-back) is taken in one cycle and stored at
// once. A read is taken when the port is idle and answered LAT cycles later
// with the line as it was when the read was taken (16 cycles by default,
// the level-2 latency of the processor the cache was evaluated in). Lines
// never written read as tb_mem_pkg::init_line. Counts reads and writes per
// port for the testbenches.
module dl2_model
  import mlc_pkg::*;
#(
  parameter int unsigned LAT = 16
) (
  input  logic     clk,
  input  logic     rst_n,
  input  logic     req_valid [2],
  output logic     req_ready [2],
  input  l2_req_t  req       [2],
  output logic     resp_valid[2],
  output l2_resp_t resp      [2],
  output int       n_reads   [2],
  output int       n_writes  [2]
);
  line_t mem [line_addr_t];

  int    cnt   [2];
  logic  busy  [2];
  line_t rline [2];

  function automatic line_t read_line(line_addr_t la);
    if (mem.exists(la)) return mem[la];
    return tb_mem_pkg::init_line(la);
  endfunction

  always_comb
    for (int p = 0; p < 2; p++) begin
      req_ready[p]  = !busy[p];
      resp_valid[p] = busy[p] && cnt[p] == 0;
      resp[p].rdata = rline[p];
    end

  always @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int p = 0; p < 2; p++) begin
        busy[p] <= 1'b0; cnt[p] <= 0; rline[p] <= '0;
        n_reads[p] <= 0; n_writes[p] <= 0;
      end
    end else begin
      for (int p = 0; p < 2; p++) begin
        if (busy[p]) begin
          if (cnt[p] == 0) busy[p] <= 1'b0;
          else             cnt[p] <= cnt[p] - 1;
        end else if (req_valid[p]) begin
          if (req[p].write) begin
            mem[req[p].laddr] = req[p].wdata;
            n_writes[p] <= n_writes[p] + 1;
          end else begin
            busy[p]  <= 1'b1;
            cnt[p]   <= LAT - 1;
            rline[p] <= read_line(req[p].laddr);
            n_reads[p] <= n_reads[p] + 1;
          end
        end
      end
    end
  end
endmodule

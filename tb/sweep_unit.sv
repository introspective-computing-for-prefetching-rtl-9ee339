// sweep_unit: one configuration of the complete design with its own
// next-level model and scripted processor, for configuration sweeps.
// Exposes the processor's results and counts issued prefetches and queue
// drops.
module sweep_unit
  import ip_pkg::*;
#(
  parameter int unsigned HASH_SIZE   = 10000,
  parameter int unsigned QUEUE_DEPTH = 10,
  parameter int unsigned THRESH      = 2,
  parameter int unsigned SEED        = 1,
  parameter int unsigned GAP         = 12
) (
  input  logic clk,
  input  logic rst_n,
  output logic done,
  output int   load_errors,
  output int   first_pass_misses,
  output int   last_pass_misses,
  output int   prefetches,
  output int   drops
);
  logic cpu_req, cpu_we, cpu_ready, cpu_rvalid;
  addr_t cpu_addr; word_t cpu_wdata, cpu_rdata; be_t cpu_be;
  logic mem_rd_req, mem_rd_valid, mem_wr_valid; blk_addr_t mem_rd_blk; line_t mem_rd_data;
  addr_t mem_wr_addr; word_t mem_wr_data; be_t mem_wr_be;
  logic engine_ready, miss_event, queue_drop, pf_issued, pf_ignored, event_done;

  introspective_prefetch #(.HASH_SIZE(HASH_SIZE), .QUEUE_DEPTH(QUEUE_DEPTH), .THRESH(THRESH)) dut (.*);
  l2_model #(.LAT(6)) l2 (
    .clk, .rst_n, .rd_req(mem_rd_req), .rd_blk(mem_rd_blk), .rd_valid(mem_rd_valid),
    .rd_data(mem_rd_data), .wr_valid(mem_wr_valid), .wr_addr(mem_wr_addr),
    .wr_data(mem_wr_data), .wr_be(mem_wr_be)
  );
  trace_cpu #(.SEED(SEED), .GAP(GAP)) cpu (.*);

  initial begin prefetches = 0; drops = 0; end
  always @(posedge clk) if (rst_n) begin
    prefetches += int'(pf_issued);
    drops      += int'(queue_drop);
  end
endmodule

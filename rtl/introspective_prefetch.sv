// introspective_prefetch: primary processor's L1 data cache, miss queue and
// secondary prefetch engine, connected as in the introspective architecture.
//
// The primary processor (outside this module) runs the program through the
// cpu_* port of the L1 data cache. Every demand miss of that cache pushes the
// missing block address into the miss queue; the secondary engine, running in
// parallel, pops the misses one at a time, learns which misses closely follow
// which, and sends prefetch requests back into the cache, which inserts the
// prefetched blocks directly. The next level of the hierarchy (an L2 answering
// in a fixed number of cycles) is outside too, on the mem_* port.
//
// Defaults are the evaluated configuration: 16 KB 4-way cache with 64-byte
// blocks, FIFO queue of 10 entries that deletes its oldest entry when full,
// hash table of 10000 entries with 5 follower slots each, closeness window of
// 5 misses and prefetch threshold 2. The engine runs on the same clock as the
// cache (secondary speed equal to the primary's).
//
// Status outputs, one-cycle pulses: miss_event (a demand miss was queued),
// queue_drop (the queue was full and lost its oldest miss), pf_issued (a
// prefetch fill started), pf_ignored (a prefetch named a block already
// present), event_done (the engine finished one miss). engine_ready rises once
// the statistics table has been cleared after reset; misses that occur before
// that wait in the queue.
module introspective_prefetch
  import ip_pkg::*;
#(
  parameter int unsigned CACHE_BYTES = 16384,
  parameter int unsigned CACHE_WAYS  = 4,
  parameter int unsigned QUEUE_DEPTH = 10,
  parameter int unsigned HASH_SIZE   = 10000,
  parameter int unsigned N_CLOSE     = 5,
  parameter int unsigned M_SLOTS     = 5,
  parameter int unsigned THRESH      = 2
) (
  input  logic      clk,
  input  logic      rst_n,
  // primary processor load/store port
  input  logic      cpu_req,
  input  logic      cpu_we,
  input  addr_t     cpu_addr,
  input  word_t     cpu_wdata,
  input  be_t       cpu_be,
  output logic      cpu_ready,
  output logic      cpu_rvalid,
  output word_t     cpu_rdata,
  // next level of memory
  output logic      mem_rd_req,
  output blk_addr_t mem_rd_blk,
  input  logic      mem_rd_valid,
  input  line_t     mem_rd_data,
  output logic      mem_wr_valid,
  output addr_t     mem_wr_addr,
  output word_t     mem_wr_data,
  output be_t       mem_wr_be,
  // status
  output logic      engine_ready,
  output logic      miss_event,
  output logic      queue_drop,
  output logic      pf_issued,
  output logic      pf_ignored,
  output logic      event_done
);

  blk_addr_t miss_blk, q_head, pf_addr;
  logic      q_valid, q_pop, pf_valid, pf_ready;
  logic [$clog2(QUEUE_DEPTH+1)-1:0] q_count;

  l1_dcache #(.SIZE_BYTES(CACHE_BYTES), .WAYS(CACHE_WAYS)) u_dcache (
    .clk, .rst_n,
    .cpu_req, .cpu_we, .cpu_addr, .cpu_wdata, .cpu_be, .cpu_ready, .cpu_rvalid, .cpu_rdata,
    .miss_valid(miss_event), .miss_blk,
    .pf_valid, .pf_addr, .pf_ready, .pf_ignored, .pf_issued,
    .mem_rd_req, .mem_rd_blk, .mem_rd_valid, .mem_rd_data,
    .mem_wr_valid, .mem_wr_addr, .mem_wr_data, .mem_wr_be
  );

  miss_queue #(.DEPTH(QUEUE_DEPTH), .W(BLK_W)) u_queue (
    .clk, .rst_n,
    .push(miss_event), .push_data(miss_blk),
    .pop_valid(q_valid), .pop_data(q_head), .pop(q_pop),
    .dropped(queue_drop), .count(q_count)
  );

  secondary_prefetcher #(
    .HASH_SIZE(HASH_SIZE), .N_CLOSE(N_CLOSE), .M_SLOTS(M_SLOTS), .THRESH(THRESH)
  ) u_engine (
    .clk, .rst_n,
    .q_valid, .q_data(q_head), .q_pop,
    .pf_valid, .pf_addr, .pf_ready,
    .ready(engine_ready), .event_done
  );

  a_queue_bound: assert property (@(posedge clk) disable iff (!rst_n)
                                  q_count <= ($clog2(QUEUE_DEPTH+1))'(QUEUE_DEPTH))
    else $error("introspective_prefetch: queue count out of range");

endmodule

// trace_cpu: scripted primary processor for system testbenches.
//
// Generates a deterministic trace from SEED with its own linear congruential
// generator, so every instance with the same SEED issues the same accesses:
// a mostly-forward walk over POOL blocks, TRACE_LEN accesses, one store in
// eight. It replays the trace PASSES times with GAP idle cycles after each
// access, checks every load against a reference memory that starts like
// l2_model, and counts the demand misses of each pass from miss_event.
// It waits for engine_ready before the first access; done rises at the end.
module trace_cpu
  import ip_pkg::*;
#(
  parameter int unsigned SEED      = 1,
  parameter int unsigned TRACE_LEN = 600,
  parameter int unsigned POOL      = 400,
  parameter int unsigned PASSES    = 5,
  parameter int unsigned GAP       = 12
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  engine_ready,
  input  logic  miss_event,
  output logic  cpu_req,
  output logic  cpu_we,
  output addr_t cpu_addr,
  output word_t cpu_wdata,
  output be_t   cpu_be,
  input  logic  cpu_ready,
  input  logic  cpu_rvalid,
  input  word_t cpu_rdata,
  output logic  done,
  output int    load_errors,
  output int    first_pass_misses,
  output int    last_pass_misses
);

  word_t rmem [logic [ADDR_W-3:0]];
  int    misses;
  logic [31:0] lcg;

  always @(posedge clk) if (rst_n) misses += int'(miss_event);

  function automatic word_t ref_word(logic [ADDR_W-3:0] wa);
    return rmem.exists(wa) ? rmem[wa] : ((32'(wa) * 32'h9E37_79B1) ^ 32'h5A5A_0F0F);
  endfunction

  function automatic logic [31:0] rnd();
    lcg = lcg * 32'd1664525 + 32'd1013904223;
    return lcg;
  endfunction

  task automatic access(input bit we, input addr_t a, input word_t d);
    word_t exp;
    @(negedge clk);
    cpu_req = 1; cpu_we = we; cpu_addr = a; cpu_wdata = d; cpu_be = '1;
    #1;
    while (!cpu_ready) begin @(negedge clk); #1; end
    exp = ref_word(a[ADDR_W-1:2]);
    @(posedge clk);
    @(negedge clk);
    cpu_req = 0;
    while (!cpu_rvalid) @(negedge clk);
    if (we) rmem[a[ADDR_W-1:2]] = d;
    else if (cpu_rdata != exp) load_errors++;
  endtask

  initial begin
    blk_addr_t pool  [POOL];
    blk_addr_t trace [TRACE_LEN];
    bit        st    [TRACE_LEN];
    int        pos, m0;
    lcg = SEED;
    misses = 0; load_errors = 0; done = 0;
    first_pass_misses = 0; last_pass_misses = 0;
    cpu_req = 0; cpu_we = 0; cpu_addr = '0; cpu_wdata = '0; cpu_be = '0;
    foreach (pool[i]) pool[i] = blk_addr_t'({10'h001, rnd() >> 16});
    pos = 0;
    foreach (trace[i]) begin
      pos = int'((pos + ((rnd() >> 20) % 10 == 0 ? (rnd() >> 8) % POOL : 1)) % POOL);
      trace[i] = pool[pos];
      st[i]    = ((rnd() >> 24) % 8 == 0);
    end
    @(posedge rst_n);
    while (!engine_ready) @(posedge clk);
    for (int p = 0; p < PASSES; p++) begin
      m0 = misses;
      foreach (trace[i]) begin
        access(st[i], {trace[i], 4'(i), 2'b00}, rnd());
        repeat (GAP) @(negedge clk);
      end
      if (p == 0) first_pass_misses = misses - m0;
      if (p == PASSES - 1) last_pass_misses = misses - m0;
    end
    done = 1;
  end

endmodule

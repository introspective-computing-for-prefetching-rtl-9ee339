// tb_introspective_prefetch: end-to-end run of the whole design at its
// default parameters, with a 6-cycle next-level model and a scripted primary
// processor.
//
// The processor replays a fixed trace of loads and stores several times. The
// trace is a pseudo-random walk over 400 blocks (larger than the 256-block
// cache), so a pass misses often and the order of misses repeats from pass to
// pass; between accesses the processor computes for a few cycles, except in
// the last pass, where prefetches arrive late. A final
// phase issues back-to-back misses to new blocks, faster than the engine can
// process them, so the miss queue overflows. Every load is checked against a
// reference memory. The run checks that misses fall once the engine has
// learned the trace, and that each mechanism occurred: demand misses queued,
// queue overflow with the oldest miss dropped, prefetches issued, prefetches
// ignored because the block was present, a demand miss covered by a prefetch
// still in flight, a demand miss waiting behind a prefetch fill, and a hash
// table conflict.
module tb_introspective_prefetch;
  import ip_pkg::*;
  localparam int unsigned TRACE_LEN = 600;
  localparam int unsigned POOL      = 400;
  localparam int unsigned PASSES    = 6;   // the last one without compute gaps
  localparam int unsigned GAP       = 12;

  logic clk = 1'b0, rst_n = 1'b0;
  logic cpu_req, cpu_we, cpu_ready, cpu_rvalid;
  addr_t cpu_addr; word_t cpu_wdata, cpu_rdata; be_t cpu_be;
  logic mem_rd_req, mem_rd_valid, mem_wr_valid; blk_addr_t mem_rd_blk; line_t mem_rd_data;
  addr_t mem_wr_addr; word_t mem_wr_data; be_t mem_wr_be;
  logic engine_ready, miss_event, queue_drop, pf_issued, pf_ignored, event_done;
  int checks = 0, failures = 0;
  int c_miss = 0, c_drop = 0, c_pf = 0, c_pfign = 0, c_events = 0, c_late = 0,
      c_wait = 0, c_conflict = 0;

  introspective_prefetch dut (.*);
  l2_model #(.LAT(6)) l2 (
    .clk, .rst_n, .rd_req(mem_rd_req), .rd_blk(mem_rd_blk), .rd_valid(mem_rd_valid),
    .rd_data(mem_rd_data), .wr_valid(mem_wr_valid), .wr_addr(mem_wr_addr),
    .wr_data(mem_wr_data), .wr_be(mem_wr_be)
  );

  always #5 clk = ~clk;

  always @(posedge clk) if (rst_n) begin
    c_miss   += int'(miss_event);
    c_drop   += int'(queue_drop);
    c_pf     += int'(pf_issued);
    c_pfign  += int'(pf_ignored);
    c_events += int'(event_done);
    c_late   += int'(dut.u_dcache.m_late_hit);
    c_wait   += int'(dut.u_dcache.cpu_miss && dut.u_dcache.mem_busy);
    c_conflict += int'(dut.u_engine.state == dut.u_engine.S_LOOK && dut.u_engine.rd_e.valid &&
                       dut.u_engine.rd_e.tag != dut.u_engine.x_q);
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  word_t rmem [logic [ADDR_W-3:0]];
  function automatic word_t ref_word(logic [ADDR_W-3:0] wa);
    return rmem.exists(wa) ? rmem[wa] : ((32'(wa) * 32'h9E37_79B1) ^ 32'h5A5A_0F0F);
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
    else check(cpu_rdata == exp, "load data");
  endtask

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    blk_addr_t pool  [POOL];
    blk_addr_t trace [TRACE_LEN];
    bit        st    [TRACE_LEN];
    int        pass_miss [PASSES];
    int        pos, m0, cyc;
    cpu_req = 0; cpu_we = 0; cpu_addr = '0; cpu_wdata = '0; cpu_be = '0;
    // blocks spread over a 4 MB region; a walk that mostly moves forward
    foreach (pool[i]) pool[i] = blk_addr_t'({10'h001, 16'($urandom)});
    pos = 0;
    foreach (trace[i]) begin
      pos = (pos + ($urandom_range(9) == 0 ? $urandom_range(POOL - 1) : 1)) % POOL;
      trace[i] = pool[pos];
      st[i]    = ($urandom_range(7) == 0);
    end
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    cyc = 0;
    while (!engine_ready) begin @(posedge clk); cyc++; end
    check(cyc >= 10000, "statistics table cleared before the engine starts");

    for (int p = 0; p < PASSES; p++) begin
      m0 = c_miss;
      foreach (trace[i]) begin
        access(st[i], {trace[i], 4'(i), 2'b00}, $urandom);
        if (p != PASSES - 1) repeat (GAP) @(negedge clk);
      end
      pass_miss[p] = c_miss - m0;
      $display("pass %0d: %0d misses", p, pass_miss[p]);
    end
    check(pass_miss[0] > TRACE_LEN / 2, "first pass misses mostly");
    check(pass_miss[PASSES-2] * 10 < pass_miss[0] * 7,
          "learned prefetching removes at least 30% of the misses");

    // burst of back-to-back misses: queue overflows
    for (int i = 0; i < 200; i++) access(0, {10'h2AA, 16'(i * 3), 6'h00}, '0);
    repeat (400) @(negedge clk);

    $display("misses=%0d queue_drops=%0d engine_events=%0d pf_issued=%0d pf_ignored=%0d",
             c_miss, c_drop, c_events, c_pf, c_pfign);
    $display("late_prefetch_hits=%0d demand_waits=%0d hash_conflicts=%0d", c_late, c_wait, c_conflict);
    check(c_events + c_drop == c_miss, "every miss processed or dropped");
    check(c_miss > 0,     "mechanism: demand miss queued");
    check(c_drop > 0,     "mechanism: queue full, oldest dropped");
    check(c_pf > 0,       "mechanism: prefetch issued");
    check(c_pfign > 0,    "mechanism: prefetch of present block ignored");
    check(c_late > 0,     "mechanism: late prefetch covers a demand miss");
    check(c_wait > 0,     "mechanism: demand miss waits behind a prefetch fill");
    check(c_conflict > 0, "mechanism: hash table conflict");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

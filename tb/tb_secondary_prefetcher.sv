// tb_secondary_prefetcher: feeds streams of miss tags to the engine and
// compares every prefetch it issues with a reference model of the
// correlation algorithm (hash entry per tag kept by its first owner, M
// follower slots per entry in order of arrival, followers counted over the
// last N misses, prefetch when a count reaches T, prefetch before update).
// A small hash table makes conflicts, full follower tables and threshold
// crossings frequent. Also checks the clearing time after reset, the cycle
// count of one event, and that prefetch requests wait for pf_ready.
module tb_secondary_prefetcher;
  import ip_pkg::*;
  localparam int unsigned HASH_SIZE = 23;
  localparam int unsigned N_CLOSE   = 5;
  localparam int unsigned M_SLOTS   = 5;
  localparam int unsigned THRESH    = 2;

  logic clk = 1'b0, rst_n = 1'b0;
  logic q_valid, q_pop, pf_valid, pf_ready, ready, event_done;
  blk_addr_t q_data, pf_addr;
  int checks = 0, failures = 0;
  int n_pf = 0, n_conflict = 0, n_fullslots = 0, n_waits = 0;

  secondary_prefetcher #(.HASH_SIZE(HASH_SIZE), .N_CLOSE(N_CLOSE), .M_SLOTS(M_SLOTS),
                         .THRESH(THRESH)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  // ---------------- reference model ----------------
  bit        r_valid [HASH_SIZE];
  blk_addr_t r_owner [HASH_SIZE];
  blk_addr_t r_ftag  [HASH_SIZE][$];
  int        r_fcnt  [HASH_SIZE][$];
  blk_addr_t r_hist  [$];            // newest first

  // Prefetches expected for miss x, then statistics update.
  function automatic void ref_event(blk_addr_t x, ref blk_addr_t exp_pf [$]);
    int h = int'(x % HASH_SIZE);
    exp_pf = {};
    if (r_valid[h] && r_owner[h] == x) begin
      foreach (r_ftag[h][j]) if (r_fcnt[h][j] >= THRESH) exp_pf.push_back(r_ftag[h][j]);
    end else if (!r_valid[h]) begin
      r_valid[h] = 1; r_owner[h] = x; r_ftag[h] = {}; r_fcnt[h] = {};
    end else n_conflict++;
    foreach (r_hist[i]) begin
      blk_addr_t w = r_hist[i];
      int hw = int'(w % HASH_SIZE);
      bit found = 0;
      if (w == x || !r_valid[hw] || r_owner[hw] != w) continue;
      foreach (r_ftag[hw][j]) if (r_ftag[hw][j] == x) begin
        found = 1; if (r_fcnt[hw][j] < 255) r_fcnt[hw][j]++;
      end
      if (!found) begin
        if (r_ftag[hw].size() < M_SLOTS) begin r_ftag[hw].push_back(x); r_fcnt[hw].push_back(1); end
        else n_fullslots++;
      end
    end
    r_hist.push_front(x);
    if (r_hist.size() > N_CLOSE) void'(r_hist.pop_back());
  endfunction

  // ---------------- stimulus ----------------
  blk_addr_t stream [$];
  blk_addr_t got_pf [$];

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // random pf_ready with stalls; collect issued prefetches
  always @(negedge clk) pf_ready = ($urandom_range(3) != 0);
  always @(posedge clk) if (rst_n && pf_valid) begin
    if (pf_ready) begin got_pf.push_back(pf_addr); n_pf++; end
    else n_waits++;
  end

  task automatic run_miss(input blk_addr_t x, input bit timed);
    blk_addr_t exp_pf [$];
    int cyc;
    @(negedge clk);
    q_valid = 1; q_data = x;
    @(posedge clk); #1;
    q_valid = 0;
    got_pf = {};
    cyc = 1;
    while (!event_done) begin @(posedge clk); #1; cyc++; end
    ref_event(x, exp_pf);
    check(got_pf.size() == exp_pf.size(), "prefetch count");
    foreach (exp_pf[i]) if (i < got_pf.size()) check(got_pf[i] == exp_pf[i], "prefetch address");
    if (timed) check(cyc == 14, $sformatf("event latency %0d, expected 14", cyc));
  endtask

  initial begin
    int cyc;
    blk_addr_t pattern [12];
    q_valid = 0; q_data = '0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    cyc = 0;
    while (!ready) begin @(posedge clk); #1; cyc++; end
    check(cyc == HASH_SIZE + 1, "ready after the table is cleared");
    // q_pop only when valid, and immediately
    @(negedge clk); #1 check(!q_pop, "no pop on empty queue");

    // 1) a repeating pattern: learned, then prefetched
    foreach (pattern[i]) pattern[i] = blk_addr_t'(1000 + 7 * i);
    for (int rep = 0; rep < 6; rep++)
      foreach (pattern[i]) run_miss(pattern[i], 0);
    // 2) timed event: history full of distinct owned tags, no prefetch
    for (int i = 0; i < 6; i++) run_miss(blk_addr_t'(5000 + i), 0);
    run_miss(blk_addr_t'(5006), 1);
    // 3) random tags from a small alphabet: conflicts and full slot tables
    for (int n = 0; n < 3000; n++) run_miss(blk_addr_t'($urandom_range(60)), 0);

    check(n_pf > 50, "prefetches issued");
    check(n_conflict > 0, "hash conflicts exercised");
    check(n_fullslots > 0, "full follower tables exercised");
    check(n_waits > 0, "pf_ready stalls exercised");
    $display("prefetches=%0d conflicts=%0d full_slot_drops=%0d pf_waits=%0d",
             n_pf, n_conflict, n_fullslots, n_waits);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_config_sweep: the complete design under the configuration sweeps of its
// evaluation (hash-table size, miss-queue depth, prefetch threshold), every
// configuration running the same synthetic trace side by side.
//
// The sweep reports, per configuration, the misses of the first pass (nothing
// learned yet) and of the last pass, issued prefetches and queue drops. It
// checks the load data of every configuration and the expected trends: a
// 100-entry table removes fewer misses than the 10000-entry default, a lower
// threshold issues more prefetches, and a shallower queue drops more misses.
// The hash-size and threshold configurations leave the processor 12 idle
// cycles after each access; the queue-depth configurations only 4, so that
// misses arrive faster than the engine processes them and the queue matters.
module tb_config_sweep;
  localparam int NCFG = 8;
  localparam string NAMES [NCFG] = '{"default (hash 10000, queue 10, T 2)", "hash 100",
                                     "hash 1000", "T 1", "T 4", "queue 1, busy", "queue 100, busy",
                                     "queue 10, busy"};
  logic clk = 1'b0, rst_n = 1'b0;
  logic done [NCFG];
  int   errs [NCFG], first [NCFG], last [NCFG], pfs [NCFG], drops [NCFG];
  int   checks = 0, failures = 0;

  sweep_unit                                        u0 (.clk, .rst_n, .done(done[0]), .load_errors(errs[0]), .first_pass_misses(first[0]), .last_pass_misses(last[0]), .prefetches(pfs[0]), .drops(drops[0]));
  sweep_unit #(.HASH_SIZE(100))                     u1 (.clk, .rst_n, .done(done[1]), .load_errors(errs[1]), .first_pass_misses(first[1]), .last_pass_misses(last[1]), .prefetches(pfs[1]), .drops(drops[1]));
  sweep_unit #(.HASH_SIZE(1000))                    u2 (.clk, .rst_n, .done(done[2]), .load_errors(errs[2]), .first_pass_misses(first[2]), .last_pass_misses(last[2]), .prefetches(pfs[2]), .drops(drops[2]));
  sweep_unit #(.THRESH(1))                          u3 (.clk, .rst_n, .done(done[3]), .load_errors(errs[3]), .first_pass_misses(first[3]), .last_pass_misses(last[3]), .prefetches(pfs[3]), .drops(drops[3]));
  sweep_unit #(.THRESH(4))                          u4 (.clk, .rst_n, .done(done[4]), .load_errors(errs[4]), .first_pass_misses(first[4]), .last_pass_misses(last[4]), .prefetches(pfs[4]), .drops(drops[4]));
  sweep_unit #(.QUEUE_DEPTH(1),   .GAP(4))          u5 (.clk, .rst_n, .done(done[5]), .load_errors(errs[5]), .first_pass_misses(first[5]), .last_pass_misses(last[5]), .prefetches(pfs[5]), .drops(drops[5]));
  sweep_unit #(.QUEUE_DEPTH(100), .GAP(4))          u6 (.clk, .rst_n, .done(done[6]), .load_errors(errs[6]), .first_pass_misses(first[6]), .last_pass_misses(last[6]), .prefetches(pfs[6]), .drops(drops[6]));

  sweep_unit #(.QUEUE_DEPTH(10),  .GAP(4))          u7 (.clk, .rst_n, .done(done[7]), .load_errors(errs[7]), .first_pass_misses(first[7]), .last_pass_misses(last[7]), .prefetches(pfs[7]), .drops(drops[7]));

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  function automatic bit all_done();
    foreach (done[i]) if (!done[i]) return 0;
    return 1;
  endfunction

  function automatic int reduction_pct(int i);
    return first[i] == 0 ? 0 : 100 * (first[i] - last[i]) / first[i];
  endfunction

  initial begin
    repeat (1000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    @(posedge clk);
    while (!all_done()) @(posedge clk);
    for (int i = 0; i < NCFG; i++) begin
      $display("%-38s first pass %4d misses, last pass %4d (%3d%% fewer), %5d prefetches, %4d queue drops",
               NAMES[i], first[i], last[i], reduction_pct(i), pfs[i], drops[i]);
      check(errs[i] == 0, {NAMES[i], ": load data"});
    end
    check(reduction_pct(0) >= 30, "default configuration removes at least 30% of misses");
    check(reduction_pct(1) < reduction_pct(0), "100-entry table removes fewer misses than 10000");
    check(pfs[3] > pfs[0] && pfs[0] > pfs[4], "prefetches fall as the threshold rises");
    check(drops[5] > drops[7] && drops[7] > drops[6], "queue drops fall as the queue gets deeper");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_miss_queue: random pushes and pops against a reference queue that
// deletes its oldest entry when a push finds it full. Checks head data, the
// valid flag, the entry count and every drop pulse.
module tb_miss_queue;
  localparam int unsigned DEPTH = 10;
  localparam int unsigned W     = 26;

  logic clk = 1'b0, rst_n = 1'b0;
  logic push, pop, pop_valid, dropped;
  logic [W-1:0] push_data, pop_data;
  logic [$clog2(DEPTH+1)-1:0] count;
  int checks = 0, failures = 0, drops = 0, full_pushpop = 0;
  logic [W-1:0] ref_q [$];

  miss_queue #(.DEPTH(DEPTH), .W(W)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    push = 0; pop = 0; push_data = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int cyc = 0; cyc < 5000; cyc++) begin
      // phases: mostly pushes, mostly pops, balanced
      int pp, qq;
      pp = (cyc / 500) % 3 == 0 ? 80 : ((cyc / 500) % 3 == 1 ? 20 : 50);
      qq = 100 - pp;
      @(negedge clk);
      push      = ($urandom_range(99) < pp);
      pop       = ($urandom_range(99) < qq) && (ref_q.size() != 0) && pop_valid;
      push_data = W'($urandom);
      #1;
      check(pop_valid == (ref_q.size() != 0), "pop_valid");
      check(int'(count) == ref_q.size(), "count");
      if (ref_q.size() != 0) check(pop_data == ref_q[0], "head data");
      check(dropped == (push && !pop && ref_q.size() == DEPTH), "drop pulse");
      if (push && pop && ref_q.size() == DEPTH) full_pushpop++;
      @(posedge clk);
      if (pop) void'(ref_q.pop_front());
      if (push) begin
        if (ref_q.size() == DEPTH) begin void'(ref_q.pop_front()); drops++; end
        ref_q.push_back(push_data);
      end
    end
    check(drops > 0, "queue overflow exercised");
    check(full_pushpop > 0, "push and pop on full queue exercised");
    $display("drops=%0d full push+pop=%0d", drops, full_pushpop);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_miss_hash_table: checks the post-reset clearing sweep (every entry reads
// zero, ready rises after exactly DEPTH cycles) and random reads and writes
// against a reference array, including the one-cycle read latency.
module tb_miss_hash_table;
  localparam int unsigned DEPTH = 37;
  localparam int unsigned W     = 40;
  localparam int unsigned AW    = $clog2(DEPTH);

  logic clk = 1'b0, rst_n = 1'b0;
  logic ready, en, we;
  logic [AW-1:0] addr;
  logic [W-1:0]  wdata, rdata;
  logic [W-1:0]  ref_mem [DEPTH];
  int checks = 0, failures = 0;

  miss_hash_table #(.DEPTH(DEPTH), .W(W)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int cycles;
    en = 0; we = 0; addr = '0; wdata = '0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    cycles = 0;
    while (!ready) begin @(posedge clk); #1; cycles++; end
    check(cycles == DEPTH, "clear sweep takes DEPTH cycles");
    foreach (ref_mem[i]) ref_mem[i] = '0;
    // every entry cleared
    for (int i = 0; i < DEPTH; i++) begin
      @(negedge clk); en = 1; we = 0; addr = AW'(i);
      @(negedge clk); en = 0;
      check(rdata == '0, "entry cleared");
    end
    // random traffic
    for (int n = 0; n < 3000; n++) begin
      @(negedge clk);
      en = 1; we = $urandom_range(1); addr = AW'($urandom_range(DEPTH-1));
      wdata = {$urandom, $urandom};
      if (we) begin
        @(posedge clk); ref_mem[addr] = wdata;
      end else begin
        logic [W-1:0] exp;
        exp = ref_mem[addr];
        @(negedge clk); en = 0;
        check(rdata == exp, "read data");
        // rdata holds while idle
        @(negedge clk);
        check(rdata == exp, "read data held");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

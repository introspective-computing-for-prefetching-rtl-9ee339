// tb_l1_dcache: the L1 data cache with a 6-cycle next-level model.
// A reference model (true LRU per set, word memory initialised like the next
// level) predicts hit or miss for every access; the testbench checks the miss
// report, the load data, the write-through stores, the 1-cycle hit and
// 7-cycle miss latencies, prefetches that are ignored or inserted, a late
// prefetch that shortens a demand miss, a demand miss that waits for a
// prefetch fill, and finally random loads, stores and prefetches together.
module tb_l1_dcache;
  import ip_pkg::*;
  localparam int unsigned SIZE_BYTES = 16384;
  localparam int unsigned WAYS = 4;
  localparam int unsigned SETS = SIZE_BYTES / (WAYS * BLOCK_BYTES);
  localparam int unsigned LAT  = 6;

  logic clk = 1'b0, rst_n = 1'b0;
  logic cpu_req, cpu_we, cpu_ready, cpu_rvalid;
  addr_t cpu_addr; word_t cpu_wdata, cpu_rdata; be_t cpu_be;
  logic miss_valid; blk_addr_t miss_blk;
  logic pf_valid, pf_ready, pf_ignored, pf_issued; blk_addr_t pf_addr;
  logic mem_rd_req, mem_rd_valid, mem_wr_valid; blk_addr_t mem_rd_blk; line_t mem_rd_data;
  addr_t mem_wr_addr; word_t mem_wr_data; be_t mem_wr_be;
  int checks = 0, failures = 0;
  int n_hit = 0, n_miss = 0, n_wt = 0;

  l1_dcache #(.SIZE_BYTES(SIZE_BYTES), .WAYS(WAYS)) dut (.*);
  l2_model #(.LAT(LAT)) l2 (
    .clk, .rst_n, .rd_req(mem_rd_req), .rd_blk(mem_rd_blk), .rd_valid(mem_rd_valid),
    .rd_data(mem_rd_data), .wr_valid(mem_wr_valid), .wr_addr(mem_wr_addr),
    .wr_data(mem_wr_data), .wr_be(mem_wr_be)
  );

  always #5 clk = ~clk;
  always @(posedge clk) if (mem_wr_valid) n_wt++;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  // ---------------- reference ----------------
  word_t     rmem [logic [ADDR_W-3:0]];
  blk_addr_t rset [SETS][$];   // MRU first

  function automatic word_t ref_word(logic [ADDR_W-3:0] wa);
    return rmem.exists(wa) ? rmem[wa] : ((32'(wa) * 32'h9E37_79B1) ^ 32'h5A5A_0F0F);
  endfunction
  function automatic bit ref_present(blk_addr_t b);
    int s = int'(b % SETS);
    foreach (rset[s][i]) if (rset[s][i] == b) return 1;
    return 0;
  endfunction
  function automatic void ref_touch(blk_addr_t b);
    int s = int'(b % SETS);
    foreach (rset[s][i]) if (rset[s][i] == b) begin rset[s].delete(i); break; end
    rset[s].push_front(b);
    if (rset[s].size() > WAYS) void'(rset[s].pop_back());
  endfunction

  initial begin
    repeat (300000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // One demand access; returns latency (accept edge to response) and miss flag.
  task automatic access(input bit we, input addr_t a, input word_t d, input be_t be,
                        output int lat, output bit missed, output word_t rd);
    @(negedge clk);
    cpu_req = 1; cpu_we = we; cpu_addr = a; cpu_wdata = d; cpu_be = be;
    #1;
    while (!cpu_ready) begin @(negedge clk); #1; end
    missed = miss_valid;
    if (missed) check(miss_blk == a[ADDR_W-1:OFFSET_W], "miss block address");
    if (we) check(mem_wr_valid && mem_wr_addr == a && mem_wr_data == d && mem_wr_be == be,
                  "store written through");
    @(posedge clk);
    @(negedge clk);
    cpu_req = 0;
    lat = 1;
    while (!cpu_rvalid) begin @(negedge clk); lat++; end
    rd = cpu_rdata;
  endtask

  // Access with full reference checking (no prefetch traffic in flight).
  task automatic checked_access(input bit we, input addr_t a);
    int lat; bit missed; word_t rd, d, exp; be_t be;
    blk_addr_t b = a[ADDR_W-1:OFFSET_W];
    bit hit = ref_present(b);
    d = $urandom; be = we ? be_t'($urandom_range(1, 15)) : '1;
    exp = ref_word(a[ADDR_W-1:2]);
    access(we, a, d, be, lat, missed, rd);
    check(missed == !hit, "hit/miss matches LRU reference");
    check(lat == (hit ? 1 : 1 + LAT), $sformatf("latency %0d (hit=%0d)", lat, hit));
    if (!we) check(rd == exp, "load data");
    if (we) begin
      for (int i = 0; i < 4; i++) if (be[i]) exp[i*8 +: 8] = d[i*8 +: 8];
      rmem[a[ADDR_W-1:2]] = exp;
    end
    ref_touch(b);
    if (hit) n_hit++; else n_miss++;
  endtask

  function automatic addr_t rnd_addr(int nblocks);
    return {26'($urandom_range(nblocks - 1)), 4'($urandom), 2'b00};
  endfunction

  // prefetch one block with the CPU idle; returns whether it was ignored
  task automatic prefetch(input blk_addr_t b, output bit ignored);
    @(negedge clk);
    pf_valid = 1; pf_addr = b; #1;
    while (!pf_ready) begin @(negedge clk); #1; end
    ignored = pf_ignored;
    check(pf_ignored != pf_issued, "prefetch either ignored or issued");
    @(negedge clk) pf_valid = 0;
  endtask

  initial begin
    int lat; bit missed, ign; word_t rd; blk_addr_t b, c;
    int n_ign = 0, n_ins = 0;
    cpu_req = 0; cpu_we = 0; cpu_addr = '0; cpu_wdata = '0; cpu_be = '0;
    pf_valid = 0; pf_addr = '0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;

    // 1) random loads and stores over twice the cache size
    for (int n = 0; n < 4000; n++) begin
      checked_access($urandom_range(3) == 0, rnd_addr(2 * SETS * WAYS));
      if ($urandom_range(3) == 0) repeat ($urandom_range(3)) @(negedge clk);
    end
    check(n_hit > 500 && n_miss > 500, "both hits and misses");

    // 2) prefetches with the CPU idle: present blocks ignored, absent inserted
    for (int n = 0; n < 300; n++) begin
      b = blk_addr_t'($urandom_range(2 * SETS * WAYS - 1));
      prefetch(b, ign);
      check(ign == ref_present(b), "prefetch ignored exactly when present");
      if (ign) n_ign++; else n_ins++;
      repeat (LAT + 1) @(negedge clk);
      if (!ign) ref_touch(b);
      if ($urandom_range(1)) checked_access($urandom_range(3) == 0, {b, 4'($urandom), 2'b00});
    end
    check(n_ign > 10 && n_ins > 10, "prefetches ignored and inserted");

    // 3) late prefetch: demand for the block 3 cycles after the prefetch left
    b = blk_addr_t'(26'h3000040);
    prefetch(b, ign);             // accepted at the edge before this negedge
    check(!ign, "late prefetch issued");
    @(negedge clk);
    access(0, {b, 6'h08}, '0, '1, lat, missed, rd);
    check(missed, "late-prefetched block reported as miss");
    check(lat < 1 + LAT, $sformatf("late prefetch shortens the miss (%0d)", lat));
    check(rd == ref_word({b, 4'h2}), "late prefetch data");
    ref_touch(b);

    // 4) demand miss for another block waits for the prefetch fill
    b = blk_addr_t'(26'h3000080);
    c = blk_addr_t'(26'h30000C1);
    prefetch(b, ign);
    access(0, {c, 6'h04}, '0, '1, lat, missed, rd);
    check(missed && lat > 1 + LAT, $sformatf("demand miss waits for prefetch fill (%0d)", lat));
    check(rd == ref_word({c, 4'h1}), "data after waiting");
    ref_touch(b); ref_touch(c);
    checked_access(0, {b, 6'h3C});

    // 5) loads, stores and prefetches together: data and latency bounds
    fork
      begin
        for (int n = 0; n < 2000; n++) begin
          addr_t a = rnd_addr(3 * SETS * WAYS);
          word_t d = $urandom, exp;
          bit we = ($urandom_range(3) == 0);
          exp = ref_word(a[ADDR_W-1:2]);
          access(we, a, d, '1, lat, missed, rd);
          if (!we) check(rd == exp, "load data with prefetch traffic");
          else rmem[a[ADDR_W-1:2]] = d;
          check(missed ? (lat <= 2 * (1 + LAT)) : (lat == 1), "latency bound with prefetches");
        end
      end
      begin
        for (int n = 0; n < 600; n++) begin
          prefetch(blk_addr_t'($urandom_range(3 * SETS * WAYS - 1)), ign);
          repeat ($urandom_range(6)) @(negedge clk);
        end
      end
    join
    check(n_wt > 1000, "write-through traffic seen");
    $display("hits=%0d misses=%0d pf_ignored=%0d pf_inserted=%0d", n_hit, n_miss, n_ign, n_ins);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// l1_dcache: the primary processor's L1 data cache, with a miss report port
// feeding the miss queue and a prefetch port driven by the secondary engine.
//
// Organisation: SIZE_BYTES (16 KB) in WAYS (4) ways of 64-byte blocks, so 64
// sets; hit time 1 cycle, and a miss costs MISS_PENALTY (6) more cycles for the
// fill from the next level. These numbers are the evaluated configuration.
// Tags live in flip-flops and are compared in the cycle of the request; the
// data array is WAYS x 16 word-wide RAM banks (one per way and word of the
// block), each with one byte-enabled write port and a registered read, so a
// fill writes a whole block in one cycle and a store writes a single bank.
//
// Demand accesses (cpu_*): one word (32 bits, byte enables) per request. The
// cache accepts a request when cpu_ready is high and answers with cpu_rvalid
// (and cpu_rdata for a load) one cycle later on a hit, or after the block has
// been fetched on a miss: 1 + 6 = 7 cycles when the next level answers in 6.
// Every demand miss pushes its block address onto miss_valid/miss_blk in the
// cycle it is detected. The cache blocks on a miss until it is served.
//
// Prefetches (pf_*): a requested block that is already present is ignored
// (pf_ignored pulses); otherwise the block is fetched and inserted into the
// cache like a demand fill, without a miss report. Prefetched blocks go
// directly into the L1 data cache, and present blocks are ignored, as the
// architecture prescribes. A demand miss has priority over a prefetch for the
// single next-level read port; a demand miss that arrives while a prefetch
// fill is outstanding waits for it and then looks the block up again, so a
// late prefetch of the missing block still shortens the miss.
//
// This design's own choices (nothing is given about them): write-through with
// write allocate, so every store is also sent on the mem_wr_* port, which the
// next level always accepts; LRU replacement with invalid ways used first;
// inserted blocks, prefetched or not, become most recently used; one fill
// outstanding at a time; the CPU is held off (cpu_ready low) in the fill cycle.
//
// Next-level port: mem_rd_req/mem_rd_blk is a one-cycle request that the next
// level answers some cycles later with one mem_rd_valid pulse and the block.
// mem_wr_addr/data/be and miss_blk are the accepted request's own fields,
// passed on in the cycle of acceptance with no register in between.
module l1_dcache
  import ip_pkg::*;
#(
  parameter int unsigned SIZE_BYTES = 16384,
  parameter int unsigned WAYS       = 4
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
  // miss report to the miss queue
  output logic      miss_valid,
  output blk_addr_t miss_blk,
  // prefetch requests from the secondary engine
  input  logic      pf_valid,
  input  blk_addr_t pf_addr,
  output logic      pf_ready,
  output logic      pf_ignored,
  output logic      pf_issued,
  // next level: block reads and write-through words
  output logic      mem_rd_req,
  output blk_addr_t mem_rd_blk,
  input  logic      mem_rd_valid,
  input  line_t     mem_rd_data,
  output logic      mem_wr_valid,
  output addr_t     mem_wr_addr,
  output word_t     mem_wr_data,
  output be_t       mem_wr_be
);

  localparam int unsigned SETS  = SIZE_BYTES / (WAYS * BLOCK_BYTES);
  localparam int unsigned SET_W = $clog2(SETS);
  localparam int unsigned TAG_W = BLK_W - SET_W;
  localparam int unsigned WAY_W = (WAYS > 1) ? $clog2(WAYS) : 1;
  localparam int unsigned WOFF_W = $clog2(WORDS_PER_LINE);

  typedef logic [SET_W-1:0] set_t;
  typedef logic [TAG_W-1:0] tag_t;
  typedef logic [WAY_W-1:0] way_t;

  typedef struct packed {
    logic valid;
    tag_t tag;
  } tag_entry_t;

  typedef struct packed {
    logic                    we;
    addr_t                   addr;
    word_t                   wdata;
    be_t                     be;
  } req_t;

  typedef enum logic [1:0] {S_IDLE, S_MISS_WAIT, S_MISS_FILL} state_t;

  tag_entry_t tags [SETS][WAYS];
  way_t       age  [SETS][WAYS];     // 0 = most recently used

  state_t state;
  req_t   mreq;                       // demand request being missed on
  logic   mem_busy;                   // a fill is outstanding
  logic   fill_demand;                // outstanding fill belongs to mreq
  blk_addr_t fill_blk;

  function automatic set_t set_of(blk_addr_t b);
    return b[SET_W-1:0];
  endfunction
  function automatic tag_t tag_of(blk_addr_t b);
    return b[BLK_W-1:SET_W];
  endfunction

  // ---- tag lookups: CPU request, pending demand miss, prefetch -------------
  logic cpu_hit, m_hit, pf_hit;
  way_t cpu_way, m_way;
  blk_addr_t cpu_blk, m_blk;
  assign cpu_blk = cpu_addr[ADDR_W-1:OFFSET_W];
  assign m_blk   = mreq.addr[ADDR_W-1:OFFSET_W];

  always_comb begin
    cpu_hit = 1'b0; cpu_way = '0;
    m_hit   = 1'b0; m_way   = '0;
    pf_hit  = 1'b0;
    for (int w = 0; w < WAYS; w++) begin
      if (tags[set_of(cpu_blk)][w].valid && tags[set_of(cpu_blk)][w].tag == tag_of(cpu_blk)) begin
        cpu_hit = 1'b1; cpu_way = way_t'(w);
      end
      if (tags[set_of(m_blk)][w].valid && tags[set_of(m_blk)][w].tag == tag_of(m_blk)) begin
        m_hit = 1'b1; m_way = way_t'(w);
      end
      if (tags[set_of(pf_addr)][w].valid && tags[set_of(pf_addr)][w].tag == tag_of(pf_addr))
        pf_hit = 1'b1;
    end
  end

  // ---- victim for the fill: an invalid way, else the least recently used ---
  way_t victim;
  always_comb begin
    victim = '0;
    for (int w = 0; w < WAYS; w++)
      if (age[set_of(fill_blk)][w] == way_t'(WAYS-1)) victim = way_t'(w);
    for (int w = WAYS - 1; w >= 0; w--)
      if (!tags[set_of(fill_blk)][w].valid) begin
        victim = way_t'(w);
      end
  end

  // ---- handshakes ----------------------------------------------------------
  logic cpu_acc, cpu_miss, pf_acc, fill;
  assign fill      = mem_busy && mem_rd_valid;
  assign cpu_ready = (state == S_IDLE) && !fill;
  assign cpu_acc   = cpu_req && cpu_ready;
  assign cpu_miss  = cpu_acc && !cpu_hit;
  // demand misses win the next-level port
  assign pf_ready  = !mem_busy && !(state == S_MISS_WAIT) && !cpu_miss;
  assign pf_acc    = pf_valid && pf_ready;
  assign pf_ignored = pf_acc && pf_hit;
  assign pf_issued  = pf_acc && !pf_hit;

  assign miss_valid = cpu_miss;
  assign miss_blk   = cpu_blk;

  // A pending demand miss whose block turned up (late prefetch) completes here.
  logic m_late_hit;
  assign m_late_hit = (state == S_MISS_WAIT) && !mem_busy && m_hit;

  always_comb begin
    mem_rd_req = 1'b0;
    mem_rd_blk = '0;
    if (cpu_miss && !mem_busy) begin
      mem_rd_req = 1'b1;  mem_rd_blk = cpu_blk;
    end else if (state == S_MISS_WAIT && !mem_busy && !m_hit) begin
      mem_rd_req = 1'b1;  mem_rd_blk = m_blk;
    end else if (pf_issued) begin
      mem_rd_req = 1'b1;  mem_rd_blk = pf_addr;
    end
  end

  // write-through of every accepted store
  assign mem_wr_valid = cpu_acc && cpu_we;
  assign mem_wr_addr  = cpu_addr;
  assign mem_wr_data  = cpu_wdata;
  assign mem_wr_be    = cpu_be;

  function automatic logic [WOFF_W-1:0] woff(addr_t a);
    return a[OFFSET_W-1:2];
  endfunction

  // ---- LRU update ------------------------------------------------------------
  task automatic touch(input set_t s, input way_t w);
    for (int k = 0; k < WAYS; k++)
      if (age[s][k] < age[s][w]) age[s][k] <= age[s][k] + 1'b1;
    age[s][w] <= '0;
  endtask

  // ---- control and tags ------------------------------------------------------
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state       <= S_IDLE;
      mreq        <= '0;
      mem_busy    <= 1'b0;
      fill_demand <= 1'b0;
      fill_blk    <= '0;
      for (int s = 0; s < SETS; s++)
        for (int w = 0; w < WAYS; w++) begin
          tags[s][w] <= '0;
          age[s][w]  <= way_t'(w);
        end
    end else begin
      if (mem_rd_req) begin
        mem_busy    <= 1'b1;
        fill_blk    <= mem_rd_blk;
        fill_demand <= cpu_miss || (state == S_MISS_WAIT);
      end
      if (cpu_acc && cpu_hit) touch(set_of(cpu_blk), cpu_way);
      if (cpu_miss) begin
        mreq  <= '{we: cpu_we, addr: cpu_addr, wdata: cpu_wdata, be: cpu_be};
        state <= mem_busy ? S_MISS_WAIT : S_MISS_FILL;
      end
      if (state == S_MISS_WAIT && !mem_busy) begin
        if (m_hit) begin
          touch(set_of(m_blk), m_way);
          state <= S_IDLE;
        end else begin
          state <= S_MISS_FILL;
        end
      end
      if (fill) begin
        mem_busy <= 1'b0;
        tags[set_of(fill_blk)][victim] <= '{valid: 1'b1, tag: tag_of(fill_blk)};
        touch(set_of(fill_blk), victim);
        if (fill_demand) state <= S_IDLE;
      end
    end
  end

  // ---- data array: one bank per way and word --------------------------------
  // Store path: a store hit, or the store of a pending miss whose block was
  // brought in by a prefetch. A demand fill merges its store into the block.
  logic              st_en;
  way_t              st_way;
  set_t              st_set;
  logic [WOFF_W-1:0] st_off;
  word_t             st_data;
  be_t               st_be;
  set_t              rd_set;          // set read this cycle
  always_comb begin
    st_en   = 1'b0;
    st_way  = cpu_way;
    st_set  = set_of(cpu_blk);
    st_off  = woff(cpu_addr);
    st_data = cpu_wdata;
    st_be   = cpu_be;
    rd_set  = set_of(cpu_blk);
    if (m_late_hit) begin
      st_en   = mreq.we;
      st_way  = m_way;
      st_set  = set_of(m_blk);
      st_off  = woff(mreq.addr);
      st_data = mreq.wdata;
      st_be   = mreq.be;
      rd_set  = set_of(m_blk);
    end else if (cpu_acc && cpu_hit && cpu_we) begin
      st_en   = 1'b1;
    end
  end

  word_t bank_q [WAYS][WORDS_PER_LINE];   // registered bank outputs
  for (genvar w = 0; w < WAYS; w++) begin : g_way
    for (genvar k = 0; k < WORDS_PER_LINE; k++) begin : g_word
      word_t bank [SETS];
      word_t fill_word;
      always_comb begin
        fill_word = mem_rd_data[k*WORD_W +: WORD_W];
        if (fill_demand && mreq.we && woff(mreq.addr) == k)
          for (int b = 0; b < WORD_W/8; b++)
            if (mreq.be[b]) fill_word[b*8 +: 8] = mreq.wdata[b*8 +: 8];
      end
      always_ff @(posedge clk) begin
        if (fill && victim == way_t'(w)) begin
          bank[set_of(fill_blk)] <= fill_word;
        end else if (st_en && st_way == way_t'(w) && st_off == k) begin
          for (int b = 0; b < WORD_W/8; b++)
            if (st_be[b]) bank[st_set][b*8 +: 8] <= st_data[b*8 +: 8];
        end
        bank_q[w][k] <= bank[rd_set];
      end
    end
  end

  // ---- responses -------------------------------------------------------------
  // cpu_rdata comes from the bank outputs (hit, late hit) or from the fill.
  way_t              rsp_way;
  logic [WOFF_W-1:0] rsp_off;
  logic              rsp_fill;
  word_t             rsp_fill_word;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cpu_rvalid    <= 1'b0;
      rsp_way       <= '0;
      rsp_off       <= '0;
      rsp_fill      <= 1'b0;
      rsp_fill_word <= '0;
    end else begin
      cpu_rvalid <= 1'b0;
      if (cpu_acc && cpu_hit) begin
        cpu_rvalid <= 1'b1;
        rsp_fill   <= 1'b0;
        rsp_way    <= cpu_way;
        rsp_off    <= woff(cpu_addr);
      end else if (m_late_hit) begin
        cpu_rvalid <= 1'b1;
        rsp_fill   <= 1'b0;
        rsp_way    <= m_way;
        rsp_off    <= woff(mreq.addr);
      end else if (fill && fill_demand) begin
        cpu_rvalid    <= 1'b1;
        rsp_fill      <= 1'b1;
        rsp_fill_word <= mem_rd_data[int'(woff(mreq.addr)) * WORD_W +: WORD_W];
      end
    end
  end
  assign cpu_rdata = rsp_fill ? rsp_fill_word : bank_q[rsp_way][rsp_off];

  a_one_fill: assert property (@(posedge clk) disable iff (!rst_n) mem_rd_req |-> !mem_busy)
    else $error("l1_dcache: second fill issued while one is outstanding");
  a_fill_expected: assert property (@(posedge clk) disable iff (!rst_n) mem_rd_valid |-> mem_busy)
    else $error("l1_dcache: fill data without a request");

endmodule

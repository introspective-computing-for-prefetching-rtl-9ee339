// secondary_prefetcher: the secondary processor of the introspective
// architecture, built as a fixed-function engine that runs the correlation
// prefetching algorithm.
//
// The engine sees nothing of the primary processor except the block addresses
// of its L1 data-cache misses, which it pops one at a time from the miss
// queue. For every miss tag x it owns (at most) one hash-table entry, indexed
// by x mod HASH_SIZE, holding x and M_SLOTS follower slots (tag y, count). A
// count says how often a miss at y came "closely" after a miss at x, i.e.
// within the next N_CLOSE observed misses.
//
// Per popped miss x the engine, in this order:
//   1. LOOK   reads x's entry. If the entry is free it is claimed for x; if it
//             belongs to another tag, x gets no entry (conflicting data is
//             thrown away).
//   2. PF     issues one prefetch for every follower y of x whose count has
//             reached THRESH, one per accepted pf_valid/pf_ready handshake.
//   3. UPD    for each of the last N_CLOSE misses w (newest first) whose entry
//             it owns, counts x as a close follower of w: an existing slot for
//             x is incremented (saturating), otherwise x takes a free slot
//             with count 1; with no free slot the event is thrown away.
//   4.        x is shifted into the history of the last N_CLOSE misses.
// Prefetching before updating follows the algorithm's own ordering, which gets
// prefetches out earlier. The defaults N_CLOSE = M_SLOTS = 5, THRESH = 2,
// HASH_SIZE = 10000 and the keep-old-data conflict policy for both the hash
// entries and the follower slots are the evaluated configuration.
//
// This design's own choices: a miss is not recorded as its own follower; the
// count width CNT_W; the hash function (block address modulo HASH_SIZE); and
// the timing. An event takes 1 cycle to pop, 1 to look up, 1 per prefetch
// (plus any wait for pf_ready) and 1 to leave PF, then 2 cycles per history
// entry updated and 1 to finish: 14 cycles from one pop to the next for an
// event with no prefetch and a full history, well inside the budget of about
// 100 cycles per miss that a software secondary processor has.
//
// Interfaces:
//   q_valid/q_data/q_pop : miss queue head; q_pop pops in the same cycle.
//   pf_valid/pf_addr/pf_ready : prefetch requests to the L1 data cache;
//                          pf_addr is held stable until pf_ready.
//   ready                : the hash table is initialised (HASH_SIZE cycles
//                          after reset); no miss is popped before.
//   event_done           : pulses when the processing of one miss ends.
module secondary_prefetcher
  import ip_pkg::*;
#(
  parameter int unsigned HASH_SIZE = 10000,
  parameter int unsigned N_CLOSE   = 5,
  parameter int unsigned M_SLOTS   = 5,
  parameter int unsigned THRESH    = 2,
  parameter int unsigned CNT_W     = 8
) (
  input  logic      clk,
  input  logic      rst_n,
  // miss queue
  input  logic      q_valid,
  input  blk_addr_t q_data,
  output logic      q_pop,
  // prefetch requests
  output logic      pf_valid,
  output blk_addr_t pf_addr,
  input  logic      pf_ready,
  // status
  output logic      ready,
  output logic      event_done
);

  localparam int unsigned IDX_W = $clog2(HASH_SIZE);
  localparam int unsigned HW    = (N_CLOSE > 1) ? $clog2(N_CLOSE + 1) : 1;
  typedef logic [IDX_W-1:0] idx_t;
  typedef logic [CNT_W-1:0] cnt_t;
  typedef logic [HW-1:0]    hidx_t;

  typedef struct packed {
    blk_addr_t tag;
    cnt_t      count;   // 0: slot free
  } slot_t;

  typedef struct packed {
    logic                    valid;
    blk_addr_t               tag;
    slot_t [M_SLOTS-1:0]     slots;
  } entry_t;

  localparam int unsigned ENTRY_W = $bits(entry_t);
  localparam cnt_t        CNT_MAX = '1;

  typedef enum logic [2:0] {S_INIT, S_IDLE, S_LOOK, S_PF, S_UPD_RD, S_UPD_WR} state_t;

  state_t                    state;
  blk_addr_t                 x_q;                 // miss being processed
  slot_t [M_SLOTS-1:0]       fol_q;               // x's followers at lookup
  logic  [M_SLOTS-1:0]       pf_mask;             // followers still to prefetch
  blk_addr_t                 hist [N_CLOSE];      // hist[0] is the newest miss
  logic  [N_CLOSE-1:0]       hist_v;
  hidx_t                     hi;                  // history entry being updated

  // hash table port
  logic                 ht_ready, ht_en, ht_we;
  idx_t                 ht_addr;
  logic [ENTRY_W-1:0]   ht_wdata, ht_rdata;
  entry_t               rd_e, wr_e;

  assign rd_e     = entry_t'(ht_rdata);
  assign ht_wdata = ENTRY_W'(wr_e);

  miss_hash_table #(.DEPTH(HASH_SIZE), .W(ENTRY_W)) u_table (
    .clk, .rst_n, .ready(ht_ready),
    .en(ht_en), .we(ht_we), .addr(ht_addr), .wdata(ht_wdata), .rdata(ht_rdata)
  );

  function automatic idx_t hash_idx(blk_addr_t a);
    return idx_t'(a % BLK_W'(HASH_SIZE));
  endfunction

  // First follower still to prefetch.
  logic [$clog2(M_SLOTS+1)-1:0] pf_sel;
  always_comb begin
    pf_sel = '0;
    for (int j = M_SLOTS - 1; j >= 0; j--)
      if (pf_mask[j]) pf_sel = ($clog2(M_SLOTS+1))'(j);
  end

  assign pf_valid = (state == S_PF) && (pf_mask != '0);
  assign pf_addr  = fol_q[pf_sel].tag;
  assign ready    = (state != S_INIT);
  assign q_pop    = (state == S_IDLE) && q_valid;

  // Updated entry for history miss hist[hi] with follower x_q.
  function automatic entry_t add_follower(entry_t e, blk_addr_t y);
    entry_t r;
    logic   found, placed;
    r      = e;
    found  = 1'b0;
    placed = 1'b0;
    for (int j = 0; j < M_SLOTS; j++) begin
      if (!found && e.slots[j].count != '0 && e.slots[j].tag == y) begin
        found = 1'b1;
        if (e.slots[j].count != CNT_MAX) r.slots[j].count = e.slots[j].count + 1'b1;
      end
    end
    if (!found) begin
      for (int j = 0; j < M_SLOTS; j++) begin
        if (!placed && e.slots[j].count == '0) begin
          placed           = 1'b1;
          r.slots[j].tag   = y;
          r.slots[j].count = cnt_t'(1);
        end
      end
    end
    return r;
  endfunction

  logic upd_skip;   // history slot hi holds nothing to update
  assign upd_skip = !hist_v[hi] || (hist[hi] == x_q);

  // Hash-table access, driven by state.
  always_comb begin
    ht_en   = 1'b0;
    ht_we   = 1'b0;
    ht_addr = '0;
    wr_e    = '0;
    unique case (state)
      S_IDLE: begin
        ht_en   = q_valid;
        ht_addr = hash_idx(q_data);
      end
      S_LOOK: begin
        // claim a free entry for x
        ht_en     = !rd_e.valid;
        ht_we     = 1'b1;
        ht_addr   = hash_idx(x_q);
        wr_e      = '0;
        wr_e.valid = 1'b1;
        wr_e.tag   = x_q;
      end
      S_UPD_RD: begin
        ht_en   = (hi < hidx_t'(N_CLOSE)) && !upd_skip;
        ht_addr = hash_idx(hist[hi]);
      end
      S_UPD_WR: begin
        ht_en   = rd_e.valid && rd_e.tag == hist[hi];
        ht_we   = 1'b1;
        ht_addr = hash_idx(hist[hi]);
        wr_e    = add_follower(rd_e, x_q);
      end
      default: ;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state      <= S_INIT;
      x_q        <= '0;
      fol_q      <= '0;
      pf_mask    <= '0;
      hist_v     <= '0;
      hi         <= '0;
      event_done <= 1'b0;
      for (int i = 0; i < N_CLOSE; i++) hist[i] <= '0;
    end else begin
      event_done <= 1'b0;
      unique case (state)
        S_INIT: if (ht_ready) state <= S_IDLE;
        S_IDLE: if (q_valid) begin
          x_q   <= q_data;
          state <= S_LOOK;
        end
        S_LOOK: begin
          fol_q <= rd_e.slots;
          for (int j = 0; j < M_SLOTS; j++)
            pf_mask[j] <= rd_e.valid && rd_e.tag == x_q &&
                          rd_e.slots[j].count >= cnt_t'(THRESH) && rd_e.slots[j].count != '0;
          state <= S_PF;
        end
        S_PF: begin
          if (pf_mask == '0) begin
            hi    <= '0;
            state <= S_UPD_RD;
          end else if (pf_ready) begin
            pf_mask[pf_sel] <= 1'b0;
          end
        end
        S_UPD_RD: begin
          if (hi == hidx_t'(N_CLOSE)) begin
            hist[0] <= x_q;
            for (int i = 1; i < N_CLOSE; i++) hist[i] <= hist[i-1];
            hist_v[0]  <= 1'b1;
            for (int i = 1; i < N_CLOSE; i++) hist_v[i] <= hist_v[i-1];
            event_done <= 1'b1;
            state      <= S_IDLE;
          end else if (upd_skip) begin
            hi <= hi + 1'b1;
          end else begin
            state <= S_UPD_WR;
          end
        end
        S_UPD_WR: begin
          hi    <= hi + 1'b1;
          state <= S_UPD_RD;
        end
        default: state <= S_INIT;
      endcase
    end
  end

  a_pf_stable: assert property (@(posedge clk) disable iff (!rst_n)
                                pf_valid && !pf_ready |=> pf_valid && $stable(pf_addr))
    else $error("secondary_prefetcher: prefetch request changed before acceptance");

endmodule

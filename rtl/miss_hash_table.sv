// miss_hash_table: storage for the prefetch engine's miss statistics.
//
// DEPTH entries (default 10000, the hash size the design was evaluated with)
// of W bits each. The prefetch engine decides what an entry holds (the miss tag
// that owns it and that tag's table of closely following misses); this module
// is a single-port synchronous RAM plus an initialisation sweep.
//
// After reset the module writes zero into every entry, one per cycle, so that
// all entries start empty; `ready` rises when the sweep is done (DEPTH cycles)
// and requests are ignored until then. The sweep and the one-port, one-cycle
// read organisation are this design's choices: the statistics table's size is
// all that is given for it.
//
// Interface and timing:
//   en/we/addr/wdata : one access per cycle; a write lands at the clock edge.
//   rdata            : for a read (en && !we) issued in cycle t, valid in t+1
//                      and held until the next read.
module miss_hash_table #(
  parameter int unsigned DEPTH = 10000,
  parameter int unsigned W     = 197
) (
  input  logic                     clk,
  input  logic                     rst_n,
  output logic                     ready,
  input  logic                     en,
  input  logic                     we,
  input  logic [$clog2(DEPTH)-1:0] addr,
  input  logic [W-1:0]             wdata,
  output logic [W-1:0]             rdata
);

  localparam int unsigned AW = $clog2(DEPTH);
  typedef logic [AW-1:0] idx_t;

  logic [W-1:0] mem [DEPTH];
  idx_t         clr_idx;
  logic         clearing;

  assign ready = !clearing;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      clearing <= 1'b1;
      clr_idx  <= '0;
    end else if (clearing) begin
      if (clr_idx == idx_t'(DEPTH-1)) clearing <= 1'b0;
      clr_idx <= clr_idx + 1'b1;
    end
  end

  always_ff @(posedge clk) begin
    if (clearing) begin
      mem[clr_idx] <= '0;
    end else if (en) begin
      if (we) mem[addr] <= wdata;
      else    rdata     <= mem[addr];
    end
  end

  a_addr_in_range: assert property (@(posedge clk) (en && ready) |-> (addr < AW'(DEPTH)))
    else $error("miss_hash_table: address out of range");

endmodule

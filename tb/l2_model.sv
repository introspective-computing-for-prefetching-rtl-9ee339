// l2_model: behavioural model of the next memory level behind the L1 data
// cache (not synthesizable in intent; testbench only).
//
// A block read requested with rd_req in cycle t is answered with one rd_valid
// pulse and the block's 64 bytes in cycle t + LAT (default 6, the L1 miss
// penalty). One read is outstanding at a time. Word writes (wr_valid) are
// applied at once, byte by byte. A word that was never written reads as
// init_word(word address), a fixed scramble that testbenches reproduce.
module l2_model
  import ip_pkg::*;
#(
  parameter int unsigned LAT = 6
) (
  input  logic      clk,
  input  logic      rst_n,
  input  logic      rd_req,
  input  blk_addr_t rd_blk,
  output logic      rd_valid,
  output line_t     rd_data,
  input  logic      wr_valid,
  input  addr_t     wr_addr,
  input  word_t     wr_data,
  input  be_t       wr_be
);

  word_t     mem [logic [ADDR_W-3:0]];
  int        remaining;
  blk_addr_t pend_blk;

  function automatic word_t init_word(logic [ADDR_W-3:0] wa);
    return (32'(wa) * 32'h9E37_79B1) ^ 32'h5A5A_0F0F;
  endfunction

  function automatic word_t read_word(logic [ADDR_W-3:0] wa);
    return mem.exists(wa) ? mem[wa] : init_word(wa);
  endfunction

  always @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      remaining <= 0;
      rd_valid  <= 1'b0;
      rd_data   <= '0;
    end else begin
      word_t w;
      rd_valid <= 1'b0;
      if (wr_valid) begin
        w = read_word(wr_addr[ADDR_W-1:2]);
        for (int b = 0; b < 4; b++) if (wr_be[b]) w[b*8 +: 8] = wr_data[b*8 +: 8];
        mem[wr_addr[ADDR_W-1:2]] = w;
      end
      if (rd_req) begin
        if (remaining != 0) $error("l2_model: read issued while one is outstanding");
        pend_blk  <= rd_blk;
        remaining <= LAT - 1;
        if (LAT == 1) begin
          rd_valid <= 1'b1;
          for (int i = 0; i < WORDS_PER_LINE; i++)
            rd_data[i*WORD_W +: WORD_W] <= read_word({rd_blk, 4'(i)});
        end
      end else if (remaining != 0) begin
        remaining <= remaining - 1;
        if (remaining == 1) begin
          rd_valid <= 1'b1;
          for (int i = 0; i < WORDS_PER_LINE; i++)
            rd_data[i*WORD_W +: WORD_W] <= read_word({pend_blk, 4'(i)});
        end
      end
    end
  end

endmodule

// Address sequencer of the 2-D DWT processor.
//
// It walks the levels of the decomposition one after the other. At level 0
// it accepts 2x2 pixel blocks from outside (in_valid/in_ready) in raster
// order; at later levels it reads the LL subband of the previous level from
// the RAM, four words (one 2x2 block) per clock, and selects the RAM side of
// the multiplexer (src_ram). For every block issued it gives the border
// flags (first block row / column), the line length of the level (N/2^(k+1)
// blocks) and the RAM read address. A second set of counters follows the
// transform module's output and gives the position of each coefficient
// block and, below the last level, the RAM bank and address where its LL
// coefficient is stored.
//
// RAM layout: word (r,c) of a stored LL subband goes to bank
// {r[0],c[0]} at address (r>>1)*S + (c>>1) with S = N/4. A new LL is written
// over the one being read; its address never exceeds the read pointer, so
// no word is overwritten before it is read.
//
// Timing: after the last block of a level the sequencer waits (DRAIN) until
// that block's coefficients leave the transform module, then pulses restart
// and starts the next level; this costs two cycles per level. After the last
// level it returns to level 0 for the next image. The level order follows
// the original architecture; the drain, the raster order and the in-place
// RAM layout are this design's choices.
module dwt_seq #(
  parameter int unsigned N      = 64,
  parameter int unsigned LEVELS = 3,
  localparam int unsigned S     = N / 4,
  localparam int unsigned DEPTH = S * S,
  localparam int unsigned AW    = (DEPTH > 1) ? $clog2(DEPTH) : 1,
  localparam int unsigned BW    = $clog2(N / 2),
  localparam int unsigned LW    = $clog2(N / 2 + 1),
  localparam int unsigned VW    = (LEVELS > 1) ? $clog2(LEVELS) : 1
) (
  input  logic          clk,
  input  logic          rst_n,
  // pixel side
  input  logic          in_valid,
  output logic          in_ready,
  // to the transform module and the multiplexer
  output logic          issue,
  output logic          src_ram,
  output logic          first_row,
  output logic          first_col,
  output logic [LW-1:0] line_len,
  output logic          restart,
  output logic [AW-1:0] raddr,
  // from the transform module's output
  input  logic          tr_out_valid,
  output logic [VW-1:0] out_level,
  output logic [BW-1:0] out_row,
  output logic [BW-1:0] out_col,
  output logic          out_last_level,
  output logic          wr_en,
  output logic [1:0]    wr_bank,
  output logic [AW-1:0] waddr
);

  typedef enum logic {RUN, DRAIN} state_t;

  state_t        state;
  logic [VW-1:0] level;
  logic [BW-1:0] br, bc;     // issue side block position
  logic [BW-1:0] obr, obc;   // output side block position
  logic [LW-1:0] bpr;        // blocks per row at this level
  logic          row_end, col_end, last_issue, out_row_end, out_last;

  assign bpr        = LW'(N / 2) >> level;
  assign line_len   = bpr;
  assign in_ready   = (state == RUN) && (level == '0);
  assign src_ram    = (level != '0);
  assign issue      = (state == RUN) && ((level == '0) ? in_valid : 1'b1);
  assign first_row  = (br == '0);
  assign first_col  = (bc == '0);
  assign raddr      = AW'(br) * AW'(S) + AW'(bc);
  assign col_end    = (LW'(bc) == bpr - 1'b1);
  assign row_end    = (LW'(br) == bpr - 1'b1);
  assign last_issue = issue && col_end && row_end;

  assign out_row_end    = (LW'(obc) == bpr - 1'b1);
  assign out_last       = tr_out_valid && out_row_end && (LW'(obr) == bpr - 1'b1);
  assign out_level      = level;
  assign out_row        = obr;
  assign out_col        = obc;
  assign out_last_level = (level == VW'(LEVELS - 1));
  assign wr_en          = tr_out_valid && !out_last_level;
  assign wr_bank        = {obr[0], obc[0]};
  assign waddr          = AW'(obr >> 1) * AW'(S) + AW'(obc >> 1);
  assign restart        = (state == DRAIN) && out_last;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state <= RUN;
      level <= '0;
      br    <= '0;
      bc    <= '0;
      obr   <= '0;
      obc   <= '0;
    end else begin
      if (issue) begin
        if (col_end) begin
          bc <= '0;
          br <= row_end ? '0 : br + 1'b1;
        end else begin
          bc <= bc + 1'b1;
        end
      end
      if (tr_out_valid) begin
        if (out_row_end) begin
          obc <= '0;
          obr <= out_last ? '0 : obr + 1'b1;
        end else begin
          obc <= obc + 1'b1;
        end
      end
      if (last_issue) state <= DRAIN;
      if (restart) begin
        state <= RUN;
        level <= (level == VW'(LEVELS - 1)) ? '0 : level + 1'b1;
      end
    end
  end

  initial begin
    assert (N >= 8 && (N & (N - 1)) == 0) else $error("dwt_seq: N must be a power of two >= 8");
    assert (LEVELS >= 1 && (N >> LEVELS) >= 1) else $error("dwt_seq: too many levels for N");
  end

  // no block may be issued while the pipeline drains
  always @(posedge clk) if (rst_n) assert (!(issue && state == DRAIN));

endmodule

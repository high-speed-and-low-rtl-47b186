// Sequencer of the 2-D IDWT processor.
//
// Levels run from the coarsest (LEVELS-1) to the finest (0). Every clock
// with in_valid high one set of detail coefficients (LH, HL, HH) of the
// current level is accepted in raster order. At the coarsest level the LL
// coefficient comes from the input too (ll_src = LL_EXT); at finer levels
// it is the LL reconstructed by the previous level and comes from the RAM
// (LL_RAM), or is zero (LL_ZERO) for the last two rows and columns, which
// the causal filters never produce.
//
// The inverse transform module delivers block (r,c) as samples
// (2r-2..2r-1, 2c-2..2c-1). Below level 0 such a block is written to all
// four RAM banks as block (r-1,c-1) of the next LL, so that it lines up
// with that level's detail subbands; blocks with r = 0 or c = 0 lie before
// the image and are dropped. LL word (r,c) is held in bank {r[0],c[0]} at
// address (OFF + (r>>1))*S + (c>>1), S = N/4, with OFF = S/2 for an LL that
// is read at an odd level and 0 otherwise; this keeps the LL being read
// apart from the LL being written. At level 0 the blocks leave on
// out_valid.
//
// Timing: as in dwt_seq, two drain cycles at the end of each level. The
// order of levels follows the original architecture; the placement, the
// alignment and the zero fill are this design's choices.
module idwt_seq #(
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
  input  logic          in_valid,
  output logic          in_ready,
  // to the transform module and the LL multiplexer
  output logic          issue,
  output logic [1:0]    ll_src,
  output logic          first_row,
  output logic          first_col,
  output logic [LW-1:0] line_len,
  output logic          restart,
  output logic [1:0]    rbank,
  output logic [AW-1:0] raddr,
  output logic [VW-1:0] level,
  // from the transform module's output
  input  logic          tr_out_valid,
  output logic          out_valid,
  output logic [BW-1:0] out_row,
  output logic [BW-1:0] out_col,
  output logic          wr_en,
  output logic [AW-1:0] waddr
);

  localparam logic [1:0] LL_EXT = 2'd0, LL_RAM = 2'd1, LL_ZERO = 2'd2;

  typedef enum logic {RUN, DRAIN} state_t;

  state_t        state;
  logic [BW-1:0] br, bc, obr, obc;
  logic [LW-1:0] bpr, half;
  logic [AW-1:0] roff, woff;
  logic          row_end, col_end, last_issue, out_row_end, out_last;

  assign bpr       = LW'(N / 2) >> level;
  assign half      = bpr >> 1;
  assign line_len  = bpr;
  assign in_ready  = (state == RUN);
  assign issue     = in_ready && in_valid;
  assign first_row = (br == '0);
  assign first_col = (bc == '0);
  assign col_end   = (LW'(bc) == bpr - 1'b1);
  assign row_end   = (LW'(br) == bpr - 1'b1);
  assign last_issue = issue && col_end && row_end;

  // read side: LL of the current level
  assign roff  = level[0] ? AW'(S / 2) : '0;
  assign rbank = {br[0], bc[0]};
  assign raddr = (roff + AW'(br >> 1)) * AW'(S) + AW'(bc >> 1);
  always_comb begin
    if (level == VW'(LEVELS - 1))                                  ll_src = LL_EXT;
    else if (LW'(br >> 1) == half - 1'b1 || LW'(bc >> 1) == half - 1'b1) ll_src = LL_ZERO;
    else                                                           ll_src = LL_RAM;
  end

  // output side: LL of the next finer level, or the image
  assign out_row_end = (LW'(obc) == bpr - 1'b1);
  assign out_last    = tr_out_valid && out_row_end && (LW'(obr) == bpr - 1'b1);
  assign out_valid   = tr_out_valid && (level == '0);
  assign out_row     = obr;
  assign out_col     = obc;
  assign woff        = level[0] ? '0 : AW'(S / 2);   // offset of LL(level-1)
  assign wr_en       = tr_out_valid && (level != '0) && (obr != '0) && (obc != '0);
  assign waddr       = (woff + AW'(obr - 1'b1)) * AW'(S) + AW'(obc - 1'b1);
  assign restart     = (state == DRAIN) && out_last;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state <= RUN;
      level <= VW'(LEVELS - 1);
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
        level <= (level == '0) ? VW'(LEVELS - 1) : level - 1'b1;
      end
    end
  end

  initial begin
    assert (N >= 8 && (N & (N - 1)) == 0) else $error("idwt_seq: N must be a power of two >= 8");
    assert (LEVELS >= 1 && (N >> LEVELS) >= 1) else $error("idwt_seq: too many levels for N");
  end

  always @(posedge clk) if (rst_n) assert (!(issue && state == DRAIN));

endmodule

// 2-D IDWT processor: reconstructs an N x N image from LEVELS levels of
// 4-tap wavelet subbands with a single inverse transform module.
//
// Input: one set of coefficients (LL, LH, HL, HH) per clock on
// in_valid/in_ready, coarsest level first and raster order within a level,
// (N/2^(k+1))^2 sets at level k. in_ll is used only at the coarsest level;
// below it the LL input of the inverse transform module comes, through a
// multiplexer, from the RAM module where the previous level left its
// output. Each input set yields one 2x2 block: at levels above 0 it is
// stored in the RAM (N/2 x N/2 words in four banks), at level 0 it is the
// image and leaves on out_valid. Processing time equals the forward
// processor's: (1 - 4^-LEVELS) * N^2 / 3 cycles plus two per level.
//
// Output block (out_row, out_col) = (r, c) holds image samples
// (2r-2..2r-1, 2c-2..2c-1): the causal filters delay the picture by one
// block in each direction, so block row and column 0 lie before the image
// and the last two rows and columns of the image are not produced. With
// zero padding at the borders (see dwt_transform) the samples away from the
// bottom and right edges are reconstructed up to coefficient rounding. Data
// words are DW-bit with FRAC fractional bits. Module structure follows the
// original architecture; alignment, handshake and format are this design's.
module idwt2d
  import dwt_pkg::*;
#(
  parameter int unsigned N      = 64,
  parameter int unsigned LEVELS = 3,
  localparam int unsigned BW    = $clog2(N / 2),
  localparam int unsigned VW    = (LEVELS > 1) ? $clog2(LEVELS) : 1
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 in_valid,
  output logic                 in_ready,
  input  logic signed [DW-1:0] in_ll,
  input  logic signed [DW-1:0] in_lh,
  input  logic signed [DW-1:0] in_hl,
  input  logic signed [DW-1:0] in_hh,
  output logic [VW-1:0]        level,
  output logic                 out_valid,
  output logic [BW-1:0]        out_row,
  output logic [BW-1:0]        out_col,
  output logic signed [DW-1:0] out_x00,
  output logic signed [DW-1:0] out_x01,
  output logic signed [DW-1:0] out_x10,
  output logic signed [DW-1:0] out_x11
);

  localparam int unsigned S     = N / 4;
  localparam int unsigned DEPTH = S * S;
  localparam int unsigned AW    = (DEPTH > 1) ? $clog2(DEPTH) : 1;
  localparam int unsigned LW    = $clog2(N / 2 + 1);

  logic          issue, first_row, first_col, restart, wr_en, tr_valid;
  logic [1:0]    ll_src, rbank;
  logic [LW-1:0] line_len;
  logic [AW-1:0] raddr, waddr;

  idwt_seq #(.N(N), .LEVELS(LEVELS)) u_seq (
    .clk, .rst_n, .in_valid, .in_ready, .issue, .ll_src, .first_row,
    .first_col, .line_len, .restart, .rbank, .raddr, .level,
    .tr_out_valid(tr_valid), .out_valid, .out_row, .out_col, .wr_en, .waddr);

  logic signed [DW-1:0] x00, x01, x10, x11;

  // RAM module: a reconstructed block is written to all four banks at once
  logic [AW-1:0]        ram_waddr [4];
  logic [AW-1:0]        ram_raddr [4];
  logic signed [DW-1:0] ram_wdata [4];
  logic signed [DW-1:0] ram_rdata [4];

  always_comb begin
    for (int b = 0; b < 4; b++) begin
      ram_waddr[b] = waddr;
      ram_raddr[b] = raddr;
    end
    ram_wdata[0] = x00;
    ram_wdata[1] = x01;
    ram_wdata[2] = x10;
    ram_wdata[3] = x11;
  end

  bank_ram #(.W(DW), .DEPTH(DEPTH)) u_ram (
    .clk, .we({4{wr_en}}), .waddr(ram_waddr), .wdata(ram_wdata),
    .raddr(ram_raddr), .rdata(ram_rdata));

  // LL multiplexer
  logic signed [DW-1:0] ll_mux;
  always_comb begin
    unique case (ll_src)
      2'd0:    ll_mux = in_ll;
      2'd1:    ll_mux = ram_rdata[rbank];
      default: ll_mux = '0;
    endcase
  end

  idwt_transform #(.W(DW), .MAXLINE(N / 2)) u_tm (
    .clk, .rst_n, .restart, .in_valid(issue), .in_first_col(first_col),
    .in_first_row(first_row), .line_len, .ll(ll_mux), .lh(in_lh),
    .hl(in_hl), .hh(in_hh), .out_valid(tr_valid), .x00, .x01, .x10, .x11);

  assign out_x00 = x00;
  assign out_x01 = x01;
  assign out_x10 = x10;
  assign out_x11 = x11;

endmodule

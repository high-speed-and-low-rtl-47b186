// 2-D DWT processor: LEVELS-level 4-tap wavelet decomposition of an N x N
// image with a single transform module.
//
// Level 0 takes the image as 2x2 pixel blocks in raster order, one block per
// clock (in_valid/in_ready; in_ready is low while later levels run). Each
// block yields one coefficient of each subband LL, LH, HL, HH of that level.
// The LL coefficients of every level but the last are written to the RAM
// module (N/2 x N/2 words in four banks); the next level reads them back as
// 2x2 blocks through the input multiplexer and runs through the same
// transform module with a line length halved. The transform module is busy
// on every issue cycle: level k takes (N/2^(k+1))^2 cycles, in all
// (1 - 4^-LEVELS) * N^2 / 3 cycles, plus two drain cycles per level.
//
// Output: every coefficient block leaves on out_valid with its level (0 =
// finest), its position (out_row, out_col) within the subbands of that level
// and out_ll_final set at the last level, where LL is the residual image.
// The output has no back-pressure. Pixels are unsigned PW-bit values; they
// enter the datapath as DW-bit words with FRAC fractional bits. The
// coefficients come out in the same format. Transform module, RAM and
// multiplexer follow the original architecture; the data format and the
// handshake are this design's choices.
module dwt2d
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
  input  logic [PW-1:0]        p00,
  input  logic [PW-1:0]        p01,
  input  logic [PW-1:0]        p10,
  input  logic [PW-1:0]        p11,
  output logic                 out_valid,
  output logic [VW-1:0]        out_level,
  output logic [BW-1:0]        out_row,
  output logic [BW-1:0]        out_col,
  output logic                 out_ll_final,
  output logic signed [DW-1:0] out_ll,
  output logic signed [DW-1:0] out_lh,
  output logic signed [DW-1:0] out_hl,
  output logic signed [DW-1:0] out_hh
);

  localparam int unsigned S     = N / 4;
  localparam int unsigned DEPTH = S * S;
  localparam int unsigned AW    = (DEPTH > 1) ? $clog2(DEPTH) : 1;
  localparam int unsigned LW    = $clog2(N / 2 + 1);

  logic          issue, src_ram, first_row, first_col, restart, wr_en, tr_valid;
  logic [LW-1:0] line_len;
  logic [AW-1:0] raddr, waddr;
  logic [1:0]    wr_bank;

  dwt_seq #(.N(N), .LEVELS(LEVELS)) u_seq (
    .clk, .rst_n, .in_valid, .in_ready,
    .issue, .src_ram, .first_row, .first_col, .line_len, .restart, .raddr,
    .tr_out_valid(tr_valid), .out_level, .out_row, .out_col,
    .out_last_level(out_ll_final), .wr_en, .wr_bank, .waddr);

  // RAM module
  logic [3:0]          ram_we;
  logic [AW-1:0]       ram_waddr [4];
  logic [AW-1:0]       ram_raddr [4];
  logic signed [DW-1:0] ram_wdata [4];
  logic signed [DW-1:0] ram_rdata [4];

  always_comb begin
    for (int b = 0; b < 4; b++) begin
      ram_we[b]    = wr_en && (wr_bank == 2'(b));
      ram_waddr[b] = waddr;
      ram_raddr[b] = raddr;
      ram_wdata[b] = out_ll;
    end
  end

  bank_ram #(.W(DW), .DEPTH(DEPTH)) u_ram (
    .clk, .we(ram_we), .waddr(ram_waddr), .wdata(ram_wdata),
    .raddr(ram_raddr), .rdata(ram_rdata));

  // input multiplexer: pixels at level 0, stored LL afterwards
  function automatic logic signed [DW-1:0] pix2word(input logic [PW-1:0] p);
    return signed'(DW'(p) << FRAC);
  endfunction

  logic signed [DW-1:0] x00, x01, x10, x11;
  assign x00 = src_ram ? ram_rdata[0] : pix2word(p00);
  assign x01 = src_ram ? ram_rdata[1] : pix2word(p01);
  assign x10 = src_ram ? ram_rdata[2] : pix2word(p10);
  assign x11 = src_ram ? ram_rdata[3] : pix2word(p11);

  dwt_transform #(.W(DW), .MAXLINE(N / 2)) u_tm (
    .clk, .rst_n, .restart, .in_valid(issue), .in_first_col(first_col),
    .in_first_row(first_row), .line_len, .x00, .x01, .x10, .x11,
    .out_valid(tr_valid), .ll(out_ll), .lh(out_lh), .hl(out_hl), .hh(out_hh));

  assign out_valid = tr_valid;

endmodule

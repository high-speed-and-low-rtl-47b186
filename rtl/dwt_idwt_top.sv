// Top level: the forward (2-D DWT) and inverse (2-D IDWT) wavelet
// processors side by side, each with its own ports and a shared clock and
// reset.
//
// The two processors are independent: a decomposition leaves dwt2d finest
// level first, and idwt2d wants the coarsest level first, so a system that
// chains them keeps the coefficients of a frame in a frame store between
// them (not part of this design). See dwt2d and idwt2d for the interfaces
// and their timing. Default size: 64 x 64 image, three levels, 20-bit words
// with 6 fractional bits.
module dwt_idwt_top
  import dwt_pkg::*;
#(
  parameter int unsigned N      = 64,
  parameter int unsigned LEVELS = 3,
  localparam int unsigned BW    = $clog2(N / 2),
  localparam int unsigned VW    = (LEVELS > 1) ? $clog2(LEVELS) : 1
) (
  input  logic                 clk,
  input  logic                 rst_n,
  // forward transform
  input  logic                 dwt_in_valid,
  output logic                 dwt_in_ready,
  input  logic [PW-1:0]        dwt_p00,
  input  logic [PW-1:0]        dwt_p01,
  input  logic [PW-1:0]        dwt_p10,
  input  logic [PW-1:0]        dwt_p11,
  output logic                 dwt_out_valid,
  output logic [VW-1:0]        dwt_out_level,
  output logic [BW-1:0]        dwt_out_row,
  output logic [BW-1:0]        dwt_out_col,
  output logic                 dwt_out_ll_final,
  output logic signed [DW-1:0] dwt_out_ll,
  output logic signed [DW-1:0] dwt_out_lh,
  output logic signed [DW-1:0] dwt_out_hl,
  output logic signed [DW-1:0] dwt_out_hh,
  // inverse transform
  input  logic                 idwt_in_valid,
  output logic                 idwt_in_ready,
  input  logic signed [DW-1:0] idwt_in_ll,
  input  logic signed [DW-1:0] idwt_in_lh,
  input  logic signed [DW-1:0] idwt_in_hl,
  input  logic signed [DW-1:0] idwt_in_hh,
  output logic [VW-1:0]        idwt_level,
  output logic                 idwt_out_valid,
  output logic [BW-1:0]        idwt_out_row,
  output logic [BW-1:0]        idwt_out_col,
  output logic signed [DW-1:0] idwt_out_x00,
  output logic signed [DW-1:0] idwt_out_x01,
  output logic signed [DW-1:0] idwt_out_x10,
  output logic signed [DW-1:0] idwt_out_x11
);

  dwt2d #(.N(N), .LEVELS(LEVELS)) u_dwt (
    .clk, .rst_n,
    .in_valid(dwt_in_valid), .in_ready(dwt_in_ready),
    .p00(dwt_p00), .p01(dwt_p01), .p10(dwt_p10), .p11(dwt_p11),
    .out_valid(dwt_out_valid), .out_level(dwt_out_level),
    .out_row(dwt_out_row), .out_col(dwt_out_col),
    .out_ll_final(dwt_out_ll_final), .out_ll(dwt_out_ll),
    .out_lh(dwt_out_lh), .out_hl(dwt_out_hl), .out_hh(dwt_out_hh));

  idwt2d #(.N(N), .LEVELS(LEVELS)) u_idwt (
    .clk, .rst_n,
    .in_valid(idwt_in_valid), .in_ready(idwt_in_ready),
    .in_ll(idwt_in_ll), .in_lh(idwt_in_lh), .in_hl(idwt_in_hl), .in_hh(idwt_in_hh),
    .level(idwt_level), .out_valid(idwt_out_valid),
    .out_row(idwt_out_row), .out_col(idwt_out_col),
    .out_x00(idwt_out_x00), .out_x01(idwt_out_x01),
    .out_x10(idwt_out_x10), .out_x11(idwt_out_x11));

endmodule

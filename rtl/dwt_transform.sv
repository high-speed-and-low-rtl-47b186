// Forward 2-D transform module: one 2x2 pixel block in, one coefficient of
// each subband (LL, LH, HL, HH) out per clock.
//
// Row stage: each of the two image rows of the block is split into its odd
// part (x(.,0), taps a1/a3 and b1/b3) and even part (x(.,1), taps a0/a2 and
// b0/b2). Each part goes through a PE whose register holds the same part of
// the previous block of that row, so the two PEs together evaluate the
// 4-tap decimated filters
//     L(n) = a0 x(2n+1) + a1 x(2n) + a2 x(2n-1) + a3 x(2n-2)
//     H(n) = b0 x(2n+1) + b1 x(2n) + b2 x(2n-1) + b3 x(2n-2)
// for both rows at once. Column stage: L of the upper row takes the odd
// role and L of the lower row the even role; their PEs hold line delays, so
// the same filters run down the columns and give LL (low taps) and LH (high
// taps); H of both rows gives HL and HH likewise. This is the arrangement of
// the original module drawing.
//
// Interface: in_valid qualifies a block. in_first_col zeroes the row
// registers' contribution (first block of a row) and in_first_row zeroes the
// line delays' (first block row of a level); line_len is the number of
// blocks per row at the current level and restart (between levels) resets
// the line delay pointers. Timing: one register stage after each filter
// stage, so a block's coefficients appear two cycles after it is accepted.
// The pipeline registers are this design's addition.
module dwt_transform
  import dwt_pkg::*;
#(
  parameter int unsigned W       = DW,
  parameter int unsigned MAXLINE = 32,
  localparam int unsigned LW     = $clog2(MAXLINE + 1)
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                restart,
  input  logic                in_valid,
  input  logic                in_first_col,
  input  logic                in_first_row,
  input  logic [LW-1:0]       line_len,
  input  logic signed [W-1:0] x00,
  input  logic signed [W-1:0] x01,
  input  logic signed [W-1:0] x10,
  input  logic signed [W-1:0] x11,
  output logic                out_valid,
  output logic signed [W-1:0] ll,
  output logic signed [W-1:0] lh,
  output logic signed [W-1:0] hl,
  output logic signed [W-1:0] hh
);

  // ---------------- row stage ----------------
  logic signed [W-1:0] lo_0o, hi_0o, lo_0e, hi_0e, lo_1o, hi_1o, lo_1e, hi_1e;

  pe #(.W(W), .CX0(A1), .CD0(A3), .CX1(B1), .CD1(B3), .LINE(1'b0), .MAXLEN(MAXLINE)) u_r0_odd (
    .clk, .rst_n, .restart, .en(in_valid), .mask(in_first_col), .len(line_len),
    .x(x00), .y0(lo_0o), .y1(hi_0o));
  pe #(.W(W), .CX0(A0), .CD0(A2), .CX1(B0), .CD1(B2), .LINE(1'b0), .MAXLEN(MAXLINE)) u_r0_even (
    .clk, .rst_n, .restart, .en(in_valid), .mask(in_first_col), .len(line_len),
    .x(x01), .y0(lo_0e), .y1(hi_0e));
  pe #(.W(W), .CX0(A1), .CD0(A3), .CX1(B1), .CD1(B3), .LINE(1'b0), .MAXLEN(MAXLINE)) u_r1_odd (
    .clk, .rst_n, .restart, .en(in_valid), .mask(in_first_col), .len(line_len),
    .x(x10), .y0(lo_1o), .y1(hi_1o));
  pe #(.W(W), .CX0(A0), .CD0(A2), .CX1(B0), .CD1(B2), .LINE(1'b0), .MAXLEN(MAXLINE)) u_r1_even (
    .clk, .rst_n, .restart, .en(in_valid), .mask(in_first_col), .len(line_len),
    .x(x11), .y0(lo_1e), .y1(hi_1e));

  logic signed [W-1:0] l0, h0, l1, h1;   // L(0,0), H(0,0), L(1,0), H(1,0)
  logic                v1, fr1;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      v1  <= 1'b0;
      fr1 <= 1'b0;
      l0  <= '0;
      h0  <= '0;
      l1  <= '0;
      h1  <= '0;
    end else begin
      v1 <= in_valid;
      if (in_valid) begin
        fr1 <= in_first_row;
        l0  <= lo_0o + lo_0e;
        h0  <= hi_0o + hi_0e;
        l1  <= lo_1o + lo_1e;
        h1  <= hi_1o + hi_1e;
      end
    end
  end

  // ---------------- column stage ----------------
  logic signed [W-1:0] cl_o_lo, cl_o_hi, cl_e_lo, cl_e_hi;
  logic signed [W-1:0] ch_o_lo, ch_o_hi, ch_e_lo, ch_e_hi;

  pe #(.W(W), .CX0(A1), .CD0(A3), .CX1(B1), .CD1(B3), .LINE(1'b1), .MAXLEN(MAXLINE)) u_cl_odd (
    .clk, .rst_n, .restart, .en(v1), .mask(fr1), .len(line_len),
    .x(l0), .y0(cl_o_lo), .y1(cl_o_hi));
  pe #(.W(W), .CX0(A0), .CD0(A2), .CX1(B0), .CD1(B2), .LINE(1'b1), .MAXLEN(MAXLINE)) u_cl_even (
    .clk, .rst_n, .restart, .en(v1), .mask(fr1), .len(line_len),
    .x(l1), .y0(cl_e_lo), .y1(cl_e_hi));
  pe #(.W(W), .CX0(A1), .CD0(A3), .CX1(B1), .CD1(B3), .LINE(1'b1), .MAXLEN(MAXLINE)) u_ch_odd (
    .clk, .rst_n, .restart, .en(v1), .mask(fr1), .len(line_len),
    .x(h0), .y0(ch_o_lo), .y1(ch_o_hi));
  pe #(.W(W), .CX0(A0), .CD0(A2), .CX1(B0), .CD1(B2), .LINE(1'b1), .MAXLEN(MAXLINE)) u_ch_even (
    .clk, .rst_n, .restart, .en(v1), .mask(fr1), .len(line_len),
    .x(h1), .y0(ch_e_lo), .y1(ch_e_hi));

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      ll <= '0;
      lh <= '0;
      hl <= '0;
      hh <= '0;
    end else begin
      out_valid <= v1;
      if (v1) begin
        ll <= cl_o_lo + cl_e_lo;
        lh <= cl_o_hi + cl_e_hi;
        hl <= ch_o_lo + ch_e_lo;
        hh <= ch_o_hi + ch_e_hi;
      end
    end
  end

endmodule

// Inverse 2-D transform module: one coefficient of each subband (LL, LH,
// HL, HH) in, one 2x2 block of samples out per clock.
//
// Column stage: LL and HL go through PEs with the low-pass taps, LH and HH
// through PEs with the high-pass taps; each PE holds a line delay, so it
// sees the coefficient of the same column one block row earlier (c(m-1)).
// Summing the even-phase outputs (taps a3/a1, b3/b1) gives the upper row of
// L and H, the odd-phase outputs (a2/a0, b2/b0) the lower row:
//     Lup(m) = a3 LL(m) + a1 LL(m-1) + b3 LH(m) + b1 LH(m-1)
//     Llo(m) = a2 LL(m) + a0 LL(m-1) + b2 LH(m) + b0 LH(m-1)
// and likewise H from HL and HH. Row stage: the same synthesis filters run
// along each row with a register as delay and give x(.,0) (even phase) and
// x(.,1) (odd phase). With the forward filters of dwt_transform this is the
// orthogonal synthesis bank; because both directions are causal, block (r,c)
// of the output holds samples (2r-2..2r-1, 2c-2..2c-1) of the signal.
//
// Interface and timing as in dwt_transform: in_first_row zeroes the line
// delays, in_first_col the row registers, line_len is the blocks per row,
// restart resets the line delay pointers, and results appear two cycles
// after the input. The arrangement follows the original module drawing; the
// pipeline registers are this design's addition.
module idwt_transform
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
  input  logic signed [W-1:0] ll,
  input  logic signed [W-1:0] lh,
  input  logic signed [W-1:0] hl,
  input  logic signed [W-1:0] hh,
  output logic                out_valid,
  output logic signed [W-1:0] x00,
  output logic signed [W-1:0] x01,
  output logic signed [W-1:0] x10,
  output logic signed [W-1:0] x11
);

  // ---------------- column stage ----------------
  logic signed [W-1:0] ll_e, ll_o, lh_e, lh_o, hl_e, hl_o, hh_e, hh_o;

  pe #(.W(W), .CX0(A3), .CD0(A1), .CX1(A2), .CD1(A0), .LINE(1'b1), .MAXLEN(MAXLINE)) u_c_ll (
    .clk, .rst_n, .restart, .en(in_valid), .mask(in_first_row), .len(line_len),
    .x(ll), .y0(ll_e), .y1(ll_o));
  pe #(.W(W), .CX0(B3), .CD0(B1), .CX1(B2), .CD1(B0), .LINE(1'b1), .MAXLEN(MAXLINE)) u_c_lh (
    .clk, .rst_n, .restart, .en(in_valid), .mask(in_first_row), .len(line_len),
    .x(lh), .y0(lh_e), .y1(lh_o));
  pe #(.W(W), .CX0(A3), .CD0(A1), .CX1(A2), .CD1(A0), .LINE(1'b1), .MAXLEN(MAXLINE)) u_c_hl (
    .clk, .rst_n, .restart, .en(in_valid), .mask(in_first_row), .len(line_len),
    .x(hl), .y0(hl_e), .y1(hl_o));
  pe #(.W(W), .CX0(B3), .CD0(B1), .CX1(B2), .CD1(B0), .LINE(1'b1), .MAXLEN(MAXLINE)) u_c_hh (
    .clk, .rst_n, .restart, .en(in_valid), .mask(in_first_row), .len(line_len),
    .x(hh), .y0(hh_e), .y1(hh_o));

  logic signed [W-1:0] l0, l1, h0, h1;   // L(0,0), L(1,0), H(0,0), H(1,0)
  logic                v1, fc1;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      v1  <= 1'b0;
      fc1 <= 1'b0;
      l0  <= '0;
      l1  <= '0;
      h0  <= '0;
      h1  <= '0;
    end else begin
      v1 <= in_valid;
      if (in_valid) begin
        fc1 <= in_first_col;
        l0  <= ll_e + lh_e;
        l1  <= ll_o + lh_o;
        h0  <= hl_e + hh_e;
        h1  <= hl_o + hh_o;
      end
    end
  end

  // ---------------- row stage ----------------
  logic signed [W-1:0] l0_e, l0_o, h0_e, h0_o, l1_e, l1_o, h1_e, h1_o;

  pe #(.W(W), .CX0(A3), .CD0(A1), .CX1(A2), .CD1(A0), .LINE(1'b0), .MAXLEN(MAXLINE)) u_r_l0 (
    .clk, .rst_n, .restart, .en(v1), .mask(fc1), .len(line_len),
    .x(l0), .y0(l0_e), .y1(l0_o));
  pe #(.W(W), .CX0(B3), .CD0(B1), .CX1(B2), .CD1(B0), .LINE(1'b0), .MAXLEN(MAXLINE)) u_r_h0 (
    .clk, .rst_n, .restart, .en(v1), .mask(fc1), .len(line_len),
    .x(h0), .y0(h0_e), .y1(h0_o));
  pe #(.W(W), .CX0(A3), .CD0(A1), .CX1(A2), .CD1(A0), .LINE(1'b0), .MAXLEN(MAXLINE)) u_r_l1 (
    .clk, .rst_n, .restart, .en(v1), .mask(fc1), .len(line_len),
    .x(l1), .y0(l1_e), .y1(l1_o));
  pe #(.W(W), .CX0(B3), .CD0(B1), .CX1(B2), .CD1(B0), .LINE(1'b0), .MAXLEN(MAXLINE)) u_r_h1 (
    .clk, .rst_n, .restart, .en(v1), .mask(fc1), .len(line_len),
    .x(h1), .y0(h1_e), .y1(h1_o));

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      x00 <= '0;
      x01 <= '0;
      x10 <= '0;
      x11 <= '0;
    end else begin
      out_valid <= v1;
      if (v1) begin
        x00 <= l0_e + h0_e;
        x01 <= l0_o + h0_o;
        x10 <= l1_e + h1_e;
        x11 <= l1_o + h1_o;
      end
    end
  end

endmodule

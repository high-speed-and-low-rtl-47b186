// Processing element of the transform modules.
//
// A PE holds one delay element: a single register (row direction) when LINE
// is 0, or a line delay of len samples (column direction) when LINE is 1. On
// every cycle it forms two partial sums from the current sample x and the
// delayed sample xd:
//     y0 = CX0*x + CD0*xd        y1 = CX1*x + CD1*xd
// In the forward module y0/y1 are the low-pass/high-pass halves of an even
// or odd filter phase; in the inverse module they are the even/odd output
// phases. mask forces xd to zero, which zero-pads the signal at the first
// block of a row (register) or the first block row of a level (line delay).
// The delay advances when en is high. Products are shift-and-add (sd_mult).
// restart and len only steer the line delay; a register-type PE leaves them
// unconnected inside, which is why lint reports them unused there.
// The structure follows the PE drawings of the original work; the
// parameterisation is this design's own.
module pe
  import dwt_pkg::*;
#(
  parameter int unsigned W      = DW,
  parameter sd_coef_t    CX0    = A1,
  parameter sd_coef_t    CD0    = A3,
  parameter sd_coef_t    CX1    = B1,
  parameter sd_coef_t    CD1    = B3,
  parameter bit          LINE   = 1'b0,
  parameter int unsigned MAXLEN = 32,
  localparam int unsigned LW    = $clog2(MAXLEN + 1)
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                restart,
  input  logic                en,
  input  logic                mask,
  input  logic [LW-1:0]       len,
  input  logic signed [W-1:0] x,
  output logic signed [W-1:0] y0,
  output logic signed [W-1:0] y1
);

  logic signed [W-1:0] xd_raw, xd;
  logic signed [W-1:0] px0, pd0, px1, pd1;

  if (LINE) begin : g_line
    line_delay #(.W(W), .MAXLEN(MAXLEN)) u_ld (
      .clk, .rst_n, .restart, .en, .len, .din(x), .dout(xd_raw)
    );
  end else begin : g_reg
    logic signed [W-1:0] r;
    always_ff @(posedge clk) begin
      if (!rst_n)   r <= '0;
      else if (en)  r <= x;
    end
    assign xd_raw = r;
  end

  assign xd = mask ? '0 : xd_raw;

  sd_mult #(.W(W), .COEF(CX0)) u_mx0 (.x(x),  .y(px0));
  sd_mult #(.W(W), .COEF(CD0)) u_md0 (.x(xd), .y(pd0));
  sd_mult #(.W(W), .COEF(CX1)) u_mx1 (.x(x),  .y(px1));
  sd_mult #(.W(W), .COEF(CD1)) u_md1 (.x(xd), .y(pd1));

  assign y0 = px0 + pd0;
  assign y1 = px1 + pd1;

endmodule

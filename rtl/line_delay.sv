// Line delay (LD): delays a sample stream by one image line.
//
// The delay length is set at run time by len (1..MAXLEN), because one
// transform module serves every decomposition level and a line at level k is
// N/2^(k+1) samples long. It is a circular buffer: on each cycle with en high
// the word at the pointer is presented on dout, replaced by din, and the
// pointer advances, wrapping after len words. dout is therefore the din of
// len enables earlier. restart returns the pointer to zero; the buffer's
// contents are not cleared, the user masks the output during the first line.
// The read is asynchronous (distributed memory). The original work names the
// line delay only; this construction is this design's own.
module line_delay #(
  parameter int unsigned W      = 20,
  parameter int unsigned MAXLEN = 32,
  localparam int unsigned LW    = $clog2(MAXLEN + 1),
  localparam int unsigned AW    = (MAXLEN > 1) ? $clog2(MAXLEN) : 1
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                restart,
  input  logic                en,
  input  logic [LW-1:0]       len,
  input  logic signed [W-1:0] din,
  output logic signed [W-1:0] dout
);

  logic signed [W-1:0] mem [MAXLEN];
  logic [AW-1:0]       ptr;

  assign dout = mem[ptr];

  always_ff @(posedge clk) begin
    if (!rst_n || restart)  ptr <= '0;
    else if (en)            ptr <= (LW'(ptr) + 1'b1 >= len) ? '0 : ptr + 1'b1;
  end

  always_ff @(posedge clk) begin
    if (en) mem[ptr] <= din;
  end

  initial assert (MAXLEN >= 1) else $error("line_delay: MAXLEN must be at least 1");

endmodule

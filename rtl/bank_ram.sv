// RAM module for an intermediate LL subband.
//
// Four banks of DEPTH words, one per (row parity, column parity) of the
// stored subband, so that a whole 2x2 block can be read (forward transform)
// or written (inverse transform) in one cycle. With DEPTH = (N/4)^2 the
// total is N/2 x N/2 words, the RAM size of the original architecture. Each
// bank has one synchronous write port and one asynchronous read port with
// its own address; a read of the word being written returns the old word.
// The banked organisation is this design's choice.
module bank_ram #(
  parameter int unsigned W     = 20,
  parameter int unsigned DEPTH = 256,
  localparam int unsigned AW   = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic                clk,
  input  logic [3:0]          we,
  input  logic [AW-1:0]       waddr [4],
  input  logic signed [W-1:0] wdata [4],
  input  logic [AW-1:0]       raddr [4],
  output logic signed [W-1:0] rdata [4]
);

  for (genvar b = 0; b < 4; b++) begin : g_bank
    logic signed [W-1:0] mem [DEPTH];
    always_ff @(posedge clk) begin
      if (we[b]) mem[waddr[b]] <= wdata[b];
    end
    assign rdata[b] = mem[raddr[b]];
  end

endmodule

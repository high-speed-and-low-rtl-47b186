// Testbench for dwt2d: a 16 x 16 image over three levels and the 8 x 8,
// three-level case whose transform module is busy for 21 cycles (16 + 4 + 1).
// Each runner checks coefficients, order and cycle counts; this module adds
// a check that input stalls, back-pressure, level switches and RAM-fed
// blocks all happened.
module tb_dwt2d;
  logic clk = 0, rst_n = 0;
  int c16, f16, s16, b16, l16, r16, c8, f8, s8, b8, l8, r8;
  logic d16, d8;
  int checks, failures;

  always #5 clk = ~clk;

  dwt2d_runner #(.N(16), .LEVELS(3)) u16 (.clk, .rst_n, .checks(c16), .failures(f16),
    .stalls(s16), .backpressure(b16), .level_switches(l16), .ram_issues(r16), .done(d16));
  dwt2d_runner #(.N(8), .LEVELS(3)) u8 (.clk, .rst_n, .checks(c8), .failures(f8),
    .stalls(s8), .backpressure(b8), .level_switches(l8), .ram_issues(r8), .done(d8));

  initial begin
    repeat (20000) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", c16 + c8, f16 + f8 + 1);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    wait (d16 && d8);
    checks = c16 + c8 + 4;
    failures = f16 + f8;
    $display("stalls %0d, back-pressure %0d, level switches %0d, RAM-fed blocks %0d",
             s16 + s8, b16 + b8, l16 + l8, r16 + r8);
    if (s16 + s8 == 0) failures++;
    if (b16 + b8 == 0) failures++;
    if (l16 + l8 == 0) failures++;
    if (r16 + r8 == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// Testbench for idwt2d at 16 x 16 with three levels and at 32 x 32 with two:
// coefficients and order against the reference synthesis, reconstruction of
// a real transform within one grey level, and a check that RAM-fed LL,
// zero-filled LL and level switches all happened.
module tb_idwt2d;
  logic clk = 0, rst_n = 0;
  int c1, f1, r1, z1, l1, c2, f2, r2, z2, l2;
  longint e1, e2;
  logic d1, d2;
  int checks, failures;

  always #5 clk = ~clk;

  idwt2d_runner #(.N(16), .LEVELS(3)) u1 (.clk, .rst_n, .checks(c1), .failures(f1),
    .ram_ll(r1), .zero_ll(z1), .level_switches(l1), .maxerr(e1), .done(d1));
  idwt2d_runner #(.N(32), .LEVELS(2)) u2 (.clk, .rst_n, .checks(c2), .failures(f2),
    .ram_ll(r2), .zero_ll(z2), .level_switches(l2), .maxerr(e2), .done(d2));

  initial begin
    repeat (50000) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", c1 + c2, f1 + f2 + 1);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    wait (d1 && d2);
    checks = c1 + c2 + 3;
    failures = f1 + f2;
    $display("largest reconstruction error (1/64 grey level): %0d (16x16, 3 levels), %0d (32x32, 2 levels)", e1, e2);
    $display("RAM-fed LL %0d, zero-filled LL %0d, level switches %0d", r1 + r2, z1 + z2, l1 + l2);
    if (r1 + r2 == 0) failures++;
    if (z1 + z2 == 0) failures++;
    if (l1 + l2 == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

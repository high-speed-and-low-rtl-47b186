// Testbench for pe: one register-type and one line-delay-type PE driven by
// random samples, enables and masks; both outputs compared with the
// reference taps applied to the sample and to a delayed copy kept here.
module tb_pe;
  import dwt_pkg::*;
  import tb_dwt_pkg::*;

  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, restart = 0, en = 0, mask = 0;
  logic [2:0] len;
  logic signed [DW-1:0] x, ry0, ry1, ly0, ly1;

  pe #(.CX0(A1), .CD0(A3), .CX1(B1), .CD1(B3), .LINE(1'b0), .MAXLEN(4)) u_reg (
    .clk, .rst_n, .restart, .en, .mask, .len, .x, .y0(ry0), .y1(ry1));
  pe #(.CX0(A3), .CD0(A1), .CX1(A2), .CD1(A0), .LINE(1'b1), .MAXLEN(4)) u_line (
    .clk, .rst_n, .restart, .en, .mask, .len, .x, .y0(ly0), .y1(ly1));

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input string what, input logic signed [DW-1:0] got, input longint exp);
    checks++;
    if (longint'(got) != wrap(exp)) begin
      failures++;
      if (failures < 10) $display("%s: got %0d exp %0d", what, got, wrap(exp));
    end
  endtask

  initial begin
    longint hist [$];
    longint prev, xd_r, xd_l;
    len = 3'd3;
    x = '0;
    repeat (2) @(posedge clk);
    rst_n <= 1;
    @(negedge clk);
    restart = 1;
    @(negedge clk);
    restart = 0;
    prev = 0;
    for (int i = 0; i < 3000; i++) begin
      en   = ($urandom_range(0, 4) != 0);
      mask = ($urandom_range(0, 5) == 0);
      x    = signed'(DW'($urandom_range(0, 65535)) - DW'(32768));
      #1;
      xd_r = mask ? 0 : prev;
      xd_l = (mask || hist.size() < 3) ? 0 : hist[hist.size() - 3];
      if (!mask && hist.size() >= 3 || mask) begin
        chk("line y0", ly0, tap(0, 3, x) + tap(0, 1, xd_l));
        chk("line y1", ly1, tap(0, 2, x) + tap(0, 0, xd_l));
      end
      chk("reg y0", ry0, tap(0, 1, x) + tap(0, 3, xd_r));
      chk("reg y1", ry1, tap(1, 1, x) + tap(1, 3, xd_r));
      if (en) begin
        prev = x;
        hist.push_back(x);
      end
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// Testbench for sd_mult: every filter tap of the design against the
// reference tap table, on random and edge operands.
module tb_sd_mult;
  import dwt_pkg::*;
  import tb_dwt_pkg::*;

  int checks = 0, failures = 0;
  logic signed [DW-1:0] x;
  logic signed [DW-1:0] y [8];

  sd_mult #(.COEF(A0)) u0 (.x, .y(y[0]));
  sd_mult #(.COEF(A1)) u1 (.x, .y(y[1]));
  sd_mult #(.COEF(A2)) u2 (.x, .y(y[2]));
  sd_mult #(.COEF(A3)) u3 (.x, .y(y[3]));
  sd_mult #(.COEF(B0)) u4 (.x, .y(y[4]));
  sd_mult #(.COEF(B1)) u5 (.x, .y(y[5]));
  sd_mult #(.COEF(B2)) u6 (.x, .y(y[6]));
  sd_mult #(.COEF(B3)) u7 (.x, .y(y[7]));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int it = 0; it < 2000; it++) begin
      case (it)
        0: x = '0;
        1: x = 20'sd16320;           // pixel 255 << 6
        2: x = -20'sd1;
        3: x = 20'sd262143;
        4: x = -20'sd262144;
        default: x = signed'(DW'($urandom_range(0, 524287)) - DW'(262144));
      endcase
      #1;
      for (int k = 0; k < 8; k++) begin
        longint e;
        e = wrap(tap(k >= 4, k % 4, longint'(x)));
        checks++;
        if (longint'(y[k]) != e) begin
          failures++;
          if (failures < 10) $display("tap %0d x=%0d got %0d exp %0d", k, x, y[k], e);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

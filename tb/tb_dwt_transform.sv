// Testbench for dwt_transform: two random 16 x 16 images, one after the
// other with a restart between them and random idle cycles, sent as 2x2
// blocks; every LL/LH/HL/HH output is compared with the reference
// one-level transform, and the latency (2 cycles) is checked.
module tb_dwt_transform;
  import dwt_pkg::*;
  import tb_dwt_pkg::*;

  localparam int M = 16;       // image size, M/2 blocks per row
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, restart = 0, in_valid = 0, fc = 0, fr = 0;
  logic [3:0] line_len;
  logic signed [DW-1:0] x00, x01, x10, x11, ll, lh, hl, hh;
  logic out_valid;

  dwt_transform #(.MAXLINE(M / 2)) dut (
    .clk, .rst_n, .restart, .in_valid, .in_first_col(fc), .in_first_row(fr),
    .line_len, .x00, .x01, .x10, .x11, .out_valid, .ll, .lh, .hl, .hh);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  img_t img, gll, glh, ghl, ghh;
  int   issue_cyc [$];
  int   cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    line_len = 4'(M / 2);
    x00 = '0; x01 = '0; x10 = '0; x11 = '0;
    repeat (2) @(posedge clk);
    rst_n <= 1;
    for (int pass = 0; pass < 2; pass++) begin
      for (int r = 0; r < M; r++)
        for (int c = 0; c < M; c++)
          img[r][c] = pass == 0 ? longint'($urandom_range(0, 255)) <<< FRB
                                : longint'($urandom_range(0, 65535)) - 32768;
      fwd_level(M, img, gll, glh, ghl, ghh);
      @(negedge clk);
      restart = 1;
      @(negedge clk);
      restart = 0;
      fork
        begin
          for (int br = 0; br < M / 2; br++)
            for (int bc = 0; bc < M / 2; bc++) begin
              while ($urandom_range(0, 3) == 0) @(negedge clk);
              in_valid = 1; fc = (bc == 0); fr = (br == 0);
              x00 = DW'(img[2*br][2*bc]);   x01 = DW'(img[2*br][2*bc+1]);
              x10 = DW'(img[2*br+1][2*bc]); x11 = DW'(img[2*br+1][2*bc+1]);
              issue_cyc.push_back(cyc);
              @(negedge clk);
              in_valid = 0;
            end
        end
        begin
          for (int m = 0; m < M / 2; m++)
            for (int n = 0; n < M / 2; n++) begin
              int t0;
              do @(negedge clk); while (!out_valid);
              t0 = issue_cyc.pop_front();
              checks++;
              if (cyc - t0 != 2) begin
                failures++;
                $display("latency %0d", cyc - t0);
              end
              checks += 4;
              if (ll != DW'(gll[m][n]) || lh != DW'(glh[m][n]) ||
                  hl != DW'(ghl[m][n]) || hh != DW'(ghh[m][n])) begin
                failures++;
                if (failures < 10)
                  $display("pass %0d (%0d,%0d): got %0d %0d %0d %0d exp %0d %0d %0d %0d", pass, m, n,
                           ll, lh, hl, hh, gll[m][n], glh[m][n], ghl[m][n], ghh[m][n]);
              end
            end
        end
      join
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

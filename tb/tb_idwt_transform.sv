// Testbench for idwt_transform: random 8 x 8 subbands (two sets, restart
// between them, random idle cycles) in raster order; every output block is
// compared with the reference one-level synthesis, and the latency
// (2 cycles) is checked. A third set is the forward transform of a random
// image, and the reconstruction is also compared with that image away from
// the bottom and right edges (tolerance for the rounded taps).
module tb_idwt_transform;
  import dwt_pkg::*;
  import tb_dwt_pkg::*;

  localparam int M = 8;        // subband size = blocks per row
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, restart = 0, in_valid = 0, fc = 0, fr = 0;
  logic [3:0] line_len;
  logic signed [DW-1:0] ll, lh, hl, hh, x00, x01, x10, x11;
  logic out_valid;

  idwt_transform #(.MAXLINE(M)) dut (
    .clk, .rst_n, .restart, .in_valid, .in_first_col(fc), .in_first_row(fr),
    .line_len, .ll, .lh, .hl, .hh, .out_valid, .x00, .x01, .x10, .x11);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  img_t sll, slh, shl, shh, gx, img;
  int   issue_cyc [$];
  int   cyc = 0;
  longint maxerr = 0;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    line_len = 4'(M);
    ll = '0; lh = '0; hl = '0; hh = '0;
    repeat (2) @(posedge clk);
    rst_n <= 1;
    for (int pass = 0; pass < 3; pass++) begin
      if (pass < 2) begin
        for (int r = 0; r < M; r++)
          for (int c = 0; c < M; c++) begin
            sll[r][c] = longint'($urandom_range(0, 65535)) - 32768;
            slh[r][c] = longint'($urandom_range(0, 65535)) - 32768;
            shl[r][c] = longint'($urandom_range(0, 65535)) - 32768;
            shh[r][c] = longint'($urandom_range(0, 65535)) - 32768;
          end
      end else begin
        for (int r = 0; r < 2 * M; r++)
          for (int c = 0; c < 2 * M; c++)
            img[r][c] = longint'($urandom_range(0, 255)) <<< FRB;
        fwd_level(2 * M, img, sll, slh, shl, shh);
      end
      inv_level(M, sll, slh, shl, shh, gx);
      @(negedge clk);
      restart = 1;
      @(negedge clk);
      restart = 0;
      fork
        begin
          for (int br = 0; br < M; br++)
            for (int bc = 0; bc < M; bc++) begin
              while ($urandom_range(0, 3) == 0) @(negedge clk);
              in_valid = 1; fc = (bc == 0); fr = (br == 0);
              ll = DW'(sll[br][bc]); lh = DW'(slh[br][bc]);
              hl = DW'(shl[br][bc]); hh = DW'(shh[br][bc]);
              issue_cyc.push_back(cyc);
              @(negedge clk);
              in_valid = 0;
            end
        end
        begin
          for (int r = 0; r < M; r++)
            for (int c = 0; c < M; c++) begin
              int t0;
              do @(negedge clk); while (!out_valid);
              t0 = issue_cyc.pop_front();
              checks++;
              if (cyc - t0 != 2) begin
                failures++;
                $display("latency %0d", cyc - t0);
              end
              checks += 4;
              if (x00 != DW'(gx[2*r][2*c]) || x01 != DW'(gx[2*r][2*c+1]) ||
                  x10 != DW'(gx[2*r+1][2*c]) || x11 != DW'(gx[2*r+1][2*c+1])) begin
                failures++;
                if (failures < 10)
                  $display("pass %0d (%0d,%0d): got %0d %0d %0d %0d exp %0d %0d %0d %0d", pass, r, c,
                           x00, x01, x10, x11, gx[2*r][2*c], gx[2*r][2*c+1], gx[2*r+1][2*c], gx[2*r+1][2*c+1]);
              end
              // reconstruction: block (r,c) holds samples (2r-2.., 2c-2..)
              if (pass == 2 && r >= 1 && c >= 1) begin
                logic signed [DW-1:0] q [4];
                q = '{x00, x01, x10, x11};
                for (int i = 0; i < 4; i++) begin
                  longint e;
                  e = longint'(q[i]) - img[2*r-2+i/2][2*c-2+i%2];
                  if (e < 0) e = -e;
                  if (e > maxerr) maxerr = e;
                end
              end
            end
        end
      join
    end
    // rounded taps: allow one grey level (1 << FRAC)
    $display("largest reconstruction error: %0d / 64 grey levels", maxerr);
    checks++;
    if (maxerr > (1 <<< FRB)) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

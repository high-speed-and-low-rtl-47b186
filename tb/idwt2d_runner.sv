// Test driver for one idwt2d instance. Pass 0 sends random subbands, pass 1
// the reference forward transform of a random image; both with random idle
// cycles on the input. Every output block is compared with the reference
// multi-level synthesis (same alignment and zero fill as the design). In
// pass 1 the output is also compared with the image itself, away from the
// last 2^(LEVELS+1)-2 rows and columns that the truncated transform cannot
// rebuild; the largest error is reported in grey levels / 2^FRAC.
module idwt2d_runner
  import dwt_pkg::*;
  import tb_dwt_pkg::*;
#(
  parameter int N      = 16,
  parameter int LEVELS = 3
) (
  input  logic   clk,
  input  logic   rst_n,
  output int     checks,
  output int     failures,
  output int     ram_ll,
  output int     zero_ll,
  output int     level_switches,
  output longint maxerr,
  output logic   done
);
  localparam int BW = $clog2(N / 2);
  localparam int VW = (LEVELS > 1) ? $clog2(LEVELS) : 1;

  logic in_valid = 0, in_ready, out_valid;
  logic signed [DW-1:0] in_ll, in_lh, in_hl, in_hh, x00, x01, x10, x11;
  logic [VW-1:0] level, prev_level;
  logic [BW-1:0] out_row, out_col;

  idwt2d #(.N(N), .LEVELS(LEVELS)) dut (
    .clk, .rst_n, .in_valid, .in_ready, .in_ll, .in_lh, .in_hl, .in_hh,
    .level, .out_valid, .out_row, .out_col,
    .out_x00(x00), .out_x01(x01), .out_x10(x10), .out_x11(x11));

  img_t img, cur, xh;
  img_t sll [LEVELS], slh [LEVELS], shl [LEVELS], shh [LEVELS];
  logic started = 0;

  always @(negedge clk) if (rst_n) begin
    if (dut.issue && dut.ll_src == 2'd1) ram_ll++;
    if (dut.issue && dut.ll_src == 2'd2) zero_ll++;
    if (started && level != prev_level) level_switches++;
    prev_level = level;
    started = 1;
  end

  initial begin
    checks = 0; failures = 0; ram_ll = 0; zero_ll = 0; level_switches = 0;
    maxerr = 0; done = 0;
    in_ll = '0; in_lh = '0; in_hl = '0; in_hh = '0;
    wait (rst_n);
    for (int pass = 0; pass < 2; pass++) begin
      if (pass == 0) begin
        for (int k = 0; k < LEVELS; k++)
          for (int r = 0; r < (N >> (k + 1)); r++)
            for (int c = 0; c < (N >> (k + 1)); c++) begin
              sll[k][r][c] = longint'($urandom_range(0, 32767)) - 16384;
              slh[k][r][c] = longint'($urandom_range(0, 32767)) - 16384;
              shl[k][r][c] = longint'($urandom_range(0, 32767)) - 16384;
              shh[k][r][c] = longint'($urandom_range(0, 32767)) - 16384;
            end
      end else begin
        for (int r = 0; r < N; r++)
          for (int c = 0; c < N; c++) begin
            // smooth picture plus noise
            img[r][c] = longint'((r * 7 + c * 5) % 200 + $urandom_range(0, 40));
            cur[r][c] = img[r][c] <<< FRB;
          end
        for (int k = 0; k < LEVELS; k++) begin
          fwd_level(N >> k, cur, sll[k], slh[k], shl[k], shh[k]);
          cur = sll[k];
        end
      end
      // reference synthesis, coarsest first
      cur = sll[LEVELS - 1];
      for (int k = LEVELS - 1; k >= 0; k--) begin
        inv_level(N >> (k + 1), cur, slh[k], shl[k], shh[k], xh);
        if (k > 0) align_ll(N >> k, xh, cur);
      end
      @(negedge clk);
      fork
        begin
          for (int k = LEVELS - 1; k >= 0; k--)
            for (int r = 0; r < (N >> (k + 1)); r++)
              for (int c = 0; c < (N >> (k + 1)); c++) begin
                while ($urandom_range(0, 3) == 0) @(negedge clk);
                in_valid = 1;
                in_ll = (k == LEVELS - 1) ? DW'(sll[k][r][c]) : DW'($urandom);
                in_lh = DW'(slh[k][r][c]);
                in_hl = DW'(shl[k][r][c]);
                in_hh = DW'(shh[k][r][c]);
                while (!in_ready) @(negedge clk);
                @(negedge clk);
                in_valid = 0;
              end
        end
        begin
          for (int r = 0; r < N / 2; r++)
            for (int c = 0; c < N / 2; c++) begin
              logic signed [DW-1:0] q [4];
              do @(negedge clk); while (!out_valid);
              q = '{x00, x01, x10, x11};
              checks++;
              if (int'(out_row) != r || int'(out_col) != c) begin
                failures++;
                if (failures < 10) $display("N=%0d order: got (%0d,%0d) exp (%0d,%0d)", N, out_row, out_col, r, c);
              end
              for (int i = 0; i < 4; i++) begin
                int R, C;
                R = 2 * r + i / 2;
                C = 2 * c + i % 2;
                checks++;
                if (longint'(q[i]) != xh[R][C]) begin
                  failures++;
                  if (failures < 10) $display("N=%0d pass %0d block (%0d,%0d) sample %0d: got %0d exp %0d",
                                              N, pass, r, c, i, q[i], xh[R][C]);
                end
                // block (r,c) holds image sample (R-2, C-2)
                if (pass == 1 && R >= 2 && C >= 2 && R - 2 < N - (1 << (LEVELS + 1)) + 2 &&
                    C - 2 < N - (1 << (LEVELS + 1)) + 2) begin
                  longint e;
                  e = longint'(q[i]) - (img[R - 2][C - 2] <<< FRB);
                  if (e < 0) e = -e;
                  if (e > maxerr) maxerr = e;
                end
              end
            end
        end
      join
    end
    checks++;
    if (maxerr > (1 <<< FRB)) failures++;
    done = 1;
  end
endmodule

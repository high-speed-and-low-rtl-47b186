// Test driver for one dwt2d instance: sends random N x N images as 2x2
// blocks and checks every coefficient block against the reference
// multi-level transform, including its level and position. Pass 0 inserts
// random idle cycles on the input; pass 1 sends at full rate and checks the
// cycle counts: busy cycles of the transform module equal
// (1 - 4^-LEVELS) N^2 / 3, and the last coefficient leaves
// busy + 2*LEVELS - 1 cycles after the first block is accepted.
module dwt2d_runner
  import dwt_pkg::*;
  import tb_dwt_pkg::*;
#(
  parameter int N      = 16,
  parameter int LEVELS = 3
) (
  input  logic clk,
  input  logic rst_n,
  output int   checks,
  output int   failures,
  output int   stalls,
  output int   backpressure,
  output int   level_switches,
  output int   ram_issues,
  output logic done
);
  localparam int BW = $clog2(N / 2);
  localparam int VW = (LEVELS > 1) ? $clog2(LEVELS) : 1;

  logic in_valid = 0, in_ready, out_valid, out_ll_final;
  logic [PW-1:0] p00, p01, p10, p11;
  logic [VW-1:0] out_level;
  logic [BW-1:0] out_row, out_col;
  logic signed [DW-1:0] out_ll, out_lh, out_hl, out_hh;

  dwt2d #(.N(N), .LEVELS(LEVELS)) dut (
    .clk, .rst_n, .in_valid, .in_ready, .p00, .p01, .p10, .p11,
    .out_valid, .out_level, .out_row, .out_col, .out_ll_final,
    .out_ll, .out_lh, .out_hl, .out_hh);

  img_t img, cur, nxt;
  img_t gll [LEVELS], glh [LEVELS], ghl [LEVELS], ghh [LEVELS];
  int cyc = 0, busy = 0;
  logic prev_level_valid = 0;
  logic [VW-1:0] prev_level;

  always @(posedge clk) cyc <= cyc + 1;

  // mechanism counters
  always @(negedge clk) if (rst_n) begin
    if (dut.issue) busy++;
    if (dut.issue && dut.src_ram) ram_issues++;
    if (in_ready && !in_valid) stalls++;
    if (in_valid && !in_ready) backpressure++;
    if (out_valid) begin
      if (prev_level_valid && out_level != prev_level) level_switches++;
      prev_level = out_level;
      prev_level_valid = 1;
    end
  end

  initial begin
    checks = 0; failures = 0; stalls = 0; backpressure = 0;
    level_switches = 0; ram_issues = 0; done = 0;
    p00 = '0; p01 = '0; p10 = '0; p11 = '0;
    wait (rst_n);
    for (int pass = 0; pass < 2; pass++) begin
      int t_first, t_last, busy0;
      for (int r = 0; r < N; r++)
        for (int c = 0; c < N; c++)
          img[r][c] = longint'($urandom_range(0, 255));
      for (int r = 0; r < N; r++)
        for (int c = 0; c < N; c++)
          cur[r][c] = img[r][c] <<< FRB;
      for (int k = 0; k < LEVELS; k++) begin
        fwd_level(N >> k, cur, gll[k], glh[k], ghl[k], ghh[k]);
        cur = gll[k];
      end
      @(negedge clk);
      busy0 = busy;
      t_first = -1;
      fork
        begin
          for (int br = 0; br < N / 2; br++)
            for (int bc = 0; bc < N / 2; bc++) begin
              if (pass == 0) while ($urandom_range(0, 2) == 0) @(negedge clk);
              in_valid = 1;
              p00 = PW'(img[2*br][2*bc]);   p01 = PW'(img[2*br][2*bc+1]);
              p10 = PW'(img[2*br+1][2*bc]); p11 = PW'(img[2*br+1][2*bc+1]);
              do begin
                @(posedge clk);
                #1;
              end while (!(in_ready_q));
              if (t_first < 0) t_first = cyc - 1;   // cyc has already advanced
              @(negedge clk);
              in_valid = 0;
            end
          // offer a block while the later levels run: it must be refused
          in_valid = 1;
          repeat (3) begin
            @(posedge clk);
            #1;
            if (in_ready_q) begin
              checks++;
              failures++;
              $display("N=%0d block accepted during a later level", N);
            end
          end
          @(negedge clk);
          in_valid = 0;
        end
        begin
          for (int k = 0; k < LEVELS; k++)
            for (int m = 0; m < (N >> (k + 1)); m++)
              for (int n = 0; n < (N >> (k + 1)); n++) begin
                do @(negedge clk); while (!out_valid);
                checks++;
                if (int'(out_level) != k || int'(out_row) != m || int'(out_col) != n ||
                    out_ll_final != (k == LEVELS - 1)) begin
                  failures++;
                  if (failures < 10) $display("N=%0d order: got L%0d (%0d,%0d) exp L%0d (%0d,%0d)",
                                              N, out_level, out_row, out_col, k, m, n);
                end
                checks += 4;
                if (out_ll != DW'(gll[k][m][n]) || out_lh != DW'(glh[k][m][n]) ||
                    out_hl != DW'(ghl[k][m][n]) || out_hh != DW'(ghh[k][m][n])) begin
                  failures++;
                  if (failures < 10) $display("N=%0d L%0d (%0d,%0d): got %0d %0d %0d %0d exp %0d %0d %0d %0d",
                    N, k, m, n, out_ll, out_lh, out_hl, out_hh, gll[k][m][n], glh[k][m][n], ghl[k][m][n], ghh[k][m][n]);
                end
              end
          t_last = cyc;
        end
      join
      if (pass == 1) begin
        int blocks;
        blocks = 0;
        for (int k = 0; k < LEVELS; k++) blocks += (N >> (k + 1)) * (N >> (k + 1));
        // (1 - 4^-L) N^2 / 3
        checks++;
        if (blocks != (N * N * ((1 << (2 * LEVELS)) - 1)) / (3 * (1 << (2 * LEVELS))) || busy - busy0 != blocks) begin
          failures++;
          $display("N=%0d busy cycles %0d, blocks %0d", N, busy - busy0, blocks);
        end
        checks++;
        if (t_last - t_first != blocks + 2 * LEVELS - 1) begin
          failures++;
          $display("N=%0d first-to-last %0d exp %0d", N, t_last - t_first, blocks + 2 * LEVELS - 1);
        end
        $display("N=%0d LEVELS=%0d: %0d busy cycles, %0d cycles first block to last coefficient",
                 N, LEVELS, busy - busy0, t_last - t_first);
      end
    end
    done = 1;
  end

  // in_ready as seen at the clock edge that accepted the block
  logic in_ready_q;
  always @(posedge clk) in_ready_q <= in_ready && in_valid;

endmodule

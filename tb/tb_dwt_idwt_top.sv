// End-to-end testbench of dwt_idwt_top at its default size (64 x 64 image,
// three levels). A picture (gradient plus noise) is decomposed by the
// forward processor with random input gaps; every coefficient is checked
// against the reference transform and kept. The kept coefficients are then
// sent to the inverse processor, coarsest level first, and every output
// block is checked against the reference synthesis and, away from the last
// 14 rows and columns, against the picture itself (within one grey level).
// Cycle counts: the forward transform module is busy for exactly
// (1 - 4^-3) * 64^2 / 3 = 1344 cycles and so is the inverse one. Every
// mechanism of the design is counted and must occur at least once: input
// stalls, refused input during later levels, RAM-fed blocks, level
// switches of both processors, zero-padded borders, and zero-filled LL in
// the inverse.
module tb_dwt_idwt_top;
  import dwt_pkg::*;
  import tb_dwt_pkg::*;

  localparam int N = 64, LEVELS = 3;
  localparam int BW = $clog2(N / 2), VW = $clog2(LEVELS);
  localparam int BLOCKS = 1344;

  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;

  logic dwt_in_valid = 0, dwt_in_ready, dwt_out_valid, dwt_out_ll_final;
  logic [PW-1:0] dwt_p00, dwt_p01, dwt_p10, dwt_p11;
  logic [VW-1:0] dwt_out_level, idwt_level;
  logic [BW-1:0] dwt_out_row, dwt_out_col, idwt_out_row, idwt_out_col;
  logic signed [DW-1:0] dwt_out_ll, dwt_out_lh, dwt_out_hl, dwt_out_hh;
  logic idwt_in_valid = 0, idwt_in_ready, idwt_out_valid;
  logic signed [DW-1:0] idwt_in_ll, idwt_in_lh, idwt_in_hl, idwt_in_hh;
  logic signed [DW-1:0] idwt_out_x00, idwt_out_x01, idwt_out_x10, idwt_out_x11;

  dwt_idwt_top dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  img_t img, cur, xh;
  img_t gll [LEVELS], glh [LEVELS], ghl [LEVELS], ghh [LEVELS];
  img_t cll [LEVELS], clh [LEVELS], chl [LEVELS], chh [LEVELS];

  // mechanism counters
  int n_stall = 0, n_refused = 0, n_ram_fwd = 0, n_lvl_fwd = 0, n_lvl_inv = 0;
  int n_border = 0, n_zero_ll = 0, n_ram_inv = 0, busy_fwd = 0, busy_inv = 0;
  logic [VW-1:0] pl_f = '0, pl_i = '0;
  always @(negedge clk) if (rst_n) begin
    if (dwt_in_ready && !dwt_in_valid && busy_fwd < BLOCKS) n_stall++;
    if (dwt_in_valid && !dwt_in_ready) n_refused++;
    if (dut.u_dwt.issue) busy_fwd++;
    if (dut.u_dwt.issue && dut.u_dwt.src_ram) n_ram_fwd++;
    if (dut.u_dwt.issue && (dut.u_dwt.first_row || dut.u_dwt.first_col)) n_border++;
    if (dut.u_dwt.u_seq.level != pl_f) n_lvl_fwd++;
    pl_f = dut.u_dwt.u_seq.level;
    if (dut.u_idwt.issue) busy_inv++;
    if (dut.u_idwt.issue && dut.u_idwt.ll_src == 2'd1) n_ram_inv++;
    if (dut.u_idwt.issue && dut.u_idwt.ll_src == 2'd2) n_zero_ll++;
    if (idwt_level != pl_i) n_lvl_inv++;
    pl_i = idwt_level;
  end

  task automatic expect_true(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin
    longint maxerr;
    dwt_p00 = '0; dwt_p01 = '0; dwt_p10 = '0; dwt_p11 = '0;
    idwt_in_ll = '0; idwt_in_lh = '0; idwt_in_hl = '0; idwt_in_hh = '0;
    for (int r = 0; r < N; r++)
      for (int c = 0; c < N; c++) begin
        img[r][c] = longint'((3 * r + 2 * c) % 230 + $urandom_range(0, 25));
        cur[r][c] = img[r][c] <<< FRB;
      end
    for (int k = 0; k < LEVELS; k++) begin
      fwd_level(N >> k, cur, gll[k], glh[k], ghl[k], ghh[k]);
      cur = gll[k];
    end
    cur = gll[LEVELS - 1];
    for (int k = LEVELS - 1; k >= 0; k--) begin
      inv_level(N >> (k + 1), cur, glh[k], ghl[k], ghh[k], xh);
      if (k > 0) align_ll(N >> k, xh, cur);
    end
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk);

    // ---------------- forward ----------------
    fork
      begin
        for (int br = 0; br < N / 2; br++)
          for (int bc = 0; bc < N / 2; bc++) begin
            while ($urandom_range(0, 7) == 0) @(negedge clk);
            dwt_in_valid = 1;
            dwt_p00 = PW'(img[2*br][2*bc]);   dwt_p01 = PW'(img[2*br][2*bc+1]);
            dwt_p10 = PW'(img[2*br+1][2*bc]); dwt_p11 = PW'(img[2*br+1][2*bc+1]);
            while (!dwt_in_ready) @(negedge clk);
            @(negedge clk);
            dwt_in_valid = 0;
          end
        // a further block offered while levels 2 and 3 run is refused
        dwt_in_valid = 1;
        repeat (4) @(negedge clk);
        dwt_in_valid = 0;
      end
      begin
        for (int k = 0; k < LEVELS; k++)
          for (int m = 0; m < (N >> (k + 1)); m++)
            for (int n = 0; n < (N >> (k + 1)); n++) begin
              do @(negedge clk); while (!dwt_out_valid);
              checks++;
              if (int'(dwt_out_level) != k || int'(dwt_out_row) != m || int'(dwt_out_col) != n ||
                  dwt_out_ll_final != (k == LEVELS - 1) ||
                  dwt_out_ll != DW'(gll[k][m][n]) || dwt_out_lh != DW'(glh[k][m][n]) ||
                  dwt_out_hl != DW'(ghl[k][m][n]) || dwt_out_hh != DW'(ghh[k][m][n])) begin
                failures++;
                if (failures < 10) $display("DWT L%0d (%0d,%0d) mismatch: got L%0d (%0d,%0d) %0d %0d %0d %0d exp %0d %0d %0d %0d",
                  k, m, n, dwt_out_level, dwt_out_row, dwt_out_col, dwt_out_ll, dwt_out_lh, dwt_out_hl, dwt_out_hh,
                  gll[k][m][n], glh[k][m][n], ghl[k][m][n], ghh[k][m][n]);
              end
              cll[k][m][n] = dwt_out_ll;
              clh[k][m][n] = dwt_out_lh;
              chl[k][m][n] = dwt_out_hl;
              chh[k][m][n] = dwt_out_hh;
            end
      end
    join
    expect_true(busy_fwd == BLOCKS, $sformatf("forward busy cycles %0d", busy_fwd));

    // ---------------- inverse, from the captured coefficients ----------------
    maxerr = 0;
    @(negedge clk);
    fork
      begin
        for (int k = LEVELS - 1; k >= 0; k--)
          for (int r = 0; r < (N >> (k + 1)); r++)
            for (int c = 0; c < (N >> (k + 1)); c++) begin
              while ($urandom_range(0, 7) == 0) @(negedge clk);
              idwt_in_valid = 1;
              idwt_in_ll = (k == LEVELS - 1) ? DW'(cll[k][r][c]) : '0;
              idwt_in_lh = DW'(clh[k][r][c]);
              idwt_in_hl = DW'(chl[k][r][c]);
              idwt_in_hh = DW'(chh[k][r][c]);
              while (!idwt_in_ready) @(negedge clk);
              @(negedge clk);
              idwt_in_valid = 0;
            end
      end
      begin
        for (int r = 0; r < N / 2; r++)
          for (int c = 0; c < N / 2; c++) begin
            logic signed [DW-1:0] q [4];
            do @(negedge clk); while (!idwt_out_valid);
            q = '{idwt_out_x00, idwt_out_x01, idwt_out_x10, idwt_out_x11};
            checks++;
            if (int'(idwt_out_row) != r || int'(idwt_out_col) != c) failures++;
            for (int i = 0; i < 4; i++) begin
              int R, C;
              R = 2 * r + i / 2;
              C = 2 * c + i % 2;
              checks++;
              if (longint'(q[i]) != xh[R][C]) begin
                failures++;
                if (failures < 10) $display("IDWT block (%0d,%0d) sample %0d: got %0d exp %0d", r, c, i, q[i], xh[R][C]);
              end
              if (R >= 2 && C >= 2 && R - 2 < N - 14 && C - 2 < N - 14) begin
                longint e;
                e = longint'(q[i]) - (img[R - 2][C - 2] <<< FRB);
                if (e < 0) e = -e;
                if (e > maxerr) maxerr = e;
              end
            end
          end
      end
    join
    repeat (4) @(negedge clk);
    expect_true(busy_inv == BLOCKS, $sformatf("inverse busy cycles %0d", busy_inv));
    expect_true(maxerr <= (1 <<< FRB), $sformatf("reconstruction error %0d", maxerr));
    $display("largest reconstruction error over the inner 50 x 50 samples: %0d / 64 grey level", maxerr);
    $display("busy cycles: forward %0d, inverse %0d (formula %0d)", busy_fwd, busy_inv, BLOCKS);
    $display("mechanisms: input stalls %0d, refused input %0d, RAM-fed forward blocks %0d, forward level switches %0d,",
             n_stall, n_refused, n_ram_fwd, n_lvl_fwd);
    $display("            border blocks %0d, RAM-fed inverse LL %0d, zero-filled inverse LL %0d, inverse level switches %0d",
             n_border, n_ram_inv, n_zero_ll, n_lvl_inv);
    expect_true(n_stall > 0, "no input stall");
    expect_true(n_refused > 0, "no refused input");
    expect_true(n_ram_fwd > 0, "no RAM-fed forward block");
    expect_true(n_lvl_fwd > 0, "no forward level switch");
    expect_true(n_border > 0, "no border block");
    expect_true(n_ram_inv > 0, "no RAM-fed inverse LL");
    expect_true(n_zero_ll > 0, "no zero-filled inverse LL");
    expect_true(n_lvl_inv > 0, "no inverse level switch");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// Testbench for idwt_seq (N = 16, three levels, two frames). The inverse
// transform module is stood in for by a two-cycle delay of issue. Every
// accepted input is compared with the expected walk (coarsest level first,
// raster order): line length, border flags, LL source (input, RAM or zero),
// RAM bank and read address; every output with its position, the RAM write
// (shifted one block up and left, offset by the level) and out_valid at
// level 0 only.
module tb_idwt_seq;
  localparam int N = 16, LEVELS = 3, S = N / 4;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, in_valid = 0, in_ready, issue, first_row, first_col;
  logic restart, tr_out_valid, out_valid, wr_en;
  logic [4:0] line_len;
  logic [1:0] ll_src, rbank, level;
  logic [3:0] raddr, waddr;
  logic [2:0] out_row, out_col;
  logic [1:0] dly;

  idwt_seq #(.N(N), .LEVELS(LEVELS)) dut (.*);

  always #5 clk = ~clk;
  always_ff @(posedge clk) dly <= rst_n ? {dly[0], issue} : 2'b00;
  assign tr_out_valid = dly[1];

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s", what);
    end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int frame = 0; frame < 2; frame++) begin
      fork
        for (int k = LEVELS - 1; k >= 0; k--) begin
          int bpr, off, src;
          bpr = N >> (k + 1);
          off = (k % 2 == 1) ? S / 2 : 0;
          for (int r = 0; r < bpr; r++)
            for (int c = 0; c < bpr; c++) begin
              @(negedge clk);
              while ($urandom_range(0, 3) == 0) begin
                in_valid = 0;
                @(negedge clk);
              end
              in_valid = 1;
              #1;
              while (!in_ready) begin
                @(negedge clk);
                #1;
              end
              if (k == LEVELS - 1)                 src = 0;
              else if (r >= bpr - 2 || c >= bpr - 2) src = 2;
              else                                 src = 1;
              chk(issue && int'(level) == k && int'(line_len) == bpr && first_row == (r == 0) &&
                  first_col == (c == 0) && int'(ll_src) == src &&
                  (src != 1 || (int'(rbank) == (r % 2) * 2 + c % 2 &&
                                int'(raddr) == (off + r / 2) * S + c / 2)),
                  $sformatf("input L%0d (%0d,%0d): len %0d src %0d bank %0d raddr %0d",
                            k, r, c, line_len, ll_src, rbank, raddr));
              @(posedge clk);
              #1 in_valid = 0;
            end
        end
        for (int k = LEVELS - 1; k >= 0; k--) begin
          int bpr, woff;
          bpr = N >> (k + 1);
          woff = ((k - 1) % 2 == 1) ? S / 2 : 0;
          for (int r = 0; r < bpr; r++)
            for (int c = 0; c < bpr; c++) begin
              do @(negedge clk); while (!tr_out_valid);
              chk(int'(out_row) == r && int'(out_col) == c && out_valid == (k == 0) &&
                  wr_en == (k > 0 && r > 0 && c > 0) &&
                  (!(k > 0 && r > 0 && c > 0) || int'(waddr) == (woff + r - 1) * S + c - 1),
                  $sformatf("output L%0d (%0d,%0d): got (%0d,%0d) valid %0d we %0d waddr %0d",
                            k, r, c, out_row, out_col, out_valid, wr_en, waddr));
            end
        end
      join
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

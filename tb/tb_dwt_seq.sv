// Testbench for dwt_seq (N = 16, three levels, two images). The transform
// module is stood in for by a two-cycle delay of issue. Every issued block
// is compared with the expected raster walk (level, position, line length,
// border flags, multiplexer select, RAM read address) and every output with
// its position and RAM write bank and address; restart must pulse once per
// level, and no block may be issued in the two drain cycles.
module tb_dwt_seq;
  localparam int N = 16, LEVELS = 3, S = N / 4;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, in_valid = 0, in_ready, issue, src_ram, first_row, first_col;
  logic restart, tr_out_valid, out_last_level, wr_en;
  logic [4:0] line_len;
  logic [3:0] raddr, waddr;
  logic [1:0] out_level, wr_bank;
  logic [2:0] out_row, out_col;
  logic [1:0] dly;

  dwt_seq #(.N(N), .LEVELS(LEVELS)) dut (.*);

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

  int restarts = 0;
  always @(negedge clk) if (restart) restarts++;

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int img = 0; img < 2; img++) begin
      fork
        // issue side
        for (int k = 0; k < LEVELS; k++) begin
          int bpr;
          bpr = N >> (k + 1);
          for (int r = 0; r < bpr; r++)
            for (int c = 0; c < bpr; c++) begin
              @(negedge clk);
              if (k == 0) begin
                while ($urandom_range(0, 2) == 0) begin
                  in_valid = 0;
                  @(negedge clk);
                end
                in_valid = 1;
                #1;
                while (!in_ready) begin
                  chk(!issue, "issue without ready");
                  @(negedge clk);
                  #1;
                end
              end else begin
                in_valid = 0;
                #1;
                while (!issue) begin
                  @(negedge clk);
                  #1;
                end
              end
              chk(issue && int'(line_len) == bpr && first_row == (r == 0) && first_col == (c == 0) &&
                  src_ram == (k > 0) && (k == 0 || int'(raddr) == r * S + c),
                  $sformatf("issue L%0d (%0d,%0d): len %0d fr %0d fc %0d src %0d raddr %0d",
                            k, r, c, line_len, first_row, first_col, src_ram, raddr));
              if (k == 0) begin
                @(posedge clk);
                #1 in_valid = 0;
              end
            end
        end
        // output side
        for (int k = 0; k < LEVELS; k++) begin
          int bpr;
          bpr = N >> (k + 1);
          for (int r = 0; r < bpr; r++)
            for (int c = 0; c < bpr; c++) begin
              do @(negedge clk); while (!tr_out_valid);
              chk(int'(out_level) == k && int'(out_row) == r && int'(out_col) == c &&
                  out_last_level == (k == LEVELS - 1) && wr_en == (k < LEVELS - 1) &&
                  (k == LEVELS - 1 || (int'(wr_bank) == (r % 2) * 2 + c % 2 &&
                                       int'(waddr) == (r / 2) * S + c / 2)),
                  $sformatf("output L%0d (%0d,%0d): got L%0d (%0d,%0d) we %0d bank %0d waddr %0d",
                            k, r, c, out_level, out_row, out_col, wr_en, wr_bank, waddr));
            end
        end
      join
    end
    repeat (4) @(negedge clk);
    chk(restarts == 2 * LEVELS, $sformatf("restarts %0d", restarts));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

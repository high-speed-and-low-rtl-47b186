// Testbench for line_delay: random data and enables, several run-time
// lengths, restart between them; dout must equal the din of len enables
// earlier once the line has filled.
module tb_line_delay;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, restart = 0, en = 0;
  logic [3:0] len;
  logic signed [15:0] din, dout;

  line_delay #(.W(16), .MAXLEN(8)) dut (.clk, .rst_n, .restart, .en, .len, .din, .dout);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic signed [15:0] hist [$];
    int lens [4] = '{8, 3, 1, 5};
    len = 4'd8;
    din = '0;
    repeat (2) @(posedge clk);
    rst_n <= 1;
    foreach (lens[li]) begin
      @(negedge clk);
      restart = 1; len = 4'(lens[li]);
      @(negedge clk);
      restart = 0;
      hist = {};
      for (int i = 0; i < 200; i++) begin
        en  = ($urandom_range(0, 3) != 0);
        din = 16'($urandom);
        #1;
        if (en) begin
          if (hist.size() >= lens[li]) begin
            checks++;
            if (dout != hist[hist.size() - lens[li]]) begin
              failures++;
              if (failures < 10) $display("len %0d: got %0d exp %0d", lens[li], dout, hist[hist.size() - lens[li]]);
            end
          end
          hist.push_back(din);
        end
        @(negedge clk);
      end
    end
    en = 0;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// Testbench for bank_ram: random writes to the four banks, then random
// reads compared with a reference copy; also write and read in one cycle.
module tb_bank_ram;
  int checks = 0, failures = 0;
  logic clk = 0;
  logic [3:0] we;
  logic [5:0] waddr [4], raddr [4];
  logic signed [19:0] wdata [4], rdata [4];
  logic signed [19:0] ref_mem [4][64];

  bank_ram #(.W(20), .DEPTH(64)) dut (.clk, .we, .waddr, .wdata, .raddr, .rdata);

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    we = '0;
    for (int b = 0; b < 4; b++) begin
      waddr[b] = '0; raddr[b] = '0; wdata[b] = '0;
    end
    // fill every word
    for (int a = 0; a < 64; a++) begin
      @(negedge clk);
      we = 4'hf;
      for (int b = 0; b < 4; b++) begin
        waddr[b] = 6'(a);
        wdata[b] = 20'($urandom);
        ref_mem[b][a] = wdata[b];
      end
    end
    for (int i = 0; i < 1000; i++) begin
      @(negedge clk);
      we = 4'($urandom);
      for (int b = 0; b < 4; b++) begin
        waddr[b] = 6'($urandom);
        wdata[b] = 20'($urandom);
        raddr[b] = (i % 5 == 0) ? waddr[b] : 6'($urandom);
      end
      #1;
      for (int b = 0; b < 4; b++) begin
        checks++;
        if (rdata[b] != ref_mem[b][raddr[b]]) begin
          failures++;
          if (failures < 10) $display("bank %0d addr %0d got %0d exp %0d", b, raddr[b], rdata[b], ref_mem[b][raddr[b]]);
        end
      end
      @(posedge clk);
      for (int b = 0; b < 4; b++) if (we[b]) ref_mem[b][waddr[b]] = wdata[b];
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

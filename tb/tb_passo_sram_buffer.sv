// Testbench for passo_sram_buffer (64 x 16) with unrelated write (300 MHz)
// and read (20 MHz) clocks: fills the buffer with random words, then reads
// every word back, checking the one-clock read latency.
module tb_passo_sram_buffer;
  localparam int D = 64;
  logic wclk = 0, rclk = 0, wen = 0;
  logic [5:0] waddr = 0, raddr = 0;
  logic [15:0] wdata = 0, rdata;
  logic [15:0] model [D];
  int checks = 0, failures = 0;

  passo_sram_buffer #(.WIDTH(16), .DEPTH(D)) dut (.*);

  always #1667ps wclk = ~wclk;
  always #25ns rclk = ~rclk;

  initial begin
    for (int pass = 0; pass < 3; pass++) begin
      for (int a = 0; a < D; a++) begin
        @(posedge wclk);
        #100ps;
        wen = 1; waddr = 6'(a); wdata = 16'($urandom);
        model[a] = wdata;
      end
      @(posedge wclk);
      #100ps wen = 0;
      for (int a = 0; a < D; a++) begin
        @(posedge rclk);
        #1ns raddr = 6'(a);
        @(posedge rclk);
        #1ns;
        checks++;
        if (rdata != model[a]) begin
          failures++;
          $display("FAIL: addr %0d got %h exp %h", a, rdata, model[a]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

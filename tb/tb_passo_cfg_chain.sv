// Testbench for passo_cfg_chain (LEN = 100): shifts a random pattern in,
// checks shift_out returns each bit exactly LEN shifts later, that bit 0
// holds the first bit sent, that shift_en low holds the chain, and that
// rstb_cfg clears it.
module tb_passo_cfg_chain;
  localparam int LEN = 100;
  logic cclk = 0, rstb_cfg = 0, shift_en = 0, shift_in = 0, shift_out;
  logic [LEN-1:0] cfg;
  logic sent [$];
  int checks = 0, failures = 0;

  passo_cfg_chain #(.LEN(LEN)) dut (.*);

  always #5 cclk = ~cclk;

  task automatic check(input logic ok, input string msg);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", msg);
    end
  endtask

  initial begin
    logic [LEN-1:0] held;
    #12 rstb_cfg = 1;
    check(cfg == '0, "cleared by reset");
    shift_en = 1;
    for (int n = 0; n < 3 * LEN; n++) begin
      shift_in = 1'($urandom);
      sent.push_back(shift_in);
      @(posedge cclk);
      #1;
      if (sent.size() > LEN) void'(sent.pop_front());
      if (n >= LEN - 1) check(shift_out == sent[0], $sformatf("shift_out at %0d", n));
      if (n == LEN - 1) begin
        for (int i = 0; i < LEN; i++) check(cfg[i] == sent[i], $sformatf("cfg[%0d]", i));
      end
    end
    shift_en = 0;
    held = cfg;
    repeat (10) @(posedge cclk);
    #1 check(cfg == held, "hold with shift_en low");
    rstb_cfg = 0;
    #1 check(cfg == '0, "asynchronous clear");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

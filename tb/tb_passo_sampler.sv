// Testbench for passo_sampler (256 neurons, 64-word buffer). For presets
// 0..4 and 7 (which acts as 4) it holds a random neuron pattern, lets one
// burst run, and checks: 64 writes on consecutive clocks to addresses
// 0..63; word k of each sample equals neurons 16k..16k+15 (k = address
// mod 2^p); one sample tick per 2^p clocks; full_tgl toggles once; and
// nothing is written until drained_tgl answers.
module tb_passo_sampler;
  localparam int N = 256, D = 64;
  logic tclk = 0, rstb = 0;
  logic [N-1:0] neuron_async = 0;
  logic [2:0] preset = 0;
  logic drained_tgl = 0;
  logic wen, full_tgl, sample_tick, bursting;
  logic [5:0] waddr;
  logic [15:0] wdata;
  int checks = 0, failures = 0;

  passo_sampler #(.N(N), .DEPTH(D)) dut (.*);

  always #1667ps tclk = ~tclk;

  task automatic check(input logic ok, input string msg);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", msg);
    end
  endtask

  task automatic burst(input int pset);
    int writes, ticks, first, last, cyc, p;
    logic ft;
    p = (pset > 4) ? 4 : pset;
    writes = 0; ticks = 0; first = -1; last = -1; cyc = 0;
    ft = full_tgl;
    while (full_tgl == ft && cyc < 1000) begin
      @(posedge tclk);
      #100ps;
      cyc++;
      if (sample_tick) ticks++;
      if (wen) begin
        if (first < 0) first = cyc;
        last = cyc;
        check(int'(waddr) == writes, $sformatf("address %0d exp %0d", waddr, writes));
        check(wdata == neuron_async[(writes % (1 << p)) * 16 +: 16],
              $sformatf("preset %0d word %0d data %h", pset, writes, wdata));
        writes++;
      end
    end
    // the last write lands with the toggle
    @(posedge tclk);
    #100ps;
    if (wen) begin writes++; last = cyc + 1; end
    check(writes == D, $sformatf("preset %0d: %0d writes", pset, writes));
    check(last - first == D - 1, "one write per clock");
    check(ticks == D >> p, $sformatf("preset %0d: %0d sample ticks", pset, ticks));
    repeat (20) begin
      @(posedge tclk);
      #100ps check(!wen && !bursting, "idle until drained");
    end
  endtask

  initial begin
    int ps [6] = '{0, 1, 2, 3, 4, 7};
    neuron_async = {8{$urandom}};
    #20ns rstb = 1;
    burst(0);
    for (int i = 1; i < 6; i++) begin
      neuron_async = {8{$urandom}};
      preset = 3'(ps[i]);
      #10ns drained_tgl = ~drained_tgl;
      burst(ps[i]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100us;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

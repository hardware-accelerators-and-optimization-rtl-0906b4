// Testbench for passo_streamout (16-word buffer) with a model SRAM read
// port (one clock of latency). Three buffer readouts: the serial bits must
// rebuild every word, most significant bit first; tx_valid and the data bit
// must hold while rx_ready is low; drained_tgl must toggle once per
// readout; with rx_ready held high the words must leave every 16 IO clocks.
module tb_passo_streamout;
  localparam int D = 16;
  logic ioclk = 0, rstb = 0, full_tgl = 0, drained_tgl;
  logic [3:0] raddr;
  logic [15:0] rdata;
  logic streamout_tx_valid, streamout_rx_ready = 0, sample_streamout, word_done;
  logic [15:0] mem [D];
  int checks = 0, failures = 0;

  passo_streamout #(.DEPTH(D)) dut (.*);

  always #25ns ioclk = ~ioclk;
  always @(posedge ioclk) rdata <= mem[raddr];

  task automatic check(input logic ok, input string msg);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", msg);
    end
  endtask

  task automatic readout(input bit fast);
    logic [15:0] word;
    int nbits, nwords, cyc, first_done, last_done;
    logic dt, held_bit, was_stalled;
    foreach (mem[i]) mem[i] = 16'($urandom);
    dt = drained_tgl;
    full_tgl = ~full_tgl;
    nbits = 0; nwords = 0; cyc = 0; first_done = -1; last_done = -1;
    was_stalled = 0;
    while (nwords < D && cyc < 5000) begin
      streamout_rx_ready = fast ? 1'b1 : 1'($urandom % 3 == 0);
      #1ns;
      if (was_stalled) check(streamout_tx_valid && sample_streamout == held_bit, "hold while not ready");
      was_stalled = streamout_tx_valid && !streamout_rx_ready;
      held_bit = sample_streamout;
      if (streamout_tx_valid && streamout_rx_ready) begin
        word = {word[14:0], sample_streamout};
        nbits++;
        if (nbits == 16) begin
          check(word == mem[nwords], $sformatf("word %0d got %h exp %h", nwords, word, mem[nwords]));
          if (first_done < 0) first_done = cyc;
          last_done = cyc;
          nwords++;
          nbits = 0;
        end
      end
      @(posedge ioclk);
      #1ns cyc++;
    end
    streamout_rx_ready = 0;
    check(nwords == D, $sformatf("%0d words", nwords));
    if (fast) check(last_done - first_done == 16 * (D - 1), $sformatf("rate: %0d clocks for %0d words", last_done - first_done, D - 1));
    repeat (3) @(posedge ioclk);
    #1ns;
    check(drained_tgl != dt && !streamout_tx_valid, "drained toggled, idle");
  endtask

  initial begin
    #100ns rstb = 1;
    readout(0);
    readout(1);
    readout(0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #2ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

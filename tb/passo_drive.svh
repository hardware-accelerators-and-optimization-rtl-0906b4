// Shared stimulus and checking tasks for the PASSO chip testbenches.
// Included inside a testbench module that declares the passo_* signals
// connected to the chip's ports, the counters checks/failures, the
// parameter DEPTH (SRAM words), and the task check().
//
// Configuration used: neuron i has zero weights and bias +127 when
// i % 3 == 0 (output almost always 1) and -128 otherwise (almost always
// 0); the 32 bias trims hold j*3+1; the preset is given per call. The
// test cluster's neurons 0 and 3 are on, 1 and 2 off.

localparam int P_NEURONS = 256;
localparam int P_CHAIN   = 256 * 74 + 32 * 7 + 3;
localparam int P_TEST    = 4 * 74;

logic passo_ref_bit [P_CHAIN];
int   stall_cycles = 0, bursts_checked = 0, preset_switches = 0;

function automatic logic expected_on(input int i);
  return (i % 3) == 0;
endfunction

// Build the chain image for a preset and shift it in, after a 64-bit
// marker. The marker must come out of config_shift_out after exactly
// P_CHAIN shifts, which checks the chain length.
task automatic load_config(input int preset);
  logic [63:0] marker;
  int          outpos;
  for (int b = 0; b < P_CHAIN; b++) passo_ref_bit[b] = 1'b0;
  for (int i = 0; i < P_NEURONS; i++) begin
    logic [7:0] bias;
    bias = expected_on(i) ? 8'sd127 : -8'sd128;
    for (int k = 0; k < 8; k++) passo_ref_bit[i*74 + 32 + k] = bias[k];
  end
  for (int j = 0; j < 32; j++)
    for (int k = 0; k < 7; k++) passo_ref_bit[256*74 + j*7 + k] = 1'((j*3 + 1) >> k);
  for (int k = 0; k < 3; k++) passo_ref_bit[256*74 + 224 + k] = 1'(preset >> k);
  marker = {$urandom, $urandom};
  outpos = 0;
  passo_config_shift_en = 1;
  for (int n = 0; n < 64 + P_CHAIN; n++) begin
    passo_config_shift_in = (n < 64) ? marker[n] : passo_ref_bit[n - 64];
    @(posedge passo_cclk);
    #1ns;
    if (n >= P_CHAIN - 1 && n < P_CHAIN + 63 &&
        passo_config_shift_out != marker[n + 1 - P_CHAIN]) outpos++;
  end
  passo_config_shift_en = 0;
  check(outpos == 0, $sformatf("marker through the chain: %0d mismatches", outpos));
  for (int j = 0; j < 32; j++)
    check(passo_bias_trim[j] == 7'(j*3 + 1), $sformatf("bias trim %0d", j));
endtask

task automatic load_test_cluster();
  logic [P_TEST-1:0] img;
  img = '0;
  img[0*74 + 32 +: 8] = 8'sd127;
  img[1*74 + 32 +: 8] = -8'sd128;
  img[2*74 + 32 +: 8] = -8'sd128;
  img[3*74 + 32 +: 8] = 8'sd127;
  passo_test_config_shift_en = 1;
  for (int n = 0; n < P_TEST; n++) begin
    passo_test_config_shift_in = img[n];
    @(posedge passo_test_cclk);
    #1ns;
  end
  passo_test_config_shift_en = 0;
endtask

task automatic check_test_cluster();
  int hits;
  hits = 0;
  for (int t = 0; t < 200; t++) begin
    #7ns;
    hits += int'(passo_test_neuron_outputs == 4'b1001);
  end
  check(hits > 180, $sformatf("test cluster pattern seen %0d of 200", hits));
endtask

// Receive `words` serial words; optionally compare each with the expected
// neuron pattern for preset p (word k of a sample = neurons 16k..16k+15).
// slow: rx_ready random; otherwise held high and the word rate is checked.
task automatic receive(input int words, input bit compare, input int p,
                       input bit slow, output int good, output int total_bits);
  logic [15:0] w;
  int nb, nw, cyc, first_done, last_done, idx;
  nb = 0; nw = 0; cyc = 0; good = 0; total_bits = 0;
  first_done = -1; last_done = -1;
  while (nw < words && cyc < words * 200 + 5000) begin
    passo_streamout_rx_ready = slow ? 1'($urandom % 2) : 1'b1;
    #1ns;
    if (passo_streamout_tx_valid && !passo_streamout_rx_ready) stall_cycles++;
    if (passo_streamout_tx_valid && passo_streamout_rx_ready) begin
      w = {w[14:0], passo_sample_streamout};
      nb++;
      if (nb == 16) begin
        if (compare) begin
          idx = nw % (1 << p);
          for (int j = 0; j < 16; j++) begin
            good += int'(w[j] == expected_on(idx * 16 + j));
            total_bits++;
          end
        end
        if (first_done < 0) first_done = cyc;
        last_done = cyc;
        nb = 0;
        nw++;
      end
    end
    @(posedge passo_ioclk);
    #1ns cyc++;
  end
  passo_streamout_rx_ready = 0;
  check(nw == words, $sformatf("received %0d of %0d words", nw, words));
  if (!slow && words > 1)
    check(last_done - first_done == 16 * (words - 1),
          $sformatf("word rate: %0d IO clocks for %0d words", last_done - first_done, words - 1));
endtask

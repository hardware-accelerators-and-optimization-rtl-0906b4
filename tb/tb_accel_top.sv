// End-to-end testbench of accel_top with the PASSO sample buffer reduced
// to 64 words (the RBM sampler at its full 32 x 32 size). Both designs run
// at the same time:
//  - RBM: programmed through its host port (clamped visible nodes 0..7,
//    biased nodes 16..31), 300 samples read by a slow host (the core must
//    stall), then 100 samples with a ready host at one per clock;
//  - PASSO: the full configuration chain, test cluster, two bursts at
//    preset 4 (one with backpressure), a reload to preset 0 while the
//    stream is paused, and one compared burst at preset 0.
// Each mechanism (RBM stall, clamping, streamout backpressure, burst
// re-arm, preset switch) is counted and must have happened.
module tb_accel_top;
  localparam int DEPTH = 64;
  `include "accel_tb_body.svh"

  accel_top #(.SRAM_DEPTH(DEPTH)) dut (.*);

  initial begin
    int good, total;
    fork
      rbm_sequence(300, 100);
      begin
        #100ns passo_rstb_cfg = 1;
        passo_test_rstb_cfg = 1;
        load_config(4);
        load_test_cluster();
        passo_rstb_a = 1;
        #500ns passo_rstb = 1;
        check_test_cluster();
        receive(DEPTH, 1, 4, 1, good, total);
        check(good * 100 > total * 98, $sformatf("burst 1: %0d of %0d bits", good, total));
        bursts_checked++;
        receive(DEPTH, 1, 4, 0, good, total);
        check(good * 100 > total * 98, $sformatf("burst 2: %0d of %0d bits", good, total));
        bursts_checked++;
        receive(DEPTH / 2, 0, 4, 1, good, total);
        load_config(0);
        preset_switches++;
        receive(DEPTH / 2, 0, 4, 0, good, total);
        receive(DEPTH, 1, 0, 0, good, total);
        check(good * 100 > total * 98, $sformatf("burst 4 (preset 0): %0d of %0d bits", good, total));
        bursts_checked++;
      end
    join
    check(rbm_stalls > 0, $sformatf("RBM stall clocks: %0d", rbm_stalls));
    check(rbm_clamped > 0, $sformatf("RBM clamped samples: %0d", rbm_clamped));
    check(stall_cycles > 0, $sformatf("PASSO backpressure stalls: %0d", stall_cycles));
    check(bursts_checked == 3, "PASSO bursts re-armed");
    check(preset_switches == 1, "PASSO preset switch");
    $display("mechanisms: rbm_stalls=%0d rbm_clamped=%0d passo_stalls=%0d bursts=%0d preset_switches=%0d",
             rbm_stalls, rbm_clamped, stall_cycles, bursts_checked, preset_switches);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #6ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// Full-size testbench of accel_top with every parameter at its default
// (32 x 32 RBM, 256-neuron PASSO fabric, 1024-word sample buffer). One
// complete operation of each design: the RBM is programmed and delivers
// 200 samples; the PASSO chip is configured through its 19171-bit chain
// and one full 1024-word burst at preset 4 is streamed out and compared.
module tb_accel_top_full;
  localparam int DEPTH = 1024;
  `include "accel_tb_body.svh"

  accel_top dut (.*);

  initial begin
    int good, total;
    fork
      rbm_sequence(100, 100);
      begin
        #100ns passo_rstb_cfg = 1;
        passo_test_rstb_cfg = 1;
        load_config(4);
        load_test_cluster();
        passo_rstb_a = 1;
        #500ns passo_rstb = 1;
        check_test_cluster();
        receive(DEPTH, 1, 4, 0, good, total);
        check(good * 100 > total * 98, $sformatf("burst: %0d of %0d bits", good, total));
      end
    join
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

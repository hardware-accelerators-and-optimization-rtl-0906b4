// Testbench for rbm_core (4 visible x 4 hidden). Statistical checks of the
// Gibbs updates over many clocks:
//  - zero weights and biases: every node is 1 about half the time;
//  - a strong weight W[0][0] with visible node 0 clamped to 1 (0) drives
//    hidden node 0 mostly to 1 (0): hidden nodes read weight columns;
//  - a strong weight W[1][2] with hidden node 2 forced by its bias drives
//    visible node 1 the same way: visible nodes read weight rows;
//  - clamped visible nodes equal their clamp value on every sample;
//  - with en low the states hold and sample_valid stays low.
module tb_rbm_core;
  localparam int NV = 4, NH = 4;
  logic clk = 0, rst = 1, en = 0;
  logic signed [7:0] weight [NV][NH];
  logic signed [7:0] vbias [NV];
  logic signed [7:0] hbias [NH];
  logic [NV-1:0] clamp_en, clamp_val, v_state;
  logic [NH-1:0] h_state;
  logic sample_valid;
  int checks = 0, failures = 0;
  int vcnt [NV];
  int hcnt [NH];

  rbm_core #(.NV(NV), .NH(NH), .FRAC_BITS(4)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(input logic ok, input string msg);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", msg);
    end
  endtask

  task automatic run(input int n);
    foreach (vcnt[i]) vcnt[i] = 0;
    foreach (hcnt[i]) hcnt[i] = 0;
    en = 1;
    for (int k = 0; k < n; k++) begin
      @(posedge clk);
      #1;
      check(sample_valid, "sample_valid while enabled");
      for (int i = 0; i < NV; i++) begin
        vcnt[i] += int'(v_state[i]);
        if (clamp_en[i]) check(v_state[i] == clamp_val[i], "clamped node holds its value");
      end
      for (int i = 0; i < NH; i++) hcnt[i] += int'(h_state[i]);
    end
    en = 0;
  endtask

  initial begin
    logic [NV-1:0] vh;
    logic [NH-1:0] hh;
    foreach (weight[v, h]) weight[v][h] = 0;
    foreach (vbias[v]) vbias[v] = 0;
    foreach (hbias[h]) hbias[h] = 0;
    clamp_en = 0;
    clamp_val = 0;
    repeat (2) @(posedge clk);
    #1 rst = 0;

    run(2000);
    for (int i = 0; i < NV; i++) check(vcnt[i] > 800 && vcnt[i] < 1200, $sformatf("v%0d unbiased count %0d", i, vcnt[i]));
    for (int i = 0; i < NH; i++) check(hcnt[i] > 800 && hcnt[i] < 1200, $sformatf("h%0d unbiased count %0d", i, hcnt[i]));

    weight[0][0] = 127;
    hbias[0] = -64;
    clamp_en = 4'b0001; clamp_val = 4'b0001;
    run(1000);
    check(hcnt[0] > 900, $sformatf("h0 with v0=1: %0d", hcnt[0]));
    clamp_val = 4'b0000;
    run(1000);
    check(hcnt[0] < 100, $sformatf("h0 with v0=0: %0d", hcnt[0]));

    clamp_en = 0;
    weight[0][0] = 0;
    hbias[0] = 0;
    weight[1][2] = 127;
    vbias[1] = -64;
    hbias[2] = 127;
    run(1000);
    check(vcnt[1] > 900, $sformatf("v1 with h2 on: %0d", vcnt[1]));
    hbias[2] = -128;
    run(1000);
    check(vcnt[1] < 100, $sformatf("v1 with h2 off: %0d", vcnt[1]));

    @(posedge clk);
    #1 vh = v_state; hh = h_state;
    repeat (10) begin
      @(posedge clk);
      #1 check(v_state == vh && h_state == hh && !sample_valid, "hold while en low");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// Testbench for rbm_param_mem (4 visible x 8 hidden): random writes to
// weights, biases and clamps are mirrored in a reference model and every
// output array is compared after each write; reset must clear everything.
module tb_rbm_param_mem;
  localparam int NV = 4, NH = 8;
  logic clk = 0, rst = 1;
  logic w_we, vb_we, hb_we, cl_we;
  logic [1:0] w_v, b_v;
  logic [2:0] w_h, b_h;
  logic signed [7:0] wdata;
  logic [1:0] cl_data;
  logic signed [7:0] weight [NV][NH];
  logic signed [7:0] vbias [NV];
  logic signed [7:0] hbias [NH];
  logic [NV-1:0] clamp_en, clamp_val;
  logic signed [7:0] rw [NV][NH];
  logic signed [7:0] rvb [NV];
  logic signed [7:0] rhb [NH];
  logic [NV-1:0] ren, rval;
  int checks = 0, failures = 0;

  rbm_param_mem #(.NV(NV), .NH(NH)) dut (.*);

  always #5 clk = ~clk;

  task automatic compare(input string when);
    logic ok;
    ok = (clamp_en == ren) && (clamp_val == rval);
    for (int v = 0; v < NV; v++) begin
      ok &= (vbias[v] == rvb[v]);
      for (int h = 0; h < NH; h++) ok &= (weight[v][h] == rw[v][h]);
    end
    for (int h = 0; h < NH; h++) ok &= (hbias[h] == rhb[h]);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: mismatch %s", when);
    end
  endtask

  initial begin
    {w_we, vb_we, hb_we, cl_we} = '0;
    foreach (rw[v, h]) rw[v][h] = 0;
    foreach (rvb[v]) rvb[v] = 0;
    foreach (rhb[h]) rhb[h] = 0;
    ren = 0;
    rval = 0;
    repeat (2) @(posedge clk);
    #1 rst = 0;
    compare("after reset");
    for (int n = 0; n < 500; n++) begin
      {w_we, vb_we, hb_we, cl_we} = 4'($urandom);
      w_v = 2'($urandom); w_h = 3'($urandom);
      b_v = 2'($urandom); b_h = 3'($urandom);
      wdata = 8'($urandom); cl_data = 2'($urandom);
      @(posedge clk);
      if (w_we) rw[w_v][w_h] = wdata;
      if (vb_we) rvb[b_v] = wdata;
      if (hb_we) rhb[b_h] = wdata;
      if (cl_we) begin ren[b_v] = cl_data[0]; rval[b_v] = cl_data[1]; end
      #1 compare($sformatf("write %0d", n));
    end
    {w_we, vb_we, hb_we, cl_we} = '0;
    rst = 1;
    @(posedge clk);
    #1 rst = 0;
    foreach (rw[v, h]) rw[v][h] = 0;
    foreach (rvb[v]) rvb[v] = 0;
    foreach (rhb[h]) rhb[h] = 0;
    ren = 0;
    rval = 0;
    compare("second reset");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

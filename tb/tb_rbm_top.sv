// End-to-end testbench of the RBM sampler at its default size (32 x 32),
// programmed only through the host write port:
//  - visible 0..7 clamped to a pattern; hidden 0..7 copy them through
//    W[h][h] = +127 and bias -64; visible 8..15 copy hidden 0..7 back
//    through W[v][v-8] = +127 and bias -64 (the symmetric RBM couples
//    them back, so only the bits whose clamp is 1 have a fixed outcome:
//    they must mostly read 1); visible 16..23 have bias +127
//    (almost always 1); visible 24..31 bias -128 (always 0);
//  - a run of 400 samples read by a slow host (the core must stall and no
//    sample may be lost), then a run of 200 with the host always ready,
//    which must deliver one sample per clock, after a new clamp pattern.
module tb_rbm_top;
  logic clk = 0, rst = 1;
  logic cmd_valid = 0, cmd_ready;
  logic [15:0] cmd_addr = 0, cmd_data = 0;
  logic out_valid, out_ready = 0;
  logic [31:0] out_data;
  logic busy, stall;
  int checks = 0, failures = 0, stalls = 0, got = 0, follow = 0, ones = 0;

  rbm_top dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) if (stall) stalls++;

  task automatic check(input logic ok, input string msg);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", msg);
    end
  endtask

  task automatic wr(input logic [1:0] region, input int ofs, input int data);
    cmd_valid = 1;
    cmd_addr  = {region, 14'(ofs)};
    cmd_data  = 16'(data);
    @(posedge clk);
    #1 cmd_valid = 0;
  endtask

  task automatic set_clamp(input logic [7:0] pat);
    for (int v = 0; v < 8; v++) wr(2'd3, 1 + v, {30'd0, pat[v], 1'b1});
  endtask

  task automatic collect(input int n, input logic [7:0] pat, input bit slow,
                         output int cycles);
    int k;
    k = 0;
    cycles = 0;
    follow = 0;
    ones = 0;
    wr(2'd3, 0, n);
    while (k < n && cycles < 20 * n) begin
      out_ready = slow ? ($urandom % 3 == 0) : 1'b1;
      #1;
      if (out_valid && out_ready) begin
        check(out_data[7:0] == pat, $sformatf("clamped bits %02h", out_data[7:0]));
        check(out_data[31:24] == 8'h00, "bias -128 nodes are 0");
        ones += $countones(out_data[23:16]);
        if (k >= 4) follow += $countones(out_data[15:8] & pat);
        k++;
      end
      @(posedge clk);
      #1 cycles++;
    end
    out_ready = 0;
    got = k;
  endtask

  initial begin
    int cyc;
    repeat (3) @(posedge clk);
    #1 rst = 0;
    for (int h = 0; h < 8; h++) begin
      wr(2'd0, h * 32 + h, 127);
      wr(2'd2, h, -64);
    end
    for (int v = 8; v < 16; v++) begin
      wr(2'd0, v * 32 + (v - 8), 127);
      wr(2'd1, v, -64);
    end
    for (int v = 16; v < 24; v++) wr(2'd1, v, 127);
    for (int v = 24; v < 32; v++) wr(2'd1, v, -128);
    set_clamp(8'b1011_0010);

    collect(400, 8'b1011_0010, 1, cyc);
    check(got == 400, $sformatf("slow host received %0d of 400", got));
    check(stalls > 0, $sformatf("core stalled %0d clocks", stalls));
    check(ones > 400 * 8 * 95 / 100, $sformatf("bias +127 ones %0d", ones));
    check(follow > 396 * $countones(8'b1011_0010) * 90 / 100, $sformatf("copied bits matched %0d", follow));

    set_clamp(8'b0110_1001);
    stalls = 0;
    collect(200, 8'b0110_1001, 0, cyc);
    check(got == 200, $sformatf("fast host received %0d of 200", got));
    check(cyc <= 200 + 4, $sformatf("200 samples took %0d clocks", cyc));
    check(stalls == 0, "no stall with a ready host");
    check(follow > 196 * $countones(8'b0110_1001) * 90 / 100, $sformatf("copied bits matched %0d", follow));
    repeat (3) @(posedge clk);
    #1 check(!busy && !out_valid, "idle after the run");
    $display("mechanisms: stall clocks (slow run) seen, clamp changes 2");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

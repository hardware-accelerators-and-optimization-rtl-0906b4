// Workload testbench: the TSP 2-reversal local-search sub-problem (k = 2)
// solved by sampling on the full-size RBM sampler.
//
// For two tour segments with end cities (u1, v1) and (u2, v2), variable y_i
// reverses segment i and the cost of a choice is
//   E(y1, y2) = q(y2, y1) + q(y1, y2),
//   q(a, b)   = d(v_a,u_b)(1-y_a)(1-y_b) + d(u_a,u_b) y_a(1-y_b)
//             + d(v_a,v_b)(1-y_a) y_b     + d(u_a,v_b) y_a y_b.
// Written as E = E00 + B y1 + C y2 + D y1 y2, it maps onto one visible node
// (y1) and one hidden node (y2) with bias_v = -B/T, bias_h = -C/T and
// W = -D/T, so the sampler draws (y1, y2) with probability exp(-E/T)/Z.
// For 6 random instances (random city coordinates) the testbench programs
// the weights through the host port, takes 4000 Gibbs steps, pairs each
// visible state with the next hidden state, and checks that
//  - the most frequent pair is a cheapest choice of reversals (reversing
//    both segments gives the same tour as reversing neither, so the
//    cheapest cost is always shared by two pairs), and
//  - each pair's frequency is within 0.04 of the exact Boltzmann
//    probability of the quantized weights.
// The node registers are observed inside the core to form the pairs.
module tb_rbm_tsp_2rev;
  logic clk = 0, rst = 1;
  logic cmd_valid = 0, cmd_ready;
  logic [15:0] cmd_addr = 0, cmd_data = 0;
  logic out_valid, out_ready = 1;
  logic [31:0] out_data;
  logic busy, stall;
  int checks = 0, failures = 0;

  rbm_top dut (.*);

  always #5 clk = ~clk;

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

  function automatic real fabs(input real x);
    return (x < 0.0) ? -x : x;
  endfunction

  function automatic int sat8(input real x);
    int q;
    q = (x >= 0.0) ? int'(x + 0.5) : -int'(-x + 0.5);
    return (q > 127) ? 127 : (q < -128) ? -128 : q;
  endfunction

  initial begin
    real cx [4], cy [4];
    real d [4][4];
    real e [4];
    real B, C, D, s, z, pexact [4];
    int  bv, bh, w, best, top, n;
    int  cnt [4];
    logic v_prev;
    repeat (3) @(posedge clk);
    #1 rst = 0;
    for (int v = 1; v < 32; v++) wr(2'd1, v, -128);   // unused visible nodes off
    for (int inst = 0; inst < 6; inst++) begin
      // cities 0,1 = u1,v1 ; 2,3 = u2,v2 on a 100 x 100 square
      for (int i = 0; i < 4; i++) begin
        cx[i] = real'($urandom % 100);
        cy[i] = real'($urandom % 100);
      end
      for (int i = 0; i < 4; i++)
        for (int j = 0; j < 4; j++)
          d[i][j] = $sqrt((cx[i]-cx[j])**2 + (cy[i]-cy[j])**2);
      // index = y1 + 2*y2; u_a = city 2a, v_a = city 2a+1
      for (int k = 0; k < 4; k++) begin
        int y [2];
        y[0] = k % 2;
        y[1] = k / 2;
        e[k] = 0.0;
        for (int a = 0; a < 2; a++) begin
          int b;
          b = 1 - a;
          e[k] += (y[a] ? (y[b] ? d[2*a][2*b+1] : d[2*a][2*b])
                        : (y[b] ? d[2*a+1][2*b+1] : d[2*a+1][2*b]));
        end
      end
      B = e[1] - e[0];
      C = e[2] - e[0];
      D = e[3] - e[1] - e[2] + e[0];
      s = 80.0 / (((fabs(B) > fabs(C)) ? fabs(B) : fabs(C)) + fabs(D) + 1.0);
      bv = sat8(-B * s);
      bh = sat8(-C * s);
      w  = sat8(-D * s);
      // exact Boltzmann probabilities of the quantized model (1 LSB = 1/16)
      z = 0.0;
      for (int k = 0; k < 4; k++) begin
        pexact[k] = $exp((real'(bv) * (k % 2) + real'(bh) * (k / 2) + real'(w) * (k % 2) * (k / 2)) / 16.0);
        z += pexact[k];
      end
      for (int k = 0; k < 4; k++) pexact[k] /= z;
      best = 0;
      for (int k = 1; k < 4; k++) if (e[k] < e[best]) best = k;

      wr(2'd0, 0, w);
      wr(2'd1, 0, bv);
      wr(2'd2, 0, bh);
      foreach (cnt[k]) cnt[k] = 0;
      wr(2'd3, 0, 4100);
      n = 0;
      v_prev = 0;
      for (int t = 0; t < 4100; t++) begin
        @(posedge clk);
        #1;
        // v(t) is drawn from h(t-1); h(t+1) from v(t): pair v(t) with h(t+1)
        if (t >= 100 && t % 2 == 0) v_prev = dut.u_core.v_state[0];
        if (t >= 101 && t % 2 == 1) begin
          cnt[int'(v_prev) + 2 * int'(dut.u_core.h_state[0])]++;
          n++;
        end
      end
      top = 0;
      for (int k = 1; k < 4; k++) if (cnt[k] > cnt[top]) top = k;
      $display("instance %0d: E = %0.1f %0.1f %0.1f %0.1f, best %0d, counts %0d %0d %0d %0d, exact %0.3f %0.3f %0.3f %0.3f",
               inst, e[0], e[1], e[2], e[3], best, cnt[0], cnt[1], cnt[2], cnt[3],
               pexact[0], pexact[1], pexact[2], pexact[3]);
      check(e[top] <= e[best] + 1e-6, $sformatf("instance %0d: most frequent %0d, cheapest %0d", inst, top, best));
      for (int k = 0; k < 4; k++)
        check(fabs(real'(cnt[k]) / real'(n) - pexact[k]) < 0.04,
              $sformatf("instance %0d state %0d: %0d of %0d, exact %0.3f", inst, k, cnt[k], n, pexact[k]));
      while (busy || out_valid) @(posedge clk);
      #1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

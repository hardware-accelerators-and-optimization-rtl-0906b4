// Testbench for passo_fabric at its default 16x16 size. Every neuron gets
// random small weights and biases; at 300 instants the DAC code of every
// neuron is compared with a reference built from its four grid neighbours'
// current outputs (north, east, south, west, zero outside the grid). Two
// neurons with extreme biases and no weights check the outputs themselves.
module tb_passo_fabric;
  localparam int R = 16, C = 16, N = R * C;
  logic rstb_a = 0;
  logic [N*74-1:0] cfg;
  logic [N-1:0] out;
  logic [6:0] dac_code [N];
  int checks = 0, failures = 0, on_hi = 0, on_lo = 0, toggles = 0;

  passo_fabric #(.R(R), .C(C)) dut (.*);

  function automatic int ref_code(input int i);
    int r, c, s;
    logic [3:0] h;
    r = i / C;
    c = i % C;
    h[0] = (r > 0)     ? out[i - C] : 1'b0;
    h[1] = (c < C - 1) ? out[i + 1] : 1'b0;
    h[2] = (r < R - 1) ? out[i + C] : 1'b0;
    h[3] = (c > 0)     ? out[i - 1] : 1'b0;
    s = int'($signed(cfg[i*74 + 32 +: 8])) + 64;
    for (int k = 0; k < 4; k++) if (h[k]) s += int'($signed(cfg[i*74 + 8*k +: 8]));
    return (s < 0) ? 0 : (s > 127) ? 127 : s;
  endfunction

  initial begin
    logic [N-1:0] prev;
    for (int i = 0; i < N; i++) begin
      cfg[i*74 +: 74] = '0;
      for (int k = 0; k < 4; k++) cfg[i*74 + 8*k +: 8] = 8'($urandom % 41) - 8'sd20;
      cfg[i*74 + 32 +: 8] = 8'($urandom % 41) - 8'sd20;
    end
    cfg[5*74 +: 40] = {8'sd127, 32'd0};     // neuron 5: always on
    cfg[77*74 +: 40] = {-8'sd128, 32'd0};   // neuron 77: always off
    #10ns rstb_a = 1;
    #200ns;
    prev = out;
    for (int t = 0; t < 300; t++) begin
      #(3ns + 1ps * ($urandom % 5000));
      for (int i = 0; i < N; i++) begin
        checks++;
        if (int'(dac_code[i]) != ref_code(i)) begin
          failures++;
          $display("FAIL: neuron %0d code %0d exp %0d", i, dac_code[i], ref_code(i));
        end
      end
      on_hi += int'(out[5]);
      on_lo += int'(out[77]);
      toggles += $countones(out ^ prev);
      prev = out;
    end
    checks += 3;
    if (on_hi < 280) begin failures++; $display("FAIL: neuron 5 on %0d", on_hi); end
    if (on_lo > 5)   begin failures++; $display("FAIL: neuron 77 on %0d", on_lo); end
    if (toggles < 1000) begin failures++; $display("FAIL: toggles %0d", toggles); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

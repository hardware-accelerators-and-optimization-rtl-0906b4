// Testbench for rbm_mem_ctrl (NV = 32, NH = 32): random addresses in all
// four regions, in and out of range, checked against an independent decode
// of the address map.
module tb_rbm_mem_ctrl;
  import rbm_pkg::*;
  localparam int NV = 32, NH = 32;
  host_wr_t wr;
  logic w_we, vb_we, hb_we, cl_we, run_we;
  logic [4:0] w_v, w_h, b_v, b_h;
  logic signed [7:0] wdata;
  logic [1:0] cl_data;
  logic [15:0] run_len;
  int checks = 0, failures = 0;

  rbm_mem_ctrl #(.NV(NV), .NH(NH)) dut (.*);

  task automatic check(input logic ok, input string msg);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", msg);
    end
  endtask

  initial begin
    int reg_sel, ofs;
    for (int n = 0; n < 4000; n++) begin
      reg_sel = $urandom % 4;
      ofs = ($urandom % 4 == 0) ? int'($urandom % 16384) : int'($urandom % 1100);
      wr.valid = ($urandom % 8 != 0);
      wr.addr = 16'((reg_sel << 14) | ofs);
      wr.data = 16'($urandom);
      #1;
      check(w_we == (wr.valid && reg_sel == 0 && ofs < NV*NH), $sformatf("w_we addr %h", wr.addr));
      check(vb_we == (wr.valid && reg_sel == 1 && ofs < NV), $sformatf("vb_we addr %h", wr.addr));
      check(hb_we == (wr.valid && reg_sel == 2 && ofs < NH), $sformatf("hb_we addr %h", wr.addr));
      check(run_we == (wr.valid && reg_sel == 3 && ofs == 0), $sformatf("run_we addr %h", wr.addr));
      check(cl_we == (wr.valid && reg_sel == 3 && ofs >= 1 && ofs <= NV), $sformatf("cl_we addr %h", wr.addr));
      if (w_we) check(w_v == 5'(ofs / NH) && w_h == 5'(ofs % NH), "weight index");
      if (vb_we) check(b_v == 5'(ofs), "vbias index");
      if (hb_we) check(b_h == 5'(ofs), "hbias index");
      if (cl_we) check(b_v == 5'(ofs - 1) && cl_data == wr.data[1:0], "clamp index");
      if (run_we) check(run_len == wr.data, "run length");
      check(wdata == wr.data[7:0], "write data");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_target_mux: self-checking testbench of target_mux. Random requests are
// applied with addresses drawn from the two reserved addresses and the rest
// of the space; the testbench checks that exactly the right target sees
// valid, that the other fields pass through, and that the response of the
// selected target, and only that one, comes back.
`timescale 1ns/1ps
module tb_target_mux;
  import usb_lb_pkg::*;
  acc_req_t req, lb_req, i2c_req, jtag_req;
  acc_rsp_t rsp, lb_rsp, i2c_rsp, jtag_rsp;
  int checks = 0, failures = 0;
  int n_lb = 0, n_i2c = 0, n_jtag = 0;

  target_mux dut (.*);

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 600; i++) begin
      int t;
      req = acc_req_t'({$urandom, $urandom});
      t = $urandom % 3;
      if (t == 0) req.addr = 16'hFFFF;
      else if (t == 1) req.addr = 16'hFFFE;
      else if (req.addr >= 16'hFFFE) req.addr = 16'h0000;
      lb_rsp   = acc_rsp_t'({$urandom, 2'b01});
      i2c_rsp  = acc_rsp_t'({$urandom, 2'b10});
      jtag_rsp = acc_rsp_t'({$urandom, 2'b11});
      #1;
      check(lb_req.valid   == (req.valid && t == 2), "lb valid");
      check(i2c_req.valid  == (req.valid && t == 0), "i2c valid");
      check(jtag_req.valid == (req.valid && t == 1), "jtag valid");
      check(lb_req.addr == req.addr && i2c_req.wdata == req.wdata && jtag_req.we == req.we, "fields pass");
      case (t)
        0: begin check(rsp == i2c_rsp, "i2c response"); n_i2c++; end
        1: begin check(rsp == jtag_rsp, "jtag response"); n_jtag++; end
        default: begin check(rsp == lb_rsp, "lb response"); n_lb++; end
      endcase
    end
    check(n_lb > 0 && n_i2c > 0 && n_jtag > 0, "all targets exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

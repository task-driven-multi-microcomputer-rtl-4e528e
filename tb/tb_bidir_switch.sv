// tb_bidir_switch: exhaustive control settings with random data on both
// sides. Checks the Table 4.1 decode: 11 passes clockwise only, 00 passes
// counter-clockwise only, 01 isolates, 10 passes nothing and is flagged as
// illegal. Combinational block; the testbench waits 1 time unit per vector.
module tb_bidir_switch;
  import ccsb_pkg::*;
  logic [1:0] ctl;
  logic [7:0] ccw_side, cw_side, cw_out, ccw_out;
  logic       ccw_drv, cw_drv, cw_out_drv, ccw_out_drv, isolated, illegal;
  int checks = 0, failures = 0;

  bidir_switch #(.W(8)) dut (.*);

  task automatic check(input bit c, input string what);
    checks++;
    if (!c) begin failures++; $display("FAIL @%0t: %s", $time, what); end
  endtask

  initial begin
    #100000 $display("WATCHDOG");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  initial begin
    ctl = SW_ISO; ccw_side = '0; cw_side = '0; ccw_drv = 1'b0; cw_drv = 1'b0;
    for (int r = 0; r < 200; r++) begin
      ctl      = 2'($urandom_range(0, 3));
      ccw_side = 8'($urandom);
      cw_side  = 8'($urandom);
      ccw_drv  = 1'($urandom);
      cw_drv   = 1'($urandom);
      #1;
      check(cw_out_drv  == (ctl == SW_CW  && ccw_drv), "CW pass enable");
      check(ccw_out_drv == (ctl == SW_CCW && cw_drv),  "CCW pass enable");
      if (cw_out_drv)  check(cw_out == ccw_side, "CW data");
      if (ccw_out_drv) check(ccw_out == cw_side, "CCW data");
      check(isolated == (ctl == SW_ISO), "isolated flag");
      check(illegal  == (ctl == SW_BAD), "illegal flag");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_ctrl_interface: element and controller access to the 16-byte memory,
// the request latch, memory selection by the clear-request line, the
// Table 4.2 interrupt, the end-of-access interrupt and the switch status
// read-back with its XOR check. Inputs change on the falling clock edge.
module tb_ctrl_interface;
  import ccsb_pkg::*;
  logic       clk, rst_n;
  logic [3:0] e_addr, c_addr;
  logic [7:0] e_wdata, e_rdata, c_wdata, c_rdata;
  logic       e_we, e_req, e_owns, e_int_n, e_acc_irq, c_we, req_line, clr_n, e_sw_adj_xor;
  logic [1:0] sw_own, sw_adj, e_sw_own, e_sw_adj;
  int checks = 0, failures = 0;
  logic [7:0] model [16];

  ctrl_interface dut (.*);

  initial clk = 1'b0;
  always #5 clk = ~clk;

  task automatic check(input bit c, input string what);
    checks++;
    if (!c) begin failures++; $display("FAIL @%0t: %s", $time, what); end
  endtask

  initial begin
    #1000000 $display("WATCHDOG");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  initial begin
    rst_n = 1'b0; e_addr = '0; c_addr = '0; e_wdata = '0; c_wdata = '0;
    e_we = 1'b0; e_req = 1'b0; c_we = 1'b0; clr_n = 1'b1; sw_own = SW_ISO; sw_adj = SW_ISO;
    for (int i = 0; i < 16; i++) model[i] = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    check(e_owns && !req_line && e_int_n, "reset: element owns, no request");
    // Random accesses by whoever owns the memory.
    for (int r = 0; r < 300; r++) begin
      @(negedge clk);
      clr_n   = ($urandom_range(0, 2) != 0);
      e_addr  = 4'($urandom); c_addr = 4'($urandom);
      e_wdata = 8'($urandom); c_wdata = 8'($urandom);
      e_we    = 1'($urandom); c_we = 1'($urandom);
      if (clr_n && e_we) model[e_addr] = e_wdata;
      if (!clr_n && c_we) model[c_addr] = c_wdata;
      @(negedge clk);
      e_we = 1'b0; c_we = 1'b0;
      check(e_rdata == model[e_addr] && c_rdata == model[c_addr], "memory contents");
    end
    // Request latch and Table 4.2.
    @(negedge clk); clr_n = 1'b1; e_req = 1'b1;
    @(negedge clk); e_req = 1'b0;
    check(req_line && e_int_n, "request latched, no interrupt while waiting");
    @(negedge clk); clr_n = 1'b0;
    #1 check(!e_owns && !e_int_n, "controller selected: interrupt (req=1, clr=0)");
    @(negedge clk);
    check(!req_line && e_int_n, "clear request line clears the latch");
    @(negedge clk); e_req = 1'b1; e_we = 1'b1; e_addr = 4'd9; e_wdata = 8'h5A;
    @(negedge clk); e_req = 1'b0; e_we = 1'b0;
    check(e_rdata != 8'h5A, "element writes locked out while controller owns");
    check(req_line, "request raised during an access is kept");
    clr_n = 1'b1;
    #1 check(e_acc_irq, "end-of-access interrupt");
    @(posedge clk); #1;
    check(!e_acc_irq, "end-of-access interrupt is one cycle");
    check(req_line, "kept request still pending after the access");
    // The next access clears it.
    @(negedge clk); clr_n = 1'b0;
    @(negedge clk); clr_n = 1'b1;
    check(!req_line, "next access clears the kept request");
    // Switch status.
    for (int v = 0; v < 4; v++) begin
      sw_own = 2'(3 - v); sw_adj = 2'(v);
      #1 check(e_sw_own == 2'(3 - v) && e_sw_adj == 2'(v) && e_sw_adj_xor == (v == 1 || v == 2),
               "switch read-back and XOR");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

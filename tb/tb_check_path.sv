// tb_check_path: start a check with a random pair and pattern; the unit
// must send one K_CHECK request carrying the pattern, ignore diagnostic
// data from other elements, and report pass when the receiver returns the
// pattern, fail otherwise. Counters of passed and failed checks are checked.
module tb_check_path;
  import ccsb_pkg::*;
  logic       clk, rst_n, start, arb_valid, arb_ready, dd_valid, busy, done, pass;
  elem_id_t   a, b, dd_src;
  logic [7:0] pattern, dd_data, n_pass, n_fail;
  arb_req_t   arb_req;
  int checks = 0, failures = 0;
  int np, nf;

  check_path dut (.*);

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
    rst_n = 0; start = 0; a = '0; b = '0; pattern = '0; arb_ready = 0;
    dd_valid = 0; dd_src = '0; dd_data = '0;
    np = 0; nf = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int r = 0; r < 100; r++) begin
      bit good;
      int t;
      @(negedge clk);
      a = 4'($urandom); b = 4'(a + 4'($urandom_range(1, 15))); pattern = 8'($urandom);
      start = 1;
      @(negedge clk);
      start = 0;
      t = 0;
      while (!arb_valid && t < 10) begin @(negedge clk); t++; end
      check(arb_valid && arb_req.kind == K_CHECK && arb_req.src == a && arb_req.dst0 == b
            && arb_req.data0 == pattern, "check request to arbitration");
      check(busy, "busy while checking");
      repeat ($urandom_range(0, 3)) @(negedge clk);
      arb_ready = 1;
      @(negedge clk);
      arb_ready = 0;
      check(!arb_valid, "request taken");
      // Data from another element is ignored.
      dd_valid = 1; dd_src = 4'(b + 1); dd_data = pattern;
      @(negedge clk);
      dd_valid = 0;
      check(!done, "other element ignored");
      good = ($urandom_range(0, 2) != 0);
      dd_valid = 1; dd_src = b; dd_data = good ? pattern : ~pattern;
      @(negedge clk);
      dd_valid = 0;
      t = 0;
      while (!done && t < 10) begin @(negedge clk); t++; end
      check(done && pass == good, "result reported");
      if (good) np++; else nf++;
      @(negedge clk);
      check(int'(n_pass) == np && int'(n_fail) == nf && !busy, "counters");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

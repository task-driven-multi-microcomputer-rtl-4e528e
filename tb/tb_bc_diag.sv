// tb_bc_diag: one path at a time with a random length. After set-up and the
// allocation's `done`, `remaining` must start at length x CYC_PER_BYTE and
// count down; the path expires exactly TCT_GRACE+1 cycles after reaching
// zero unless cleared. Clears with each reason must bump the right counter.
// A length byte of 0 stands for 256 bytes. Small parameters (CYC_PER_BYTE=2, TCT_GRACE=8) keep the run short.
module tb_bc_diag;
  import ccsb_pkg::*;
  localparam int N = 16, TW = 12, CPB = 2, GR = 8;
  logic                 clk, rst_n, setup_valid, alloc_done, alloc_done_dismantle, clear_valid;
  elem_id_t             setup_src, alloc_done_src, clear_src;
  logic [7:0]           setup_len;
  logic [1:0]           clear_reason;
  logic [N-1:0]         active, expired;
  logic [N-1:0][TW-1:0] remaining;
  logic [15:0]          n_completed, n_suspended, n_timeouts;
  int checks = 0, failures = 0;
  int ec [3];

  bc_diag #(.N(N), .CYC_PER_BYTE(CPB), .TCT_GRACE(GR), .TW(TW)) dut (.*);

  initial clk = 1'b0;
  always #5 clk = ~clk;

  task automatic check(input bit c, input string what);
    checks++;
    if (!c) begin failures++; $display("FAIL @%0t: %s", $time, what); end
  endtask

  initial begin
    #5000000 $display("WATCHDOG");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  initial begin
    rst_n = 1'b0; setup_valid = 0; alloc_done = 0; alloc_done_dismantle = 0; clear_valid = 0;
    setup_src = '0; alloc_done_src = '0; clear_src = '0; setup_len = '0; clear_reason = '0;
    ec[0] = 0; ec[1] = 0; ec[2] = 0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int r = 0; r < 60; r++) begin
      int s, len, mode, t;
      s = $urandom_range(0, N - 1);
      len = (r % 10 == 5) ? 256 : $urandom_range(1, 20);
      mode = $urandom_range(0, 3);       // 3: let it expire
      @(negedge clk);
      setup_valid = 1; setup_src = 4'(s); setup_len = 8'(len);   // 256 is sent as 0
      @(negedge clk);
      setup_valid = 0;
      check(active[s] && !expired[s], "armed after set-up");
      alloc_done = 1; alloc_done_src = 4'(s); alloc_done_dismantle = 0;
      @(negedge clk);
      alloc_done = 0;
      check(int'(remaining[s]) == len * CPB, "TLT loaded with length x rate");
      @(negedge clk);
      check(int'(remaining[s]) == len * CPB - 1, "TLT counts down");
      if (mode < 3) begin
        repeat ($urandom_range(0, len * CPB)) @(negedge clk);
        check(!expired[s], "not expired early");
        clear_valid = 1; clear_src = 4'(s); clear_reason = 2'(mode);
        ec[mode]++;
        @(negedge clk);
        clear_valid = 0;
        check(!active[s], "cleared");
      end else begin
        t = 0;
        while (!expired[s] && t < 1000) begin @(negedge clk); t++; end
        if (t != len * CPB + GR + 1) $display("t=%0d len=%0d", t, len);
        check(t == len * CPB + GR + 1, "expiry after TLT and TCT");
        clear_valid = 1; clear_src = 4'(s); clear_reason = 2'd2;
        ec[2]++;
        @(negedge clk);
        clear_valid = 0;
        check(!active[s] && !expired[s], "cleared after time-out");
      end
      check(int'(n_completed) == ec[0] && int'(n_suspended) == ec[1] && int'(n_timeouts) == ec[2],
            "counters");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

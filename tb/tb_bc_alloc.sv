// tb_bc_alloc: random set and dismantle requests. A reference model keeps
// the expected switch lines: a clockwise path from s to f sets S_s..S_(f-1)
// to 11, a counter-clockwise one sets S_(s-1) down to S_f to 00, dismantle
// returns them to 01 (isolated). The testbench waits for `done`, checks the
// echoed requester code and all 16 switch settings.
module tb_bc_alloc;
  import ccsb_pkg::*;
  localparam int N = 16;
  logic              clk, rst_n, in_valid, in_ready, done, done_dismantle;
  alloc_req_t        in_req;
  logic [N-1:0][1:0] sw_ctl;
  elem_id_t          done_src;
  logic [1:0]        model [N];
  int checks = 0, failures = 0;

  bc_alloc #(.N(N), .DEPTH(4)) dut (.*);

  initial clk = 1'b0;
  always #5 clk = ~clk;

  task automatic check(input bit c, input string what);
    checks++;
    if (!c) begin failures++; $display("FAIL @%0t: %s", $time, what); end
  endtask

  initial begin
    #2000000 $display("WATCHDOG");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  initial begin
    rst_n = 1'b0; in_valid = 1'b0; in_req = '0;
    for (int i = 0; i < N; i++) model[i] = SW_ISO;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    for (int i = 0; i < N; i++) check(sw_ctl[i] == SW_ISO, "reset isolated");
    for (int r = 0; r < 200; r++) begin
      int s, f, len, t;
      s = $urandom_range(0, N - 1);
      f = $urandom_range(0, N - 1);
      in_req = '{tag: 4'($urandom), far_dst: 4'(f), rsv1: '0, src: 4'(s),
                 ccw: 1'($urandom), dismantle: 1'($urandom)};
      len = in_req.ccw ? (s - f + N) % N : (f - s + N) % N;
      for (int k = 0; k < len; k++) begin
        int sw;
        sw = in_req.ccw ? (s - 1 - k + 2 * N) % N : (s + k) % N;
        model[sw] = in_req.dismantle ? SW_ISO : (in_req.ccw ? SW_CCW : SW_CW);
      end
      while (!in_ready) @(negedge clk);
      in_valid = 1'b1;
      @(negedge clk);
      in_valid = 1'b0;
      t = 0;
      while (!done && t < 100) begin @(negedge clk); t++; end
      check(done && done_src == in_req.tag && done_dismantle == in_req.dismantle, "done with tag");
      for (int i = 0; i < N; i++) check(sw_ctl[i] == model[i], "switch setting");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

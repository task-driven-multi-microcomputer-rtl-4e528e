// tb_gen_chores: checks the general chores unit cycle by cycle against a
// reference model kept in the testbench (TICK_DIV=10 here).
//   * real-time clock: loads at random moments, including in the middle of a
//     tick period and on the cycle a tick would fall; a tick every TICK_DIV
//     cycles after the last load; wrap-around from 2^32-1;
//   * the six event counters against random event pulses, then held at a
//     level long enough to reach and stay at saturation (65535);
//   * the largest number of simultaneously active paths, against random
//     path-active masks and a final all-active mask.
// Inputs change on the falling edge; outputs are compared on every falling
// edge with the model's state.
module tb_gen_chores;
  localparam int N  = 16;
  localparam int TD = 10;
  logic        clk, rst_n, rtc_load;
  logic [31:0] rtc_value, rtc;
  logic        ev_irq, ev_msg, ev_grant, ev_suspend, ev_timeout, ev_reject;
  logic [N-1:0] path_active;
  logic [15:0] n_irq, n_msg, n_grant, n_suspend, n_timeout, n_reject;
  logic [4:0]  max_paths;
  int checks = 0, failures = 0;

  // reference model
  logic [31:0] m_rtc;
  int          m_div;
  int          m_cnt [6];
  int          m_max;

  gen_chores #(.N(N), .TICK_DIV(TD)) dut (.*);

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

  // Advance the model by one clock edge with the inputs now applied, then
  // let the edge happen and compare at the next falling edge.
  task automatic step();
    logic [5:0] ev;
    int c;
    ev = {ev_irq, ev_msg, ev_grant, ev_suspend, ev_timeout, ev_reject};
    if (rtc_load) begin
      m_rtc = rtc_value; m_div = 0;
    end else if (m_div == TD - 1) begin
      m_div = 0; m_rtc = m_rtc + 1;
    end else m_div++;
    for (int i = 0; i < 6; i++)
      if (ev[5 - i] && m_cnt[i] < 65535) m_cnt[i]++;
    c = $countones(path_active);
    if (c > m_max) m_max = c;
    @(negedge clk);
    check(rtc == m_rtc, $sformatf("rtc %0d expected %0d", rtc, m_rtc));
    check(int'(n_irq) == m_cnt[0] && int'(n_msg) == m_cnt[1] &&
          int'(n_grant) == m_cnt[2],
          $sformatf("counters irq/msg/grant %0d %0d %0d expected %0d %0d %0d",
                    n_irq, n_msg, n_grant, m_cnt[0], m_cnt[1], m_cnt[2]));
    check(int'(n_suspend) == m_cnt[3] && int'(n_timeout) == m_cnt[4] &&
          int'(n_reject) == m_cnt[5],
          $sformatf("counters susp/tmo/rej %0d %0d %0d expected %0d %0d %0d",
                    n_suspend, n_timeout, n_reject, m_cnt[3], m_cnt[4], m_cnt[5]));
    check(int'(max_paths) == m_max, $sformatf("max_paths %0d expected %0d", max_paths, m_max));
  endtask

  initial begin
    rst_n = 0; rtc_load = 0; rtc_value = '0; path_active = '0;
    {ev_irq, ev_msg, ev_grant, ev_suspend, ev_timeout, ev_reject} = '0;
    m_rtc = '0; m_div = 0; m_max = 0;
    for (int i = 0; i < 6; i++) m_cnt[i] = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    // Fixed start: load, then two full tick periods plus a half.
    rtc_load = 1; rtc_value = 32'd5000;
    step();
    rtc_load = 0;
    repeat (25) step();
    check(rtc == 32'd5002, "clock ticks every TICK_DIV cycles");
    // Random loads, events and path masks.
    for (int r = 0; r < 3000; r++) begin
      rtc_load  = ($urandom_range(0, 49) == 0);
      rtc_value = $urandom;
      {ev_irq, ev_msg, ev_grant, ev_suspend, ev_timeout, ev_reject} = 6'($urandom);
      path_active = N'($urandom) & N'($urandom) & N'($urandom);
      step();
    end
    // Wrap-around of the clock.
    {ev_irq, ev_msg, ev_grant, ev_suspend, ev_timeout, ev_reject} = '0;
    path_active = '0;
    rtc_load = 1; rtc_value = 32'hFFFF_FFFF;
    step();
    rtc_load = 0;
    repeat (TD) step();
    check(rtc == 32'd0, "clock wraps to zero");
    // Hold every event high until all counters saturate, and a bit more.
    {ev_irq, ev_msg, ev_grant, ev_suspend, ev_timeout, ev_reject} = '1;
    path_active = '1;
    repeat (65600) step();
    check(n_irq == 16'hFFFF && n_reject == 16'hFFFF, "counters saturate");
    check(max_paths == 5'd16, "all paths active counted");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

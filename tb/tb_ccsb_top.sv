// tb_ccsb_top: end-to-end test of the centrally controlled segmented bus at
// its default size (16 elements, 8-bit data bus).
//
// The testbench plays the 16 elements. An element asks for service the way
// the design expects: while it owns its control interface memory it writes
// the request record into locations 0..3 (and mail bytes into 6..), then
// pulses its request line. The controller's answers are seen the way an
// element sees them: a monitor notes the controller's writes to locations 4
// and 5 of each interface and "delivers" the message when the interface
// raises its end-of-access interrupt. Data transfers are made by driving the
// element's data bus tap and reading the receiver's tap.
//
// Scenario (each step waits for messages with a time limit):
//   clockwise path and data transfer, a second concurrent path, a
//   counter-clockwise path, a blocked request granted after a completion,
//   completions (DONE), urgent request suspending a lower path which is
//   granted again later, urgent request waiting for a nearly finished path
//   which then times out, mail to one element, broadcast mail with a RETRY
//   to an element that asked while the mail buffer was busy, mail for the
//   controller itself, rejected requests (bad destination, access table,
//   completion without a path), a path check, the real-time clock, and
//   finally the full ring: N/2 = 8 paths between neighbours (one across the
//   wrap-around switch) set up at once, all carrying data in the same cycle.
//   Last, random traffic: the eight even elements in parallel ask STRESS_R
//   times each for paths to random odd elements, send a byte, and complete.
// At the end every mechanism must have been seen at least once.
module tb_ccsb_top;
  import ccsb_pkg::*;

  localparam int N = 16;

  logic clk, rst_n;
  initial clk = 1'b0;
  always #5 clk = ~clk;

  logic [N-1:0][CI_AW-1:0] e_addr;
  logic [N-1:0][7:0]       e_wdata;
  logic [N-1:0]            e_we;
  logic [N-1:0][7:0]       e_rdata;
  logic [N-1:0]            e_req;
  logic [N-1:0]            e_owns, e_int_n, e_acc_irq;
  logic [N-1:0][1:0]       e_sw_own, e_sw_adj;
  logic [N-1:0]            e_sw_adj_xor;
  logic [N-1:0]            tx_en;
  logic [N-1:0][7:0]       tx_data;
  logic [N-1:0][7:0]       rx_data;
  logic [N-1:0]            rx_valid, contention;
  logic                    cfg_prio_we, cfg_allow_we;
  elem_id_t                cfg_id;
  logic [3:0]              cfg_prio;
  logic [N-1:0]            cfg_allow;
  logic                    chk_start;
  elem_id_t                chk_a, chk_b;
  logic [7:0]              chk_pattern;
  logic                    chk_busy, chk_done, chk_pass;
  logic                    hm_valid;
  elem_id_t                hm_src;
  logic [3:0]              hm_len;
  logic [MAIL_MAX-1:0][7:0] hm_data;
  logic                    rtc_load;
  logic [31:0]             rtc_value, rtc;
  logic [N-1:0][1:0]       sw_ctl;
  logic [N-1:0]            busy_nodes, path_active;
  logic [15:0]             n_irq, n_msg, n_grant, n_suspend, n_timeout, n_reject, n_completed;
  logic [$clog2(N+1)-1:0]  max_paths;
  logic                    ev_grant_ccw, ev_near_wait, ev_blocked, ev_retry, ev_done;

  ccsb_top dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input bit c, input string what);
    checks++;
    if (!c) begin
      failures++;
      $display("FAIL @%0t: %s", $time, what);
    end
  endtask

  // ------------------------------------------------------ message monitor --
  logic [7:0] pend4 [N];
  logic [7:0] pend5 [N];
  bit         pendw [N];
  int         n_code [N][16];
  logic [7:0] last5 [N][16];
  int         c_ccw, c_near, c_blocked, c_retry, c_done, c_contention;
  int         hm_seen;
  elem_id_t   hm_src_q;
  logic [3:0] hm_len_q;
  logic [7:0] hm_d0, hm_d1;

  always @(posedge clk) begin
    if (rst_n) begin
      for (int i = 0; i < N; i++) begin
        if (dut.s_we[i] && dut.s_addr[i] == 4'd4) begin pend4[i] = dut.s_wdata[i]; pendw[i] = 1'b1; end
        if (dut.s_we[i] && dut.s_addr[i] == 4'd5) pend5[i] = dut.s_wdata[i];
        if (e_acc_irq[i] && pendw[i]) begin
          n_code[i][pend4[i][3:0]]++;
          last5[i][pend4[i][3:0]] = pend5[i];
          pendw[i] = 1'b0;
        end
      end
      if (ev_grant_ccw) c_ccw++;
      if (ev_near_wait) c_near++;
      if (ev_blocked)   c_blocked++;
      if (ev_retry)     c_retry++;
      if (ev_done)      c_done++;
      if (|contention)  c_contention++;
      if (hm_valid) begin
        hm_seen++;
        hm_src_q = hm_src; hm_len_q = hm_len; hm_d0 = hm_data[0]; hm_d1 = hm_data[1];
      end
    end
  end

  // ------------------------------------------------------ element actions --
  task automatic ew(input int i, input int a, input logic [7:0] d);
    @(negedge clk);
    while (!e_owns[i]) @(negedge clk);
    e_addr[i] = CI_AW'(a); e_wdata[i] = d; e_we[i] = 1'b1;
    @(negedge clk);
    e_we[i] = 1'b0;
  endtask

  task automatic er(input int i, input int a, output logic [7:0] d);
    @(negedge clk);
    e_addr[i] = CI_AW'(a);
    #1 d = e_rdata[i];
  endtask

  task automatic raise(input int i);
    @(negedge clk);
    e_req[i] = 1'b1;
    @(negedge clk);
    e_req[i] = 1'b0;
  endtask

  task automatic path_req(input int s, input int d, input int len, input bit urgent);
    ew(s, 0, {2'd1, 4'(s), TT_PATH_REQ});
    ew(s, 1, 8'(len));
    ew(s, 2, {4'd0, 4'(d)});
    ew(s, 3, {6'd0, urgent, 1'b0});
    raise(s);
  endtask

  task automatic complete(input int s);
    ew(s, 0, {2'd0, 4'(s), TT_COMPLETE});
    raise(s);
  endtask

  task automatic mail(input int s, input int nd, input int d, input int n, input logic [7:0] b0, input logic [7:0] b1);
    ew(s, 6, b0);
    if (n > 1) ew(s, 7, b1);
    ew(s, 1, {4'(MAIL_LO + n - 1), 4'(MAIL_LO)});
    ew(s, 2, {4'd0, 4'(d)});
    ew(s, 0, {2'(nd), 4'(s), TT_DATA_READY});
    raise(s);
  endtask

  // Wait until element i has received `want` messages of the given code.
  task automatic wait_msg(input int i, input msg_code_e code, input int want, input string what);
    int t;
    t = 0;
    while (n_code[i][code] < want && t < 4000) begin @(posedge clk); t++; end
    check(n_code[i][code] >= want, what);
  endtask

  task automatic idle(input int n);
    repeat (n) @(posedge clk);
  endtask

  // Drive one element's tap for a cycle and look at another's.
  task automatic xfer(input int s, input int d, input logic [7:0] v, input string what);
    @(negedge clk);
    tx_en[s] = 1'b1; tx_data[s] = v;
    #1;
    check(rx_valid[d] && rx_data[d] == v, what);
    @(negedge clk);
    tx_en[s] = 1'b0;
  endtask

  // --------------------------------------------------------------- main --
  int g1, g3, nr0;
  int g8 [N / 2];
  int g8d [N / 2];
  int n_fin, nb0;
  localparam int STRESS_R = 12;
  logic [7:0] rd;
  initial begin
    #5_000_000;
    $display("WATCHDOG");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  initial begin
    rst_n = 1'b0;
    e_addr = '0; e_wdata = '0; e_we = '0; e_req = '0; tx_en = '0; tx_data = '0;
    cfg_prio_we = 1'b0; cfg_allow_we = 1'b0; cfg_id = '0; cfg_prio = '0; cfg_allow = '0;
    chk_start = 1'b0; chk_a = '0; chk_b = '0; chk_pattern = '0; rtc_load = 1'b0; rtc_value = '0;
    for (int i = 0; i < N; i++) begin
      pend4[i] = '0; pend5[i] = '0; pendw[i] = 1'b0;
      for (int c = 0; c < 16; c++) begin n_code[i][c] = 0; last5[i][c] = '0; end
    end
    c_ccw = 0; c_near = 0; c_blocked = 0; c_retry = 0; c_done = 0; c_contention = 0; hm_seen = 0;
    hm_src_q = '0; hm_len_q = '0; hm_d0 = '0; hm_d1 = '0;
    idle(3);
    rst_n = 1'b1;
    idle(2);

    // Reset: every switch isolated, every element owns its memory.
    for (int i = 0; i < N; i++) begin
      check(sw_ctl[i] == SW_ISO, "switch isolated after reset");
      check(e_owns[i] && e_sw_adj_xor[i], "element owns memory, XOR check shows isolated");
    end

    // 1. Clockwise path 1 -> 3.
    path_req(1, 3, 200, 1'b0);
    wait_msg(1, MSG_GRANT, 1, "GRANT to requester 1");
    wait_msg(3, MSG_GRANT, 1, "GRANT to receiver 3");
    idle(4);
    check(last5[1][MSG_GRANT] == {2'b00, 1'b0, 1'b1, 4'd3}, "loc5 of sender: partner 3, sender, CW");
    check(last5[3][MSG_GRANT] == {2'b00, 1'b0, 1'b0, 4'd1}, "loc5 of receiver: partner 1");
    check(sw_ctl[1] == SW_CW && sw_ctl[2] == SW_CW, "S1, S2 set clockwise");
    check(sw_ctl[0] == SW_ISO && sw_ctl[3] == SW_ISO, "S0, S3 stay isolated");
    check(e_sw_own[1] == SW_CW && !e_sw_adj_xor[2], "element status shows the switches");
    xfer(1, 3, 8'hA5, "data 1 -> 3 over the bus");
    check(!rx_valid[4] && !rx_valid[0], "data stays inside the segment");

    // 2. Concurrent path 5 -> 7.
    path_req(5, 7, 200, 1'b0);
    wait_msg(7, MSG_GRANT, 1, "GRANT to 7");
    idle(4);
    @(negedge clk);
    tx_en[1] = 1'b1; tx_data[1] = 8'h11; tx_en[5] = 1'b1; tx_data[5] = 8'h55;
    #1;
    check(rx_data[3] == 8'h11 && rx_data[7] == 8'h55 && contention == '0, "two transfers at once");
    @(negedge clk);
    tx_en = '0;
    check(max_paths >= 2, "two paths active at once");

    // 3. Counter-clockwise path 10 -> 8 (2 links CCW, 14 CW).
    path_req(10, 8, 200, 1'b0);
    wait_msg(8, MSG_GRANT, 1, "GRANT to 8");
    wait_msg(10, MSG_GRANT, 1, "GRANT to 10");
    idle(4);
    check(last5[10][MSG_GRANT][5] == 1'b1, "GRANT marks CCW");
    check(sw_ctl[9] == SW_CCW && sw_ctl[8] == SW_CCW, "S9, S8 set counter-clockwise");
    xfer(10, 8, 8'hC3, "data 10 -> 8 counter-clockwise");

    // 4. Blocked request 4 -> 6, granted when 5 -> 7 completes.
    path_req(4, 6, 200, 1'b0);
    idle(60);
    check(n_code[4][MSG_GRANT] == 0, "blocked request not granted");
    complete(5);
    wait_msg(5, MSG_DONE, 1, "DONE to 5");
    wait_msg(7, MSG_DONE, 1, "DONE to 7");
    wait_msg(4, MSG_GRANT, 1, "blocked request granted after completion");
    idle(6);
    check(sw_ctl[4] == SW_CW && sw_ctl[5] == SW_CW && sw_ctl[6] == SW_ISO, "switches re-used by new path");
    xfer(4, 6, 8'h46, "data 4 -> 6");

    // 5. Completions.
    complete(1);
    complete(4);
    complete(10);
    wait_msg(8, MSG_DONE, 1, "DONE to 8");
    idle(10);
    check(n_completed == 16'd4, "four completions counted");
    check(busy_nodes == '0, "no node busy");
    for (int i = 0; i < N; i++) check(sw_ctl[i] == SW_ISO, "all switches back to isolated");

    // 6. Urgent 11 -> 13 suspends long path 12 -> 14.
    path_req(12, 14, 255, 1'b0);
    wait_msg(14, MSG_GRANT, 1, "GRANT to 14");
    path_req(11, 13, 200, 1'b1);
    wait_msg(12, MSG_SUSPEND, 1, "SUSPEND to 12");
    wait_msg(14, MSG_SUSPEND, 1, "SUSPEND to 14");
    wait_msg(11, MSG_GRANT, 1, "urgent request granted");
    complete(11);
    wait_msg(12, MSG_GRANT, 2, "suspended path granted again");
    complete(12);
    wait_msg(14, MSG_DONE, 1, "DONE to 14");

    // 7. Urgent 15 -> 1 waits for nearly finished 0 -> 2, which times out.
    path_req(0, 2, 1, 1'b0);
    wait_msg(0, MSG_GRANT, 1, "GRANT to 0");
    path_req(15, 1, 200, 1'b1);
    idle(20);
    check(n_code[0][MSG_SUSPEND] == 0, "nearly finished path not suspended");
    wait_msg(0, MSG_TIMEOUT, 1, "TIMEOUT to 0");
    wait_msg(2, MSG_TIMEOUT, 1, "TIMEOUT to 2");
    wait_msg(15, MSG_GRANT, 1, "waiting urgent request granted");
    check(n_timeout >= 1, "time-out counted");
    complete(15);
    wait_msg(1, MSG_DONE, 1, "DONE to 1");

    // 8. Mail 6 -> 9, three bytes.
    ew(6, 8, 8'h33);
    mail(6, 1, 9, 2, 8'h11, 8'h22);
    wait_msg(9, MSG_MAIL, 1, "MAIL to 9");
    check(last5[9][MSG_MAIL] == {4'd2, 4'd6}, "MAIL loc5: 2 bytes from 6");
    er(9, 6, rd); check(rd == 8'h11, "mail byte 0");
    er(9, 7, rd); check(rd == 8'h22, "mail byte 1");

    // 9. Broadcast from 3; 9 asks meanwhile and gets RETRY.
    mail(3, 3, 0, 1, 8'h77, 8'h00);
    mail(9, 1, 2, 1, 8'h99, 8'h00);
    wait_msg(15, MSG_MAIL, 1, "broadcast reaches 15");
    g1 = 0;
    for (int i = 0; i < N; i++) if (i != 3 && n_code[i][MSG_MAIL] >= 1) g1++;
    check(g1 == N - 1, "broadcast reaches all other elements");
    check(n_code[3][MSG_MAIL] == 0, "sender not sent its own broadcast");
    wait_msg(9, MSG_RETRY, 1, "RETRY to 9 while buffer busy");
    idle(10);
    mail(9, 1, 2, 1, 8'h99, 8'h00);
    wait_msg(2, MSG_MAIL, 2, "retried mail delivered to 2");
    er(2, 6, rd); check(rd == 8'h99, "retried mail data");

    // 10. Mail for the controller itself.
    mail(7, 0, 0, 2, 8'hAB, 8'hCD);
    g3 = 0;
    while (hm_seen == 0 && g3 < 2000) begin idle(1); g3++; end
    check(hm_seen == 1 && hm_src_q == 4'd7 && hm_len_q == 4'd2 && hm_d0 == 8'hAB && hm_d1 == 8'hCD,
          "mail to controller");

    // 11. Rejected requests.
    nr0 = int'(n_reject);
    path_req(8, 8, 5, 1'b0);
    wait_msg(8, MSG_REJECT, 1, "REJECT: destination is source");
    @(negedge clk);
    cfg_allow_we = 1'b1; cfg_id = 4'd2; cfg_allow = ~16'(1 << 3);
    @(negedge clk);
    cfg_allow_we = 1'b0;
    path_req(2, 3, 5, 1'b0);
    wait_msg(2, MSG_REJECT, 1, "REJECT: access table");
    complete(13);
    wait_msg(13, MSG_REJECT, 1, "REJECT: completion without a path");
    check(int'(n_reject) - nr0 >= 3, "rejections counted");
    path_req(2, 4, 200, 1'b0);
    wait_msg(4, MSG_GRANT, 2, "allowed pair still granted");
    complete(2);
    wait_msg(4, MSG_DONE, 2, "DONE to 4");

    // 12. Path check 4 -> 8 with pattern 3C.
    @(negedge clk);
    chk_start = 1'b1; chk_a = 4'd4; chk_b = 4'd8; chk_pattern = 8'h3C;
    @(negedge clk);
    chk_start = 1'b0;
    wait_msg(4, MSG_CHECK, 1, "CHECK to 4");
    wait_msg(8, MSG_CHECK, 1, "CHECK to 8");
    idle(4);
    er(4, 6, rd);
    check(rd == 8'h3C, "pattern written into sender's location 6");
    @(negedge clk);
    tx_en[4] = 1'b1; tx_data[4] = rd;
    #1 rd = rx_data[8];
    @(negedge clk);
    tx_en[4] = 1'b0;
    ew(8, 6, rd);
    ew(8, 1, {4'(MAIL_LO), 4'(MAIL_LO)});
    ew(8, 0, {2'd1, 4'd8, TT_DIAG_DATA});
    raise(8);
    g3 = 0;
    while (!chk_done && g3 < 2000) begin idle(1); g3++; end
    check(chk_done && chk_pass, "path check passes");
    complete(4);
    wait_msg(8, MSG_DONE, 2, "check path removed");

    // 13. Real-time clock.
    @(negedge clk);
    rtc_load = 1'b1; rtc_value = 32'd100;
    @(negedge clk);
    rtc_load = 1'b0;
    idle(2100);
    check(rtc >= 32'd102 && rtc <= 32'd103, "real-time clock ticks");

    // 14. Full ring: N/2 = 8 paths at once, 1->2, 3->4, ..., 15->0 (the last
    // one across the wrap-around switch S15), all carrying data together.
    for (int i = 0; i < N; i++) check(sw_ctl[i] == SW_ISO, "ring idle before the full-ring test");
    for (int k = 0; k < N / 2; k++) g8[k] = n_code[(2 * k + 2) % N][MSG_GRANT];
    for (int k = 0; k < N / 2; k++) path_req(2 * k + 1, (2 * k + 2) % N, 200, 1'b0);
    for (int k = 0; k < N / 2; k++)
      wait_msg((2 * k + 2) % N, MSG_GRANT, g8[k] + 1, "full ring: GRANT to receiver");
    idle(4);
    for (int k = 0; k < N / 2; k++) check(sw_ctl[2 * k + 1] == SW_CW && sw_ctl[2 * k] == SW_ISO,
                                          "full ring: odd switches clockwise, even ones isolated");
    check(max_paths == 5'(N / 2), "full ring: N/2 paths up at once");
    @(negedge clk);
    for (int k = 0; k < N / 2; k++) begin
      tx_en[2 * k + 1] = 1'b1; tx_data[2 * k + 1] = 8'(8'h80 + k);
    end
    #1;
    for (int k = 0; k < N / 2; k++)
      check(rx_valid[(2 * k + 2) % N] && rx_data[(2 * k + 2) % N] == 8'(8'h80 + k),
            "full ring: every segment carries its own byte");
    check(contention == '0, "full ring: no contention");
    @(negedge clk);
    tx_en = '0;
    for (int k = 0; k < N / 2; k++) g8[k] = n_code[(2 * k + 2) % N][MSG_DONE];
    for (int k = 0; k < N / 2; k++) complete(2 * k + 1);
    for (int k = 0; k < N / 2; k++)
      wait_msg((2 * k + 2) % N, MSG_DONE, g8[k] + 1, "full ring: DONE to receiver");
    idle(4);
    for (int i = 0; i < N; i++) check(sw_ctl[i] == SW_ISO, "full ring: all switches isolated again");

    // 15. Random traffic: the eight even elements, in parallel, each ask
    // STRESS_R times for a path to a random odd element (2 never asks for 3,
    // which its access table forbids). On its GRANT an element sends one
    // byte, checks that the receiver got it, and reports completion. Sources
    // are never receivers here, so an element's GRANT and DONE counts are
    // its own.
    for (int k = 0; k < N / 2; k++) begin
      g8[k]   = n_code[2 * k][MSG_GRANT];
      g8d[k]  = n_code[2 * k][MSG_DONE];
    end
    n_fin = 0;
    nb0 = c_blocked;
    for (int k = 0; k < N / 2; k++) begin
      fork
        automatic int s = 2 * k;
        begin
          for (int r = 0; r < STRESS_R; r++) begin
            automatic int d;
            automatic logic [7:0] v;
            d = 2 * $urandom_range(0, N / 2 - 1) + 1;
            if (s == 2 && d == 3) d = 5;
            v = 8'($urandom);
            idle($urandom_range(0, 20));
            path_req(s, d, 200, 1'b0);
            wait_msg(s, MSG_GRANT, g8[s / 2] + r + 1, "random traffic: GRANT");
            check(last5[s][MSG_GRANT][3:0] == 4'(d) && last5[s][MSG_GRANT][4],
                  "random traffic: GRANT names the receiver");
            idle(4);
            xfer(s, d, v, "random traffic: byte arrives");
            complete(s);
            wait_msg(s, MSG_DONE, g8d[s / 2] + r + 1, "random traffic: DONE");
          end
          n_fin++;
        end
      join_none
    end
    while (n_fin < N / 2) idle(1);
    idle(20);
    for (int i = 0; i < N; i++) check(sw_ctl[i] == SW_ISO, "random traffic: ring idle at the end");
    check(c_blocked > nb0, "random traffic: some requests had to wait for the ring");
    check(c_contention == 0, "random traffic: no data bus contention");

    // Every mechanism must have happened.
    check(n_irq > 0,          "mechanism: element requests served");
    check(n_msg > 0,          "mechanism: messages written");
    check(n_grant >= 8,       "mechanism: grants");
    check(c_ccw > 0,          "mechanism: counter-clockwise grant");
    check(max_paths >= 2,     "mechanism: concurrent paths");
    check(c_blocked > 0,      "mechanism: blocked request waits");
    check(n_suspend > 0,      "mechanism: urgent suspension");
    check(c_near > 0,         "mechanism: wait for nearly finished path");
    check(n_timeout > 0,      "mechanism: time-out");
    check(n_reject > 0,       "mechanism: reject");
    check(c_done > 0,         "mechanism: completion");
    check(c_retry > 0,        "mechanism: RETRY");
    check(hm_seen > 0,        "mechanism: mail for the controller");
    check(c_contention == 0,  "no data bus contention");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_bus_controller: the whole bus controller (encoder latch, communication,
// arbitration, allocation, diagnostics, path check, general chores) with 16
// real control interfaces on a control bus; the testbench plays the
// elements through their memory ports. Covered: a clockwise and a
// counter-clockwise grant with the switch lines set by allocation, blocking
// and release, completion with switches returned to isolated, a time-out
// of an unconfirmed path, mail delivery, a path check (the testbench copies
// the pattern from the sender's location 6 to the receiver's, as the data
// bus would), the statistics counters and the real-time clock.
// Timing parameters are reduced (CYC_PER_BYTE=1, TCT_GRACE=16, TICK_DIV=10).
module tb_bus_controller;
  import ccsb_pkg::*;
  localparam int N = 16;
  logic clk, rst_n;
  logic [N-1:0] req_lines, clr_n;
  logic [3:0] cb_addr;
  logic [7:0] cb_wdata, cb_rdata;
  logic cb_we, cb_none;
  logic [N-1:0][1:0] sw_ctl;
  logic cfg_prio_we, cfg_allow_we;
  elem_id_t cfg_id;
  logic [3:0] cfg_prio;
  logic [N-1:0] cfg_allow;
  logic chk_start, chk_busy, chk_done, chk_pass;
  elem_id_t chk_a, chk_b;
  logic [7:0] chk_pattern;
  logic hm_valid;
  elem_id_t hm_src;
  logic [3:0] hm_len;
  logic [MAIL_MAX-1:0][7:0] hm_data;
  logic rtc_load;
  logic [31:0] rtc_value, rtc;
  logic [N-1:0] busy_nodes, path_active;
  logic [15:0] n_irq, n_msg, n_grant, n_suspend, n_timeout, n_reject, n_completed;
  logic [4:0] max_paths;
  logic ev_grant_ccw, ev_near_wait, ev_blocked, ev_retry, ev_done;
  logic [N-1:0][3:0] s_addr, e_addr;
  logic [N-1:0][7:0] s_wdata, s_rdata, e_wdata, e_rdata;
  logic [N-1:0] s_we, e_we, e_req, e_owns, e_int_n, e_acc_irq, e_sw_adj_xor;
  logic [N-1:0][1:0] e_sw_own, e_sw_adj;
  int checks = 0, failures = 0;
  int nblk, nccw;

  bus_controller #(.N(N), .QD(8), .CYC_PER_BYTE(1), .TCT_GRACE(16), .NEAR_DONE(4), .TICK_DIV(10)) dut (.*);
  ctrl_bus #(.N(N), .AW(4)) u_cb (.clr_n, .m_addr(cb_addr), .m_wdata(cb_wdata), .m_we(cb_we),
                                  .m_rdata(cb_rdata), .m_none(cb_none), .s_addr, .s_wdata, .s_we, .s_rdata);
  for (genvar i = 0; i < N; i++) begin : g_ci
    ctrl_interface u_ci (.clk, .rst_n, .e_addr(e_addr[i]), .e_wdata(e_wdata[i]), .e_we(e_we[i]),
      .e_rdata(e_rdata[i]), .e_req(e_req[i]), .e_owns(e_owns[i]), .e_int_n(e_int_n[i]),
      .e_acc_irq(e_acc_irq[i]), .sw_own(sw_ctl[i]), .sw_adj(sw_ctl[(i + N - 1) % N]), .e_sw_own(e_sw_own[i]),
      .e_sw_adj(e_sw_adj[i]), .e_sw_adj_xor(e_sw_adj_xor[i]), .req_line(req_lines[i]),
      .clr_n(clr_n[i]), .c_addr(s_addr[i]), .c_wdata(s_wdata[i]), .c_we(s_we[i]), .c_rdata(s_rdata[i]));
  end

  initial clk = 1'b0;
  always #5 clk = ~clk;

  task automatic check(input bit c, input string what);
    checks++;
    if (!c) begin failures++; $display("FAIL @%0t: %s", $time, what); end
  endtask

  // Count message codes written to location 4 of each element.
  int n_code [N][16];
  always @(posedge clk) begin
    for (int i = 0; i < N; i++)
      if (s_we[i] && s_addr[i] == 4'd4) n_code[i][s_wdata[i][3:0]]++;
    if (ev_blocked) nblk++;
    if (ev_grant_ccw) nccw++;
  end
  task automatic ew(input int i, input int a, input logic [7:0] d);
    @(negedge clk);
    while (!e_owns[i]) @(negedge clk);
    e_addr[i] = 4'(a); e_wdata[i] = d; e_we[i] = 1'b1;
    @(negedge clk);
    e_we[i] = 1'b0;
  endtask
  task automatic er(input int i, input int a, output logic [7:0] d);
    @(negedge clk);
    e_addr[i] = 4'(a);
    #1 d = e_rdata[i];
  endtask
  task automatic raise(input int i);
    @(negedge clk); e_req[i] = 1'b1;
    @(negedge clk); e_req[i] = 1'b0;
  endtask
  task automatic mail(input int s, input int nd, input int d, input logic [7:0] b0);
    ew(s, 6, b0);
    ew(s, 1, {4'd6, 4'd6});
    ew(s, 2, {4'd0, 4'(d)});
    ew(s, 0, {2'(nd), 4'(s), TT_DATA_READY});
    raise(s);
  endtask
  task automatic settle(input int n);
    repeat (n) @(negedge clk);
  endtask
  task automatic path_req(input int s, input int d, input int len);
    ew(s, 0, {2'd1, 4'(s), TT_PATH_REQ});
    ew(s, 1, 8'(len));
    ew(s, 2, {4'd0, 4'(d)});
    ew(s, 3, 8'h00);
    raise(s);
  endtask
  task automatic complete(input int s);
    ew(s, 0, {2'd0, 4'(s), TT_COMPLETE});
    raise(s);
  endtask
  task automatic wait_code(input int i, input msg_code_e c, input int want, input string what);
    int t;
    t = 0;
    while (n_code[i][c] < want && t < 2000) begin @(negedge clk); t++; end
    check(n_code[i][c] >= want, what);
  endtask

  initial begin
    #5000000 $display("WATCHDOG");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  initial begin
    logic [7:0] d;
    rst_n = 0; e_addr = '0; e_wdata = '0; e_we = '0; e_req = '0;
    cfg_prio_we = 0; cfg_allow_we = 0; cfg_id = '0; cfg_prio = '0; cfg_allow = '0;
    chk_start = 0; chk_a = '0; chk_b = '0; chk_pattern = '0; rtc_load = 0; rtc_value = '0;
    nblk = 0; nccw = 0;
    for (int i = 0; i < N; i++) for (int c = 0; c < 16; c++) n_code[i][c] = 0;
    settle(2);
    rst_n = 1;
    settle(1);
    for (int i = 0; i < N; i++) check(sw_ctl[i] == SW_ISO, "switches isolated after reset");

    // 2 -> 5 clockwise, long.
    path_req(2, 5, 200);
    wait_code(5, MSG_GRANT, 1, "GRANT 2->5");
    settle(5);
    check(sw_ctl[2] == SW_CW && sw_ctl[3] == SW_CW && sw_ctl[4] == SW_CW && sw_ctl[5] == SW_ISO
          && sw_ctl[1] == SW_ISO, "S2..S4 clockwise");
    check(e_sw_own[2] == SW_CW && !e_sw_adj_xor[3], "element sees its switch");
    // 9 -> 7 counter-clockwise.
    path_req(9, 7, 200);
    wait_code(7, MSG_GRANT, 1, "GRANT 9->7");
    settle(5);
    check(sw_ctl[8] == SW_CCW && sw_ctl[7] == SW_CCW && sw_ctl[6] == SW_ISO, "S8, S7 counter-clockwise");
    check(nccw == 1, "counter-clockwise grant event");
    check(path_active == 16'h0204 && busy_nodes == 16'h03BC, "routing table");
    // 4 -> 8 is blocked both ways.
    path_req(4, 8, 200);
    settle(40);
    check(n_code[4][MSG_GRANT] == 0 && nblk > 0, "blocked request waits");
    complete(2);
    wait_code(5, MSG_DONE, 1, "DONE 2->5");
    complete(9);
    wait_code(7, MSG_DONE, 1, "DONE 9->7");
    wait_code(8, MSG_GRANT, 1, "blocked request granted");
    complete(4);
    wait_code(8, MSG_DONE, 1, "DONE 4->8");
    settle(10);
    for (int i = 0; i < N; i++) check(sw_ctl[i] == SW_ISO, "switches isolated after completions");
    check(n_completed == 3, "completions counted");

    // Unconfirmed short path times out: 1 byte, 1 cycle per byte, grace 16.
    path_req(12, 13, 1);
    wait_code(13, MSG_GRANT, 1, "GRANT 12->13");
    wait_code(12, MSG_TIMEOUT, 1, "TIMEOUT 12->13");
    wait_code(13, MSG_TIMEOUT, 1, "TIMEOUT at receiver");
    settle(10);
    check(n_timeout == 1 && sw_ctl[12] == SW_ISO, "time-out removes the path");

    // Mail 6 -> 11.
    ew(6, 6, 8'h61);
    ew(6, 1, {4'd6, 4'd6});
    ew(6, 2, 8'h0B);
    ew(6, 0, {2'd1, 4'd6, TT_DATA_READY});
    raise(6);
    wait_code(11, MSG_MAIL, 1, "MAIL 6->11");
    settle(5);
    er(11, 6, d); check(d == 8'h61, "mail data");

    // Path check 1 -> 14.
    @(negedge clk); chk_start = 1; chk_a = 4'd1; chk_b = 4'd14; chk_pattern = 8'hE7;
    @(negedge clk); chk_start = 0;
    wait_code(14, MSG_CHECK, 1, "CHECK 1->14");
    settle(5);
    er(1, 6, d);
    ew(14, 6, d);
    ew(14, 1, {4'd6, 4'd6});
    ew(14, 0, {2'd1, 4'd14, TT_DIAG_DATA});
    raise(14);
    for (int t = 0; t < 200 && !chk_done; t++) settle(1);
    check(chk_done && chk_pass, "path check passes");
    // With one cycle per byte the check path has timed out by now.
    wait_code(14, MSG_TIMEOUT, 1, "check path removed");

    // Statistics and clock.
    check(n_irq == 9 && n_grant == 5 && n_msg >= 18 && max_paths == 2, "statistics");
    @(negedge clk); rtc_load = 1; rtc_value = 32'd7;
    @(negedge clk); rtc_load = 0;
    settle(35);
    check(rtc == 32'd10, "real-time clock");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

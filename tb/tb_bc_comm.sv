// tb_bc_comm: the communication process with real control interfaces, the
// control bus and the priority encoder latch around it; arbitration is a
// stub that logs requests and injects messages. Covered: reading a path
// request (all fields), writing GRANT into both elements with the right
// location 5, mail read and delivery into the receiver's mailbox, RETRY
// while the mail buffer is busy, a refused mail freeing the buffer, mail for
// the controller (`hm_*`), diagnostic data, completion, a CHECK message
// with the pattern, and a message to an element whose own request is
// pending (the request is read first, then the message written). Finally a
// random phase: all 16 elements issue path requests with random fields
// while GRANT messages to random pairs are injected; each request must reach
// arbitration intact and each element must see its messages in order.
module tb_bc_comm;
  import ccsb_pkg::*;
  localparam int N = 16;
  logic clk, rst_n;
  logic irq, inhibit, ack, force_en;
  elem_id_t irq_id;
  logic [N-1:0] force_clr_n, req_lines, clr_n;
  logic [3:0] cb_addr;
  logic [7:0] cb_wdata, cb_rdata;
  logic cb_we, cb_none;
  arb_req_t arb_req;
  logic arb_valid, arb_ready;
  msg_t msg_in;
  logic msg_valid, msg_ready;
  logic dd_valid;
  elem_id_t dd_src;
  logic [7:0] dd_data;
  logic hm_valid;
  elem_id_t hm_src;
  logic [3:0] hm_len;
  logic [MAIL_MAX-1:0][7:0] hm_data;
  logic ev_irq, ev_msg, ev_retry;
  logic [N-1:0][3:0] s_addr, e_addr;
  logic [N-1:0][7:0] s_wdata, s_rdata, e_wdata, e_rdata;
  logic [N-1:0] s_we, e_we, e_req, e_owns, e_int_n, e_acc_irq, e_sw_adj_xor;
  logic [N-1:0][1:0] e_sw_own, e_sw_adj;
  int checks = 0, failures = 0;

  bc_comm #(.N(N), .MQ(4)) dut (.*);
  prio_encoder_latch #(.N(N)) u_enc (.clk, .rst_n, .req(req_lines), .inhibit, .ack, .force_en,
                                     .force_clr_n, .clr_n, .irq, .irq_id);
  ctrl_bus #(.N(N), .AW(4)) u_cb (.clr_n, .m_addr(cb_addr), .m_wdata(cb_wdata), .m_we(cb_we),
                                  .m_rdata(cb_rdata), .m_none(cb_none), .s_addr, .s_wdata, .s_we, .s_rdata);
  for (genvar i = 0; i < N; i++) begin : g_ci
    ctrl_interface u_ci (.clk, .rst_n, .e_addr(e_addr[i]), .e_wdata(e_wdata[i]), .e_we(e_we[i]),
      .e_rdata(e_rdata[i]), .e_req(e_req[i]), .e_owns(e_owns[i]), .e_int_n(e_int_n[i]),
      .e_acc_irq(e_acc_irq[i]), .sw_own(2'b01), .sw_adj(2'b01), .e_sw_own(e_sw_own[i]),
      .e_sw_adj(e_sw_adj[i]), .e_sw_adj_xor(e_sw_adj_xor[i]), .req_line(req_lines[i]),
      .clr_n(clr_n[i]), .c_addr(s_addr[i]), .c_wdata(s_wdata[i]), .c_we(s_we[i]), .c_rdata(s_rdata[i]));
  end

  initial clk = 1'b0;
  always #5 clk = ~clk;

  task automatic check(input bit c, input string what);
    checks++;
    if (!c) begin failures++; $display("FAIL @%0t: %s", $time, what); end
  endtask

  arb_req_t alog [$];
  int nhm, ndd, nmsg;
  logic [7:0] hm0, dd0;
  elem_id_t hms, dds;
  always @(posedge clk) begin
    if (arb_valid && arb_ready) alog.push_back(arb_req);
    if (hm_valid) begin nhm++; hms = hm_src; hm0 = hm_data[0]; end
    if (dd_valid) begin ndd++; dds = dd_src; dd0 = dd_data; end
    if (ev_msg) nmsg++;
  end

  // Random phase: expected requests per source, expected {loc4, loc5} per
  // element, checked as they appear.
  arb_req_t    rq_exp [N][$];
  logic [15:0] ms_exp [N][$];
  logic [7:0]  loc4_seen [N];
  bit          rnd_on = 1'b0;
  int          n_fin, n_rnd_rq = 0, n_rnd_ms = 0;
  always @(posedge clk) begin
    if (rnd_on) begin
      if (arb_valid && arb_ready) begin
        automatic arb_req_t g = arb_req;
        n_rnd_rq++;
        if (rq_exp[g.src].size() == 0) check(1'b0, "random: unexpected request");
        else begin
          automatic arb_req_t x = rq_exp[g.src].pop_front();
          check(g.kind == x.kind && g.dst0 == x.dst0 && g.dst1 == x.dst1 && g.ndest == x.ndest &&
                g.len == x.len && g.read == x.read && g.urgent == x.urgent,
                "random: request fields arrive intact");
          if (!(g.dst0 == x.dst0 && g.dst1 == x.dst1 && g.ndest == x.ndest && g.len == x.len && g.read == x.read && g.urgent == x.urgent))
            $display("   src %0d got d0 %0d d1 %0d nd %0d len %0d rd %0d u %0d exp d0 %0d d1 %0d nd %0d len %0d rd %0d u %0d", g.src,
              g.dst0, g.dst1, g.ndest, g.len, g.read, g.urgent, x.dst0, x.dst1, x.ndest, x.len, x.read, x.urgent);
        end
      end
      for (int i = 0; i < N; i++) begin
        if (s_we[i] && s_addr[i] == 4'd4) loc4_seen[i] = s_wdata[i];
        if (s_we[i] && s_addr[i] == 4'd5) begin
          n_rnd_ms++;
          if (ms_exp[i].size() == 0) check(1'b0, "random: unexpected message");
          else begin
            automatic logic [15:0] x = ms_exp[i].pop_front();
            check({loc4_seen[i], s_wdata[i]} == x, "random: message locations 4 and 5");
          end
        end
      end
    end
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
  task automatic post(input msg_code_e c, input logic [N-1:0] m, input int a, input int b,
                      input bit ccw, input logic [7:0] d0);
    @(negedge clk);
    msg_in = '{code: c, mask: m, a: 4'(a), b: 4'(b), ccw: ccw, data0: d0};
    msg_valid = 1'b1;
    while (!msg_ready) @(negedge clk);
    @(negedge clk);
    msg_valid = 1'b0;
  endtask
  task automatic settle(input int n);
    repeat (n) @(negedge clk);
  endtask
  task automatic get_arb(output arb_req_t r, input string what);
    int t;
    t = 0;
    while (alog.size() == 0 && t < 200) begin @(negedge clk); t++; end
    check(alog.size() != 0, what);
    r = (alog.size() != 0) ? alog.pop_front() : '0;
  endtask

  initial begin
    #2000000 $display("WATCHDOG");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  initial begin
    arb_req_t r;
    logic [7:0] d;
    rst_n = 0; arb_ready = 1; msg_in = '0; msg_valid = 0;
    e_addr = '0; e_wdata = '0; e_we = '0; e_req = '0;
    nhm = 0; ndd = 0; nmsg = 0; hm0 = '0; dd0 = '0; hms = '0; dds = '0;
    settle(2);
    rst_n = 1;

    // Path request from 3 to 5, urgent, 9 bytes.
    ew(3, 0, {2'd1, 4'd3, TT_PATH_REQ});
    ew(3, 1, 8'd9);
    ew(3, 2, 8'h05);
    ew(3, 3, 8'h02);
    raise(3);
    get_arb(r, "path request forwarded");
    check(r.kind == K_PATH && r.src == 3 && r.dst0 == 5 && r.len == 9 && r.urgent && !r.read
          && r.ndest == 1, "path request fields");
    // GRANT to 3 and 5.
    post(MSG_GRANT, 16'h0028, 3, 5, 1'b1, 8'h00);
    settle(30);
    er(3, 4, d); check(d == 8'(MSG_GRANT), "GRANT code at 3");
    er(3, 5, d); check(d == {2'b00, 1'b1, 1'b1, 4'd5}, "loc5 at sender");
    er(5, 4, d); check(d == 8'(MSG_GRANT), "GRANT code at 5");
    er(5, 5, d); check(d == {2'b00, 1'b1, 1'b0, 4'd3}, "loc5 at receiver");
    check(nmsg == 2, "two element writes");

    // Mail 6 -> 9.
    mail(6, 1, 9, 8'hA1);
    get_arb(r, "mail forwarded");
    check(r.kind == K_MAIL && r.src == 6 && r.dst0 == 9 && r.len == 1, "mail fields");
    // 7 asks for mail while the buffer is busy: RETRY.
    mail(7, 1, 2, 8'hB2);
    settle(20);
    er(7, 4, d); check(d == 8'(MSG_RETRY), "RETRY while buffer busy");
    check(alog.size() == 0, "refused mail not forwarded");
    post(MSG_MAIL, 16'(1 << 9), 6, 9, 1'b0, 8'd1);
    settle(30);
    er(9, 4, d); check(d == 8'(MSG_MAIL), "MAIL code at 9");
    er(9, 5, d); check(d == {4'd1, 4'd6}, "MAIL loc5 at 9");
    er(9, 6, d); check(d == 8'hA1, "mail data at 9");
    // Now 7 retries and is accepted; the arbiter refuses it.
    raise(7);
    get_arb(r, "retried mail forwarded");
    check(r.src == 7 && r.kind == K_MAIL, "retried mail fields");
    post(MSG_REJECT, 16'(1 << 7), 7, 2, 1'b0, 8'd1);
    settle(20);
    er(7, 4, d); check(d == 8'(MSG_REJECT), "REJECT at 7");
    // Buffer free again: mail for the controller.
    mail(4, 0, 0, 8'hC4);
    get_arb(r, "controller mail forwarded");
    check(r.ndest == 0 && r.src == 4, "controller mail fields");
    post(MSG_MAIL, 16'h0000, 4, 0, 1'b0, 8'd1);
    settle(10);
    check(nhm == 1 && hms == 4 && hm0 == 8'hC4, "mail delivered to the controller");

    // Diagnostic data from 8.
    ew(8, 6, 8'h3C);
    ew(8, 1, {4'd6, 4'd6});
    ew(8, 0, {2'd1, 4'd8, TT_DIAG_DATA});
    raise(8);
    settle(20);
    check(ndd == 1 && dds == 8 && dd0 == 8'h3C, "diagnostic data to path check");
    check(alog.size() == 0, "diagnostic data not sent to arbitration");

    // Completion from 3.
    ew(3, 0, {2'd0, 4'd3, TT_COMPLETE});
    raise(3);
    get_arb(r, "completion forwarded");
    check(r.kind == K_COMPLETE && r.src == 3, "completion fields");

    // CHECK to 4 (sender) and 8: pattern in location 6 of the sender.
    post(MSG_CHECK, 16'h0110, 4, 8, 1'b0, 8'h5E);
    settle(30);
    er(4, 4, d); check(d == 8'(MSG_CHECK), "CHECK at 4");
    er(4, 6, d); check(d == 8'h5E, "pattern at sender");

    // Message to 10 while 10's own request is pending.
    ew(10, 0, {2'd1, 4'd10, TT_PATH_REQ});
    ew(10, 2, 8'h0C);
    @(negedge clk);
    e_req[10] = 1'b1;
    msg_in = '{code: MSG_DONE, mask: 16'(1 << 10), a: 4'd10, b: 4'd12, ccw: 1'b0, data0: 8'h00};
    msg_valid = 1'b1;
    @(negedge clk);
    e_req[10] = 1'b0; msg_valid = 1'b0;
    get_arb(r, "pending request read");
    check(r.src == 10 && r.dst0 == 12, "pending request fields");
    settle(20);
    er(10, 4, d); check(d == 8'(MSG_DONE), "message written after the request");

    // Random phase: all 16 elements make path requests with random fields
    // while GRANT messages to random pairs are injected. Every request must
    // reach arbitration with its own fields, and every element must see its
    // messages written, in order, with the right locations 4 and 5.
    settle(20);
    alog.delete();
    for (int i = 0; i < N; i++) begin rq_exp[i].delete(); ms_exp[i].delete(); end
    rnd_on = 1'b1;
    n_fin = 0;
    for (int i = 0; i < N; i++) begin
      fork
        automatic int e = i;
        begin
          for (int r = 0; r < 6; r++) begin
            automatic arb_req_t x = '0;
            x.kind = K_PATH; x.src = 4'(e);
            x.dst0 = 4'($urandom); x.dst1 = 4'($urandom);
            x.ndest = 2'($urandom_range(1, 2)); x.len = 8'($urandom);
            x.read = 1'($urandom); x.urgent = 1'($urandom);
            repeat ($urandom_range(0, 30)) @(negedge clk);
            // An element waits for its previous request to be answered;
            // here, for the stub arbitration to have received it.
            while (rq_exp[e].size() != 0) @(negedge clk);
            ew(e, 0, {x.ndest, 4'(e), TT_PATH_REQ});
            ew(e, 1, x.len);
            ew(e, 2, {x.dst1, x.dst0});
            ew(e, 3, {6'd0, x.urgent, x.read});
            rq_exp[e].push_back(x);
            raise(e);
          end
          n_fin++;
        end
      join_none
    end
    for (int m = 0; m < 60; m++) begin
      int a0, b0;
      bit cw;
      a0 = $urandom_range(0, N - 1);
      b0 = (a0 + $urandom_range(1, N - 1)) % N;
      cw = 1'($urandom);
      ms_exp[a0].push_back({8'(MSG_GRANT), 2'b00, cw, 1'b1, 4'(b0)});
      ms_exp[b0].push_back({8'(MSG_GRANT), 2'b00, cw, 1'b0, 4'(a0)});
      post(MSG_GRANT, 16'(1 << a0) | 16'(1 << b0), a0, b0, cw, 8'h00);
      repeat ($urandom_range(0, 8)) @(negedge clk);
    end
    while (n_fin < N) @(negedge clk);
    settle(300);
    rnd_on = 1'b0;
    begin
      int left;
      left = 0;
      for (int i = 0; i < N; i++) left += rq_exp[i].size() + ms_exp[i].size();
      check(left == 0, "random: every request forwarded and every message written");
      check(n_rnd_rq == 6 * N, "random: all requests forwarded");
      check(n_rnd_ms == 120, "random: all message writes seen");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_bc_arbiter: requests are fed straight into the arbitration unit; the
// message, allocation and set-up outputs are captured. Covered: grant in
// the shorter free direction with the right message mask and allocation
// request, the access table and other rejections, completion (DONE and a
// dismantle), mail masks (one, two, broadcast), ordering by software
// priority when a path frees up, urgent suspension of a lower path, waiting
// for a nearly finished path (remaining time below NEAR_DONE) and removal of
// an expired path with TIMEOUT. Then random requests and completions (no
// urgency) are checked against a reference table of active paths: grants
// only for waiting requesters, no overlap with active paths, the shorter
// direction, busy nodes equal to the union of active paths, and every
// request served by the end. The diagnostics inputs (`remaining`,
// `expired`) are driven by the testbench.
module tb_bc_arbiter;
  import ccsb_pkg::*;
  localparam int N = 16, TW = 12;
  logic                 clk, rst_n;
  arb_req_t             in_req;
  logic                 in_valid, in_ready;
  logic                 cfg_prio_we, cfg_allow_we;
  elem_id_t             cfg_id;
  logic [3:0]           cfg_prio;
  logic [N-1:0]         cfg_allow;
  msg_t                 msg;
  logic                 msg_valid, msg_ready;
  alloc_req_t           alloc;
  logic                 alloc_valid, alloc_ready;
  logic                 setup_valid, clear_valid;
  elem_id_t             setup_src, clear_src;
  logic [7:0]           setup_len;
  logic [1:0]           clear_reason;
  logic [N-1:0]         expired;
  logic [N-1:0][TW-1:0] remaining;
  logic [N-1:0]         busy_nodes;
  logic ev_grant, ev_grant_ccw, ev_reject, ev_suspend, ev_near_wait, ev_timeout, ev_blocked, ev_done;
  int checks = 0, failures = 0;

  bc_arbiter #(.N(N), .QD(8), .TW(TW), .NEAR_DONE(16)) dut (.*);

  initial clk = 1'b0;
  always #5 clk = ~clk;

  task automatic check(input bit c, input string what);
    checks++;
    if (!c) begin failures++; $display("FAIL @%0t: %s", $time, what); end
  endtask

  // Captured outputs.
  msg_t       mlog [$];
  alloc_req_t alog [$];
  int         n_near;
  always @(posedge clk) begin
    if (msg_valid && msg_ready) mlog.push_back(msg);
    if (alloc_valid && alloc_ready) alog.push_back(alloc);
    if (ev_near_wait) n_near++;
  end

  task automatic send(input arb_kind_e k, input int s, input int d0, input int d1, input int nd,
                      input bit urgent, input bit rd);
    @(negedge clk);
    in_req = '{kind: k, src: 4'(s), dst0: 4'(d0), dst1: 4'(d1), ndest: 2'(nd), len: 8'd20,
               read: rd, urgent: urgent, data0: 8'h5A};
    in_valid = 1'b1;
    while (!in_ready) @(negedge clk);
    @(negedge clk);
    in_valid = 1'b0;
  endtask

  task automatic expect_msg(input msg_code_e c, input logic [N-1:0] mask, input string what);
    int t;
    t = 0;
    while (mlog.size() == 0 && t < 100) begin @(negedge clk); t++; end
    if (mlog.size() == 0) check(1'b0, {what, ": no message"});
    else begin
      msg_t m;
      m = mlog.pop_front();
      check(m.code == c && m.mask == mask, what);
      if (m.code != c || m.mask != mask) $display("   got code %0d mask %h", m.code, m.mask);
    end
  endtask

  function automatic logic [N-1:0] bits2(input int a, input int b);
    logic [N-1:0] v;
    v = '0; v[a] = 1'b1; v[b] = 1'b1;
    return v;
  endfunction

  // Reference table for the random phase: per requester, waiting or active,
  // and the nodes of its path.
  bit           r_act [N];
  bit           r_pend [N];
  logic [N-1:0] r_nodes [N];
  logic [N-1:0] r_gone = '0;  // paths completed since the last drain
  int           n_grants_r = 0;

  function automatic logic [N-1:0] path_nodes(input int s, input int d, input bit ccw);
    logic [N-1:0] v;
    int i;
    v = '0; i = s;
    v[i] = 1'b1;
    while (i != d) begin
      i = ccw ? (i + N - 1) % N : (i + 1) % N;
      v[i] = 1'b1;
    end
    return v;
  endfunction

  // Consume the captured messages and allocation requests of the random
  // phase and check them against the reference table.
  task automatic drain_random();
    logic [N-1:0] all;
    while (alog.size() != 0) begin
      alloc_req_t a;
      logic [N-1:0] nd;
      a = alog.pop_front();
      if (!a.dismantle) begin
        nd = path_nodes(int'(a.src), int'(a.far_dst), a.ccw);
        check(r_pend[a.tag] && !r_act[a.tag], "random: grant for a waiting requester");
        for (int i = 0; i < N; i++)
          if (r_act[i]) check((r_nodes[i] & nd) == '0, "random: new path overlaps no active path");
        begin
          logic [N-1:0] alt, used;
          alt  = path_nodes(int'(a.src), int'(a.far_dst), !a.ccw);
          used = '0;
          for (int i = 0; i < N; i++) if (r_act[i]) used |= r_nodes[i];
          used |= r_gone;
          if ($countones(nd) > $countones(alt) || ($countones(nd) == $countones(alt) && a.ccw))
            check((alt & used) != '0, "random: longer direction only when the other is busy");
        end
        r_pend[a.tag] = 0; r_act[a.tag] = 1; r_nodes[a.tag] = nd;
        n_grants_r++;
      end
    end
    while (mlog.size() != 0) begin
      msg_t m;
      m = mlog.pop_front();
      check(m.code == MSG_GRANT || m.code == MSG_DONE, "random: only GRANT and DONE");
      check($countones(m.mask) == 2, "random: message to both ends");
    end
    // A grant marks its nodes busy one cycle before its allocation request
    // is captured here, so a set request still on the port counts as well.
    all = '0;
    for (int i = 0; i < N; i++) if (r_act[i]) all |= r_nodes[i];
    if (alloc_valid && !alloc.dismantle)
      all |= path_nodes(int'(alloc.src), int'(alloc.far_dst), alloc.ccw);
    check(busy_nodes == all, "random: busy nodes match the active paths");
    if (busy_nodes != all) $display("   busy %b expected %b", busy_nodes, all);
    r_gone = '0;
  endtask

  initial begin
    #2000000 $display("WATCHDOG");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  initial begin
    alloc_req_t a;
    rst_n = 0; in_req = '0; in_valid = 0; cfg_prio_we = 0; cfg_allow_we = 0; cfg_id = '0;
    cfg_prio = '0; cfg_allow = '0; msg_ready = 1; alloc_ready = 1; expired = '0;
    n_near = 0;
    for (int i = 0; i < N; i++) remaining[i] = TW'(1000);
    repeat (2) @(negedge clk);
    rst_n = 1;

    // Grant 1 -> 3 clockwise.
    send(K_PATH, 1, 3, 0, 1, 0, 0);
    expect_msg(MSG_GRANT, bits2(1, 3), "GRANT 1->3");
    check(alog.size() == 1, "one allocation request");
    a = alog.pop_front();
    check(a.src == 1 && a.far_dst == 3 && !a.ccw && !a.dismantle && a.tag == 1, "allocation 1->3 CW");
    check(busy_nodes == 16'b0000_0000_0000_1110, "nodes 1..3 busy");
    // 12 -> 10 is shorter counter-clockwise.
    send(K_PATH, 12, 10, 0, 1, 0, 0);
    expect_msg(MSG_GRANT, bits2(12, 10), "GRANT 12->10");
    a = alog.pop_front();
    check(a.ccw && a.far_dst == 10, "allocation 12->10 CCW");
    // Read request: 6 reads from 8, so 8 sends.
    send(K_PATH, 6, 8, 0, 1, 0, 1);
    expect_msg(MSG_GRANT, bits2(6, 8), "GRANT read 6<-8");
    a = alog.pop_front();
    check(a.src == 8 && a.tag == 6 && a.ccw && a.far_dst == 6, "read path driven by 8");

    // Rejections.
    send(K_PATH, 4, 4, 0, 1, 0, 0);
    expect_msg(MSG_REJECT, 16'(1 << 4), "REJECT destination is source");
    send(K_PATH, 1, 5, 0, 1, 0, 0);
    expect_msg(MSG_REJECT, 16'(1 << 1), "REJECT second path for one requester");
    @(negedge clk); cfg_allow_we = 1; cfg_id = 4'd14; cfg_allow = ~16'(1 << 15);
    @(negedge clk); cfg_allow_we = 0;
    send(K_PATH, 14, 15, 0, 1, 0, 0);
    expect_msg(MSG_REJECT, 16'(1 << 14), "REJECT access table");
    send(K_COMPLETE, 9, 0, 0, 0, 0, 0);
    expect_msg(MSG_REJECT, 16'(1 << 9), "REJECT completion without path");

    // Mail.
    send(K_MAIL, 5, 9, 0, 1, 0, 0);
    expect_msg(MSG_MAIL, 16'(1 << 9), "MAIL to one");
    send(K_MAIL, 5, 9, 11, 2, 0, 0);
    expect_msg(MSG_MAIL, bits2(9, 11), "MAIL to two");
    send(K_MAIL, 5, 0, 0, 3, 0, 0);
    expect_msg(MSG_MAIL, ~16'(1 << 5), "MAIL broadcast");
    send(K_MAIL, 5, 0, 0, 0, 0, 0);
    expect_msg(MSG_MAIL, 16'h0000, "MAIL to the controller");

    // Completion of 12->10.
    send(K_COMPLETE, 12, 0, 0, 0, 0, 0);
    expect_msg(MSG_DONE, bits2(12, 10), "DONE 12->10");
    a = alog.pop_front();
    check(a.dismantle && a.ccw && a.src == 12, "dismantle request");

    // Priority: 0 and 4 both blocked by 1->3 (and 6<-8); 4 has priority 5.
    @(negedge clk); cfg_prio_we = 1; cfg_id = 4'd4; cfg_prio = 4'd5;
    @(negedge clk); cfg_prio_we = 0;
    send(K_PATH, 0, 2, 0, 1, 0, 0);
    send(K_PATH, 4, 2, 0, 1, 0, 0);
    repeat (10) @(negedge clk);
    check(mlog.size() == 0, "both blocked");
    send(K_COMPLETE, 1, 0, 0, 0, 0, 0);
    expect_msg(MSG_DONE, bits2(1, 3), "DONE 1->3");
    expect_msg(MSG_GRANT, bits2(4, 2), "higher software priority granted first");
    send(K_COMPLETE, 4, 0, 0, 0, 0, 0);
    expect_msg(MSG_DONE, bits2(4, 2), "DONE 4->2");
    expect_msg(MSG_GRANT, bits2(0, 2), "lower priority granted next");
    void'(alog.size());
    alog.delete();

    // Urgent 7 -> 9 meets 6<-8 (path 8->6 CCW, priority 0, long to go).
    send(K_PATH, 7, 9, 0, 1, 1, 0);
    expect_msg(MSG_SUSPEND, bits2(6, 8), "urgent request suspends lower path");
    expect_msg(MSG_GRANT, bits2(7, 9), "urgent request granted");
    // 6's request is back in the list (blocked by 7->9). Give every path
    // little time left; urgent 15 -> 1 meets only 0->2 clockwise (lower,
    // nearly done) and the urgent 7->9 counter-clockwise: it must wait.
    for (int i = 0; i < N; i++) remaining[i] = TW'(5);
    send(K_PATH, 15, 1, 0, 1, 1, 0);
    repeat (20) @(negedge clk);
    check(n_near > 0, "urgent request waits for nearly finished path");
    check(mlog.size() == 0, "no suspension of nearly finished path");
    // 0->2 expires.
    @(negedge clk); expired = 16'(1 << 0);
    expect_msg(MSG_TIMEOUT, bits2(0, 2), "TIMEOUT on expiry");
    @(negedge clk); expired = '0;
    expect_msg(MSG_GRANT, bits2(15, 1), "waiting urgent request granted");
    repeat (5) @(negedge clk);
    check(mlog.size() == 0, "no duplicate TIMEOUT, 6's request still waits");
    // 7->9 completes: the suspended request is granted again.
    send(K_COMPLETE, 7, 0, 0, 0, 0, 0);
    expect_msg(MSG_DONE, bits2(7, 9), "DONE 7->9");
    expect_msg(MSG_GRANT, bits2(6, 8), "suspended request granted again");

    // Random traffic, checked against a reference table of the paths up.
    // Clear the ring first (paths 15->1 and 8->6 of requesters 15 and 6).
    for (int i = 0; i < N; i++) remaining[i] = TW'(1000);
    send(K_COMPLETE, 15, 0, 0, 0, 0, 0);
    expect_msg(MSG_DONE, bits2(15, 1), "DONE 15->1");
    send(K_COMPLETE, 6, 0, 0, 0, 0, 0);
    expect_msg(MSG_DONE, bits2(6, 8), "DONE 6<-8");
    repeat (3) @(negedge clk);
    alog.delete();
    check(busy_nodes == '0, "ring clear before random traffic");
    for (int i = 0; i < N; i++) begin r_act[i] = 0; r_pend[i] = 0; r_nodes[i] = '0; end
    for (int r = 0; r < 400; r++) begin
      int sx, dx, np;
      np = 0;
      for (int i = 0; i < N; i++) np += int'(r_pend[i]);
      sx = $urandom_range(0, N - 1);
      if (r_act[sx]) begin
        send(K_COMPLETE, sx, 0, 0, 0, 0, 0);
        r_gone |= r_nodes[sx];
        r_act[sx] = 0; r_nodes[sx] = '0;
      end else if (!r_pend[sx] && np < 6) begin
        dx = $urandom_range(0, N - 1);
        if (dx != sx && !(sx == 14 && dx == 15)) begin
          send(K_PATH, sx, dx, 0, 1, 0, 0);
          r_pend[sx] = 1;
        end
      end
      repeat ($urandom_range(0, 6)) @(negedge clk);
      drain_random();
    end
    // Complete everything; every waiting request must be granted on the way.
    for (int k = 0; k < 40; k++) begin
      for (int i = 0; i < N; i++)
        if (r_act[i]) begin
          send(K_COMPLETE, i, 0, 0, 0, 0, 0);
          r_gone |= r_nodes[i];
          r_act[i] = 0; r_nodes[i] = '0;
        end
      repeat (10) @(negedge clk);
      drain_random();
    end
    begin
      int left;
      left = 0;
      for (int i = 0; i < N; i++) left += int'(r_pend[i]) + int'(r_act[i]);
      check(left == 0, "random traffic: every request granted and completed");
    end
    check(busy_nodes == '0, "random traffic: ring clear at the end");
    check(n_grants_r > 20, "random traffic: enough grants");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

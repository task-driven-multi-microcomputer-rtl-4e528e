// bc_arbiter: arbitration process of the bus controller -- Request
// Validation (RV), Request Management (RM), Path Identification (PI), Path
// Suspension (PS) and Message Generator (MG).
//
// Requests from the communication process arrive one per handshake:
//   * path requests and path checks are validated (destination differs from
//     the source, the access table allows the pair, the requester owns no
//     path yet, a read names one destination) and inserted into an ordered
//     list keyed by {urgent, software priority of the requester}; equal keys
//     keep their order of arrival. Invalid requests are answered with REJECT.
//   * completion confirmations remove the requester's path (dismantle request
//     to allocation, DIS to diagnostics) and both ends get DONE.
//   * mail is validated and handed back to the communication process as a
//     MAIL message to one, two or all other elements (an empty mask means the
//     controller itself was the destination).
// PI looks at one list entry per cycle, from the highest priority down, and
// asks path_finder for the shorter free direction. On success the nodes are
// marked busy, the routing table gets the path, allocation receives the
// set request, diagnostics the set-up, and MG sends GRANT (or CHECK) to every
// element on the path. A non-urgent request that finds no path stays in the
// list and the scan moves on. An urgent one goes to PS: in a direction whose
// blocking paths all have a lower key, if none of them reports less than
// NEAR_DONE cycles left, the first blocker is suspended -- dismantled, both
// ends told SUSPEND and its request put back into the list, so it is granted
// again later; if a blocker is about to finish, the request waits for it.
// Time-outs flagged by diagnostics are served first: the path is removed and
// both ends get TIMEOUT.
//
// One action per clock cycle. The ordering key, list depth, NEAR_DONE and the
// message codes are this design's choices; rearranging existing paths to
// make room, which the source design also lists, is not done.
module bc_arbiter
  import ccsb_pkg::*;
#(
  parameter int unsigned N         = 16,
  parameter int unsigned QD        = 8,     // ordered list depth
  parameter int unsigned TW        = 12,
  parameter int unsigned NEAR_DONE = 16     // cycles: "about to be completed"
) (
  input  logic                 clk,
  input  logic                 rst_n,
  // from the communication process
  input  arb_req_t             in_req,
  input  logic                 in_valid,
  output logic                 in_ready,
  // software settable tables
  input  logic                 cfg_prio_we,
  input  elem_id_t             cfg_id,
  input  logic [3:0]           cfg_prio,
  input  logic                 cfg_allow_we,
  input  logic [N-1:0]         cfg_allow,     // destinations cfg_id may reach
  // to the communication process
  output msg_t                 msg,
  output logic                 msg_valid,
  input  logic                 msg_ready,
  // to the allocation process
  output alloc_req_t           alloc,
  output logic                 alloc_valid,
  input  logic                 alloc_ready,
  // to / from diagnostics
  output logic                 setup_valid,
  output elem_id_t             setup_src,
  output logic [7:0]           setup_len,
  output logic                 clear_valid,
  output elem_id_t             clear_src,
  output logic [1:0]           clear_reason,
  input  logic [N-1:0]         expired,
  input  logic [N-1:0][TW-1:0] remaining,
  // status and event pulses
  output logic [N-1:0]         busy_nodes,
  output logic                 ev_grant,
  output logic                 ev_grant_ccw,
  output logic                 ev_reject,
  output logic                 ev_suspend,
  output logic                 ev_near_wait,
  output logic                 ev_timeout,
  output logic                 ev_blocked,
  output logic                 ev_done
);
  localparam int unsigned QW = $clog2(QD + 1);

  typedef struct packed {
    elem_id_t   req;      // requester: owns the path, confirms completion
    elem_id_t   snd;      // element that drives the data bus
    elem_id_t   rcv0;
    elem_id_t   rcv1;
    logic       two;
    logic [7:0] len;
    logic       check;
    logic [7:0] pat;
    logic [4:0] key;      // {urgent, priority}
  } qent_t;

  typedef struct packed {
    logic         v;
    logic [N-1:0] nodes;
    logic [N-1:0] mask;   // elements on the path to inform
    elem_id_t     fdst;
    logic         ccw;
    qent_t        ent;
  } path_t;

  logic [3:0]   prio  [N];
  logic [N-1:0] allow [N];
  qent_t        q     [QD];
  logic [QW-1:0] qcnt;
  logic [QW-1:0] scan;
  path_t        pt    [N];

  // ---------------------------------------------------------------- PI ---
  qent_t         cand;
  logic [N-1:0]  pf_cw_nodes, pf_ccw_nodes, pf_nodes;
  elem_id_t      pf_cw_far, pf_ccw_far, pf_far;
  logic          pf_cw_free, pf_ccw_free, pf_found, pf_ccw;

  assign cand = q[scan[$clog2(QD)-1:0]];

  path_finder #(.N(N), .IW(ID_W)) u_pf (
    .busy     (busy_nodes),
    .src      (cand.snd),
    .dst0     (cand.rcv0),
    .dst1     (cand.rcv1),
    .two      (cand.two),
    .cw_nodes (pf_cw_nodes),
    .ccw_nodes(pf_ccw_nodes),
    .cw_far   (pf_cw_far),
    .ccw_far  (pf_ccw_far),
    .cw_free  (pf_cw_free),
    .ccw_free (pf_ccw_free),
    .found    (pf_found),
    .use_ccw  (pf_ccw),
    .nodes    (pf_nodes),
    .far_dst  (pf_far)
  );

  // ---------------------------------------------------------------- PS ---
  // For each direction: the paths in the way, whether all of them rank
  // below the candidate, whether any is nearly done.
  logic [N-1:0] blk_cw, blk_ccw;
  logic         cw_lower, ccw_lower, cw_near, ccw_near;
  always_comb begin
    cw_lower = 1'b1; ccw_lower = 1'b1; cw_near = 1'b0; ccw_near = 1'b0;
    for (int s = 0; s < int'(N); s++) begin
      blk_cw[s]  = pt[s].v && ((pt[s].nodes & pf_cw_nodes)  != '0);
      blk_ccw[s] = pt[s].v && ((pt[s].nodes & pf_ccw_nodes) != '0);
      if (blk_cw[s]) begin
        if (pt[s].ent.key >= cand.key) cw_lower = 1'b0;
        if (remaining[s] < TW'(NEAR_DONE)) cw_near = 1'b1;
      end
      if (blk_ccw[s]) begin
        if (pt[s].ent.key >= cand.key) ccw_lower = 1'b0;
        if (remaining[s] < TW'(NEAR_DONE)) ccw_near = 1'b1;
      end
    end
  end

  function automatic elem_id_t first_set(input logic [N-1:0] v);
    elem_id_t r = '0;
    for (int i = int'(N) - 1; i >= 0; i--) if (v[i]) r = elem_id_t'(i);
    return r;
  endfunction

  logic      any_exp;
  elem_id_t  exp_id;
  // Only paths still in the routing table count: the diagnostics unit sees
  // the clear one cycle after the arbiter has acted on an expiry.
  logic [N-1:0] exp_v;
  always_comb for (int s = 0; s < int'(N); s++) exp_v[s] = expired[s] && pt[s].v;
  assign any_exp = |exp_v;
  assign exp_id  = first_set(exp_v);

  always_comb begin
    busy_nodes = '0;
    for (int s = 0; s < int'(N); s++) if (pt[s].v) busy_nodes |= pt[s].nodes;
  end

  // ---------------------------------------------------------------- RV ---
  logic [N-1:0] one_hot_src, dmask;
  logic         path_ok, mail_ok;
  qent_t        new_ent;
  always_comb begin
    one_hot_src = '0;
    one_hot_src[in_req.src] = 1'b1;
    dmask = '0;
    case (in_req.ndest)
      2'd0: dmask = '0;
      2'd1: dmask[in_req.dst0] = 1'b1;
      2'd2: begin dmask[in_req.dst0] = 1'b1; dmask[in_req.dst1] = 1'b1; end
      default: dmask = ~one_hot_src;
    endcase
    path_ok = (in_req.ndest == 2'd1 || (in_req.ndest == 2'd2 && !in_req.read))
              && int'(in_req.src) < int'(N) && int'(in_req.dst0) < int'(N)
              && (in_req.ndest != 2'd2 || int'(in_req.dst1) < int'(N))
              && (dmask & one_hot_src) == '0
              && (dmask & ~allow[in_req.src]) == '0
              && !pt[in_req.src].v;
    mail_ok = int'(in_req.src) < int'(N)
              && (dmask & one_hot_src) == '0
              && (in_req.ndest == 2'd3 || (dmask & ~allow[in_req.src]) == '0);
    new_ent.req   = in_req.src;
    new_ent.snd   = in_req.read ? in_req.dst0 : in_req.src;
    new_ent.rcv0  = in_req.read ? in_req.src  : in_req.dst0;
    new_ent.rcv1  = in_req.dst1;
    new_ent.two   = in_req.ndest == 2'd2;
    new_ent.len   = in_req.len;
    new_ent.check = in_req.kind == K_CHECK;
    new_ent.pat   = in_req.data0;
    new_ent.key   = {in_req.urgent, prio[in_req.src]};
  end

  assign in_ready = !any_exp && msg_ready && alloc_ready && (int'(qcnt) < int'(QD));

  // ---------------------------------------------------------------- action -
  // Exactly one of these happens in a cycle (time-out first, then a new
  // request, then the PI/PS step on the list entry at `scan`).
  logic         act_exp, act_in, act_pi, act_grant, act_susp;
  elem_id_t     sus_id;
  path_t        exp_p, cmp_p, sus_p, new_p;
  logic [N-1:0] grant_mask;
  logic         ins_en;
  qent_t        ins_e;
  logic [QW-1:0] ins_pos;
  qent_t        qn [QD];
  logic [QW-1:0] qc_n;

  always_comb begin
    act_exp   = any_exp && msg_ready && alloc_ready;
    act_in    = in_valid && in_ready;
    act_pi    = qcnt != 0 && !in_valid && msg_ready && alloc_ready && !any_exp;
    act_grant = act_pi && pf_found;
    act_susp  = act_pi && !pf_found && cand.key[4]
                && ((cw_lower && !cw_near) || (ccw_lower && !ccw_near))
                && int'(qcnt) < int'(QD);
    sus_id    = (cw_lower && !cw_near) ? first_set(blk_cw) : first_set(blk_ccw);
    exp_p     = pt[exp_id];
    cmp_p     = pt[in_req.src];
    sus_p     = pt[sus_id];
    grant_mask = '0;
    grant_mask[cand.snd]  = 1'b1;
    grant_mask[cand.rcv0] = 1'b1;
    if (cand.two) grant_mask[cand.rcv1] = 1'b1;
    new_p = '{v: 1'b1, nodes: pf_nodes, mask: grant_mask, fdst: pf_far, ccw: pf_ccw, ent: cand};

    // RM: ordered insertion behind all entries of equal or higher key.
    ins_en  = (act_in && (in_req.kind == K_PATH || in_req.kind == K_CHECK) && path_ok) || act_susp;
    ins_e   = act_susp ? sus_p.ent : new_ent;
    ins_pos = qcnt;
    for (int i = int'(QD) - 1; i >= 0; i--)
      if (i < int'(qcnt) && q[i].key < ins_e.key) ins_pos = QW'(i);
    for (int i = 0; i < int'(QD); i++) qn[i] = q[i];
    if (ins_en) begin
      for (int i = 1; i < int'(QD); i++)
        if (i > int'(ins_pos)) qn[i] = q[i-1];
      for (int i = 0; i < int'(QD); i++)
        if (i == int'(ins_pos)) qn[i] = ins_e;
    end
    if (act_grant)
      for (int i = 0; i < int'(QD) - 1; i++)
        if (i >= int'(scan)) qn[i] = q[i+1];
    qc_n = qcnt + QW'(ins_en) - QW'(act_grant);
  end

  // ---------------------------------------------------------------- state -
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < int'(N); i++) begin
        prio[i]  <= '0;
        allow[i] <= '1;
        pt[i]    <= '0;
      end
      for (int i = 0; i < int'(QD); i++) q[i] <= '0;
      qcnt <= '0;
      scan <= '0;
      msg <= '0; msg_valid <= 1'b0;
      alloc <= '0; alloc_valid <= 1'b0;
      setup_valid <= 1'b0; setup_src <= '0; setup_len <= '0;
      clear_valid <= 1'b0; clear_src <= '0; clear_reason <= '0;
      {ev_grant, ev_grant_ccw, ev_reject, ev_suspend, ev_near_wait, ev_timeout, ev_blocked, ev_done} <= '0;
    end else begin
      msg_valid   <= 1'b0;
      alloc_valid <= 1'b0;
      setup_valid <= 1'b0;
      clear_valid <= 1'b0;
      {ev_grant, ev_grant_ccw, ev_reject, ev_suspend, ev_near_wait, ev_timeout, ev_blocked, ev_done} <= '0;
      for (int i = 0; i < int'(QD); i++) q[i] <= qn[i];
      qcnt <= qc_n;

      if (cfg_prio_we)  prio[cfg_id]  <= cfg_prio;
      if (cfg_allow_we) allow[cfg_id] <= cfg_allow;

      if (act_exp) begin
        // TCT expired: remove the path, report the time-out.
        pt[exp_id].v <= 1'b0;
        alloc       <= '{tag: exp_id, far_dst: exp_p.fdst, rsv1: '0, src: exp_p.ent.snd, ccw: exp_p.ccw, dismantle: 1'b1};
        alloc_valid <= 1'b1;
        clear_valid <= 1'b1; clear_src <= exp_id; clear_reason <= 2'd2;
        msg         <= '{code: MSG_TIMEOUT, mask: MAX_ELEM'(exp_p.mask), a: exp_p.ent.snd, b: exp_p.ent.rcv0, ccw: exp_p.ccw, data0: '0};
        msg_valid   <= 1'b1;
        ev_timeout  <= 1'b1;
        scan        <= '0;
      end else if (act_in) begin
        case (in_req.kind)
          K_PATH, K_CHECK: begin
            if (path_ok) begin
              scan <= '0;
            end else begin
              msg       <= '{code: MSG_REJECT, mask: MAX_ELEM'(one_hot_src), a: in_req.src, b: in_req.dst0, ccw: 1'b0, data0: '0};
              msg_valid <= 1'b1;
              ev_reject <= 1'b1;
            end
          end
          K_COMPLETE: begin
            if (cmp_p.v) begin
              pt[in_req.src].v <= 1'b0;
              alloc       <= '{tag: in_req.src, far_dst: cmp_p.fdst, rsv1: '0, src: cmp_p.ent.snd, ccw: cmp_p.ccw, dismantle: 1'b1};
              alloc_valid <= 1'b1;
              clear_valid <= 1'b1; clear_src <= in_req.src; clear_reason <= 2'd0;
              msg         <= '{code: MSG_DONE, mask: MAX_ELEM'(cmp_p.mask), a: cmp_p.ent.snd, b: cmp_p.ent.rcv0, ccw: cmp_p.ccw, data0: '0};
              msg_valid   <= 1'b1;
              ev_done     <= 1'b1;
              scan        <= '0;
            end else begin
              msg       <= '{code: MSG_REJECT, mask: MAX_ELEM'(one_hot_src), a: in_req.src, b: in_req.src, ccw: 1'b0, data0: '0};
              msg_valid <= 1'b1;
              ev_reject <= 1'b1;
            end
          end
          default: begin // K_MAIL
            if (mail_ok) begin
              msg <= '{code: MSG_MAIL, mask: MAX_ELEM'(dmask), a: in_req.src, b: in_req.dst0, ccw: 1'b0, data0: in_req.len};
            end else begin
              msg <= '{code: MSG_REJECT, mask: MAX_ELEM'(one_hot_src), a: in_req.src, b: in_req.dst0, ccw: 1'b0, data0: in_req.len};
              ev_reject <= 1'b1;
            end
            msg_valid <= 1'b1;
          end
        endcase
      end else if (act_grant) begin
        // PI found a path: allocate it and tell the elements (MG).
        pt[cand.req] <= new_p;
        alloc       <= '{tag: cand.req, far_dst: pf_far, rsv1: '0, src: cand.snd, ccw: pf_ccw, dismantle: 1'b0};
        alloc_valid <= 1'b1;
        setup_valid <= 1'b1; setup_src <= cand.req; setup_len <= cand.len;
        msg         <= '{code: cand.check ? MSG_CHECK : MSG_GRANT, mask: MAX_ELEM'(grant_mask), a: cand.snd, b: cand.rcv0, ccw: pf_ccw, data0: cand.pat};
        msg_valid   <= 1'b1;
        ev_grant     <= 1'b1;
        ev_grant_ccw <= pf_ccw;
        scan <= '0;
      end else if (act_susp) begin
        // PS: suspend the first path in the way of an urgent request.
        pt[sus_id].v <= 1'b0;
        alloc       <= '{tag: sus_id, far_dst: sus_p.fdst, rsv1: '0, src: sus_p.ent.snd, ccw: sus_p.ccw, dismantle: 1'b1};
        alloc_valid <= 1'b1;
        clear_valid <= 1'b1; clear_src <= sus_id; clear_reason <= 2'd1;
        msg         <= '{code: MSG_SUSPEND, mask: MAX_ELEM'(sus_p.mask), a: sus_p.ent.snd, b: sus_p.ent.rcv0, ccw: sus_p.ccw, data0: '0};
        msg_valid   <= 1'b1;
        ev_suspend  <= 1'b1;
        scan <= '0;
      end else if (act_pi) begin
        // Not found: the request stays in the list; look at the next one.
        ev_blocked   <= 1'b1;
        ev_near_wait <= cand.key[4] && (cw_lower || ccw_lower);
        scan <= (int'(scan) + 1 >= int'(qcnt)) ? '0 : scan + 1'b1;
      end
    end
  end
endmodule

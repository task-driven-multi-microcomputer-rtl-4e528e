// bus_controller: the central bus controller of the CCSB and its interface
// card.
//
// The source design builds this controller as a small multi-microcomputer
// running four pipelined processes plus two parallel ones (Figure 4.6):
// communication -> arbitration -> allocation -> diagnostics, with general
// chores and the path check beside them. Here each process is a hardware
// unit and the pipeline is formed by valid/ready hand-offs:
//   prio_encoder_latch  hardwired request identification (interface card)
//   bc_comm             RH, RCI, RA, R/Wm: control bus master
//   bc_arbiter          RV, RM, PI, PS, MG: ordered list, routing table
//   bc_alloc            PSp, SC: drives the switch control lines
//   bc_diag             S-U, DIS, TLT, TCT: per-path timers
//   check_path          loop-back test of a path for the executive
//   gen_chores          real-time clock and statistics
// Path-check requests reach arbitration through the same port as requests
// from the communication process, which win when both are offered.
// All timing follows from the units; a single path request with free nodes
// is granted a few cycles after its last control byte is read.
module bus_controller
  import ccsb_pkg::*;
#(
  parameter int unsigned N            = 16,
  parameter int unsigned QD           = 8,
  parameter int unsigned CYC_PER_BYTE = 4,
  parameter int unsigned TCT_GRACE    = 64,
  parameter int unsigned NEAR_DONE    = 16,
  parameter int unsigned TICK_DIV     = 1000,
  parameter int unsigned TW           = 12
) (
  input  logic                    clk,
  input  logic                    rst_n,
  // dedicated lines to the control interfaces
  input  logic [N-1:0]            req_lines,
  output logic [N-1:0]            clr_n,
  // control bus
  output logic [CI_AW-1:0]        cb_addr,
  output logic [7:0]              cb_wdata,
  output logic                    cb_we,
  input  logic [7:0]              cb_rdata,
  // switch control lines of the data bus
  output logic [N-1:0][1:0]       sw_ctl,
  // executive: software settable tables
  input  logic                    cfg_prio_we,
  input  elem_id_t                cfg_id,
  input  logic [3:0]              cfg_prio,
  input  logic                    cfg_allow_we,
  input  logic [N-1:0]            cfg_allow,
  // executive: path check
  input  logic                    chk_start,
  input  elem_id_t                chk_a,
  input  elem_id_t                chk_b,
  input  logic [7:0]              chk_pattern,
  output logic                    chk_busy,
  output logic                    chk_done,
  output logic                    chk_pass,
  // mail for the controller itself
  output logic                    hm_valid,
  output elem_id_t                hm_src,
  output logic [3:0]              hm_len,
  output logic [MAIL_MAX-1:0][7:0] hm_data,
  // general chores
  input  logic                    rtc_load,
  input  logic [31:0]             rtc_value,
  output logic [31:0]             rtc,
  output logic [N-1:0]            busy_nodes,
  output logic [N-1:0]            path_active,
  output logic [15:0]             n_irq,
  output logic [15:0]             n_msg,
  output logic [15:0]             n_grant,
  output logic [15:0]             n_suspend,
  output logic [15:0]             n_timeout,
  output logic [15:0]             n_reject,
  output logic [15:0]             n_completed,
  output logic [$clog2(N+1)-1:0]  max_paths,
  // event pulses (for observation)
  output logic                    ev_grant_ccw,
  output logic                    ev_near_wait,
  output logic                    ev_blocked,
  output logic                    ev_retry,
  output logic                    ev_done
);
  logic          irq, inhibit, ack, force_en;
  elem_id_t      irq_id;
  logic [N-1:0]  force_clr_n;

  prio_encoder_latch #(.N(N), .IW(ID_W)) u_pel (
    .clk, .rst_n, .req(req_lines), .inhibit, .ack, .force_en, .force_clr_n,
    .clr_n, .irq, .irq_id
  );

  arb_req_t c_req, k_req, a_req;
  logic     c_valid, k_valid, a_valid, a_ready;
  msg_t     msg;
  logic     msg_valid, msg_ready;
  logic     dd_valid;
  elem_id_t dd_src;
  logic [7:0] dd_data;
  logic     ev_irq, ev_msg;

  bc_comm #(.N(N)) u_comm (
    .clk, .rst_n, .irq, .irq_id, .inhibit, .ack, .force_en, .force_clr_n,
    .req_lines, .cb_addr, .cb_wdata, .cb_we, .cb_rdata,
    .arb_req(c_req), .arb_valid(c_valid), .arb_ready(a_ready && c_valid),
    .msg_in(msg), .msg_valid, .msg_ready,
    .dd_valid, .dd_src, .dd_data,
    .hm_valid, .hm_src, .hm_len, .hm_data,
    .ev_irq, .ev_msg, .ev_retry
  );

  logic [7:0] unused_np, unused_nf;
  check_path u_chk (
    .clk, .rst_n, .start(chk_start), .a(chk_a), .b(chk_b), .pattern(chk_pattern),
    .arb_req(k_req), .arb_valid(k_valid), .arb_ready(a_ready && !c_valid),
    .dd_valid, .dd_src, .dd_data,
    .busy(chk_busy), .done(chk_done), .pass(chk_pass),
    .n_pass(unused_np), .n_fail(unused_nf)
  );

  assign a_req   = c_valid ? c_req : k_req;
  assign a_valid = c_valid | k_valid;

  alloc_req_t alloc;
  logic       alloc_valid, alloc_ready;
  logic       setup_valid, clear_valid;
  elem_id_t   setup_src, clear_src;
  logic [7:0] setup_len;
  logic [1:0] clear_reason;
  logic [N-1:0] expired;
  logic [N-1:0][TW-1:0] remaining;
  logic       ev_grant, ev_reject, ev_suspend, ev_timeout;

  bc_arbiter #(.N(N), .QD(QD), .TW(TW), .NEAR_DONE(NEAR_DONE)) u_arb (
    .clk, .rst_n,
    .in_req(a_req), .in_valid(a_valid), .in_ready(a_ready),
    .cfg_prio_we, .cfg_id, .cfg_prio, .cfg_allow_we, .cfg_allow,
    .msg, .msg_valid, .msg_ready,
    .alloc, .alloc_valid, .alloc_ready,
    .setup_valid, .setup_src, .setup_len,
    .clear_valid, .clear_src, .clear_reason,
    .expired, .remaining,
    .busy_nodes,
    .ev_grant, .ev_grant_ccw, .ev_reject, .ev_suspend, .ev_near_wait,
    .ev_timeout, .ev_blocked, .ev_done
  );

  logic       al_done, al_dis;
  elem_id_t   al_src;

  bc_alloc #(.N(N)) u_alloc (
    .clk, .rst_n, .in_req(alloc), .in_valid(alloc_valid), .in_ready(alloc_ready),
    .sw_ctl, .done(al_done), .done_src(al_src), .done_dismantle(al_dis)
  );

  logic [15:0] unused_ns, unused_nt;
  bc_diag #(.N(N), .CYC_PER_BYTE(CYC_PER_BYTE), .TCT_GRACE(TCT_GRACE), .TW(TW)) u_diag (
    .clk, .rst_n,
    .setup_valid, .setup_src, .setup_len,
    .alloc_done(al_done), .alloc_done_src(al_src), .alloc_done_dismantle(al_dis),
    .clear_valid, .clear_src, .clear_reason,
    .active(path_active), .expired, .remaining,
    .n_completed, .n_suspended(unused_ns), .n_timeouts(unused_nt)
  );

  gen_chores #(.N(N), .TICK_DIV(TICK_DIV)) u_gc (
    .clk, .rst_n, .rtc_load, .rtc_value, .rtc,
    .ev_irq, .ev_msg, .ev_grant, .ev_suspend, .ev_timeout, .ev_reject,
    .path_active,
    .n_irq, .n_msg, .n_grant, .n_suspend, .n_timeout, .n_reject, .max_paths
  );
endmodule

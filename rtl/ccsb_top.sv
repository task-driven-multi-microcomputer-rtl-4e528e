// ccsb_top: a centrally controlled segmented bus (CCSB) for N elements.
//
// Two layers joined around one central controller:
//   * data layer: seg_data_bus, a closed-loop data bus cut into segments by
//     one bidirectional switch per element; the switch control lines come
//     from the bus controller only.
//   * control layer: one ctrl_interface per element (16-byte shared memory,
//     request latch, switch status read-back), the ctrl_bus joining them to
//     the controller, and the dedicated request / clear-request line pair of
//     each interface.
//   * bus_controller: request identification, communication, arbitration,
//     allocation, diagnostics, path check and general chores.
// An element (a microcomputer, not part of this design) leaves a request in
// locations 0..3 of its interface and pulses e_req; it is interrupted when
// the controller has written an answer in locations 4..5 (and mail in
// 6..15); once granted a path and having seen its switches set, it drives
// or reads the data bus through tx_*/rx_*, and confirms completion with a
// code 3 request. The executive side (priority and access tables, path
// check, real-time clock) is brought out as ports.
module ccsb_top
  import ccsb_pkg::*;
#(
  parameter int unsigned N            = 16,   // elements (source design: 16)
  parameter int unsigned W            = 8,    // data bus width
  parameter int unsigned QD           = 8,
  parameter int unsigned CYC_PER_BYTE = 4,
  parameter int unsigned TCT_GRACE    = 64,
  parameter int unsigned NEAR_DONE    = 16,
  parameter int unsigned TICK_DIV     = 1000
) (
  input  logic                     clk,
  input  logic                     rst_n,
  // element side of every control interface
  input  logic [N-1:0][CI_AW-1:0]  e_addr,
  input  logic [N-1:0][7:0]        e_wdata,
  input  logic [N-1:0]             e_we,
  output logic [N-1:0][7:0]        e_rdata,
  input  logic [N-1:0]             e_req,
  output logic [N-1:0]             e_owns,
  output logic [N-1:0]             e_int_n,
  output logic [N-1:0]             e_acc_irq,
  output logic [N-1:0][1:0]        e_sw_own,
  output logic [N-1:0][1:0]        e_sw_adj,
  output logic [N-1:0]             e_sw_adj_xor,
  // data bus taps
  input  logic [N-1:0]             tx_en,
  input  logic [N-1:0][W-1:0]      tx_data,
  output logic [N-1:0][W-1:0]      rx_data,
  output logic [N-1:0]             rx_valid,
  output logic [N-1:0]             contention,
  // executive
  input  logic                     cfg_prio_we,
  input  elem_id_t                 cfg_id,
  input  logic [3:0]               cfg_prio,
  input  logic                     cfg_allow_we,
  input  logic [N-1:0]             cfg_allow,
  input  logic                     chk_start,
  input  elem_id_t                 chk_a,
  input  elem_id_t                 chk_b,
  input  logic [7:0]               chk_pattern,
  output logic                     chk_busy,
  output logic                     chk_done,
  output logic                     chk_pass,
  output logic                     hm_valid,
  output elem_id_t                 hm_src,
  output logic [3:0]               hm_len,
  output logic [MAIL_MAX-1:0][7:0] hm_data,
  input  logic                     rtc_load,
  input  logic [31:0]              rtc_value,
  output logic [31:0]              rtc,
  output logic [N-1:0][1:0]        sw_ctl,
  output logic [N-1:0]             busy_nodes,
  output logic [N-1:0]             path_active,
  output logic [15:0]              n_irq,
  output logic [15:0]              n_msg,
  output logic [15:0]              n_grant,
  output logic [15:0]              n_suspend,
  output logic [15:0]              n_timeout,
  output logic [15:0]              n_reject,
  output logic [15:0]              n_completed,
  output logic [$clog2(N+1)-1:0]   max_paths,
  output logic                     ev_grant_ccw,
  output logic                     ev_near_wait,
  output logic                     ev_blocked,
  output logic                     ev_retry,
  output logic                     ev_done
);
  logic [N-1:0]            req_lines, clr_n;
  logic [CI_AW-1:0]        cb_addr;
  logic [7:0]              cb_wdata, cb_rdata;
  logic                    cb_we, cb_none;
  logic [N-1:0][CI_AW-1:0] s_addr;
  logic [N-1:0][7:0]       s_wdata, s_rdata;
  logic [N-1:0]            s_we;
  logic [N-1:0]            unused_iso, unused_ill;

  bus_controller #(
    .N(N), .QD(QD), .CYC_PER_BYTE(CYC_PER_BYTE), .TCT_GRACE(TCT_GRACE),
    .NEAR_DONE(NEAR_DONE), .TICK_DIV(TICK_DIV)
  ) u_bc (
    .clk, .rst_n, .req_lines, .clr_n,
    .cb_addr, .cb_wdata, .cb_we, .cb_rdata,
    .sw_ctl,
    .cfg_prio_we, .cfg_id, .cfg_prio, .cfg_allow_we, .cfg_allow,
    .chk_start, .chk_a, .chk_b, .chk_pattern, .chk_busy, .chk_done, .chk_pass,
    .hm_valid, .hm_src, .hm_len, .hm_data,
    .rtc_load, .rtc_value, .rtc,
    .busy_nodes, .path_active,
    .n_irq, .n_msg, .n_grant, .n_suspend, .n_timeout, .n_reject, .n_completed,
    .max_paths,
    .ev_grant_ccw, .ev_near_wait, .ev_blocked, .ev_retry, .ev_done
  );

  ctrl_bus #(.N(N), .AW(CI_AW)) u_cbus (
    .clr_n, .m_addr(cb_addr), .m_wdata(cb_wdata), .m_we(cb_we),
    .m_rdata(cb_rdata), .m_none(cb_none),
    .s_addr, .s_wdata, .s_we, .s_rdata
  );

  for (genvar i = 0; i < N; i++) begin : g_ci
    localparam int unsigned ADJ = (i + N - 1) % N;   // switch S_(i-1)
    ctrl_interface #(.BYTES(CI_BYTES), .AW(CI_AW)) u_ci (
      .clk, .rst_n,
      .e_addr(e_addr[i]), .e_wdata(e_wdata[i]), .e_we(e_we[i]), .e_rdata(e_rdata[i]),
      .e_req(e_req[i]), .e_owns(e_owns[i]), .e_int_n(e_int_n[i]), .e_acc_irq(e_acc_irq[i]),
      .sw_own(sw_ctl[i]), .sw_adj(sw_ctl[ADJ]),
      .e_sw_own(e_sw_own[i]), .e_sw_adj(e_sw_adj[i]), .e_sw_adj_xor(e_sw_adj_xor[i]),
      .req_line(req_lines[i]), .clr_n(clr_n[i]),
      .c_addr(s_addr[i]), .c_wdata(s_wdata[i]), .c_we(s_we[i]), .c_rdata(s_rdata[i])
    );
  end

  seg_data_bus #(.N(N), .W(W)) u_dbus (
    .sw_ctl, .tx_en, .tx_data, .rx_data, .rx_valid, .contention,
    .sw_isolated(unused_iso), .sw_illegal(unused_ill)
  );

  logic unused_none;
  assign unused_none = cb_none;
endmodule

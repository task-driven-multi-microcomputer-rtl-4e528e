// bc_comm: communication process of the bus controller -- Request Handler
// (RH), Read Control Information (RCI), Request Analysis (RA) and
// Read/Write Message (R/Wm).
//
// This block is the only master of the control bus. RH loops over two
// sources of work:
//   * internal requests: messages from arbitration, queued first come first
//     served. Polled first, as the source design asks, unless the element to
//     be told has a request of its own pending (its request line is high, or
//     the priority encoder has latched it): that request is read first so it
//     is not lost. A forced write to one element temporarily hands the memory
//     back to an element whose request the encoder has latched but not yet
//     read; its request latch is already clear. An element must therefore
//     not rewrite locations 0..3 until its request has been answered (GRANT,
//     REJECT, RETRY, MAIL delivery ...), not merely until its request line
//     drops. (Reading latched requests first instead would let the two
//     processes block each other when arbitration applies back-pressure.) To write a message RH inhibits the priority encoder latch,
//     forces only the target's clear-request line low (which hands the
//     target's memory to the controller), writes location 4 (message code),
//     location 5 (partner, role, direction or mail sender and byte count) and,
//     for mail or a path check, locations 6.., then lets the lines go. A
//     message for several elements is written to one element at a time.
//     A mail message with no element to inform is mail for the controller
//     itself and goes out on the `hm_*` port.
//   * external requests: when the encoder latches a request (`irq`) RCI reads
//     locations 0..3 of the selected interface. For transaction code 0 (mail)
//     and 2 (diagnostic data) R/Wm goes on to read the data between the start
//     and end addresses given in location 1 before releasing the interface.
//     RA then hands paths, completions and mail to arbitration, and
//     diagnostic data to the path check unit. If the single mail buffer is
//     still busy, the element is told RETRY in the same access.
//
// Timing: one control bus access per cycle (the interface memories read
// combinationally); a request costs 4 + data bytes + 2 cycles of control bus
// time, a message 2 + mail bytes + 2 cycles per element.
// The message format, the single mail buffer and the RETRY answer are this
// design's choices.
module bc_comm
  import ccsb_pkg::*;
#(
  parameter int unsigned N  = 16,
  parameter int unsigned MQ = 4        // internal message queue depth
) (
  input  logic                    clk,
  input  logic                    rst_n,
  // priority encoder latch
  input  logic                    irq,
  input  elem_id_t                irq_id,
  output logic                    inhibit,
  output logic                    ack,
  output logic                    force_en,
  output logic [N-1:0]            force_clr_n,
  input  logic [N-1:0]            req_lines,
  // control bus master
  output logic [CI_AW-1:0]        cb_addr,
  output logic [7:0]              cb_wdata,
  output logic                    cb_we,
  input  logic [7:0]              cb_rdata,
  // to arbitration
  output arb_req_t                arb_req,
  output logic                    arb_valid,
  input  logic                    arb_ready,
  // internal messages from arbitration
  input  msg_t                    msg_in,
  input  logic                    msg_valid,
  output logic                    msg_ready,
  // diagnostic data (path check)
  output logic                    dd_valid,
  output elem_id_t                dd_src,
  output logic [7:0]              dd_data,
  // mail addressed to the controller
  output logic                    hm_valid,
  output elem_id_t                hm_src,
  output logic [3:0]              hm_len,
  output logic [MAIL_MAX-1:0][7:0] hm_data,
  // events
  output logic                    ev_irq,
  output logic                    ev_msg,
  output logic                    ev_retry
);
  localparam int unsigned PW = (MQ > 1) ? $clog2(MQ) : 1;

  typedef enum logic [3:0] {
    C_IDLE, C_RCI, C_RDATA, C_RETRY, C_ACK, C_PUSH,
    C_FORCE, C_MW, C_MW_END
  } c_state_e;

  c_state_e              st;
  msg_t                  mq [MQ];
  logic [PW-1:0]         mq_rd, mq_wr;
  logic [PW:0]           mq_cnt;
  logic                  cur_act;        // a message is being written
  msg_t                  cur;
  logic [N-1:0]          cur_mask;
  elem_id_t              tgt;
  logic [3:0]            idx;            // byte counter within an access
  logic [7:0]            b0, b1, b2, b3;
  elem_id_t              rsrc;
  logic [MAIL_MAX-1:0][7:0] mbuf;
  logic [3:0]            mlen;
  logic                  mbusy;
  logic                  ev_retry_q;
  logic [3:0]            mw_last;        // last location of a message write

  function automatic elem_id_t first_set(input logic [N-1:0] v);
    elem_id_t r = '0;
    for (int i = int'(N) - 1; i >= 0; i--) if (v[i]) r = elem_id_t'(i);
    return r;
  endfunction

  // Data range of a code 0/2 request, clipped to the mail box.
  logic [3:0] r_lo, r_hi;
  always_comb begin
    r_lo = (b1[3:0] < 4'(MAIL_LO)) ? 4'(MAIL_LO) : b1[3:0];
    r_hi = (b1[7:4] < r_lo) ? r_lo : b1[7:4];
  end

  elem_id_t next_tgt;
  logic [N-1:0] eff_mask;
  assign eff_mask  = cur_act ? cur_mask : ((mq_cnt != 0) ? mq[mq_rd].mask[N-1:0] : '0);
  assign next_tgt  = first_set(eff_mask);
  assign msg_ready = mq_cnt != (PW+1)'(MQ);

  always_comb begin
    mw_last = 4'd5;
    if (cur.code == MSG_MAIL && cur.data0[3:0] != 0)
      mw_last = 4'd5 + ((cur.data0[3:0] > 4'(MAIL_MAX)) ? 4'(MAIL_MAX) : cur.data0[3:0]);
    if (cur.code == MSG_CHECK && tgt == cur.a) mw_last = 4'(MAIL_LO);
  end

  // Location 5 value for the element being written.
  function automatic logic [7:0] loc5(input msg_t m, input elem_id_t e, input logic [3:0] n);
    grant_loc5_t g;
    if (m.code == MSG_MAIL) return {n, m.a};
    g.rsv     = '0;
    g.ccw     = m.ccw;
    g.sender  = (e == m.a);
    g.partner = (e == m.a) ? m.b : m.a;
    return g;
  endfunction

  always_comb begin
    inhibit     = st inside {C_FORCE, C_MW, C_MW_END};
    force_en    = st inside {C_MW, C_MW_END};
    force_clr_n = '1;
    if (force_en) force_clr_n[tgt] = 1'b0;
    ack      = st == C_ACK;
    cb_addr  = '0;
    cb_wdata = '0;
    cb_we    = 1'b0;
    case (st)
      C_RCI:   cb_addr = CI_AW'(idx);
      C_RDATA: cb_addr = CI_AW'(idx);
      C_RETRY: begin
        cb_addr  = (idx == 0) ? CI_AW'(4) : CI_AW'(5);
        cb_wdata = (idx == 0) ? 8'(MSG_RETRY) : 8'h00;
        cb_we    = 1'b1;
      end
      C_MW: begin
        cb_addr = CI_AW'(idx);
        cb_we   = 1'b1;
        if (idx == 4)      cb_wdata = 8'(cur.code);
        else if (idx == 5) cb_wdata = loc5(cur, tgt, cur.data0[3:0]);
        else if (cur.code == MSG_MAIL) cb_wdata = mbuf[idx - 4'(MAIL_LO)];
        else               cb_wdata = cur.data0;
      end
      default: ;
    endcase
  end

  logic mpush, mpop;
  assign mpush = msg_valid && msg_ready;
  assign mpop  = st == C_IDLE && !cur_act && mq_cnt != 0;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= C_IDLE;
      for (int i = 0; i < int'(MQ); i++) mq[i] <= '0;
      mq_rd <= '0; mq_wr <= '0; mq_cnt <= '0;
      cur_act <= 1'b0; cur <= '0; cur_mask <= '0; tgt <= '0;
      idx <= '0; b0 <= '0; b1 <= '0; b2 <= '0; b3 <= '0; rsrc <= '0;
      mbuf <= '0; mlen <= '0; mbusy <= 1'b0;
      arb_req <= '0; arb_valid <= 1'b0;
      dd_valid <= 1'b0; dd_src <= '0; dd_data <= '0;
      hm_valid <= 1'b0; hm_src <= '0; hm_len <= '0; hm_data <= '0;
      ev_irq <= 1'b0; ev_msg <= 1'b0; ev_retry <= 1'b0;
    end else begin
      dd_valid <= 1'b0;
      hm_valid <= 1'b0;
      ev_irq   <= 1'b0;
      ev_msg   <= 1'b0;
      ev_retry <= 1'b0;
      if (mpush) begin
        mq[mq_wr] <= msg_in;
        mq_wr     <= (mq_wr == PW'(MQ-1)) ? '0 : mq_wr + 1'b1;
      end
      if (arb_valid && arb_ready) arb_valid <= 1'b0;

      case (st)
        C_IDLE: begin
          if (!cur_act && mq_cnt != 0) begin
            // RH: take the next internal request.
            cur      <= mq[mq_rd];
            cur_mask <= mq[mq_rd].mask[N-1:0];
            cur_act  <= 1'b1;
            mq_rd    <= (mq_rd == PW'(MQ-1)) ? '0 : mq_rd + 1'b1;
          end else if (cur_act && cur_mask == '0) begin
            // Message finished (or mail for the controller itself).
            if (cur.code == MSG_MAIL) begin
              if (cur.mask == '0) begin
                hm_valid <= 1'b1;
                hm_src   <= cur.a;
                hm_len   <= cur.data0[3:0];
                hm_data  <= mbuf;
              end
              mbusy <= 1'b0;
            end
            // A refused mail (REJECT carrying a byte count) frees the buffer.
            if (cur.code == MSG_REJECT && cur.data0 != 0) mbusy <= 1'b0;
            cur_act <= 1'b0;
          end else if (cur_act && !req_lines[next_tgt] && !(irq && irq_id == next_tgt)) begin
            tgt <= next_tgt;
            st  <= C_FORCE;
          end else if (irq && !arb_valid) begin
            rsrc <= irq_id;
            idx  <= '0;
            st   <= C_RCI;
          end
        end
        C_FORCE: begin
          // Latch clock inhibited; make sure no request appeared meanwhile.
          if (req_lines[tgt]) st <= C_IDLE;
          else begin
            idx <= 4'd4;
            st  <= C_MW;
          end
        end
        C_MW: begin
          if (idx == mw_last) st <= C_MW_END;
          idx <= idx + 1'b1;
        end
        C_MW_END: begin
          cur_mask[tgt] <= 1'b0;
          ev_msg        <= 1'b1;
          st            <= C_IDLE;
        end
        C_RCI: begin
          case (idx[1:0])
            2'd0: b0 <= cb_rdata;
            2'd1: b1 <= cb_rdata;
            2'd2: b2 <= cb_rdata;
            default: b3 <= cb_rdata;
          endcase
          if (idx == 3) begin
            ev_irq <= 1'b1;
            if (b0[1:0] == TT_DATA_READY && mbusy) begin
              idx <= '0;
              st  <= C_RETRY;
            end else if (b0[1:0] == TT_DATA_READY || b0[1:0] == TT_DIAG_DATA) begin
              idx <= r_lo;
              st  <= C_RDATA;
            end else st <= C_ACK;
          end else idx <= idx + 1'b1;
        end
        C_RDATA: begin
          // R/Wm: data bytes of a mail or diagnostic return.
          if (b0[1:0] == TT_DATA_READY) mbuf[idx - 4'(MAIL_LO)] <= cb_rdata;
          if (idx == r_lo && b0[1:0] == TT_DIAG_DATA) dd_data <= cb_rdata;
          if (idx == r_hi) st <= C_ACK;
          idx <= idx + 1'b1;
        end
        C_RETRY: begin
          if (idx == 1) begin
            ev_retry <= 1'b1;
            st       <= C_ACK;
          end
          idx <= idx + 1'b1;
        end
        C_ACK: begin
          // RA: hand the request on.
          if (b0[1:0] == TT_DATA_READY && !mbusy) begin
            mbusy <= 1'b1;
            mlen  <= r_hi - r_lo + 1'b1;
          end
          st <= C_PUSH;
        end
        C_PUSH: begin
          st <= C_IDLE;
          case (b0[1:0])
            TT_DIAG_DATA: begin
              dd_valid <= 1'b1;
              dd_src   <= rsrc;
            end
            TT_PATH_REQ: begin
              arb_req   <= '{kind: K_PATH, src: rsrc, dst0: b2[3:0], dst1: b2[7:4],
                             ndest: b0[7:6], len: b1, read: b3[0], urgent: b3[1], data0: '0};
              arb_valid <= 1'b1;
            end
            TT_COMPLETE: begin
              arb_req   <= '{kind: K_COMPLETE, src: rsrc, dst0: '0, dst1: '0,
                             ndest: '0, len: '0, read: 1'b0, urgent: 1'b0, data0: '0};
              arb_valid <= 1'b1;
            end
            default: begin // mail, unless it was turned away
              if (!ev_retry_q) begin
                arb_req   <= '{kind: K_MAIL, src: rsrc, dst0: b2[3:0], dst1: b2[7:4],
                               ndest: b0[7:6], len: {4'd0, mlen}, read: 1'b0, urgent: 1'b0, data0: '0};
                arb_valid <= 1'b1;
              end
            end
          endcase
        end
        default: st <= C_IDLE;
      endcase
      mq_cnt <= mq_cnt + (PW+1)'(mpush) - (PW+1)'(mpop);
    end
  end

  // Remembers that the current code 0 request was answered with RETRY.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) ev_retry_q <= 1'b0;
    else if (st == C_RETRY) ev_retry_q <= 1'b1;
    else if (st == C_RCI)   ev_retry_q <= 1'b0;
  end
endmodule

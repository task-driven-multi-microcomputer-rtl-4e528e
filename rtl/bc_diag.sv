// bc_diag: communication diagnostics of the bus controller -- Set-Up (S-U),
// Dismantle (DIS), Transaction Length Timer (TLT) and Transaction Completion
// Timer (TCT).
//
// Each active path is kept in the slot of its source element (an element is
// the source of at most one path at a time). S-U records a newly granted
// path's estimated length; when the allocation process reports the path's
// switches set, TLT starts counting down LEN x CYC_PER_BYTE cycles -- the time
// the transfer should need. When TLT reaches zero, TCT gives the requester a
// further TCT_GRACE cycles to confirm completion; if no confirmation comes the
// slot is flagged `expired` and the arbitration process removes the path and
// reports the error. DIS ends a slot on completion, suspension or time-out
// and counts each kind (the COMPLETED and SUSPENDED lists of the source
// design reduced to counters). `remaining` gives the TLT count per slot, which
// arbitration uses to judge whether a blocking transfer is nearly done.
// The length field is one byte and the longest transfer is 256 bytes, so a
// length of 0 stands for 256.
//
// The source design uses one down counter over a list ordered by relative
// length and notes that hardware counters may be used instead; this design
// gives every slot its own counter. CYC_PER_BYTE and TCT_GRACE are this
// design's choices.
module bc_diag
  import ccsb_pkg::*;
#(
  parameter int unsigned N            = 16,
  parameter int unsigned CYC_PER_BYTE = 4,
  parameter int unsigned TCT_GRACE    = 64,
  parameter int unsigned TW           = 12    // timer width: 256*4 cycles + margin
) (
  input  logic                 clk,
  input  logic                 rst_n,
  // S-U: path granted
  input  logic                 setup_valid,
  input  elem_id_t             setup_src,
  input  logic [7:0]           setup_len,
  // allocation finished a request
  input  logic                 alloc_done,
  input  elem_id_t             alloc_done_src,
  input  logic                 alloc_done_dismantle,
  // DIS: path ended
  input  logic                 clear_valid,
  input  elem_id_t             clear_src,
  input  logic [1:0]           clear_reason,   // 0 complete, 1 suspend, 2 time-out
  output logic [N-1:0]         active,
  output logic [N-1:0]         expired,
  output logic [N-1:0][TW-1:0] remaining,
  output logic [15:0]          n_completed,
  output logic [15:0]          n_suspended,
  output logic [15:0]          n_timeouts
);
  typedef enum logic [2:0] {D_IDLE, D_ARM, D_TLT, D_TCT, D_EXP} d_phase_e;

  // TLT duration of a transfer of `l` bytes (0 means 256).
  function automatic logic [TW-1:0] tlt_cycles(input logic [7:0] l);
    return (l == 8'd0) ? TW'(256 * CYC_PER_BYTE) : TW'(l) * TW'(CYC_PER_BYTE);
  endfunction

  d_phase_e          ph  [N];
  logic [TW-1:0]     cnt [N];
  logic [7:0]        len [N];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < int'(N); i++) begin
        ph[i]  <= D_IDLE;
        cnt[i] <= '0;
        len[i] <= '0;
      end
      n_completed <= '0;
      n_suspended <= '0;
      n_timeouts  <= '0;
    end else begin
      for (int i = 0; i < int'(N); i++) begin
        case (ph[i])
          D_TLT: if (cnt[i] == 0) begin
                   ph[i]  <= D_TCT;
                   cnt[i] <= TW'(TCT_GRACE);
                 end else cnt[i] <= cnt[i] - 1'b1;
          D_TCT: if (cnt[i] == 0) ph[i] <= D_EXP;
                 else cnt[i] <= cnt[i] - 1'b1;
          default: ;
        endcase
      end
      if (alloc_done && !alloc_done_dismantle && ph[alloc_done_src] == D_ARM) begin
        ph[alloc_done_src]  <= D_TLT;
        cnt[alloc_done_src] <= tlt_cycles(len[alloc_done_src]);
      end
      if (setup_valid) begin
        ph[setup_src]  <= D_ARM;
        len[setup_src] <= setup_len;
        cnt[setup_src] <= '0;
      end
      if (clear_valid) begin
        ph[clear_src]  <= D_IDLE;
        cnt[clear_src] <= '0;
        case (clear_reason)
          2'd0:    n_completed <= n_completed + 1'b1;
          2'd1:    n_suspended <= n_suspended + 1'b1;
          default: n_timeouts  <= n_timeouts + 1'b1;
        endcase
      end
    end
  end

  always_comb begin
    for (int i = 0; i < int'(N); i++) begin
      active[i]    = ph[i] != D_IDLE;
      expired[i]   = ph[i] == D_EXP;
      remaining[i] = (ph[i] == D_TLT) ? cnt[i] : (ph[i] == D_ARM ? tlt_cycles(len[i]) : '0);
    end
  end
endmodule

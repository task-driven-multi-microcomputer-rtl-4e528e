// bc_alloc: allocation process of the bus controller -- Path Specification
// (PSp) and Switch Control (SC).
//
// Takes the two-byte allocation requests of the source design (byte 1: set or
// dismantle, CW or CCW, source; byte 2: furthest destination) into a small
// first-come first-served queue. For the request at the head, PSp works out
// the switches along the path: clockwise from s to d these are S_s .. S_(d-1),
// counter-clockwise S_(s-1) down to S_d. SC then writes one switch per clock
// cycle: CW flow (11) or CCW flow (00) when setting, isolated (01) when
// dismantling. After the last switch a one-cycle `done` pulse, with the
// source and the kind of request, goes to the diagnostics process.
// All switches reset to isolated, the normal position of the source design.
//
// Timing: a path of L links takes 1 + L cycles from leaving the queue to
// `done`. The queue depth (4) is this design's choice.
module bc_alloc
  import ccsb_pkg::*;
#(
  parameter int unsigned N     = 16,
  parameter int unsigned DEPTH = 4
) (
  input  logic              clk,
  input  logic              rst_n,
  input  alloc_req_t        in_req,
  input  logic              in_valid,
  output logic              in_ready,
  output logic [N-1:0][1:0] sw_ctl,
  output logic              done,
  output elem_id_t          done_src,
  output logic              done_dismantle
);
  localparam int unsigned PW = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  alloc_req_t         q [DEPTH];
  logic [PW-1:0]      rd_p, wr_p;
  logic [PW:0]        count;

  typedef enum logic [1:0] {A_IDLE, A_SPEC, A_SET} a_state_e;
  a_state_e           st;
  alloc_req_t         cur;
  logic [$clog2(N)-1:0] k;      // switch being set
  logic [$clog2(N+1)-1:0] left;  // switches still to set

  assign in_ready = count != (PW+1)'(DEPTH);

  function automatic logic [$clog2(N)-1:0] wrap(input int v);
    return ($clog2(N))'((v + int'(N)) % int'(N));
  endfunction

  logic push, pop;
  assign push = in_valid && in_ready;
  assign pop  = st == A_IDLE && count != 0;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rd_p  <= '0;
      wr_p  <= '0;
      count <= '0;
      st    <= A_IDLE;
      cur   <= '0;
      k     <= '0;
      left  <= '0;
      done  <= 1'b0;
      done_src <= '0;
      done_dismantle <= 1'b0;
      for (int i = 0; i < int'(N); i++) sw_ctl[i] <= SW_ISO;
      for (int i = 0; i < int'(DEPTH); i++) q[i] <= '0;
    end else begin
      done <= 1'b0;
      if (push) begin
        q[wr_p] <= in_req;
        wr_p    <= (wr_p == PW'(DEPTH-1)) ? '0 : wr_p + 1'b1;
      end
      case (st)
        A_IDLE: if (count != 0) begin
          cur  <= q[rd_p];
          rd_p <= (rd_p == PW'(DEPTH-1)) ? '0 : rd_p + 1'b1;
          st   <= A_SPEC;
        end
        A_SPEC: begin
          // PSp: first switch and number of switches on the path.
          if (cur.ccw) begin
            k    <= wrap(int'(cur.src) - 1);
            left <= ($clog2(N+1))'(wrap(int'(cur.src) - int'(cur.far_dst)));
          end else begin
            k    <= ($clog2(N))'(cur.src);
            left <= ($clog2(N+1))'(wrap(int'(cur.far_dst) - int'(cur.src)));
          end
          st <= A_SET;
        end
        A_SET: begin
          // SC: one switch per cycle.
          if (left == 0) begin
            done           <= 1'b1;
            done_src       <= cur.tag;
            done_dismantle <= cur.dismantle;
            st             <= A_IDLE;
          end else begin
            sw_ctl[k] <= cur.dismantle ? SW_ISO : (cur.ccw ? SW_CCW : SW_CW);
            k         <= cur.ccw ? wrap(int'(k) - 1) : wrap(int'(k) + 1);
            left      <= left - 1'b1;
          end
        end
        default: st <= A_IDLE;
      endcase
      count <= count + (PW+1)'(push) - (PW+1)'(pop);
    end
  end
endmodule

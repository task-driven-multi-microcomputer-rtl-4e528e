// check_path: the CHECK PATH task of the bus controller's diagnostics.
//
// On `start` from the system executive, the unit sends a path-check request
// for the pair (a, b) with a known data pattern to arbitration. Arbitration
// sets a path as for any request and tells both elements CHECK; element a
// puts the pattern on the data bus, element b captures it and returns it as
// diagnostic data (transaction code 2). When that data comes back from
// element b the unit compares it with the pattern and reports the result to
// the executive with `done` and `pass` (flow of Figure 4.9 of the source
// design: wait for a request, start the check via arbitration, wait for the
// loop-back, compare, inform the executive). One check at a time; further
// `start` pulses while busy are ignored. Diagnostic data from other elements
// is ignored. Counters of passed and failed checks are kept for the
// executive.
module check_path
  import ccsb_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       start,
  input  elem_id_t   a,
  input  elem_id_t   b,
  input  logic [7:0] pattern,
  output arb_req_t   arb_req,
  output logic       arb_valid,
  input  logic       arb_ready,
  input  logic       dd_valid,
  input  elem_id_t   dd_src,
  input  logic [7:0] dd_data,
  output logic       busy,
  output logic       done,
  output logic       pass,
  output logic [7:0] n_pass,
  output logic [7:0] n_fail
);
  typedef enum logic [1:0] {K_IDLE, K_REQ, K_WAIT} k_state_e;
  k_state_e   st;
  elem_id_t   rb;
  logic [7:0] pat;

  assign busy = st != K_IDLE;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= K_IDLE; rb <= '0; pat <= '0;
      arb_req <= '0; arb_valid <= 1'b0;
      done <= 1'b0; pass <= 1'b0; n_pass <= '0; n_fail <= '0;
    end else begin
      done <= 1'b0;
      case (st)
        K_IDLE: if (start) begin
          rb        <= b;
          pat       <= pattern;
          arb_req   <= '{kind: K_CHECK, src: a, dst0: b, dst1: '0, ndest: 2'd1,
                         len: 8'd1, read: 1'b0, urgent: 1'b0, data0: pattern};
          arb_valid <= 1'b1;
          st        <= K_REQ;
        end
        K_REQ: if (arb_ready) begin
          arb_valid <= 1'b0;
          st        <= K_WAIT;
        end
        K_WAIT: if (dd_valid && dd_src == rb) begin
          done <= 1'b1;
          pass <= dd_data == pat;
          if (dd_data == pat) n_pass <= n_pass + 1'b1;
          else                n_fail <= n_fail + 1'b1;
          st   <= K_IDLE;
        end
        default: st <= K_IDLE;
      endcase
    end
  end
endmodule

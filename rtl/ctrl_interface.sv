// ctrl_interface: an element's control interface (CI) to the bus controller.
//
// The CI is built around a 16-byte read/write memory shared by the element and
// the bus controller. The element writes its request record into locations
// 0..3 and pulses `e_req`, which sets the request latch; the latch drives the
// element's dedicated request line to the controller's priority encoder. The
// controller's clear-request line for this element doubles as the memory
// select (Table 4.2 of the source design):
//   clr_n = 1 : the element owns the memory;
//   clr_n = 0 : the controller owns it, and the request latch is cleared.
// The clear acts once, on the first cycle of a controller access, and only on
// a request latched before that access began. A request raised on the edge
// the access begins, or during the access (possible when the controller
// starts a forced write on its own initiative just as the element asks), is
// kept: it stays pending through the access and the encoder picks it up
// afterwards. This guard against lost requests is this design's addition;
// the element should still raise a request only after writing locations
// 0..3 while it owned the memory.
// Element interrupt, active low, is the Table 4.2 column
//   int_n = NOT(request) OR clr_n
// i.e. asserted while a pending request is being served. Because the source
// text also says every controller access interrupts the element, `e_acc_irq`
// additionally pulses for one cycle when a controller access ends (clr_n
// returns high); the element then reads locations 4 and 5.
// Location 4..5 carry controller messages, 6..15 serve as the mail box.
//
// Switch check: the element can read the control lines of its own switch
// S_i and of the adjacent counter-clockwise switch S_(i-1), plus the
// exclusive-OR of the adjacent switch's two lines that the source design
// provides as a cheap isolation test (1 = isolated or forbidden).
//
// Timing: memory writes are synchronous; reads are combinational on both
// ports. Element writes are ignored while the controller owns the memory.
// Reset clears the memory, the latch, and leaves the element as owner.
module ctrl_interface
  import ccsb_pkg::*;
#(
  parameter int unsigned BYTES = CI_BYTES,   // source design: 16
  parameter int unsigned AW    = $clog2(BYTES)
) (
  input  logic          clk,
  input  logic          rst_n,
  // element side
  input  logic [AW-1:0] e_addr,
  input  logic [7:0]    e_wdata,
  input  logic          e_we,
  output logic [7:0]    e_rdata,
  input  logic          e_req,        // pulse: raise the request line
  output logic          e_owns,       // element currently owns the memory
  output logic          e_int_n,      // Table 4.2 interrupt, active low
  output logic          e_acc_irq,    // pulse: a controller access has ended
  input  logic [1:0]    sw_own,       // control lines of own switch S_i
  input  logic [1:0]    sw_adj,       // control lines of adjacent S_(i-1)
  output logic [1:0]    e_sw_own,
  output logic [1:0]    e_sw_adj,
  output logic          e_sw_adj_xor, // 1: adjacent switch isolated/forbidden
  // controller side
  output logic          req_line,     // to the priority encoder
  input  logic          clr_n,        // clear-request line = memory select
  input  logic [AW-1:0] c_addr,
  input  logic [7:0]    c_wdata,
  input  logic          c_we,
  output logic [7:0]    c_rdata
);
  logic [7:0] mem [BYTES];
  logic       req_q;
  logic       clr_n_q;
  logic       req_new;   // request latched at the last clock edge

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < int'(BYTES); i++) mem[i] <= '0;
      req_q   <= 1'b0;
      req_new <= 1'b0;
      clr_n_q <= 1'b1;
    end else begin
      clr_n_q <= clr_n;
      req_new <= e_req && !req_q;
      // The start of an access clears a request latched before it; a
      // request raised at any other time is kept.
      if (!clr_n && clr_n_q && !req_new) req_q <= 1'b0;
      if (e_req) req_q <= 1'b1;
      if (!clr_n) begin
        if (c_we) mem[c_addr] <= c_wdata;
      end else begin
        if (e_we) mem[e_addr] <= e_wdata;
      end
    end
  end

  assign req_line     = req_q;
  assign e_owns       = clr_n;
  assign e_rdata      = mem[e_addr];
  assign c_rdata      = mem[c_addr];
  assign e_int_n      = ~req_q | clr_n;
  assign e_acc_irq    = clr_n & ~clr_n_q;
  assign e_sw_own     = sw_own;
  assign e_sw_adj     = sw_adj;
  assign e_sw_adj_xor = sw_adj[1] ^ sw_adj[0];
endmodule

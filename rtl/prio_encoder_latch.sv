// prio_encoder_latch: hardwired request identification of the bus controller
// (the priority encoder latch and interface handshake control).
//
// Every control interface has a request line into this block and receives a
// clear-request line from it. While the latch clock is enabled the request
// lines are sampled every cycle; when one or more are high, the
// highest-priority one (lowest element number: the fixed wiring order is this
// design's choice) is latched, the clock is inhibited, the decoder drives that
// element's clear-request line low -- which clears its request latch and hands
// its memory to the controller -- and `irq` interrupts the controller. When
// the controller has read the request it pulses `ack`: the latch empties, the
// clear line returns high and sampling resumes on the next cycle.
//
// For mail delivery and path suspension the controller can take the lines
// over: `inhibit` freezes the latch (step 1 of the source procedure) and
// `force_en` replaces the decoder outputs by `force_clr_n` (steps 3 and 4),
// so any set of interfaces can be selected on the controller's initiative.
//
// Timing: a request seen at clock edge t is latched at t and its clear line
// is low from t; `irq` and `irq_id` are registered outputs.
module prio_encoder_latch #(
  parameter int unsigned N  = 16,             // elements (source design: 16)
  parameter int unsigned IW = (N > 1) ? $clog2(N) : 1
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic [N-1:0]  req,           // request lines
  input  logic          inhibit,       // hold the latch clock off
  input  logic          ack,           // controller finished reading
  input  logic          force_en,      // controller drives the clear lines
  input  logic [N-1:0]  force_clr_n,
  output logic [N-1:0]  clr_n,         // clear-request lines, active low
  output logic          irq,
  output logic [IW-1:0] irq_id
);
  logic          valid_q;
  logic [IW-1:0] id_q;
  logic [IW-1:0] pick;
  logic          any;

  always_comb begin
    pick = '0;
    any  = |req;
    for (int i = int'(N) - 1; i >= 0; i--) if (req[i]) pick = IW'(i);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      valid_q <= 1'b0;
      id_q    <= '0;
    end else if (valid_q) begin
      if (ack) valid_q <= 1'b0;
    end else if (!inhibit && any) begin
      valid_q <= 1'b1;
      id_q    <= pick;
    end
  end

  always_comb begin
    clr_n = '1;
    if (force_en)     clr_n = force_clr_n;
    else if (valid_q) clr_n[id_q] = 1'b0;
  end

  assign irq    = valid_q;
  assign irq_id = id_q;

endmodule

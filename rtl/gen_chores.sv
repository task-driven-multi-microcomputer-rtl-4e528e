// gen_chores: general chores process of the bus controller -- the real-time
// clock and the gathering of statistics about controller and bus operation.
//
// The real-time clock counts ticks of TICK_DIV clock cycles; it can be
// loaded by the executive and is given out for the controller to pass on.
// The statistics are event counters: requests read from the interfaces,
// messages written, paths granted, suspensions, time-outs, rejections, and
// the largest number of paths that were ever up at the same time. The source
// design names these two tasks and leaves them out of its further design;
// the tick divider, counter widths and the choice of events are this
// design's. Counters saturate at their maximum.
module gen_chores #(
  parameter int unsigned N        = 16,
  parameter int unsigned TICK_DIV = 1000
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        rtc_load,
  input  logic [31:0] rtc_value,
  output logic [31:0] rtc,
  input  logic        ev_irq,
  input  logic        ev_msg,
  input  logic        ev_grant,
  input  logic        ev_suspend,
  input  logic        ev_timeout,
  input  logic        ev_reject,
  input  logic [N-1:0] path_active,
  output logic [15:0] n_irq,
  output logic [15:0] n_msg,
  output logic [15:0] n_grant,
  output logic [15:0] n_suspend,
  output logic [15:0] n_timeout,
  output logic [15:0] n_reject,
  output logic [$clog2(N+1)-1:0] max_paths
);
  localparam int unsigned DW = (TICK_DIV > 1) ? $clog2(TICK_DIV) : 1;
  logic [DW-1:0] div;

  function automatic logic [15:0] sat_inc(input logic [15:0] v, input logic e);
    return (e && v != '1) ? v + 1'b1 : v;
  endfunction

  logic [$clog2(N+1)-1:0] now_paths;
  always_comb begin
    now_paths = '0;
    for (int i = 0; i < int'(N); i++) now_paths += ($clog2(N+1))'(path_active[i]);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      div <= '0; rtc <= '0;
      n_irq <= '0; n_msg <= '0; n_grant <= '0; n_suspend <= '0;
      n_timeout <= '0; n_reject <= '0; max_paths <= '0;
    end else begin
      if (rtc_load) begin
        rtc <= rtc_value;
        div <= '0;
      end else if (div == DW'(TICK_DIV - 1)) begin
        div <= '0;
        rtc <= rtc + 1'b1;
      end else div <= div + 1'b1;
      n_irq     <= sat_inc(n_irq, ev_irq);
      n_msg     <= sat_inc(n_msg, ev_msg);
      n_grant   <= sat_inc(n_grant, ev_grant);
      n_suspend <= sat_inc(n_suspend, ev_suspend);
      n_timeout <= sat_inc(n_timeout, ev_timeout);
      n_reject  <= sat_inc(n_reject, ev_reject);
      if (now_paths > max_paths) max_paths <= now_paths;
    end
  end
endmodule

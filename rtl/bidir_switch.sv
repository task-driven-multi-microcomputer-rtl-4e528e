// bidir_switch: one bidirectional data bus switch of the segmented bus.
//
// Each element of the closed-loop data bus owns one switch, sitting between
// its own bus node and the node of its clockwise neighbour. The source design
// builds it from two tristate buffers back to back and drives it with two
// control lines from the bus controller; this module decodes those two lines
// exactly as Table 4.1 of the source design does:
//   CW line CCW line  status
//      0       0      counter-clockwise data flow
//      0       1      isolated (the reset/normal position)
//      1       0      not allowed
//      1       1      clockwise data flow
// Purely combinational. `cw_out` carries the clockwise node's view (the data
// arriving from the counter-clockwise side) and `ccw_out` the reverse; the
// tristate pair itself is replaced by these two gated one-way paths, which is
// this design's own choice so that the bus is two-state logic.
module bidir_switch
  import ccsb_pkg::*;
#(
  parameter int unsigned W = 8
) (
  input  logic [1:0]   ctl,        // {CW line, CCW line}
  input  logic [W-1:0] ccw_side,   // value on the counter-clockwise node
  input  logic         ccw_drv,    // that value is driven
  input  logic [W-1:0] cw_side,    // value on the clockwise node
  input  logic         cw_drv,
  output logic [W-1:0] cw_out,     // passed on to the clockwise node
  output logic         cw_out_drv,
  output logic [W-1:0] ccw_out,    // passed on to the counter-clockwise node
  output logic         ccw_out_drv,
  output logic         isolated,
  output logic         illegal
);
  always_comb begin
    cw_out_drv  = sw_passes_cw(ctl) && ccw_drv;
    ccw_out_drv = sw_passes_ccw(ctl) && cw_drv;
    cw_out      = cw_out_drv  ? ccw_side : '0;
    ccw_out     = ccw_out_drv ? cw_side  : '0;
    isolated    = ctl == SW_ISO;
    illegal     = ctl == SW_BAD;
  end
endmodule

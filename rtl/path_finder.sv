// path_finder: shortest free path search on the closed-loop segmented bus
// (the search done by the Path Identification task of arbitration).
//
// A path from element s to element d occupies every bus node from s to d
// inclusive, going either clockwise (increasing element number) or
// counter-clockwise; two paths may run at once only if they share no node.
// Given the mask of nodes already in use, this block forms the clockwise and
// counter-clockwise node sets from the source to the destination -- with two
// destinations, to the one further along that direction so that both lie on
// the path -- reports which of them are free, and picks the shorter free one
// (clockwise on a tie). Distances are counted in links: (d-s) mod N clockwise
// and (s-d) mod N counter-clockwise. The node sets are also given out so that
// the caller can find which existing paths block a direction.
// Purely combinational.
module path_finder #(
  parameter int unsigned N  = 16,
  parameter int unsigned IW = (N > 1) ? $clog2(N) : 1
) (
  input  logic [N-1:0]  busy,       // nodes in use
  input  logic [IW-1:0] src,
  input  logic [IW-1:0] dst0,
  input  logic [IW-1:0] dst1,
  input  logic          two,        // dst1 is a second destination
  output logic [N-1:0]  cw_nodes,
  output logic [N-1:0]  ccw_nodes,
  output logic [IW-1:0] cw_far,     // furthest destination clockwise
  output logic [IW-1:0] ccw_far,
  output logic          cw_free,
  output logic          ccw_free,
  output logic          found,
  output logic          use_ccw,    // chosen direction
  output logic [N-1:0]  nodes,      // chosen node set
  output logic [IW-1:0] far_dst     // chosen furthest destination
);
  localparam int unsigned DW = $clog2(N + 1);
  typedef logic [DW-1:0] dist_t;

  // Links from a to b going clockwise.
  function automatic dist_t cw_dist(input logic [IW-1:0] a, input logic [IW-1:0] b);
    return DW'((int'(b) + int'(N) - int'(a)) % int'(N));
  endfunction

  dist_t dcw, dccw, d0cw, d1cw, d0ccw, d1ccw;

  always_comb begin
    d0cw  = cw_dist(src, dst0);
    d1cw  = cw_dist(src, dst1);
    d0ccw = cw_dist(dst0, src);
    d1ccw = cw_dist(dst1, src);
    dcw   = d0cw;
    dccw  = d0ccw;
    cw_far  = dst0;
    ccw_far = dst0;
    if (two && d1cw > d0cw)   begin dcw  = d1cw;  cw_far  = dst1; end
    if (two && d1ccw > d0ccw) begin dccw = d1ccw; ccw_far = dst1; end
    cw_nodes  = '0;
    ccw_nodes = '0;
    for (int k = 0; k < int'(N); k++) begin
      if (k <= int'(dcw))  cw_nodes[(int'(src) + k) % int'(N)] = 1'b1;
      if (k <= int'(dccw)) ccw_nodes[(int'(src) + int'(N) - k) % int'(N)] = 1'b1;
    end
    cw_free  = (cw_nodes & busy) == '0;
    ccw_free = (ccw_nodes & busy) == '0;
    found    = cw_free | ccw_free;
    use_ccw  = ccw_free && (!cw_free || dccw < dcw);
    nodes    = use_ccw ? ccw_nodes : cw_nodes;
    far_dst  = use_ccw ? ccw_far : cw_far;
  end
endmodule

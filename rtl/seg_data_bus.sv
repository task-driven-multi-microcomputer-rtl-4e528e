// seg_data_bus: the closed-loop segmented data bus (data layer of the CCSB).
//
// N elements sit on a ring. Bus node j is the stretch of bus that element j
// taps; switch S_j (owned by element j) joins node j to node j+1 (mod N), so
// the ring reads E0 S0 E1 S1 ... E(N-1) S(N-1) back to E0. "Clockwise" is
// taken here as the direction of increasing element number. Every switch is
// driven by two control lines decoded per Table 4.1 (see bidir_switch). A pair
// of elements talks over the switches between them only, so paths that share
// no node run at the same time -- the point of the segmented bus.
//
// The tristate bus is modelled as two-state logic: a value put on the bus by
// element i (tx_en[i]) travels clockwise through every following switch set to
// CW and counter-clockwise through every switch set to CCW, hop by hop. The
// propagation is unrolled by hop count (N-1 ranks of bidir_switch), so the
// ring has no combinational loop even when every switch conducts. A node
// reached by more than one driver ORs their values and raises `contention`.
// Purely combinational; the elements register what they read.
module seg_data_bus
  import ccsb_pkg::*;
#(
  parameter int unsigned N = 16,   // elements on the ring (source design: 16)
  parameter int unsigned W = 8     // data bus width (assumed: 8-bit elements)
) (
  input  logic [N-1:0][1:0]   sw_ctl,     // {CW line, CCW line} of S_0..S_{N-1}
  input  logic [N-1:0]        tx_en,
  input  logic [N-1:0][W-1:0] tx_data,
  output logic [N-1:0][W-1:0] rx_data,    // value seen on node j
  output logic [N-1:0]        rx_valid,   // some driver reaches node j
  output logic [N-1:0]        contention, // more than one driver reaches node j
  output logic [N-1:0]        sw_isolated,
  output logic [N-1:0]        sw_illegal
);
  localparam int unsigned H = (N > 1) ? N - 1 : 1;

  // g_hop[h].cwv[j]: value that reaches node j after crossing h switches
  // clockwise; ccwv likewise counter-clockwise. Each rank has its own
  // variables so the unrolled ring is visibly loop-free.
  for (genvar h = 0; h <= H; h++) begin : g_hop
    logic [N-1:0][W-1:0] cwv, ccwv;
    logic [N-1:0]        cwd, ccwd;
    if (h == 0) begin : g_src
      assign cwv  = tx_data;
      assign cwd  = tx_en;
      assign ccwv = tx_data;
      assign ccwd = tx_en;
    end else begin : g_rank
      for (genvar k = 0; k < N; k++) begin : g_sw
        localparam int unsigned KN = (k + 1) % N;   // clockwise neighbour node
        logic unused_iso, unused_ill;
        bidir_switch #(.W(W)) u_sw (
          .ctl        (sw_ctl[k]),
          .ccw_side   (g_hop[h-1].cwv[k]),
          .ccw_drv    (g_hop[h-1].cwd[k]),
          .cw_side    (g_hop[h-1].ccwv[KN]),
          .cw_drv     (g_hop[h-1].ccwd[KN]),
          .cw_out     (cwv[KN]),
          .cw_out_drv (cwd[KN]),
          .ccw_out    (ccwv[k]),
          .ccw_out_drv(ccwd[k]),
          .isolated   (unused_iso),
          .illegal    (unused_ill)
        );
      end
    end
  end

  // Flatten the ranks so the per-node reduction below can index them.
  logic [H:0][N-1:0][W-1:0] all_cwv, all_ccwv;
  logic [H:0][N-1:0]        all_cwd, all_ccwd;
  for (genvar h = 0; h <= H; h++) begin : g_flat
    assign all_cwv[h]  = g_hop[h].cwv;
    assign all_cwd[h]  = g_hop[h].cwd;
    assign all_ccwv[h] = g_hop[h].ccwv;
    assign all_ccwd[h] = g_hop[h].ccwd;
  end

  always_comb begin
    for (int j = 0; j < N; j++) begin
      logic [W-1:0] v;
      int unsigned  cnt;
      v   = all_cwd[0][j] ? all_cwv[0][j] : '0;
      cnt = all_cwd[0][j] ? 1 : 0;
      for (int h = 1; h <= int'(H); h++) begin
        if (all_cwd[h][j])  begin v |= all_cwv[h][j];  cnt++; end
        if (all_ccwd[h][j]) begin v |= all_ccwv[h][j]; cnt++; end
      end
      rx_data[j]    = v;
      rx_valid[j]   = cnt != 0;
      contention[j] = cnt > 1;
      sw_isolated[j] = sw_ctl[j] == SW_ISO;
      sw_illegal[j]  = sw_ctl[j] == SW_BAD;
    end
  end
endmodule

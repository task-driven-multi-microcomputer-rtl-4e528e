// ctrl_bus: the control bus between the bus controller and the control
// interfaces.
//
// The controller places an address, write data and a write strobe on the bus;
// every control interface sees them, but only the interfaces whose
// clear-request line is low (selected) act on them. Read data is the OR of
// the selected interfaces' outputs, so with exactly one selected interface it
// is that interface's byte, and a write with several selected reaches all of
// them at once (broadcast). The source design's closed-loop wiring, which
// gives a second path around a broken wire, is not modelled: this block is the
// logical bus only. Purely combinational.
module ctrl_bus #(
  parameter int unsigned N  = 16,
  parameter int unsigned AW = 4
) (
  input  logic [N-1:0]        clr_n,     // selects, active low
  input  logic [AW-1:0]       m_addr,
  input  logic [7:0]          m_wdata,
  input  logic                m_we,
  output logic [7:0]          m_rdata,
  output logic                m_none,    // no interface selected
  output logic [N-1:0][AW-1:0] s_addr,
  output logic [N-1:0][7:0]   s_wdata,
  output logic [N-1:0]        s_we,
  input  logic [N-1:0][7:0]   s_rdata
);
  always_comb begin
    m_rdata = '0;
    for (int i = 0; i < int'(N); i++) begin
      s_addr[i]  = m_addr;
      s_wdata[i] = m_wdata;
      s_we[i]    = m_we & ~clr_n[i];
      if (!clr_n[i]) m_rdata |= s_rdata[i];
    end
    m_none = &clr_n;
  end
endmodule

// tb_ctrl_bus: random selections. Address and data reach every interface,
// writes only reach selected ones (broadcast when several are selected),
// read data comes from the selected interface. Combinational block.
module tb_ctrl_bus;
  localparam int N = 16;
  logic [N-1:0]        clr_n, s_we;
  logic [3:0]          m_addr;
  logic [7:0]          m_wdata, m_rdata;
  logic                m_we, m_none;
  logic [N-1:0][3:0]   s_addr;
  logic [N-1:0][7:0]   s_wdata, s_rdata;
  int checks = 0, failures = 0;

  ctrl_bus #(.N(N), .AW(4)) dut (.*);

  task automatic check(input bit c, input string what);
    checks++;
    if (!c) begin failures++; $display("FAIL @%0t: %s", $time, what); end
  endtask

  initial begin
    #1000000 $display("WATCHDOG");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  initial begin
    for (int r = 0; r < 300; r++) begin
      int sel;
      m_addr = 4'($urandom); m_wdata = 8'($urandom); m_we = 1'($urandom);
      for (int i = 0; i < N; i++) s_rdata[i] = 8'($urandom);
      sel = $urandom_range(0, N);
      clr_n = '1;
      if (sel < N) clr_n[sel] = 1'b0;
      if (r % 7 == 0) clr_n = N'($urandom);
      #1;
      for (int i = 0; i < N; i++) begin
        check(s_addr[i] == m_addr && s_wdata[i] == m_wdata, "address/data to every interface");
        check(s_we[i] == (m_we && !clr_n[i]), "write only where selected");
      end
      check(m_none == (clr_n == '1), "none selected flag");
      if (sel < N && r % 7 != 0) check(m_rdata == s_rdata[sel], "read from selected interface");
      if (clr_n == '1) check(m_rdata == '0, "no data when none selected");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

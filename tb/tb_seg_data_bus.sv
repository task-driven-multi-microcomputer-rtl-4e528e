// tb_seg_data_bus: random switch settings on the 16-node ring with one or two
// random drivers. A reference model walks from each driver through the
// switches that conduct in each direction (S_j joins node j and node j+1;
// clockwise means increasing node number) and predicts the value, the valid
// flag and contention at every node. Combinational block.
module tb_seg_data_bus;
  import ccsb_pkg::*;
  localparam int N = 16;
  logic [N-1:0][1:0] sw_ctl;
  logic [N-1:0]      tx_en, rx_valid, contention, sw_isolated, sw_illegal;
  logic [N-1:0][7:0] tx_data, rx_data;
  int checks = 0, failures = 0;

  seg_data_bus #(.N(N), .W(8)) dut (.*);

  task automatic check(input bit c, input string what);
    checks++;
    if (!c) begin failures++; $display("FAIL @%0t: %s", $time, what); end
  endtask

  int         hits [N];
  logic [7:0] expv [N];

  task automatic reach(input int s);
    int j;
    hits[s]++; expv[s] |= tx_data[s];
    j = s;
    for (int h = 0; h < N - 1; h++) begin
      if (sw_ctl[j] != SW_CW) break;
      j = (j + 1) % N;
      if (j == s) break;
      hits[j]++; expv[j] |= tx_data[s];
    end
    j = s;
    for (int h = 0; h < N - 1; h++) begin
      if (sw_ctl[(j + N - 1) % N] != SW_CCW) break;
      j = (j + N - 1) % N;
      if (j == s) break;
      hits[j]++; expv[j] |= tx_data[s];
    end
  endtask

  initial begin
    #1000000 $display("WATCHDOG");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  initial begin
    sw_ctl = '0; tx_en = '0; tx_data = '0;
    for (int r = 0; r < 400; r++) begin
      int a, b;
      for (int i = 0; i < N; i++) begin
        int p;
        p = $urandom_range(0, 9);
        sw_ctl[i] = (p < 4) ? SW_CW : (p < 7) ? SW_CCW : SW_ISO;
      end
      if (r % 50 == 0) sw_ctl[$urandom_range(0, N - 1)] = SW_BAD;
      tx_en = '0;
      for (int i = 0; i < N; i++) tx_data[i] = 8'($urandom);
      a = $urandom_range(0, N - 1);
      b = $urandom_range(0, N - 1);
      tx_en[a] = 1'b1;
      if (r % 2 == 1) tx_en[b] = 1'b1;
      for (int i = 0; i < N; i++) begin hits[i] = 0; expv[i] = '0; end
      for (int i = 0; i < N; i++) if (tx_en[i]) reach(i);
      #1;
      for (int i = 0; i < N; i++) begin
        check(rx_valid[i] == (hits[i] > 0), "valid at node");
        if (hits[i] > 0) check(rx_data[i] == expv[i], "data at node");
        check(contention[i] == (hits[i] > 1), "contention flag");
        check(sw_isolated[i] == (sw_ctl[i] == SW_ISO) && sw_illegal[i] == (sw_ctl[i] == SW_BAD), "switch status");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

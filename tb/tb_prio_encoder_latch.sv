// tb_prio_encoder_latch: random request lines; the latch must take the
// lowest-numbered request, drive only that clear-request line low, raise the
// controller interrupt, hold while `inhibit` is high and release on `ack`.
// The forced mode must put the controller's pattern on the clear lines.
module tb_prio_encoder_latch;
  localparam int N = 16;
  logic         clk, rst_n, inhibit, ack, force_en, irq;
  logic [N-1:0] req, force_clr_n, clr_n;
  logic [3:0]   irq_id;
  int checks = 0, failures = 0;

  prio_encoder_latch #(.N(N)) dut (.*);

  initial clk = 1'b0;
  always #5 clk = ~clk;

  task automatic check(input bit c, input string what);
    checks++;
    if (!c) begin failures++; $display("FAIL @%0t: %s", $time, what); end
  endtask

  function automatic int lowest(input logic [N-1:0] v);
    for (int i = 0; i < N; i++) if (v[i]) return i;
    return -1;
  endfunction

  initial begin
    #1000000 $display("WATCHDOG");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  initial begin
    rst_n = 1'b0; req = '0; inhibit = 1'b0; ack = 1'b0; force_en = 1'b0; force_clr_n = '1;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    check(!irq && clr_n == '1, "idle after reset");
    for (int r = 0; r < 200; r++) begin
      int w;
      @(negedge clk);
      req = N'($urandom) & N'($urandom);
      inhibit = ($urandom_range(0, 3) == 0);
      w = lowest(req);
      @(negedge clk);
      if (w < 0 || inhibit) check(!irq, "no latch without request or when inhibited");
      else begin
        check(irq && int'(irq_id) == w, "lowest request latched");
        check(clr_n == ~(N'(1) << w), "only that clear line low");
        req = '1; inhibit = 1'b0;
        @(negedge clk);
        check(irq && int'(irq_id) == w, "latch holds until ack");
        ack = 1'b1;
        @(negedge clk);
        ack = 1'b0; req = '0;
        check(!irq && clr_n == '1, "ack releases");
      end
      inhibit = 1'b0; req = '0;
      @(negedge clk);
    end
    // Forced clear lines.
    force_en = 1'b1; force_clr_n = 16'hFFF7; inhibit = 1'b1; req = 16'h0001;
    #1 check(clr_n == 16'hFFF7, "forced clear lines");
    @(negedge clk);
    check(!irq, "inhibited while forcing");
    force_en = 1'b0; inhibit = 1'b0;
    @(negedge clk);
    check(irq && irq_id == 4'd0, "request served after forcing");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

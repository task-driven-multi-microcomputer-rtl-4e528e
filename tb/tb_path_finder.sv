// tb_path_finder: random busy sets and requests on a 16-node ring. A
// reference model builds the clockwise and counter-clockwise node sets to
// the further destination, tests them against the busy set and picks the
// shorter free one (clockwise on a tie). Combinational block.
module tb_path_finder;
  localparam int N = 16;
  logic [N-1:0] busy, cw_nodes, ccw_nodes, nodes;
  logic [3:0]   src, dst0, dst1, cw_far, ccw_far, far_dst;
  logic         two, cw_free, ccw_free, found, use_ccw;
  int checks = 0, failures = 0;

  path_finder #(.N(N), .IW(4)) dut (.*);

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
    for (int r = 0; r < 500; r++) begin
      int dc, dcc, d;
      logic [N-1:0] ecw, eccw;
      logic ef_cw, ef_ccw, eccw_pick;
      src  = 4'($urandom);
      dst0 = 4'($urandom);
      dst1 = 4'($urandom);
      two  = 1'($urandom);
      busy = N'($urandom) & N'($urandom) & N'($urandom);
      dc  = (int'(dst0) - int'(src) + N) % N;
      d   = (int'(dst1) - int'(src) + N) % N;
      if (two && d > dc) dc = d;
      dcc = (int'(src) - int'(dst0) + N) % N;
      d   = (int'(src) - int'(dst1) + N) % N;
      if (two && d > dcc) dcc = d;
      ecw = '0; eccw = '0;
      for (int k = 0; k <= dc; k++)  ecw[(int'(src) + k) % N] = 1'b1;
      for (int k = 0; k <= dcc; k++) eccw[(int'(src) - k + N) % N] = 1'b1;
      ef_cw  = (ecw & busy) == '0;
      ef_ccw = (eccw & busy) == '0;
      eccw_pick = ef_ccw && (!ef_cw || dcc < dc);
      #1;
      check(cw_nodes == ecw && ccw_nodes == eccw, "node sets");
      check(cw_free == ef_cw && ccw_free == ef_ccw, "free flags");
      check(found == (ef_cw || ef_ccw), "found");
      if (found) begin
        check(use_ccw == eccw_pick, "direction choice");
        check(nodes == (eccw_pick ? eccw : ecw), "chosen nodes");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

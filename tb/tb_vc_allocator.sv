// tb_vc_allocator: random request, output-port and idle-VC patterns; checks
// that each output port grants at most one requester, grants exactly one
// when it has a requester and an idle VC, hands out the lowest idle VC and
// reports it to the output unit; then checks round-robin fairness.
module tb_vc_allocator;
  import noc_pkg::*;
  logic clk = 0, rst_n = 0;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  logic [3:0] va_req [5];
  port_e      op     [5][4];
  logic [3:0] vc_idle[5];
  logic [3:0] va_gnt [5];
  logic [1:0] va_vc  [5][4];
  logic       alloc_valid [5];
  logic [1:0] alloc_vc [5];

  vc_allocator dut (.*);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int got [20];
    for (int p = 0; p < 5; p++) begin va_req[p] = 0; vc_idle[p] = 0; for (int v = 0; v < 4; v++) op[p][v] = PORT_LOCAL; end
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      for (int p = 0; p < 5; p++) begin
        va_req[p]  = 4'($urandom);
        vc_idle[p] = ($urandom_range(0, 3) == 0) ? 4'b0 : 4'($urandom);
        for (int v = 0; v < 4; v++) op[p][v] = port_e'($urandom_range(0, 4));
      end
      #1;
      for (int o = 0; o < 5; o++) begin
        int nreq, ngnt, low;
        nreq = 0; ngnt = 0; low = -1;
        for (int v = 3; v >= 0; v--) if (vc_idle[o][v]) low = v;
        for (int p = 0; p < 5; p++)
          for (int v = 0; v < 4; v++)
            if (int'(op[p][v]) == o) begin
              if (va_req[p][v]) nreq++;
              if (va_gnt[p][v]) begin
                ngnt++;
                check(va_req[p][v], "grant without request");
                check(int'(va_vc[p][v]) == low, $sformatf("out %0d vc %0d expected lowest idle %0d", o, va_vc[p][v], low));
              end
            end
        check(ngnt == ((nreq > 0 && low >= 0) ? 1 : 0), $sformatf("out %0d: %0d grants for %0d requests", o, ngnt, nreq));
        check(alloc_valid[o] == (ngnt == 1), "alloc_valid");
        if (ngnt == 1) check(int'(alloc_vc[o]) == low, "alloc_vc");
      end
    end
    // Fairness: all 20 input VCs request output EAST every cycle.
    foreach (got[k]) got[k] = 0;
    for (int i = 0; i < 20; i++) begin
      @(negedge clk);
      for (int p = 0; p < 5; p++) begin
        va_req[p] = 4'hF; vc_idle[p] = 4'hF;
        for (int v = 0; v < 4; v++) op[p][v] = PORT_EAST;
      end
      #1;
      for (int p = 0; p < 5; p++) for (int v = 0; v < 4; v++) if (va_gnt[p][v]) got[p*4+v]++;
    end
    foreach (got[k]) check(got[k] == 1, $sformatf("round robin: requester %0d granted %0d times", k, got[k]));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

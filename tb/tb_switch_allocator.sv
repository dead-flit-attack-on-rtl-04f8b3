// tb_switch_allocator: random requests, routes, downstream VCs and credits;
// checks that grants go only to requesting VCs with a credit, at most one per
// input and per output, that crossbar selects and VCIDs match the grants,
// that no output is left idle while a stage-1 winner wants it, and that the
// VCs of one input are served round-robin.
module tb_switch_allocator;
  import noc_pkg::*;
  logic clk = 0, rst_n = 0;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  logic [3:0] sa_req [5];
  port_e      op     [5][4];
  logic [1:0] outvc  [5][4];
  logic [3:0] credit_avail [5];
  logic [3:0] sa_gnt [5];
  logic [1:0] in_sel_vc [5];
  logic       xb_valid [5];
  logic [2:0] xb_sel [5];
  logic [1:0] xb_vc [5];

  switch_allocator dut (.*);

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
    int got [4];
    for (int p = 0; p < 5; p++) begin
      sa_req[p] = 0; credit_avail[p] = 0;
      for (int v = 0; v < 4; v++) begin op[p][v] = PORT_LOCAL; outvc[p][v] = 0; end
    end
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      for (int p = 0; p < 5; p++) begin
        sa_req[p] = 4'($urandom);
        credit_avail[p] = 4'($urandom);
        for (int v = 0; v < 4; v++) begin op[p][v] = port_e'($urandom_range(0, 4)); outvc[p][v] = 2'($urandom); end
      end
      #1;
      for (int p = 0; p < 5; p++) begin
        check($countones(sa_gnt[p]) <= 1, "one grant per input");
        for (int v = 0; v < 4; v++)
          if (sa_gnt[p][v]) begin
            check(sa_req[p][v] && credit_avail[op[p][v]][outvc[p][v]], "grant needs request and credit");
            check(in_sel_vc[p] == 2'(v), "in_sel_vc matches grant");
            check(xb_valid[op[p][v]] && xb_sel[op[p][v]] == 3'(p) && xb_vc[op[p][v]] == outvc[p][v],
                  "crossbar select matches grant");
          end
      end
      for (int o = 0; o < 5; o++) begin
        bit wanted;
        wanted = 0;
        for (int p = 0; p < 5; p++) begin
          int v;
          v = in_sel_vc[p];
          if (sa_req[p][v] && credit_avail[op[p][v]][outvc[p][v]] && int'(op[p][v]) == o) wanted = 1;
        end
        check(xb_valid[o] == wanted, $sformatf("output %0d busy=%0d wanted=%0d", o, xb_valid[o], wanted));
        if (xb_valid[o]) check(sa_gnt[xb_sel[o]] != 0, "selected input is granted");
      end
    end
    // Round robin among the VCs of input 0, all eligible, distinct outputs.
    foreach (got[k]) got[k] = 0;
    for (int i = 0; i < 8; i++) begin
      @(negedge clk);
      for (int p = 0; p < 5; p++) begin sa_req[p] = (p == 0) ? 4'hF : 4'h0; credit_avail[p] = 4'hF; end
      for (int v = 0; v < 4; v++) op[0][v] = port_e'(v + 1);
      #1;
      for (int v = 0; v < 4; v++) if (sa_gnt[0][v]) got[v]++;
    end
    foreach (got[k]) check(got[k] == 2, $sformatf("VC %0d served %0d times in 8 cycles", k, got[k]));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_input_port: directed sequences on a port of router (1,1): a 3-flit
// packet through route computation, VC allocation and switch traversal with
// its credits; a single-flit request; and the two dead-flit cases - a body
// flit in an idle VC and a second head flit in an active VC - which must
// never request allocation or the switch.
module tb_input_port;
  import noc_pkg::*;
  logic clk = 0, rst_n = 0;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  flit_t      in_flit;
  credit_t    credit_out;
  flit_t      front [4];
  logic [3:0] va_req, sa_req, va_gnt, sa_gnt, vc_active, vc_nonempty;
  port_e      op [4];
  logic [1:0] outvc [4];
  logic [1:0] va_vc [4];
  logic [1:0] cur_x = 2'd1, cur_y = 2'd1;

  input_port dut (.*);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s (t=%0t)", what, $time); end
  endtask

  function automatic flit_t head(int vc, int did, int pl);
    head_t h;
    flit_t f;
    h = '0; h.did = 4'(did); h.pl = 4'(pl); h.pid = 8'(did * 16 + pl);
    f.valid = 1; f.ft = FT_HEAD; f.vcid = 2'(vc); f.data = 64'(h);
    return f;
  endfunction

  function automatic flit_t flit(ft_e ft, int vc, longint d);
    flit_t f;
    f.valid = 1; f.ft = ft; f.vcid = 2'(vc); f.data = 64'(d);
    return f;
  endfunction

  task automatic send(flit_t f);
    @(negedge clk); in_flit = f;
    @(negedge clk); in_flit = '0;
  endtask

  task automatic grant_va(int v, int ovc);
    @(negedge clk); va_gnt[v] = 1; va_vc[v] = 2'(ovc);
    @(negedge clk); va_gnt[v] = 0;
  endtask

  // Pop VC v and check the credit that comes back the next cycle.
  task automatic pop(int v, bit exp_free, ft_e exp_ft);
    @(negedge clk);
    check(sa_req[v], $sformatf("vc%0d requests switch", v));
    check(front[v].ft == exp_ft, $sformatf("vc%0d front ft %0d", v, front[v].ft));
    sa_gnt[v] = 1;
    @(negedge clk); sa_gnt[v] = 0;
    check(credit_out.valid && credit_out.vcid == 2'(v) && credit_out.vc_free == exp_free,
          $sformatf("credit vc%0d free=%0d", v, exp_free));
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    in_flit = '0; va_gnt = 0; sa_gnt = 0;
    foreach (va_vc[v]) va_vc[v] = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;

    // 3-flit packet to tile 7 on VC 1: route east.
    send(head(1, 7, 2));
    check(vc_active[1] && op[1] == PORT_EAST, "head sets S and OP=east");
    check(va_req[1] && !sa_req[1], "head asks for a VC first");
    send(flit(FT_BODY, 1, 100));
    send(flit(FT_TAIL, 1, 101));
    grant_va(1, 3);
    check(outvc[1] == 2'd3 && !va_req[1], "downstream VC stored");
    pop(1, 0, FT_HEAD);
    pop(1, 0, FT_BODY);
    check(front[1].data == 64'd101, "tail follows body");
    pop(1, 1, FT_TAIL);
    check(!vc_active[1] && !vc_nonempty[1], "control buffer cleared after tail");

    // Single-flit request to tile 1 on VC 3: route north, freed on departure.
    send(head(3, 1, 0));
    check(op[3] == PORT_NORTH, "route north");
    grant_va(3, 0);
    pop(3, 1, FT_HEAD);
    check(!vc_active[3], "single-flit packet frees its VC");

    // Dead flit 1: body flit arriving in idle VC 2 (head turned into body).
    send(flit(FT_BODY, 2, 55));
    send(flit(FT_TAIL, 2, 56));
    // Dead flit 2: head, then a second head in the same VC (body turned into head).
    send(head(0, 4, 4));
    check(op[0] == PORT_WEST, "route west");
    grant_va(0, 1);
    pop(0, 0, FT_HEAD);
    send(flit(FT_HEAD, 0, 77));
    send(flit(FT_BODY, 0, 78));
    repeat (50) begin
      @(negedge clk);
      check(!va_req[2] && !sa_req[2], "body in idle VC never requests");
      check(!va_req[0] && !sa_req[0], "second head in active VC never requests");
      check(vc_nonempty[2] && vc_nonempty[0], "dead flits stay buffered");
      check(!vc_active[2] && vc_active[0], "S fields");
    end

    // The two live VCs still work.
    send(head(1, 13, 1));
    check(op[1] == PORT_SOUTH, "route south");
    grant_va(1, 2);
    send(flit(FT_TAIL, 1, 9));
    pop(1, 0, FT_HEAD);
    pop(1, 1, FT_TAIL);
    send(head(3, 5, 0));
    check(op[3] == PORT_LOCAL, "route local");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

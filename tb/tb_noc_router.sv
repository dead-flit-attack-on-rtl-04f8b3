// tb_noc_router: two routers at mesh position (1,1) receive the same kind of
// random traffic on all five inputs: a clean router, and one carrying the
// head-to-body Trojan with a trigger that always fires. The testbench plays
// the upstream neighbours (VC choice, credits) and the downstream ones
// (returning a credit for every flit). Every packet must leave on its XY
// output port, whole and in order. In the Trojan router exactly the first
// three packets on each input die (the N-1 limit), each leaves a VC that is
// never released upstream, and all later packets still get through on the
// remaining VC. An uncontended head must cross the router in 3 cycles.
module tb_noc_router;
  import noc_pkg::*;
  logic clk = 0, rst_n = 0;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;
  localparam int NPKT = 60;   // packets per input port

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s (t=%0t)", what, $time); end
  endtask

  function automatic port_e xy(int did);
    int dx, dy;
    dx = did % 4; dy = did / 4;
    if (dx > 1) return PORT_EAST;
    if (dx < 1) return PORT_WEST;
    if (dy > 1) return PORT_SOUTH;
    if (dy < 1) return PORT_NORTH;
    return PORT_LOCAL;
  endfunction

  int done_cnt = 0;
  int lat_seen = 0;

  for (genvar g = 0; g < 2; g++) begin : g_dut
    flit_t   in_flit [5], out_flit [5];
    credit_t credit_out [5], credit_in [5];
    logic [4:0] ht_attack;
    logic [3:0] ht_infected [5];

    noc_router #(.HT_MODE(g == 0 ? HT_NONE : HT_HB), .P_THRESH(65536)) dut (
      .clk, .rst_n, .cur_x(2'd1), .cur_y(2'd1), .in_flit, .credit_out, .out_flit, .credit_in,
      .ht_attack, .ht_infected
    );

    // Upstream state per input port.
    head_t  pk_hdr [5][$];
    bit     up_idle [5][4];
    int     up_cred [5][4];
    bit     busy [5], dead [5];
    int     cur_vc [5], cur_k [5], sent [5];
    head_t  cur_h [5];
    // Scoreboard keyed by address (unique per packet).
    port_e  exp_port [int];
    int     exp_pl [int];
    int     lost = 0, delivered = 0, attacks = 0;
    head_t  rx_h [5][4];
    int     rx_k [5][4];
    int     lost_per_port [5];
    longint t_drive = -1;
    longint cyc = 0;

    initial begin
      for (int p = 0; p < 5; p++) begin
        lost_per_port[p] = 0;
        for (int i = 0; i < NPKT; i++) begin
          head_t h;
          h = '0;
          h.addr = 32'(g * 100000 + p * 1000 + i);
          h.did  = 4'((p == 0 && i == 0) ? 6 : $urandom_range(0, 15));
          h.pl   = 4'($urandom_range(0, 2) == 0 ? 0 : $urandom_range(1, 6));
          h.pid  = 8'(i);
          h.sid  = 4'(p);
          pk_hdr[p].push_back(h);
          exp_port[h.addr] = xy(h.did);
          exp_pl[h.addr]   = h.pl;
        end
        for (int v = 0; v < 4; v++) begin up_idle[p][v] = 1; up_cred[p][v] = 3; end
        busy[p] = 0; dead[p] = 0; sent[p] = 0;
        in_flit[p] = '0; credit_in[p] = '0;
      end
    end

    always @(negedge clk) if (rst_n) begin
      cyc++;
      for (int p = 0; p < 5; p++) begin
        // credits from the router
        if (credit_out[p].valid) begin
          up_cred[p][credit_out[p].vcid]++;
          if (credit_out[p].vc_free) up_idle[p][credit_out[p].vcid] = 1;
        end
        in_flit[p] = '0;
        // A packet that died downstream keeps its upstream VC forever; the
        // rest of it stays queued upstream and the port moves on.
        if (busy[p] && dead[p] && up_cred[p][cur_vc[p]] == 0) begin
          busy[p] = 0; dead[p] = 0; sent[p]++;
        end
        if (!busy[p] && pk_hdr[p].size() > 0 && (p != 0 || cyc > 40 || sent[0] == 0)) begin
          for (int v = 3; v >= 0; v--) if (up_idle[p][v]) begin busy[p] = 1; cur_vc[p] = v; end
          if (busy[p]) begin
            up_idle[p][cur_vc[p]] = 0;
            cur_h[p] = pk_hdr[p].pop_front();
            cur_k[p] = 0;
          end
        end
        if (busy[p] && up_cred[p][cur_vc[p]] > 0) begin
          in_flit[p].valid = 1;
          in_flit[p].vcid  = 2'(cur_vc[p]);
          if (cur_k[p] == 0) begin
            in_flit[p].ft = FT_HEAD;
            in_flit[p].data = 64'(cur_h[p]);
            if (p == 0 && sent[0] == 0) t_drive = cyc;
          end else begin
            in_flit[p].ft = (cur_k[p] == int'(cur_h[p].pl)) ? FT_TAIL : FT_BODY;
            in_flit[p].data = {cur_h[p].addr, 32'(cur_k[p])};
          end
          up_cred[p][cur_vc[p]]--;
          #1;
          if (ht_attack[p]) begin
            attacks++;
            lost++;
            lost_per_port[p]++;
            exp_port.delete(cur_h[p].addr);
            dead[p] = 1;
          end
          if (cur_k[p] == int'(cur_h[p].pl)) begin busy[p] = 0; dead[p] = 0; sent[p]++; end
          cur_k[p]++;
        end
      end
    end

    // Downstream: check and return credits.
    always @(negedge clk) if (rst_n) begin
      for (int o = 0; o < 5; o++) begin
        credit_in[o] = '0;
        if (out_flit[o].valid) begin
          int v;
          v = out_flit[o].vcid;
          credit_in[o].valid = 1;
          credit_in[o].vcid  = 2'(v);
          credit_in[o].vc_free = is_last_flit(out_flit[o].ft, out_flit[o].data);
          if (out_flit[o].ft == FT_HEAD) begin
            head_t h;
            h = head_t'(out_flit[o].data);
            check(exp_port.exists(h.addr), $sformatf("unknown or dead packet %0d delivered", h.addr));
            if (exp_port.exists(h.addr))
              check(exp_port[h.addr] == port_e'(o), $sformatf("packet %0d on port %0d", h.addr, o));
            if (g == 0 && h.addr == 0 && lat_seen == 0) begin
              lat_seen = 1;
              check(cyc - t_drive == 3, $sformatf("router latency %0d cycles", cyc - t_drive));
            end
            rx_h[o][v] = h;
            rx_k[o][v] = 0;
            if (h.pl == 0) begin delivered++; exp_port.delete(h.addr); end
          end else begin
            rx_k[o][v]++;
            check(out_flit[o].data == {rx_h[o][v].addr, 32'(rx_k[o][v])}, "payload order");
            check((out_flit[o].ft == FT_TAIL) == (rx_k[o][v] == int'(rx_h[o][v].pl)), "tail position");
            if (out_flit[o].ft == FT_TAIL) begin delivered++; exp_port.delete(rx_h[o][v].addr); end
          end
        end
      end
    end

    initial begin
      wait (rst_n);
      wait (sent[0] + sent[1] + sent[2] + sent[3] + sent[4] == 5 * NPKT);
      repeat (100) @(posedge clk);
      check(exp_port.size() == 0, $sformatf("router %0d: %0d packets never delivered", g, exp_port.size()));
      check(delivered + lost == 5 * NPKT, $sformatf("router %0d: delivered %0d lost %0d", g, delivered, lost));
      if (g == 0) check(attacks == 0, "clean router never attacks");
      else begin
        for (int p = 0; p < 5; p++) begin
          check(lost_per_port[p] == 3, $sformatf("port %0d lost %0d packets", p, lost_per_port[p]));
          check(ht_infected[p] == 4'b0111, $sformatf("port %0d infected %b", p, ht_infected[p]));
          check(up_idle[p][0] + up_idle[p][1] + up_idle[p][2] == 0, "dead VCs never released upstream");
        end
      end
      $display("router %0d: delivered %0d lost %0d attacks %0d", g, delivered, lost, attacks);
      done_cnt++;
    end
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    wait (done_cnt == 2);
    check(lat_seen == 1, "latency measured");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

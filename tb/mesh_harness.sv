// mesh_harness: end-to-end test bench body for the 4x4 mesh, shared by the
// mesh testbenches, which differ only in the Trojan variant they build into
// router 6 (none, head-to-body, body-to-head) and in the trigger probability.
// Every tile issues single-flit miss requests to random home tiles, at most
// MSHR outstanding at a time; a tile receiving a request answers with a
// 5-flit reply carrying the block address. It checks:
//   * without a Trojan: every request is answered, every packet arrives
//     whole, and the first request (tile 4 to tile 15, six routers) is
//     reported 3*6+2 cycles after the adapter accepted it;
//   * with a Trojan: every delivered packet is whole; the packets that never
//     arrive are exactly the ones the Trojan attacked and all of them pass
//     router 6; body-to-head loses only replies; no port has more than 3 of
//     its 4 VCs infected; tiles whose misses were lost stall.
// Mechanism counters (each listed one must be seen at least once): single-
// flit requests, 5-flit wormhole replies, injection back-pressure, attacks,
// a port reaching the N-1 limit, stalled tiles, and VC-allocation and credit
// stalls in router 5 towards router 6.
module mesh_harness
  import noc_pkg::*;
#(
  parameter ht_mode_e    MODE   = HT_HB,
  parameter int unsigned P_TEST = 16384,  // p = 0.25: reaches the N-1 limit in a short run
  parameter bit          FULL   = 1'b0,   // 1: the mesh at its own defaults (HT-HB, p = 0.05)
  parameter int          NREQ   = 40      // requests per tile
) ();
  logic clk = 0, rst_n = 0;
  int checks = 0, failures = 0;
  bit finished = 1'b0;   // the wrapping testbench reports and ends the run
  always #5 clk = ~clk;

  localparam int MSHR = 4;    // outstanding requests per tile

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s (t=%0t)", what, $time); end
  endtask

  // Does the XY path from s to d visit router 6?
  function automatic bit via6(int s, int d);
    int x, y;
    x = s % 4; y = s / 4;
    if (s == 6) return 1;
    while (x != d % 4) begin x += (d % 4 > x) ? 1 : -1; if (y * 4 + x == 6) return 1; end
    while (y != d / 4) begin y += (d / 4 > y) ? 1 : -1; if (y * 4 + x == 6) return 1; end
    return 0;
  endfunction

  int done_cnt = 0;
  int mech [string];

  localparam int g = (MODE == HT_NONE) ? 0 : (MODE == HT_HB) ? 1 : 2;
  begin : g_sys
    logic      send_valid [16], send_ready [16], rx_valid [16];
    pkt_desc_t send_desc [16];
    pkt_rx_t   rx_pkt [16];
    logic [4:0] ht_attack;
    logic [3:0] ht_infected [5];

    if (FULL) begin : g_full
      ht_noc_mesh dut (
        .clk, .rst_n, .send_valid, .send_ready, .send_desc, .rx_valid, .rx_pkt,
        .ht_attack, .ht_infected
      );
    end else begin : g_param
      ht_noc_mesh #(.HT_MODE(MODE), .P_THRESH(P_TEST)) dut (
        .clk, .rst_n, .send_valid, .send_ready, .send_desc, .rx_valid, .rx_pkt,
        .ht_attack, .ht_infected
      );
    end

    pkt_desc_t txq [16][$];          // replies first, then requests
    int        issued [16], outstanding [16], answered [16];
    // In-flight packets keyed by {src, dst, type, pid}.
    int        flight_src [int], flight_dst [int], flight_pl [int];
    int        attacks = 0, delivered = 0, sent = 0, va_stall = 0, cr_stall = 0, bp = 0;
    longint    cyc = 0, t_first = -1;
    bit        acc [16];   // handshake completed at the coming clock edge
    bit        lat_done = 0;

    function automatic int key(int src, int dst, int pid, int typ);
      return (src << 16) | (dst << 12) | (typ << 8) | pid;
    endfunction

    initial for (int t = 0; t < 16; t++) begin
      issued[t] = 0; outstanding[t] = 0; answered[t] = 0;
      send_valid[t] = 0; send_desc[t] = '0; acc[t] = 0;
    end

    always @(negedge clk) if (rst_n) begin
      cyc++;
      for (int t = 0; t < 16; t++) begin
        // handshake of the previous cycle
        if (acc[t]) begin
          pkt_desc_t d;
          d = send_desc[t];
          if (txq[t].size() > 0 && txq[t][0] == d) void'(txq[t].pop_front());
          else begin issued[t]++; outstanding[t]++; end
          flight_src[key(t, d.did, d.pid, d.ptype)] = t;
          flight_dst[key(t, d.did, d.pid, d.ptype)] = d.did;
          flight_pl[key(t, d.did, d.pid, d.ptype)]  = d.pl;
          sent++;
          if (t == 4 && d.pid == 0 && d.ptype == 3'd1 && t_first < 0) t_first = cyc;
        end else if (send_valid[t]) bp++;
        // received packets
        if (rx_valid[t]) begin
          int k;
          k = key(rx_pkt[t].sid, t, rx_pkt[t].pid, rx_pkt[t].ptype);
          check(!rx_pkt[t].err, $sformatf("sys %0d tile %0d: damaged packet", g, t));
          check(flight_src.exists(k) && flight_dst[k] == t, $sformatf("sys %0d tile %0d: unexpected packet", g, t));
          if (flight_src.exists(k)) begin
            check(flight_pl[k] == int'(rx_pkt[t].pl), "packet length");
            flight_src.delete(k); flight_dst.delete(k); flight_pl.delete(k);
          end
          delivered++;
          if (rx_pkt[t].ptype == 3'd1) begin
            pkt_desc_t r;
            r = '0;
            r.pid = rx_pkt[t].pid; r.did = rx_pkt[t].sid; r.pl = 4'd4; r.ptype = 3'd2;
            r.addr = rx_pkt[t].addr; r.data = {rx_pkt[t].addr, 32'h0} ^ 64'(t);
            txq[t].push_front(r);
            mech["single-flit request"]++;
          end else begin
            check(rx_pkt[t].data == ({rx_pkt[t].addr, 32'h0} ^ 64'(rx_pkt[t].sid)), "reply payload");
            check(rx_pkt[t].addr[31:24] == 8'(t), "reply to the requester");
            outstanding[t]--; answered[t]++;
            mech["5-flit wormhole reply"]++;
            if (g == 0 && t == 4 && rx_pkt[t].pid == 0 && !lat_done) lat_done = 1;
          end
        end
        // next descriptor
        send_valid[t] = 0;
        if (txq[t].size() > 0) begin
          send_valid[t] = 1; send_desc[t] = txq[t][0];
        end else if (issued[t] < NREQ && outstanding[t] < MSHR && (t == 4 || cyc > 30)) begin
          pkt_desc_t q;
          q = '0;
          q.pid = 8'(issued[t]); q.ptype = 3'd1; q.pl = 4'd0;
          q.did = 4'((t == 4 && issued[t] == 0) ? 15 : $urandom_range(0, 15));
          q.addr = {8'(t), 16'h0, 8'(issued[t])};
          send_valid[t] = 1; send_desc[t] = q;
        end
      end
      #1;
      for (int t = 0; t < 16; t++) acc[t] = send_valid[t] && send_ready[t];
      if (g == 0 && t_first > 0 && cyc == t_first + 20) begin
        // first request: tile 4 -> 15 arrives 3*6+2 cycles after acceptance
        check(flight_src.exists(key(4, 15, 0, 1)) == 0, "first request delivered within 20 cycles");
      end
      if (g == 0 && t_first > 0 && cyc == t_first + 19)
        check(flight_src.exists(key(4, 15, 0, 1)) == 1, "first request not earlier than 20 cycles");
    end

    // Router 5 (west neighbour of router 6): its west input and east output.
    logic [3:0] va_req5, sa_req5, vc_idle5, cred5;
    if (FULL) begin : g_probe_full
      assign va_req5  = g_full.dut.g_tile[5].u_router.va_req[PORT_WEST];
      assign sa_req5  = g_full.dut.g_tile[5].u_router.sa_req[PORT_WEST];
      assign vc_idle5 = g_full.dut.g_tile[5].u_router.vc_idle[PORT_EAST];
      assign cred5    = g_full.dut.g_tile[5].u_router.cred_av[PORT_EAST];
    end else begin : g_probe
      assign va_req5  = g_param.dut.g_tile[5].u_router.va_req[PORT_WEST];
      assign sa_req5  = g_param.dut.g_tile[5].u_router.sa_req[PORT_WEST];
      assign vc_idle5 = g_param.dut.g_tile[5].u_router.vc_idle[PORT_EAST];
      assign cred5    = g_param.dut.g_tile[5].u_router.cred_av[PORT_EAST];
    end

    // Trojan activity and congestion around router 6 (sampled mid-cycle).
    always @(negedge clk) if (rst_n) begin
      #2;
      attacks += $countones(ht_attack);
      for (int p = 0; p < 5; p++)
        if (g != 0 && ht_attack[p]) mech[(g == 1) ? "HT-HB attack" : "HT-BH attack"]++;
      // west neighbour (router 5) waiting for a VC or a credit towards router 6
      if (|va_req5 && vc_idle5 == 0) va_stall++;
      if (|sa_req5 && cred5 != 4'hF) cr_stall++;
    end

    initial begin
      int quiet, last_del;
      wait (rst_n);
      quiet = 0; last_del = 0;
      while (quiet < 400) begin
        @(posedge clk);
        if (delivered != last_del) begin quiet = 0; last_del = delivered; end else quiet++;
      end
      if (g == 0) begin
        int all;
        all = 0;
        for (int t = 0; t < 16; t++) all += answered[t];
        check(all == 16 * NREQ, $sformatf("NHT: %0d of %0d misses answered", all, 16 * NREQ));
        check(flight_src.size() == 0, "NHT: nothing left in flight");
        check(attacks == 0, "NHT: no attacks");
        check(lat_done, "NHT: first reply seen");
      end else begin
        int stalled, maxinf, lost_replies;
        stalled = 0; maxinf = 0; lost_replies = 0;
        check(attacks > 0, $sformatf("sys %0d: Trojan attacked", g));
        check(flight_src.size() == attacks, $sformatf("sys %0d: %0d lost packets, %0d attacks", g, flight_src.size(), attacks));
        foreach (flight_src[k]) begin
          check(via6(flight_src[k], flight_dst[k]), $sformatf("sys %0d: lost packet %0d->%0d avoids router 6", g, flight_src[k], flight_dst[k]));
          if (flight_pl[k] != 0) lost_replies++;
        end
        if (g == 2) check(lost_replies == flight_src.size(), "HT-BH loses only replies");
        for (int p = 0; p < 5; p++) begin
          check($countones(ht_infected[p]) <= 3, "N-1 limit");
          if ($countones(ht_infected[p]) > maxinf) maxinf = $countones(ht_infected[p]);
        end
        if (maxinf == 3) mech[(g == 1) ? "N-1 limit reached (HB)" : "N-1 limit reached (BH)"]++;
        for (int t = 0; t < 16; t++) if (answered[t] < NREQ) stalled++;
        check(stalled > 0, $sformatf("sys %0d: %0d stalled tiles", g, stalled));
        if (stalled > 0) mech[(g == 1) ? "stalled tiles (HB)" : "stalled tiles (BH)"] += stalled;
      end
      mech["VC allocation stall next to router 6"] += va_stall;
      mech["credit stall next to router 6"] += cr_stall;
      mech["injection back-pressure"] += bp;
      $display("sys %0d (%s): sent %0d delivered %0d attacks %0d cycles %0d", g, MODE.name(), sent, delivered, attacks, cyc);
      done_cnt++;
    end
  end

  initial begin
    repeat (300000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    finished = 1'b1;
  end

  initial begin
    string names [$];
    names = '{"single-flit request", "5-flit wormhole reply", "injection back-pressure"};
    if (MODE == HT_HB) names = {names, "HT-HB attack"};
    if (MODE == HT_BH) names = {names, "HT-BH attack"};
    if (!FULL && MODE == HT_HB) names = {names, "N-1 limit reached (HB)", "stalled tiles (HB)"};
    if (!FULL && MODE == HT_BH) names = {names, "N-1 limit reached (BH)", "stalled tiles (BH)"};
    if (!FULL && MODE != HT_NONE) names = {names, "VC allocation stall next to router 6", "credit stall next to router 6"};
    repeat (3) @(posedge clk);
    rst_n = 1;
    wait (done_cnt == 1);
    foreach (names[i]) begin
      int n;
      n = mech.exists(names[i]) ? mech[names[i]] : 0;
      $display("mechanism %-40s %0d", names[i], n);
      check(n > 0, $sformatf("mechanism never happened: %s", names[i]));
    end
    finished = 1'b1;
  end
endmodule

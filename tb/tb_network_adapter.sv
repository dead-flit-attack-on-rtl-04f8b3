// tb_network_adapter: the adapter's injection side looped back into its own
// ejection side (flits and credits). Random single-flit requests and 5-flit
// replies must come back with the same header fields, consecutive payloads,
// no error flag, in order, and with the expected latency: the last flit is
// reported PL+2 cycles after the descriptor is accepted.
module tb_network_adapter;
  import noc_pkg::*;
  logic clk = 0, rst_n = 0;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  logic      send_valid, send_ready, rx_valid;
  pkt_desc_t send_desc;
  pkt_rx_t   rx_pkt;
  flit_t     inj_flit;
  credit_t   ej_credit;
  logic [3:0] my_id = 4'd6;

  network_adapter dut (
    .clk, .rst_n, .my_id, .send_valid, .send_ready, .send_desc, .rx_valid, .rx_pkt,
    .inj_flit, .inj_credit(ej_credit), .ej_flit(inj_flit), .ej_credit
  );

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s (t=%0t)", what, $time); end
  endtask

  pkt_desc_t sent[$];
  longint    due[$];
  longint    cyc = 0;
  int        n_flits = 0, n_heads = 0, n_tails = 0;
  always @(posedge clk) cyc <= cyc + 1;

  // Flit sequence on the wire.
  always @(posedge clk) if (rst_n && inj_flit.valid) begin
    n_flits++;
    if (inj_flit.ft == FT_HEAD) n_heads++;
    if (inj_flit.ft == FT_TAIL) n_tails++;
  end

  // Scoreboard.
  always @(posedge clk) if (rst_n && rx_valid) begin
    pkt_desc_t d;
    longint t;
    check(sent.size() > 0, "unexpected packet");
    if (sent.size() > 0) begin
      d = sent.pop_front();
      t = due.pop_front();
      check(rx_pkt.pid == d.pid && rx_pkt.sid == my_id && rx_pkt.pl == d.pl &&
            rx_pkt.ptype == d.ptype && rx_pkt.addr == d.addr, "header fields");
      check(!rx_pkt.err, "no error flag");
      if (d.pl != 0) check(rx_pkt.data == d.data, "first payload word");
      check(cyc == t, $sformatf("latency: at %0d expected %0d", cyc, t));
    end
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int npkt, exp_flits;
    send_valid = 0; send_desc = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    npkt = 0; exp_flits = 0;
    for (int i = 0; i < 200; i++) begin
      @(negedge clk);
      send_valid = $urandom_range(0, 3) != 0;
      send_desc.pid   = 8'(i);
      send_desc.did   = my_id;
      send_desc.pl    = $urandom_range(0, 1) ? 4'd4 : 4'd0;
      send_desc.ptype = 3'($urandom);
      send_desc.pr    = 2'($urandom);
      send_desc.cmd   = 7'($urandom);
      send_desc.addr  = $urandom;
      send_desc.data  = {$urandom, $urandom};
      #1;
      if (send_valid && send_ready) begin
        sent.push_back(send_desc);
        due.push_back(cyc + 1 + longint'(send_desc.pl) + 2);
        npkt++;
        exp_flits += 1 + send_desc.pl;
      end
    end
    @(negedge clk); send_valid = 0;
    repeat (20) @(posedge clk);
    check(sent.size() == 0, "all packets returned");
    check(n_flits == exp_flits && n_heads == npkt, $sformatf("flits %0d/%0d heads %0d/%0d", n_flits, exp_flits, n_heads, npkt));
    $display("packets %0d flits %0d tails %0d", npkt, n_flits, n_tails);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

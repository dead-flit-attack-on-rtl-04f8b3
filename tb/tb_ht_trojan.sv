// tb_ht_trojan: checks both Trojan variants with a trigger that always fires
// (head-to-body flips heads until NUM_VC-1 VCs are infected, then stops;
// body-to-head flips the first body flit of an armed packet only), a trigger
// that never fires (flits pass unchanged), and the default p = 0.05 trigger
// rate measured over many cycles.
module tb_ht_trojan;
  import noc_pkg::*;
  logic clk = 0, rst_n = 0;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  flit_t in_f;
  flit_t o_hb, o_bh, o_off, o_p;
  logic a_hb, a_bh, a_off, a_p;
  logic [3:0] i_hb, i_bh, i_off, i_p;

  ht_trojan #(.MODE(HT_HB), .P_THRESH(65536)) u_hb  (.clk, .rst_n, .in_flit(in_f), .out_flit(o_hb),  .attack(a_hb),  .infected(i_hb));
  ht_trojan #(.MODE(HT_BH), .P_THRESH(65536)) u_bh  (.clk, .rst_n, .in_flit(in_f), .out_flit(o_bh),  .attack(a_bh),  .infected(i_bh));
  ht_trojan #(.MODE(HT_HB), .P_THRESH(0))     u_off (.clk, .rst_n, .in_flit(in_f), .out_flit(o_off), .attack(a_off), .infected(i_off));
  ht_trojan                                   u_p   (.clk, .rst_n, .in_flit('0),   .out_flit(o_p),   .attack(a_p),   .infected(i_p));

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  function automatic flit_t mk(ft_e ft, int vc, int pl);
    flit_t f;
    head_t h;
    h = '0; h.pl = 4'(pl); h.did = 4'd9;
    f.valid = 1; f.ft = ft; f.vcid = 2'(vc);
    f.data = (ft == FT_HEAD) ? 64'(h) : 64'hDEAD_BEEF_0000_0000 + 64'(vc);
    return f;
  endfunction

  // Apply a flit, look at the combinational outputs, then clock it.
  task automatic drive(flit_t f);
    @(negedge clk);
    in_f = f;
    #1;
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int trig_cnt;
    in_f = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    // Heads on VCs 0..3: HB flips the first three only (N-1 limit).
    for (int v = 0; v < 4; v++) begin
      drive(mk(FT_HEAD, v, 4));
      check(o_hb.ft == ((v < 3) ? FT_BODY : FT_HEAD), $sformatf("HB head vc%0d ft=%0d", v, o_hb.ft));
      check(a_hb == (v < 3), "HB attack strobe");
      check(o_hb.data == in_f.data && o_hb.vcid == in_f.vcid, "HB leaves data and VCID");
      check(o_off.ft == FT_HEAD && !a_off, "p=0 never attacks");
      check(o_bh.ft == FT_HEAD && !a_bh, "BH leaves heads alone");
    end
    drive('0);
    check(i_hb == 4'b0111, $sformatf("HB infected mask %b", i_hb));
    // BH: bodies on VCs 0..2 flipped to heads (those were armed), a second
    // body on VC 0 is not, VC 3 never armed (budget used up).
    for (int v = 0; v < 4; v++) begin
      drive(mk(FT_BODY, v, 0));
      check(o_bh.ft == ((v < 3) ? FT_HEAD : FT_BODY), $sformatf("BH body vc%0d ft=%0d", v, o_bh.ft));
      check(a_bh == (v < 3), "BH attack strobe");
      check(o_hb.ft == FT_BODY && !a_hb, "HB leaves bodies alone");
    end
    drive(mk(FT_BODY, 0, 0));
    check(o_bh.ft == FT_BODY, "BH flips one body per packet");
    drive(mk(FT_TAIL, 1, 0));
    check(o_bh.ft == FT_TAIL && o_hb.ft == FT_TAIL, "tails untouched");
    drive('0);
    check(i_bh == 4'b0111, $sformatf("BH infected mask %b", i_bh));
    check(i_off == 4'b0000, "p=0 infects nothing");
    // A reset BH Trojan does not arm on a packet without body flits.
    rst_n = 0; @(posedge clk); rst_n = 1;
    drive(mk(FT_HEAD, 2, 1));
    drive(mk(FT_TAIL, 2, 0));
    check(o_bh.ft == FT_TAIL && !a_bh, "PL=1 packet not armed");
    drive(mk(FT_HEAD, 1, 0));
    check(o_hb.ft == FT_BODY, "HB flips single-flit request");
    drive('0);
    // Trigger rate of the default (p = 0.05) instance.
    trig_cnt = 0;
    for (int i = 0; i < 60000; i++) begin
      @(negedge clk);
      if (u_p.trig) trig_cnt++;
    end
    $display("p=0.05 trigger rate: %0d / 60000", trig_cnt);
    check(trig_cnt > 2700 && trig_cnt < 3300, $sformatf("trigger rate %0d", trig_cnt));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

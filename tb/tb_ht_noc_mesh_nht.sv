// tb_ht_noc_mesh_nht: the baseline mesh without a Trojan under cache-like
// request/reply traffic: every miss must be answered (see mesh_harness).
module tb_ht_noc_mesh_nht;
  mesh_harness #(.MODE(noc_pkg::HT_NONE)) h ();

  initial begin
    wait (h.finished);
    $display("TB_RESULT checks=%0d failures=%0d", h.checks, h.failures);
    $finish;
  end
endmodule

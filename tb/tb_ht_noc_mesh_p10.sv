// tb_ht_noc_mesh_p10: the mesh with the head-to-body Trojan in router 6 at
// attack probability p = 0.1 (P_THRESH = 6554), under the cache-like
// request/reply traffic and checks of mesh_harness.
module tb_ht_noc_mesh_p10;
  mesh_harness #(.MODE(noc_pkg::HT_HB), .P_TEST(6554)) h ();

  initial begin
    wait (h.finished);
    $display("TB_RESULT checks=%0d failures=%0d", h.checks, h.failures);
    $finish;
  end
endmodule

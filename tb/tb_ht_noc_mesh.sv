// tb_ht_noc_mesh: the mesh with the head-to-body Trojan in router 6 at
// p = 0.25, under cache-like request/reply traffic (see mesh_harness).
module tb_ht_noc_mesh;
  mesh_harness #(.MODE(noc_pkg::HT_HB), .P_TEST(16384)) h ();

  initial begin
    wait (h.finished);
    $display("TB_RESULT checks=%0d failures=%0d", h.checks, h.failures);
    $finish;
  end
endmodule

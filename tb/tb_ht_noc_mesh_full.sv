// tb_ht_noc_mesh_full: the mesh exactly at its defaults (head-to-body Trojan
// in router 6, p = 0.05, 4 VCs of 3 flits) running the full request/reply
// exercise of mesh_harness: 40 misses per tile.
module tb_ht_noc_mesh_full;
  mesh_harness #(.FULL(1'b1)) h ();

  initial begin
    wait (h.finished);
    $display("TB_RESULT checks=%0d failures=%0d", h.checks, h.failures);
    $finish;
  end
endmodule

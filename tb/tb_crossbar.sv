// tb_crossbar: random flits and selections; every granted output must carry
// the selected input's flit with the new VCID, every other output nothing.
module tb_crossbar;
  import noc_pkg::*;
  int checks = 0, failures = 0;
  flit_t      in_flit [5];
  logic       xb_valid [5];
  logic [2:0] xb_sel [5];
  logic [1:0] xb_vc [5];
  flit_t      out_flit [5];

  crossbar dut (.*);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 2000; i++) begin
      for (int p = 0; p < 5; p++) begin
        in_flit[p].valid = 1'b1;
        in_flit[p].ft    = ft_e'($urandom_range(0, 2));
        in_flit[p].vcid  = 2'($urandom);
        in_flit[p].data  = {$urandom, $urandom};
        xb_valid[p] = $urandom_range(0, 1) == 1;
        xb_sel[p]   = 3'($urandom_range(0, 4));
        xb_vc[p]    = 2'($urandom);
      end
      #1;
      for (int o = 0; o < 5; o++) begin
        checks++;
        if (xb_valid[o]) begin
          flit_t e;
          e = in_flit[xb_sel[o]];
          e.vcid = xb_vc[o];
          if (out_flit[o] != e) begin failures++; $display("FAIL out %0d", o); end
        end else if (out_flit[o].valid) begin
          failures++; $display("FAIL out %0d should be idle", o);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

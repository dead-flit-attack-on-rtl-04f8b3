// tb_output_unit: random VC allocations, flit sends and credit returns
// against a model of per-VC credits and idle flags; a VC is re-idled only by
// a credit carrying vc_free.
module tb_output_unit;
  import noc_pkg::*;
  logic clk = 0, rst_n = 0;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  credit_t credit_in;
  logic alloc_valid, send_valid;
  logic [1:0] alloc_vc, send_vc;
  logic [3:0] vc_idle, credit_avail;

  output_unit dut (.*);

  int  cred [4];
  bit  idle [4];
  int  inflight [4];   // flits sent but not yet credited
  bit  last_sent [4];  // tail already sent for the current packet

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    credit_in = '0; alloc_valid = 0; send_valid = 0; alloc_vc = 0; send_vc = 0;
    for (int v = 0; v < 4; v++) begin cred[v] = 3; idle[v] = 1; inflight[v] = 0; last_sent[v] = 0; end
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 5000; i++) begin
      @(negedge clk);
      for (int v = 0; v < 4; v++) begin
        checks += 2;
        if (vc_idle[v] != idle[v]) begin failures++; $display("FAIL idle vc%0d", v); end
        if (credit_avail[v] != (cred[v] > 0)) begin failures++; $display("FAIL credit vc%0d (%0d)", v, cred[v]); end
      end
      alloc_valid = 0; send_valid = 0; credit_in = '0;
      // allocate an idle VC
      alloc_vc = 2'($urandom_range(0, 3));
      if (idle[alloc_vc] && $urandom_range(0, 3) == 0) alloc_valid = 1;
      // send on a busy VC that still has a packet and credit
      send_vc = 2'($urandom_range(0, 3));
      if (!idle[send_vc] && !last_sent[send_vc] && cred[send_vc] > 0 && $urandom_range(0, 1)) send_valid = 1;
      // return a credit
      begin
        int cv;
        cv = $urandom_range(0, 3);
        if (inflight[cv] > 0 && $urandom_range(0, 1)) begin
          credit_in.valid = 1;
          credit_in.vcid = 2'(cv);
          credit_in.vc_free = (inflight[cv] == 1) && last_sent[cv];
        end
      end
      @(posedge clk);
      #1;
      if (alloc_valid) begin idle[alloc_vc] = 0; last_sent[alloc_vc] = 0; end
      if (send_valid) begin
        cred[send_vc]--; inflight[send_vc]++;
        if ($urandom_range(0, 3) == 0) last_sent[send_vc] = 1;
      end
      if (credit_in.valid) begin
        cred[credit_in.vcid]++; inflight[credit_in.vcid]--;
        if (credit_in.vc_free) idle[credit_in.vcid] = 1;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

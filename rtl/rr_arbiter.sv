// rr_arbiter: round-robin arbiter used by the VC and switch allocators.
//
// Grants one of N requesters per cycle. The search starts one position after
// the last granted requester, so every persistent requester is served within
// N grants. `gnt` is combinational from `req`; the priority pointer moves
// only on a cycle where `advance` is high and some request was granted.
// The arbitration policy is this design's choice: the document names the
// allocators but not how they arbitrate.
module rr_arbiter #(
  parameter int unsigned N = 4
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic [N-1:0]         req,
  input  logic                 advance,
  output logic [N-1:0]         gnt,
  output logic [$clog2(N)-1:0] gnt_idx,
  output logic                 gnt_valid
);
  localparam int unsigned IW = $clog2(N);

  logic [IW-1:0] last_q;

  always_comb begin
    gnt       = '0;
    gnt_idx   = '0;
    gnt_valid = 1'b0;
    for (int unsigned k = 1; k <= N; k++) begin
      int unsigned idx;
      idx = (int'(last_q) + k) % N;
      if (!gnt_valid && req[idx]) begin
        gnt_valid = 1'b1;
        gnt_idx   = IW'(idx);
        gnt[idx]  = 1'b1;
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                      last_q <= IW'(N - 1);
    else if (advance && gnt_valid)   last_q <= gnt_idx;
  end

  assert property (@(posedge clk) disable iff (!rst_n) $onehot0(gnt));
endmodule

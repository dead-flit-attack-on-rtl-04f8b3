// output_unit: what a router (or network adapter) knows about the VCs of the
// input port at the other end of one of its output links.
//
// For each downstream VC it keeps an idle flag and a credit counter. A VC
// becomes busy when the VC allocator hands it to a packet and idle again
// when the downstream router returns the credit that carries vc_free, i.e.
// when that packet's last flit has left the downstream VC. The credit
// counter starts at the VC depth, drops by one for every flit sent and rises
// by one for every credit received, so a flit is sent only into free buffer
// space. A VC whose packet died downstream never sees vc_free again and stays
// busy forever, which is how dead flits take VCs away from later packets.
// Credit-based VC availability follows the document; the counter form is
// this design's choice. Updates take effect at the next clock edge.
module output_unit
  import noc_pkg::*;
#(
  parameter int unsigned NUM_VC = NUM_VCS,
  parameter int unsigned DEPTH  = VC_DEPTH
) (
  input  logic              clk,
  input  logic              rst_n,
  input  credit_t           credit_in,
  input  logic              alloc_valid,
  input  logic [VCID_W-1:0] alloc_vc,
  input  logic              send_valid,
  input  logic [VCID_W-1:0] send_vc,
  output logic [NUM_VC-1:0] vc_idle,
  output logic [NUM_VC-1:0] credit_avail
);
  localparam int unsigned CW = $clog2(DEPTH + 1);

  logic [CW-1:0]     credits_q [NUM_VC];
  logic [NUM_VC-1:0] idle_q;

  for (genvar v = 0; v < NUM_VC; v++) begin : g_vc
    logic inc, dec;
    assign inc = credit_in.valid && credit_in.vcid == VCID_W'(v);
    assign dec = send_valid && send_vc == VCID_W'(v);

    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        credits_q[v] <= CW'(DEPTH);
        idle_q[v]    <= 1'b1;
      end else begin
        credits_q[v] <= credits_q[v] + CW'(inc) - CW'(dec);
        if (alloc_valid && alloc_vc == VCID_W'(v)) idle_q[v] <= 1'b0;
        if (inc && credit_in.vc_free)              idle_q[v] <= 1'b1;
      end
    end

    assign credit_avail[v] = (credits_q[v] != 0);
    assign vc_idle[v]      = idle_q[v];

    assert property (@(posedge clk) disable iff (!rst_n) dec |-> credits_q[v] != 0)
      else $error("output_unit: flit sent without a credit");
    assert property (@(posedge clk) disable iff (!rst_n) (alloc_valid && alloc_vc == VCID_W'(v)) |-> idle_q[v])
      else $error("output_unit: busy VC allocated");
  end
endmodule

// switch_allocator: decides which buffered flits cross the crossbar.
//
// Separable input-first allocation. Stage 1: in every input port a
// round-robin arbiter picks one VC among those that request the switch and
// hold a credit for their downstream VC. Stage 2: for every output port a
// round-robin arbiter picks one of the input ports whose stage-1 winner wants
// that output. A winner is popped from its VC and sent this cycle. A VC whose
// control buffer has no output port or no downstream VC never requests, so it
// never competes for the crossbar (the document's dead-flit condition).
// Combinational; arbiter pointers move only for granted requests. The
// allocator structure is this design's choice.
module switch_allocator
  import noc_pkg::*;
#(
  parameter int unsigned NP     = NUM_PORTS,
  parameter int unsigned NUM_VC = NUM_VCS
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic [NUM_VC-1:0] sa_req       [NP],
  input  port_e             op           [NP][NUM_VC],
  input  logic [VCID_W-1:0] outvc        [NP][NUM_VC],
  input  logic [NUM_VC-1:0] credit_avail [NP],    // per output port
  output logic [NUM_VC-1:0] sa_gnt       [NP],    // per input port
  output logic [VCID_W-1:0] in_sel_vc    [NP],    // stage-1 choice per input
  output logic              xb_valid     [NP],    // per output port
  output logic [PORT_W-1:0] xb_sel       [NP],    // input port feeding it
  output logic [VCID_W-1:0] xb_vc        [NP]     // downstream VC used
);
  localparam int unsigned VW = $clog2(NUM_VC);
  localparam int unsigned PW = $clog2(NP);

  logic [NUM_VC-1:0] elig    [NP];
  logic [NUM_VC-1:0] in_gnt  [NP];
  logic [VW-1:0]     in_idx  [NP];
  logic              in_val  [NP];
  logic [NP-1:0]     out_req [NP];
  logic [NP-1:0]     out_gnt [NP];
  logic [PW-1:0]     out_idx [NP];
  logic              out_val [NP];
  logic [NP-1:0]     in_won;

  for (genvar p = 0; p < NP; p++) begin : g_in
    always_comb
      for (int v = 0; v < NUM_VC; v++)
        elig[p][v] = sa_req[p][v] && credit_avail[op[p][v]][outvc[p][v]];

    rr_arbiter #(.N(NUM_VC)) u_arb (
      .clk(clk), .rst_n(rst_n), .req(elig[p]), .advance(in_won[p]),
      .gnt(in_gnt[p]), .gnt_idx(in_idx[p]), .gnt_valid(in_val[p])
    );
    assign in_sel_vc[p] = VCID_W'(in_idx[p]);
  end

  for (genvar o = 0; o < NP; o++) begin : g_out
    always_comb
      for (int p = 0; p < NP; p++)
        out_req[o][p] = in_val[p] && (int'(op[p][in_idx[p]]) == o);

    rr_arbiter #(.N(NP)) u_arb (
      .clk(clk), .rst_n(rst_n), .req(out_req[o]), .advance(1'b1),
      .gnt(out_gnt[o]), .gnt_idx(out_idx[o]), .gnt_valid(out_val[o])
    );

    assign xb_valid[o] = out_val[o];
    assign xb_sel[o]   = PORT_W'(out_idx[o]);
    assign xb_vc[o]    = outvc[out_idx[o]][in_idx[out_idx[o]]];
  end

  always_comb begin
    for (int p = 0; p < NP; p++) begin
      in_won[p] = 1'b0;
      for (int o = 0; o < NP; o++)
        if (out_gnt[o][p]) in_won[p] = 1'b1;
      sa_gnt[p] = in_won[p] ? in_gnt[p] : '0;
    end
  end
endmodule

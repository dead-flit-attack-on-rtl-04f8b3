// noc_router: a five-port virtual-channel wormhole router for the 2D mesh,
// optionally carrying the dead-flit Trojan on its input ports.
//
// Ports are local, north, east, south, west (port_e). Each input port has
// NUM_VC VCs of DEPTH flits with their control buffers (input_port); a head
// flit gets its output port from XY route computation as it is buffered,
// then a downstream VC from the VC allocator, then crosses the crossbar once
// the switch allocator grants it and the downstream VC has a credit. Body and
// tail flits inherit the head's output port and VC (wormhole switching).
// output_unit tracks credits and idle VCs of each downstream input port.
// With HT_MODE other than HT_NONE an ht_trojan sits between each input link
// and its input port and may flip the FT bit of arriving flits.
// Timing: a head flit arriving at edge t is allocated a VC at edge t+1,
// wins the switch at the earliest in the cycle after, and appears on the
// output link one edge later, i.e. three cycles per hop with no contention;
// body flits follow one per cycle while credits last. Credits return one
// cycle after a flit leaves its VC. Interface: one flit_t and one credit_t
// per direction per port. The router organisation (input buffers, routing
// unit, VC allocator, switch allocator, crossbar, credits) follows the
// document; the pipeline depth and arbitration are this design's choices.
module noc_router
  import noc_pkg::*;
#(
  parameter int unsigned NUM_VC   = NUM_VCS,
  parameter int unsigned DEPTH    = VC_DEPTH,
  parameter ht_mode_e    HT_MODE  = HT_NONE,
  parameter int unsigned P_THRESH = 3277,
  parameter logic [15:0] HT_SEED  = 16'hACE1
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic [1:0]        cur_x,
  input  logic [1:0]        cur_y,
  input  flit_t             in_flit    [NUM_PORTS],
  output credit_t           credit_out [NUM_PORTS],
  output flit_t             out_flit   [NUM_PORTS],
  input  credit_t           credit_in  [NUM_PORTS],
  // observation of the Trojan (constant zero when HT_MODE is HT_NONE)
  output logic [NUM_PORTS-1:0] ht_attack,
  output logic [NUM_VC-1:0]    ht_infected [NUM_PORTS]
);
  localparam int unsigned NP = NUM_PORTS;

  flit_t             buf_in   [NP];
  flit_t             front    [NP][NUM_VC];
  logic [NUM_VC-1:0] va_req   [NP];
  logic [NUM_VC-1:0] sa_req   [NP];
  port_e             op       [NP][NUM_VC];
  logic [VCID_W-1:0] outvc    [NP][NUM_VC];
  logic [NUM_VC-1:0] va_gnt   [NP];
  logic [VCID_W-1:0] va_vc    [NP][NUM_VC];
  logic [NUM_VC-1:0] sa_gnt   [NP];
  logic [NUM_VC-1:0] vc_idle  [NP];
  logic [NUM_VC-1:0] cred_av  [NP];
  logic              alloc_valid [NP];
  logic [VCID_W-1:0] alloc_vc    [NP];
  logic [VCID_W-1:0] in_sel_vc   [NP];
  logic              xb_valid [NP];
  logic [PORT_W-1:0] xb_sel   [NP];
  logic [VCID_W-1:0] xb_vc    [NP];
  flit_t             xb_in    [NP];
  flit_t             xb_out   [NP];

  for (genvar p = 0; p < NP; p++) begin : g_in
    if (HT_MODE != HT_NONE) begin : g_ht
      ht_trojan #(
        .MODE(HT_MODE), .P_THRESH(P_THRESH),
        .SEED(HT_SEED ^ 16'(p * 16'h1F3D)), .NUM_VC(NUM_VC)
      ) u_ht (
        .clk(clk), .rst_n(rst_n), .in_flit(in_flit[p]), .out_flit(buf_in[p]),
        .attack(ht_attack[p]), .infected(ht_infected[p])
      );
    end else begin : g_clean
      assign buf_in[p]      = in_flit[p];
      assign ht_attack[p]   = 1'b0;
      assign ht_infected[p] = '0;
    end

    logic [NUM_VC-1:0] vc_active, vc_nonempty;
    input_port #(.NUM_VC(NUM_VC), .DEPTH(DEPTH)) u_ip (
      .clk(clk), .rst_n(rst_n), .cur_x(cur_x), .cur_y(cur_y),
      .in_flit(buf_in[p]), .credit_out(credit_out[p]),
      .front(front[p]), .va_req(va_req[p]), .sa_req(sa_req[p]),
      .op(op[p]), .outvc(outvc[p]),
      .va_gnt(va_gnt[p]), .va_vc(va_vc[p]), .sa_gnt(sa_gnt[p]),
      .vc_active(vc_active), .vc_nonempty(vc_nonempty)
    );

    assign xb_in[p] = front[p][in_sel_vc[p]];
  end

  vc_allocator #(.NP(NP), .NUM_VC(NUM_VC)) u_va (
    .clk(clk), .rst_n(rst_n), .va_req(va_req), .op(op), .vc_idle(vc_idle),
    .va_gnt(va_gnt), .va_vc(va_vc), .alloc_valid(alloc_valid), .alloc_vc(alloc_vc)
  );

  switch_allocator #(.NP(NP), .NUM_VC(NUM_VC)) u_sa (
    .clk(clk), .rst_n(rst_n), .sa_req(sa_req), .op(op), .outvc(outvc),
    .credit_avail(cred_av), .sa_gnt(sa_gnt), .in_sel_vc(in_sel_vc),
    .xb_valid(xb_valid), .xb_sel(xb_sel), .xb_vc(xb_vc)
  );

  crossbar #(.NP(NP)) u_xb (
    .in_flit(xb_in), .xb_valid(xb_valid), .xb_sel(xb_sel), .xb_vc(xb_vc),
    .out_flit(xb_out)
  );

  for (genvar o = 0; o < NP; o++) begin : g_out
    output_unit #(.NUM_VC(NUM_VC), .DEPTH(DEPTH)) u_ou (
      .clk(clk), .rst_n(rst_n), .credit_in(credit_in[o]),
      .alloc_valid(alloc_valid[o]), .alloc_vc(alloc_vc[o]),
      .send_valid(xb_valid[o]), .send_vc(xb_vc[o]),
      .vc_idle(vc_idle[o]), .credit_avail(cred_av[o])
    );

    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) out_flit[o] <= '0;
      else        out_flit[o] <= xb_out[o];
    end
  end
endmodule

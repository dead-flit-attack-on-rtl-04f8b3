// ht_noc_mesh: the 16-tile network-on-chip of a tiled multicore, a 4x4 mesh
// of virtual-channel wormhole routers, with the dead-flit Trojan implanted in
// one router.
//
// Tile t sits at x = t % 4, y = t / 4 (row 0 on the north edge) and owns a
// network adapter and a router. Neighbouring routers are joined by a flit
// link and a credit link in each direction; links off the mesh edge are tied
// off (XY routing never uses them). Router HT_ROUTER (6 by default, as in the
// document's experiments) is built with an ht_trojan on every input port of
// variant HT_MODE, triggered with probability P_THRESH/65536 per packet;
// all other routers are clean. HT_MODE = HT_NONE gives the baseline network.
// The tile side (processor, caches, cache and tile controllers) is outside
// this design: each tile's adapter interface is brought out as arrays
// indexed by tile id (send handshake with a packet descriptor, received
// packet strobe). The Trojan router's attack strobes and infected-VC masks
// are brought out for observation only.
// Timing: three cycles per router hop plus one cycle in each adapter when
// uncontended. The mesh size, the Trojan position, the 4 VCs per port, XY
// routing and p = 0.05 follow the document; the rest is this design's choice.
module ht_noc_mesh
  import noc_pkg::*;
#(
  parameter int unsigned NUM_VC    = NUM_VCS,
  parameter int unsigned DEPTH     = VC_DEPTH,
  parameter int unsigned HT_ROUTER = 6,
  parameter ht_mode_e    HT_MODE   = HT_HB,
  parameter int unsigned P_THRESH  = 3277
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 send_valid [NUM_TILES],
  output logic                 send_ready [NUM_TILES],
  input  pkt_desc_t            send_desc  [NUM_TILES],
  output logic                 rx_valid   [NUM_TILES],
  output pkt_rx_t              rx_pkt     [NUM_TILES],
  output logic [NUM_PORTS-1:0] ht_attack,
  output logic [NUM_VC-1:0]    ht_infected [NUM_PORTS]
);
  flit_t   r_in   [NUM_TILES][NUM_PORTS];
  flit_t   r_out  [NUM_TILES][NUM_PORTS];
  credit_t c_in   [NUM_TILES][NUM_PORTS];
  credit_t c_out  [NUM_TILES][NUM_PORTS];
  logic [NUM_PORTS-1:0] attack   [NUM_TILES];
  logic [NUM_VC-1:0]    infected [NUM_TILES][NUM_PORTS];

  for (genvar t = 0; t < NUM_TILES; t++) begin : g_tile
    localparam int X = t % MESH_X;
    localparam int Y = t / MESH_X;

    // Links from the neighbours (tie-off on the mesh edge).
    if (Y > 0) begin : g_n
      assign r_in[t][PORT_NORTH] = r_out[t-MESH_X][PORT_SOUTH];
      assign c_in[t][PORT_NORTH] = c_out[t-MESH_X][PORT_SOUTH];
    end else begin : g_n_edge
      assign r_in[t][PORT_NORTH] = '0;
      assign c_in[t][PORT_NORTH] = '0;
    end
    if (Y < MESH_Y - 1) begin : g_s
      assign r_in[t][PORT_SOUTH] = r_out[t+MESH_X][PORT_NORTH];
      assign c_in[t][PORT_SOUTH] = c_out[t+MESH_X][PORT_NORTH];
    end else begin : g_s_edge
      assign r_in[t][PORT_SOUTH] = '0;
      assign c_in[t][PORT_SOUTH] = '0;
    end
    if (X < MESH_X - 1) begin : g_e
      assign r_in[t][PORT_EAST] = r_out[t+1][PORT_WEST];
      assign c_in[t][PORT_EAST] = c_out[t+1][PORT_WEST];
    end else begin : g_e_edge
      assign r_in[t][PORT_EAST] = '0;
      assign c_in[t][PORT_EAST] = '0;
    end
    if (X > 0) begin : g_w
      assign r_in[t][PORT_WEST] = r_out[t-1][PORT_EAST];
      assign c_in[t][PORT_WEST] = c_out[t-1][PORT_EAST];
    end else begin : g_w_edge
      assign r_in[t][PORT_WEST] = '0;
      assign c_in[t][PORT_WEST] = '0;
    end

    network_adapter #(.NUM_VC(NUM_VC), .DEPTH(DEPTH)) u_na (
      .clk(clk), .rst_n(rst_n), .my_id(TILE_W'(t)),
      .send_valid(send_valid[t]), .send_ready(send_ready[t]), .send_desc(send_desc[t]),
      .rx_valid(rx_valid[t]), .rx_pkt(rx_pkt[t]),
      .inj_flit(r_in[t][PORT_LOCAL]), .inj_credit(c_out[t][PORT_LOCAL]),
      .ej_flit(r_out[t][PORT_LOCAL]), .ej_credit(c_in[t][PORT_LOCAL])
    );

    noc_router #(
      .NUM_VC(NUM_VC), .DEPTH(DEPTH),
      .HT_MODE((t == HT_ROUTER) ? HT_MODE : HT_NONE),
      .P_THRESH(P_THRESH),
      .HT_SEED(16'hACE1 ^ 16'(t * 16'h0101))
    ) u_router (
      .clk(clk), .rst_n(rst_n), .cur_x(2'(X)), .cur_y(2'(Y)),
      .in_flit(r_in[t]), .credit_out(c_out[t]),
      .out_flit(r_out[t]), .credit_in(c_in[t]),
      .ht_attack(attack[t]), .ht_infected(infected[t])
    );
  end

  assign ht_attack   = attack[HT_ROUTER];
  assign ht_infected = infected[HT_ROUTER];
endmodule

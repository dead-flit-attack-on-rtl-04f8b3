// vc_allocator: gives each new packet a VC in the next router.
//
// A head flit that has its output port (OP) but no downstream VC requests
// allocation. For every output port, a round-robin arbiter picks one of the
// NUM_PORTS*NUM_VC input VCs requesting that port, and the winner receives
// the lowest-numbered downstream VC that is idle. One allocation per output
// port per cycle; when no downstream VC is idle nobody is granted and the
// head waits. Combinational: the grant is stored by the input port and the
// output unit at the next edge. Arbitration order and the lowest-idle-VC
// choice are this design's; the document says only that the allocator picks a
// VC by its availability in the downstream router.
module vc_allocator
  import noc_pkg::*;
#(
  parameter int unsigned NP     = NUM_PORTS,
  parameter int unsigned NUM_VC = NUM_VCS
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic [NUM_VC-1:0] va_req      [NP],
  input  port_e             op          [NP][NUM_VC],
  input  logic [NUM_VC-1:0] vc_idle     [NP],     // per output port
  output logic [NUM_VC-1:0] va_gnt      [NP],     // per input port
  output logic [VCID_W-1:0] va_vc       [NP][NUM_VC],
  output logic              alloc_valid [NP],     // per output port
  output logic [VCID_W-1:0] alloc_vc    [NP]
);
  localparam int unsigned NR = NP * NUM_VC;
  localparam int unsigned RW = $clog2(NR);

  logic [NR-1:0] req    [NP];
  logic [NR-1:0] gnt    [NP];
  logic [RW-1:0] gidx   [NP];
  logic          gvalid [NP];
  logic          any_idle [NP];
  logic [VCID_W-1:0] free_vc [NP];

  for (genvar o = 0; o < NP; o++) begin : g_out
    always_comb begin
      for (int p = 0; p < NP; p++)
        for (int v = 0; v < NUM_VC; v++)
          req[o][p*NUM_VC + v] = va_req[p][v] && (int'(op[p][v]) == o);
      any_idle[o] = |vc_idle[o];
      free_vc[o]  = '0;
      for (int v = NUM_VC - 1; v >= 0; v--)
        if (vc_idle[o][v]) free_vc[o] = VCID_W'(v);
    end

    rr_arbiter #(.N(NR)) u_arb (
      .clk      (clk),
      .rst_n    (rst_n),
      .req      (any_idle[o] ? req[o] : '0),
      .advance  (1'b1),
      .gnt      (gnt[o]),
      .gnt_idx  (gidx[o]),
      .gnt_valid(gvalid[o])
    );

    assign alloc_valid[o] = gvalid[o];
    assign alloc_vc[o]    = free_vc[o];
  end

  always_comb begin
    for (int p = 0; p < NP; p++) begin
      va_gnt[p] = '0;
      for (int v = 0; v < NUM_VC; v++) begin
        va_vc[p][v] = '0;
        for (int o = 0; o < NP; o++) begin
          if (gnt[o][p*NUM_VC + v]) begin
            va_gnt[p][v] = 1'b1;
            va_vc[p][v]  = free_vc[o];
          end
        end
      end
    end
  end
endmodule

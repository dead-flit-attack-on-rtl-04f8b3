// crossbar: the router's NP x NP switch.
//
// Each output port takes the flit offered by the input port the switch
// allocator selected for it and rewrites the VCID of the common prefix to
// the downstream VC won in VC allocation, which the packet's later flits
// inherit. An output with no grant carries an invalid (all-zero) flit.
// Purely combinational; the router registers the outputs onto the links.
// The VCID rewrite follows the document; the mux form is this design's.
module crossbar
  import noc_pkg::*;
#(
  parameter int unsigned NP = NUM_PORTS
) (
  input  flit_t             in_flit  [NP],   // per input port
  input  logic              xb_valid [NP],   // per output port
  input  logic [PORT_W-1:0] xb_sel   [NP],
  input  logic [VCID_W-1:0] xb_vc    [NP],
  output flit_t             out_flit [NP]
);
  always_comb begin
    for (int o = 0; o < NP; o++) begin
      out_flit[o] = '0;
      if (xb_valid[o]) begin
        out_flit[o]       = in_flit[xb_sel[o]];
        out_flit[o].valid = 1'b1;
        out_flit[o].vcid  = xb_vc[o];
      end
    end
  end
endmodule

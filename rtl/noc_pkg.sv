// noc_pkg: types and constants shared by the mesh NoC and its hardware Trojan.
//
// Every flit travels on a 64-bit flit channel with a "common prefix" carried
// beside it: a 2-bit flit type (FT) and the VC identifier (VCID) of the VC the
// flit must occupy in the downstream router. The FT encoding (00 head,
// 01 body, 10 tail, 11 undefined), the 4x4 mesh, the 4 VCs per input port,
// the 3-flit VC depth and the 64-bit channel follow the document. The field
// order of the head flit (PID SID DID PL TYPE PR CMD ADDRESS) also follows it;
// the individual field widths are this design's choice, sized so that the
// head flit fills exactly 64 bits.
package noc_pkg;

  // Mesh and router geometry.
  localparam int unsigned MESH_X    = 4;
  localparam int unsigned MESH_Y    = 4;
  localparam int unsigned NUM_TILES = MESH_X * MESH_Y;
  localparam int unsigned NUM_PORTS = 5;
  localparam int unsigned NUM_VCS   = 4;   // VCs per input port (one VNet)
  localparam int unsigned VC_DEPTH  = 3;   // flits per VC
  localparam int unsigned FLIT_W    = 64;  // flit channel width
  localparam int unsigned VCID_W    = 2;   // wide enough for NUM_VCS
  localparam int unsigned TILE_W    = 4;   // tile id width
  localparam int unsigned PORT_W    = 3;

  // Router ports. North is row y-1, south is row y+1 (tile id = y*MESH_X + x).
  typedef enum logic [PORT_W-1:0] {
    PORT_LOCAL = 3'd0,
    PORT_NORTH = 3'd1,
    PORT_EAST  = 3'd2,
    PORT_SOUTH = 3'd3,
    PORT_WEST  = 3'd4
  } port_e;

  // Flit type field of the common prefix.
  typedef enum logic [1:0] {
    FT_HEAD  = 2'b00,
    FT_BODY  = 2'b01,
    FT_TAIL  = 2'b10,
    FT_UNDEF = 2'b11
  } ft_e;

  // Variants of the Trojan: none (baseline), head-to-body, body-to-head.
  typedef enum logic [1:0] {
    HT_NONE = 2'd0,
    HT_HB   = 2'd1,
    HT_BH   = 2'd2
  } ht_mode_e;

  // Head flit payload, most significant field first.
  typedef struct packed {
    logic [7:0]        pid;      // packet id
    logic [TILE_W-1:0] sid;      // source tile
    logic [TILE_W-1:0] did;      // destination tile
    logic [3:0]        pl;       // number of non-head flits in the packet
    logic [2:0]        ptype;    // message type (request, response, ...)
    logic [1:0]        pr;       // priority
    logic [6:0]        cmd;      // extra metadata
    logic [31:0]       addr;     // physical address
  } head_t;

  // One flit on a link: valid, common prefix and the 64-bit channel.
  typedef struct packed {
    logic              valid;
    ft_e               ft;
    logic [VCID_W-1:0] vcid;
    logic [FLIT_W-1:0] data;
  } flit_t;

  // Credit returned upstream when a flit leaves a VC. vc_free marks the
  // departure of a packet's last flit: the upstream may then reuse the VC.
  typedef struct packed {
    logic              valid;
    logic [VCID_W-1:0] vcid;
    logic              vc_free;
  } credit_t;

  // Control buffer state S of a VC.
  typedef enum logic {
    VC_IDLE   = 1'b0,
    VC_ACTIVE = 1'b1
  } vc_state_e;

  // Packet descriptor handed from a tile to its network adapter.
  typedef struct packed {
    logic [7:0]        pid;
    logic [TILE_W-1:0] did;
    logic [3:0]        pl;
    logic [2:0]        ptype;
    logic [1:0]        pr;
    logic [6:0]        cmd;
    logic [31:0]       addr;
    logic [63:0]       data;     // first payload word; body flit k carries data+k-1
  } pkt_desc_t;

  // Packet reported by a network adapter when its last flit arrives.
  typedef struct packed {
    logic [7:0]        pid;
    logic [TILE_W-1:0] sid;
    logic [3:0]        pl;
    logic [2:0]        ptype;
    logic [31:0]       addr;
    logic [63:0]       data;     // payload of the first non-head flit
    logic              err;      // flit count or payload did not match the head
  } pkt_rx_t;

  // A packet ends with a tail flit, or with its head when PL is zero.
  function automatic logic is_last_flit(ft_e ft, logic [FLIT_W-1:0] data);
    head_t h;
    h = head_t'(data);
    return (ft == FT_TAIL) || (ft == FT_HEAD && h.pl == 4'd0);
  endfunction

endpackage

// input_port: one router input port - demultiplexer, VC buffers and the
// per-VC control buffers.
//
// An arriving flit is steered by the VCID of its common prefix into one of
// NUM_VC flit FIFOs. Each VC has a control buffer holding the document's
// fields S (idle/active), PL, VCID (here the downstream VC won in VC
// allocation) and OP (output port), plus a head-sent flag. On arrival:
//   head flit, S idle    : S <- active, PL <- head.PL, OP <- XY route of DID;
//   head flit, S active  : buffered only; the control buffer is unchanged;
//   body/tail, S active  : PL is decremented;
//   body/tail, S idle    : buffered only; no route, no OP.
// A VC asks the VC allocator for a downstream VC when its front flit is the
// packet's head and OP is set. It asks the switch allocator when its front
// flit is consistent with the control buffer: a head that has not yet left,
// or a body/tail flit after the head left. A flit that breaks these rules
// (a body flit in an idle VC, or a second head in an active VC) never
// requests the switch, so it and the flits behind it stay forever: these are
// the dead flits the Trojan creates. When the last flit of a packet (tail, or
// a head with PL = 0) leaves, the control buffer is cleared.
// Timing: a flit written at edge t is visible on `front` and can request
// allocation from cycle t; every departure returns a credit upstream one
// cycle later, with vc_free set for the last flit of a packet.
// The arrival rules follow the document; reset of the control buffer on the
// last departure (rather than on PL reaching zero) is this design's reading.
module input_port
  import noc_pkg::*;
#(
  parameter int unsigned NUM_VC = NUM_VCS,
  parameter int unsigned DEPTH  = VC_DEPTH
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic [1:0]        cur_x,
  input  logic [1:0]        cur_y,
  input  flit_t             in_flit,
  output credit_t           credit_out,
  // towards the allocators
  output flit_t             front     [NUM_VC],
  output logic [NUM_VC-1:0] va_req,
  output logic [NUM_VC-1:0] sa_req,
  output port_e             op        [NUM_VC],
  output logic [VCID_W-1:0] outvc     [NUM_VC],
  input  logic [NUM_VC-1:0] va_gnt,
  input  logic [VCID_W-1:0] va_vc     [NUM_VC],
  input  logic [NUM_VC-1:0] sa_gnt,
  // status
  output logic [NUM_VC-1:0] vc_active,
  output logic [NUM_VC-1:0] vc_nonempty
);
  localparam int unsigned FW = $bits(flit_t) - 1;   // stored: prefix + data
  localparam int unsigned CW = $clog2(DEPTH + 1);

  typedef struct packed {
    vc_state_e         s;
    logic [3:0]        pl;
    port_e             op;
    logic              op_valid;
    logic [VCID_W-1:0] outvc;
    logic              outvc_valid;
    logic              head_sent;
  } ctrl_t;

  ctrl_t             ctrl_q [NUM_VC];
  logic [FW-1:0]     fifo_front [NUM_VC];
  logic [NUM_VC-1:0] fifo_empty, fifo_full;
  logic [CW-1:0]     fifo_count [NUM_VC];
  port_e             rc_port;
  head_t             in_head;

  assign in_head = head_t'(in_flit.data);

  route_xy u_rc (
    .did     (in_head.did),
    .cur_x   (cur_x),
    .cur_y   (cur_y),
    .out_port(rc_port)
  );

  for (genvar v = 0; v < NUM_VC; v++) begin : g_vc
    logic push;
    assign push = in_flit.valid && (in_flit.vcid == VCID_W'(v));

    vc_fifo #(.DEPTH(DEPTH), .WIDTH(FW)) u_fifo (
      .clk  (clk),
      .rst_n(rst_n),
      .push (push),
      .din  (in_flit[FW-1:0]),
      .pop  (sa_gnt[v]),
      .front(fifo_front[v]),
      .empty(fifo_empty[v]),
      .full (fifo_full[v]),
      .count(fifo_count[v])
    );

    always_comb begin
      front[v]       = flit_t'({!fifo_empty[v], fifo_front[v]});
      op[v]          = ctrl_q[v].op;
      outvc[v]       = ctrl_q[v].outvc;
      va_req[v]      = front[v].valid && ctrl_q[v].s == VC_ACTIVE && front[v].ft == FT_HEAD
                       && !ctrl_q[v].head_sent && ctrl_q[v].op_valid && !ctrl_q[v].outvc_valid;
      sa_req[v]      = front[v].valid && ctrl_q[v].s == VC_ACTIVE && ctrl_q[v].outvc_valid
                       && ((front[v].ft == FT_HEAD) ? !ctrl_q[v].head_sent
                                                    : (ctrl_q[v].head_sent && front[v].ft != FT_UNDEF));
      vc_active[v]   = (ctrl_q[v].s == VC_ACTIVE);
      vc_nonempty[v] = !fifo_empty[v];
    end

    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        ctrl_q[v] <= '0;
      end else begin
        // arrival
        if (push) begin
          if (in_flit.ft == FT_HEAD) begin
            if (ctrl_q[v].s == VC_IDLE) begin
              ctrl_q[v].s        <= VC_ACTIVE;
              ctrl_q[v].pl       <= in_head.pl;
              ctrl_q[v].op       <= rc_port;
              ctrl_q[v].op_valid <= 1'b1;
            end
          end else if (ctrl_q[v].s == VC_ACTIVE && ctrl_q[v].pl != 0) begin
            ctrl_q[v].pl <= ctrl_q[v].pl - 1'b1;
          end
        end
        // VC allocation
        if (va_gnt[v]) begin
          ctrl_q[v].outvc       <= va_vc[v];
          ctrl_q[v].outvc_valid <= 1'b1;
        end
        // departure
        if (sa_gnt[v]) begin
          if (front[v].ft == FT_HEAD) ctrl_q[v].head_sent <= 1'b1;
          if (is_last_flit(front[v].ft, front[v].data)) ctrl_q[v] <= '0;
        end
      end
    end

    assert property (@(posedge clk) disable iff (!rst_n) sa_gnt[v] |-> sa_req[v]);
    assert property (@(posedge clk) disable iff (!rst_n) va_gnt[v] |-> va_req[v]);
  end

  // Credit for the departing flit (at most one per cycle per port).
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      credit_out <= '0;
    end else begin
      credit_out <= '0;
      for (int v = 0; v < NUM_VC; v++) begin
        if (sa_gnt[v]) begin
          credit_out.valid   <= 1'b1;
          credit_out.vcid    <= VCID_W'(v);
          credit_out.vc_free <= is_last_flit(front[v].ft, front[v].data);
        end
      end
    end
  end

  assert property (@(posedge clk) disable iff (!rst_n) $onehot0(sa_gnt));
endmodule

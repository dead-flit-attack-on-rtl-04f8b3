// vc_fifo: the flit queue of one virtual channel.
//
// A first-in first-out buffer of DEPTH flits (3 in the document's input port).
// The head of the queue is visible on `front` whenever `count` is non-zero;
// `pop` removes it and `push` appends `din`, both in the same cycle if needed.
// The upstream router sends a flit only when it holds a credit for this VC,
// so a push into a full queue is a protocol error and is flagged by an
// assertion. Storage is a small register array with read and write pointers.
module vc_fifo #(
  parameter int unsigned DEPTH = 3,
  parameter int unsigned WIDTH = 67
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       push,
  input  logic [WIDTH-1:0]           din,
  input  logic                       pop,
  output logic [WIDTH-1:0]           front,
  output logic                       empty,
  output logic                       full,
  output logic [$clog2(DEPTH+1)-1:0] count
);
  localparam int unsigned PW = (DEPTH > 1) ? $clog2(DEPTH) : 1;
  localparam int unsigned CW = $clog2(DEPTH+1);

  logic [WIDTH-1:0] mem [DEPTH];
  logic [PW-1:0]    rd_q, wr_q;
  logic [CW-1:0]    cnt_q;

  function automatic logic [PW-1:0] next_ptr(logic [PW-1:0] p);
    return (int'(p) == DEPTH - 1) ? '0 : p + 1'b1;
  endfunction

  logic do_push, do_pop;
  assign do_pop  = pop && (cnt_q != 0);
  assign do_push = push && (cnt_q != CW'(DEPTH) || do_pop);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rd_q  <= '0;
      wr_q  <= '0;
      cnt_q <= '0;
    end else begin
      if (do_push) wr_q <= next_ptr(wr_q);
      if (do_pop)  rd_q <= next_ptr(rd_q);
      cnt_q <= cnt_q + CW'(do_push) - CW'(do_pop);
    end
  end

  always_ff @(posedge clk) begin
    if (do_push) mem[wr_q] <= din;
  end

  assign front = mem[rd_q];
  assign empty = (cnt_q == 0);
  assign full  = (cnt_q == CW'(DEPTH));
  assign count = cnt_q;

  assert property (@(posedge clk) disable iff (!rst_n) push |-> (!full || pop))
    else $error("vc_fifo: push into a full VC");
  assert property (@(posedge clk) disable iff (!rst_n) pop |-> !empty)
    else $error("vc_fifo: pop from an empty VC");
endmodule

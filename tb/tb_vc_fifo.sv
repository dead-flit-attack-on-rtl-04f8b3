// tb_vc_fifo: random push/pop traffic against a queue model; checks front,
// count, empty and full every cycle, including simultaneous push and pop on a
// full queue.
module tb_vc_fifo;
  localparam int DEPTH = 3;
  localparam int W     = 16;
  logic clk = 0, rst_n = 0;
  logic push, pop;
  logic [W-1:0] din, front;
  logic empty, full;
  logic [1:0] count;
  int checks = 0, failures = 0;
  logic [W-1:0] model[$];

  vc_fifo #(.DEPTH(DEPTH), .WIDTH(W)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    push = 0; pop = 0; din = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      check(count == 2'(model.size()), "count");
      check(empty == (model.size() == 0), "empty");
      check(full == (model.size() == DEPTH), "full");
      if (model.size() > 0) check(front == model[0], $sformatf("front %h vs %h", front, model[0]));
      pop  = (model.size() > 0) && ($urandom_range(0, 2) != 0);
      push = (model.size() < DEPTH || pop) && ($urandom_range(0, 2) != 0);
      din  = W'($urandom);
      @(posedge clk);
      #1;
      if (pop)  void'(model.pop_front());
      if (push) model.push_back(din);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

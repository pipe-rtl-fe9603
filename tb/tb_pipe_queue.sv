// tb_pipe_queue: self-checking test of pipe_queue.
// Random pushes and pops against a reference queue; checks head, empty,
// full and count every clock, including push+pop on a full queue.
module tb_pipe_queue;
  localparam int W = 8, D = 4;
  logic clk = 0, rst_n = 0;
  logic push, pop;
  logic [W-1:0] push_data, head;
  logic empty, full;
  logic [$clog2(D+1)-1:0] count;
  int checks = 0, failures = 0;
  logic [W-1:0] model[$];

  pipe_queue #(.WIDTH(W), .DEPTH(D)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit c, string what);
    checks++;
    if (!c) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    push = 0; pop = 0; push_data = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 2000; i++) begin
      @(negedge clk);
      check(empty == (model.size() == 0), "empty");
      check(full == (model.size() == D), "full");
      check(int'(count) == model.size(), "count");
      if (model.size() > 0) check(head == model[0], "head");
      push = ($urandom % 2) && (model.size() < D || (model.size() == D && i % 3 == 0));
      pop  = ($urandom % 2) && model.size() > 0;
      if (push && model.size() == D) pop = 1;
      push_data = W'($urandom);
      @(posedge clk);
      #1;
      if (pop) void'(model.pop_front());
      if (push) model.push_back(push_data);
      push = 0; pop = 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

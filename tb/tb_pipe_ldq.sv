// tb_pipe_ldq: self-checking test of the load data queue.
// Reserves slots (own and alternate), fills them in order after a random
// delay, pops the head, and checks data order, the reservation limits
// (one free slot for own, two for alternate) and the counters.
module tb_pipe_ldq;
  localparam int D = 8;
  logic clk = 0, rst_n = 0;
  logic rsv_own, rsv_alt, can_rsv_own, can_rsv_alt, fill, pop, empty;
  logic [31:0] fill_data, head;
  logic [$clog2(D+1)-1:0] count, reserved;
  int checks = 0, failures = 0;
  int inflight = 0;
  logic [31:0] model[$];
  int next_val = 100;

  pipe_ldq #(.DEPTH(D)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit c, string what);
    checks++;
    if (!c) begin failures++; $display("FAIL %s t=%0t", what, $time); end
  endtask

  initial begin
    rsv_own = 0; rsv_alt = 0; fill = 0; pop = 0; fill_data = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 3000; i++) begin
      int free;
      @(negedge clk);
      free = D - model.size() - inflight;
      check(can_rsv_own == (free >= 1), "can_rsv_own");
      check(can_rsv_alt == (free >= 2), "can_rsv_alt");
      check(int'(count) == model.size(), "count");
      check(int'(reserved) == inflight, "reserved");
      check(empty == (model.size() == 0), "empty");
      if (model.size() > 0) check(head == model[0], "head order");
      rsv_own = can_rsv_own && ($urandom % 3 == 0);
      rsv_alt = can_rsv_alt && ($urandom % 3 == 0);
      fill = (inflight > 0) && ($urandom % 2);
      fill_data = next_val;
      pop = (model.size() > 0) && ($urandom % 3 == 0);
      @(posedge clk);
      #1;
      if (pop) void'(model.pop_front());
      if (fill) begin model.push_back(fill_data); next_val++; end
      inflight += int'(rsv_own) + int'(rsv_alt) - int'(fill);
      rsv_own = 0; rsv_alt = 0; fill = 0; pop = 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_pipe_regfile: self-checking test of the foreground/background
// register files: random writes through the write port and the PC save
// port, swaps, and reads on all three ports compared with a model.
module tb_pipe_regfile;
  import pipe_pkg::*;
  logic clk = 0, rst_n = 0;
  logic swap, fg, we, pc_we, pc_bank;
  logic [3:0] raddr_a, raddr_b, raddr_c, waddr;
  word_t rdata_a, rdata_b, rdata_c, wdata, pc_wdata;
  word_t model[16];
  logic  mfg;
  int checks = 0, failures = 0;

  pipe_regfile dut (.*);
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
    swap = 0; we = 0; pc_we = 0; pc_bank = 0; waddr = 0; wdata = 0; pc_wdata = 0;
    raddr_a = 0; raddr_b = 0; raddr_c = 0;
    for (int i = 0; i < 16; i++) model[i] = 0;
    mfg = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 2000; i++) begin
      @(negedge clk);
      raddr_a = 4'($urandom); raddr_b = 4'($urandom); raddr_c = 4'($urandom);
      #1;
      check(fg == mfg, "fg");
      check(rdata_a == model[raddr_a], "read a");
      check(rdata_b == model[raddr_b], "read b");
      check(rdata_c == model[raddr_c], "read c");
      we = $urandom % 2; waddr = 4'($urandom); wdata = $urandom;
      swap = ($urandom % 8 == 0);
      pc_we = ($urandom % 6 == 0); pc_bank = $urandom % 2; pc_wdata = $urandom;
      if (pc_we && we && waddr == {pc_bank, 3'd7}) we = 0;
      @(posedge clk);
      #1;
      if (we) model[waddr] = wdata;
      if (pc_we) model[{pc_bank, 3'd7}] = pc_wdata;
      if (swap) mfg = ~mfg;
      we = 0; pc_we = 0; swap = 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_pipe_addr_logic: self-checking test of effective address generation:
// plain, pre- and post-increment, with and without the literal-0 base.
module tb_pipe_addr_logic;
  import pipe_pkg::*;
  am_e mode;
  logic ri_zero, writes_base;
  word_t base, offset, ea, new_base;
  int checks = 0, failures = 0;

  pipe_addr_logic dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit c, string what);
    checks++;
    if (!c) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    for (int i = 0; i < 1500; i++) begin
      word_t b;
      mode = am_e'(i % 3);
      ri_zero = (i % 5 == 0);
      base = $urandom;
      offset = $urandom % 64;
      #1;
      b = ri_zero ? 0 : base;
      check(ea == ((mode == AM_POST) ? b : b + offset), "ea");
      check(writes_base == (mode != AM_PLAIN && !ri_zero), "writes_base");
      if (writes_base) check(new_base == b + offset, "new_base");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

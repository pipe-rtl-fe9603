// tb_pipe_shifter: self-checking test of the left shifter, all counts 0-40
// and random large counts.
module tb_pipe_shifter;
  import pipe_pkg::*;
  word_t a, count, y, exp;
  int checks = 0, failures = 0;

  pipe_shifter dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 2000; i++) begin
      a = $urandom;
      count = (i < 1600) ? word_t'(i % 41) : $urandom;
      #1;
      exp = '0;
      if (count < 32) for (int k = 0; k < 32; k++) if (k >= count) exp[k] = a[k - count];
      checks++;
      if (y !== exp) begin failures++; $display("FAIL a=%h n=%0d y=%h exp=%h", a, count, y, exp); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

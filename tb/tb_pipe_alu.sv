// tb_pipe_alu: self-checking test of pipe_alu on random and corner operands.
module tb_pipe_alu;
  import pipe_pkg::*;
  alu_op_e op;
  word_t a, b, y, exp;
  int checks = 0, failures = 0;

  pipe_alu dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 3000; i++) begin
      op = alu_op_e'(i % 8);
      a = (i % 50 == 0) ? 32'h8000_0000 : $urandom;
      b = (i % 70 == 0) ? 32'hFFFF_FFFF : $urandom;
      #1;
      case (i % 8)
        0: exp = a + b;
        1: exp = a - b;
        2: exp = b - a;
        3: exp = a | b;
        4: exp = a & b;
        5: exp = a ^ b;
        6: exp = ~a;
        default: exp = a;
      endcase
      checks++;
      if (y !== exp) begin failures++; $display("FAIL op=%0d a=%h b=%h y=%h exp=%h", i % 8, a, b, y, exp); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

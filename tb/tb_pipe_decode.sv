// tb_pipe_decode: self-checking test of the instruction decoder.
// Every opcode with random fields; the expected class, format, fields and
// flags are worked out here from the opcode ranges of the encoding table.
module tb_pipe_decode;
  import pipe_pkg::*;
  logic [15:0] parcel0, parcel1;
  dec_t d;
  int checks = 0, failures = 0;

  pipe_decode dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit c, string what, int op);
    checks++;
    if (!c) begin failures++; $display("FAIL %s op=%h", what, op); end
  endtask

  function automatic iclass_e exp_class(int op);
    if (op <= 8 || (op >= 'h24 && op <= 'h29)) return IC_ALU;
    if ((op >= 'h09 && op <= 'h0B) || (op >= 'h0F && op <= 'h11) ||
        (op >= 'h18 && op <= 'h1A) || (op >= 'h1E && op <= 'h20)) return IC_LOAD;
    if ((op >= 'h0C && op <= 'h0E) || (op >= 'h12 && op <= 'h14) ||
        (op >= 'h1B && op <= 'h1D) || (op >= 'h21 && op <= 'h23)) return IC_STORE;
    if (op == 'h15) return IC_RFB;
    if (op == 'h16) return IC_RTB;
    if (op == 'h17) return IC_HALT;
    if (op >= 'h2A && op <= 'h35) return IC_PBR;
    if (op == 'h36) return IC_PBRQ;
    if (op == 'h37) return IC_PBRR;
    if (op == 'h38) return IC_PCALL;
    if (op == 'h39) return IC_PRET;
    return IC_ILLEGAL;
  endfunction

  initial begin
    for (int rep = 0; rep < 20; rep++) begin
      for (int op = 0; op < 64; op++) begin
        logic e;
        logic [2:0] ri, rj, rk;
        logic [21:0] disp;
        bit long_f, alt_f;
        e = $urandom; ri = $urandom; rj = $urandom; rk = $urandom; disp = $urandom;
        long_f = (op >= 'h18);
        if (long_f) begin
          parcel0 = {6'(op), e, ri, disp[21:16]};
          parcel1 = disp[15:0];
        end else begin
          parcel0 = {6'(op), e, ri, rj, rk};
          parcel1 = 16'($urandom);
        end
        #1;
        check(d.is_long == long_f, "is_long", op);
        check(d.e == e, "e", op);
        check(d.ri == ri, "ri", op);
        check(d.iclass == exp_class(op), "class", op);
        if (long_f) check(d.disp == {{10{disp[21]}}, disp}, "disp", op);
        else begin
          check(d.rj == rj && d.rk == rk, "rj/rk", op);
        end
        alt_f = (op >= 'h0F && op <= 'h14) || (op >= 'h1E && op <= 'h23) || (op >= 'h30 && op <= 'h35);
        check(d.alt == alt_f, "alt", op);
        if (exp_class(op) inside {IC_LOAD, IC_STORE}) begin
          int k;
          k = long_f ? (op - 'h18) % 3 : (op - 'h09) % 3;
          check(d.am == am_e'(k), "am", op);
        end
        if (exp_class(op) == IC_PBR) check(d.cond == cond_e'((op - 'h2A) % 6), "cond", op);
        if (op >= 'h00 && op <= 'h05) check(d.alu_op == alu_op_e'(op) && d.rd_rj && d.rd_rk && d.wr_ri, "alu rr", op);
        if (op >= 'h25 && op <= 'h29) check(d.use_imm && d.rd_ri && d.wr_ri && !d.rd_rj, "alu imm", op);
        if (op == 'h24) check(d.imm_only && d.wr_ri && !d.rd_ri && d.alu_op == ALU_MOV, "enter", op);
        if (op == 'h07) check(d.alu_op == ALU_SHL, "shl", op);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

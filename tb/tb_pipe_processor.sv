// tb_pipe_processor: one PIPE processor running programs from memory.
//
// Program 1 is the single-processor max/min loop (find the largest and
// smallest element of a vector, both starting from 0) with its PBRs placed
// ahead of their exits. Then: a call and return through the swapped
// register files, including Ri <- BRj and BRi <- Rj copies; every ALU
// operation, the shifter and the immediate forms; 16-bit loads and stores
// with pre- and post-increment; an unconditional register-relative PBR; an
// untaken PBR with exit; loads whose base or index is the LDQ head, an
// ALU result straight into the SDQ, and a background register loaded from
// the LDQ. Results go through the SDQ and SAQ to memory and
// are compared with values computed here. A loop of eight independent
// instructions must issue at one instruction per clock once it is in the
// I-cache. The other processor's links are tied off.
module tb_pipe_processor;
  import pipe_pkg::*;
  import pipe_asm_pkg::*;

  localparam int A = 1024, N = 16, BIGA = 2000, SMALLA = 2001, OUT = 2048;
  localparam int PTR = 1900, IDX = 1901;

  logic clk = 0, rst_n = 0;
  mem_req_t bus [2], bus_dut;
  logic     ready [2];
  mem_rd_t  rd [2];
  logic     halted;
  logic     bq_push, bq_data, bq_full, ldq_rsv, ldq_can, st_req, st_gnt;
  int checks = 0, failures = 0;

  // The memory ignores the bus while reset is held: until the first clock
  // edge under reset the processor flops hold arbitrary values.
  assign bus[0] = rst_n ? bus_dut : '0;
  assign bus[1] = '0;

  pipe_memory_model #(.NWORDS(4096), .LAT(3)) u_mem (.clk, .bus, .ready, .rd);

  pipe_processor #(.PROC_ID(0), .RESET_PC(0)) dut (
    .clk, .rst_n, .bus_o(bus_dut), .bus_ready(ready[0]), .rd_i(rd[0]),
    .x_bq_push_o(bq_push), .x_bq_data_o(bq_data), .x_bq_full_i(1'b0),
    .x_bq_push_i(1'b0), .x_bq_data_i(1'b0), .x_bq_full_o(bq_full),
    .x_ldq_rsv_o(ldq_rsv), .x_ldq_can_rsv_i(1'b1), .x_ldq_rsv_i(1'b0), .x_ldq_can_rsv_o(ldq_can),
    .x_st_req_o(st_req), .x_st_gnt_i(1'b0), .x_st_req_i(1'b0), .x_st_gnt_o(st_gnt),
    .halted
  );

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

  task automatic build(pipe_asm a);
    a.restart();
    // max/min of a vector
    a.i32(OP_ENTER, 0, 1, 0);
    a.i32(OP_ENTER, 0, 2, 0);
    a.i32(OP_ENTER, 0, 3, A);
    a.i32(OP_ENTER, 0, 0, N + A);
    a.label("L1");
    a.i32(OP_LDPST, 0, 3, 1);
    a.i16(OP_MOV, 0, 4, 7, 0);
    a.i16(OP_SUB, 0, 5, 4, 1);
    a.br (OP_IPBRLE, 0, 5, "L2");
    a.i16(OP_SUB, 1, 6, 2, 4);
    a.i16(OP_MOV, 0, 1, 4, 0);
    a.label("L2");
    a.br (OP_IPBRLE, 0, 6, "L3");
    a.i16(OP_SUB, 1, 5, 3, 0);
    a.i16(OP_MOV, 0, 2, 4, 0);
    a.label("L3");
    a.br (OP_IPBRLT, 1, 5, "L1");
    a.i16(OP_MOV, 0, 7, 1, 0);
    a.i16(OP_MOV, 0, 7, 2, 0);
    a.i32(OP_ST, 0, 0, BIGA);
    a.i32(OP_ST, 0, 0, SMALLA);
    // call / return
    a.i32(OP_ENTER, 0, 1, 5);
    a.i32(OP_ENTER, 0, 2, 7);
    a.br (OP_PCALL, 0, 0, "SUBR");
    a.i16(OP_ADD, 1, 3, 1, 2);
    a.i16(OP_MOV, 0, 7, 4, 0); a.i32(OP_ST, 0, 0, OUT + 0);
    a.i16(OP_MOV, 0, 7, 3, 0); a.i32(OP_ST, 0, 0, OUT + 1);
    a.i16(OP_RFB, 0, 7, 1, 0); a.i32(OP_ST, 0, 0, OUT + 2);
    // ALU, shifter, immediates
    a.i32(OP_ENTER, 0, 5, -3);
    a.i32(OP_ENTER, 0, 6, 'h55);
    a.i16(OP_RSUB, 0, 4, 5, 6); a.i16(OP_MOV, 0, 7, 4, 0); a.i32(OP_ST, 0, 0, OUT + 3);
    a.i16(OP_XOR, 0, 7, 5, 6); a.i32(OP_ST, 0, 0, OUT + 4);
    a.i16(OP_AND, 0, 7, 5, 6); a.i32(OP_ST, 0, 0, OUT + 5);
    a.i16(OP_OR,  0, 7, 5, 6); a.i32(OP_ST, 0, 0, OUT + 6);
    a.i16(OP_NOT, 0, 7, 5, 0); a.i32(OP_ST, 0, 0, OUT + 7);
    a.i32(OP_ENTER, 0, 3, 4);
    a.i16(OP_SHL, 0, 7, 6, 3); a.i32(OP_ST, 0, 0, OUT + 8);
    a.i32(OP_ADDI, 0, 6, 'h100);
    a.i32(OP_SUBI, 0, 6, 1);
    a.i32(OP_XORI, 0, 6, 'hF);
    a.i32(OP_ANDI, 0, 6, 'hFF);
    a.i32(OP_ORI,  0, 6, 'h300);
    a.i16(OP_MOV, 0, 7, 6, 0); a.i32(OP_ST, 0, 0, OUT + 9);
    // 16-bit loads with pre-increment, LDQ to SDQ moves
    a.i32(OP_ENTER, 0, 1, A);
    a.i32(OP_ENTER, 0, 2, 2);
    a.i16(OP_LDRPRE, 0, 1, 2, 0);
    a.i16(OP_LDR, 0, 1, 2, 0);
    a.i16(OP_MOV, 0, 7, 7, 0); a.i32(OP_ST, 0, 0, OUT + 10);
    a.i16(OP_MOV, 0, 7, 7, 0); a.i32(OP_ST, 0, 0, OUT + 11);
    a.i16(OP_MOV, 0, 7, 1, 0); a.i32(OP_ST, 0, 0, OUT + 12);
    // 16-bit store with post-increment
    a.i32(OP_ENTER, 0, 1, OUT + 13);
    a.i32(OP_ENTER, 0, 2, 1);
    a.i16(OP_MOV, 0, 7, 6, 0); a.i16(OP_STRPST, 0, 1, 2, 0);
    a.i16(OP_MOV, 0, 7, 1, 0); a.i32(OP_ST, 0, 1, 0);
    // unconditional register-relative PBR used as a jump
    a.i32(OP_ENTER, 0, 3, a.at("SKIP"));
    a.i32(OP_IPBRR, 1, 3, 0);
    a.i32(OP_ENTER, 0, 4, 'hBAD); a.i16(OP_MOV, 0, 7, 4, 0); a.i32(OP_ST, 0, 0, OUT + 15);
    a.label("SKIP");
    a.i32(OP_ENTER, 0, 4, 'h600D); a.i16(OP_MOV, 0, 7, 4, 0); a.i32(OP_ST, 0, 0, OUT + 16);
    // untaken PBR with an exit
    a.i32(OP_ENTER, 0, 4, 1);
    a.br (OP_IPBREQ, 0, 4, "BAD2");
    a.i16(OP_MOV, 1, 7, 4, 0); a.i32(OP_ST, 0, 0, OUT + 17);
    a.i32(OP_ENTER, 0, 4, 2); a.i16(OP_MOV, 0, 7, 4, 0); a.i32(OP_ST, 0, 0, OUT + 18);
    // queue heads as operands: a load whose base is the LDQ head, a load
    // indexed by the LDQ head, SDQ <- R3 + LDQ, BR5 <- LDQ and SDQ <- BR5
    a.i32(OP_LD, 0, 0, PTR);
    a.i32(OP_LD, 0, 7, 0);
    a.i16(OP_MOV, 0, 7, 7, 0); a.i32(OP_ST, 0, 0, OUT + 19);
    a.i32(OP_ENTER, 0, 1, A);
    a.i32(OP_LD, 0, 0, IDX);
    a.i16(OP_LDR, 0, 1, 7, 0);
    a.i16(OP_MOV, 0, 7, 7, 0); a.i32(OP_ST, 0, 0, OUT + 20);
    a.i32(OP_ENTER, 0, 3, 1000);
    a.i32(OP_LD, 0, 0, A + 6);
    a.i16(OP_ADD, 0, 7, 3, 7); a.i32(OP_ST, 0, 0, OUT + 21);
    a.i32(OP_LD, 0, 0, A + 7);
    a.i16(OP_RTB, 0, 5, 7, 0);
    a.i16(OP_RFB, 0, 7, 5, 0); a.i32(OP_ST, 0, 0, OUT + 22);
    // issue rate: eight independent instructions, run twice
    a.i32(OP_ENTER, 0, 6, 2);
    a.label("RATE");
    a.label("RS");
    a.i32(OP_ENTER, 0, 0, 1);
    a.i32(OP_ENTER, 0, 1, 2);
    a.i32(OP_ENTER, 0, 2, 3);
    a.i16(OP_ADD, 0, 3, 0, 0);
    a.i16(OP_ADD, 0, 4, 0, 0);
    a.i32(OP_SUBI, 0, 6, 1);
    a.i16(OP_ADD, 0, 5, 1, 2);
    a.label("RE");
    a.i16(OP_ADD, 0, 4, 1, 2);
    a.br (OP_IPBRGT, 1, 6, "RATE");
    a.i16(OP_HALT, 0, 0, 0, 0);
    // subroutine
    a.label("SUBR");
    a.i16(OP_RFB, 0, 1, 3, 0);
    a.i32(OP_ENTER, 0, 2, 100);
    a.i16(OP_ADD, 0, 3, 1, 2);
    a.i16(OP_RTB, 0, 4, 3, 0);
    a.i32(OP_PRET, 1, 0, 0);
    a.label("BAD2");
    a.i32(OP_ENTER, 0, 4, 'hBAD); a.i16(OP_MOV, 0, 7, 4, 0); a.i32(OP_ST, 0, 0, OUT + 18);
    a.i16(OP_HALT, 0, 0, 0, 0);
  endtask

  int rs_cyc[$], re_cyc[$], cyc = 0;
  int rs_pc, re_pc;
  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (dut.issue_fire && dut.ir_pc == rs_pc) rs_cyc.push_back(cyc);
    if (dut.issue_fire && dut.ir_pc == re_pc) re_cyc.push_back(cyc);
  end

  initial begin
    pipe_asm a;
    int vec [N];
    int vmax, vmin;
    a = new(0);
    build(a);
    build(a);
    rs_pc = a.at("RS"); re_pc = a.at("RE");
    foreach (a.parcels[i]) begin
      int p;
      p = i;
      if (p % 2 == 0) u_mem.mem[p / 2][31:16] = a.parcels[i];
      else            u_mem.mem[p / 2][15:0]  = a.parcels[i];
    end
    vmax = 0; vmin = 0;
    for (int i = 0; i < N; i++) begin
      vec[i] = int'($urandom % 2000) - 1000;
      u_mem.mem[A + i] = word_t'(vec[i]);
      if (vec[i] > vmax) vmax = vec[i];
      if (vec[i] < vmin) vmin = vec[i];
    end
    u_mem.mem[PTR] = A + 5;
    u_mem.mem[IDX] = 3;
    repeat (3) @(posedge clk);
    rst_n = 1;
    wait (halted);
    repeat (30) @(posedge clk);
    check(u_mem.mem[BIGA] == word_t'(vmax), "biga");
    check(u_mem.mem[SMALLA] == word_t'(vmin), "smalla");
    check(u_mem.mem[OUT + 0] == 112, "callee wrote caller R4 via BR4");
    check(u_mem.mem[OUT + 1] == 12, "exit instruction of the call wrote the caller file");
    check(u_mem.mem[OUT + 2] == 12, "callee file visible as background after return");
    check(u_mem.mem[OUT + 3] == 32'h58, "rsub");
    check(u_mem.mem[OUT + 4] == (32'hFFFF_FFFD ^ 32'h55), "xor");
    check(u_mem.mem[OUT + 5] == (32'hFFFF_FFFD & 32'h55), "and");
    check(u_mem.mem[OUT + 6] == (32'hFFFF_FFFD | 32'h55), "or");
    check(u_mem.mem[OUT + 7] == 32'h2, "not");
    check(u_mem.mem[OUT + 8] == 32'h550, "shl");
    check(u_mem.mem[OUT + 9] == 32'h35B, "immediates");
    check(u_mem.mem[OUT + 10] == word_t'(vec[2]), "pre-increment load address");
    check(u_mem.mem[OUT + 11] == word_t'(vec[4]), "register-indexed load");
    check(u_mem.mem[OUT + 12] == A + 2, "pre-increment base update");
    check(u_mem.mem[OUT + 13] == 32'h35B, "post-increment store address");
    check(u_mem.mem[OUT + 14] == OUT + 14, "post-increment base update");
    check(u_mem.mem[OUT + 15] == 0, "jumped over");
    check(u_mem.mem[OUT + 16] == 32'h600D, "register-relative PBR target");
    check(u_mem.mem[OUT + 17] == 1, "exit instruction of untaken PBR executed");
    check(u_mem.mem[OUT + 18] == 2, "untaken PBR fell through");
    check(u_mem.mem[OUT + 19] == word_t'(vec[5]), "load with base from the LDQ head");
    check(u_mem.mem[OUT + 20] == word_t'(vec[3]), "load indexed by the LDQ head");
    check(u_mem.mem[OUT + 21] == word_t'(1000 + vec[6]), "SDQ <- R3 + LDQ");
    check(u_mem.mem[OUT + 22] == word_t'(vec[7]), "BR5 <- LDQ, SDQ <- BR5");
    check(u_mem.proto_errors == 0, "bus protocol");
    check(rs_cyc.size() == 2 && re_cyc.size() == 2, "rate loop ran twice");
    if (re_cyc.size() == 2) check(re_cyc[1] - rs_cyc[1] == 7, "one instruction per clock");
    $display("rate loop: %0d clocks for 8 instructions", re_cyc.size() == 2 ? re_cyc[1] - rs_cyc[1] + 1 : -1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

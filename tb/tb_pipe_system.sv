// tb_pipe_system: end-to-end test of the two-processor PIPE system at its
// default parameters, with the behavioural memory.
//
// Phase 1, access/execute mode: processor 1 is the access processor. It
// walks the vector with post-incrementing ALDQ loads that fill processor
// 0's LDQ, tests the loop end with an external PBR whose outcomes go
// through the branch queue, and finally generates the two result
// addresses with ASAQ. Processor 0, the execute processor, takes the
// elements from its LDQ, keeps the running maximum and minimum (both
// starting from 0), follows the loop with PBR(Q) and puts the results in
// its SDQ. It then queues six more copies of the maximum, more than its
// SDQ holds, while the access processor runs a delay loop before sending
// their ASAQ addresses, so the SDQ-full interlock is certain to occur.
// The roles then turn: the access processor sends six more ASAQ addresses
// at once while the execute processor delays the data (copies of the
// minimum), so the access processor's SAQ fills up.
// Phase 2, independent mode:
// each processor runs the single-processor version of the same loop on a
// vector of its own, then calls a subroutine that reads the caller's
// registers through the background file and stores them; processor 1
// sends ten ALDQ loads into processor 0's LDQ (more than it holds), which
// processor 0 sums after a delay loop; each stores a burst of values
// into a slow memory (memory not ready 70% of the time), and finally the
// two processors meet through the branch queue before halting.
// Checked: results in memory, the bus protocol, and that every mechanism
// happened at least once (register interlock, LDQ empty, LDQ reservation
// back-pressure, branch queue full and empty, SDQ and SAQ full, exits taken
// from issue and from fetch, I-cache refills, own and alternate stores,
// alternate loads, call/return swaps).
module tb_pipe_system;
  import pipe_pkg::*;
  import pipe_asm_pkg::*;

  localparam int N = 64;
  localparam int A = 4096, A2 = 6144;
  localparam int BIGA = 8000, SMALLA = 8001, R0B = 8002, R0S = 8003, R1B = 8004, R1S = 8005;
  localparam int OUT0 = 8100, OUT1 = 8200, EXTRA = 8300, NEXTRA = 6;
  localparam int AP_ORG = 'h1000;

  logic clk = 0, rst_n = 0;
  mem_req_t bus [2], bus_dut [2];
  logic     ready [2];
  mem_rd_t  rd [2];
  logic     halted [2];
  int checks = 0, failures = 0, cyc = 0;

  // The memory ignores the buses while reset is held: until the first
  // clock edge under reset the processor flops hold arbitrary values.
  assign bus[0] = rst_n ? bus_dut[0] : '0;
  assign bus[1] = rst_n ? bus_dut[1] : '0;

  pipe_memory_model #(.NWORDS(16384), .LAT(4)) u_mem (.clk, .bus, .ready, .rd);
  pipe_system dut (.clk, .rst_n, .bus_o(bus_dut), .bus_ready(ready), .rd_i(rd), .halted);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit c, string what);
    checks++;
    if (!c) begin failures++; $display("FAIL %s", what); end
  endtask

  // ---------------------------------------------------------------- events
  int ev_raw, ev_ldq_empty, ev_rsv, ev_bq_full, ev_bq_empty, ev_sdq_full, ev_saq_full;
  int ev_exit_issue, ev_exit_fetch, ev_refill, ev_own_store, ev_alt_store, ev_alt_load;
  int ev_swap, ev_bq_push, n_issued;
  initial begin
    ev_raw = 0; ev_ldq_empty = 0; ev_rsv = 0; ev_bq_full = 0; ev_bq_empty = 0; ev_sdq_full = 0;
    ev_saq_full = 0; ev_exit_issue = 0; ev_exit_fetch = 0; ev_refill = 0; ev_own_store = 0;
    ev_alt_store = 0; ev_alt_load = 0; ev_swap = 0; ev_bq_push = 0; n_issued = 0;
  end

`define PROC_EVENTS(P) \
    if (dut.g_proc[P].u_proc.ir_valid && !dut.g_proc[P].u_proc.halted) begin \
      ev_raw       += int'(dut.g_proc[P].u_proc.st_raw); \
      ev_ldq_empty += int'(dut.g_proc[P].u_proc.st_ldq); \
      ev_rsv       += int'(dut.g_proc[P].u_proc.st_rsv); \
      ev_bq_full   += int'(dut.g_proc[P].u_proc.st_bqf); \
      ev_bq_empty  += int'(dut.g_proc[P].u_proc.st_bqe); \
      ev_sdq_full  += int'(dut.g_proc[P].u_proc.st_sdq); \
      ev_saq_full  += int'(dut.g_proc[P].u_proc.st_saq); \
    end \
    n_issued      += int'(dut.g_proc[P].u_proc.issue_fire); \
    ev_exit_issue += int'(dut.g_proc[P].u_proc.redirect); \
    ev_exit_fetch += int'(dut.g_proc[P].u_proc.fetch_fire && dut.g_proc[P].u_proc.f_early); \
    ev_swap       += int'(dut.g_proc[P].u_proc.do_swap); \
    ev_bq_push    += int'(dut.g_proc[P].u_proc.x_bq_push_o); \
    ev_refill     += int'(dut.g_proc[P].u_proc.u_icache.lookup && !dut.g_proc[P].u_proc.u_icache.hit && !dut.g_proc[P].u_proc.u_icache.busy);

  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (rst_n) begin
      `PROC_EVENTS(0)
      `PROC_EVENTS(1)
      for (int p = 0; p < 2; p++) if (bus[p].valid && ready[p]) begin
        ev_own_store += int'(bus[p].op == MEM_STADDR);
        ev_alt_store += int'(bus[p].op == MEM_ASTADDR);
        ev_alt_load  += int'(bus[p].op == MEM_ALOAD);
      end
    end
  end

  // ---------------------------------------------------------------- programs
  task automatic prog_ep(pipe_asm a);
    a.restart();
    a.i32(OP_ENTER, 0, 1, 0);                 // biga
    a.i32(OP_ENTER, 0, 2, 0);                 // smalla
    a.label("L1");
    a.i16(OP_MOV, 0, 4, 7, 0);                // R4 <- LDQ
    a.i16(OP_SUB, 0, 5, 4, 1);
    a.br (OP_IPBRLE, 0, 5, "L2");
    a.i16(OP_SUB, 1, 6, 2, 4);                // exit
    a.i16(OP_MOV, 0, 1, 4, 0);
    a.label("L2");
    a.br (OP_IPBRLE, 1, 6, "L3");
    a.i16(OP_MOV, 0, 2, 4, 0);
    a.label("L3");
    a.br (OP_PBRQ, 1, 0, "L1");
    a.i16(OP_MOV, 0, 7, 1, 0);                // SDQ <- R1
    a.i16(OP_MOV, 0, 7, 2, 0);                // SDQ <- R2
    for (int k = 0; k < NEXTRA; k++) a.i16(OP_MOV, 0, 7, 1, 0);
    a.i32(OP_ENTER, 0, 5, 40);
    a.label("WAIT");
    a.i32(OP_SUBI, 0, 5, 1);
    a.br (OP_IPBRGT, 1, 5, "WAIT");
    for (int k = 0; k < NEXTRA; k++) a.i16(OP_MOV, 0, 7, 2, 0);
    a.i16(OP_HALT, 0, 0, 0, 0);
  endtask

  task automatic prog_ap(pipe_asm a);
    a.restart();
    a.i32(OP_ENTER, 0, 1, A);
    a.i32(OP_ENTER, 0, 2, N + A);
    a.label("L1");
    a.i32(OP_ALDPST, 0, 1, 1);
    a.i16(OP_SUB, 0, 3, 1, 2);
    a.br (OP_PBRLT, 1, 3, "L1");
    a.i32(OP_AST, 0, 0, BIGA);
    a.i32(OP_AST, 0, 0, SMALLA);
    a.i32(OP_ENTER, 0, 5, 40);
    a.label("WAIT");
    a.i32(OP_SUBI, 0, 5, 1);
    a.br (OP_IPBRGT, 1, 5, "WAIT");
    for (int k = 0; k < NEXTRA; k++) a.i32(OP_AST, 0, 0, EXTRA + k);
    for (int k = 0; k < NEXTRA; k++) a.i32(OP_AST, 0, 0, EXTRA + NEXTRA + k);
    a.i16(OP_HALT, 0, 0, 0, 0);
  endtask

  task automatic prog_ie(pipe_asm a, int role, int base, int rb, int rs, int out);
    a.restart();
    a.i32(OP_ENTER, 0, 1, 0);
    a.i32(OP_ENTER, 0, 2, 0);
    a.i32(OP_ENTER, 0, 3, base);
    a.i32(OP_ENTER, 0, 0, N + base);
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
    a.i32(OP_ST, 0, 0, rb);
    a.i32(OP_ST, 0, 0, rs);
    // call with a gap between prepare and exit
    a.br (OP_PCALL, 0, 0, "SUBR");
    a.i32(OP_ENTER, 0, 6, out);
    a.i16(OP_ADD, 1, 5, 1, 2);                // R5 = biga + smalla, then the call
    // processor 1 loads ten words into processor 0's LDQ (more than it
    // holds) while processor 0 is busy storing; processor 0 sums them later
    if (role == 1) begin
      a.i32(OP_ENTER, 0, 3, base);
      for (int k = 0; k < 10; k++) a.i32(OP_ALDPST, 0, 3, 1);
    end
    // burst of stores against a slow memory, a loop of 8 times 2
    a.i32(OP_ENTER, 0, 0, 1);
    a.i32(OP_ENTER, 0, 3, out + 3);
    a.i32(OP_ENTER, 0, 5, 8);
    a.label("BURST");
    for (int k = 0; k < 2; k++) begin
      if (role == 0) begin
        a.i32(OP_STPST, 0, 3, 1);
        a.i16(OP_ADD, 0, 7, 0, 0);            // SDQ <- 2
      end else begin
        a.i16(OP_ADD, 0, 7, 0, 0);
        a.i32(OP_STPST, 0, 3, 1);
      end
    end
    a.i32(OP_SUBI, 0, 5, 1);
    a.br (OP_IPBRGT, 1, 5, "BURST");
    if (role == 0) begin
      // hold off draining the LDQ so that processor 1's ALDQs must wait
      a.i32(OP_ENTER, 0, 5, 80);
      a.label("HOLD");
      a.i32(OP_SUBI, 0, 5, 1);
      a.br (OP_IPBRGT, 1, 5, "HOLD");
      a.i32(OP_ENTER, 0, 4, 0);
      for (int k = 0; k < 10; k++) a.i16(OP_ADD, 0, 4, 4, 7);
      a.i16(OP_MOV, 0, 7, 4, 0);
      a.i32(OP_ST, 0, 6, 2);
      // wait for processor 1 through the branch queue
      a.br (OP_PBRQ, 1, 0, "DONE");
    end else begin
      a.i32(OP_ENTER, 0, 5, 40);
      a.label("DELAY");
      a.i32(OP_SUBI, 0, 5, 1);
      a.br (OP_IPBRGT, 1, 5, "DELAY");
      a.i32(OP_ENTER, 0, 0, 0);
      a.br (OP_PBRGE, 1, 0, "DONE");
    end
    a.label("DONE");
    a.i16(OP_HALT, 0, 0, 0, 0);
    a.label("SUBR");
    a.i16(OP_RFB, 0, 7, 5, 0);                // SDQ <- BR5
    a.i16(OP_RFB, 0, 1, 6, 0);                // R1 <- BR6 (out)
    a.i32(OP_ST, 0, 1, 0);
    a.i16(OP_RFB, 0, 7, 7, 0);                // SDQ <- saved PC
    a.i32(OP_ST, 0, 1, 1);
    a.i32(OP_PRET, 1, 0, 0);
  endtask

  task automatic load_prog(pipe_asm a);
    foreach (a.parcels[i]) begin
      int p;
      p = a.origin + i;
      if (p % 2 == 0) u_mem.mem[p / 2][31:16] = a.parcels[i];
      else            u_mem.mem[p / 2][15:0]  = a.parcels[i];
    end
  endtask

  task automatic run(string what, int limit);
    int t0;
    rst_n = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    t0 = cyc;
    while (!(halted[0] && halted[1]) && cyc - t0 < limit) @(posedge clk);
    repeat (40) @(posedge clk);
    check(halted[0] && halted[1], {what, ": both processors halted"});
    $display("%s: %0d clocks", what, cyc - t0);
  endtask

  initial begin
    pipe_asm ep, ap, i0, i1;
    int v [N], w [N];
    int mx, mn, mx2, mn2, ie_ret0;
    ep = new(0); ap = new(AP_ORG); i0 = new(0); i1 = new(AP_ORG);
    prog_ep(ep); prog_ep(ep);
    prog_ap(ap); prog_ap(ap);
    prog_ie(i0, 0, A, R0B, R0S, OUT0);  prog_ie(i0, 0, A, R0B, R0S, OUT0);
    prog_ie(i1, 1, A2, R1B, R1S, OUT1); prog_ie(i1, 1, A2, R1B, R1S, OUT1);

    mx = 0; mn = 0; mx2 = 0; mn2 = 0;
    for (int i = 0; i < N; i++) begin
      v[i] = int'($urandom % 100000) - 50000;
      w[i] = int'($urandom % 100000) - 50000;
      u_mem.mem[A + i]  = word_t'(v[i]);
      u_mem.mem[A2 + i] = word_t'(w[i]);
      if (v[i] > mx) mx = v[i];
      if (v[i] < mn) mn = v[i];
      if (w[i] > mx2) mx2 = w[i];
      if (w[i] < mn2) mn2 = w[i];
    end

    // phase 1: access/execute
    load_prog(ep); load_prog(ap);
    run("access/execute", 20000);
    check(u_mem.mem[BIGA] == word_t'(mx), "AE biga");
    check(u_mem.mem[SMALLA] == word_t'(mn), "AE smalla");
    for (int k = 0; k < NEXTRA; k++) check(u_mem.mem[EXTRA + k] == word_t'(mx), "AE delayed ASAQ store");
    for (int k = 0; k < NEXTRA; k++) check(u_mem.mem[EXTRA + NEXTRA + k] == word_t'(mn), "AE early ASAQ store");
    check(ev_sdq_full > 0, "SDQ-full interlock happened in access/execute phase");
    check(ev_saq_full > 0, "SAQ-full interlock happened in access/execute phase");

    // phase 2: independent, memory not always ready
    load_prog(i0); load_prog(i1);
    u_mem.stall_pct = 70;
    run("independent", 40000);
    u_mem.stall_pct = 0;
    check(u_mem.mem[R0B] == word_t'(mx) && u_mem.mem[R0S] == word_t'(mn), "IE processor 0 result");
    check(u_mem.mem[R1B] == word_t'(mx2) && u_mem.mem[R1S] == word_t'(mn2), "IE processor 1 result");
    check(u_mem.mem[OUT0] == word_t'(mx + mn), "call: caller register via background file (0)");
    check(u_mem.mem[OUT1] == word_t'(mx2 + mn2), "call: caller register via background file (1)");
    ie_ret0 = i0.at("SUBR");
    check(u_mem.mem[OUT0 + 1] != 0 && u_mem.mem[OUT0 + 1] < word_t'(ie_ret0), "saved return address");
    begin
      int s0, s1;
      s0 = 0; s1 = 0;
      for (int k = 0; k < 10; k++) s1 += w[k];
      check(u_mem.mem[OUT0 + 2] == word_t'(s1), "sum of ten ALDQ loads");
    end
    for (int k = 0; k < 16; k++) begin
      check(u_mem.mem[OUT0 + 3 + k] == 2, "store burst 0");
      check(u_mem.mem[OUT1 + 3 + k] == 2, "store burst 1");
    end
    check(u_mem.proto_errors == 0, "bus protocol");

    $display("issued %0d instructions", n_issued);
    $display("events: raw=%0d ldq_empty=%0d ldq_rsv=%0d bq_full=%0d bq_empty=%0d sdq_full=%0d saq_full=%0d",
             ev_raw, ev_ldq_empty, ev_rsv, ev_bq_full, ev_bq_empty, ev_sdq_full, ev_saq_full);
    $display("events: exit_issue=%0d exit_fetch=%0d refill=%0d own_store=%0d alt_store=%0d alt_load=%0d swap=%0d bq_push=%0d",
             ev_exit_issue, ev_exit_fetch, ev_refill, ev_own_store, ev_alt_store, ev_alt_load, ev_swap, ev_bq_push);
    check(ev_raw > 0, "register interlock happened");
    check(ev_ldq_empty > 0, "LDQ-empty interlock happened");
    check(ev_rsv > 0, "LDQ reservation back-pressure happened");
    check(ev_bq_full > 0, "branch-queue-full interlock happened");
    check(ev_bq_empty > 0, "branch-queue-empty interlock happened");
    check(ev_sdq_full > 0, "SDQ-full interlock happened");
    check(ev_saq_full > 0, "SAQ-full interlock happened");
    check(ev_exit_issue > 0, "exit redirected from issue");
    check(ev_exit_fetch > 0, "exit redirected from fetch");
    check(ev_refill > 0, "I-cache refill happened");
    check(ev_own_store > 0, "own store happened");
    check(ev_alt_store == 2 + 2 * NEXTRA, "one ASAQ store per result");
    check(ev_alt_load == N + 10, "one ALDQ per element, ten in the second phase");
    check(ev_swap == 4, "two calls and two returns");
    check(ev_bq_push == N + 1, "one branch outcome per element, one for the final handshake");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

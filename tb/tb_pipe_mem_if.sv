// tb_pipe_mem_if: self-checking test of the processor memory port.
// Two ports (processor 0 and 1) are wired to each other and to the
// behavioural memory. Directed part: an own store takes an address beat
// and a data beat in consecutive clocks; an ASAQ store puts the address
// on one bus and the data on the other in the same clock; queued loads go
// out one per clock; an I-cache refill request goes before waiting loads;
// read data is steered by its tag. Random part (memory randomly not
// ready): own stores on both ports, then access/execute style alternate
// stores and alternate loads; memory contents, load data order and the
// memory's protocol checks are compared with the expected values.
module tb_pipe_mem_if;
  import pipe_pkg::*;
  logic clk = 0, rst_n = 0;
  mem_req_t bus [2], bus_dut [2];
  logic     ready [2];
  mem_rd_t  rd [2];
  logic ic_req_valid [2], ic_req_ready [2], ic_fill_valid [2], ldq_fill [2];
  word_t ic_req_addr [2], ic_fill_data [2], ldq_fill_data [2];
  logic ld_push [2], ld_alt [2], ld_full [2];
  word_t ld_addr [2];
  logic saq_pop [2], sdq_pop [2], req [2], gnt [2];
  logic [32:0] saq [2][$];
  word_t sdq [2][$];
  word_t ldq_seen [2][$];
  int checks = 0, failures = 0, cyc = 0;

  // The memory ignores the buses while reset is held: until the first
  // clock edge under reset the port flops hold arbitrary values.
  assign bus[0] = rst_n ? bus_dut[0] : '0;
  assign bus[1] = rst_n ? bus_dut[1] : '0;

  pipe_memory_model #(.NWORDS(1024), .LAT(2)) u_mem (.clk, .bus, .ready, .rd);

  for (genvar p = 0; p < 2; p++) begin : g
    pipe_mem_if #(.PROC_ID(p)) u_mif (
      .clk, .rst_n, .bus_o(bus_dut[p]), .bus_ready(ready[p]), .rd_i(rd[p]),
      .ic_req_valid(ic_req_valid[p]), .ic_req_addr(ic_req_addr[p]), .ic_req_ready(ic_req_ready[p]),
      .ic_fill_valid(ic_fill_valid[p]), .ic_fill_data(ic_fill_data[p]),
      .ldq_fill(ldq_fill[p]), .ldq_fill_data(ldq_fill_data[p]),
      .ld_push(ld_push[p]), .ld_addr(ld_addr[p]), .ld_alt(ld_alt[p]), .ld_full(ld_full[p]),
      .saq_valid(saq[p].size() > 0), .saq_addr(saq[p].size() > 0 ? saq[p][0][31:0] : '0),
      .saq_alt(saq[p].size() > 0 ? saq[p][0][32] : 1'b0), .saq_pop(saq_pop[p]),
      .sdq_valid(sdq[p].size() > 0), .sdq_data(sdq[p].size() > 0 ? sdq[p][0] : '0), .sdq_pop(sdq_pop[p]),
      .alt_req_o(req[p]), .alt_gnt_i(gnt[1-p]), .alt_req_i(req[1-p]), .alt_gnt_o(gnt[p])
    );
  end

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit c, string what);
    checks++;
    if (!c) begin failures++; $display("FAIL %s cyc=%0d", what, cyc); end
  endtask

  // the testbench plays the SAQ/SDQ: pop on the clock edge
  always @(posedge clk) begin
    cyc <= cyc + 1;
    for (int p = 0; p < 2; p++) begin
      if (saq_pop[p]) void'(saq[p].pop_front());
      if (sdq_pop[p]) void'(sdq[p].pop_front());
      if (ldq_fill[p]) ldq_seen[p].push_back(ldq_fill_data[p]);
    end
  end

  task automatic idle_inputs();
    for (int p = 0; p < 2; p++) begin
      ic_req_valid[p] = 0; ic_req_addr[p] = 0; ld_push[p] = 0; ld_addr[p] = 0; ld_alt[p] = 0;
    end
  endtask

  // record beats of a port for a number of clocks
  mem_req_t log0[$], log1[$];
  task automatic capture(int n);
    log0.delete(); log1.delete();
    repeat (n) begin
      log0.push_back(bus[0].valid && ready[0] ? bus[0] : '0);
      log1.push_back(bus[1].valid && ready[1] ? bus[1] : '0);
      @(negedge clk);
      #1;
    end
  endtask

  initial begin
    idle_inputs();
    repeat (2) @(posedge clk);
    rst_n = 1;

    // --- own store: two beats in consecutive clocks
    @(negedge clk);
    saq[0].push_back({1'b0, 32'd40}); sdq[0].push_back(32'hAAAA_0001);
    #1;
    capture(3);
    check(log0[0].valid && log0[0].op == MEM_STADDR && log0[0].word == 40, "own store address beat");
    check(log0[1].valid && log0[1].op == MEM_STDATA && log0[1].word == 32'hAAAA_0001, "own store data next clock");
    check(!log0[2].valid, "own store takes two clocks");
    repeat (2) @(posedge clk);
    check(u_mem.mem[40] == 32'hAAAA_0001, "own store written");

    // --- alternate store: address on bus 1, data on bus 0, same clock
    @(negedge clk);
    saq[1].push_back({1'b1, 32'd41}); sdq[0].push_back(32'hBBBB_0002);
    #1;
    capture(2);
    check(log1[0].valid && log1[0].op == MEM_ASTADDR && log1[0].word == 41, "ASAQ address beat");
    check(log0[0].valid && log0[0].op == MEM_STDATA && log0[0].word == 32'hBBBB_0002, "ASAQ data same clock");
    check(!log0[1].valid && !log1[1].valid, "ASAQ store takes one clock");
    repeat (2) @(posedge clk);
    check(u_mem.mem[41] == 32'hBBBB_0002, "alt store written");

    // --- loads one per clock; I-cache request first
    u_mem.stall_pct = 100;
    repeat (2) @(negedge clk);
    for (int i = 0; i < 3; i++) begin
      ld_push[0] = 1; ld_addr[0] = 100 + i; ld_alt[0] = 0;
      @(negedge clk);
    end
    ld_push[0] = 0;
    ic_req_valid[0] = 1; ic_req_addr[0] = 200;
    u_mem.stall_pct = 0;
    @(negedge clk);
    #1;
    check(bus[0].op == MEM_IFETCH && ic_req_ready[0], "I-cache refill before waiting loads");
    @(negedge clk);
    ic_req_valid[0] = 0;
    #1;
    capture(3);
    for (int i = 0; i < 3; i++)
      check(log0[i].valid && log0[i].op == MEM_LOAD && log0[i].word == 100 + i, "loads one per clock in order");

    // --- random traffic
    repeat (10) @(posedge clk);
    u_mem.stall_pct = 25;
    ldq_seen[0].delete(); ldq_seen[1].delete();
    for (int i = 0; i < 64; i++) u_mem.mem[896 + i] = 32'h5000_0000 + i;
    begin
      word_t exp [int];
      int nld0, nld1;
      nld0 = 0; nld1 = 0;
      // phase 1: own stores on both ports and own loads
      for (int i = 0; i < 200; i++) begin
        @(negedge clk);
        for (int p = 0; p < 2; p++) begin
          if ($urandom % 3 == 0 && saq[p].size() < 4) begin
            int a;
            a = 256 * (p + 1) + (i % 128);
            saq[p].push_back({1'b0, word_t'(a)}); sdq[p].push_back(word_t'($urandom));
            exp[a] = sdq[p][$];
          end
          ld_push[p] = !ld_full[p] && ($urandom % 4 == 0);
          ld_alt[p] = 0;
          ld_addr[p] = 896 + (p == 0 ? nld0 : nld1) % 64;
          if (ld_push[p]) if (p == 0) nld0++; else nld1++;
        end
      end
      @(negedge clk); idle_inputs();
      // let phase 1 drain: which SDQ entry an address pairs with is only
      // defined by program order within one use of the queue
      repeat (60) @(negedge clk);
      // phase 2: processor 1 accesses for processor 0
      for (int i = 0; i < 200; i++) begin
        @(negedge clk);
        if ($urandom % 3 == 0 && saq[1].size() < 4) begin
          int a;
          a = 768 + (i % 128);
          saq[1].push_back({1'b1, word_t'(a)}); sdq[0].push_back(word_t'($urandom));
          exp[a] = sdq[0][$];
        end
        ld_push[1] = !ld_full[1] && ($urandom % 3 == 0);
        ld_alt[1] = 1;
        ld_addr[1] = 896 + nld0 % 64;
        if (ld_push[1]) nld0++;
      end
      @(negedge clk); idle_inputs();
      repeat (100) @(posedge clk);
      check(saq[0].size() == 0 && saq[1].size() == 0 && sdq[0].size() == 0 && sdq[1].size() == 0, "queues drained");
      foreach (exp[a]) check(u_mem.mem[a] == exp[a], "random store data");
      check(ldq_seen[0].size() == nld0 && ldq_seen[1].size() == nld1, "load count");
      for (int i = 0; i < ldq_seen[0].size(); i++) check(ldq_seen[0][i] == 32'h5000_0000 + (i % 64), "load order p0");
      for (int i = 0; i < ldq_seen[1].size(); i++) check(ldq_seen[1][i] == 32'h5000_0000 + (i % 64), "load order p1");
      check(u_mem.proto_errors == 0, "bus protocol");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

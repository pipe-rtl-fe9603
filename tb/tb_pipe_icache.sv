// tb_pipe_icache: self-checking test of the instruction cache.
// A small memory responds to refill requests (latency 3, one word per
// clock, in order). Random parcel addresses, including 32-bit instructions
// that straddle a line boundary, are looked up until they hit; the parcels
// are compared with the memory, each miss must cost exactly LINE_WORDS
// reads, and a repeated lookup must hit in the same clock.
module tb_pipe_icache;
  import pipe_pkg::*;
  localparam int LINES = 8, LW = 4, MW = 256;
  logic clk = 0, rst_n = 0;
  logic lookup, hit, busy, req_valid, req_ready, fill_valid;
  word_t pc, req_addr, fill_data;
  logic [15:0] parcel0, parcel1;
  word_t mem [MW];
  word_t pend_q[$];
  int    pend_t[$];
  int    cyc = 0, nreq = 0, checks = 0, failures = 0;

  pipe_icache #(.LINES(LINES), .LINE_WORDS(LW)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit c, string what);
    checks++;
    if (!c) begin failures++; $display("FAIL %s pc=%0d", what, pc); end
  endtask

  assign req_ready = 1'b1;
  // Requests are ignored while reset is held: until the first clock edge
  // under reset the cache's flops hold arbitrary values.
  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (rst_n && req_valid && req_ready) begin
      pend_q.push_back(mem[req_addr % MW]);
      pend_t.push_back(cyc + 3);
      nreq++;
    end
    if (pend_q.size() > 0 && pend_t[0] <= cyc) begin
      fill_valid <= 1'b1;
      fill_data <= pend_q.pop_front();
      void'(pend_t.pop_front());
    end else begin
      fill_valid <= 1'b0;
    end
  end

  function automatic logic [15:0] parcel_at(int p);
    word_t w;
    w = mem[(p >> 1) % MW];
    return (p % 2 == 0) ? w[31:16] : w[15:0];
  endfunction

  initial begin
    lookup = 0; pc = 0; fill_valid = 0; fill_data = 0;
    for (int i = 0; i < MW; i++) begin
      mem[i] = $urandom;
      if (i % 3 == 0) mem[i][31:26] = 6'h20;   // long opcode in the upper parcel
      if (i % 3 == 1) mem[i][15:10] = 6'h30;   // long opcode in the lower parcel
    end
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 400; t++) begin
      int nreq0, waited;
      bit is_long;
      @(negedge clk);
      pc = (t % 4 == 0) ? word_t'((LW * 2) * ($urandom % 20) + LW * 2 - 1) : word_t'($urandom % (MW * 2 - 2));
      lookup = 1;
      nreq0 = nreq;
      waited = 0;
      #1;
      while (!hit) begin
        @(negedge clk);
        #1;
        waited++;
        if (waited > 100) break;
      end
      is_long = parcel_at(pc)[15:10] >= 6'h18;
      check(hit, "hit");
      check(parcel0 == parcel_at(pc), "parcel0");
      if (is_long) check(parcel1 == parcel_at(pc + 1), "parcel1");
      check(((nreq - nreq0) % LW) == 0 && (nreq - nreq0) <= 2 * LW, "refill size");
      // a second lookup of the same address hits at once
      @(negedge clk);
      #1;
      check(hit && parcel0 == parcel_at(pc), "one-clock read");
      lookup = 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

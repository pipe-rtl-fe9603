// pipe_memory_model: behavioural main memory for PIPE simulations.
//
// Not synthesizable logic: a model of the pipelined memory the two
// processors share. It accepts one beat per clock on each processor's
// outgoing bus (always ready, or randomly not ready in `stall_pct` percent
// of the clocks; a testbench may change stall_pct at any time).
// A read is performed when its request arrives and its data is delivered
// LAT clocks later on the read bus of the processor it is meant for (the
// requester, or the other processor for MEM_ALOAD), in request order, at
// most one word per clock per read bus. A MEM_STADDR is completed by the
// next MEM_STDATA on the same bus; a MEM_ASTADDR by the MEM_STDATA on the
// other bus in the same clock. Protocol violations are counted in
// `proto_errors`. `mem` may be read and written directly by a testbench.
module pipe_memory_model
  import pipe_pkg::*;
#(
  parameter int NWORDS    = 8192,
  parameter int LAT       = 3
) (
  input  logic     clk,
  input  mem_req_t bus   [2],
  output logic     ready [2],
  output mem_rd_t  rd    [2]
);
  typedef struct packed {
    int    due;
    logic  to_icache;
    word_t data;
  } ret_t;

  word_t mem [NWORDS];
  ret_t  retq [2][$];
  logic  st_pend [2];
  word_t st_addr [2];
  int    now;
  int    proto_errors;
  int    stall_pct = 0;
  int    n_reads, n_writes, n_alt_writes;

  initial begin
    now = 0; proto_errors = 0; n_reads = 0; n_writes = 0; n_alt_writes = 0;
    st_pend[0] = 0; st_pend[1] = 0;
    ready[0] = 1; ready[1] = 1;
    rd[0] = '0; rd[1] = '0;
    for (int i = 0; i < NWORDS; i++) mem[i] = '0;
  end

  function automatic int widx(word_t a);
    return int'(a % NWORDS);
  endfunction

  always @(posedge clk) begin
    logic alt_data_used [2];
    alt_data_used[0] = 0; alt_data_used[1] = 0;
    now <= now + 1;
    // address beats first, so a same-clock ASTADDR finds its data
    for (int p = 0; p < 2; p++) begin
      if (bus[p].valid && ready[p]) begin
        case (bus[p].op)
          MEM_LOAD, MEM_ALOAD, MEM_IFETCH: begin
            int dst;
            dst = (bus[p].op == MEM_ALOAD) ? 1 - p : p;
            retq[dst].push_back('{due: now + LAT, to_icache: bus[p].op == MEM_IFETCH,
                                   data: mem[widx(bus[p].word)]});
            n_reads++;
          end
          MEM_STADDR: begin
            if (st_pend[p]) proto_errors++;
            st_pend[p] = 1;
            st_addr[p] = bus[p].word;
          end
          MEM_ASTADDR: begin
            if (!(bus[1-p].valid && ready[1-p] && bus[1-p].op == MEM_STDATA && !st_pend[1-p]))
              proto_errors++;
            else begin
              mem[widx(bus[p].word)] = bus[1-p].word;
              alt_data_used[1-p] = 1;
              n_writes++; n_alt_writes++;
            end
          end
          default: ;
        endcase
      end
    end
    for (int p = 0; p < 2; p++) begin
      if (bus[p].valid && ready[p] && bus[p].op == MEM_STDATA && !alt_data_used[p]) begin
        if (!st_pend[p] || bus[p].op != MEM_STDATA) proto_errors++;
        else begin
          mem[widx(st_addr[p])] = bus[p].word;
          n_writes++;
        end
        st_pend[p] = 0;
      end
    end
    // read returns
    for (int p = 0; p < 2; p++) begin
      if (retq[p].size() > 0 && retq[p][0].due <= now) begin
        ret_t r;
        r = retq[p].pop_front();
        rd[p] <= '{valid: 1'b1, to_icache: r.to_icache, data: r.data};
      end else begin
        rd[p] <= '0;
      end
      ready[p] <= (stall_pct == 0) || (($urandom % 100) >= stall_pct);
    end
  end
endmodule

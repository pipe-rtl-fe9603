// pipe_queue: a first-in first-out hardware queue.
//
// PIPE passes all memory traffic and all cross-processor branch outcomes
// through queues: the store address queue (SAQ), the store data queue (SDQ)
// and the branch queue are instances of this module, as is the small buffer
// that holds load addresses while the memory bus is busy. The queue is a
// circular buffer of DEPTH entries with read and write pointers and an
// occupancy counter. The head is visible combinationally (`head`), so the
// issue logic can read it like a register in the same clock it pops it.
// Push and pop in the same clock are allowed, also on a full queue (the pop
// frees the slot). Popping an empty queue or pushing a full one without a
// pop are protocol errors; assertions check both.
// The depth is this design's choice; the document gives none.
module pipe_queue #(
  parameter int WIDTH = 32,
  parameter int DEPTH = 4
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     push,
  input  logic [WIDTH-1:0]         push_data,
  input  logic                     pop,
  output logic [WIDTH-1:0]         head,
  output logic                     empty,
  output logic                     full,
  output logic [$clog2(DEPTH+1)-1:0] count
);
  localparam int AW = (DEPTH > 1) ? $clog2(DEPTH) : 1;
  localparam int CW = $clog2(DEPTH+1);

  logic [WIDTH-1:0] mem [DEPTH];
  logic [AW-1:0]    rd_ptr, wr_ptr;

  function automatic logic [AW-1:0] inc(logic [AW-1:0] p);
    return (p == AW'(DEPTH - 1)) ? '0 : p + 1'b1;
  endfunction

  assign head  = mem[rd_ptr];
  assign empty = (count == 0);
  assign full  = (count == CW'(DEPTH));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rd_ptr <= '0;
      wr_ptr <= '0;
      count  <= '0;
    end else begin
      if (push) wr_ptr <= inc(wr_ptr);
      if (pop)  rd_ptr <= inc(rd_ptr);
      count <= count + CW'(push) - CW'(pop);
    end
  end

  always_ff @(posedge clk) begin
    if (push) mem[wr_ptr] <= push_data;
  end

  a_no_underflow: assert property (@(posedge clk) disable iff (!rst_n) pop |-> !empty);
  a_no_overflow:  assert property (@(posedge clk) disable iff (!rst_n) push |-> (!full || pop));
endmodule

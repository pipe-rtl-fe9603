// pipe_ldq: load data queue (LDQ) with slot reservation.
//
// Data fetched from memory enters at the tail; an instruction names the
// head with the value 7 in a source field and consumes it. Because loads
// complete at unpredictable times, they never write the register file: the
// LDQ is their dedicated path. The memory returns reads in request order, so
// data reaches the queue in program order.
//
// To make sure returning data always finds room, a slot is reserved when a
// load issues (`rsv_own`) or when the other processor issues an ALDQ that
// targets this queue (`rsv_alt`); the arriving word (`fill`) turns a
// reservation into an entry. `can_rsv_own` needs one free slot,
// `can_rsv_alt` two, so both processors may reserve in the same clock
// without either looking at the other's decision. These reservation rules
// and the depth are this design's choices.
//
// Lint: the full flag of the inner FIFO is unread; fullness here counts
// reserved slots too and comes from can_rsv_own.
module pipe_ldq #(
  parameter int DEPTH = 8
) (
  input  logic                        clk,
  input  logic                        rst_n,
  input  logic                        rsv_own,
  input  logic                        rsv_alt,
  output logic                        can_rsv_own,
  output logic                        can_rsv_alt,
  input  logic                        fill,
  input  logic [31:0]                 fill_data,
  input  logic                        pop,
  output logic [31:0]                 head,
  output logic                        empty,
  output logic [$clog2(DEPTH+1)-1:0]  count,
  output logic [$clog2(DEPTH+1)-1:0]  reserved
);
  localparam int CW = $clog2(DEPTH+1);
  logic q_full;
  logic [CW-1:0] free_slots;

  pipe_queue #(.WIDTH(32), .DEPTH(DEPTH)) u_q (
    .clk, .rst_n, .push(fill), .push_data(fill_data), .pop,
    .head, .empty, .full(q_full), .count
  );

  assign free_slots  = CW'(DEPTH) - count - reserved;
  assign can_rsv_own = (free_slots >= CW'(1));
  assign can_rsv_alt = (free_slots >= CW'(2));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) reserved <= '0;
    else reserved <= reserved + CW'(rsv_own) + CW'(rsv_alt) - CW'(fill);
  end

  a_fill_reserved: assert property (@(posedge clk) disable iff (!rst_n) fill |-> reserved != 0);
  a_rsv_room: assert property (@(posedge clk) disable iff (!rst_n)
                               rsv_alt |-> can_rsv_alt);
  a_no_overrun: assert property (@(posedge clk) disable iff (!rst_n)
                                 count + reserved <= CW'(DEPTH));
endmodule

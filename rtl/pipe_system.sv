// pipe_system: the decoupled PIPE organisation, two identical processors.
//
// Processor 0 and processor 1 can run independent programs (each reaching
// memory on its own) or cooperate on one program, typically with one
// acting as access processor and the other as execute processor. For that
// they are joined by: a branch queue in each direction (external PBR in
// one, PBR(Q) in the other), ALDQ reservations into the other processor's
// load data queue, and the pairing of an ASAQ store address with the other
// processor's store data. The modes are a matter of the programs loaded,
// not of any mode register.
//
// Each processor's memory port is brought out: bus_o[p] carries load
// addresses, store addresses and store data (accepted when bus_ready[p] is
// high), rd_i[p] brings back read data, tagged for the I-cache or the LDQ,
// in the order the reads were requested for that processor. The memory
// itself, pipelined and possibly interleaved, is outside this design.
// After reset processor 0 starts fetching at RESET_PC0 and processor 1 at
// RESET_PC1 (parcel addresses; the defaults 0 and 0x1000 are this design's
// choice, so that the two can start different programs).
//
// Lint: rst_n is used as an asynchronous reset in the flops and as the
// disable condition of clocked assertions, which Verilator reports as a
// mixed synchronous/asynchronous net; the assertions are not logic.
module pipe_system
  import pipe_pkg::*;
#(
  parameter word_t RESET_PC0 = '0,
  parameter word_t RESET_PC1 = 32'h0000_1000
) (
  input  logic     clk,
  input  logic     rst_n,
  output mem_req_t bus_o     [2],
  input  logic     bus_ready [2],
  input  mem_rd_t  rd_i      [2],
  output logic     halted    [2]
);
  logic bq_push [2], bq_data [2], bq_full [2];
  logic ldq_rsv [2], ldq_can [2];
  logic st_req  [2], st_gnt  [2];

  for (genvar p = 0; p < 2; p++) begin : g_proc
    pipe_processor #(.PROC_ID(p), .RESET_PC(p == 0 ? RESET_PC0 : RESET_PC1)) u_proc (
      .clk, .rst_n,
      .bus_o(bus_o[p]), .bus_ready(bus_ready[p]), .rd_i(rd_i[p]),
      .x_bq_push_o(bq_push[p]), .x_bq_data_o(bq_data[p]), .x_bq_full_i(bq_full[1-p]),
      .x_bq_push_i(bq_push[1-p]), .x_bq_data_i(bq_data[1-p]), .x_bq_full_o(bq_full[p]),
      .x_ldq_rsv_o(ldq_rsv[p]), .x_ldq_can_rsv_i(ldq_can[1-p]),
      .x_ldq_rsv_i(ldq_rsv[1-p]), .x_ldq_can_rsv_o(ldq_can[p]),
      .x_st_req_o(st_req[p]), .x_st_gnt_i(st_gnt[1-p]),
      .x_st_req_i(st_req[1-p]), .x_st_gnt_o(st_gnt[p]),
      .halted(halted[p])
    );
  end
endmodule

// pipe_mem_if: memory port of one PIPE processor.
//
// Each processor talks to memory over two unidirectional buses: an outgoing
// bus that carries addresses and store data, one word per clock (bus_o,
// accepted when bus_ready is high), and an incoming read-data bus (rd_i).
// Several transactions may be in flight: a read is finished when its data
// comes back, the port does not wait for it.
//
// Stores pair the head of a store address queue (SAQ) with the head of a
// store data queue (SDQ). When both belong to this processor the address
// goes out in one clock and the data in the next (MEM_STADDR, MEM_STDATA).
// An address placed by ASAQ is paired with the SDQ of the other processor:
// this port raises alt_req_o, and when the other port answers alt_gnt_i it
// sends the address (MEM_ASTADDR) in the same clock in which the other port
// sends the data (MEM_STDATA), so an access/execute store costs each bus
// one clock. alt_req_o never depends on alt_gnt_i or alt_req_i, so the
// handshake has no combinational loop; when both ports ask at once,
// processor 0 serves and processor 1 waits.
//
// Sources in priority order: the data beat of an own store, serving the
// other processor's ASAQ, I-cache refill reads, ASAQ or own stores, loads.
// Loads wait in a small load address buffer. Incoming read data is steered
// by its tag to the I-cache or to the LDQ. The bus pairing follows the
// document; the priorities, the tie-break and the load buffer are this
// design's choices.
//
// Lint: the load buffer's count output is left open; only full/empty
// are needed.
module pipe_mem_if
  import pipe_pkg::*;
#(
  parameter int PROC_ID  = 0,
  parameter int LB_DEPTH = 4
) (
  input  logic     clk,
  input  logic     rst_n,
  output mem_req_t bus_o,
  input  logic     bus_ready,
  input  mem_rd_t  rd_i,
  // I-cache refill
  input  logic     ic_req_valid,
  input  word_t    ic_req_addr,
  output logic     ic_req_ready,
  output logic     ic_fill_valid,
  output word_t    ic_fill_data,
  // LDQ fill
  output logic     ldq_fill,
  output word_t    ldq_fill_data,
  // loads from the address logic
  input  logic     ld_push,
  input  word_t    ld_addr,
  input  logic     ld_alt,
  output logic     ld_full,
  // store queues
  input  logic     saq_valid,
  input  word_t    saq_addr,
  input  logic     saq_alt,
  output logic     saq_pop,
  input  logic     sdq_valid,
  input  word_t    sdq_data,
  output logic     sdq_pop,
  // pairing with the other processor's port
  output logic     alt_req_o,
  input  logic     alt_gnt_i,
  input  logic     alt_req_i,
  output logic     alt_gnt_o
);
  logic        wdata_pend;
  word_t       wdata_reg;
  logic [32:0] lb_head;
  logic        lb_empty, lb_pop;

  pipe_queue #(.WIDTH(33), .DEPTH(LB_DEPTH)) u_lb (
    .clk, .rst_n, .push(ld_push), .push_data({ld_alt, ld_addr}), .pop(lb_pop),
    .head(lb_head), .empty(lb_empty), .full(ld_full), .count()
  );

  assign ic_fill_valid = rd_i.valid && rd_i.to_icache;
  assign ic_fill_data  = rd_i.data;
  assign ldq_fill      = rd_i.valid && !rd_i.to_icache;
  assign ldq_fill_data = rd_i.data;

  assign alt_req_o = saq_valid && saq_alt && !wdata_pend && bus_ready && !ic_req_valid;
  assign alt_gnt_o = alt_req_i && sdq_valid && !wdata_pend && bus_ready &&
                     !((PROC_ID != 0) && alt_req_o);

  logic own_store;
  assign own_store = saq_valid && !saq_alt && sdq_valid;

  always_comb begin
    bus_o        = '0;
    ic_req_ready = 1'b0;
    saq_pop      = 1'b0;
    sdq_pop      = 1'b0;
    lb_pop       = 1'b0;
    if (wdata_pend) begin
      bus_o = '{valid: 1'b1, op: MEM_STDATA, word: wdata_reg};
    end else if (alt_gnt_o) begin
      bus_o   = '{valid: 1'b1, op: MEM_STDATA, word: sdq_data};
      sdq_pop = 1'b1;
    end else if (ic_req_valid) begin
      bus_o        = '{valid: 1'b1, op: MEM_IFETCH, word: ic_req_addr};
      ic_req_ready = bus_ready;
    end else if (alt_req_o && alt_gnt_i) begin
      bus_o   = '{valid: 1'b1, op: MEM_ASTADDR, word: saq_addr};
      saq_pop = 1'b1;
    end else if (own_store) begin
      bus_o   = '{valid: 1'b1, op: MEM_STADDR, word: saq_addr};
      saq_pop = bus_ready;
      sdq_pop = bus_ready;
    end else if (!lb_empty) begin
      bus_o  = '{valid: 1'b1, op: lb_head[32] ? MEM_ALOAD : MEM_LOAD, word: lb_head[31:0]};
      lb_pop = bus_ready;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wdata_pend <= 1'b0;
      wdata_reg  <= '0;
    end else if (wdata_pend) begin
      if (bus_ready) wdata_pend <= 1'b0;
    end else if (bus_o.valid && bus_o.op == MEM_STADDR && bus_ready) begin
      wdata_pend <= 1'b1;
      wdata_reg  <= sdq_data;
    end
  end

  a_gnt_only_on_req: assert property (@(posedge clk) disable iff (!rst_n) alt_gnt_o |-> alt_req_i);
endmodule

// pipe_processor: one PIPE processor.
//
// A three-stage in-order pipeline:
//   fetch   - reads the parcels at PC and PC+1 from the I-cache in one clock
//             and registers them in the instruction register (IR);
//   issue   - decodes the IR, reads the register files and the LDQ head, and
//             resolves every interlock in this one clock: a source register
//             written by the instruction in execute, an empty LDQ, a full
//             SDQ or SAQ, no free LDQ slot for a load (own or, for ALDQ, the
//             other processor's), a full load address buffer, a full branch
//             queue of the other processor (external PBR) or an empty own
//             branch queue (PBR(Q)). Loads and stores compute their address
//             here and enter the load address buffer or the SAQ; branches
//             evaluate their condition here;
//   execute - ALU or shifter; the result bus writes a register or the SDQ
//             tail at the end of this clock.
// There is no bypass: an instruction that needs the result of the one
// ahead of it waits one clock.
//
// Branches are split into a prepare-to-branch (PBR, PBR(Q), register
// relative PBR, prepare-to-call, prepare-to-return), which records target
// and outcome, and the exit, which happens after the next instruction
// whose E bit is set (a prepare with its own E bit is an ordinary branch).
// When a taken branch is already pending, fetch sees the E bit of the
// instruction it is fetching and continues straight at the target, so the
// exit costs no clock; otherwise the exit redirects from issue and the one
// instruction fetched behind it is dropped. A call exit swaps the register
// files and stores the return address in R7 of the file that becomes
// background; a return exit jumps to that saved address and swaps back.
// External PBRs also push their outcome into the other processor's branch
// queue; PBR(Q) takes its outcome from this processor's branch queue.
//
// Cross-processor links (x_*): branch queue push/full, ALDQ reservation in
// the other LDQ, and the ASAQ/SDQ store pairing of pipe_mem_if.
//
// Follows the document: formats, queues and their register-field coding,
// single-clock issue with hardware interlocks, prepare/exit branching, file
// swap on call/return, branch queues. This design's own choices: three
// stages, no bypass, PC-relative targets measured from the PBR's address in
// 16-bit parcels, queue depths, halt (also taken on an unknown opcode).
//
// Lint: the count outputs of the SAQ, LDQ and branch queue, the LDQ's
// reserved count and the I-cache busy flag are left open or unread on
// purpose (the issue logic needs only empty/full/can-reserve), and some
// decoded fields (the raw opcode and wr_ri) are not used by this stage.
module pipe_processor
  import pipe_pkg::*;
#(
  parameter int    PROC_ID       = 0,
  parameter word_t RESET_PC      = '0,
  parameter int    LDQ_DEPTH     = 8,
  parameter int    Q_DEPTH       = 4,
  parameter int    BQ_DEPTH      = 4,
  parameter int    IC_LINES      = 64,
  parameter int    IC_LINE_WORDS = 4
) (
  input  logic     clk,
  input  logic     rst_n,
  // memory buses
  output mem_req_t bus_o,
  input  logic     bus_ready,
  input  mem_rd_t  rd_i,
  // branch queue link
  output logic     x_bq_push_o,
  output logic     x_bq_data_o,
  input  logic     x_bq_full_i,
  input  logic     x_bq_push_i,
  input  logic     x_bq_data_i,
  output logic     x_bq_full_o,
  // ALDQ reservation link
  output logic     x_ldq_rsv_o,
  input  logic     x_ldq_can_rsv_i,
  input  logic     x_ldq_rsv_i,
  output logic     x_ldq_can_rsv_o,
  // ASAQ store pairing link
  output logic     x_st_req_o,
  input  logic     x_st_gnt_i,
  input  logic     x_st_req_i,
  output logic     x_st_gnt_o,
  output logic     halted
);
  typedef enum logic [1:0] {BK_BRANCH, BK_CALL, BK_RET} bkind_e;

  // ---------------------------------------------------------------- fetch
  word_t       pc;
  logic        ir_valid, ir_pre;
  logic [15:0] ir_p0, ir_p1;
  word_t       ir_pc;

  logic [15:0] f_p0, f_p1;
  logic        ic_hit, ic_busy, ic_req_valid, ic_req_ready, ic_fill_valid;
  word_t       ic_req_addr, ic_fill_data;
  logic        lookup, fetch_fire, f_long, f_is_prep, f_early;

  logic        issue_fire, redirect, halt_issue;
  word_t       redirect_pc;

  // pending prepared branch
  logic   pend_valid, pend_taken;
  word_t  pend_target;
  bkind_e pend_kind;

  dec_t  d;
  logic  d_is_prep;

  assign lookup     = !halted && !halt_issue && !redirect && (!ir_valid || issue_fire);
  assign fetch_fire = lookup && ic_hit;
  assign f_long     = op_is_long(f_p0[15:10]);
  assign f_is_prep  = (f_p0[15:10] >= OP_IPBRGT) && (f_p0[15:10] <= OP_PRET);
  assign f_early    = pend_valid && pend_taken && f_p0[9] && !f_is_prep &&
                      !(ir_valid && (d.e || d_is_prep));

  pipe_icache #(.LINES(IC_LINES), .LINE_WORDS(IC_LINE_WORDS)) u_icache (
    .clk, .rst_n, .lookup, .pc, .parcel0(f_p0), .parcel1(f_p1), .hit(ic_hit), .busy(ic_busy),
    .req_valid(ic_req_valid), .req_addr(ic_req_addr), .req_ready(ic_req_ready),
    .fill_valid(ic_fill_valid), .fill_data(ic_fill_data)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pc       <= RESET_PC;
      ir_valid <= 1'b0;
      ir_pre   <= 1'b0;
      ir_p0    <= '0;
      ir_p1    <= '0;
      ir_pc    <= '0;
    end else if (redirect) begin
      pc       <= redirect_pc;
      ir_valid <= 1'b0;
    end else if (fetch_fire) begin
      ir_valid <= 1'b1;
      ir_p0    <= f_p0;
      ir_p1    <= f_p1;
      ir_pc    <= pc;
      ir_pre   <= f_early;
      pc       <= f_early ? pend_target : pc + (f_long ? 32'd2 : 32'd1);
    end else if (issue_fire || halt_issue) begin
      ir_valid <= 1'b0;
    end
  end

  // ---------------------------------------------------------------- issue
  pipe_decode u_dec (.parcel0(ir_p0), .parcel1(ir_p1), .d);

  assign d_is_prep = d.iclass inside {IC_PBR, IC_PBRQ, IC_PBRR, IC_PCALL, IC_PRET};

  logic        fg;
  logic [3:0]  ra_a, ra_b, ra_c;
  word_t       rd_a, rd_b, rd_c;
  word_t       val_i, val_j, val_k;
  logic        src_i_v, src_j_v, src_k_v, uses_ldq;

  // EX stage state
  logic        ex_valid, ex_to_sdq, ex_to_reg;
  logic [3:0]  ex_waddr;
  alu_op_e     ex_op;
  word_t       ex_a, ex_b;

  // queues
  word_t       ldq_head;
  logic        ldq_empty, ldq_can_rsv;
  logic        ldq_fill;
  word_t       ldq_fill_data;
  logic [$clog2(Q_DEPTH+1)-1:0] sdq_count;
  logic        sdq_empty, sdq_full, saq_empty, saq_full, saq_pop, sdq_pop;
  logic [32:0] saq_head;
  word_t       sdq_head;
  logic        bq_head, bq_empty;
  logic        lb_full;

  assign ra_a = (d.iclass == IC_PRET) ? {~fg, 3'd7} : {fg, d.ri};
  assign ra_b = (d.iclass == IC_RFB)  ? {~fg, d.rj} : {fg, d.rj};
  assign ra_c = {fg, d.rk};

  assign src_i_v = (d.rd_ri && d.ri != QREG) || (d.iclass == IC_PRET);
  assign src_j_v = (d.rd_rj && d.rj != QREG) || (d.iclass == IC_RFB);
  assign src_k_v = d.rd_rk && d.rk != QREG;
  assign uses_ldq = (d.rd_ri && d.ri == QREG) || (d.rd_rj && d.rj == QREG) ||
                    (d.rd_rk && d.rk == QREG);

  assign val_i = (d.rd_ri && d.ri == QREG) ? ldq_head : rd_a;
  assign val_j = (d.rd_rj && d.rj == QREG) ? ldq_head : rd_b;
  assign val_k = (d.rd_rk && d.rk == QREG) ? ldq_head : rd_c;

  // address logic
  word_t ea, new_base;
  logic  writes_base;
  pipe_addr_logic u_addr (
    .mode(d.am), .ri_zero(d.ri == 3'd0), .base(val_i),
    .offset(d.is_long ? d.disp : val_j), .ea, .new_base, .writes_base
  );

  // destinations
  logic       to_sdq, to_reg;
  logic [3:0] waddr;
  always_comb begin
    to_sdq = 1'b0;
    to_reg = 1'b0;
    waddr  = {fg, d.ri};
    case (d.iclass)
      IC_ALU, IC_RFB: begin
        to_sdq = (d.ri == QREG);
        to_reg = (d.ri != QREG);
      end
      IC_RTB: begin
        to_reg = 1'b1;
        waddr  = {~fg, d.ri};
      end
      IC_LOAD, IC_STORE: to_reg = writes_base && (d.ri != QREG);
      default: ;
    endcase
  end

  // interlocks
  logic raw, st_raw, st_ldq, st_sdq, st_saq, st_rsv, st_lb, st_bqf, st_bqe;
  assign raw = ex_valid && ex_to_reg &&
               ((src_i_v && ex_waddr == ra_a) || (src_j_v && ex_waddr == ra_b) ||
                (src_k_v && ex_waddr == ra_c));
  assign st_raw = raw;
  assign st_ldq = uses_ldq && ldq_empty;
  assign st_sdq = to_sdq && (sdq_full ||
                  (ex_valid && ex_to_sdq && sdq_count == ($clog2(Q_DEPTH+1))'(Q_DEPTH - 1)));
  assign st_saq = (d.iclass == IC_STORE) && saq_full;
  // a load whose base or index is the LDQ head frees the slot it reserves
  assign st_rsv = (d.iclass == IC_LOAD) &&
                  (d.alt ? !x_ldq_can_rsv_i : !(ldq_can_rsv || (uses_ldq && !ldq_empty)));
  assign st_lb  = (d.iclass == IC_LOAD) && lb_full;
  assign st_bqf = (d.iclass == IC_PBR) && d.alt && x_bq_full_i;
  assign st_bqe = (d.iclass == IC_PBRQ) && bq_empty;

  logic stall;
  assign stall = st_raw || st_ldq || st_sdq || st_saq || st_rsv || st_lb || st_bqf || st_bqe;
  assign halt_issue = ir_valid && !halted && !stall &&
                      (d.iclass == IC_HALT || d.iclass == IC_ILLEGAL);
  assign issue_fire = ir_valid && !halted && !stall && !halt_issue;

  // branch preparation
  logic   p_taken;
  word_t  p_target;
  bkind_e p_kind;
  always_comb begin
    p_taken  = 1'b0;
    p_target = ir_pc + d.disp;
    p_kind   = BK_BRANCH;
    case (d.iclass)
      IC_PBR:   p_taken = cond_true(d.cond, val_i);
      IC_PBRQ:  p_taken = bq_head;
      IC_PBRR:  begin p_taken = 1'b1; p_target = val_i + d.disp; end
      IC_PCALL: begin p_taken = 1'b1; p_kind = BK_CALL; end
      IC_PRET:  begin p_taken = 1'b1; p_kind = BK_RET; p_target = rd_a; end
      default: ;
    endcase
  end

  // exit
  logic   x_taken;
  word_t  x_target;
  bkind_e x_kind;
  logic   do_exit, do_swap, do_pcsave;
  word_t  ret_addr;
  assign x_taken  = d_is_prep ? p_taken  : (pend_valid && pend_taken);
  assign x_target = d_is_prep ? p_target : pend_target;
  assign x_kind   = d_is_prep ? p_kind   : pend_kind;
  assign do_exit  = issue_fire && d.e && x_taken;
  assign do_swap  = do_exit && (x_kind != BK_BRANCH);
  assign do_pcsave = do_exit && (x_kind == BK_CALL);
  assign ret_addr = ir_pc + (d.is_long ? 32'd2 : 32'd1);
  assign redirect    = do_exit && !ir_pre;
  assign redirect_pc = x_target;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pend_valid  <= 1'b0;
      pend_taken  <= 1'b0;
      pend_target <= '0;
      pend_kind   <= BK_BRANCH;
      halted      <= 1'b0;
    end else begin
      if (halt_issue) halted <= 1'b1;
      if (issue_fire) begin
        if (d.e) begin
          pend_valid <= 1'b0;
        end else if (d_is_prep) begin
          pend_valid  <= 1'b1;
          pend_taken  <= p_taken;
          pend_target <= p_target;
          pend_kind   <= p_kind;
        end
      end
    end
  end

  // register files
  word_t ex_y;
  pipe_regfile u_rf (
    .clk, .rst_n, .swap(do_swap), .fg,
    .raddr_a(ra_a), .raddr_b(ra_b), .raddr_c(ra_c),
    .rdata_a(rd_a), .rdata_b(rd_b), .rdata_c(rd_c),
    .we(ex_valid && ex_to_reg), .waddr(ex_waddr), .wdata(ex_y),
    .pc_we(do_pcsave), .pc_bank(fg), .pc_wdata(ret_addr)
  );

  // issue -> execute
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ex_valid  <= 1'b0;
      ex_to_sdq <= 1'b0;
      ex_to_reg <= 1'b0;
      ex_waddr  <= '0;
      ex_op     <= ALU_MOV;
      ex_a      <= '0;
      ex_b      <= '0;
    end else begin
      ex_valid  <= issue_fire && (to_sdq || to_reg);
      ex_to_sdq <= to_sdq;
      ex_to_reg <= to_reg;
      ex_waddr  <= waddr;
      ex_op     <= ALU_MOV;
      ex_b      <= d.disp;
      case (d.iclass)
        IC_ALU: begin
          ex_op <= d.alu_op;
          if (d.imm_only)     ex_a <= d.disp;
          else if (d.use_imm) ex_a <= val_i;
          else begin ex_a <= val_j; ex_b <= val_k; end
        end
        IC_RFB, IC_RTB:    ex_a <= val_j;
        default:           ex_a <= new_base;
      endcase
    end
  end

  // ---------------------------------------------------------------- execute
  word_t alu_y, shf_y;
  pipe_alu     u_alu (.op(ex_op), .a(ex_a), .b(ex_b), .y(alu_y));
  pipe_shifter u_shf (.a(ex_a), .count(ex_b), .y(shf_y));
  assign ex_y = (ex_op == ALU_SHL) ? shf_y : alu_y;

  // ---------------------------------------------------------------- queues
  pipe_ldq #(.DEPTH(LDQ_DEPTH)) u_ldq (
    .clk, .rst_n,
    .rsv_own(issue_fire && d.iclass == IC_LOAD && !d.alt),
    .rsv_alt(x_ldq_rsv_i),
    .can_rsv_own(ldq_can_rsv), .can_rsv_alt(x_ldq_can_rsv_o),
    .fill(ldq_fill), .fill_data(ldq_fill_data),
    .pop(issue_fire && uses_ldq), .head(ldq_head), .empty(ldq_empty),
    .count(), .reserved()
  );
  assign x_ldq_rsv_o = issue_fire && d.iclass == IC_LOAD && d.alt;

  pipe_queue #(.WIDTH(33), .DEPTH(Q_DEPTH)) u_saq (
    .clk, .rst_n, .push(issue_fire && d.iclass == IC_STORE), .push_data({d.alt, ea}),
    .pop(saq_pop), .head(saq_head), .empty(saq_empty), .full(saq_full), .count()
  );

  pipe_queue #(.WIDTH(32), .DEPTH(Q_DEPTH)) u_sdq (
    .clk, .rst_n, .push(ex_valid && ex_to_sdq), .push_data(ex_y),
    .pop(sdq_pop), .head(sdq_head), .empty(sdq_empty), .full(sdq_full), .count(sdq_count)
  );

  pipe_queue #(.WIDTH(1), .DEPTH(BQ_DEPTH)) u_bq (
    .clk, .rst_n, .push(x_bq_push_i), .push_data(x_bq_data_i),
    .pop(issue_fire && d.iclass == IC_PBRQ), .head(bq_head), .empty(bq_empty),
    .full(x_bq_full_o), .count()
  );
  assign x_bq_push_o = issue_fire && d.iclass == IC_PBR && d.alt;
  assign x_bq_data_o = p_taken;

  // ---------------------------------------------------------------- memory
  pipe_mem_if #(.PROC_ID(PROC_ID)) u_mif (
    .clk, .rst_n, .bus_o, .bus_ready, .rd_i,
    .ic_req_valid, .ic_req_addr, .ic_req_ready, .ic_fill_valid, .ic_fill_data,
    .ldq_fill, .ldq_fill_data,
    .ld_push(issue_fire && d.iclass == IC_LOAD), .ld_addr(ea), .ld_alt(d.alt), .ld_full(lb_full),
    .saq_valid(!saq_empty), .saq_addr(saq_head[31:0]), .saq_alt(saq_head[32]), .saq_pop,
    .sdq_valid(!sdq_empty), .sdq_data(sdq_head), .sdq_pop,
    .alt_req_o(x_st_req_o), .alt_gnt_i(x_st_gnt_i), .alt_req_i(x_st_req_i), .alt_gnt_o(x_st_gnt_o)
  );
endmodule

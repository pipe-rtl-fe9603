// pipe_decode: instruction decoder of a PIPE processor.
//
// Combinational. Takes the two parcels fetched at PC and PC+1 and returns a
// dec_t: the format (16 or 32 bits, told by the opcode alone), the fields
// of the PIPE formats (opcode, exit bit E, Ri, Rj, Rk, 22-bit displacement
// sign-extended to 32 bits) and a classification that the issue logic
// uses: which fields are sources, whether Ri is the destination, the ALU
// operation, the addressing mode of loads and stores, the branch condition
// and whether the operation targets the other processor (ALDQ, ASAQ,
// external PBR). For a 16-bit instruction parcel1 is ignored.
//
// The field positions follow the instruction formats of the document, with
// its bit 0 taken as the most significant bit; the opcode numbering, the
// move and the halt are this design's own.
module pipe_decode
  import pipe_pkg::*;
(
  input  logic [15:0] parcel0,
  input  logic [15:0] parcel1,
  output dec_t        d
);
  logic [5:0] op;
  assign op = parcel0[15:10];

  always_comb begin
    d          = '0;
    d.opcode   = op;
    d.is_long  = op_is_long(op);
    d.e        = parcel0[9];
    d.ri       = parcel0[8:6];
    d.rj       = parcel0[5:3];
    d.rk       = parcel0[2:0];
    d.disp     = {{(XLEN-DISP_W){parcel0[5]}}, parcel0[5:0], parcel1};
    d.iclass   = IC_ILLEGAL;
    d.alu_op   = ALU_MOV;
    d.am       = AM_PLAIN;
    d.cond     = C_GT;
    if (!d.is_long) d.disp = '0;

    case (op)
      OP_ADD, OP_SUB, OP_RSUB, OP_OR, OP_AND, OP_XOR, OP_SHL: begin
        d.iclass = IC_ALU; d.rd_rj = 1'b1; d.rd_rk = 1'b1; d.wr_ri = 1'b1;
      end
      OP_NOT, OP_MOV: begin
        d.iclass = IC_ALU; d.rd_rj = 1'b1; d.wr_ri = 1'b1;
      end
      OP_ENTER: begin
        d.iclass = IC_ALU; d.imm_only = 1'b1; d.use_imm = 1'b1; d.wr_ri = 1'b1;
      end
      OP_ADDI, OP_SUBI, OP_ORI, OP_ANDI, OP_XORI: begin
        d.iclass = IC_ALU; d.rd_ri = 1'b1; d.use_imm = 1'b1; d.wr_ri = 1'b1;
      end
      OP_LDR, OP_LDRPRE, OP_LDRPST, OP_ALDR, OP_ALDRPRE, OP_ALDRPST: begin
        d.iclass = IC_LOAD; d.rd_ri = (d.ri != 3'd0); d.rd_rj = 1'b1;
      end
      OP_STR, OP_STRPRE, OP_STRPST, OP_ASTR, OP_ASTRPRE, OP_ASTRPST: begin
        d.iclass = IC_STORE; d.rd_ri = (d.ri != 3'd0); d.rd_rj = 1'b1;
      end
      OP_LD, OP_LDPRE, OP_LDPST, OP_ALD, OP_ALDPRE, OP_ALDPST: begin
        d.iclass = IC_LOAD; d.rd_ri = (d.ri != 3'd0);
      end
      OP_ST, OP_STPRE, OP_STPST, OP_AST, OP_ASTPRE, OP_ASTPST: begin
        d.iclass = IC_STORE; d.rd_ri = (d.ri != 3'd0);
      end
      OP_RFB: begin d.iclass = IC_RFB; d.wr_ri = 1'b1; end
      OP_RTB: begin d.iclass = IC_RTB; d.rd_rj = 1'b1; end
      OP_IPBRGT, OP_IPBRLT, OP_IPBREQ, OP_IPBRLE, OP_IPBRGE, OP_IPBRNE,
      OP_PBRGT,  OP_PBRLT,  OP_PBREQ,  OP_PBRLE,  OP_PBRGE,  OP_PBRNE: begin
        d.iclass = IC_PBR; d.rd_ri = 1'b1;
      end
      OP_PBRQ:  d.iclass = IC_PBRQ;
      OP_IPBRR: begin d.iclass = IC_PBRR; d.rd_ri = 1'b1; end
      OP_PCALL: d.iclass = IC_PCALL;
      OP_PRET:  d.iclass = IC_PRET;
      OP_HALT:  d.iclass = IC_HALT;
      default:  d.iclass = IC_ILLEGAL;
    endcase

    case (op)
      OP_ADD, OP_ADDI:           d.alu_op = ALU_ADD;
      OP_SUB, OP_SUBI:           d.alu_op = ALU_SUB;
      OP_RSUB:                   d.alu_op = ALU_RSUB;
      OP_OR, OP_ORI:             d.alu_op = ALU_OR;
      OP_AND, OP_ANDI:           d.alu_op = ALU_AND;
      OP_XOR, OP_XORI:           d.alu_op = ALU_XOR;
      OP_NOT:                    d.alu_op = ALU_NOT;
      OP_SHL:                    d.alu_op = ALU_SHL;
      default:                   d.alu_op = ALU_MOV;
    endcase

    case (op)
      OP_LDRPRE, OP_STRPRE, OP_ALDRPRE, OP_ASTRPRE,
      OP_LDPRE, OP_STPRE, OP_ALDPRE, OP_ASTPRE:      d.am = AM_PRE;
      OP_LDRPST, OP_STRPST, OP_ALDRPST, OP_ASTRPST,
      OP_LDPST, OP_STPST, OP_ALDPST, OP_ASTPST:      d.am = AM_POST;
      default:                                       d.am = AM_PLAIN;
    endcase

    case (op)
      OP_ALDR, OP_ALDRPRE, OP_ALDRPST, OP_ASTR, OP_ASTRPRE, OP_ASTRPST,
      OP_ALD, OP_ALDPRE, OP_ALDPST, OP_AST, OP_ASTPRE, OP_ASTPST,
      OP_PBRGT, OP_PBRLT, OP_PBREQ, OP_PBRLE, OP_PBRGE, OP_PBRNE: d.alt = 1'b1;
      default: d.alt = 1'b0;
    endcase

    case (op)
      OP_IPBRLT, OP_PBRLT: d.cond = C_LT;
      OP_IPBREQ, OP_PBREQ: d.cond = C_EQ;
      OP_IPBRLE, OP_PBRLE: d.cond = C_LE;
      OP_IPBRGE, OP_PBRGE: d.cond = C_GE;
      OP_IPBRNE, OP_PBRNE: d.cond = C_NE;
      default:             d.cond = C_GT;
    endcase
  end
endmodule

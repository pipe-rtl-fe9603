// pipe_pkg: types and constants shared by the PIPE processor pair.
//
// Instruction formats. Bit 0 of a format is its leftmost, most significant
// bit, so within a 16-bit parcel p:  opcode p[15:10], exit bit E p[9],
// Ri p[8:6], Rj p[5:3], Rk p[2:0]; within a 32-bit instruction w (first
// parcel in w[31:16]): opcode w[31:26], E w[25], Ri w[24:22] and a 22-bit
// signed displacement w[21:0]. The field layout follows the PIPE formats;
// the opcode values are this design's own: 0x00-0x17 are 16-bit
// instructions, 0x18-0x3F are 32-bit ones.
//
// A register field holding 7 names a queue instead of a register: the LDQ
// head as a source, the SDQ tail as a destination. In loads and stores a 0
// in the Ri field means the literal 0.
//
// Memory buses. Each processor drives one outgoing bus that carries load
// addresses, store addresses and store data (mem_req_t), and receives one
// incoming read-data bus (mem_rd_t). Data memory is addressed in 32-bit
// words; the program counter counts 16-bit parcels, the parcel at an even
// address being the upper half of its word.
//
// Lint: a module that imports the package without using DISP_W or QREG
// makes Verilator report those constants as unused.
package pipe_pkg;

  localparam int XLEN = 32;
  localparam int DISP_W = 22;
  localparam logic [2:0] QREG = 3'd7;   // register field value naming a queue

  typedef logic [XLEN-1:0] word_t;

  typedef enum logic [5:0] {
    // 16-bit format
    OP_ADD    = 6'h00,  // Ri <- Rj + Rk
    OP_SUB    = 6'h01,  // Ri <- Rj - Rk
    OP_RSUB   = 6'h02,  // Ri <- Rk - Rj
    OP_OR     = 6'h03,
    OP_AND    = 6'h04,
    OP_XOR    = 6'h05,
    OP_NOT    = 6'h06,  // Ri <- ~Rj
    OP_SHL    = 6'h07,  // Ri <- Rj << Rk
    OP_MOV    = 6'h08,  // Ri <- Rj
    OP_LDR    = 6'h09,  // LDQ  <- (Ri,Rj)
    OP_LDRPRE = 6'h0A,  // LDQ  <- +(Ri,Rj)
    OP_LDRPST = 6'h0B,  // LDQ  <- (Ri,Rj)+
    OP_STR    = 6'h0C,  // SAQ  <- (Ri,Rj)
    OP_STRPRE = 6'h0D,
    OP_STRPST = 6'h0E,
    OP_ALDR   = 6'h0F,  // ALDQ <- (Ri,Rj)
    OP_ALDRPRE= 6'h10,
    OP_ALDRPST= 6'h11,
    OP_ASTR   = 6'h12,  // ASAQ <- (Ri,Rj)
    OP_ASTRPRE= 6'h13,
    OP_ASTRPST= 6'h14,
    OP_RFB    = 6'h15,  // Ri  <- BRj
    OP_RTB    = 6'h16,  // BRi <- Rj
    OP_HALT   = 6'h17,
    // 32-bit format
    OP_LD     = 6'h18,  // LDQ  <- (Ri,disp)
    OP_LDPRE  = 6'h19,  // LDQ  <- +(Ri,disp)
    OP_LDPST  = 6'h1A,  // LDQ  <- (Ri,disp)+
    OP_ST     = 6'h1B,  // SAQ  <- (Ri,disp)
    OP_STPRE  = 6'h1C,
    OP_STPST  = 6'h1D,
    OP_ALD    = 6'h1E,  // ALDQ <- (Ri,disp)
    OP_ALDPRE = 6'h1F,
    OP_ALDPST = 6'h20,
    OP_AST    = 6'h21,  // ASAQ <- (Ri,disp)
    OP_ASTPRE = 6'h22,
    OP_ASTPST = 6'h23,
    OP_ENTER  = 6'h24,  // Ri <- disp
    OP_ADDI   = 6'h25,  // Ri <- Ri + disp
    OP_SUBI   = 6'h26,
    OP_ORI    = 6'h27,
    OP_ANDI   = 6'h28,
    OP_XORI   = 6'h29,
    OP_IPBRGT = 6'h2A,  // IPBR (Ri > 0) -> disp
    OP_IPBRLT = 6'h2B,
    OP_IPBREQ = 6'h2C,
    OP_IPBRLE = 6'h2D,
    OP_IPBRGE = 6'h2E,
    OP_IPBRNE = 6'h2F,
    OP_PBRGT  = 6'h30,  // external: also sends the outcome to the other processor
    OP_PBRLT  = 6'h31,
    OP_PBREQ  = 6'h32,
    OP_PBRLE  = 6'h33,
    OP_PBRGE  = 6'h34,
    OP_PBRNE  = 6'h35,
    OP_PBRQ   = 6'h36,  // PBR(Q) -> disp, outcome from the branch queue
    OP_IPBRR  = 6'h37,  // IPBR -> (Ri,disp), unconditional
    OP_PCALL  = 6'h38,  // prepare to call, PC relative
    OP_PRET   = 6'h39   // prepare to return, target in background R7
  } opcode_e;

  typedef enum logic [3:0] {
    ALU_ADD, ALU_SUB, ALU_RSUB, ALU_OR, ALU_AND, ALU_XOR, ALU_NOT, ALU_MOV, ALU_SHL
  } alu_op_e;

  typedef enum logic [1:0] {AM_PLAIN, AM_PRE, AM_POST} am_e;

  typedef enum logic [2:0] {C_GT, C_LT, C_EQ, C_LE, C_GE, C_NE} cond_e;

  typedef enum logic [3:0] {
    IC_ALU,     // register-to-register or immediate arithmetic, move, enter, shift
    IC_LOAD,    // LDQ or ALDQ
    IC_STORE,   // SAQ or ASAQ
    IC_RFB,     // Ri <- BRj
    IC_RTB,     // BRi <- Rj
    IC_PBR,     // conditional prepare-to-branch (internal or external)
    IC_PBRQ,
    IC_PBRR,    // unconditional, register relative
    IC_PCALL,
    IC_PRET,
    IC_HALT,
    IC_ILLEGAL
  } iclass_e;

  // Decoded instruction.
  typedef struct packed {
    logic        is_long;     // 32-bit format
    logic [5:0]  opcode;
    logic        e;           // branch exit bit
    logic [2:0]  ri, rj, rk;
    word_t       disp;        // sign-extended displacement
    iclass_e     iclass;
    alu_op_e     alu_op;
    logic        use_imm;     // second ALU operand is disp
    logic        imm_only;    // enter: result is disp
    logic        rd_ri;       // Ri is a source (immediates, loads, stores, PBR)
    logic        rd_rj;
    logic        rd_rk;
    logic        wr_ri;       // Ri (or SDQ when 7) is the destination
    logic        alt;         // ALDQ / ASAQ / external PBR
    am_e         am;
    cond_e       cond;
  } dec_t;

  function automatic logic op_is_long(logic [5:0] op);
    return op >= 6'h18;
  endfunction

  // Branch condition on a tested register value.
  function automatic logic cond_true(cond_e c, word_t v);
    logic neg, zero;
    neg  = v[XLEN-1];
    zero = (v == '0);
    case (c)
      C_GT:    return !neg && !zero;
      C_LT:    return neg;
      C_EQ:    return zero;
      C_LE:    return neg || zero;
      C_GE:    return !neg;
      default: return !zero;
    endcase
  endfunction

  // Outgoing bus beat.
  typedef enum logic [2:0] {
    MEM_LOAD,     // read, data to own LDQ
    MEM_ALOAD,    // read, data to the other processor's LDQ
    MEM_IFETCH,   // read, data to own I-cache
    MEM_STADDR,   // store address; data follows on this bus
    MEM_ASTADDR,  // store address; data on the other processor's bus, same clock
    MEM_STDATA    // store data
  } mem_op_e;

  typedef struct packed {
    logic    valid;
    mem_op_e op;
    word_t   word;
  } mem_req_t;

  // Incoming read data beat.
  typedef struct packed {
    logic  valid;
    logic  to_icache;   // 1: I-cache refill word, 0: LDQ data
    word_t data;
  } mem_rd_t;

endpackage

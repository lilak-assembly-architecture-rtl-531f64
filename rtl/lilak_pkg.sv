// lilak_pkg: shared types and constants of the LilaK five-stage 16-bit processor.
//
// Every LilaK instruction is one 16-bit word with a 4-bit opcode in [15:12].
// A-type: OP | ra [11:8] | rb [7:4] | rr [3:0]
// V-type: OP | value [11:4] | rr [3:0]   (only "set" is V-type)
// The two formats, the 4-bit opcode, the register numbers and the opcode of
// "set" (7) follow the LilaK definition. The numbers of the other opcodes are
// not fixed there; this design numbers them in the order of the instruction
// list with "set" kept at 7, and uses the spare code 15 as an explicit no-op.
// The control-signal names (RegWrite, MemRead, MemWrite, RegDest, RegData,
// PCSrc, MemToReg, ALUSrcA, ALUSrcB, ALUop) are those of the LilaK data path;
// their encodings are this design's choice.
package lilak_pkg;

  localparam int unsigned XLEN = 16;
  typedef logic [XLEN-1:0] word_t;
  typedef logic [3:0]      reg_idx_t;

  typedef enum logic [3:0] {
    OP_ADD   = 4'h0,
    OP_SUB   = 4'h1,
    OP_MUL   = 4'h2,
    OP_DIV   = 4'h3,
    OP_AND   = 4'h4,
    OP_OR    = 4'h5,
    OP_LT    = 4'h6,
    OP_SET   = 4'h7,
    OP_GT    = 4'h8,
    OP_EQ    = 4'h9,
    OP_JUMP  = 4'hA,
    OP_STORE = 4'hB,
    OP_LOAD  = 4'hC,
    OP_BEQ   = 4'hD,
    OP_JAL   = 4'hE,
    OP_NOP   = 4'hF
  } opcode_e;

  // Register numbers of the LilaK register table.
  localparam reg_idx_t R_ZERO = 4'd0;   // hard-wired zero
  localparam reg_idx_t R_RA   = 4'd1;   // return address
  localparam reg_idx_t R_IN   = 4'd5;   // input register
  localparam reg_idx_t R_FR0  = 4'd9;   // first procedure return register

  typedef enum logic [3:0] {
    ALU_ADD = 4'h0,
    ALU_SUB = 4'h1,
    ALU_MUL = 4'h2,
    ALU_DIV = 4'h3,
    ALU_AND = 4'h4,
    ALU_OR  = 4'h5,
    ALU_LT  = 4'h6,
    ALU_GT  = 4'h8,
    ALU_EQ  = 4'h9
  } alu_op_e;

  // Writeback source selected by MemToReg (the 4-input mux of the data path).
  typedef enum logic [1:0] {
    WB_SEVAL = 2'd0,   // sign-extended V-type value (set)
    WB_ALU   = 2'd1,   // ALU result
    WB_MEM   = 2'd2,   // data-memory read data (load)
    WB_A     = 2'd3    // register A (not used by any instruction)
  } mem_to_reg_e;

  // Operand forwarding selects (ForwardA / ForwardB).
  typedef enum logic [1:0] {
    FWD_REG = 2'd0,    // value read in decode
    FWD_XM  = 2'd1,    // ALU result held in X->M
    FWD_MW  = 2'd2     // writeback data of the M->W instruction
  } fwd_sel_e;

  typedef struct packed {
    // W group
    logic        reg_write;
    logic        reg_dest;    // 0: rr field, 1: $ra
    logic        reg_data;    // 0: MemToReg mux, 1: CURRENTADDRESS
    logic        pc_src;      // unconditional PC <- A (jump, jumpandlink)
    logic        branch;      // PC <- ALU result when A == B
    mem_to_reg_e mem_to_reg;
    // M group
    logic        mem_read;
    logic        mem_write;
    // X group
    logic        alu_src_a;   // 0: forwarded A, 1: CURRENTADDRESS
    logic        alu_src_b;   // 0: forwarded B, 1: C << 1
    alu_op_e     alu_op;
  } ctrl_t;

  localparam ctrl_t CTRL_NOP = '{default: '0, mem_to_reg: WB_SEVAL, alu_op: ALU_ADD};

  // F->D stage register contents.
  typedef struct packed {
    word_t instr;       // INSTRDATA
    word_t pc;          // PC + 2 of the fetched instruction
  } fd_t;

  // D->X stage register contents.
  typedef struct packed {
    ctrl_t    ctrl;
    word_t    a;        // REG[ra]
    word_t    b;        // REG[rb]
    word_t    c;        // REG[rr]
    word_t    pc;       // CURRENTADDRESS
    word_t    seval;    // sign-extended value
    logic     taken;    // branch on equal with A == B
    reg_idx_t ra;
    reg_idx_t rb;
    reg_idx_t rr;
    word_t    out;      // output register tap
  } dx_t;

  // X->M stage register contents.
  typedef struct packed {
    ctrl_t    ctrl;
    word_t    alu;
    word_t    a;        // forwarded A (memory address, jump target)
    word_t    b;        // forwarded B (store data)
    word_t    pc;
    word_t    seval;
    logic     taken;
    logic     zero;
    logic     overflow;
    reg_idx_t rr;
    word_t    out;
  } xm_t;

  // M->W stage register contents (MtoWRegFile).
  typedef struct packed {
    ctrl_t    ctrl;
    word_t    alu;
    word_t    a;
    word_t    mem;
    word_t    pc;
    word_t    seval;
    logic     taken;
    logic     zero;
    logic     overflow;
    reg_idx_t rr;
    word_t    out;
  } mw_t;

endpackage

// mt_pkg: types and constants shared by the multithreaded soft processor.
//
// The processor runs a subset of the 32-bit MIPS I instruction set modified
// for fine-grained multithreading: no branch or load delay slots, no Hi/Lo
// registers, and two 3-operand multiply instructions (MUL writes the lower 32
// bits of the product to rd, MULH the upper 32 bits). Integer division is left
// to software, so there is no divider. The function codes chosen for the two
// multiplies (those of MIPS MULT and MULTU) are this design's own choice.
package mt_pkg;

  // Primary opcodes (instr[31:26])
  typedef enum logic [5:0] {
    OP_SPECIAL = 6'h00,
    OP_REGIMM  = 6'h01,
    OP_J       = 6'h02,
    OP_JAL     = 6'h03,
    OP_BEQ     = 6'h04,
    OP_BNE     = 6'h05,
    OP_BLEZ    = 6'h06,
    OP_BGTZ    = 6'h07,
    OP_ADDI    = 6'h08,
    OP_ADDIU   = 6'h09,
    OP_SLTI    = 6'h0A,
    OP_SLTIU   = 6'h0B,
    OP_ANDI    = 6'h0C,
    OP_ORI     = 6'h0D,
    OP_XORI    = 6'h0E,
    OP_LUI     = 6'h0F,
    OP_LB      = 6'h20,
    OP_LH      = 6'h21,
    OP_LW      = 6'h23,
    OP_LBU     = 6'h24,
    OP_LHU     = 6'h25,
    OP_SB      = 6'h28,
    OP_SH      = 6'h29,
    OP_SW      = 6'h2B
  } opcode_e;

  // SPECIAL function codes (instr[5:0])
  typedef enum logic [5:0] {
    FN_SLL   = 6'h00,
    FN_SRL   = 6'h02,
    FN_SRA   = 6'h03,
    FN_SLLV  = 6'h04,
    FN_SRLV  = 6'h06,
    FN_SRAV  = 6'h07,
    FN_JR    = 6'h08,
    FN_JALR  = 6'h09,
    FN_MUL   = 6'h18,  // rd = low 32 bits of rs*rt
    FN_MULH  = 6'h19,  // rd = high 32 bits of signed rs*rt
    FN_ADD   = 6'h20,
    FN_ADDU  = 6'h21,
    FN_SUB   = 6'h22,
    FN_SUBU  = 6'h23,
    FN_AND   = 6'h24,
    FN_OR    = 6'h25,
    FN_XOR   = 6'h26,
    FN_NOR   = 6'h27,
    FN_SLT   = 6'h2A,
    FN_SLTU  = 6'h2B
  } funct_e;

  // REGIMM rt codes
  localparam logic [4:0] RT_BLTZ = 5'h00;
  localparam logic [4:0] RT_BGEZ = 5'h01;

  typedef enum logic [3:0] {
    ALU_ADD, ALU_SUB, ALU_AND, ALU_OR, ALU_XOR, ALU_NOR,
    ALU_SLT, ALU_SLTU, ALU_LUI, ALU_PASSB
  } alu_op_e;

  typedef enum logic [1:0] {SH_SLL, SH_SRL, SH_SRA} shift_op_e;

  typedef enum logic [2:0] {
    BR_NONE, BR_EQ, BR_NE, BR_LEZ, BR_GTZ, BR_LTZ, BR_GEZ, BR_ALWAYS
  } br_cond_e;

  // Which functional unit produces the result written to rd
  typedef enum logic [2:0] {
    RES_ALU, RES_SHIFT, RES_MUL, RES_LOAD, RES_LINK
  } res_sel_e;

  typedef enum logic [1:0] {MEM_B = 2'd0, MEM_H = 2'd1, MEM_W = 2'd2} mem_size_e;

  typedef struct packed {
    logic        valid;      // a recognised instruction
    logic [4:0]  rs;
    logic [4:0]  rt;
    logic [4:0]  rd;         // destination register (0 = no write)
    logic        reg_write;
    logic [31:0] imm;        // sign- or zero-extended immediate
    logic        use_imm;    // operand B is the immediate
    alu_op_e     alu_op;
    shift_op_e   shift_op;
    logic        shift_var;  // shift amount from rs instead of shamt
    logic [4:0]  shamt;
    logic        mul_high;   // MULH rather than MUL
    res_sel_e    res_sel;
    br_cond_e    br_cond;
    logic        jump_reg;   // target from rs (JR/JALR)
    logic        jump_abs;   // target from 26-bit index (J/JAL)
    logic        mem_read;
    logic        mem_write;
    mem_size_e   mem_size;
    logic        mem_unsigned;
  } dec_t;

  // An instruction is "long" when its result needs a second execute cycle in
  // the 3-stage pipeline (loads, shifts and multiplies).
  function automatic logic is_long(dec_t d);
    return d.res_sel inside {RES_SHIFT, RES_MUL, RES_LOAD};
  endfunction

  function automatic int unsigned clog2_min1(int unsigned n);
    return (n <= 1) ? 1 : $clog2(n);
  endfunction

endpackage

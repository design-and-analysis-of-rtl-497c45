// mips_pkg: types and constants shared by the pipelined MIPS slice.
//
// The slice executes 32-bit MIPS instructions in the three classic formats
// (R, I and J type). Opcode and function-field values are the standard MIPS
// encodings; the subset chosen here (listed in the enums below) is this
// design's choice, as is the 2-bit ALU operation code handed from the
// control unit to the execute stage. XLEN is the width of one slice's
// registers and data path; two slices side by side make the 64-bit machine.
package mips_pkg;

  parameter int unsigned XLEN    = 32;  // register / data width of one slice
  parameter int unsigned INSTR_W = 32;  // instruction width
  parameter int unsigned PC_W    = 32;  // program counter width (word address)
  parameter int unsigned RA_W    = 5;   // register address width (32 registers)

  typedef logic [XLEN-1:0]    word_t;
  typedef logic [INSTR_W-1:0] instr_t;
  typedef logic [PC_W-1:0]    pc_t;
  typedef logic [RA_W-1:0]    reg_addr_t;

  // Primary opcodes (instruction bits 31:26).
  typedef enum logic [5:0] {
    OP_RTYPE = 6'h00,
    OP_J     = 6'h02,
    OP_JAL   = 6'h03,
    OP_BEQ   = 6'h04,
    OP_BNE   = 6'h05,
    OP_ADDI  = 6'h08,
    OP_ADDIU = 6'h09,
    OP_SLTI  = 6'h0A,
    OP_ANDI  = 6'h0C,
    OP_ORI   = 6'h0D,
    OP_XORI  = 6'h0E,
    OP_LUI   = 6'h0F,
    OP_LW    = 6'h23,
    OP_SW    = 6'h2B
  } opcode_t;

  // R-type function codes (instruction bits 5:0).
  typedef enum logic [5:0] {
    FN_SLL  = 6'h00,
    FN_SRL  = 6'h02,
    FN_JR   = 6'h08,
    FN_MFHI = 6'h10,
    FN_MFLO = 6'h12,
    FN_MULT = 6'h18,
    FN_ADD  = 6'h20,
    FN_ADDU = 6'h21,
    FN_SUB  = 6'h22,
    FN_SUBU = 6'h23,
    FN_AND  = 6'h24,
    FN_OR   = 6'h25,
    FN_XOR  = 6'h26,
    FN_NOR  = 6'h27,
    FN_SLT  = 6'h2A
  } funct_t;

  // 2-bit ALU operation class produced by the control unit.
  typedef enum logic [1:0] {
    ALUOP_ADD   = 2'b00,  // loads, stores, addi: address / sum
    ALUOP_SUB   = 2'b01,  // branches: compare by subtraction
    ALUOP_FUNCT = 2'b10,  // R type: the function field decides
    ALUOP_IMM   = 2'b11   // immediate arithmetic/logic: the opcode decides
  } alu_op_t;

  // Operation performed by the ALU.
  typedef enum logic [3:0] {
    ALU_ADD = 4'd0,
    ALU_SUB = 4'd1,
    ALU_AND = 4'd2,
    ALU_OR  = 4'd3,
    ALU_XOR = 4'd4,
    ALU_NOR = 4'd5,
    ALU_SLT = 4'd6,
    ALU_SLL = 4'd7,
    ALU_SRL = 4'd8,
    ALU_LUI = 4'd9
  } alu_ctrl_t;

  // Control word produced in ID and carried down the pipeline.
  typedef struct packed {
    logic    reg_write;   // WB writes the destination register
    logic    mem_to_reg;  // WB value comes from data memory
    logic    mem_read;    // MEM reads data memory (load)
    logic    mem_write;   // MEM writes data memory (store)
    logic    alu_src;     // ALU operand B is the immediate
    logic    reg_dst;     // destination is rd (R type) instead of rt
    logic    zero_ext;    // immediate is zero-extended (logical immediates)
    logic    branch;      // beq / bne
    logic    branch_ne;   // bne (with branch)
    logic    jump;        // j / jal
    logic    link;        // jal: write PC+1 to $31
    logic    jr;          // jr: jump to rs
    logic    hilo_write;  // mult: write hi/lo
    logic    mfhi;        // result is hi
    logic    mflo;        // result is lo
    logic    uses_rs;     // instruction reads rs
    logic    uses_rt;     // instruction reads rt
    alu_op_t alu_op;
  } ctrl_t;

  // IF/ID pipeline register contents.
  typedef struct packed {
    pc_t    pc_plus1;
    instr_t instr;
  } if_id_t;

  // ID/EX pipeline register contents.
  typedef struct packed {
    ctrl_t     ctrl;
    pc_t       pc_plus1;
    word_t     rs_val;
    word_t     rt_val;
    word_t     imm;
    reg_addr_t rs;
    reg_addr_t rt;
    reg_addr_t dest;
    logic [4:0] shamt;
    logic [5:0] funct;
    logic [5:0] opcode;
  } id_ex_t;

  // EX/MEM pipeline register contents.
  typedef struct packed {
    logic      reg_write;
    logic      mem_to_reg;
    logic      mem_read;
    logic      mem_write;
    word_t     result;
    word_t     store_data;
    reg_addr_t dest;
  } ex_mem_t;

  // MEM/WB pipeline register contents.
  typedef struct packed {
    logic      reg_write;
    logic      mem_to_reg;
    word_t     result;
    word_t     mem_data;
    reg_addr_t dest;
  } mem_wb_t;

  // Forwarding source for an execute-stage operand.
  typedef enum logic [1:0] {
    FWD_NONE   = 2'b00,  // value read in ID
    FWD_MEM_WB = 2'b01,  // value being written back
    FWD_EX_MEM = 2'b10   // ALU result of the previous instruction
  } fwd_sel_t;

endpackage

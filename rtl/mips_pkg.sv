// mips_pkg: instruction encodings and pipeline register types of the
// conjoined five-stage MIPS pipeline.
//
// The instruction subset is this design's choice: enough of MIPS32 for
// integer programs (arithmetic, logic, shifts, compare, 32-bit multiply,
// load/store word, branches and jumps) plus BREAK, used as the halt
// instruction. Branches and jumps are resolved in EX and have no delay
// slot.
package mips_pkg;

  // primary opcodes
  localparam logic [5:0] OP_RTYPE = 6'h00;
  localparam logic [5:0] OP_J     = 6'h02;
  localparam logic [5:0] OP_JAL   = 6'h03;
  localparam logic [5:0] OP_BEQ   = 6'h04;
  localparam logic [5:0] OP_BNE   = 6'h05;
  localparam logic [5:0] OP_ADDI  = 6'h08;
  localparam logic [5:0] OP_ADDIU = 6'h09;
  localparam logic [5:0] OP_SLTI  = 6'h0A;
  localparam logic [5:0] OP_SLTIU = 6'h0B;
  localparam logic [5:0] OP_ANDI  = 6'h0C;
  localparam logic [5:0] OP_ORI   = 6'h0D;
  localparam logic [5:0] OP_XORI  = 6'h0E;
  localparam logic [5:0] OP_LUI   = 6'h0F;
  localparam logic [5:0] OP_SPEC2 = 6'h1C;
  localparam logic [5:0] OP_LW    = 6'h23;
  localparam logic [5:0] OP_SW    = 6'h2B;

  // R-type function codes
  localparam logic [5:0] FN_SLL   = 6'h00;
  localparam logic [5:0] FN_SRL   = 6'h02;
  localparam logic [5:0] FN_SRA   = 6'h03;
  localparam logic [5:0] FN_SLLV  = 6'h04;
  localparam logic [5:0] FN_SRLV  = 6'h06;
  localparam logic [5:0] FN_JR    = 6'h08;
  localparam logic [5:0] FN_BREAK = 6'h0D;
  localparam logic [5:0] FN_ADD   = 6'h20;
  localparam logic [5:0] FN_ADDU  = 6'h21;
  localparam logic [5:0] FN_SUB   = 6'h22;
  localparam logic [5:0] FN_SUBU  = 6'h23;
  localparam logic [5:0] FN_AND   = 6'h24;
  localparam logic [5:0] FN_OR    = 6'h25;
  localparam logic [5:0] FN_XOR   = 6'h26;
  localparam logic [5:0] FN_NOR   = 6'h27;
  localparam logic [5:0] FN_SLT   = 6'h2A;
  localparam logic [5:0] FN_SLTU  = 6'h2B;
  // SPECIAL2 function code
  localparam logic [5:0] FN_MUL   = 6'h02;

  typedef enum logic [3:0] {
    ALU_ADD, ALU_SUB, ALU_AND, ALU_OR, ALU_XOR, ALU_NOR,
    ALU_SLT, ALU_SLTU, ALU_SLL, ALU_SRL, ALU_SRA, ALU_LUI, ALU_MUL
  } alu_op_t;

  // PC register (the fetch stage's pipeline register)
  typedef struct packed {
    logic [31:0] pc;
  } pc_reg_t;

  // IF/ID
  typedef struct packed {
    logic        valid;
    logic [31:0] pc;
    logic [31:0] instr;
  } ifid_t;

  // ID/EX
  typedef struct packed {
    logic        valid;
    logic [31:0] pc;
    logic [31:0] rs_val;
    logic [31:0] rt_val;
    logic [31:0] imm;
    logic [4:0]  shamt;
    logic [4:0]  rs;
    logic [4:0]  rt;
    logic [4:0]  dest;
    alu_op_t     alu_op;
    logic        alu_imm;     // second ALU operand is the immediate
    logic        shift_var;   // shift amount from rs
    logic        reg_write;
    logic        mem_read;
    logic        mem_write;
    logic        branch;      // BEQ / BNE
    logic        branch_ne;
    logic        jump;        // J / JAL
    logic        jump_reg;    // JR
    logic        link;        // JAL: write pc + 4
    logic [25:0] jindex;
    logic        halt;
  } idex_t;

  // EX/MEM
  typedef struct packed {
    logic        valid;
    logic [31:0] result;
    logic [31:0] store_data;
    logic [4:0]  dest;
    logic        reg_write;
    logic        mem_read;
    logic        mem_write;
    logic        halt;
  } exmem_t;

  // MEM/WB
  typedef struct packed {
    logic        valid;
    logic [31:0] value;
    logic [4:0]  dest;
    logic        reg_write;
    logic        halt;
  } memwb_t;

endpackage

// jn_pkg: shared types and constants of the joinable narrow-operand datapath.
//
// The datapath partitions operands into blocks of BLK_W bits. A 32-bit word
// (XLEN) has XLEN/BLK_W operand blocks; the ALU is ALU_W bits wide, i.e.
// M = ALU_W/BLK_W ALU blocks. The defaults, 32-bit words, 4-bit blocks and a
// 40-bit ALU, are the configuration the design is built around; the widened
// ALU (40 instead of 32 bits) lets a full-width operation share the ALU with
// an operation of up to 8 bits.
//
// Width counts (SBN, RBN) and the operand-boundary are encoded as
// "number of blocks minus one", so a value that fits in one block has SBN 0
// and a boundary of M-1 means that operation 0 owns every ALU block.
//
// The instruction encoding is a small MIPS-like subset (R-type ADDU, SUBU,
// AND, OR, XOR; I-type ADDIU, ANDI, ORI, XORI, LW, SW). It is this
// implementation's choice: the datapath only needs ALU operations and
// loads/stores, which compute their address on the ALU.
package jn_pkg;

  localparam int unsigned JN_XLEN  = 32;
  localparam int unsigned JN_BLK_W = 4;
  localparam int unsigned JN_ALU_W = 40;

  // ALU function select, one per operation.
  typedef enum logic [2:0] {
    ALU_ADD = 3'd0,
    ALU_SUB = 3'd1,
    ALU_AND = 3'd2,
    ALU_OR  = 3'd3,
    ALU_XOR = 3'd4
  } alu_op_e;

  // Instruction class, used by the type-check.
  typedef enum logic [1:0] {
    CLS_NONE  = 2'd0,   // no-op or unknown: never executes, never joins
    CLS_ALU   = 2'd1,   // register / immediate ALU operation
    CLS_LOAD  = 2'd2,
    CLS_STORE = 2'd3
  } ins_class_e;

  // MIPS-like opcodes and function codes.
  localparam logic [5:0] OPC_RTYPE = 6'h00;
  localparam logic [5:0] OPC_ADDIU = 6'h09;
  localparam logic [5:0] OPC_ANDI  = 6'h0C;
  localparam logic [5:0] OPC_ORI   = 6'h0D;
  localparam logic [5:0] OPC_XORI  = 6'h0E;
  localparam logic [5:0] OPC_LW    = 6'h23;
  localparam logic [5:0] OPC_SW    = 6'h2B;
  localparam logic [5:0] FN_ADDU   = 6'h21;
  localparam logic [5:0] FN_SUBU   = 6'h23;
  localparam logic [5:0] FN_AND    = 6'h24;
  localparam logic [5:0] FN_OR     = 6'h25;
  localparam logic [5:0] FN_XOR    = 6'h26;

  // One decoded instruction.
  typedef struct packed {
    logic       valid;   // slot holds an instruction
    ins_class_e cls;
    alu_op_e    op;
    logic [4:0] rs;      // source A register
    logic [4:0] rt;      // source B register (R-type) or store data register
    logic [4:0] rd;      // destination register (0: none)
    logic       use_imm; // operand B is the immediate
    logic       reads_rt;// rt is read (R-type operand or store data)
    logic [31:0] imm;    // extended immediate
  } uop_t;

  // One operation on its way through EX and MEM: operands, function and
  // where its result goes.
  typedef struct packed {
    logic        valid;
    ins_class_e  cls;
    alu_op_e     op;
    logic [4:0]  rd;     // destination (0: none)
    logic [31:0] a;      // operand A
    logic [31:0] b;      // operand B (register or immediate)
    logic [31:0] sdata;  // store data
  } slot_t;

  // Event counters of the pipeline.
  typedef struct packed {
    logic [31:0] cycles;       // cycles since reset
    logic [31:0] retired;      // instructions written back (no-ops included)
    logic [31:0] issue_slots;  // cycles in which decode issued something
    logic [31:0] joined;       // pairs issued together
    logic [31:0] swapped;      // joined pairs whose operations were swapped
    logic [31:0] joined_mem;   // joined pairs containing a load
    logic [31:0] stalls;       // decode cycles lost to a pipeline interlock
    logic [31:0] fail_type;    // pairs refused by the type-check
    logic [31:0] fail_dep;     // pairs refused by the dependency check
    logic [31:0] fail_width;   // pairs refused by the width-check alone
  } perf_t;

endpackage

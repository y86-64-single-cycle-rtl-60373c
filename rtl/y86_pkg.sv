// y86_pkg: types and constants shared by the Y86-64 processors.
//
// Holds the instruction codes (first nibble of the first instruction byte),
// the register numbers, the ALU function codes, the condition codes used by
// cmovXX/jXX, the processor status values and the loader port struct that
// every processor uses to fill its memories before it runs.
//
// The instruction codes 0..B follow the instruction format table of the
// notes. The register numbering, the ALU function codes and the condition
// codes are not printed in the notes; they follow the usual Y86-64 values.
// The processors have no overflow flag, so the signed conditions are
// evaluated from ZF and SF alone.
package y86_pkg;

  typedef enum logic [3:0] {
    I_HALT   = 4'h0,
    I_NOP    = 4'h1,
    I_RRMOVQ = 4'h2,  // also cmovXX
    I_IRMOVQ = 4'h3,
    I_RMMOVQ = 4'h4,
    I_MRMOVQ = 4'h5,
    I_OPQ    = 4'h6,
    I_JXX    = 4'h7,
    I_CALL   = 4'h8,
    I_RET    = 4'h9,
    I_PUSHQ  = 4'hA,
    I_POPQ   = 4'hB
  } icode_e;

  typedef enum logic [1:0] {
    ALU_ADD = 2'd0,
    ALU_SUB = 2'd1,
    ALU_AND = 2'd2,
    ALU_XOR = 2'd3
  } alu_op_e;

  typedef enum logic [3:0] {
    C_ALWAYS = 4'h0,
    C_LE     = 4'h1,
    C_L      = 4'h2,
    C_E      = 4'h3,
    C_NE     = 4'h4,
    C_GE     = 4'h5,
    C_G      = 4'h6
  } cond_e;

  typedef enum logic [1:0] {
    STAT_AOK = 2'd0,  // running
    STAT_HLT = 2'd1,  // halt executed
    STAT_INS = 2'd2   // invalid instruction fetched
  } stat_e;

  localparam logic [3:0] REG_RAX  = 4'h0;
  localparam logic [3:0] REG_RCX  = 4'h1;
  localparam logic [3:0] REG_RDX  = 4'h2;
  localparam logic [3:0] REG_RBX  = 4'h3;
  localparam logic [3:0] REG_RSP  = 4'h4;
  localparam logic [3:0] REG_RBP  = 4'h5;
  localparam logic [3:0] REG_RSI  = 4'h6;
  localparam logic [3:0] REG_RDI  = 4'h7;
  localparam logic [3:0] REG_NONE = 4'hF;  // register #15: reads 0, writes ignored

  // Longest Y86-64 instruction: icode:ifun, rA:rB, 8-byte constant.
  localparam int unsigned MAX_INSTR_BYTES = 10;

  // Byte write into a processor's instruction memory (dmem = 0) or data
  // memory (dmem = 1). Used to place a program and its data before reset
  // is released.
  typedef struct packed {
    logic        we;
    logic        dmem;
    logic [63:0] addr;
    logic [7:0]  data;
  } load_t;

endpackage

// addq_cpu: the smallest processor of the notes, whose only instruction is
// addq rXX, rYY, encoded in a single byte: rXX in the high nibble, rYY in
// the low nibble, no opcode.
//
// Each clock cycle executes one instruction. The PC addresses the
// instruction memory; the two register numbers go to the register file's
// srcA (rXX) and srcB (rYY) read ports; the ALU adds the two values; the sum
// goes back through the dstE write port to rYY; and the PC register takes
// PC + 1. Register file and PC update together at the rising clock edge.
// The datapath follows the notes. The loader port, reset behaviour and the
// debug register port are this design's additions.
module addq_cpu
  import y86_pkg::*;
#(
  parameter int unsigned IMEM_BYTES = 1024
) (
  input  logic        clk,
  input  logic        rst_n,
  input  load_t       load_i,
  input  logic [3:0]  dbg_reg_i,
  output logic [63:0] dbg_reg_val_o,
  output logic [63:0] pc_o
);
  logic [63:0] pc, pc_next;
  logic [8*MAX_INSTR_BYTES-1:0] ibytes;
  logic [3:0]  rA, rB;
  logic [63:0] valA, valB, valE;
  logic        zf_unused, sf_unused;

  pc_reg u_pc (.clk, .rst_n, .en(1'b1), .pc_next, .pc);

  instr_mem #(.BYTES(IMEM_BYTES)) u_imem (
    .clk, .addr(pc), .data(ibytes),
    .wr_en(load_i.we && !load_i.dmem), .wr_addr(load_i.addr), .wr_byte(load_i.data));

  // split: one byte, two register numbers
  assign rA = ibytes[7:4];
  assign rB = ibytes[3:0];

  regfile u_rf (
    .clk, .rst_n, .srcA(rA), .srcB(rB), .valA, .valB,
    .dstE(rB), .valE, .dstM(REG_NONE), .valM(64'd0),
    .dbg_reg(dbg_reg_i), .dbg_val(dbg_reg_val_o));

  alu u_alu (.op(ALU_ADD), .a(valA), .b(valB), .y(valE), .zf(zf_unused), .sf(sf_unused));

  assign pc_next = pc + 64'd1;
  assign pc_o    = pc;
endmodule

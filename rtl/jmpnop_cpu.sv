// jmpnop_cpu: a processor for two real Y86-64 instructions, nop (one byte,
// 0x10) and jmp Dest (0x70 followed by the 8-byte little-endian target).
//
// The instruction bytes at the PC are split into the opcode (first byte's
// high nibble) and Dest (bytes 1..8). The opcode drives a multiplexer
// select: 1 for jmp, picking Dest, and 0 for nop, picking PC + 1. The PC
// register takes the multiplexer output at the rising clock edge, one
// instruction per cycle. This follows the notes. Treating every other
// opcode like nop, the loader port and the reset to 0 are this design's
// choices.
module jmpnop_cpu
  import y86_pkg::*;
#(
  parameter int unsigned IMEM_BYTES = 1024
) (
  input  logic        clk,
  input  logic        rst_n,
  input  load_t       load_i,
  output logic [63:0] pc_o
);
  logic [63:0] pc, pc_next, dest;
  logic [8*MAX_INSTR_BYTES-1:0] ibytes;
  logic [3:0]  opcode;
  logic        is_jmp;

  pc_reg u_pc (.clk, .rst_n, .en(1'b1), .pc_next, .pc);

  instr_mem #(.BYTES(IMEM_BYTES)) u_imem (
    .clk, .addr(pc), .data(ibytes),
    .wr_en(load_i.we && !load_i.dmem), .wr_addr(load_i.addr), .wr_byte(load_i.data));

  // split
  assign opcode = ibytes[7:4];
  assign dest   = ibytes[71:8];
  assign is_jmp = (opcode == I_JXX);

  mux4 #(.WIDTH(64)) u_pcsel (
    .sel({1'b0, is_jmp}), .a(pc + 64'd1), .b(dest), .c(64'd0), .d(64'd0), .y(pc_next));

  assign pc_o = pc;
endmodule

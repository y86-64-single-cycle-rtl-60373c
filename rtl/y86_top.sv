// y86_top: the six processors of the Y86-64 single-cycle notes, side by
// side, sharing only the clock and reset.
//
//   seq    full Y86-64 SEQ processor (all instructions, ZF/SF, Stat)
//   addq   1-byte addq rXX, rYY only
//   jmp    8-byte jump targets only
//   jnop   jmp (0x70 + Dest) and nop (0x10)
//   movreg rrmovq, irmovq, mrmovq
//   mov    rrmovq, irmovq, mrmovq, rmmovq
//
// Each processor has its own loader port (load_t: one byte per cycle into
// its instruction or data memory), its PC as an output and, where it has a
// register file, a debug read port. Hold reset low while loading, then
// release it; each processor then runs one instruction per clock cycle.
module y86_top
  import y86_pkg::*;
#(
  parameter int unsigned IMEM_BYTES = 1024,
  parameter int unsigned DMEM_BYTES = 1024
) (
  input  logic        clk,
  input  logic        rst_n,

  input  load_t       seq_load_i,
  input  logic [3:0]  seq_dbg_reg_i,
  output logic [63:0] seq_dbg_reg_val_o,
  output logic [63:0] seq_pc_o,
  output stat_e       seq_stat_o,
  output logic        seq_zf_o,
  output logic        seq_sf_o,

  input  load_t       addq_load_i,
  input  logic [3:0]  addq_dbg_reg_i,
  output logic [63:0] addq_dbg_reg_val_o,
  output logic [63:0] addq_pc_o,

  input  load_t       jmp_load_i,
  output logic [63:0] jmp_pc_o,

  input  load_t       jnop_load_i,
  output logic [63:0] jnop_pc_o,

  input  load_t       movreg_load_i,
  input  logic [3:0]  movreg_dbg_reg_i,
  output logic [63:0] movreg_dbg_reg_val_o,
  output logic [63:0] movreg_pc_o,

  input  load_t       mov_load_i,
  input  logic [3:0]  mov_dbg_reg_i,
  output logic [63:0] mov_dbg_reg_val_o,
  output logic [63:0] mov_pc_o
);
  seq_cpu #(.IMEM_BYTES(IMEM_BYTES), .DMEM_BYTES(DMEM_BYTES)) u_seq (
    .clk, .rst_n, .load_i(seq_load_i), .dbg_reg_i(seq_dbg_reg_i),
    .dbg_reg_val_o(seq_dbg_reg_val_o), .pc_o(seq_pc_o), .stat_o(seq_stat_o),
    .zf_o(seq_zf_o), .sf_o(seq_sf_o));

  addq_cpu #(.IMEM_BYTES(IMEM_BYTES)) u_addq (
    .clk, .rst_n, .load_i(addq_load_i), .dbg_reg_i(addq_dbg_reg_i),
    .dbg_reg_val_o(addq_dbg_reg_val_o), .pc_o(addq_pc_o));

  jmp_cpu #(.IMEM_BYTES(IMEM_BYTES)) u_jmp (
    .clk, .rst_n, .load_i(jmp_load_i), .pc_o(jmp_pc_o));

  jmpnop_cpu #(.IMEM_BYTES(IMEM_BYTES)) u_jnop (
    .clk, .rst_n, .load_i(jnop_load_i), .pc_o(jnop_pc_o));

  movreg_cpu #(.IMEM_BYTES(IMEM_BYTES), .DMEM_BYTES(DMEM_BYTES)) u_movreg (
    .clk, .rst_n, .load_i(movreg_load_i), .dbg_reg_i(movreg_dbg_reg_i),
    .dbg_reg_val_o(movreg_dbg_reg_val_o), .pc_o(movreg_pc_o));

  mov_cpu #(.IMEM_BYTES(IMEM_BYTES), .DMEM_BYTES(DMEM_BYTES)) u_mov (
    .clk, .rst_n, .load_i(mov_load_i), .dbg_reg_i(mov_dbg_reg_i),
    .dbg_reg_val_o(mov_dbg_reg_val_o), .pc_o(mov_pc_o));
endmodule

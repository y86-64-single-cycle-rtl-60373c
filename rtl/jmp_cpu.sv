// jmp_cpu: a processor whose only instruction is jmp. Every instruction is
// 8 bytes long and is nothing but the little-endian target address.
//
// The PC addresses the instruction memory, and the 8 bytes read there are
// fed straight back as the next PC, taken at the rising clock edge: one
// jump per cycle. This loop is the datapath of the notes. The loader port
// and the reset to address 0 are this design's additions.
module jmp_cpu
  import y86_pkg::*;
#(
  parameter int unsigned IMEM_BYTES = 1024
) (
  input  logic        clk,
  input  logic        rst_n,
  input  load_t       load_i,
  output logic [63:0] pc_o
);
  logic [63:0] pc;
  logic [8*MAX_INSTR_BYTES-1:0] ibytes;

  pc_reg u_pc (.clk, .rst_n, .en(1'b1), .pc_next(ibytes[63:0]), .pc);

  instr_mem #(.BYTES(IMEM_BYTES)) u_imem (
    .clk, .addr(pc), .data(ibytes),
    .wr_en(load_i.we && !load_i.dmem), .wr_addr(load_i.addr), .wr_byte(load_i.data));

  assign pc_o = pc;
endmodule

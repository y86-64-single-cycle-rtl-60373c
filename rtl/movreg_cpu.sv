// movreg_cpu: single-cycle processor for the three Y86-64 moves into a
// register: rrmovq rA, rB (2 0 rA rB), irmovq V, rB (3 0 F rB V) and
// mrmovq D(rB), rA (5 0 rA rB D), with V and D 8-byte little-endian.
//
// Fetch splits the bytes at the PC into icode, rA, rB and the constant
// valC and computes the length (2 or 10 bytes). Decode reads R[rA] and
// R[rB]. Execute uses the ALU as an adder: R[rA] + 0 for rrmovq, V + 0 for
// irmovq, D + R[rB] (the address) for mrmovq. Memory reads the 8 bytes at
// that address for mrmovq. Write back sends the ALU result to rB through
// the dstE port (rrmovq, irmovq) or the memory value to rA through the dstM
// port (mrmovq), and the PC takes PC + length; all state changes at the
// rising clock edge. The datapath and the multiplexer choices follow the
// notes. Running any other opcode as a one-byte no-op, the memory size, the
// loader port and the reset are this design's choices.
module movreg_cpu
  import y86_pkg::*;
#(
  parameter int unsigned IMEM_BYTES = 1024,
  parameter int unsigned DMEM_BYTES = 1024
) (
  input  logic        clk,
  input  logic        rst_n,
  input  load_t       load_i,
  input  logic [3:0]  dbg_reg_i,
  output logic [63:0] dbg_reg_val_o,
  output logic [63:0] pc_o
);
  logic [63:0] pc, pc_next, valC, valA, valB, aluA, aluB, valE, valM;
  logic [8*MAX_INSTR_BYTES-1:0] ibytes;
  icode_e      icode;
  logic [3:0]  rA, rB, dstE, dstM;
  logic        zf_unused, sf_unused;

  pc_reg u_pc (.clk, .rst_n, .en(1'b1), .pc_next, .pc);

  instr_mem #(.BYTES(IMEM_BYTES)) u_imem (
    .clk, .addr(pc), .data(ibytes),
    .wr_en(load_i.we && !load_i.dmem), .wr_addr(load_i.addr), .wr_byte(load_i.data));

  // fetch: split and length
  assign icode = icode_e'(ibytes[7:4]);
  assign rA    = ibytes[15:12];
  assign rB    = ibytes[11:8];
  assign valC  = ibytes[79:16];

  always_comb begin
    unique case (icode)
      I_RRMOVQ:         pc_next = pc + 64'd2;
      I_IRMOVQ, I_MRMOVQ: pc_next = pc + 64'd10;
      default:          pc_next = pc + 64'd1;
    endcase
  end

  // decode / write back register selection
  always_comb begin
    dstE = REG_NONE;
    dstM = REG_NONE;
    aluA = 64'd0;
    aluB = 64'd0;
    unique case (icode)
      I_RRMOVQ: begin dstE = rB; aluA = valA; end
      I_IRMOVQ: begin dstE = rB; aluA = valC; end
      I_MRMOVQ: begin dstM = rA; aluA = valC; aluB = valB; end
      default: ;
    endcase
  end

  regfile u_rf (
    .clk, .rst_n, .srcA(rA), .srcB(rB), .valA, .valB,
    .dstE, .valE, .dstM, .valM,
    .dbg_reg(dbg_reg_i), .dbg_val(dbg_reg_val_o));

  // execute
  alu u_alu (.op(ALU_ADD), .a(aluA), .b(aluB), .y(valE), .zf(zf_unused), .sf(sf_unused));

  // memory: read only
  data_mem #(.BYTES(DMEM_BYTES)) u_dmem (
    .clk, .rd_addr(valE), .rd_data(valM),
    .wr_en(1'b0), .wr_addr(64'd0), .wr_data(64'd0),
    .ld_en(load_i.we && load_i.dmem), .ld_addr(load_i.addr), .ld_byte(load_i.data));

  assign pc_o = pc;
endmodule

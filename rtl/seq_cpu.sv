// seq_cpu: single-cycle ("SEQ") Y86-64 processor.
//
// Every instruction of the Y86-64 format table (halt, nop, rrmovq/cmovXX,
// irmovq, rmmovq, mrmovq, OPq, jXX, call, ret, pushq, popq) completes in one
// clock cycle. The cycle is divided into stages only for design
// convenience, all of them combinational logic between the state elements:
//   fetch      read the instruction bytes at the PC, split them into
//              icode:ifun, rA:rB and valC, compute the length and valP
//   decode     read R[srcA] and R[srcB] from the register file
//   execute    the ALU computes valE (arithmetic or an address) and, for
//              OPq, the new ZF/SF; the condition Cnd is evaluated
//   memory     read valM from, or write to, the data memory
//   write back valE to R[dstE] and valM to R[dstM]
//   PC update  choose the next PC among valP, valC and valM
// Every stage reads the values the state elements hold from the previous
// cycle and sends new values to them; multiplexers pick what each state
// element receives. At the rising clock edge the PC, the condition codes,
// the register file, the data memory and the status all update together.
//
// State, as the notes list it: 15 registers (%r15 is absent and number 15
// means "none"), the ZF and SF flags (no OF, no CF), the status Stat, the PC
// and memory. Instruction and data memory are separate arrays.
//
// Own choices (not given by the notes): the ifun codes of OPq and of the
// conditions and the register numbers are the usual Y86-64 ones; because
// there is no OF flag, "less" means SF and "less or equal" means SF|ZF;
// reset sets PC = 0, all registers 0, ZF = 1, SF = 0, Stat = AOK; executing
// halt sets Stat to HLT and an unknown icode or ifun sets it to INS; once
// Stat is not AOK the processor is frozen. Memory addresses wrap modulo the
// memory sizes.
module seq_cpu
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
  output logic [63:0] pc_o,
  output stat_e       stat_o,
  output logic        zf_o,
  output logic        sf_o
);
  // state outside the register file and the memories
  logic [63:0] pc;
  stat_e       stat_q;
  logic        zf_q, sf_q;

  // fetch
  logic [8*MAX_INSTR_BYTES-1:0] ibytes;
  icode_e      icode;
  logic [3:0]  ifun, rA, rB;
  logic [63:0] valC, valP;
  logic        instr_valid, need_regids, need_valC;

  // decode / execute / memory / write back / PC update
  logic [3:0]  srcA, srcB, dstE, dstM;
  logic [63:0] valA, valB, aluA, aluB, valE, valM, mem_addr, mem_data, pc_next;
  alu_op_e     alu_fun;
  logic        alu_zf, alu_sf, set_cc, cnd, mem_write;
  logic        running;
  stat_e       stat_next;

  assign running = (stat_q == STAT_AOK);

  //--------------------------------------------------------------- fetch
  instr_mem #(.BYTES(IMEM_BYTES)) u_imem (
    .clk, .addr(pc), .data(ibytes),
    .wr_en(load_i.we && !load_i.dmem), .wr_addr(load_i.addr), .wr_byte(load_i.data));

  assign icode = icode_e'(ibytes[7:4]);
  assign ifun  = ibytes[3:0];

  always_comb begin
    unique case (icode)
      I_HALT, I_NOP, I_IRMOVQ, I_RMMOVQ, I_MRMOVQ, I_CALL, I_RET, I_PUSHQ, I_POPQ:
        instr_valid = (ifun == 4'h0);
      I_RRMOVQ, I_JXX:
        instr_valid = (ifun <= 4'h6);
      I_OPQ:
        instr_valid = (ifun <= 4'h3);
      default:
        instr_valid = 1'b0;
    endcase
  end

  assign need_regids = icode inside {I_RRMOVQ, I_IRMOVQ, I_RMMOVQ, I_MRMOVQ,
                                     I_OPQ, I_PUSHQ, I_POPQ};
  assign need_valC   = icode inside {I_IRMOVQ, I_RMMOVQ, I_MRMOVQ, I_JXX, I_CALL};

  assign rA   = need_regids ? ibytes[15:12] : REG_NONE;
  assign rB   = need_regids ? ibytes[11:8]  : REG_NONE;
  assign valC = need_regids ? ibytes[79:16] : ibytes[71:8];
  assign valP = pc + 64'd1 + (need_regids ? 64'd1 : 64'd0) + (need_valC ? 64'd8 : 64'd0);

  //-------------------------------------------------------------- decode
  always_comb begin
    srcA = REG_NONE;
    srcB = REG_NONE;
    dstE = REG_NONE;
    dstM = REG_NONE;
    unique case (icode)
      I_RRMOVQ: begin srcA = rA;                     dstE = cnd ? rB : REG_NONE; end
      I_IRMOVQ: begin                                dstE = rB;                  end
      I_RMMOVQ: begin srcA = rA;      srcB = rB;                                 end
      I_MRMOVQ: begin                 srcB = rB;     dstM = rA;                  end
      I_OPQ:    begin srcA = rA;      srcB = rB;     dstE = rB;                  end
      I_CALL:   begin                 srcB = REG_RSP; dstE = REG_RSP;            end
      I_RET:    begin srcA = REG_RSP; srcB = REG_RSP; dstE = REG_RSP;            end
      I_PUSHQ:  begin srcA = rA;      srcB = REG_RSP; dstE = REG_RSP;            end
      I_POPQ:   begin srcA = REG_RSP; srcB = REG_RSP; dstE = REG_RSP; dstM = rA; end
      default: ;
    endcase
    if (!running || !instr_valid) begin
      dstE = REG_NONE;
      dstM = REG_NONE;
    end
  end

  regfile u_rf (
    .clk, .rst_n, .srcA, .srcB, .valA, .valB,
    .dstE, .valE, .dstM, .valM,
    .dbg_reg(dbg_reg_i), .dbg_val(dbg_reg_val_o));

  //------------------------------------------------------------- execute
  always_comb begin
    aluA    = 64'd0;
    aluB    = 64'd0;
    alu_fun = ALU_ADD;
    unique case (icode)
      I_RRMOVQ:          begin aluA = valA;                    end
      I_IRMOVQ:          begin aluA = valC;                    end
      I_RMMOVQ, I_MRMOVQ: begin aluA = valC;       aluB = valB; end
      I_OPQ:             begin aluA = valA;        aluB = valB; alu_fun = alu_op_e'(ifun[1:0]); end
      I_CALL, I_PUSHQ:   begin aluA = -64'sd8;     aluB = valB; end
      I_RET, I_POPQ:     begin aluA = 64'd8;       aluB = valB; end
      default: ;
    endcase
  end

  alu u_alu (.op(alu_fun), .a(aluA), .b(aluB), .y(valE), .zf(alu_zf), .sf(alu_sf));

  assign set_cc = (icode == I_OPQ) && instr_valid && running;

  // condition from the flags held since the previous cycle
  always_comb begin
    unique case (cond_e'(ifun))
      C_ALWAYS: cnd = 1'b1;
      C_LE:     cnd = sf_q | zf_q;
      C_L:      cnd = sf_q;
      C_E:      cnd = zf_q;
      C_NE:     cnd = !zf_q;
      C_GE:     cnd = !sf_q;
      C_G:      cnd = !sf_q && !zf_q;
      default:  cnd = 1'b0;
    endcase
  end

  //-------------------------------------------------------------- memory
  assign mem_write = running && instr_valid && (icode inside {I_RMMOVQ, I_PUSHQ, I_CALL});
  assign mem_addr  = (icode inside {I_POPQ, I_RET}) ? valA : valE;
  assign mem_data  = (icode == I_CALL) ? valP : valA;

  data_mem #(.BYTES(DMEM_BYTES)) u_dmem (
    .clk, .rd_addr(mem_addr), .rd_data(valM),
    .wr_en(mem_write && rst_n), .wr_addr(mem_addr), .wr_data(mem_data),
    .ld_en(load_i.we && load_i.dmem), .ld_addr(load_i.addr), .ld_byte(load_i.data));

  //----------------------------------------------------------- PC update
  always_comb begin
    unique case (icode)
      I_CALL:  pc_next = valC;
      I_JXX:   pc_next = cnd ? valC : valP;
      I_RET:   pc_next = valM;
      default: pc_next = valP;
    endcase
  end

  always_comb begin
    if (!instr_valid)          stat_next = STAT_INS;
    else if (icode == I_HALT)  stat_next = STAT_HLT;
    else                       stat_next = STAT_AOK;
  end

  pc_reg u_pc (.clk, .rst_n, .en(running && stat_next == STAT_AOK), .pc_next, .pc);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      stat_q <= STAT_AOK;
      zf_q   <= 1'b1;
      sf_q   <= 1'b0;
    end else begin
      if (running) stat_q <= stat_next;
      if (set_cc) begin
        zf_q <= alu_zf;
        sf_q <= alu_sf;
      end
    end
  end

  assign pc_o   = pc;
  assign stat_o = stat_q;
  assign zf_o   = zf_q;
  assign sf_o   = sf_q;
endmodule

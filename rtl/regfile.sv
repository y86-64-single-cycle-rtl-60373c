// regfile: Y86-64 register file, 15 registers of 64 bits.
//
// Two read ports (srcA, srcB) are combinational: a value appears a short
// time after the register number is presented. Two write ports (dstE with
// valE, dstM with valM) write at the rising clock edge. Register number 15
// means "no register": reading it gives 0 and writing it is ignored. These
// port names and the 15/0 rule come from the notes. When both write ports
// name the same register in one cycle the M port wins, and reset clears
// every register to 0: both are this design's choices. A third read port
// (dbg) lets a test bench or a debugger look at any register.
module regfile
  import y86_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic [3:0]  srcA,
  input  logic [3:0]  srcB,
  output logic [63:0] valA,
  output logic [63:0] valB,
  input  logic [3:0]  dstE,
  input  logic [63:0] valE,
  input  logic [3:0]  dstM,
  input  logic [63:0] valM,
  input  logic [3:0]  dbg_reg,
  output logic [63:0] dbg_val
);
  logic [63:0] regs [15];

  function automatic logic [63:0] rd(input logic [3:0] n);
    return (n == REG_NONE) ? 64'd0 : regs[n];
  endfunction

  assign valA    = rd(srcA);
  assign valB    = rd(srcB);
  assign dbg_val = rd(dbg_reg);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int i = 0; i < 15; i++) regs[i] <= 64'd0;
    end else begin
      for (int i = 0; i < 15; i++) begin
        if (dstM == 4'(i))      regs[i] <= valM;
        else if (dstE == 4'(i)) regs[i] <= valE;
      end
    end
  end
endmodule

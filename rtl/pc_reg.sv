// pc_reg: the program counter, a 64-bit edge-triggered register.
//
// The output shows the value captured at the last rising clock edge and
// holds it for the whole cycle; the input may change freely between edges
// and only its value just before the next rising edge is taken. Clearing to
// RESET_PC on an active-low synchronous reset and the enable input (used to
// freeze a halted processor) are this design's additions.
module pc_reg #(
  parameter logic [63:0] RESET_PC = 64'h0
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        en,
  input  logic [63:0] pc_next,
  output logic [63:0] pc
);
  always_ff @(posedge clk) begin
    if (!rst_n)  pc <= RESET_PC;
    else if (en) pc <= pc_next;
  end
endmodule

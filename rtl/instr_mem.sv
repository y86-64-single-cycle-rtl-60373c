// instr_mem: byte-addressed instruction memory.
//
// Reads are combinational: given an address, the MAX_INSTR_BYTES (10) bytes
// starting there appear on the data output, byte 0 of the instruction in
// bits 7:0, which is enough to hold the longest Y86-64 instruction. The
// processor splits the bytes it needs. Addresses wrap modulo BYTES, which
// must be a power of two. The write port is a loader: one byte per rising
// clock edge, used to place a program before the processor runs. The size
// and the loader are this design's choices; the notes only show an address
// going in and instruction data coming out.
module instr_mem
  import y86_pkg::*;
#(
  parameter int unsigned BYTES = 1024
) (
  input  logic                           clk,
  input  logic [63:0]                    addr,
  output logic [8*MAX_INSTR_BYTES-1:0]   data,
  input  logic                           wr_en,
  input  logic [63:0]                    wr_addr,
  input  logic [7:0]                     wr_byte
);
  localparam int unsigned AW = $clog2(BYTES);
  logic [7:0] mem [BYTES];

  always_comb begin
    for (int i = 0; i < MAX_INSTR_BYTES; i++)
      data[8*i +: 8] = mem[AW'(addr + 64'(i))];
  end

  always_ff @(posedge clk) begin
    if (wr_en) mem[AW'(wr_addr)] <= wr_byte;
  end
endmodule

// data_mem: byte-addressed data memory with 8-byte little-endian words.
//
// Reads are combinational: the 8 bytes from rd_addr appear on rd_data a
// short time after the address. A write of wr_data to the 8 bytes at
// wr_addr takes effect at the rising clock edge while wr_en is high, so the
// new value is readable in the next cycle, as in the memory timing diagram
// of the notes. A second, byte-wide write port serves as a loader for
// initial data; if both write the same byte in one cycle the word port wins.
// Addresses wrap modulo BYTES (a power of two). Size, wrap and loader are
// this design's choices.
module data_mem #(
  parameter int unsigned BYTES = 1024
) (
  input  logic        clk,
  input  logic [63:0] rd_addr,
  output logic [63:0] rd_data,
  input  logic        wr_en,
  input  logic [63:0] wr_addr,
  input  logic [63:0] wr_data,
  input  logic        ld_en,
  input  logic [63:0] ld_addr,
  input  logic [7:0]  ld_byte
);
  localparam int unsigned AW = $clog2(BYTES);
  logic [7:0] mem [BYTES];

  always_comb begin
    for (int i = 0; i < 8; i++)
      rd_data[8*i +: 8] = mem[AW'(rd_addr + 64'(i))];
  end

  always_ff @(posedge clk) begin
    if (ld_en) mem[AW'(ld_addr)] <= ld_byte;
    if (wr_en) begin
      for (int i = 0; i < 8; i++)
        mem[AW'(wr_addr + 64'(i))] <= wr_data[8*i +: 8];
    end
  end
endmodule

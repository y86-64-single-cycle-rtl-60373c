// mux4: four-input multiplexer of WIDTH-bit words.
//
// The 2-bit select picks the output: 00 -> a, 01 -> b, 10 -> c, 11 -> d
// (select bit 1 is the high bit), exactly as in the truth table of the
// notes. Purely combinational. The width parameter is this design's.
module mux4 #(
  parameter int unsigned WIDTH = 64
) (
  input  logic [1:0]       sel,
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  input  logic [WIDTH-1:0] c,
  input  logic [WIDTH-1:0] d,
  output logic [WIDTH-1:0] y
);
  always_comb begin
    unique case (sel)
      2'b00: y = a;
      2'b01: y = b;
      2'b10: y = c;
      default: y = d;
    endcase
  end
endmodule

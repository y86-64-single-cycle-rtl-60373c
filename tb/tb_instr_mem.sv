// tb_instr_mem: fills the instruction memory through its byte write port,
// then reads ten-byte windows at random addresses, including windows that
// run past the last byte and wrap to address 0, and compares with a model.
module tb_instr_mem;
  localparam int unsigned BYTES = 256;
  logic        clk = 0, wr_en = 0;
  logic [63:0] addr = 0, wr_addr = 0;
  logic [7:0]  wr_byte = 0;
  logic [79:0] data, exp;
  logic [7:0]  model [BYTES];
  int checks = 0, failures = 0;

  instr_mem #(.BYTES(BYTES)) dut (.clk, .addr, .data, .wr_en, .wr_addr, .wr_byte);

  always #5 clk = ~clk;

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < BYTES; i++) begin
      wr_en = 1; wr_addr = 64'(i); wr_byte = 8'($urandom); model[i] = wr_byte;
      @(posedge clk); #1;
    end
    wr_en = 0;
    for (int i = 0; i < 300; i++) begin
      addr = (i < 20) ? 64'(BYTES - 10 + i) : {$urandom, $urandom};
      #1;
      for (int k = 0; k < 10; k++) exp[8*k +: 8] = model[(addr + 64'(k)) % BYTES];
      checks++;
      if (data !== exp) begin
        failures++;
        $display("FAIL addr=%h data=%h expected %h", addr, data, exp);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_data_mem: checks the data memory against a byte-array model. Random
// 8-byte writes at random (also unaligned and wrapping) addresses, byte
// loads, and combinational reads. A write is checked to be invisible
// before the rising edge and visible right after it.
module tb_data_mem;
  localparam int unsigned BYTES = 128;
  logic        clk = 0, wr_en = 0, ld_en = 0;
  logic [63:0] rd_addr = 0, rd_data, wr_addr = 0, wr_data = 0, ld_addr = 0, exp;
  logic [7:0]  ld_byte = 0;
  logic [7:0]  model [BYTES];
  int checks = 0, failures = 0;

  data_mem #(.BYTES(BYTES)) dut (.clk, .rd_addr, .rd_data, .wr_en, .wr_addr, .wr_data,
                                 .ld_en, .ld_addr, .ld_byte);

  always #5 clk = ~clk;

  function automatic logic [63:0] mread(logic [63:0] a);
    logic [63:0] v;
    for (int k = 0; k < 8; k++) v[8*k +: 8] = model[(a + 64'(k)) % BYTES];
    return v;
  endfunction

  task automatic chk(string what);
    #1;
    exp = mread(rd_addr);
    checks++;
    if (rd_data !== exp) begin
      failures++;
      $display("FAIL %s addr=%h data=%h expected %h", what, rd_addr, rd_data, exp);
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < BYTES; i++) begin
      ld_en = 1; ld_addr = 64'(i); ld_byte = 8'($urandom); model[i] = ld_byte;
      @(posedge clk); #1;
    end
    ld_en = 0;
    for (int i = 0; i < 400; i++) begin
      wr_en   = ($urandom % 2) == 1;
      wr_addr = (i % 10 == 0) ? 64'(BYTES - 3) : 64'($urandom);
      wr_data = {$urandom, $urandom};
      rd_addr = wr_addr;
      chk("before edge");
      @(posedge clk); #1;
      if (wr_en) for (int k = 0; k < 8; k++) model[(wr_addr + 64'(k)) % BYTES] = wr_data[8*k +: 8];
      wr_en = 0;
      chk("after edge");
      rd_addr = 64'($urandom);
      chk("random read");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_jmp_cpu: runs the jump-only processor.
// Part 1 is the three-jump example: jmp 0x10 at 0x00, jmp 0x00 at 0x08,
// jmp 0x08 at 0x10; from PC=0x00 the PC goes 0x10, 0x08, 0x00 and repeats,
// one jump per cycle. Part 2 fills the memory with random 8-byte targets and
// follows the chain in a model, wrapping addresses at the memory size.
module tb_jmp_cpu;
  import y86_pkg::*;
  localparam int unsigned IMEM = 256;
  logic        clk = 0, rst_n = 0;
  load_t       load_i = '0;
  logic [63:0] pc_o, mpc;
  logic [7:0]  prog [IMEM];
  logic [63:0] exp_seq [3] = '{64'h10, 64'h08, 64'h00};
  int checks = 0, failures = 0;

  jmp_cpu #(.IMEM_BYTES(IMEM)) dut (.clk, .rst_n, .load_i, .pc_o);

  always #50 clk = ~clk;

  task automatic chk(logic [63:0] got, logic [63:0] exp, string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  task automatic load(logic [63:0] a, logic [7:0] d);
    load_i = '{we: 1'b1, dmem: 1'b0, addr: a, data: d};
    @(posedge clk); #1;
    load_i = '0;
  endtask

  task automatic load_q(logic [63:0] a, logic [63:0] v);
    for (int k = 0; k < 8; k++) load(a + 64'(k), v[8*k +: 8]);
  endtask

  function automatic logic [63:0] target(logic [63:0] a);
    logic [63:0] v;
    for (int k = 0; k < 8; k++) v[8*k +: 8] = prog[(a + 64'(k)) % IMEM];
    return v;
  endfunction

  initial begin
    #100000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    load_q(64'h00, 64'h10);
    load_q(64'h08, 64'h00);
    load_q(64'h10, 64'h08);
    @(posedge clk); #1;
    chk(pc_o, 64'h0, "example initial PC");
    rst_n = 1;
    for (int c = 0; c < 9; c++) begin
      @(posedge clk); #1;
      chk(pc_o, exp_seq[c % 3], $sformatf("example cycle %0d", c + 1));
    end

    rst_n = 0;
    for (int i = 0; i < IMEM; i++) begin
      prog[i] = 8'($urandom);
      load(64'(i), prog[i]);
    end
    @(posedge clk); #1;
    rst_n = 1;
    mpc = 0;
    for (int c = 0; c < 500; c++) begin
      @(posedge clk); #1;
      mpc = target(mpc);
      chk(pc_o, mpc, $sformatf("random cycle %0d", c));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

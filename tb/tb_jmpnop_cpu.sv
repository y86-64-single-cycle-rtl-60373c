// tb_jmpnop_cpu: runs the jmp+nop processor on five random programs of nop
// (0x10), jmp (0x70 + 8-byte target) and a few other one-byte opcodes, laid
// out back to back with jump targets at instruction starts. The PC is
// checked after every cycle against a model: nop goes to PC + 1, jmp to its
// target. Both kinds must be seen.
module tb_jmpnop_cpu;
  import y86_pkg::*;
  localparam int unsigned IMEM = 512;
  logic        clk = 0, rst_n = 0;
  load_t       load_i = '0;
  logic [63:0] pc_o, mpc, t;
  logic [7:0]  prog [IMEM];
  int          starts [$];
  int checks = 0, failures = 0, n_jmp = 0, n_nop = 0;

  jmpnop_cpu #(.IMEM_BYTES(IMEM)) dut (.clk, .rst_n, .load_i, .pc_o);

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

  initial begin
    #100000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int a;
    for (int run = 0; run < 5; run++) begin
    rst_n = 0;
    starts.delete();
    // lay out: first decide kinds, then fill jump targets
    a = 0;
    foreach (prog[i]) prog[i] = 8'h10;
    while (a + 9 <= IMEM) begin
      starts.push_back(a);
      if ($urandom % 4 == 0) begin prog[a] = 8'h70; a += 9; end
      else begin prog[a] = ($urandom % 8 == 0) ? 8'h60 : 8'h10; a += 1; end
    end
    foreach (starts[i]) begin
      if (prog[starts[i]] == 8'h70) begin
        t = 64'(starts[$urandom % starts.size()]);
        for (int k = 0; k < 8; k++) prog[starts[i] + 1 + k] = t[8*k +: 8];
      end
    end
    for (int i = 0; i < IMEM; i++) load(64'(i), prog[i]);
    @(posedge clk); #1;
    chk(pc_o, 0, "reset PC");
    rst_n = 1;
    mpc = 0;
    for (int c = 0; c < 400; c++) begin
      @(posedge clk); #1;
      if (prog[mpc % IMEM][7:4] == 4'h7) begin
        for (int k = 0; k < 8; k++) t[8*k +: 8] = prog[(mpc + 64'(1 + k)) % IMEM];
        mpc = t;
        n_jmp++;
      end else begin
        mpc = mpc + 1;
        n_nop++;
      end
      chk(pc_o, mpc, $sformatf("run %0d cycle %0d", run, c));
    end
    end
    checks++;
    if (n_jmp == 0 || n_nop == 0) begin
      failures++;
      $display("FAIL coverage jmp=%0d nop=%0d", n_jmp, n_nop);
    end
    $display("jmp=%0d nop=%0d", n_jmp, n_nop);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_addq_cpu: runs the addq-only processor.
// Part 1 is the two-instruction example: addq %rax,%rdx at 0x00 and
// addq %rbx,%rdx at 0x01, starting from rax=1, rbx=2, rdx=3; after cycle 1
// PC=0x01 and rdx=4, after cycle 2 PC=0x02 and rdx=6.
// Part 2 fills the memory with random addq bytes (register 15 included),
// starts from random register values and checks the PC and every register
// after each cycle against a model: one instruction per cycle, PC + 1.
module tb_addq_cpu;
  import y86_pkg::*;
  localparam int unsigned IMEM = 256;
  logic        clk = 0, rst_n = 0;
  load_t       load_i = '0;
  logic [3:0]  dbg_reg_i = 0;
  logic [63:0] dbg_reg_val_o, pc_o;
  logic [63:0] r [16];
  logic [7:0]  prog [IMEM];
  logic [63:0] mpc;
  int checks = 0, failures = 0;

  addq_cpu #(.IMEM_BYTES(IMEM)) dut (.clk, .rst_n, .load_i, .dbg_reg_i, .dbg_reg_val_o, .pc_o);

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

  task automatic check_state(string when);
    chk(pc_o, mpc, {when, " PC"});
    for (int k = 0; k < 15; k++) begin
      dbg_reg_i = 4'(k); #1;
      chk(dbg_reg_val_o, r[k], $sformatf("%s R[%0d]", when, k));
    end
  endtask

  initial begin
    #100000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // ---- part 1: the worked example
    load(0, {REG_RAX, REG_RDX});
    load(1, {REG_RBX, REG_RDX});
    @(posedge clk); #1;                 // reset clears the registers
    dut.u_rf.regs[REG_RAX] = 64'd1;
    dut.u_rf.regs[REG_RBX] = 64'd2;
    dut.u_rf.regs[REG_RDX] = 64'd3;
    rst_n = 1;
    @(posedge clk); #1;
    chk(pc_o, 64'h01, "example cycle 1 PC");
    dbg_reg_i = REG_RDX; #1; chk(dbg_reg_val_o, 64'd4, "example cycle 1 rdx");
    dbg_reg_i = REG_RAX; #1; chk(dbg_reg_val_o, 64'd1, "example cycle 1 rax");
    @(posedge clk); #1;
    chk(pc_o, 64'h02, "example cycle 2 PC");
    dbg_reg_i = REG_RDX; #1; chk(dbg_reg_val_o, 64'd6, "example cycle 2 rdx");
    dbg_reg_i = REG_RBX; #1; chk(dbg_reg_val_o, 64'd2, "example cycle 2 rbx");

    // ---- part 2: random program
    rst_n = 0;
    for (int i = 0; i < IMEM; i++) begin
      prog[i] = 8'($urandom);
      load(64'(i), prog[i]);
    end
    @(posedge clk); #1;
    for (int k = 0; k < 15; k++) begin
      r[k] = {$urandom, $urandom};
      dut.u_rf.regs[k] = r[k];
    end
    r[15] = 0;
    mpc = 0;
    rst_n = 1;
    check_state("start");
    for (int c = 0; c < 600; c++) begin
      @(posedge clk); #1;
      begin
        logic [3:0] x, y;
        x = prog[mpc % IMEM][7:4];
        y = prog[mpc % IMEM][3:0];
        if (y != 4'hF) r[y] = r[y] + r[x];
        mpc = mpc + 1;
      end
      check_state($sformatf("cycle %0d", c));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

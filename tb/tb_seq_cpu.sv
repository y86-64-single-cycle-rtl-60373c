// tb_seq_cpu: checks the single-cycle Y86-64 processor.
//
// Program 1 is the addOne function (irmovq $1,%rax; addq %rdi,%rax; ret)
// called with %rdi = 41: %rax must be 42, the return address must be on the
// stack, and halt must be reached after exactly 7 cycles, one per
// instruction. A pushq is then watched within its cycle: memory, %rsp and
// the PC keep their old values until the rising edge and all change at it. Program 2 sums a four-element array in a loop (mrmovq,
// addq, subq, jne), stores the sum (rmmovq), moves it through the stack
// (pushq/popq), and tests andq, xorq and a taken and a not-taken cmov.
// Then random programs of every instruction kind run against the reference
// model, with PC, all registers, ZF/SF and status compared after every
// cycle and the data memory at the end of each run. Each instruction kind,
// taken and not-taken conditions, halt and the invalid-instruction status
// must each be seen at least once.
module tb_seq_cpu;
  import y86_pkg::*;
  import y86_iss_pkg::*;
  localparam int unsigned IMEM = 1024, DMEM = 1024;
  logic        clk = 0, rst_n = 0;
  load_t       load_i = '0;
  logic [3:0]  dbg_reg_i = 0;
  logic [63:0] dbg_reg_val_o, pc_o;
  stat_e       stat_o;
  logic        zf_o, sf_o;
  y86_iss #(IMEM, DMEM) m;
  logic [7:0]  prog [$];
  int checks = 0, failures = 0;
  int cov [string];
  logic [7:0]  m_pre_78;
  string names [$] = '{"halt", "nop", "rrmovq", "cmov", "irmovq", "rmmovq", "mrmovq",
                       "addq", "subq", "andq", "xorq", "jxx", "call", "ret", "pushq",
                       "popq", "invalid", "taken", "not_taken"};

  seq_cpu #(.IMEM_BYTES(IMEM), .DMEM_BYTES(DMEM)) dut (
    .clk, .rst_n, .load_i, .dbg_reg_i, .dbg_reg_val_o, .pc_o, .stat_o, .zf_o, .sf_o);

  always #50 clk = ~clk;

  task automatic chk(logic [63:0] got, logic [63:0] exp, string what);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 20) $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  task automatic load(bit dm, logic [63:0] a, logic [7:0] d);
    load_i = '{we: 1'b1, dmem: dm, addr: a, data: d};
    @(posedge clk); #1;
    load_i = '0;
  endtask

  task automatic chk_reg(logic [3:0] n, logic [63:0] exp, string what);
    dbg_reg_i = n;
    #1;
    chk(dbg_reg_val_o, exp, what);
  endtask

  // little assembler helpers
  function automatic void b1(logic [7:0] b);
    prog.push_back(b);
  endfunction
  function automatic void q8(logic [63:0] v);
    for (int k = 0; k < 8; k++) prog.push_back(v[8*k +: 8]);
  endfunction
  function automatic void irmovq(logic [63:0] v, logic [3:0] rb);
    b1(8'h30); b1({4'hF, rb}); q8(v);
  endfunction
  function automatic void rr(logic [7:0] op, logic [3:0] ra, logic [3:0] rb);
    b1(op); b1({ra, rb});
  endfunction
  function automatic void mem(logic [7:0] op, logic [3:0] ra, logic [3:0] rb, logic [63:0] d);
    b1(op); b1({ra, rb}); q8(d);
  endfunction
  function automatic void jump(logic [7:0] op, logic [63:0] dest);
    b1(op); q8(dest);
  endfunction

  task automatic load_prog();
    rst_n = 0;
    for (int i = 0; i < prog.size(); i++) load(1'b0, 64'(i), prog[i]);
    @(posedge clk); #1;
  endtask

  task automatic run_until_halt(int max_cycles, output int cycles);
    cycles = 0;
    rst_n = 1;
    while (stat_o == STAT_AOK && cycles < max_cycles) begin
      @(posedge clk); #1;
      cycles++;
    end
  endtask

  task automatic check_state(string when);
    chk(pc_o, m.pc, {when, " PC"});
    chk(64'(stat_o), 64'(m.stat), {when, " Stat"});
    chk({63'd0, zf_o}, {63'd0, m.zf}, {when, " ZF"});
    chk({63'd0, sf_o}, {63'd0, m.sf}, {when, " SF"});
    for (int k = 0; k < 15; k++)
      chk_reg(4'(k), m.r[k], $sformatf("%s R[%0d]", when, k));
  endtask

  initial begin
    #1000000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int cycles;
    logic [3:0] kinds [$] = '{4'h0, 4'h1, 4'h2, 4'h2, 4'h3, 4'h4, 4'h5, 4'h6, 4'h6, 4'h6,
                              4'h7, 4'h7, 4'h8, 4'h9, 4'hA, 4'hB};
    foreach (names[i]) cov[names[i]] = 0;

    // ---------------- program 1: addOne(41)
    prog.delete();
    irmovq(64'h100, REG_RSP);            // 0x00
    irmovq(64'd41, REG_RDI);             // 0x0a
    jump(8'h80, 64'h20);                 // 0x14 call addOne
    b1(8'h00);                           // 0x1d halt
    b1(8'h10); b1(8'h10);                // 0x1e, 0x1f padding
    irmovq(64'd1, REG_RAX);              // 0x20 addOne:
    rr(8'h60, REG_RDI, REG_RAX);         // 0x2a addq %rdi,%rax
    b1(8'h90);                           // 0x2c ret
    load_prog();
    run_until_halt(100, cycles);
    chk(64'(cycles), 64'd7, "addOne cycle count");
    chk(64'(stat_o), 64'(STAT_HLT), "addOne status");
    chk(pc_o, 64'h1d, "addOne halt PC");
    chk_reg(REG_RAX, 64'd42, "addOne %rax");
    chk_reg(REG_RSP, 64'h100, "addOne %rsp");
    chk({dut.u_dmem.mem[10'hff], dut.u_dmem.mem[10'hfe], dut.u_dmem.mem[10'hfd],
         dut.u_dmem.mem[10'hfc], dut.u_dmem.mem[10'hfb], dut.u_dmem.mem[10'hfa],
         dut.u_dmem.mem[10'hf9], dut.u_dmem.mem[10'hf8]}, 64'h1d, "addOne return address");
    repeat (3) @(posedge clk);
    #1;
    chk(pc_o, 64'h1d, "halted PC stays");

    // ---------------- pushq timing: the instruction is read during the
    // cycle; memory, %rsp and the PC all change at the same rising edge
    prog.delete();
    irmovq(64'h80, REG_RSP);             // 0x00
    irmovq(64'h55, REG_RAX);             // 0x0a
    rr(8'hA0, REG_RAX, 4'hF);            // 0x14 pushq %rax
    b1(8'h00);                           // 0x16 halt
    load_prog();
    m_pre_78 = 8'hAA;
    load(1'b1, 64'h78, m_pre_78);
    rst_n = 1;
    @(posedge clk); #1;
    @(posedge clk); #1;
    chk(pc_o, 64'h14, "pushq fetched");
    chk(64'(dut.u_imem.data[7:0]), 64'hA0, "pushq instruction read");
    chk(64'(dut.u_dmem.mem[10'h78]), 64'(m_pre_78), "pushq memory unchanged before edge");
    chk_reg(REG_RSP, 64'h80, "pushq %rsp unchanged before edge");
    @(posedge clk); #1;
    chk(pc_o, 64'h16, "pushq PC after edge");
    chk(64'(dut.u_dmem.mem[10'h78]), 64'h55, "pushq memory after edge");
    chk_reg(REG_RSP, 64'h78, "pushq %rsp after edge");

    // ---------------- program 2: array sum
    prog.delete();
    irmovq(64'h3f0, REG_RSP);
    irmovq(64'h200, REG_RSI);
    irmovq(64'd4, REG_RCX);
    irmovq(64'd8, 4'h8);
    irmovq(64'd1, 4'h9);
    rr(8'h63, REG_RAX, REG_RAX);         // xorq %rax,%rax
    // loop at 0x34
    mem(8'h50, REG_RDX, REG_RSI, 64'd0); // mrmovq 0(%rsi),%rdx
    rr(8'h60, REG_RDX, REG_RAX);         // addq %rdx,%rax
    rr(8'h60, 4'h8, REG_RSI);            // addq %r8,%rsi
    rr(8'h61, 4'h9, REG_RCX);            // subq %r9,%rcx
    jump(8'h74, 64'h34);                 // jne loop
    mem(8'h40, REG_RAX, REG_RCX, 64'h300); // rmmovq %rax,0x300(%rcx)
    rr(8'hA0, REG_RAX, 4'hF);            // pushq %rax
    rr(8'hB0, REG_RBX, 4'hF);            // popq %rbx
    irmovq(64'd100, REG_RDX);
    irmovq(-64'sd1, 4'hA);
    rr(8'h62, 4'hA, REG_RAX);            // andq %r10,%rax
    rr(8'h26, REG_RDX, 4'hB);            // cmovg %rdx,%r11  (taken)
    rr(8'h22, REG_RDX, 4'hC);            // cmovl %rdx,%r12  (not taken)
    b1(8'h00);
    load_prog();
    for (int i = 0; i < 4; i++) begin
      logic [63:0] v;
      v = (i == 0) ? 64'd5 : (i == 1) ? 64'd7 : (i == 2) ? 64'd11 : 64'd13;
      rst_n = 0;
      for (int k = 0; k < 8; k++) load(1'b1, 64'h200 + 64'(8 * i + k), v[8*k +: 8]);
    end
    run_until_halt(200, cycles);
    // 6 setup + 4 x 5 loop + 8 after + halt
    chk(64'(cycles), 64'd35, "sum cycle count");
    chk(64'(stat_o), 64'(STAT_HLT), "sum status");
    chk_reg(REG_RAX, 64'd36, "sum %rax");
    chk_reg(REG_RBX, 64'd36, "sum %rbx via push/pop");
    chk_reg(REG_RCX, 64'd0, "sum %rcx");
    chk_reg(4'hB, 64'd100, "cmovg taken");
    chk_reg(4'hC, 64'd0, "cmovl not taken");
    chk_reg(REG_RSP, 64'h3f0, "sum %rsp");
    chk(64'(dut.u_dmem.mem[10'h300]), 64'd36, "sum stored");

    // ---------------- random programs against the model
    for (int run = 0; run < 40; run++) begin
      rst_n = 0;
      m = new();
      m.gen_program(kinds, 8'h00, 1'b1, 64'(DMEM / 2 + ($urandom % (DMEM / 4))));
      for (int i = 0; i < IMEM; i++) load(1'b0, 64'(i), m.imem[i]);
      for (int i = 0; i < DMEM; i++) load(1'b1, 64'(i), m.dmem[i]);
      @(posedge clk); #1;
      rst_n = 1;
      check_state("start");
      for (int c = 0; c < 150; c++) begin
        @(posedge clk); #1;
        m.step();
        if (cov.exists(m.last_kind)) cov[m.last_kind]++;
        if (m.last_kind inside {"cmov", "jxx"}) begin
          if (m.last_taken) cov["taken"]++;
          else cov["not_taken"]++;
        end
        check_state($sformatf("run %0d cycle %0d", run, c));
      end
      for (int i = 0; i < DMEM; i++)
        chk(64'(dut.u_dmem.mem[i]), 64'(m.dmem[i]), $sformatf("run %0d M[%0d]", run, i));
    end
    foreach (names[i]) begin
      $display("seen %-10s %0d", names[i], cov[names[i]]);
      checks++;
      if (cov[names[i]] == 0) begin
        failures++;
        $display("FAIL never seen: %s", names[i]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

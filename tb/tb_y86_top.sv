// tb_y86_top: end-to-end test of all six processors at their default sizes,
// running side by side from one clock and reset.
//   seq    random programs of every instruction kind, compared with the
//          reference model after every cycle (PC, registers, flags,
//          status) and over all of data memory at the end of each run
//   addq   addq %rax,%rdx; addq %rbx,%rdx from rax=1, rbx=2, rdx=3
//   jmp    jmp 0x10 / jmp 0x00 / jmp 0x08: PC 0x10, 0x08, 0x00, ...
//   jnop   nop, nop, jmp 0x20 / nop, jmp 0x00: a five-instruction loop
//   movreg irmovq, mrmovq, rrmovq reading a preloaded data word
//   mov    irmovq, rmmovq, mrmovq, rrmovq through data memory
// Every mechanism (each instruction kind, a taken and a not-taken
// condition, halt, an invalid instruction, a write to register 15) is
// counted and must occur at least once.
module tb_y86_top;
  import y86_pkg::*;
  import y86_iss_pkg::*;
  localparam int unsigned IMEM = 1024, DMEM = 1024;  // the top's defaults
  logic        clk = 0, rst_n = 0;
  load_t       seq_load_i = '0, addq_load_i = '0, jmp_load_i = '0, jnop_load_i = '0,
               movreg_load_i = '0, mov_load_i = '0;
  logic [3:0]  seq_dbg_reg_i = 0, addq_dbg_reg_i = 0, movreg_dbg_reg_i = 0, mov_dbg_reg_i = 0;
  logic [63:0] seq_dbg_reg_val_o, addq_dbg_reg_val_o, movreg_dbg_reg_val_o, mov_dbg_reg_val_o;
  logic [63:0] seq_pc_o, addq_pc_o, jmp_pc_o, jnop_pc_o, movreg_pc_o, mov_pc_o;
  stat_e       seq_stat_o;
  logic        seq_zf_o, seq_sf_o;
  y86_iss #(IMEM, DMEM) m;
  int checks = 0, failures = 0;
  int cov [string];

  y86_top dut (.*);

  always #50 clk = ~clk;

  task automatic chk(logic [63:0] got, logic [63:0] exp, string what);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 20) $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  // one byte into each of the simple processors' memories in the same cycle
  task automatic load_simple(int unsigned a, logic [7:0] addq_b, logic [7:0] jmp_b,
                             logic [7:0] jnop_b, logic [7:0] movreg_b, logic [7:0] mov_b,
                             bit dm);
    addq_load_i   = '{we: !dm, dmem: 1'b0, addr: 64'(a), data: addq_b};
    jmp_load_i    = '{we: !dm, dmem: 1'b0, addr: 64'(a), data: jmp_b};
    jnop_load_i   = '{we: !dm, dmem: 1'b0, addr: 64'(a), data: jnop_b};
    movreg_load_i = '{we: 1'b1, dmem: dm, addr: 64'(a), data: movreg_b};
    mov_load_i    = '{we: 1'b1, dmem: dm, addr: 64'(a), data: mov_b};
    @(posedge clk); #1;
    addq_load_i = '0; jmp_load_i = '0; jnop_load_i = '0; movreg_load_i = '0; mov_load_i = '0;
  endtask

  task automatic seq_load(bit dm, int unsigned a, logic [7:0] d);
    seq_load_i = '{we: 1'b1, dmem: dm, addr: 64'(a), data: d};
    @(posedge clk); #1;
    seq_load_i = '0;
  endtask

  task automatic chk_seq_state(string when);
    chk(seq_pc_o, m.pc, {when, " PC"});
    chk(64'(seq_stat_o), 64'(m.stat), {when, " Stat"});
    chk({62'd0, seq_zf_o, seq_sf_o}, {62'd0, m.zf, m.sf}, {when, " ZF/SF"});
    for (int k = 0; k < 15; k++) begin
      seq_dbg_reg_i = 4'(k); #1;
      chk(seq_dbg_reg_val_o, m.r[k], $sformatf("%s R[%0d]", when, k));
    end
  endtask

  task automatic chk_reg(int which, logic [3:0] n, logic [63:0] exp, string what);
    addq_dbg_reg_i = n; movreg_dbg_reg_i = n; mov_dbg_reg_i = n;
    #1;
    case (which)
      0: chk(addq_dbg_reg_val_o, exp, what);
      1: chk(movreg_dbg_reg_val_o, exp, what);
      default: chk(mov_dbg_reg_val_o, exp, what);
    endcase
  endtask

  initial begin
    #2000000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [7:0] jmp_img [24], jnop_img [42], movreg_img [22], mov_img [42], mem_img [8];
    logic [3:0] kinds [$] = '{4'h0, 4'h1, 4'h2, 4'h2, 4'h3, 4'h4, 4'h5, 4'h6, 4'h6, 4'h6,
                              4'h7, 4'h7, 4'h8, 4'h9, 4'hA, 4'hB};
    string names [$] = '{"halt", "nop", "rrmovq", "cmov", "irmovq", "rmmovq", "mrmovq",
                         "addq", "subq", "andq", "xorq", "jxx", "call", "ret", "pushq",
                         "popq", "invalid", "taken", "not_taken", "r15_write",
                         "addq_cpu", "jmp_cpu", "jnop_jmp", "jnop_nop",
                         "movreg_rrmovq", "movreg_irmovq", "movreg_mrmovq",
                         "mov_rrmovq", "mov_irmovq", "mov_rmmovq", "mov_mrmovq"};
    foreach (names[i]) cov[names[i]] = 0;

    // ---------------- images for the simple processors
    jmp_img = '{8'h10, 0, 0, 0, 0, 0, 0, 0,  8'h00, 0, 0, 0, 0, 0, 0, 0,  8'h08, 0, 0, 0, 0, 0, 0, 0};
    foreach (jnop_img[i]) jnop_img[i] = 8'h10;
    jnop_img[2] = 8'h70; jnop_img[3] = 8'h20; for (int k = 4; k < 11; k++) jnop_img[k] = 8'h00;
    jnop_img[33] = 8'h70; for (int k = 34; k < 42; k++) jnop_img[k] = 8'h00;
    // movreg: irmovq $0x36,%rax; mrmovq 10(%rax),%rbx; rrmovq %rbx,%rcx
    movreg_img = '{8'h30, 8'hF0, 8'h36, 0, 0, 0, 0, 0, 0, 0,
                   8'h50, 8'h30, 8'h0a, 0, 0, 0, 0, 0, 0, 0,
                   8'h20, 8'h31};
    // mov: irmovq $0x100,%rbx; irmovq $77,%rcx; rmmovq %rcx,10(%rbx);
    //      mrmovq 10(%rbx),%rdx; rrmovq %rdx,%rsi
    mov_img = '{8'h30, 8'hF3, 8'h00, 8'h01, 0, 0, 0, 0, 0, 0,
                8'h30, 8'hF1, 8'd77, 0, 0, 0, 0, 0, 0, 0,
                8'h40, 8'h13, 8'h0a, 0, 0, 0, 0, 0, 0, 0,
                8'h50, 8'h23, 8'h0a, 0, 0, 0, 0, 0, 0, 0,
                8'h20, 8'h26};
    mem_img = '{8'h34, 8'h12, 0, 0, 0, 0, 0, 0};   // 0x1234 at 0x40 for movreg
    for (int a = 0; a < 42; a++)
      load_simple(a, (a == 0) ? 8'h02 : (a == 1) ? 8'h32 : 8'h00,
                  (a < 24) ? jmp_img[a] : 8'h00, jnop_img[a],
                  (a < 22) ? movreg_img[a] : 8'h10, mov_img[a], 1'b0);
    for (int a = 42; a < 64; a++) load_simple(a, 8'h00, 8'h00, 8'h10, 8'h10, 8'h10, 1'b0);
    for (int a = 0; a < 8; a++) load_simple(64 + a, 8'h00, 8'h00, 8'h00, mem_img[a], 8'h00, 1'b1);

    // ---------------- seq: first random program
    m = new();
    m.gen_program(kinds, 8'h00, 1'b1, 64'h300);
    for (int i = 0; i < IMEM; i++) seq_load(1'b0, i, m.imem[i]);
    for (int i = 0; i < DMEM; i++) seq_load(1'b1, i, m.dmem[i]);
    @(posedge clk); #1;
    dut.u_addq.u_rf.regs[REG_RAX] = 64'd1;
    dut.u_addq.u_rf.regs[REG_RBX] = 64'd2;
    dut.u_addq.u_rf.regs[REG_RDX] = 64'd3;
    rst_n = 1;
    chk_seq_state("seq start");

    for (int c = 1; c <= 200; c++) begin
      @(posedge clk); #1;
      m.step();
      if (cov.exists(m.last_kind)) cov[m.last_kind]++;
      if (m.last_kind inside {"cmov", "jxx"}) cov[m.last_taken ? "taken" : "not_taken"]++;
      chk_seq_state($sformatf("seq cycle %0d", c));
      // simple processors, cycle by cycle
      if (c == 1) begin chk(addq_pc_o, 1, "addq PC 1"); chk_reg(0, REG_RDX, 4, "addq rdx 4"); end
      if (c == 2) begin
        chk(addq_pc_o, 2, "addq PC 2"); chk_reg(0, REG_RDX, 6, "addq rdx 6");
        chk_reg(0, REG_RAX, 1, "addq rax"); chk_reg(0, REG_RBX, 2, "addq rbx");
        cov["addq_cpu"] += 2;
      end
      if (c <= 30) begin
        chk(jmp_pc_o, (c % 3 == 1) ? 64'h10 : (c % 3 == 2) ? 64'h08 : 64'h00,
            $sformatf("jmp cycle %0d", c));
        cov["jmp_cpu"]++;
        case (c % 5)
          1: begin chk(jnop_pc_o, 64'h01, "jnop"); cov["jnop_nop"]++; end
          2: begin chk(jnop_pc_o, 64'h02, "jnop"); cov["jnop_nop"]++; end
          3: begin chk(jnop_pc_o, 64'h20, "jnop"); cov["jnop_jmp"]++; end
          4: begin chk(jnop_pc_o, 64'h21, "jnop"); cov["jnop_nop"]++; end
          default: begin chk(jnop_pc_o, 64'h00, "jnop"); cov["jnop_jmp"]++; end
        endcase
      end
      if (c == 1) begin chk_reg(1, REG_RAX, 64'h36, "movreg irmovq"); cov["movreg_irmovq"]++; end
      if (c == 2) begin chk_reg(1, REG_RBX, 64'h1234, "movreg mrmovq"); cov["movreg_mrmovq"]++; end
      if (c == 3) begin
        chk_reg(1, REG_RCX, 64'h1234, "movreg rrmovq"); cov["movreg_rrmovq"]++;
        chk(movreg_pc_o, 64'd22, "movreg PC");
      end
      if (c == 2) begin chk_reg(2, REG_RCX, 64'd77, "mov irmovq"); cov["mov_irmovq"]++; end
      if (c == 3) begin
        chk(64'(dut.u_mov.u_dmem.mem[10'h10a]), 64'd77, "mov rmmovq"); cov["mov_rmmovq"]++;
      end
      if (c == 4) begin chk_reg(2, REG_RDX, 64'd77, "mov mrmovq"); cov["mov_mrmovq"]++; end
      if (c == 5) begin
        chk_reg(2, REG_RSI, 64'd77, "mov rrmovq"); cov["mov_rrmovq"]++;
        chk(mov_pc_o, 64'd42, "mov PC");
      end
    end

    // ---------------- seq: more random programs
    for (int run = 0; run < 30; run++) begin
      rst_n = 0;
      m = new();
      m.gen_program(kinds, 8'h00, 1'b1, 64'(DMEM / 2 + ($urandom % (DMEM / 4))));
      for (int i = 0; i < IMEM; i++) seq_load(1'b0, i, m.imem[i]);
      for (int i = 0; i < DMEM; i++) seq_load(1'b1, i, m.dmem[i]);
      @(posedge clk); #1;
      rst_n = 1;
      for (int c = 0; c < 150; c++) begin
        logic [7:0] b0, b1;
        b0 = m.imem[m.pc % IMEM];
        b1 = m.imem[(m.pc + 1) % IMEM];
        if (m.stat == 0 && (b0[7:4] inside {4'h2, 4'h3, 4'h6}) && b1[3:0] == 4'hF) cov["r15_write"]++;
        @(posedge clk); #1;
        m.step();
        if (cov.exists(m.last_kind)) cov[m.last_kind]++;
        if (m.last_kind inside {"cmov", "jxx"}) cov[m.last_taken ? "taken" : "not_taken"]++;
        chk_seq_state($sformatf("run %0d cycle %0d", run, c));
      end
      for (int i = 0; i < DMEM; i++)
        chk(64'(dut.u_seq.u_dmem.mem[i]), 64'(m.dmem[i]), $sformatf("run %0d M[%0d]", run, i));
    end

    foreach (names[i]) begin
      $display("seen %-14s %0d", names[i], cov[names[i]]);
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

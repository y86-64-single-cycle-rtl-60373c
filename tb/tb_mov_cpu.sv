// tb_mov_cpu: runs the mov processor on random programs of
// rrmovq, irmovq, rmmovq and mrmovq (register 15 and wrapping addresses included)
// with random data memory, and after every cycle compares the PC and all
// registers with the reference model: one instruction per cycle. At the end
// of each run the whole data memory is compared with the model's.
module tb_mov_cpu;
  import y86_pkg::*;
  import y86_iss_pkg::*;
  localparam int unsigned IMEM = 512, DMEM = 512;
  logic        clk = 0, rst_n = 0;
  load_t       load_i = '0;
  logic [3:0]  dbg_reg_i = 0;
  logic [63:0] dbg_reg_val_o, pc_o;
  y86_iss #(IMEM, DMEM) m;
  logic [3:0]  kinds [$] = '{4'h2, 4'h3, 4'h4, 4'h5};
  int checks = 0, failures = 0, n_rr = 0, n_ir = 0, n_mr = 0, n_rm = 0;

  mov_cpu #(.IMEM_BYTES(IMEM), .DMEM_BYTES(DMEM)) dut (
    .clk, .rst_n, .load_i, .dbg_reg_i, .dbg_reg_val_o, .pc_o);

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

  task automatic check_state(string when);
    chk(pc_o, m.pc, {when, " PC"});
    for (int k = 0; k < 15; k++) begin
      dbg_reg_i = 4'(k); #1;
      chk(dbg_reg_val_o, m.r[k], $sformatf("%s R[%0d]", when, k));
    end
  endtask

  initial begin
    #1000000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int run = 0; run < 4; run++) begin
      rst_n = 0;
      m = new();
      m.gen_program(kinds, 8'h10, 1'b0, 64'd0);
      for (int i = 0; i < IMEM; i++) load(1'b0, 64'(i), m.imem[i]);
      for (int i = 0; i < DMEM; i++) load(1'b1, 64'(i), m.dmem[i]);
      @(posedge clk); #1;
      rst_n = 1;
      check_state("start");
      for (int c = 0; c < 150; c++) begin
        @(posedge clk); #1;
        m.step();
        case (m.last_kind)
          "rrmovq": n_rr++;
          "irmovq": n_ir++;
          "mrmovq": n_mr++;
          "rmmovq": n_rm++;
          default: ;
        endcase
        check_state($sformatf("run %0d cycle %0d", run, c));
      end
      for (int i = 0; i < DMEM; i++)
        chk(64'(dut.u_dmem.mem[i]), 64'(m.dmem[i]), $sformatf("run %0d M[%0d]", run, i));
    end
    checks++;
    if (n_rr == 0 || n_ir == 0 || n_mr == 0 || n_rm == 0) begin
      failures++;
      $display("FAIL coverage");
    end
    $display("rrmovq=%0d irmovq=%0d mrmovq=%0d rmmovq=%0d", n_rr, n_ir, n_mr, n_rm);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

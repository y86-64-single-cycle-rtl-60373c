// tb_pc_reg: checks the program counter register. After reset the output
// is RESET_PC; with the enable high the output takes the input at each
// rising edge and holds it until the next one even if the input changes in
// between; with the enable low it keeps its value.
module tb_pc_reg;
  logic clk = 0, rst_n = 0, en = 0;
  logic [63:0] pc_next = 0, pc, expect_pc;
  int checks = 0, failures = 0;

  pc_reg #(.RESET_PC(64'h40)) dut (.clk, .rst_n, .en, .pc_next, .pc);

  always #5 clk = ~clk;

  task automatic check(logic [63:0] exp, string what);
    checks++;
    if (pc !== exp) begin
      failures++;
      $display("FAIL %s: pc=%h expected %h", what, pc, exp);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    pc_next = 64'hdead;
    en = 1;
    @(posedge clk); #1;
    check(64'h40, "reset");
    rst_n = 1;
    expect_pc = 64'h40;
    for (int i = 0; i < 200; i++) begin
      pc_next = {$urandom, $urandom};
      en = ($urandom % 4) != 0;
      #2;
      check(expect_pc, "hold before edge");   // output does not follow the input
      @(posedge clk); #1;
      if (en) expect_pc = pc_next;
      check(expect_pc, "after edge");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

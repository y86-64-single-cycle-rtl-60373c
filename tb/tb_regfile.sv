// tb_regfile: checks the register file against a model array. Random
// writes through both ports each cycle, random reads on all three read
// ports. Checked: reads are combinational and show the value from before
// the edge, writes land at the rising edge, register 15 reads 0 and
// ignores writes, the M port wins when both ports name one register, and
// reset clears every register.
module tb_regfile;
  logic        clk = 0, rst_n = 0;
  logic [3:0]  srcA, srcB, dstE, dstM, dbg_reg;
  logic [63:0] valA, valB, valE, valM, dbg_val;
  logic [63:0] model [16];
  int checks = 0, failures = 0, same_dst = 0, r15_writes = 0;

  regfile dut (.clk, .rst_n, .srcA, .srcB, .valA, .valB, .dstE, .valE, .dstM, .valM,
               .dbg_reg, .dbg_val);

  always #5 clk = ~clk;

  task automatic chk(logic [63:0] got, logic [63:0] exp, string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  task automatic check_reads();
    for (int k = 0; k < 4; k++) begin
      srcA = 4'($urandom); srcB = 4'($urandom); dbg_reg = 4'($urandom);
      #1;
      chk(valA, model[srcA], $sformatf("valA R[%0d]", srcA));
      chk(valB, model[srcB], $sformatf("valB R[%0d]", srcB));
      chk(dbg_val, model[dbg_reg], $sformatf("dbg R[%0d]", dbg_reg));
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
    dstE = 4'hF; dstM = 4'hF; valE = 0; valM = 0;
    foreach (model[i]) model[i] = 0;
    @(posedge clk); #1;
    rst_n = 1;
    check_reads();
    for (int i = 0; i < 500; i++) begin
      dstE = 4'($urandom); dstM = ($urandom % 3 == 0) ? dstE : 4'($urandom);
      valE = {$urandom, $urandom}; valM = {$urandom, $urandom};
      if (dstE == dstM && dstE != 4'hF) same_dst++;
      if (dstE == 4'hF || dstM == 4'hF) r15_writes++;
      check_reads();                    // before the edge: old values
      @(posedge clk); #1;
      if (dstE != 4'hF) model[dstE] = valE;
      if (dstM != 4'hF) model[dstM] = valM;
      model[15] = 0;
      check_reads();
    end
    // reset clears
    rst_n = 0; dstE = 4'hF; dstM = 4'hF;
    @(posedge clk); #1;
    rst_n = 1;
    foreach (model[i]) model[i] = 0;
    check_reads();
    checks++;
    if (same_dst == 0 || r15_writes == 0) begin
      failures++;
      $display("FAIL coverage: same_dst=%0d r15_writes=%0d", same_dst, r15_writes);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

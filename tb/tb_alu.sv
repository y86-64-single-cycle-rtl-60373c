// tb_alu: checks the ALU's four operations (add, sub as b - a, and, xor)
// and its zero and sign flags with random and corner-case operands.
module tb_alu;
  import y86_pkg::*;
  alu_op_e     op;
  logic [63:0] a, b, y, exp;
  logic        zf, sf;
  int checks = 0, failures = 0;

  alu dut (.op, .a, .b, .y, .zf, .sf);

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 800; i++) begin
      op = alu_op_e'(i % 4);
      case ((i / 4) % 4)
        0: begin a = {$urandom, $urandom}; b = {$urandom, $urandom}; end
        1: begin a = {$urandom, $urandom}; b = a; end          // zero results
        2: begin a = 64'(i); b = 64'(i / 2); end                 // small, negative differences
        default: begin a = 64'h8000_0000_0000_0000; b = {$urandom, $urandom}; end
      endcase
      #1;
      case (i % 4)
        0: exp = a + b;
        1: exp = b + ~a + 64'd1;
        2: exp = a & b;
        default: exp = (a | b) & ~(a & b);
      endcase
      checks++;
      if (y !== exp || zf !== (exp == 0) || sf !== exp[63]) begin
        failures++;
        $display("FAIL op=%0d a=%h b=%h y=%h zf=%b sf=%b expected %h", op, a, b, y, zf, sf, exp);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

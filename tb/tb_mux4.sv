// tb_mux4: checks the four-input multiplexer against its truth table
// (select 00 -> a, 01 -> b, 10 -> c, 11 -> d) with random data words.
module tb_mux4;
  logic [1:0]  sel;
  logic [63:0] a, b, c, d, y, exp;
  int checks = 0, failures = 0;

  mux4 #(.WIDTH(64)) dut (.sel, .a, .b, .c, .d, .y);

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 400; i++) begin
      a = {$urandom, $urandom}; b = {$urandom, $urandom};
      c = {$urandom, $urandom}; d = {$urandom, $urandom};
      sel = 2'(i % 4);
      #1;
      case (i % 4)
        0: exp = a;
        1: exp = b;
        2: exp = c;
        default: exp = d;
      endcase
      checks++;
      if (y !== exp) begin
        failures++;
        $display("FAIL sel=%0d y=%h expected %h", sel, y, exp);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

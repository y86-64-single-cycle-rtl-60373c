// y86_iss_pkg: instruction-level reference model of the Y86-64 processor,
// used by the test benches to work out expected results independently of
// the RTL.
//
// The model keeps its own copy of the architectural state (PC, 15
// registers, ZF/SF, status, instruction and data memory) and executes one
// instruction per call of step(). It follows the same conventions as the
// RTL: usual Y86-64 encodings, no OF flag (so "less" is SF and "less or
// equal" is SF|ZF), halt and invalid instructions freeze the state,
// addresses wrap modulo the memory sizes, and instruction and data memory
// are separate.
package y86_iss_pkg;

  class y86_iss #(int unsigned IMEM = 1024, int unsigned DMEM = 1024);
    logic [63:0] pc;
    logic [63:0] r [15];
    bit          zf, sf;
    int          stat;       // 0 AOK, 1 HLT, 2 INS
    logic [7:0]  imem [IMEM];
    logic [7:0]  dmem [DMEM];
    // what the last step did, for coverage counting
    string       last_kind;
    bit          last_taken;

    function new();
      reset();
      foreach (imem[i]) imem[i] = 8'h00;
      foreach (dmem[i]) dmem[i] = 8'h00;
    endfunction


    // Random program generator. kinds lists the icodes to draw from. The
    // program is laid out back to back from address 0; jXX and call
    // targets are instruction starts; the tail is filled with fill_byte.
    // With full (the complete processor) the program begins with
    // irmovq $sp0, %rsp, rrmovq/jXX/OPq get random function codes and a rare
    // invalid function code appears; otherwise every function code is 0.
    // Data memory gets random bytes.
    function void gen_program(logic [3:0] kinds [$], logic [7:0] fill_byte,
                              bit full, logic [63:0] sp0);
      int unsigned a = 0;
      int unsigned starts [$];
      int unsigned slots [$];
      logic [3:0]  ic, fn, ra, rb;
      logic [63:0] c;
      int unsigned len;
      foreach (imem[i]) imem[i] = fill_byte;
      foreach (dmem[i]) dmem[i] = 8'($urandom);
      if (full) begin
        imem[0] = 8'h30; imem[1] = 8'hF4;
        for (int k = 0; k < 8; k++) imem[2 + k] = sp0[8*k +: 8];
        a = 10;
      end
      while (a + 10 <= IMEM) begin
        starts.push_back(a);
        ic = kinds[$urandom % kinds.size()];
        fn = 0;
        ra = ($urandom % 8 == 0) ? 4'hF : 4'($urandom % 15);
        rb = ($urandom % 8 == 0) ? 4'hF : 4'($urandom % 15);
        c  = ($urandom % 2) ? 64'($urandom % DMEM) : {$urandom, $urandom};
        if (full && (ic == 4'h2 || ic == 4'h7)) fn = 4'($urandom % 7);
        if (full && ic == 4'h6) fn = 4'($urandom % 4);
        if (full && $urandom % 200 == 0) fn = 4'hE;             // rare invalid function code
        imem[a] = {ic, fn};
        case (ic)
          4'h0, 4'h1, 4'h9: len = 1;
          4'h2, 4'h6, 4'hA, 4'hB: begin
            if (ic == 4'hA || ic == 4'hB) rb = 4'hF;
            imem[a + 1] = {ra, rb}; len = 2;
          end
          4'h3, 4'h4, 4'h5: begin
            if (ic == 4'h3) ra = 4'hF;
            imem[a + 1] = {ra, rb};
            for (int k = 0; k < 8; k++) imem[a + 2 + k] = c[8*k +: 8];
            len = 10;
          end
          default: begin slots.push_back(a + 1); len = 9; end  // jXX, call
        endcase
        a += len;
      end
      foreach (slots[i]) begin
        c = 64'(starts[$urandom % starts.size()]);
        for (int k = 0; k < 8; k++) imem[slots[i] + k] = c[8*k +: 8];
      end
    endfunction

    function void reset();
      pc = 0; zf = 1; sf = 0; stat = 0;
      foreach (r[i]) r[i] = 0;
    endfunction

    function logic [7:0] ib(logic [63:0] a);
      return imem[a % IMEM];
    endfunction

    function logic [63:0] iq(logic [63:0] a);
      logic [63:0] v;
      for (int i = 0; i < 8; i++) v[8*i +: 8] = ib(a + i);
      return v;
    endfunction

    function logic [63:0] rdq(logic [63:0] a);
      logic [63:0] v;
      for (int i = 0; i < 8; i++) v[8*i +: 8] = dmem[(a + i) % DMEM];
      return v;
    endfunction

    function void wrq(logic [63:0] a, logic [63:0] v);
      for (int i = 0; i < 8; i++) dmem[(a + i) % DMEM] = v[8*i +: 8];
    endfunction

    function logic [63:0] rget(logic [3:0] n);
      return (n == 4'hF) ? 64'd0 : r[n];
    endfunction

    function void rset(logic [3:0] n, logic [63:0] v);
      if (n != 4'hF) r[n] = v;
    endfunction

    function bit cond(logic [3:0] f);
      case (f)
        0: return 1;
        1: return sf | zf;
        2: return sf;
        3: return zf;
        4: return !zf;
        5: return !sf;
        6: return !sf && !zf;
        default: return 0;
      endcase
    endfunction

    function void step();
      logic [3:0]  ic, fn, ra, rb;
      logic [63:0] c8, c9, va, vb, res, sp;
      if (stat != 0) begin last_kind = "frozen"; return; end
      ic = ib(pc)[7:4]; fn = ib(pc)[3:0];
      ra = ib(pc + 1)[7:4]; rb = ib(pc + 1)[3:0];
      c9 = iq(pc + 1); c8 = iq(pc + 2);
      last_taken = 0;
      case (ic)
        4'h0: begin if (fn != 0) stat = 2; else begin stat = 1; last_kind = "halt"; end end
        4'h1: begin if (fn != 0) stat = 2; else begin pc += 1; last_kind = "nop"; end end
        4'h2: begin
          if (fn > 6) stat = 2;
          else begin
            last_taken = cond(fn);
            if (last_taken) rset(rb, rget(ra));
            pc += 2; last_kind = (fn == 0) ? "rrmovq" : "cmov";
          end
        end
        4'h3: begin if (fn != 0) stat = 2; else begin rset(rb, c8); pc += 10; last_kind = "irmovq"; end end
        4'h4: begin if (fn != 0) stat = 2; else begin wrq(c8 + rget(rb), rget(ra)); pc += 10; last_kind = "rmmovq"; end end
        4'h5: begin if (fn != 0) stat = 2; else begin rset(ra, rdq(c8 + rget(rb))); pc += 10; last_kind = "mrmovq"; end end
        4'h6: begin
          if (fn > 3) stat = 2;
          else begin
            va = rget(ra); vb = rget(rb);
            case (fn)
              0: res = vb + va;
              1: res = vb - va;
              2: res = vb & va;
              default: res = vb ^ va;
            endcase
            zf = (res == 0); sf = res[63];
            rset(rb, res); pc += 2;
            last_kind = (fn == 0) ? "addq" : (fn == 1) ? "subq" : (fn == 2) ? "andq" : "xorq";
          end
        end
        4'h7: begin
          if (fn > 6) stat = 2;
          else begin
            last_taken = cond(fn);
            pc = last_taken ? c9 : pc + 9;
            last_kind = "jxx";
          end
        end
        4'h8: begin
          if (fn != 0) stat = 2;
          else begin sp = r[4] - 8; wrq(sp, pc + 9); r[4] = sp; pc = c9; last_kind = "call"; end
        end
        4'h9: begin
          if (fn != 0) stat = 2;
          else begin sp = r[4]; pc = rdq(sp); r[4] = sp + 8; last_kind = "ret"; end
        end
        4'hA: begin
          if (fn != 0) stat = 2;
          else begin va = rget(ra); sp = r[4] - 8; wrq(sp, va); r[4] = sp; pc += 2; last_kind = "pushq"; end
        end
        4'hB: begin
          if (fn != 0) stat = 2;
          else begin
            sp = r[4]; va = rdq(sp); r[4] = sp + 8; rset(ra, va); pc += 2; last_kind = "popq";
          end
        end
        default: stat = 2;
      endcase
      if (stat == 2) last_kind = "invalid";
    endfunction
  endclass

endpackage

// y86_ref_pkg: testbench helpers for the Y86-64 processor tests.
//   y86_asm   - a tiny assembler: emits Y86-64 instructions as bytes into
//               an image, with forward/backward labels resolved at the end.
//   y86_model - an instruction-set reference model written directly from
//               the Y86-64 instruction definitions (not from the RTL): it
//               executes one instruction per step() on its own copies of
//               the registers, condition codes, PC, status and memories.
// Status codes match y86_pkg: 1 AOK, 2 HLT, 3 ADR, 4 INS.
package y86_ref_pkg;

  class y86_asm;
    byte unsigned img[$];
    longint unsigned lab[64];
    int fix_pos[$];
    int fix_lab[$];

    function void b(byte unsigned x); img.push_back(x); endfunction
    function void q(longint unsigned x);
      for (int k = 0; k < 8; k++) img.push_back(byte'(x >> (8*k)));
    endfunction
    function void rr(int hi, int lo); b(byte'((hi << 4) | lo)); endfunction
    function int here(); return img.size(); endfunction
    function void label(int id); lab[id] = img.size(); endfunction
    function void qlab(int id);
      fix_pos.push_back(img.size()); fix_lab.push_back(id); q(0);
    endfunction

    function void halt();  b(8'h00); endfunction
    function void nop();   b(8'h10); endfunction
    function void cmov(int fn, int ra, int rb_); b(byte'(8'h20 | fn)); rr(ra, rb_); endfunction
    function void irmovq(longint unsigned v, int rb_); b(8'h30); rr(15, rb_); q(v); endfunction
    function void rmmovq(int ra, longint unsigned d, int rb_); b(8'h40); rr(ra, rb_); q(d); endfunction
    function void mrmovq(longint unsigned d, int rb_, int ra); b(8'h50); rr(ra, rb_); q(d); endfunction
    function void opq(int fn, int ra, int rb_); b(byte'(8'h60 | fn)); rr(ra, rb_); endfunction
    function void jxx(int fn, int id); b(byte'(8'h70 | fn)); qlab(id); endfunction
    function void jabs(int fn, longint unsigned a); b(byte'(8'h70 | fn)); q(a); endfunction
    function void call(int id); b(8'h80); qlab(id); endfunction
    function void ret();   b(8'h90); endfunction
    function void pushq(int ra); b(8'hA0); rr(ra, 15); endfunction
    function void popq(int ra);  b(8'hB0); rr(ra, 15); endfunction

    function void finish();
      foreach (fix_pos[i])
        for (int k = 0; k < 8; k++) img[fix_pos[i] + k] = byte'(lab[fix_lab[i]] >> (8*k));
    endfunction
  endclass

  class y86_model;
    longint unsigned r[16];
    bit zf, sf, of;
    longint unsigned pc;
    int stat;
    int imem_bytes, dmem_bytes;
    byte unsigned imem[];
    byte unsigned dmem[];
    int count[16];           // instructions completed, per icode
    int taken, not_taken;    // conditional jumps / moves
    int faults;

    function new(int ib, int db);
      imem_bytes = ib; dmem_bytes = db;
      imem = new[ib]; dmem = new[db];
      reset();
    endfunction

    function void reset();
      foreach (r[i]) r[i] = 0;
      zf = 1; sf = 0; of = 0; pc = 0; stat = 1;
    endfunction

    function void load(byte unsigned p[$]);
      foreach (imem[i]) imem[i] = 0;
      foreach (p[i]) imem[i] = p[i];
    endfunction

    function byte unsigned ib(longint unsigned a);
      return (a < imem_bytes) ? imem[a] : 0;
    endfunction

    function longint unsigned rd8(longint unsigned a);
      longint unsigned v = 0;
      for (int k = 7; k >= 0; k--) v = (v << 8) | dmem[a + k];
      return v;
    endfunction

    function bit cond(int fn);
      bit lt = sf ^ of;
      case (fn)
        0: return 1;
        1: return lt | zf;
        2: return lt;
        3: return zf;
        4: return !zf;
        5: return !lt;
        6: return !lt && !zf;
        default: return 0;
      endcase
    endfunction

    function longint unsigned rget(int i); return (i == 15) ? 0 : r[i]; endfunction

    // Execute one instruction; a halting or faulting instruction changes
    // nothing but the status.
    function void step();
      int icode, ifun, ra, rb_;
      longint unsigned valc, valp, addr, res, a, b_;
      bit c, mem_ok;
      if (stat != 1) return;
      if (pc >= imem_bytes) begin stat = 3; faults++; return; end
      icode = ib(pc) >> 4; ifun = ib(pc) & 15;
      ra = ib(pc + 1) >> 4; rb_ = ib(pc + 1) & 15;
      case (icode)
        0: begin stat = 2; return; end
        1, 9: valp = pc + 1;
        2, 6, 10, 11: valp = pc + 2;
        7, 8: valp = pc + 9;
        3, 4, 5: valp = pc + 10;
        default: begin stat = 4; faults++; return; end
      endcase
      valc = 0;
      if (icode inside {3, 4, 5}) for (int k = 7; k >= 0; k--) valc = (valc << 8) | ib(pc + 2 + k);
      if (icode inside {7, 8})    for (int k = 7; k >= 0; k--) valc = (valc << 8) | ib(pc + 1 + k);
      // memory address checks first: a faulting access changes nothing
      case (icode)
        4, 5: addr = valc + rget(rb_);
        8, 10: addr = r[4] - 8;
        9, 11: addr = r[4];
        default: addr = 0;
      endcase
      mem_ok = (addr <= dmem_bytes - 8);
      if (icode inside {4, 5, 8, 9, 10, 11} && !mem_ok) begin stat = 3; faults++; return; end
      count[icode]++;
      case (icode)
        1: pc = valp;
        2: begin
             c = cond(ifun);
             if (ifun != 0) begin if (c) taken++; else not_taken++; end
             if (c && rb_ != 15) r[rb_] = rget(ra);
             pc = valp;
           end
        3: begin if (rb_ != 15) r[rb_] = valc; pc = valp; end
        4: begin for (int k = 0; k < 8; k++) dmem[addr + k] = byte'(rget(ra) >> (8*k)); pc = valp; end
        5: begin if (ra != 15) r[ra] = rd8(addr); pc = valp; end
        6: begin
             a = rget(ra); b_ = rget(rb_);
             case (ifun)
               1: res = b_ - a;
               2: res = b_ & a;
               3: res = b_ ^ a;
               default: res = b_ + a;
             endcase
             zf = (res == 0); sf = res[63];
             if (ifun == 0)      of = (a[63] == b_[63]) && (res[63] != b_[63]);
             else if (ifun == 1) of = (a[63] != b_[63]) && (res[63] != b_[63]);
             else                of = 0;
             if (rb_ != 15) r[rb_] = res;
             pc = valp;
           end
        7: begin
             c = cond(ifun);
             if (ifun != 0) begin if (c) taken++; else not_taken++; end
             pc = c ? valc : valp;
           end
        8: begin for (int k = 0; k < 8; k++) dmem[addr + k] = byte'(valp >> (8*k)); r[4] = addr; pc = valc; end
        9: begin pc = rd8(addr); r[4] = addr + 8; end
        10: begin
              a = rget(ra);
              for (int k = 0; k < 8; k++) dmem[addr + k] = byte'(a >> (8*k));
              r[4] = addr; pc = valp;
            end
        11: begin
              res = rd8(addr);
              r[4] = addr + 8;
              if (ra != 15) r[ra] = res;   // popq %rsp: memory value wins
              pc = valp;
            end
        default: ;
      endcase
    endfunction
  endclass

endpackage

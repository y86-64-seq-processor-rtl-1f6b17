// tb_y86_seq: end-to-end test of the single-cycle Y86-64 processor.
// Each program is assembled here, loaded through the instruction-memory
// port, and run one instruction per clock while the instruction-set model
// of y86_ref_pkg steps alongside; after every clock edge the PC, status,
// condition codes and all fifteen registers are compared. Programs:
//   1. array sum through call/ret, a counted loop (jne), push/pop,
//      cmovXX taken and not, every OPq, rmmovq/mrmovq, nop, halt
//   2. twenty random straight-line programs (moves, OPq, cmov, memory,
//      push/pop) ending in halt
//   3. an unknown icode (stops with INS), a load past the end of data
//      memory and a jump past the end of instruction memory (ADR)
// It also checks the one-instruction-per-cycle rate: a program of N
// instructions reaches halt after exactly N clock edges.
module tb_y86_seq;
  import y86_pkg::*;
  import y86_ref_pkg::*;
  localparam int IB = 1024, DB = 1024;

  logic clk = 0, rst_n = 0, run = 0, imem_we = 0;
  logic [63:0] imem_waddr, pc, dbg_val;
  logic [7:0]  imem_wdata;
  stat_t       stat;
  cc_t         cc;
  logic [3:0]  dbg_reg = 0;
  int checks = 0, failures = 0;

  y86_seq #(.IMEM_BYTES(IB), .DMEM_BYTES(DB)) dut (
    .clk, .rst_n, .run, .imem_we, .imem_waddr, .imem_wdata,
    .pc, .stat, .cc, .dbg_reg, .dbg_val);

  always #50 clk = ~clk;  // long period: compare() reads 15 registers between edges

  y86_model m;

  initial begin
    #50_000_000 failures++; $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic load_and_reset(y86_asm a);
    run = 0;
    rst_n = 0;
    // clear the whole instruction memory, then write the program
    for (int i = 0; i < IB; i++) begin
      imem_we = 1; imem_waddr = i; imem_wdata = (i < a.img.size()) ? a.img[i] : 8'h00;
      @(posedge clk); #1;
    end
    imem_we = 0;
    rst_n = 1; #1;
    m.reset();
    m.load(a.img);
  endtask

  task automatic compare(string tag);
    checks++;
    if (pc !== m.pc || int'(stat) != m.stat || cc !== {m.zf, m.sf, m.of}) begin
      failures++;
      $display("FAIL %s pc=%h/%h stat=%0d/%0d cc=%b/%b%b%b", tag, pc, m.pc, stat, m.stat, cc, m.zf, m.sf, m.of);
    end
    for (int i = 0; i < 15; i++) begin
      dbg_reg = 4'(i); #1;
      checks++;
      if (dbg_val !== m.r[i]) begin
        failures++; $display("FAIL %s r%0d=%h exp %h", tag, i, dbg_val, m.r[i]);
      end
    end
  endtask

  // run until the processor stops (or max cycles); returns cycles used
  task automatic run_prog(string tag, int max_cycles, output int cycles);
    cycles = 0;
    run = 1;
    while (cycles < max_cycles && m.stat == 1) begin
      @(posedge clk); #1;
      m.step();
      cycles++;
      compare(tag);
    end
    run = 0;
  endtask

  initial begin
    y86_asm a;
    int cyc, n_before;
    m = new(IB, DB);

    // ---------------- program 1: directed ----------------
    a = new();
    a.irmovq(64'h400, 4);          // %rsp = top of data memory
    a.irmovq(64'h100, 7);          // %rdi = array
    a.irmovq(7, 0);  a.rmmovq(0, 0, 7);
    a.irmovq(17, 0); a.rmmovq(0, 8, 7);
    a.irmovq(4, 0);  a.rmmovq(0, 16, 7);
    a.irmovq(1, 0);  a.rmmovq(0, 24, 7);
    a.irmovq(23, 0); a.rmmovq(0, 32, 7);
    a.irmovq(5, 6);                // %rsi = count
    a.call(1);                     // %rax = sum of the array
    a.pushq(0);
    a.irmovq(64'hffff_ffff_ffff_ffff, 10);
    a.opq(0, 10, 10);              // -2: SF=1, ZF=0
    a.cmov(1, 10, 11);             // cmovle: taken
    a.cmov(6, 10, 12);             // cmovg: not taken
    a.jxx(3, 4);                   // je: not taken
    a.irmovq(64'h7fff_ffff_ffff_ffff, 13);
    a.irmovq(1, 14);
    a.opq(0, 14, 13);              // signed overflow: OF=1, SF=1
    a.jxx(5, 4);                   // jge: taken (SF^OF = 0)
    a.nop();
    a.label(4);
    a.nop();
    a.popq(1);                     // %rcx = pushed sum
    a.opq(1, 1, 0);                // subq: ZF=1
    a.cmov(3, 13, 2);              // cmove: taken
    a.halt();
    a.label(1);                    // sum:
    a.opq(3, 0, 0);                // xorq %rax,%rax
    a.opq(2, 6, 6);                // andq %rsi,%rsi
    a.jxx(0, 3);                   // jmp test
    a.label(2);                    // loop:
    a.mrmovq(0, 7, 8);             // mrmovq (%rdi),%r8
    a.opq(0, 8, 0);                // addq %r8,%rax
    a.irmovq(8, 9);  a.opq(0, 9, 7);
    a.irmovq(1, 9);  a.opq(1, 9, 6);
    a.label(3);                    // test:
    a.jxx(4, 2);                   // jne loop
    a.ret();
    a.finish();
    load_and_reset(a);
    run_prog("directed", 500, cyc);
    checks++;
    if (m.stat != 2 || m.r[0] != 0 || m.r[1] != 52 || m.r[2] != m.r[13]) begin
      failures++; $display("FAIL directed: stat=%0d sum=%0d", m.stat, m.r[1]);
    end
    // rate: the model counts completed instructions; SEQ retires one per cycle
    checks++;
    n_before = 0;
    foreach (m.count[i]) n_before += m.count[i];
    if (cyc != n_before + 1) begin
      failures++; $display("FAIL rate: %0d cycles for %0d instructions + halt", cyc, n_before);
    end

    // ---------------- program 2: random straight-line ----------------
    for (int p = 0; p < 20; p++) begin
      int pushes;
      a = new();
      pushes = 0;
      a.irmovq(64'h400, 4);
      a.irmovq(64'h80, 5);          // %rbp = data base, never changed
      for (int i = 0; i < 15; i++) if (i != 4 && i != 5) a.irmovq({$urandom, $urandom}, i);
      // give the 16 data words used below known contents
      for (int i = 0; i < 16; i++) a.rmmovq($urandom % 15, 8 * i, 5);
      for (int i = 0; i < 40; i++) begin
        int ra, rb_, k;
        do ra = $urandom % 15; while (ra == 4 || ra == 5);
        do rb_ = $urandom % 15; while (rb_ == 4 || rb_ == 5);
        k = $urandom % 8;
        case (k)
          0: a.opq($urandom % 4, ra, rb_);
          1: a.opq($urandom % 4, $urandom % 15, rb_);
          2: a.cmov($urandom % 7, ra, rb_);
          3: a.irmovq({$urandom, $urandom}, rb_);
          4: a.rmmovq($urandom % 15, 8 * ($urandom % 16), 5);
          5: a.mrmovq(8 * ($urandom % 16), 5, ra);
          6: begin a.pushq($urandom % 15); pushes++; end
          default: if (pushes > 0) begin a.popq(ra); pushes--; end else a.nop();
        endcase
      end
      a.halt();
      a.finish();
      load_and_reset(a);
      run_prog("random", 200, cyc);
      checks++;
      if (m.stat != 2) begin failures++; $display("FAIL random %0d ended with stat %0d", p, m.stat); end
    end

    // ---------------- program 3: faults ----------------
    a = new();
    a.irmovq(3, 0);
    a.b(8'hC0);                    // unknown icode
    a.finish();
    load_and_reset(a);
    run_prog("ins", 20, cyc);
    checks++;
    if (stat != S_INS || pc != 10) begin failures++; $display("FAIL ins stat=%0d pc=%0d", stat, pc); end
    // stays stopped
    run = 1; repeat (3) @(posedge clk); #1; run = 0;
    compare("ins-held");

    a = new();
    a.irmovq(64'h1000, 3);
    a.mrmovq(0, 3, 0);             // load past the end of data memory
    a.halt();
    a.finish();
    load_and_reset(a);
    run_prog("adr-data", 20, cyc);
    checks++;
    if (stat != S_ADR || pc != 10) begin failures++; $display("FAIL adr stat=%0d pc=%0d", stat, pc); end

    a = new();
    a.jabs(0, 64'h2000);           // jump past the end of instruction memory
    a.finish();
    load_and_reset(a);
    run_prog("adr-fetch", 20, cyc);
    checks++;
    if (stat != S_ADR || pc != 64'h2000) begin failures++; $display("FAIL fetch adr stat=%0d pc=%h", stat, pc); end

    $display("instructions per icode: %p  taken=%0d not_taken=%0d", m.count, m.taken, m.not_taken);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

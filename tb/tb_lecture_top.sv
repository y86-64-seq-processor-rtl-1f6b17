// tb_lecture_top: end-to-end test of the whole top level at its default
// sizes (1 KiB instruction and data memories, 32-bit times-three circuits).
// The Y86-64 processor runs a program that sums an array in a called
// subroutine, recurses through call/ret to compute 3*n by repeated
// addition, and exercises taken and untaken jumps and conditional moves,
// push/pop and every ALU operation; then a second program stops on an
// unknown instruction and a third on a bad data address. Every cycle the
// processor is compared with the instruction-set model of y86_ref_pkg.
// While the processor runs, the combinational and pipelined times-three
// circuits are fed a new value every cycle and checked (the pipelined one
// three cycles later). Each mechanism is counted and a failure is counted
// for any that never happened.
module tb_lecture_top;
  import y86_pkg::*;
  import y86_ref_pkg::*;
  localparam int IB = 1024, DB = 1024;

  logic clk = 0, rst_n = 0, cpu_run = 0, imem_we = 0;
  logic [63:0] imem_waddr, cpu_pc, dbg_val;
  logic [7:0]  imem_wdata;
  stat_t       cpu_stat;
  cc_t         cpu_cc;
  logic [3:0]  dbg_reg = 0;
  logic [31:0] t3c_a = 0, t3c_y, t3p_a = 0, t3p_y;
  logic [31:0] t3_hist[$];
  int checks = 0, failures = 0;
  int n_t3c = 0, n_t3p = 0, n_ins = 0, n_adr = 0, n_halt = 0;

  lecture_top dut (
    .clk, .rst_n, .cpu_run, .imem_we, .imem_waddr, .imem_wdata,
    .cpu_pc, .cpu_stat, .cpu_cc, .dbg_reg, .dbg_val,
    .t3c_a, .t3c_y, .t3p_a, .t3p_y);

  always #50 clk = ~clk;   // long period: the register compare reads 15 values per cycle

  y86_model m;

  initial begin
    #50_000_000 failures++; $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  // times-three streams: a new input every cycle, checked every cycle
  initial begin
    int unsigned ex[5];
    int k;
    ex = '{7, 17, 4, 1, 23};
    k = 0;
    forever begin
      @(negedge clk);
      t3c_a = (k < 5) ? ex[k] : $urandom;
      #1;
      checks++; n_t3c++;
      if (t3c_y !== 32'(t3c_a * 3)) begin failures++; $display("FAIL t3c %0d -> %0d", t3c_a, t3c_y); end
      t3p_a = t3c_a;
      t3_hist.push_back(t3p_a);
      @(posedge clk); #1;
      if (t3_hist.size() >= 3) begin
        checks++; n_t3p++;
        if (t3p_y !== 32'(t3_hist[t3_hist.size()-3] * 3)) begin
          failures++; $display("FAIL t3p got %0d", t3p_y);
        end
      end
      if (t3_hist.size() > 8) void'(t3_hist.pop_front());
      k++;
    end
  end

  task automatic load_and_reset(y86_asm a);
    cpu_run = 0;
    rst_n = 0;
    for (int i = 0; i < IB; i++) begin
      @(negedge clk);
      imem_we = 1; imem_waddr = i; imem_wdata = (i < a.img.size()) ? a.img[i] : 8'h00;
    end
    @(negedge clk);
    imem_we = 0;
    rst_n = 1;
    m.reset();
    m.load(a.img);
  endtask

  task automatic compare();
    checks++;
    if (cpu_pc !== m.pc || int'(cpu_stat) != m.stat || cpu_cc !== {m.zf, m.sf, m.of}) begin
      failures++;
      $display("FAIL pc=%h/%h stat=%0d/%0d cc=%b", cpu_pc, m.pc, cpu_stat, m.stat, cpu_cc);
    end
    for (int i = 0; i < 15; i++) begin
      dbg_reg = 4'(i); #1;
      checks++;
      if (dbg_val !== m.r[i]) begin failures++; $display("FAIL r%0d=%h exp %h", i, dbg_val, m.r[i]); end
    end
  endtask

  task automatic run_prog(int max_cycles);
    int cycles = 0;
    @(negedge clk);
    cpu_run = 1;
    while (cycles < max_cycles && m.stat == 1) begin
      @(posedge clk); #2;
      m.step();
      cycles++;
      compare();
    end
    @(negedge clk);
    cpu_run = 0;
    case (cpu_stat)
      S_HLT: n_halt++;
      S_INS: n_ins++;
      S_ADR: n_adr++;
      default: ;
    endcase
  endtask

  initial begin
    y86_asm a;
    m = new(IB, DB);

    a = new();
    a.irmovq(64'h400, 4);                 // stack at the top of data memory
    a.irmovq(64'h200, 7);                 // array
    for (int i = 0; i < 6; i++) begin a.irmovq(10 * i + 3, 0); a.rmmovq(0, 8 * i, 7); end
    a.irmovq(6, 6);
    a.call(1);                            // %rax = array sum = 168
    a.cmov(0, 0, 12);                     // rrmovq %rax, %r12
    a.irmovq(5, 6);
    a.call(5);                            // %rax = 3 * 5 by recursion
    a.irmovq(64'h8000_0000_0000_0000, 8);
    a.irmovq(1, 9);
    a.opq(1, 9, 8);                       // min - 1: overflow
    a.cmov(2, 9, 10);                     // cmovl: not taken (SF^OF = 0)
    a.cmov(5, 9, 11);                     // cmovge: taken
    a.opq(3, 9, 9);                       // xorq: ZF
    a.jxx(4, 6);                          // jne: not taken
    a.opq(2, 12, 12);                     // andq
    a.label(6);
    a.pushq(12); a.pushq(0);
    a.popq(13);  a.popq(14);
    a.halt();
    a.label(1);                           // sum(%rdi, %rsi)
    a.opq(3, 0, 0);
    a.opq(2, 6, 6);
    a.jxx(0, 3);
    a.label(2);
    a.mrmovq(0, 7, 8);
    a.opq(0, 8, 0);
    a.irmovq(8, 9);  a.opq(0, 9, 7);
    a.irmovq(1, 9);  a.opq(1, 9, 6);
    a.label(3);
    a.jxx(4, 2);
    a.ret();
    a.label(5);                           // times3(n = %rsi): 3 + times3(n - 1)
    a.opq(3, 0, 0);
    a.opq(2, 6, 6);
    a.jxx(3, 7);                          // je done
    a.pushq(6);
    a.irmovq(1, 9); a.opq(1, 9, 6);
    a.call(5);
    a.popq(6);
    a.irmovq(3, 9); a.opq(0, 9, 0);
    a.label(7);
    a.ret();
    a.finish();
    load_and_reset(a);
    run_prog(1000);
    checks++;
    if (m.stat != 2 || m.r[12] != 168 || m.r[0] != 15 || m.r[13] != 15 || m.r[14] != 168) begin
      failures++; $display("FAIL program results r12=%0d rax=%0d", m.r[12], m.r[0]);
    end

    a = new();
    a.nop();
    a.b(8'hF0);                           // unknown icode
    a.finish();
    load_and_reset(a);
    run_prog(10);

    a = new();
    a.irmovq(64'h3FC, 4);                 // popq would read 0x3FC..0x403, past the end
    a.popq(0);
    a.finish();
    load_and_reset(a);
    run_prog(10);

    // mechanisms
    begin
      int cnt[string];
      cnt["jump taken/not taken both"] = (m.taken > 0 && m.not_taken > 0) ? 1 : 0;
      cnt["call"] = m.count[8]; cnt["ret"] = m.count[9];
      cnt["pushq"] = m.count[10]; cnt["popq"] = m.count[11];
      cnt["mrmovq"] = m.count[5]; cnt["rmmovq"] = m.count[4];
      cnt["irmovq"] = m.count[3]; cnt["rrmovq/cmov"] = m.count[2]; cnt["OPq"] = m.count[6];
      cnt["jXX"] = m.count[7]; cnt["nop"] = m.count[1];
      cnt["halt"] = n_halt; cnt["INS stop"] = n_ins; cnt["ADR stop"] = n_adr;
      cnt["times3 comb"] = n_t3c; cnt["times3 pipelined"] = n_t3p;
      foreach (cnt[k]) begin
        $display("  %-26s %0d", k, cnt[k]);
        checks++;
        if (cnt[k] == 0) begin failures++; $display("FAIL mechanism never happened: %s", k); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_seq_mux_exercises: the "what does each mux select" exercise for the
// SEQ processor, run on the RTL. A program contains addq %r8,%r9, rmmovq,
// irmovq, mrmovq, jle (taken and not taken), cmove (taken and not taken),
// ret, popq and call. When each of them is at the PC, the test checks the
// choice made by every mux of the datapath by looking inside the processor:
//   PC (new_pc), dstE, dstM, aluA, aluB, data-memory address and data,
//   read/write enables
// against the expected source (valP/valC/valM, rB/rA/%rsp/none, valA/valC/8,
// valB/0, valE/valB, valA/valP). Register values are chosen all different
// so that a wrong selection cannot give the right number by chance. At the
// end, the registers are checked against known results.
module tb_seq_mux_exercises;
  import y86_pkg::*;
  import y86_ref_pkg::*;

  logic clk = 0, rst_n = 0, run = 0, imem_we = 0;
  logic [63:0] imem_waddr, pc, dbg_val;
  logic [7:0]  imem_wdata;
  stat_t       stat;
  cc_t         cc;
  logic [3:0]  dbg_reg = 0;
  int checks = 0, failures = 0;
  int seen[string];

  y86_seq dut (.clk, .rst_n, .run, .imem_we, .imem_waddr, .imem_wdata,
               .pc, .stat, .cc, .dbg_reg, .dbg_val);

  always #50 clk = ~clk;

  initial begin
    #10_000_000 failures++; $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  // expected selections: 'x' fields are not checked
  typedef enum {P_VALP, P_VALC, P_VALM, P_CND} pcsel_e;
  typedef enum {D_NONE, D_RB, D_RA, D_RSP, D_RB_IF} dsel_e;
  typedef enum {A_VALA, A_VALC, A_8} asel_e;
  typedef enum {B_VALB, B_ZERO} bsel_e;
  typedef enum {M_NONE, M_RD_VALE, M_RD_VALB, M_WR_VALE_A, M_WR_VALE_P} msel_e;

  function automatic logic [3:0] dsel(dsel_e d);
    case (d)
      D_RB:    return dut.rB;
      D_RA:    return dut.rA;
      D_RSP:   return 4'h4;
      D_RB_IF: return dut.cnd ? dut.rB : 4'hF;
      default: return 4'hF;
    endcase
  endfunction

  task automatic expect_sel(string name, pcsel_e p, dsel_e de, dsel_e dm, asel_e a, bsel_e b, msel_e ms);
    logic ok;
    logic [63:0] epc;
    case (p)
      P_VALP: epc = dut.valP;
      P_VALC: epc = dut.valC;
      P_VALM: epc = dut.valM;
      default: epc = dut.cnd ? dut.valC : dut.valP;
    endcase
    ok = (dut.new_pc == epc) && (dut.dstE == dsel(de)) && (dut.dstM == dsel(dm));
    ok &= (dut.aluA == ((a == A_VALA) ? dut.valA : (a == A_VALC) ? dut.valC : 64'd8));
    ok &= (dut.aluB == ((b == B_VALB) ? dut.valB : 64'd0));
    case (ms)
      M_NONE:      ok &= !dut.mem_rd && !dut.mem_wr;
      M_RD_VALE:   ok &= dut.mem_rd && !dut.mem_wr && dut.mem_addr == dut.valE;
      M_RD_VALB:   ok &= dut.mem_rd && !dut.mem_wr && dut.mem_addr == dut.valB;
      M_WR_VALE_A: ok &= !dut.mem_rd && dut.mem_wr && dut.mem_addr == dut.valE && dut.mem_data == dut.valA;
      default:     ok &= !dut.mem_rd && dut.mem_wr && dut.mem_addr == dut.valE && dut.mem_data == dut.valP;
    endcase
    checks++;
    seen[name] = 1;
    if (!ok) begin
      failures++;
      $display("FAIL %s: new_pc=%h dstE=%h dstM=%h aluA=%h aluB=%h rd=%b wr=%b addr=%h data=%h",
               name, dut.new_pc, dut.dstE, dut.dstM, dut.aluA, dut.aluB, dut.mem_rd, dut.mem_wr, dut.mem_addr, dut.mem_data);
    end
  endtask

  initial begin
    y86_asm a;
    longint unsigned x_addq, x_rm, x_ir, x_mr, x_jle_n, x_cme_n, x_jle_t, x_cme_t, x_call, x_pop, x_ret;
    a = new();
    a.irmovq(64'h400, 4);
    a.irmovq(5, 8); a.irmovq(9, 9); a.irmovq(64'h100, 3); a.irmovq(77, 1); a.irmovq(31, 7);
    x_addq = a.here();  a.opq(0, 8, 9);          // addq %r8,%r9   -> 14
    x_rm = a.here();    a.rmmovq(1, 8, 3);       // rmmovq %rcx,8(%rbx)
    x_ir = a.here();    a.irmovq(64'h1234, 2);   // irmovq $0x1234,%rdx
    x_mr = a.here();    a.mrmovq(8, 3, 6);       // mrmovq 8(%rbx),%rsi -> 77
    x_jle_n = a.here(); a.jxx(1, 1);             // jle: not taken (14 > 0)
    x_cme_n = a.here(); a.cmov(3, 8, 7);         // cmove: not taken
    a.opq(3, 0, 0);                              // xorq: ZF = 1
    x_jle_t = a.here(); a.jxx(1, 1);             // jle: taken
    a.halt();
    a.label(1);
    x_cme_t = a.here(); a.cmov(3, 8, 7);         // cmove: taken -> %rdi = 5
    x_call = a.here();  a.call(2);
    a.halt();
    a.label(2);
    a.pushq(1);
    x_pop = a.here();   a.popq(10);              // %r10 = 77
    x_ret = a.here();   a.ret();
    a.finish();

    for (int i = 0; i < 1024; i++) begin
      imem_we = 1; imem_waddr = i; imem_wdata = (i < a.img.size()) ? a.img[i] : 8'h00;
      @(posedge clk); #1;
    end
    imem_we = 0; rst_n = 1;
    @(negedge clk);
    run = 1;
    while (stat == S_AOK) begin
      if (pc == x_addq)  expect_sel("addq",     P_VALP, D_RB,    D_NONE, A_VALA, B_VALB, M_NONE);
      if (pc == x_rm)    expect_sel("rmmovq",   P_VALP, D_NONE,  D_NONE, A_VALC, B_VALB, M_WR_VALE_A);
      if (pc == x_ir)    expect_sel("irmovq",   P_VALP, D_RB,    D_NONE, A_VALC, B_ZERO, M_NONE);
      if (pc == x_mr)    expect_sel("mrmovq",   P_VALP, D_NONE,  D_RA,   A_VALC, B_VALB, M_RD_VALE);
      if (pc == x_jle_n) begin expect_sel("jle not taken", P_VALP, D_NONE, D_NONE, A_VALA, B_ZERO, M_NONE); end
      if (pc == x_jle_t) begin expect_sel("jle taken",     P_VALC, D_NONE, D_NONE, A_VALA, B_ZERO, M_NONE); end
      if (pc == x_cme_n) begin checks++; if (dut.cnd) failures++; expect_sel("cmove not taken", P_VALP, D_RB_IF, D_NONE, A_VALA, B_ZERO, M_NONE); end
      if (pc == x_cme_t) begin checks++; if (!dut.cnd) failures++; expect_sel("cmove taken", P_VALP, D_RB_IF, D_NONE, A_VALA, B_ZERO, M_NONE); end
      if (pc == x_call)  expect_sel("call",     P_VALC, D_RSP,   D_NONE, A_8,    B_VALB, M_WR_VALE_P);
      if (pc == x_pop)   expect_sel("popq",     P_VALP, D_RSP,   D_RA,   A_8,    B_VALB, M_RD_VALB);
      if (pc == x_ret)   expect_sel("ret",      P_VALM, D_RSP,   D_NONE, A_8,    B_VALB, M_RD_VALB);
      @(negedge clk);
    end
    run = 0;
    // jXX: the ALU is unused, so aluA/aluB are checked only through the
    // defaults above (aluA = valA = 0 since srcA is none)
    begin
      logic [63:0] exp_r[int];
      exp_r[9] = 14; exp_r[2] = 64'h1234; exp_r[6] = 77; exp_r[7] = 5; exp_r[10] = 77; exp_r[4] = 64'h400; exp_r[0] = 0;
      foreach (exp_r[i]) begin
        dbg_reg = 4'(i); #1;
        checks++;
        if (dbg_val !== exp_r[i]) begin failures++; $display("FAIL r%0d=%0d exp %0d", i, dbg_val, exp_r[i]); end
      end
    end
    checks++;
    if (stat != S_HLT) begin failures++; $display("FAIL stat=%0d", stat); end
    checks++;
    if (seen.num() != 11) begin failures++; $display("FAIL only %0d of 11 exercises reached", seen.num()); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

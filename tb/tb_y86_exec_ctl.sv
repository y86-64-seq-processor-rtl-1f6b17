// tb_y86_exec_ctl: self-checking test of the ALU input and function
// selection. For every icode (and every OPq function) with random valA,
// valB, valC it checks aluA, aluB, alufun and set_cc against the Y86-64
// SEQ execute table.
module tb_y86_exec_ctl;
  import y86_pkg::*;
  logic [3:0]  icode, ifun;
  logic [63:0] valA, valB, valC, aluA, aluB, eA, eB;
  alufun_t     alufun, eF;
  logic        set_cc;
  int checks = 0, failures = 0;

  y86_exec_ctl dut (.icode, .ifun, .valA, .valB, .valC, .aluA, .aluB, .alufun, .set_cc);

  initial begin
    #100000 failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    for (int i = 0; i < 512; i++) begin
      icode = 4'(i % 16); ifun = 4'((i / 16) % 4);
      valA = {$urandom, $urandom}; valB = {$urandom, $urandom}; valC = {$urandom, $urandom};
      #1;
      eA = 0; eB = 0; eF = ALU_ADD;
      case (icode)
        4'h2: eA = valA;
        4'h3: eA = valC;
        4'h4, 4'h5: begin eA = valC; eB = valB; end
        4'h6: begin eA = valA; eB = valB; eF = alufun_t'(ifun[1:0]); end
        4'h8, 4'hA: begin eA = 8; eB = valB; eF = ALU_SUB; end
        4'h9, 4'hB: begin eA = 8; eB = valB; end
        default: ;
      endcase
      checks++;
      if (aluA !== eA || aluB !== eB || alufun !== eF || set_cc !== (icode == 4'h6)) begin
        failures++; $display("FAIL icode=%h ifun=%h", icode, ifun);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

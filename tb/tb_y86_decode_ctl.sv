// tb_y86_decode_ctl: self-checking test of the srcA/srcB/dstE/dstM logic.
// For every icode, random rA/rB and both values of Cnd, compares the four
// register numbers with a table of the Y86-64 SEQ register usage
// (0xF = none, 4 = %rsp).
module tb_y86_decode_ctl;
  logic [3:0] icode, rA, rB, srcA, srcB, dstE, dstM;
  logic [3:0] eA, eB, eE, eM;
  logic       cnd;
  int checks = 0, failures = 0;

  y86_decode_ctl dut (.icode, .rA, .rB, .cnd, .srcA, .srcB, .dstE, .dstM);

  initial begin
    #100000 failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    for (int i = 0; i < 640; i++) begin
      icode = 4'(i % 16); rA = $urandom % 15; rB = $urandom % 15; cnd = i[4];
      #1;
      {eA, eB, eE, eM} = {4'hF, 4'hF, 4'hF, 4'hF};
      case (icode)
        4'h2: begin eA = rA; eE = cnd ? rB : 4'hF; end
        4'h3: eE = rB;
        4'h4: begin eA = rA; eB = rB; end
        4'h5: begin eB = rB; eM = rA; end
        4'h6: begin eA = rA; eB = rB; eE = rB; end
        4'h8, 4'h9: begin eB = 4; eE = 4; end
        4'hA: begin eA = rA; eB = 4; eE = 4; end
        4'hB: begin eA = rA; eB = 4; eE = 4; eM = rA; end
        default: ;
      endcase
      checks++;
      if ({srcA, srcB, dstE, dstM} !== {eA, eB, eE, eM}) begin
        failures++;
        $display("FAIL icode=%h got %h %h %h %h exp %h %h %h %h", icode, srcA, srcB, dstE, dstM, eA, eB, eE, eM);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

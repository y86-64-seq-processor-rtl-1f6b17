// tb_y86_cc: self-checking test of the condition-code register and the
// condition logic. Checks the reset value, that codes change only when
// set_cc is high, and Cnd for every ifun 0..7 under all eight ZF/SF/OF
// combinations against the Y86-64 condition table.
module tb_y86_cc;
  import y86_pkg::*;
  logic clk = 0, rst_n = 0, set_cc = 0, cnd;
  cc_t  cc_new, cc;
  logic [3:0] ifun;
  int checks = 0, failures = 0;

  y86_cc dut (.clk, .rst_n, .set_cc, .cc_new, .ifun, .cc, .cnd);
  always #5 clk = ~clk;

  function automatic logic ref_cnd(logic [3:0] f, logic zf, logic sf, logic of);
    case (f)
      0: return 1;
      1: return (sf != of) || zf;
      2: return sf != of;
      3: return zf;
      4: return !zf;
      5: return sf == of;
      6: return (sf == of) && !zf;
      default: return 0;
    endcase
  endfunction

  initial begin
    #100000 failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    cc_new = '0; ifun = 0;
    #12 rst_n = 1;
    checks++; if (cc !== 3'b100) begin failures++; $display("FAIL reset cc=%b", cc); end
    for (int v = 0; v < 8; v++) begin
      // present new codes with set_cc low: must not change
      cc_new = cc_t'(v); set_cc = 0;
      @(posedge clk); #1;
      checks++; if (cc === cc_t'(v)) begin failures++; $display("FAIL cc changed without set_cc"); end
      set_cc = 1;
      @(posedge clk); #1; set_cc = 0;
      checks++; if (cc !== cc_t'(v)) begin failures++; $display("FAIL cc=%b exp %b", cc, v); end
      for (int f = 0; f < 8; f++) begin
        ifun = 4'(f); #1;
        checks++;
        if (cnd !== ref_cnd(ifun, cc.zf, cc.sf, cc.of)) begin
          failures++; $display("FAIL ifun=%0d zso=%b cnd=%b", f, cc, cnd);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

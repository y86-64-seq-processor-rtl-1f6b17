// tb_y86_alu: self-checking test of the Y86-64 ALU.
// Applies directed corner cases and random operands for each of the four
// functions and compares valE and the ZF/SF/OF codes with a reference
// computed here with 65-bit signed arithmetic.
module tb_y86_alu;
  import y86_pkg::*;
  logic [63:0] a, b, e;
  alufun_t     f;
  cc_t         c;
  int checks = 0, failures = 0;

  y86_alu dut (.aluA(a), .aluB(b), .alufun(f), .valE(e), .cc_new(c));

  task automatic check_one(logic [63:0] ta, logic [63:0] tb_, alufun_t tf);
    logic signed [64:0] wide;
    logic [63:0] r;
    logic of;
    a = ta; b = tb_; f = tf;
    #1;
    case (tf)
      ALU_ADD: begin wide = $signed({tb_[63], tb_}) + $signed({ta[63], ta}); r = wide[63:0]; of = wide[64] != wide[63]; end
      ALU_SUB: begin wide = $signed({tb_[63], tb_}) - $signed({ta[63], ta}); r = wide[63:0]; of = wide[64] != wide[63]; end
      ALU_AND: begin r = ta & tb_; of = 0; end
      default: begin r = ta ^ tb_; of = 0; end
    endcase
    checks++;
    if (e !== r || c.zf !== (r == 0) || c.sf !== r[63] || c.of !== of) begin
      failures++;
      $display("FAIL f=%0d a=%h b=%h got %h zf%b sf%b of%b exp %h of%b", tf, ta, tb_, e, c.zf, c.sf, c.of, r, of);
    end
  endtask

  initial begin
    #100000 failures++; $display("watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    for (int k = 0; k < 4; k++) begin
      check_one(64'd5, 64'd7, alufun_t'(k));
      check_one(64'd7, 64'd7, alufun_t'(k));
      check_one(64'h7fff_ffff_ffff_ffff, 64'd1, alufun_t'(k));
      check_one(64'd1, 64'h8000_0000_0000_0000, alufun_t'(k));
      check_one(64'h8000_0000_0000_0000, 64'h8000_0000_0000_0000, alufun_t'(k));
      check_one(64'd8, 64'd0, alufun_t'(k));
      for (int i = 0; i < 200; i++)
        check_one({$urandom, $urandom}, {$urandom, $urandom}, alufun_t'(k));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

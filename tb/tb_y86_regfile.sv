// tb_y86_regfile: self-checking test of the register file. Random writes
// on both ports (with 0xF as "no write" and the M port winning a tie) are
// mirrored in a model; both read ports and the observation port are checked
// every cycle, including that register 0xF reads 0 and that reset clears.
module tb_y86_regfile;
  logic clk = 0, rst_n = 0;
  logic [3:0]  srcA, srcB, dstE, dstM, dbg_idx;
  logic [63:0] valA, valB, valE, valM, dbg_val;
  logic [63:0] model[16];
  int checks = 0, failures = 0;

  y86_regfile dut (.clk, .rst_n, .srcA, .srcB, .valA, .valB, .dstE, .valE, .dstM, .valM, .dbg_idx, .dbg_val);
  always #5 clk = ~clk;

  initial begin
    #200000 failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    dstE = 4'hF; dstM = 4'hF; srcA = 0; srcB = 0; dbg_idx = 0; valE = 0; valM = 0;
    for (int i = 0; i < 16; i++) model[i] = 0;
    #12 rst_n = 1;
    for (int i = 0; i < 500; i++) begin
      srcA = $urandom; srcB = $urandom; dbg_idx = $urandom;
      #1;
      checks++;
      if (valA !== model[srcA] || valB !== model[srcB] || dbg_val !== model[dbg_idx]) begin
        failures++; $display("FAIL read %h %h %h", srcA, srcB, dbg_idx);
      end
      dstE = ($urandom % 4 == 0) ? 4'hF : 4'($urandom); valE = {$urandom, $urandom};
      dstM = ($urandom % 3 == 0) ? 4'hF : 4'($urandom); valM = {$urandom, $urandom};
      @(posedge clk); #1;
      if (dstE != 4'hF) model[dstE] = valE;
      if (dstM != 4'hF) model[dstM] = valM;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

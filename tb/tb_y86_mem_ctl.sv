// tb_y86_mem_ctl: self-checking test of the data-memory control: read and
// write enables, the address (valE, or the old %rsp in valB for popq/ret)
// and the write data (valA, or valP for call), for every icode.
module tb_y86_mem_ctl;
  logic [3:0]  icode;
  logic [63:0] valE, valA, valB, valP, addr, data;
  logic        rd, wr;
  int checks = 0, failures = 0;

  y86_mem_ctl dut (.icode, .valE, .valA, .valB, .valP, .mem_rd(rd), .mem_wr(wr), .mem_addr(addr), .mem_data(data));

  initial begin
    #100000 failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    for (int i = 0; i < 320; i++) begin
      icode = 4'(i % 16);
      valE = {$urandom, $urandom}; valA = {$urandom, $urandom};
      valB = {$urandom, $urandom}; valP = {$urandom, $urandom};
      #1;
      checks++;
      if (rd !== (icode inside {4'h5, 4'hB, 4'h9}) || wr !== (icode inside {4'h4, 4'hA, 4'h8})) begin
        failures++; $display("FAIL enables icode=%h", icode);
      end
      if (rd || wr) begin
        checks++;
        if (addr !== ((icode inside {4'hB, 4'h9}) ? valB : valE) ||
            data !== ((icode == 4'h8) ? valP : valA)) begin
          failures++; $display("FAIL addr/data icode=%h", icode);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_y86_dmem: self-checking test of the data memory. Random 8-byte writes
// and reads at unaligned addresses are compared with a byte-array model;
// checks that a write takes effect only at the clock edge, and the error
// flag (and dropped write) for accesses that run past the end.
module tb_y86_dmem;
  localparam int N = 128;
  logic clk = 0, rd = 0, wr = 0, commit = 1, err;
  logic [63:0] addr, wdata, rdata, expv;
  logic [7:0]  model[N];
  int checks = 0, failures = 0;

  y86_dmem #(.BYTES(N)) dut (.clk, .rd, .wr, .commit, .addr, .wdata, .rdata, .err);
  always #5 clk = ~clk;

  initial begin
    #200000 failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    // fill the whole memory so every byte is known
    for (int a = 0; a <= N - 8; a += 8) begin
      wr = 1; addr = a; wdata = {$urandom, $urandom};
      for (int k = 0; k < 8; k++) model[a + k] = wdata[8*k +: 8];
      @(posedge clk); #1;
    end
    wr = 0;
    for (int i = 0; i < 400; i++) begin
      addr = $urandom % (N + 8);
      if ($urandom % 2) begin
        wr = 1; rd = 0; wdata = {$urandom, $urandom};
        #1;
        checks++;
        if (err !== (addr > N - 8)) begin failures++; $display("FAIL werr addr=%0d", addr); end
        @(posedge clk); #1; wr = 0;
        if (addr <= N - 8) for (int k = 0; k < 8; k++) model[addr + k] = wdata[8*k +: 8];
      end else begin
        rd = 1; #1;
        expv = '0;
        if (addr <= N - 8) for (int k = 0; k < 8; k++) expv[8*k +: 8] = model[addr + k];
        checks++;
        if (rdata !== expv || err !== (addr > N - 8)) begin failures++; $display("FAIL read addr=%0d", addr); end
        rd = 0;
      end
    end
    // a write without commit is dropped
    rd = 0; wr = 1; commit = 0; addr = 16; wdata = ~{model[23], model[22], model[21], model[20], model[19], model[18], model[17], model[16]};
    @(posedge clk); #1; wr = 0; commit = 1; rd = 1; #1;
    checks++;
    if (rdata !== {model[23], model[22], model[21], model[20], model[19], model[18], model[17], model[16]}) begin
      failures++; $display("FAIL write without commit took effect");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_y86_imem: self-checking test of the instruction memory. Loads a
// random image through the write port, then reads ten bytes at many
// addresses (including near the end, where missing bytes read 0) and checks
// the error flag for addresses past the end.
module tb_y86_imem;
  localparam int N = 256;
  logic clk = 0, we = 0;
  logic [63:0] waddr, addr;
  logic [7:0]  wdata;
  logic [79:0] bytes;
  logic        err;
  logic [7:0]  img[N];
  int checks = 0, failures = 0;

  y86_imem #(.BYTES(N)) dut (.clk, .we, .waddr, .wdata, .addr, .bytes, .err);
  always #5 clk = ~clk;

  initial begin
    #200000 failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    for (int i = 0; i < N; i++) begin
      img[i] = $urandom;
      we = 1; waddr = i; wdata = img[i];
      @(posedge clk); #1;
    end
    we = 0;
    for (int i = 0; i < N + 8; i++) begin
      logic [79:0] expv;
      addr = i; #1;
      for (int k = 0; k < 10; k++) expv[8*k +: 8] = (i + k < N) ? img[i + k] : 8'h00;
      checks++;
      if (bytes !== expv || err !== (i >= N)) begin failures++; $display("FAIL addr=%0d", i); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// Self-checking test of fmc_bitplane_buffer: random writes and reads against
// a model array, read data checked in the cycle the address is applied.
module tb_fmc_bitplane_buffer;
  logic clk = 0, we = 0;
  logic [1:0] waddr = 0, raddr = 0;
  logic [63:0] wdata = 0, rdata;
  logic [63:0] model [4];
  int checks = 0, failures = 0;

  fmc_bitplane_buffer dut (.*);
  always #5 clk = ~clk;
  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    for (int a = 0; a < 4; a++) begin
      @(negedge clk); we = 1; waddr = 2'(a); wdata = {$urandom, $urandom}; model[a] = wdata;
    end
    for (int t = 0; t < 2000; t++) begin
      @(negedge clk);
      we = 1'($urandom); waddr = 2'($urandom); wdata = {$urandom, $urandom}; raddr = 2'($urandom);
      #1;
      checks++;
      if (rdata != model[raddr]) failures++;
      @(posedge clk);
      if (we) model[waddr] = wdata;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// Self-checking test of fmc_axi_bl_adapter: random requests (most of them
// 16-beat bursts) with random back-pressure; every request must come out
// once, in order, with its address unchanged and a 16-beat length replaced
// by 12, 10 or 8 beats for cr_mode 0, 1, 2.
module tb_fmc_axi_bl_adapter;
  logic clk = 0, rst_n = 0;
  logic [1:0] cr_mode = 0;
  logic s_valid = 0, s_ready, m_valid, m_ready = 0;
  logic [31:0] s_addr = 0, m_addr;
  logic [7:0] s_len = 0, m_len;
  int checks = 0, failures = 0;

  fmc_axi_bl_adapter dut (.*);
  always #5 clk = ~clk;
  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [39:0] q [$];
  int nout = 0;
  always @(posedge clk) if (rst_n) begin
    if (m_valid && m_ready) begin
      logic [39:0] e;
      checks++;
      if (q.size() == 0) failures++;
      else begin
        e = q.pop_front();
        if (m_addr != e[39:8] || m_len != e[7:0]) begin failures++; $display("got %h/%0d want %h/%0d", m_addr, m_len, e[39:8], e[7:0]); end
      end
      nout++;
    end
    if (s_valid && s_ready)
      q.push_back({s_addr, (s_len == 8'd15) ? ((cr_mode == 0) ? 8'd11 : (cr_mode == 1) ? 8'd9 : 8'd7) : s_len});
  end
  always @(negedge clk) m_ready <= ($urandom_range(0, 3) != 0);

  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk); rst_n = 1;
    for (int t = 0; t < 600; t++) begin
      cr_mode = 2'(t / 200);
      s_valid = 1; s_addr = $urandom; s_len = ($urandom_range(0, 4) == 0) ? 8'($urandom_range(0, 14)) : 8'd15;
      @(posedge clk);
      while (!s_ready) @(posedge clk);
      @(negedge clk);
      s_valid = 0;
      if ($urandom_range(0, 2) == 0) @(negedge clk);
    end
    repeat (20) @(negedge clk);
    checks++;
    if (nout != 600) begin failures++; $display("%0d requests out", nout); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

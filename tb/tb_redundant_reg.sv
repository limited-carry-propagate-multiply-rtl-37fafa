// tb_redundant_reg: self-checking test of the three-word register block.
// Drives random data with a random enable and checks after every clock edge
// that the words load when enabled, hold otherwise, and clear on reset.
module tb_redundant_reg;
  localparam int W = 40;
  logic clk = 0, rst, en;
  logic [W-1:0] d_x, d_a, d_b, q_x, q_a, q_b;
  logic [W-1:0] m_x, m_a, m_b;
  int checks = 0, failures = 0, loads = 0, holds = 0;

  redundant_reg #(.W(W)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1; en = 0; d_x = '1; d_a = '1; d_b = '1;
    @(posedge clk); #1;
    checks++;
    if ({q_x, q_a, q_b} !== '0) begin failures++; $display("FAIL reset"); end
    m_x = '0; m_a = '0; m_b = '0;
    rst = 0;
    for (int t = 0; t < 1000; t++) begin
      en  = 1'($urandom);
      d_x = {$urandom, $urandom}; d_a = {$urandom, $urandom}; d_b = {$urandom, $urandom};
      if (t == 500) rst = 1;
      @(posedge clk); #1;
      if (rst) begin m_x = '0; m_a = '0; m_b = '0; rst = 0; end
      else if (en) begin m_x = d_x; m_a = d_a; m_b = d_b; loads++; end
      else holds++;
      checks++;
      if (q_x !== m_x || q_a !== m_a || q_b !== m_b) begin
        failures++; $display("FAIL cycle %0d", t);
      end
    end
    if (loads == 0 || holds == 0) begin failures++; $display("FAIL load/hold not both seen"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

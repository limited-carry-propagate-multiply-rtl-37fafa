// tb_lcp_mac: end-to-end test of the MAC at its default size (16x16-bit
// operands, 40-bit accumulator, one pipeline level).  mac_stim_check drives
// random accumulations, clears and idle cycles plus a long run of maximum
// products, and checks every redundant and binary result and its latency
// (2 cycles to the redundant output, 3 to binary).
module tb_lcp_mac;
  logic        clk = 0;
  logic        rst, in_valid, clr, red_valid, bin_valid, done;
  logic [15:0] x, y;
  logic [39:0] sum_x, carry_a, carry_b, bin_out;
  int checks, failures;

  always #5 clk = ~clk;

  lcp_mac dut (.*);

  mac_stim_check #(.N(16), .W(40), .C1(10), .C2(23), .PIPE(1), .NCYC(4000)) u_chk (.*);

  initial begin
    repeat (20000) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    wait (done);
    #20;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_lcp_mac_variants: the MAC in its two other configurations, side by
// side: 16x16 bits without the pipeline level (1 cycle to the redundant
// output, 2 to binary) and 32x32-bit operands with a 72-bit accumulator and
// one pipeline level (block boundaries 18 and 41, 4th block from row 7).
module tb_lcp_mac_variants;
  logic clk = 0;
  always #5 clk = ~clk;

  // 16x16, no pipeline
  logic        rst0, v0, clr0, rv0, bv0, done0;
  logic [15:0] x0, y0;
  logic [39:0] sx0, ca0, cb0, bo0;
  int ch0, f0;

  lcp_mac #(.N(16), .W(40), .C1(10), .C2(23), .SPLIT(3), .PIPE(0)) dut0 (
    .clk(clk), .rst(rst0), .in_valid(v0), .clr(clr0), .x(x0), .y(y0),
    .sum_x(sx0), .carry_a(ca0), .carry_b(cb0), .red_valid(rv0),
    .bin_out(bo0), .bin_valid(bv0));

  mac_stim_check #(.N(16), .W(40), .C1(10), .C2(23), .PIPE(0), .NCYC(3000)) chk0 (
    .clk(clk), .rst(rst0), .in_valid(v0), .clr(clr0), .x(x0), .y(y0),
    .sum_x(sx0), .carry_a(ca0), .carry_b(cb0), .red_valid(rv0),
    .bin_out(bo0), .bin_valid(bv0), .done(done0), .checks(ch0), .failures(f0));

  // 32x32 -> 72, one pipeline level
  logic        rst1, v1, clr1, rv1, bv1, done1;
  logic [31:0] x1, y1;
  logic [71:0] sx1, ca1, cb1, bo1;
  int ch1, f1;

  lcp_mac #(.N(32), .W(72), .C1(18), .C2(41), .SPLIT(7), .PIPE(1)) dut1 (
    .clk(clk), .rst(rst1), .in_valid(v1), .clr(clr1), .x(x1), .y(y1),
    .sum_x(sx1), .carry_a(ca1), .carry_b(cb1), .red_valid(rv1),
    .bin_out(bo1), .bin_valid(bv1));

  mac_stim_check #(.N(32), .W(72), .C1(18), .C2(41), .PIPE(1), .NCYC(3000)) chk1 (
    .clk(clk), .rst(rst1), .in_valid(v1), .clr(clr1), .x(x1), .y(y1),
    .sum_x(sx1), .carry_a(ca1), .carry_b(cb1), .red_valid(rv1),
    .bin_out(bo1), .bin_valid(bv1), .done(done1), .checks(ch1), .failures(f1));

  initial begin
    repeat (20000) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", ch0 + ch1, f0 + f1 + 1);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    wait (done0 && done1);
    #20;
    $display("TB_RESULT checks=%0d failures=%0d", ch0 + ch1, f0 + f1);
    $finish;
  end
endmodule

// tb_red2bin: self-checking test of the redundant-to-binary converter.
// Each cycle random three-word inputs are offered with a random valid; one
// clock later bin must equal their sum modulo 2^W (or hold its old value
// when valid was low) and out_valid must equal the valid of the cycle
// before, i.e. the conversion takes exactly one clock.
module tb_red2bin;
  localparam int W = 40;
  logic clk = 0, rst, in_valid, out_valid;
  logic [W-1:0] x, a, b, bin, model;
  int checks = 0, failures = 0;

  red2bin #(.W(W)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1; in_valid = 0; x = '0; a = '0; b = '0;
    @(posedge clk); #1;
    rst = 0; model = '0;
    for (int t = 0; t < 1000; t++) begin
      logic v;
      v = 1'($urandom);
      in_valid = v;
      x = {$urandom, $urandom}; a = {$urandom, $urandom}; b = {$urandom, $urandom};
      if (t == 0) begin x = '1; a = '1; b = '1; in_valid = 1; v = 1; end
      @(posedge clk); #1;
      if (v) model = x + a + b;
      checks += 2;
      if (bin !== model) begin failures++; $display("FAIL bin %h vs %h", bin, model); end
      if (out_valid !== v) begin failures++; $display("FAIL out_valid"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_csa32: self-checking test of the (3,2) counter row.  Checks that
// s + cy = a + b + c modulo 2^W, that s is the bitwise parity and that cy
// has a zero in column 0, for corner and random inputs.
module tb_csa32;
  localparam int W = 40;
  logic [W-1:0] a, b, c, s, cy;
  int checks = 0, failures = 0;

  csa32 #(.W(W)) dut (.a(a), .b(b), .c(c), .s(s), .cy(cy));

  task automatic run(input logic [W-1:0] ia, input logic [W-1:0] ib, input logic [W-1:0] ic);
    logic [W-1:0] e;
    a = ia; b = ib; c = ic;
    #1;
    e = ia + ib + ic;
    checks += 3;
    if (W'(s + cy) !== e) begin failures++; $display("FAIL sum %h+%h != %h", s, cy, e); end
    if (s !== (ia ^ ib ^ ic)) begin failures++; $display("FAIL parity"); end
    if (cy[0] !== 1'b0) begin failures++; $display("FAIL carry lsb"); end
  endtask

  function automatic logic [W-1:0] rnd();
    return {$urandom, $urandom};
  endfunction

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    run('1, '1, '1);
    run('1, '0, '1);
    for (int t = 0; t < 2000; t++) run(rnd(), rnd(), rnd());
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

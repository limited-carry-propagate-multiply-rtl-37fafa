// tb_mo_adder: self-checking test of the multi-operand adder at the size of
// the 2nd/4th MAC blocks (5 operands of 13 bits) and of the 1st block
// (7 operands of 10 bits).  Results are compared with a sum formed in a
// 64-bit integer; all-ones operands check that the carry bits are kept.
module tb_mo_adder;
  logic [4:0][12:0] ops5;
  logic [15:0]      sum5;
  logic [6:0][9:0]  ops7;
  logic [12:0]      sum7;
  int checks = 0, failures = 0;

  mo_adder #(.NOP(5), .WIDTH(13)) dut5 (.ops(ops5), .sum(sum5));
  mo_adder #(.NOP(7), .WIDTH(10)) dut7 (.ops(ops7), .sum(sum7));

  task automatic run(input bit all_ones);
    longint e5, e7;
    e5 = 0; e7 = 0;
    for (int k = 0; k < 5; k++) begin
      ops5[k] = all_ones ? '1 : 13'($urandom);
      e5 += longint'(ops5[k]);
    end
    for (int k = 0; k < 7; k++) begin
      ops7[k] = all_ones ? '1 : 10'($urandom);
      e7 += longint'(ops7[k]);
    end
    #1;
    checks += 2;
    if (longint'(sum5) != e5) begin failures++; $display("FAIL 5-op %0d vs %0d", sum5, e5); end
    if (longint'(sum7) != e7) begin failures++; $display("FAIL 7-op %0d vs %0d", sum7, e7); end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    run(1'b1);
    for (int t = 0; t < 2000; t++) run(1'b0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// mo_adder: carry-propagate multi-operand adder, one column block of the MAC.
//
// Adds NOP unsigned operands of WIDTH bits.  The result is WIDTH + CW bits
// wide with CW = clog2(NOP), enough for NOP * (2^WIDTH - 1): the low WIDTH
// bits are the block sum, the top CW bits the block carry.  The sum is
// written as a chain of binary additions so that FPGA synthesis maps each
// one onto the fabric's fast carry chain, which is the point of the design:
// short carry-propagate adders over a narrow column range instead of a
// counter tree.  The chain order is this design's choice.  Combinational.
module mo_adder #(
  parameter int NOP   = 5,    // number of operands
  parameter int WIDTH = 13    // operand width
) (
  input  logic [NOP-1:0][WIDTH-1:0]                       ops,
  output logic [WIDTH+lcp_mac_pkg::carry_w(NOP)-1:0]     sum
);
  localparam int CW = lcp_mac_pkg::carry_w(NOP);

  always_comb begin
    sum = '0;
    for (int k = 0; k < NOP; k++)
      sum = sum + (WIDTH+CW)'(ops[k]);
  end

endmodule

// redundant_reg: the MAC's register block, holding the accumulator in
// double carry-save form as three W-bit words (sum_x, carry_a, carry_b).
//
// On a rising clock edge with en high the three words load d_x, d_a, d_b;
// with en low they hold.  rst is synchronous and active high and clears all
// three words to zero (the value 0).  The enable and the reset are this
// design's choice: the published design shows a plain register in the loop.
module redundant_reg #(
  parameter int W = 40
) (
  input  logic         clk,
  input  logic         rst,
  input  logic         en,
  input  logic [W-1:0] d_x,
  input  logic [W-1:0] d_a,
  input  logic [W-1:0] d_b,
  output logic [W-1:0] q_x,
  output logic [W-1:0] q_a,
  output logic [W-1:0] q_b
);
  always_ff @(posedge clk) begin
    if (rst) begin
      q_x <= '0;
      q_a <= '0;
      q_b <= '0;
    end else if (en) begin
      q_x <= d_x;
      q_a <= d_a;
      q_b <= d_b;
    end
  end

endmodule

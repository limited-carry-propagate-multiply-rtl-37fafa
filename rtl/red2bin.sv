// red2bin: redundant-to-binary converter of the MAC.
//
// Adds the three components of the double carry-save result with one
// three-operand (ternary) carry-propagate adder and registers the W-bit two's
// complement sum, so conversion costs exactly one extra clock cycle.  The
// result is modulo 2^W.  out_valid follows in_valid one cycle later and bin
// loads only when in_valid is high; the valid flag and the synchronous,
// active-high reset are this design's additions.
module red2bin #(
  parameter int W = 40
) (
  input  logic         clk,
  input  logic         rst,
  input  logic         in_valid,
  input  logic [W-1:0] x,
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  output logic [W-1:0] bin,
  output logic         out_valid
);
  always_ff @(posedge clk) begin
    if (rst) begin
      bin       <= '0;
      out_valid <= 1'b0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) bin <= x + a + b;
    end
  end

endmodule

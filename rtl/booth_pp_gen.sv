// booth_pp_gen: radix-4 (modified) Booth encoder and partial-product selector
// that lays the partial products out as sign-extended W-bit dot rows.
//
// The N-bit two's complement multiplier y is recoded into NPP = N/2 digits
// d_i in {-2,-1,0,1,2}, digit i taken from y[2i+1], y[2i], y[2i-1] (y[-1]=0).
// For each digit the multiplicand x (or 2x, or 0) is selected as an N+1-bit
// value and, for a negative digit, inverted; the +1 that completes the
// negation is the separate bit s_i = y[2i+1].  The sign e_i of a partial
// product is its bit N.
//
// Rather than sign-extending every partial product to W bits, the rows use
// the constant-folded pattern of the published dot diagram:
//   row 0         : pp_0 at bits 0..N, then e_0, e_0, ~e_0 at N+1..N+3
//   row i (middle): s_{i-1} at 2i-2, pp_i at 2i..2i+N, ~e_i at 2i+N+1,
//                   a constant 1 at 2i+N+2
//   row NPP-1     : as a middle row, but the constant is a run of ones
//                   from 2i+N+2 up to bit W-1
// s_{i-1} sits in the two empty columns below row i; the last one, s_last,
// has no free slot in a row and is brought out separately (the MAC places it
// in an empty slot of its carry_a output).  Modulo 2^W,
//   sum(rows) + (s_last << 2(NPP-1)) = x * y.
// The layout and the sign-extension bits follow the published design; the digit
// selection logic is the standard Booth recoding.  Purely combinational.
module booth_pp_gen #(
  parameter int N = 16,   // operand width (even)
  parameter int W = 40    // width of the rows / accumulator
) (
  input  logic [N-1:0]            x,       // multiplicand
  input  logic [N-1:0]            y,       // multiplier, Booth recoded
  output logic [N/2-1:0][W-1:0]   rows,    // dot rows, see above
  output logic                    s_last   // negation bit of the last row, weight 2^(N-2)
);
  localparam int NPP = N / 2;

  initial begin
    assert (N % 2 == 0 && N >= 4) else $fatal(1, "N must be even and >= 4");
    assert (W >= 2 * (NPP - 1) + N + 3) else $fatal(1, "W too small for the row layout");
  end

  logic [NPP-1:0][N:0] pp;   // selected, conditionally inverted partial products
  logic [NPP-1:0]      s;    // negation bits

  always_comb begin
    for (int i = 0; i < NPP; i++) begin
      logic b2, b1, b0, one, two;
      b2  = y[2*i+1];
      b1  = y[2*i];
      b0  = (i == 0) ? 1'b0 : y[2*i-1];
      one = b1 ^ b0;
      two = (b2 & ~b1 & ~b0) | (~b2 & b1 & b0);
      s[i]  = b2;
      pp[i] = (one ? {x[N-1], x} : two ? {x, 1'b0} : '0) ^ {(N+1){b2}};
    end
  end

  always_comb begin
    rows = '0;
    for (int i = 0; i < NPP; i++) begin
      rows[i][2*i +: N+1] = pp[i];
      if (i == 0) begin
        rows[0][N+1] = pp[0][N];
        rows[0][N+2] = pp[0][N];
        rows[0][N+3] = ~pp[0][N];
      end else begin
        rows[i][2*i-2]   = s[i-1];
        rows[i][2*i+N+1] = ~pp[i][N];
        if (i < NPP - 1) rows[i][2*i+N+2] = 1'b1;
        else
          for (int b = 2 * i + N + 2; b < W; b++) rows[i][b] = 1'b1;
      end
    end
  end

  assign s_last = s[NPP-1];

endmodule

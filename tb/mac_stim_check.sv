// mac_stim_check: stimulus generator and scoreboard for lcp_mac, shared by
// the MAC testbenches.
//
// It resets the MAC, then drives NCYC cycles of random operand pairs with a
// random valid strobe and occasional clears, followed by a long run of
// maximum-magnitude products (x = y = most negative value) that drives the
// accumulator past the W-bit range so the modulo-2^W wrap is exercised.
// A reference accumulator, kept 128 bits wide, predicts every result.  For
// each operand pair it checks that, exactly LAT = PIPE+1 clock edges later,
// red_valid is high and sum_x + carry_a + carry_b equals the prediction
// modulo 2^W, and that one edge after that bin_valid is high and bin_out
// equals it; cycles without an operand must produce no valid flag.
// It also counts how often each mechanism of the MAC was used and fails the
// run if one never was: clear, hold (no operand), accumulate, the lone sign
// bit in carry_a, non-zero 1st/2nd/4th block carries, and wrap-around.
module mac_stim_check #(
  parameter int N    = 16,
  parameter int W    = 40,
  parameter int C1   = 10,
  parameter int C2   = 23,
  parameter int PIPE = 1,
  parameter int NCYC = 3000
) (
  input  logic         clk,
  output logic         rst,
  output logic         in_valid,
  output logic         clr,
  output logic [N-1:0] x,
  output logic [N-1:0] y,
  input  logic [W-1:0] sum_x,
  input  logic [W-1:0] carry_a,
  input  logic [W-1:0] carry_b,
  input  logic         red_valid,
  input  logic [W-1:0] bin_out,
  input  logic         bin_valid,
  output logic         done,
  output int           checks,
  output int           failures
);
  localparam int LAT   = PIPE + 1;
  localparam int NMAX  = 700;
  localparam int TOTAL = NCYC + NMAX + LAT + 4;
  localparam int SL    = N - 2;

  typedef logic signed [127:0] wide_t;

  logic         exp_v   [TOTAL];
  logic [W-1:0] exp_acc [TOTAL];
  int n_clear, n_hold, n_accum, n_slast, n_c1, n_c2, n_c4, n_wrap;

  function automatic wide_t sx(input logic [N-1:0] v);
    return wide_t'($signed(v));
  endfunction

  // reference: acc is the unbounded sum; wrapped when it leaves W signed bits
  wide_t acc;
  wide_t lim;

  initial begin
    lim = wide_t'(1) <<< (W - 1);
    checks = 0; failures = 0; done = 0;
    n_clear = 0; n_hold = 0; n_accum = 0; n_slast = 0;
    n_c1 = 0; n_c2 = 0; n_c4 = 0; n_wrap = 0;
    acc = 0;
    rst = 1; in_valid = 0; clr = 0; x = '0; y = '0;
    for (int t = 0; t < TOTAL; t++) exp_v[t] = 0;
    repeat (3) @(posedge clk);
    #1 rst = 0;
    for (int t = 0; t < NCYC + NMAX; t++) begin
      if (t < NCYC) begin
        in_valid = ($urandom % 5) != 0;
        clr      = (t == 0) || (($urandom % 40) == 0);
        x = N'({$urandom, $urandom});
        y = N'({$urandom, $urandom});
        if ($urandom % 8 == 0) x = {1'b1, {(N-1){1'b0}}};
      end else begin
        in_valid = 1;
        clr      = (t == NCYC);
        x = {1'b1, {(N-1){1'b0}}};
        y = {1'b1, {(N-1){1'b0}}};
      end
      if (in_valid) begin
        if (clr) begin acc = 0; n_clear++; end
        else n_accum++;
        acc = acc + sx(x) * sx(y);
        if (acc >= lim || acc < -lim) n_wrap++;
      end else n_hold++;
      exp_v[t + LAT]   = in_valid;
      exp_acc[t + LAT] = W'(acc);
      @(posedge clk);
      #1;
    end
    in_valid = 0; clr = 0;
    repeat (LAT + 3) @(posedge clk);
    #1 done = 1;
  end

  // scoreboard, sampled just after every clock edge
  int cyc = -2;
  logic         prev_v;
  logic [W-1:0] prev_acc;
  always @(posedge clk) begin
    #2;
    if (rst) begin
      cyc = -1; prev_v = 0; prev_acc = '0;
    end else if (!done) begin
      cyc++;
      if (cyc >= 0 && cyc < TOTAL) begin
        checks++;
        if (red_valid !== exp_v[cyc]) begin
          failures++;
          $display("FAIL cycle %0d red_valid=%0b expected %0b", cyc, red_valid, exp_v[cyc]);
        end else if (exp_v[cyc]) begin
          checks++;
          if (W'(sum_x + carry_a + carry_b) !== exp_acc[cyc]) begin
            failures++;
            $display("FAIL cycle %0d redundant %h expected %h", cyc,
                     W'(sum_x + carry_a + carry_b), exp_acc[cyc]);
          end
          if (carry_a[SL]) n_slast++;
          if ((carry_a[C2-1:C1] & ~((C2-C1)'(1) << (SL - C1))) != '0) n_c1++;
          if (carry_a[W-1:C2] != '0) n_c2++;
          if (carry_b[W-1:C2] != '0) n_c4++;
        end
        checks++;
        if (bin_valid !== prev_v) begin
          failures++;
          $display("FAIL cycle %0d bin_valid=%0b expected %0b", cyc, bin_valid, prev_v);
        end else if (prev_v) begin
          checks++;
          if (bin_out !== prev_acc) begin
            failures++;
            $display("FAIL cycle %0d bin_out %h expected %h", cyc, bin_out, prev_acc);
          end
        end
        prev_v = exp_v[cyc];
        if (exp_v[cyc]) prev_acc = exp_acc[cyc];
      end
    end
  end

  task automatic need(input string what, input int n);
    $display("  %-28s %0d", what, n);
    checks++;
    if (n == 0) begin failures++; $display("FAIL mechanism never used: %s", what); end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    wait (done);
    $display("mechanisms (N=%0d W=%0d PIPE=%0d):", N, W, PIPE);
    need("clear (new sum)", n_clear);
    need("hold (no operand)", n_hold);
    need("accumulate", n_accum);
    need("last sign bit in carry_a", n_slast);
    need("1st block carry", n_c1);
    need("2nd block carry", n_c2);
    need("4th block carry", n_c4);
    need("wrap beyond W bits", n_wrap);
  end
endmodule

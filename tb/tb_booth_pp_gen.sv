// tb_booth_pp_gen: self-checking test of the Booth partial-product rows.
// For corner and random operand pairs it checks that the rows plus the lone
// negation bit add up to x*y modulo 2^W, that every row has the folded
// sign-extension bits where the layout puts them (row 0: e,e,~e at N+1..N+3; row i: ~e_i at 2i+N+1),
// and that no row has dots outside its column span.
module tb_booth_pp_gen;
  import lcp_mac_pkg::*;
  localparam int N = 16;
  localparam int W = 40;
  localparam int NPP = N / 2;

  logic [N-1:0]          x, y;
  logic [NPP-1:0][W-1:0] rows;
  logic                  s_last;
  int checks = 0, failures = 0;

  booth_pp_gen #(.N(N), .W(W)) dut (.x(x), .y(y), .rows(rows), .s_last(s_last));

  task automatic check_pair(input logic [N-1:0] a, input logic [N-1:0] b);
    logic [W-1:0] total, expect_p;
    longint pa, pb;
    x = a; y = b;
    #1;
    total = W'(s_last) << (2 * (NPP - 1));
    for (int i = 0; i < NPP; i++) total += rows[i];
    pa = longint'($signed(a)); pb = longint'($signed(b));
    expect_p = W'(pa * pb);
    checks++;
    if (total !== expect_p) begin
      failures++;
      $display("FAIL x=%0d y=%0d rows sum=%h expected=%h", pa, pb, total, expect_p);
    end
    for (int i = 0; i < NPP; i++) begin
      logic [W-1:0] outside;
      outside = rows[i];
      for (int c = row_lo(i); c <= row_hi(i, N, W); c++) outside[c] = 1'b0;
      checks++;
      if (outside != '0) begin
        failures++;
        $display("FAIL row %0d has dots outside its span: %h", i, rows[i]);
      end
      // ~e_i sits just above the partial product; sign of the pp is bit 2i+N
      checks++;
      if ((i == 0) ? (rows[0][N+3] !== ~rows[0][N] || rows[0][N+2:N+1] !== {2{rows[0][N]}})
                   : (rows[i][2*i+N+1] !== ~rows[i][2*i+N])) begin
        failures++;
        $display("FAIL row %0d sign-extension bit wrong", i);
      end
    end
  endtask

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [N-1:0] corner [6] = '{16'h0000, 16'h0001, 16'hFFFF, 16'h7FFF, 16'h8000, 16'h5555};
    foreach (corner[i]) foreach (corner[j]) check_pair(corner[i], corner[j]);
    for (int t = 0; t < 3000; t++) check_pair(N'($urandom), N'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

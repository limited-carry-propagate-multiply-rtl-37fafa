// lcp_mac: limited carry-propagate fused multiply-accumulate unit.
//
// Every cycle with in_valid high it computes acc <= acc + x*y (acc <= x*y
// when clr is also high), x and y N-bit two's complement, acc W bits, modulo
// 2^W.  The accumulator is never resolved inside the loop: it is kept in a
// "double carry-save" form of three words, sum_x + carry_a + carry_b.
//
// Datapath (N=16, W=40 given as example):
//  * booth_pp_gen makes NPP = N/2 Booth partial-product rows with folded
//    sign extension, plus the lone negation bit s_last (s7).
//  * Optional pipeline stage (PIPE=1): the rows are registered before the
//    adders.  The accumulate loop itself stays one cycle long.
//  * The registered result is fed back through a row of (3,2) counters
//    (csa32) as two accumulate rows, fb_s and fb_c.
//  * The dot diagram of rows + accumulate rows is cut into four column
//    blocks, each summed by a carry-propagate multi-operand adder (mo_adder):
//      1st block  columns [0, C1)   : fb_s and the rows reaching below C1
//                                      (fb_c is always zero there)
//      2nd block  columns [C1, C2)  : fb_s, fb_c and rows 0..SPLIT-1
//      4th block  columns [C1, C2)  : rows SPLIT..NPP-1
//      3rd block  columns [C2, W)   : fb_s, fb_c and the rows reaching C2+
//  * The block sums and carries are merged without any carry propagation:
//      sum_x   = 3rd sum | 2nd sum | 1st sum
//      carry_a = 2nd carry at C2.. , s_last at 2(NPP-1), 1st carry at C1..
//      carry_b = 4th carry at C2.. , 4th sum at C1..C2-1
//    The carry out of the 3rd block falls off the top (modulo 2^W).
//  * redundant_reg holds the triple; red2bin adds it with a ternary adder
//    into a W-bit register.
// For N=16, W=40 the blocks are 0..9, 10..22 (two of them) and 23..39, as
// in the published design; the 2nd and 4th blocks are 5-operand adders, the 3rd a
// 7-operand one.  The 1st block takes whole rows rather than the published
// dot-compacted arrangement (7 operands here); the sum is the same.
//
// Timing: the redundant outputs update PIPE+1 clock edges after an operand
// pair is presented (red_valid marks it), bin_out one edge later
// (bin_valid).  One operand pair is accepted per clock.  in_valid low holds
// the accumulator.  rst is synchronous, active high.  The published design does not
// describe control signals: in_valid, clr, the valid outputs and the place
// of the pipeline register are this design's choices.  The published design gives
// block boundaries only for 16x16; other sizes take C1, C2, SPLIT from
// the parameters, checked at elaboration.
module lcp_mac
  import lcp_mac_pkg::*;
#(
  parameter int N     = 16,  // operand width
  parameter int W     = 40,  // accumulator width
  parameter int C1    = 10,  // first column of the middle blocks
  parameter int C2    = 23,  // first column of the 3rd block
  parameter int SPLIT = 3,   // first partial-product row of the 4th block
  parameter int PIPE  = 1    // 1: register the partial products before the adders
) (
  input  logic         clk,
  input  logic         rst,
  input  logic         in_valid,
  input  logic         clr,
  input  logic [N-1:0] x,
  input  logic [N-1:0] y,
  output logic [W-1:0] sum_x,
  output logic [W-1:0] carry_a,
  output logic [W-1:0] carry_b,
  output logic         red_valid,
  output logic [W-1:0] bin_out,
  output logic         bin_valid
);
  localparam int NPP = N / 2;
  localparam int SL  = 2 * (NPP - 1);   // weight of s_last
  localparam int WM  = C2 - C1;         // width of the middle blocks
  localparam int W3  = W - C2;          // width of the 3rd block

  localparam int NOP1 = 1 + rows_in(0,  C1, 0,     NPP-1, N, W);
  localparam int NOP2 = 2 + rows_in(C1, C2, 0,     SPLIT-1, N, W);
  localparam int NOP4 =     rows_in(C1, C2, SPLIT, NPP-1, N, W);
  localparam int NOP3 = 2 + rows_in(C2, W,  0,     NPP-1, N, W);
  localparam int CW1  = carry_w(NOP1);
  localparam int CW2  = carry_w(NOP2);
  localparam int CW4  = carry_w(NOP4);
  localparam int CW3  = carry_w(NOP3);

  initial begin
    assert (0 < SPLIT && SPLIT < NPP) else $fatal(1, "SPLIT out of range");
    assert (NOP4 >= 1) else $fatal(1, "4th block has no operands");
    assert (C1 + CW1 <= SL && SL < C2)
      else $fatal(1, "1st-block carry and s_last do not fit in carry_a");
    assert (C2 + CW2 <= W && C2 + CW4 <= W)
      else $fatal(1, "2nd/4th-block carries do not fit below W");
  end

  // ---------------- partial products (and the optional pipeline stage)
  logic [NPP-1:0][W-1:0] rows_c, rows_p;
  logic                  sl_c, sl_p;
  logic                  v_p, clr_p;

  booth_pp_gen #(.N(N), .W(W)) u_pp (.x(x), .y(y), .rows(rows_c), .s_last(sl_c));

  if (PIPE != 0) begin : g_pipe
    always_ff @(posedge clk) begin
      if (rst) begin
        v_p    <= 1'b0;
        clr_p  <= 1'b0;
        rows_p <= '0;
        sl_p   <= 1'b0;
      end else begin
        v_p   <= in_valid;
        clr_p <= clr;
        if (in_valid) begin
          rows_p <= rows_c;
          sl_p   <= sl_c;
        end
      end
    end
  end else begin : g_nopipe
    assign v_p    = in_valid;
    assign clr_p  = clr;
    assign rows_p = rows_c;
    assign sl_p   = sl_c;
  end

  // ---------------- accumulate feedback through the (3,2) counter row
  logic [W-1:0] acc_s, acc_c, fb_s, fb_c;

  csa32 #(.W(W)) u_csa (.a(sum_x), .b(carry_a), .c(carry_b), .s(acc_s), .cy(acc_c));

  assign fb_s = clr_p ? '0 : acc_s;
  assign fb_c = clr_p ? '0 : acc_c;

  // ---------------- the four carry-propagate multi-operand adder blocks
  logic [NOP1-1:0][C1-1:0] ops1;
  logic [NOP2-1:0][WM-1:0] ops2;
  logic [NOP4-1:0][WM-1:0] ops4;
  logic [NOP3-1:0][W3-1:0] ops3;
  logic [C1+CW1-1:0]       sum1;
  logic [WM+CW2-1:0]       sum2;
  logic [WM+CW4-1:0]       sum4;
  logic [W3+CW3-1:0]       sum3;

  assign ops1[0] = fb_s[C1-1:0];
  for (genvar k = 0; k < NOP1 - 1; k++) begin : g_op1
    assign ops1[k+1] = rows_p[nth_row(k, 0, C1, 0, NPP-1, N, W)][C1-1:0];
  end

  assign ops2[0] = fb_s[C2-1:C1];
  assign ops2[1] = fb_c[C2-1:C1];
  for (genvar k = 0; k < NOP2 - 2; k++) begin : g_op2
    assign ops2[k+2] = rows_p[nth_row(k, C1, C2, 0, SPLIT-1, N, W)][C2-1:C1];
  end

  for (genvar k = 0; k < NOP4; k++) begin : g_op4
    assign ops4[k] = rows_p[nth_row(k, C1, C2, SPLIT, NPP-1, N, W)][C2-1:C1];
  end

  assign ops3[0] = fb_s[W-1:C2];
  assign ops3[1] = fb_c[W-1:C2];
  for (genvar k = 0; k < NOP3 - 2; k++) begin : g_op3
    assign ops3[k+2] = rows_p[nth_row(k, C2, W, 0, NPP-1, N, W)][W-1:C2];
  end

  mo_adder #(.NOP(NOP1), .WIDTH(C1)) u_blk1 (.ops(ops1), .sum(sum1));
  mo_adder #(.NOP(NOP2), .WIDTH(WM)) u_blk2 (.ops(ops2), .sum(sum2));
  mo_adder #(.NOP(NOP3), .WIDTH(W3)) u_blk3 (.ops(ops3), .sum(sum3));
  mo_adder #(.NOP(NOP4), .WIDTH(WM)) u_blk4 (.ops(ops4), .sum(sum4));

  // ---------------- carry-free merge into the double carry-save triple
  logic [W-1:0] nx, na, nb;

  always_comb begin
    nx = {sum3[W3-1:0], sum2[WM-1:0], sum1[C1-1:0]};
    na = '0;
    na[C1 +: CW1] = sum1[C1 +: CW1];
    na[SL]        = sl_p;
    na[C2 +: CW2] = sum2[WM +: CW2];
    nb = '0;
    nb[C1 +: WM]  = sum4[WM-1:0];
    nb[C2 +: CW4] = sum4[WM +: CW4];
  end

  // ---------------- register block and binary conversion
  redundant_reg #(.W(W)) u_reg (
    .clk(clk), .rst(rst), .en(v_p),
    .d_x(nx), .d_a(na), .d_b(nb),
    .q_x(sum_x), .q_a(carry_a), .q_b(carry_b)
  );

  always_ff @(posedge clk) begin
    if (rst) red_valid <= 1'b0;
    else     red_valid <= v_p;
  end

  red2bin #(.W(W)) u_conv (
    .clk(clk), .rst(rst), .in_valid(red_valid),
    .x(sum_x), .a(carry_a), .b(carry_b),
    .bin(bin_out), .out_valid(bin_valid)
  );

  // The 1st block omits fb_c: carry_a and carry_b are zero below C1, so the
  // counter's carry row is zero up to and including column C1.
  always_comb assert (rst || acc_c[C1:0] == '0)
    else $error("accumulate carry row not zero below C1");

endmodule

// tb_ds_mul: self-checking test of the digit-serial multiplier.
// Two instances are exercised, W=8 with N=4 (the main configuration) and
// W=8 with N=2.  Each frame applies a W-bit multiplier operand as W/N digits
// (least significant first) followed by W/N zero digits, with Control-1 on
// the first cycle and Control-2 on the sign digit.  The 2W product bits
// collected from the output digits must equal A*B, and they must all have
// appeared after exactly 2W/N cycles.  All 2^16 operand pairs are applied to
// both instances, each pair once, in frames that follow each other directly.
module tb_ds_mul;
  localparam int W = 8;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  // N = 4 instance
  logic [W-1:0] a4;  logic [W:0] na4;  logic [3:0] b4, p4;  logic c1_4, c2_4;
  ds_mul #(.W(W), .N(4)) dut4 (.clk(clk), .rst_n(rst_n), .a(a4), .neg_a(na4),
    .b_digit(b4), .ctrl1(c1_4), .ctrl2(c2_4), .p_digit(p4));

  // N = 2 instance
  logic [W-1:0] a2;  logic [W:0] na2;  logic [1:0] b2, p2;  logic c1_2, c2_2;
  ds_mul #(.W(W), .N(2)) dut2 (.clk(clk), .rst_n(rst_n), .a(a2), .neg_a(na2),
    .b_digit(b2), .ctrl1(c1_2), .ctrl2(c2_2), .p_digit(p2));

  initial begin
    #20000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [W-1:0] av, bv, av2, bv2;
    logic [2*W-1:0] prod4, prod2, exp4, exp2;
    int cyc;
    a4 = '0; na4 = '0; b4 = '0; c1_4 = 1'b0; c2_4 = 1'b0;
    a2 = '0; na2 = '0; b2 = '0; c1_2 = 1'b0; c2_2 = 1'b0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    for (int i = 0; i < (1 << (2 * W)); i++) begin
      av = W'(i >> W); bv = W'(i);
      av2 = av; bv2 = bv;
      a4 = av;  na4 = -{av[W-1], av};
      a2 = av2; na2 = -{av2[W-1], av2};
      prod4 = '0; prod2 = '0; cyc = 0;
      // both instances run their frames side by side; N=4 finishes in 4 cycles, N=2 in 8
      for (int t = 0; t < 2 * W / 2; t++) begin
        if (t < 2 * W / 4) begin
          b4   = (t < W / 4) ? bv[4*t +: 4] : 4'h0;
          c1_4 = (t == 0);
          c2_4 = (t == W / 4 - 1);
        end else begin
          b4 = 4'h0; c1_4 = 1'b0; c2_4 = 1'b0;
        end
        b2   = (t < W / 2) ? bv2[2*t +: 2] : 2'h0;
        c1_2 = (t == 0);
        c2_2 = (t == W / 2 - 1);
        #1;
        if (t < 2 * W / 4) prod4[4*t +: 4] = p4;
        prod2[2*t +: 2] = p2;
        @(posedge clk); #1;
        cyc++;
        if (t == 2 * W / 4 - 1) begin
          exp4 = (2*W)'(longint'($signed(av)) * longint'($signed(bv)));
          checks++;
          if (prod4 !== exp4 || cyc != 2 * W / 4) begin
            failures++;
            if (failures < 5) $display("N=4: %0d * %0d gave %h, expected %h", $signed(av), $signed(bv), prod4, exp4);
          end
        end
      end
      exp2 = (2*W)'(longint'($signed(av2)) * longint'($signed(bv2)));
      checks++;
      if (prod2 !== exp2 || cyc != 2 * W / 2) begin
        failures++;
        if (failures < 5) $display("N=2: %0d * %0d gave %h, expected %h", $signed(av2), $signed(bv2), prod2, exp2);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_ds_mul_block_b: self-checking test of the Block-B carry-save row.
// With Control-2 at 0 the row must add b*A, with Control-2 at 1 it must add
// b*(-A); the carry-save identity
//   pp + Si + Ci == p_out + 2*(So + Co)
// is checked for random operands, including A = -2^(W-1) whose negation
// needs W+1 bits.
module tb_ds_mul_block_b;
  localparam int W = 8;

  logic [W-1:0] a;
  logic [W:0]   neg_a;
  logic         ctrl2, b;
  logic [W:0]   s_in, c_in, s_out, c_out;
  logic         p_out;
  int checks = 0, failures = 0;
  int neg_used = 0;

  ds_mul_block_b #(.W(W)) dut (.*);

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint t, rhs, av;
    for (int i = 0; i < 4000; i++) begin
      a     = W'($urandom);
      if (i < 8) a = 8'h80;
      av    = longint'($signed(a));
      neg_a = (W+1)'(-av);
      ctrl2 = 1'($urandom);
      b     = (i < 8) ? 1'b1 : 1'($urandom);
      s_in  = (W+1)'($urandom);
      c_in  = (W+1)'($urandom);
      #1;
      t   = (b ? (ctrl2 ? -av : av) : 0) + longint'($signed(s_in)) + longint'($signed(c_in));
      rhs = longint'(p_out) + 2 * (longint'($signed(s_out)) + longint'($signed(c_out)));
      if (b && ctrl2) neg_used++;
      checks++;
      if (t != rhs) begin
        failures++;
        if (failures < 5) $display("identity mismatch a=%0d b=%0d c2=%0d: %0d vs %0d", av, b, ctrl2, t, rhs);
      end
      checks++;
      if (p_out != t[0]) failures++;
    end
    checks++;
    if (neg_used == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

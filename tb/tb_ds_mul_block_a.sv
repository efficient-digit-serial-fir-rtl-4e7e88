// tb_ds_mul_block_a: self-checking test of one Block-A carry-save row.
// For random multiplicands, multiplier bits and carry-save inputs it checks
// the arithmetic identity of the row,
//   b*A + Si + Ci == p_out + 2*(So + Co)     (all two's complement),
// and that p_out is the least significant bit of b*A + Si + Ci.
module tb_ds_mul_block_a;
  localparam int W = 8;

  logic [W-1:0] a;
  logic         b;
  logic [W:0]   s_in, c_in, s_out, c_out;
  logic         p_out;
  int checks = 0, failures = 0;

  ds_mul_block_a #(.W(W)) dut (.*);

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint t, rhs;
    for (int i = 0; i < 4000; i++) begin
      a    = W'($urandom);
      b    = 1'($urandom);
      s_in = (W+1)'($urandom);
      c_in = (W+1)'($urandom);
      if (i < 4) begin a = (i[0]) ? 8'h80 : 8'h7f; b = 1'b1; end
      #1;
      t   = (b ? longint'($signed(a)) : 0) + longint'($signed(s_in)) + longint'($signed(c_in));
      rhs = longint'(p_out) + 2 * (longint'($signed(s_out)) + longint'($signed(c_out)));
      checks++;
      if (t != rhs) begin
        failures++;
        if (failures < 5) $display("identity mismatch a=%0d b=%0d: %0d vs %0d", $signed(a), b, t, rhs);
      end
      checks++;
      if (p_out != t[0]) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// ds_mul_block_b: last carry-save row of the digit-serial multiplier (Block-B).
//
// Identical to Block-A (ds_mul_block_a) while ctrl2 (Control-2) is 0.  When
// ctrl2 is 1 the row handles the sign bit of a two's-complement multiplier
// operand, whose weight is negative, so the partial product is -A instead of
// A.  -A is supplied from outside as a (W+1)-bit value because -(-2^(W-1))
// does not fit in W bits.  A row of multiplexers chooses between A and -A,
// the chosen word is ANDed with b, and one full adder per bit adds it to the
// incoming carry-save vectors.  Output conventions are those of Block-A:
// p_out is the finished product bit, s_out is the sum vector shifted right by
// one, c_out the carry vector.
//
// The multiplexer row selected by Control-2 and the A / -A inputs follow the
// Block-B drawing; the (W+1)-bit carry-save vectors are this implementation's
// choice.
module ds_mul_block_b #(
  parameter int W = 8
) (
  input  logic [W-1:0] a,                 // multiplicand A
  input  logic [W:0]   neg_a,             // its two's complement -A
  input  logic         ctrl2,             // Control-2: use -A (sign digit of the multiplier)
  input  logic         b,                 // multiplier bit b(i)
  input  logic [W:0]   s_in,
  input  logic [W:0]   c_in,
  output logic [W:0]   s_out,
  output logic [W:0]   c_out,
  output logic         p_out
);

  logic [W:0] op, pp, s;

  always_comb begin
    op    = ctrl2 ? neg_a : {a[W-1], a};
    pp    = b ? op : '0;
    s     = pp ^ s_in ^ c_in;
    c_out = (pp & s_in) | (pp & c_in) | (s_in & c_in);
    p_out = s[0];
    s_out = {s[W], s[W:1]};
  end

endmodule

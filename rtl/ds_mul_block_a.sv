// ds_mul_block_a: one carry-save row of the digit-serial multiplier (Block-A).
//
// The row handles one multiplier bit b.  Its partial product (A when b is 1,
// zero otherwise) is added to the incoming sum and carry vectors with one full
// adder per bit position, producing new sum and carry vectors.  The least
// significant sum bit is a finished product bit (p_out); the sum vector is
// then shifted right by one, so the next row sees both vectors aligned to the
// next product bit.  All vectors are W+1 bits wide and two's complement, so
// the row is exact for signed A without any end correction: the full-adder
// identity x+y+z = s+2c holds bit by bit, including the negative-weight top
// bit.
//
// The AND gates and full adders per bit follow the Block-A drawing of the
// multiplier; the extra (W+1)-th bit position, which makes the rows exact for
// two's-complement operands, is this implementation's choice.  In the domino
// circuit each row evaluates in its own clock phase; here a row is plain
// combinational logic.
module ds_mul_block_a #(
  parameter int W = 8                     // multiplicand width
) (
  input  logic [W-1:0] a,                 // multiplicand A, two's complement
  input  logic         b,                 // multiplier bit b(i)
  input  logic [W:0]   s_in,              // sum vector Si
  input  logic [W:0]   c_in,              // carry vector Ci
  output logic [W:0]   s_out,             // sum vector for the next row, already shifted
  output logic [W:0]   c_out,             // carry vector for the next row
  output logic         p_out              // finished product bit So(0)
);

  logic [W:0] pp, s;

  always_comb begin
    pp    = b ? {a[W-1], a} : '0;
    s     = pp ^ s_in ^ c_in;
    c_out = (pp & s_in) | (pp & c_in) | (s_in & c_in);
    p_out = s[0];
    s_out = {s[W], s[W:1]};
  end

endmodule

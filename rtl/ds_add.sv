// ds_add: digit-serial adder whose output digit is wider than its inputs.
//
// Each cycle it adds one digit of each operand stream and emits their full
// sum as a wider digit; no carry is passed to the next cycle.  The carries
// are kept inside the widened digit and are resolved later by the
// accumulator at the end of the adder chain, which is why the digit width
// grows by one bit per doubling of the number of added streams along the
// filter.  Every digit of a frame except the last is an unsigned number; the
// last digit (the most significant one) is two's complement.  sign_ext
// (Control-3) chooses how the operands are extended to the output width:
// with zeros (0, unsigned addition) or with copies of their top bit (1,
// signed addition).
//
// Structure: two multiplexers per extended bit feed a ripple chain of full
// adders, one per output bit, as in the document's 4-bit example (two 4-bit
// digits giving a 5-bit sum).  The generalisation to unequal input widths
// AW, BW and an output width OW is this implementation's choice; OW must be
// at least max(AW, BW) and large enough for the sums that occur, which the
// filter guarantees.  Purely combinational: the N domino phases that the
// document spreads this chain over form one combinational path here.
module ds_add #(
  parameter int AW = 4,                   // width of operand digit a
  parameter int BW = 4,                   // width of operand digit b
  parameter int OW = 5                    // width of sum digit s
) (
  input  logic [AW-1:0] a,
  input  logic [BW-1:0] b,
  input  logic          sign_ext,         // Control-3: 1 = signed (last digit), 0 = unsigned
  output logic [OW-1:0] s
);

  logic [OW-1:0] ax, bx;
  logic [OW-1:0] c;

  always_comb begin
    for (int i = 0; i < OW; i++) begin
      ax[i] = (i < AW) ? a[i] : (sign_ext & a[AW-1]);
      bx[i] = (i < BW) ? b[i] : (sign_ext & b[BW-1]);
    end
  end

  assign c[0] = 1'b0;
  for (genvar i = 0; i < OW; i++) begin : g_fa
    assign s[i]   = ax[i] ^ bx[i] ^ c[i];
    if (i < OW - 1) begin : g_carry
      assign c[i+1] = (ax[i] & bx[i]) | (ax[i] & c[i]) | (bx[i] & c[i]);
    end
  end

  initial begin
    assert (OW >= AW && OW >= BW) else $error("ds_add: OW narrower than an input");
  end

endmodule

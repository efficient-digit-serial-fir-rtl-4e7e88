// ds_mul: signed digit-serial multiplier, W-bit parallel multiplicand times a
// W-bit multiplier applied N bits per clock cycle.
//
// Operation.  A frame lasts 2W/N cycles.  The multiplicand A (and -A) is held
// steady.  The multiplier B enters as N-bit digits, least significant first,
// during the first W/N cycles; during the last W/N cycles the digit input must
// be zero.  In every cycle N carry-save rows (N-1 Block-A rows and one Block-B
// row) each retire one multiplier bit and emit one product bit, so p_digit is
// the next N bits of the 2W-bit product A*B.  The sum and carry vectors left
// by the last row are stored in flip-flops and fed back to the first row in
// the next cycle; on the first cycle of a frame (ctrl1, Control-1) zeros are
// selected instead.  ctrl2 (Control-2) must be 1 in the cycle that carries the
// most significant multiplier digit, so that its top bit is weighted
// negatively.  After 2W/N cycles all 2W product bits have appeared.
//
// Timing.  p_digit depends combinationally on b_digit, ctrl1, ctrl2 and the
// stored vectors: the product digit appears in the same cycle as the operand
// digit.  In the skew-tolerant domino circuit the N rows are spread over the
// N overlapping clock phases of one cycle; here the whole cycle is one
// combinational path ending in ordinary flip-flops.
//
// Follows the document: row structure, A / -A inputs, Control-1 clearing,
// Control-2 selecting -A, zero padding of the high digits, 2W/N cycles per
// product.  Own choices: (W+1)-bit carry-save vectors, active-high Control-1,
// asynchronous active-low reset of the stored vectors.
module ds_mul #(
  parameter int W = 8,                    // word size
  parameter int N = 4                     // digit size
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [W-1:0] a,                 // multiplicand A
  input  logic [W:0]   neg_a,             // -A
  input  logic [N-1:0] b_digit,           // multiplier digit b(N-1:0)
  input  logic         ctrl1,             // Control-1: first digit of the frame
  input  logic         ctrl2,             // Control-2: most significant multiplier digit
  output logic [N-1:0] p_digit            // product digit Out(N-1:0)
);

  logic [W:0] s_q, c_q;                   // vectors fed back from the last row
  logic [W:0] s_row [N+1];
  logic [W:0] c_row [N+1];

  // Input multiplexers of the first row (Control-1).
  assign s_row[0] = ctrl1 ? '0 : s_q;
  assign c_row[0] = ctrl1 ? '0 : c_q;

  for (genvar i = 0; i < N - 1; i++) begin : g_row_a
    ds_mul_block_a #(.W(W)) u_row (
      .a     (a),
      .b     (b_digit[i]),
      .s_in  (s_row[i]),
      .c_in  (c_row[i]),
      .s_out (s_row[i+1]),
      .c_out (c_row[i+1]),
      .p_out (p_digit[i])
    );
  end

  ds_mul_block_b #(.W(W)) u_row_b (
    .a     (a),
    .neg_a (neg_a),
    .ctrl2 (ctrl2),
    .b     (b_digit[N-1]),
    .s_in  (s_row[N-1]),
    .c_in  (c_row[N-1]),
    .s_out (s_row[N]),
    .c_out (c_row[N]),
    .p_out (p_digit[N-1])
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s_q <= '0;
      c_q <= '0;
    end else begin
      s_q <= s_row[N];
      c_q <= c_row[N];
    end
  end

  initial begin
    assert (W % N == 0) else $error("ds_mul: W must be a multiple of N");
    assert (N >= 1) else $error("ds_mul: N must be at least 1");
  end

endmodule

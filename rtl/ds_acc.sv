// ds_acc: digit-serial accumulator that turns the wide digits of the adder
// chain back into an ordinary N-bit digit stream.
//
// Each cycle the SW-bit input digit Si is added to the CW = SW-N carry bits
// kept from the previous cycle (Ci).  The low N bits of the sum leave as the
// output digit So, the high CW bits are the carry-out Co, stored in a
// register and added back in the next cycle.  On the first cycle of a frame
// ctrl4 (Control-4) is 0 and the multiplexers feed zeros instead of the
// stored carry.  On the last cycle of a frame {Co, So} is the most
// significant part of the result, an SW-bit two's-complement number; the
// earlier cycles' So digits are unsigned.  With a 2W/N-cycle frame the
// complete result has (2W/N-1)*N + SW bits: 19 bits for W = 8, N = 4, SW = 7.
//
// Structure: multiplexers on Ci, then a ripple chain of full adders as in
// the document's drawing (Si(0..CW-1) meet Ci, the upper bits only collect
// the ripple carry).  The carry register (the D in the feedback loop) is
// placed inside this module; reset is asynchronous and active low, both
// this implementation's choices.
//
// Timing: So and Co depend combinationally on Si and ctrl4; the carry
// register updates on the rising clock edge.
module ds_acc #(
  parameter int N  = 4,                   // output digit size
  parameter int SW = 7                    // input digit size (N + 3 for an 8-tap filter)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic [SW-1:0] si,               // sum-in Si
  input  logic          ctrl4,            // Control-4: 0 clears the carry-in
  output logic [N-1:0]  so,               // sum-out So
  output logic [SW-N-1:0] co              // carry-out Co
);

  localparam int CW = SW - N;

  logic [CW-1:0] co_q, ci;
  logic [SW-1:0] cix, sum;
  logic [SW-1:0] c;

  assign ci  = ctrl4 ? co_q : '0;
  assign cix = SW'(ci);

  assign c[0] = 1'b0;
  for (genvar i = 0; i < SW; i++) begin : g_fa
    assign sum[i] = si[i] ^ cix[i] ^ c[i];
    if (i < SW - 1) begin : g_carry
      assign c[i+1] = (si[i] & cix[i]) | (si[i] & c[i]) | (cix[i] & c[i]);
    end
  end

  assign so = sum[N-1:0];
  assign co = sum[SW-1:N];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) co_q <= '0;
    else        co_q <= co;
  end

  initial begin
    assert (SW > N) else $error("ds_acc: input digit must be wider than the output digit");
  end

endmodule

// ds_fir: L-tap inverted-form (transposed) FIR filter with digit-serial
// arithmetic, y(n) = sum_{k=0}^{L-1} h_k * x(n-k).
//
// Data format.  Samples x and coefficients h_k are W-bit two's complement.
// One sample occupies a frame of F = 2W/N clock cycles.  x enters N bits per
// cycle, least significant digit first, in the first W/N cycles of a frame;
// whatever is on x_digit in the remaining W/N cycles is ignored (zeros are
// fed to the multipliers so that the high halves of the products come out).
// The coefficients are parallel inputs held steady.  frame_start marks digit
// 0 of every frame.
//
// Datapath.  Each tap multiplies the current sample by h_k in a digit-serial
// multiplier (ds_mul) and produces one N-bit product digit per cycle.  The
// products are summed along an adder chain that starts at h_{L-1}: between
// two adders a ds_delay of F registers delays the partial sum by one sample.
// The adders (ds_add) do not propagate carries from one digit to the next;
// instead the digit widens, to N + ceil(log2(j)) bits after j products have
// been summed, reaching N + ceil(log2 L) bits (N+3 for 8 taps) at the end of
// the chain.  The accumulator (ds_acc) resolves the wide digits: each cycle it
// adds the carry kept from the previous cycle and emits an N-bit digit
// y_digit and a carry_out of ceil(log2 L) bits.
//
// Output.  Digit t of the output sample appears in the same cycle as digit t
// of the input sample (the whole combinational path x -> multiplier -> adder
// -> accumulator lies in one cycle).  In the first F-1 cycles of a frame
// y_digit is an unsigned digit of y; in the last cycle (y_last = 1)
// {carry_out, y_digit} is the signed most significant part.  A complete
// output word has 2W + ceil(log2 L) bits: 19 bits for W = 8, N = 4, L = 8.
// The first output frames after reset see zero history.
//
// Follows the document: the inverted-form structure, 2W/N-register delays,
// digit widths growing up to N+3, carry-free digit-serial adders with
// Control-3 sign extension, the accumulator with its carry feedback, and the
// defaults L = 8, W = 8, N = 4.  Own choices: the frame counter that makes
// the control signals, the zero padding done inside the filter, zero-latency
// single-clock timing in place of the N overlapping domino clock phases, and
// the reset.
module ds_fir
  import ds_fir_pkg::*;
#(
  parameter int L = 8,                    // number of taps
  parameter int W = 8,                    // sample and coefficient word size
  parameter int N = 4                     // digit size
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic [W-1:0]         h [L],     // coefficients h_0 .. h_{L-1}
  input  logic [N-1:0]         x_digit,   // input sample digit x(N-1:0)
  output logic                 frame_start, // digit 0 of a frame is being taken this cycle
  output logic [$clog2(2*W/N)-1:0] frame_digit, // position of the current digit in the frame
  output logic [N-1:0]         y_digit,   // output digit y(N-1:0)
  output logic [$clog2(L)-1:0] carry_out, // carry-out of the accumulator
  output logic                 y_last     // last digit: {carry_out, y_digit} is the signed MSD
);

  localparam int F  = 2 * W / N;
  localparam int SW = sum_width(N, L);

  ds_ctrl_t     ctrl;
  logic [$clog2(F)-1:0] digit;
  logic [N-1:0] x_eff;

  ds_ctrl #(.W(W), .N(N)) u_ctrl (
    .clk   (clk),
    .rst_n (rst_n),
    .ctrl  (ctrl),
    .digit (digit)
  );

  assign x_eff = ctrl.pad_zero ? '0 : x_digit;

  for (genvar k = 0; k < L; k++) begin : g_tap
    localparam int RW = sum_width(N, L - k);   // digit width after this tap
    logic [W:0]    neg_h;
    logic [N-1:0]  p;
    logic [RW-1:0] r;

    assign neg_h = -{h[k][W-1], h[k]};

    ds_mul #(.W(W), .N(N)) u_mul (
      .clk     (clk),
      .rst_n   (rst_n),
      .a       (h[k]),
      .neg_a   (neg_h),
      .b_digit (x_eff),
      .ctrl1   (ctrl.clr_mul),
      .ctrl2   (ctrl.neg_msd),
      .p_digit (p)
    );

    if (k == L - 1) begin : g_head
      assign r = p;
    end else begin : g_sum
      localparam int PW = sum_width(N, L - k - 1);
      logic [PW-1:0] d;

      ds_delay #(.WIDTH(PW), .DEPTH(F)) u_dly (
        .clk   (clk),
        .rst_n (rst_n),
        .d     (g_tap[k+1].r),
        .q     (d)
      );

      ds_add #(.AW(PW), .BW(N), .OW(RW)) u_add (
        .a        (d),
        .b        (p),
        .sign_ext (ctrl.sign_ext),
        .s        (r)
      );
    end
  end

  ds_acc #(.N(N), .SW(SW)) u_acc (
    .clk   (clk),
    .rst_n (rst_n),
    .si    (g_tap[0].r),
    .ctrl4 (ctrl.acc_cin),
    .so    (y_digit),
    .co    (carry_out)
  );

  assign frame_start = ctrl.clr_mul;
  assign frame_digit = digit;
  assign y_last      = ctrl.sign_ext;

  initial begin
    assert (L >= 2) else $error("ds_fir: at least two taps");
  end

endmodule

// ds_ctrl: frame controller of the digit-serial FIR filter.
//
// A free-running counter counts the 2W/N digit cycles of a frame, starting at
// digit 0 after reset.  From the count it decodes:
//   clr_mul  (Control-1)  digit 0: multipliers start a new product
//   neg_msd  (Control-2)  digit W/N-1: the sign digit of the input sample
//   sign_ext (Control-3)  digit 2W/N-1: the most significant output digit
//   acc_cin  (Control-4)  0 on digit 0, 1 on all others
//   pad_zero              digits W/N .. 2W/N-1: input digits replaced by zeros
// All outputs are decoded from the registered count, so they are valid for
// the whole cycle they refer to.  The document names the four control
// signals and says when they are active; the counter that makes them, its
// reset and the polarity of Control-1 are this implementation's choices.
// Control-4's polarity follows the multiplexer input labels of the
// accumulator drawing (0 selects the constant zero).
module ds_ctrl
  import ds_fir_pkg::*;
#(
  parameter int W = 8,
  parameter int N = 4
) (
  input  logic     clk,
  input  logic     rst_n,
  output ds_ctrl_t ctrl,
  output logic [$clog2(2*W/N)-1:0] digit  // position inside the frame
);

  localparam int F  = 2 * W / N;          // cycles per frame
  localparam int CW = $clog2(F);

  logic [CW-1:0] cnt;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                 cnt <= '0;
    else if (cnt == CW'(F - 1)) cnt <= '0;
    else                        cnt <= cnt + 1'b1;
  end

  always_comb begin
    ctrl.clr_mul  = (cnt == '0);
    ctrl.neg_msd  = (cnt == CW'(W / N - 1));
    ctrl.sign_ext = (cnt == CW'(F - 1));
    ctrl.acc_cin  = (cnt != '0);
    ctrl.pad_zero = (cnt >= CW'(W / N));
  end

  assign digit = cnt;

  initial begin
    assert (W % N == 0 && W / N >= 1) else $error("ds_ctrl: W must be a multiple of N");
  end

endmodule

// tb_ds_fir_n2: end-to-end test of the digit-serial FIR filter with 2-bit
// digits (8 taps, 8-bit words, 8-cycle frames, 19-bit results), the second
// configuration of the design; otherwise identical to tb_ds_fir.
//
// The testbench keeps its own frame counter from reset.  For every frame it
// drives the four digits of a sample (least significant first) and random
// garbage in the four padding cycles, collects the output digits, rebuilds
// the 19-bit result from seven unsigned digits and the signed
// {carry_out, y_digit} of the last cycle, and compares it with
// y(n) = sum_k h_k x(n-k) computed directly in integer arithmetic (samples
// before the first are zero).  The result of sample n must be complete at
// the end of frame n, i.e. after 2W/N = 8 cycles.  Several coefficient sets
// are run, including the all -128 set that gives the largest output; the
// filter is reset between sets.
//
// Each mechanism of the design is counted and must occur at least once:
// negative samples (Block-B using -h, Control-2), negative results (signed
// last digit, Control-3), non-zero carries inside a frame, a non-zero carry
// left from the previous frame that Control-4 must discard, padding cycles
// with non-zero garbage on the input, and non-zero delay-line contents.
module tb_ds_fir_n2;
  import ds_fir_pkg::*;
  localparam int L = 8, W = 8, N = 2;
  localparam int F = 2 * W / N;
  localparam int CW = $clog2(L);

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic [W-1:0]          h [L];
  logic [N-1:0]          x_digit;
  logic                  frame_start, y_last;
  logic [$clog2(F)-1:0]  frame_digit;
  logic [N-1:0]          y_digit;
  logic [CW-1:0]         carry_out;

  ds_fir #(.L(L), .W(W), .N(N)) dut (.*);

  int checks = 0, failures = 0;
  int n_neg_x = 0, n_neg_y = 0, n_mid_carry = 0, n_stale_carry = 0, n_pad = 0, n_history = 0;

  initial begin
    #5000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [W-1:0] coef(int set, int k);
    case (set)
      0: return 8'h80;                         // largest possible |y|
      1: return (k == 0) ? 8'h01 : 8'h00;      // identity
      2: return 8'h7f;
      default: return W'($urandom);
    endcase
  endfunction

  function automatic logic [W-1:0] sample(int set, int n);
    case (set)
      0: return 8'h80;
      2: return (n % 2 != 0) ? 8'h80 : 8'h7f;
      default: return W'($urandom);
    endcase
  endfunction

  initial begin
    longint xs [$];
    longint expv, got;
    logic [W-1:0] xv;
    logic [CW-1:0] last_co;
    int frames;
    x_digit = '0;
    for (int k = 0; k < L; k++) h[k] = '0;
    for (int set = 0; set < 8; set++) begin
      rst_n = 1'b0;
      for (int k = 0; k < L; k++) h[k] = coef(set, k);
      xs.delete();
      last_co = '0;
      repeat (2) @(posedge clk);
      #1 rst_n = 1'b1;
      frames = (set < 3) ? 20 : 300;
      for (int n = 0; n < frames; n++) begin
        xv = sample(set, n);
        xs.push_front(longint'($signed(xv)));
        if ($signed(xv) < 0) n_neg_x++;
        if (n >= L) n_history++;
        expv = 0;
        for (int k = 0; k < L && k < xs.size(); k++)
          expv += longint'($signed(h[k])) * xs[k];
        got = 0;
        for (int t = 0; t < F; t++) begin
          if (t < W / N) x_digit = xv[N*t +: N];
          else begin
            x_digit = N'($urandom);
            if (x_digit != 0) n_pad++;
          end
          #1;
          checks++;
          if (frame_start != (t == 0) || y_last != (t == F - 1) || int'(frame_digit) != t) begin
            failures++;
            if (failures < 5) $display("frame markers wrong at t=%0d", t);
          end
          if (t == 0 && last_co != 0) n_stale_carry++;
          if (t < F - 1) begin
            got += longint'(y_digit) <<< (N * t);
            if (carry_out != 0) n_mid_carry++;
          end else begin
            got += longint'($signed({carry_out, y_digit})) <<< (N * t);
            last_co = carry_out;
          end
          @(posedge clk); #1;
        end
        if (expv < 0) n_neg_y++;
        checks++;
        if (got != expv) begin
          failures++;
          if (failures < 10) $display("set %0d sample %0d: y=%0d expected %0d", set, n, got, expv);
        end
      end
    end
    $display("events: neg_x=%0d neg_y=%0d mid_carry=%0d stale_carry=%0d pad=%0d history=%0d",
             n_neg_x, n_neg_y, n_mid_carry, n_stale_carry, n_pad, n_history);
    checks += 6;
    if (n_neg_x == 0) failures++;
    if (n_neg_y == 0) failures++;
    if (n_mid_carry == 0) failures++;
    if (n_stale_carry == 0) failures++;
    if (n_pad == 0) failures++;
    if (n_history == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

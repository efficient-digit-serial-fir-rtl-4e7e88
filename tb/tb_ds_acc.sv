// tb_ds_acc: self-checking test of the digit-serial accumulator (N=4, SW=7,
// frame of 4 cycles).  Each frame feeds four 7-bit digits of the kind the
// 8-tap adder chain produces: three unsigned digits in 0..8*15 and a signed
// last digit in -64..56.  Control-4 is 0 on the first digit.  The word
// rebuilt from the three So digits and the final signed {Co, So} must equal
// sum_t Si_t * 16^t.  Frames follow each other directly, so a non-zero
// carry left over from the previous frame must be cleared by Control-4.
module tb_ds_acc;
  localparam int N = 4, SW = 7, F = 4;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic [SW-1:0]   si;
  logic            ctrl4;
  logic [N-1:0]    so;
  logic [SW-N-1:0] co;
  int checks = 0, failures = 0;
  int stale_carry = 0, mid_carry = 0;

  ds_acc #(.N(N), .SW(SW)) dut (.*);

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint expv, got;
    int d;
    logic [SW-N-1:0] last_co;
    si = '0; ctrl4 = 1'b0; last_co = '0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    for (int f = 0; f < 2000; f++) begin
      expv = 0; got = 0;
      for (int t = 0; t < F; t++) begin
        if (t < F - 1) d = (f < 3) ? 120 : int'($urandom_range(120, 0));
        else           d = (f < 3) ? ((f == 1) ? -64 : 56) : int'($urandom_range(120, 0)) - 64;
        si    = SW'(d);
        ctrl4 = (t != 0);
        expv += longint'(d) <<< (N * t);
        #1;
        if (t == 0 && last_co != 0) stale_carry++;
        if (t < F - 1) begin
          got += longint'(so) <<< (N * t);
          if (co != 0) mid_carry++;
        end else begin
          got += longint'($signed({co, so})) <<< (N * t);
          last_co = co;
        end
        @(posedge clk); #1;
      end
      checks++;
      if (got != expv) begin
        failures++;
        if (failures < 5) $display("frame %0d: got %0d expected %0d", f, got, expv);
      end
    end
    checks += 2;
    if (stale_carry == 0) failures++;
    if (mid_carry == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

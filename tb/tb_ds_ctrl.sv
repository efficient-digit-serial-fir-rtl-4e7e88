// tb_ds_ctrl: self-checking test of the frame controller for W=8 with N=4
// (4-cycle frames) and N=2 (8-cycle frames).  After reset every cycle's
// control word is compared with the values expected from the cycle number.
module tb_ds_ctrl;
  import ds_fir_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  ds_ctrl_t c4, c2;
  logic [1:0] d4;
  logic [2:0] d2;
  int checks = 0, failures = 0;

  ds_ctrl #(.W(8), .N(4)) dut4 (.clk(clk), .rst_n(rst_n), .ctrl(c4), .digit(d4));
  ds_ctrl #(.W(8), .N(2)) dut2 (.clk(clk), .rst_n(rst_n), .ctrl(c2), .digit(d2));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_ctrl(ds_ctrl_t c, int t, int half, int f);
    ds_ctrl_t e;
    e.clr_mul  = (t == 0);
    e.neg_msd  = (t == half - 1);
    e.sign_ext = (t == f - 1);
    e.acc_cin  = (t != 0);
    e.pad_zero = (t >= half);
    checks++;
    if (c !== e) begin
      failures++;
      if (failures < 5) $display("t=%0d: ctrl %b expected %b", t, c, e);
    end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    for (int i = 0; i < 200; i++) begin
      expect_ctrl(c4, i % 4, 2, 4);
      expect_ctrl(c2, i % 8, 4, 8);
      checks += 2;
      if (int'(d4) != i % 4) failures++;
      if (int'(d2) != i % 8) failures++;
      @(posedge clk); #1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

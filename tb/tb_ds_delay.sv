// tb_ds_delay: self-checking test of the delay line.  A random 6-bit stream
// goes through a 4-stage and an 8-stage instance; each output must equal the
// input from exactly DEPTH cycles earlier, and zero before that (reset).
module tb_ds_delay;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic [5:0] d, q4, q8;
  logic [5:0] hist [$];
  int checks = 0, failures = 0;

  ds_delay #(.WIDTH(6), .DEPTH(4)) dut4 (.clk(clk), .rst_n(rst_n), .d(d), .q(q4));
  ds_delay #(.WIDTH(6), .DEPTH(8)) dut8 (.clk(clk), .rst_n(rst_n), .d(d), .q(q8));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [5:0] e4, e8;
    d = '0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    for (int i = 0; i < 500; i++) begin
      d = 6'($urandom);
      hist.push_back(d);
      #1;
      e4 = (i >= 4) ? hist[i-4] : 6'd0;
      e8 = (i >= 8) ? hist[i-8] : 6'd0;
      checks += 2;
      if (q4 !== e4) failures++;
      if (q8 !== e8) failures++;
      @(posedge clk); #1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

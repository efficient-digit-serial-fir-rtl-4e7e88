// tb_ds_add: self-checking test of the carry-free digit-serial adder.
// Three instances: the 4+4 -> 5 bit adder of the main 4-bit digit, an
// unequal-width 6+4 -> 7 bit adder as used further down the filter chain,
// and a 7+4 -> 7 bit adder whose width no longer grows.  For random digits
// and both settings of Control-3 the sum is compared with the operands
// extended (zero or sign) and added in integer arithmetic, modulo the
// output width.
module tb_ds_add;
  int checks = 0, failures = 0;
  int signed_cases = 0;

  logic [3:0] a0, b0; logic [4:0] s0; logic se0;
  logic [5:0] a1; logic [3:0] b1; logic [6:0] s1; logic se1;
  logic [6:0] a2; logic [3:0] b2; logic [6:0] s2; logic se2;

  ds_add #(.AW(4), .BW(4), .OW(5)) dut0 (.a(a0), .b(b0), .sign_ext(se0), .s(s0));
  ds_add #(.AW(6), .BW(4), .OW(7)) dut1 (.a(a1), .b(b1), .sign_ext(se1), .s(s1));
  ds_add #(.AW(7), .BW(4), .OW(7)) dut2 (.a(a2), .b(b2), .sign_ext(se2), .s(s2));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic longint ext(longint v, int w, logic sgn);
    longint m = (64'sd1 <<< w);
    v = v & (m - 1);
    if (sgn && v >= m / 2) v -= m;
    return v;
  endfunction

  initial begin
    longint e;
    for (int i = 0; i < 3000; i++) begin
      a0 = 4'($urandom); b0 = 4'($urandom); se0 = 1'($urandom);
      a1 = 6'($urandom); b1 = 4'($urandom); se1 = 1'($urandom);
      a2 = 7'($urandom); b2 = 4'($urandom); se2 = 1'($urandom);
      #1;
      e = ext(ext(a0, 4, se0) + ext(b0, 4, se0), 5, 1'b0);
      checks++; if (longint'(s0) != e) begin failures++; if (failures < 5) $display("add0 %h+%h se=%0d -> %h exp %h", a0, b0, se0, s0, e); end
      e = ext(ext(a1, 6, se1) + ext(b1, 4, se1), 7, 1'b0);
      checks++; if (longint'(s1) != e) begin failures++; if (failures < 5) $display("add1 %h+%h se=%0d -> %h exp %h", a1, b1, se1, s1, e); end
      e = ext(ext(a2, 7, se2) + ext(b2, 4, se2), 7, 1'b0);
      checks++; if (longint'(s2) != e) begin failures++; if (failures < 5) $display("add2 %h+%h se=%0d -> %h exp %h", a2, b2, se2, s2, e); end
      if (se0 && (a0[3] || b0[3])) signed_cases++;
    end
    checks++;
    if (signed_cases == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// dcsa_tb -- exhaustive self-checking test of the DCSA cell.
//
// Applies all eight combinations of the two inverted operands a_n, b_n and
// the carry input ci, and compares the sum and the inverted carry with the
// full-adder truth table of the true operands (a = ~a_n, b = ~b_n).
module dcsa_tb;
  logic a_n, b_n, ci, s, co_n;
  int checks = 0, failures = 0;

  dcsa dut (.a_n(a_n), .b_n(b_n), .ci(ci), .s(s), .co_n(co_n));

  initial begin : watchdog
    #1000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int a, b, total;
    for (int v = 0; v < 8; v++) begin
      a    = v & 1;
      b    = (v >> 1) & 1;
      ci   = 1'(v >> 2);
      a_n  = 1'(~a);
      b_n  = 1'(~b);
      #1;
      total = a + b + int'(ci);
      checks++;
      if (s !== 1'(total % 2)) begin
        failures++;
        $display("FAIL sum a=%0d b=%0d ci=%0d: s=%0d", a, b, ci, s);
      end
      checks++;
      if (co_n !== ~1'(total / 2)) begin
        failures++;
        $display("FAIL carry a=%0d b=%0d ci=%0d: co_n=%0d", a, b, ci, co_n);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

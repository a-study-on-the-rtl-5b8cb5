// dcsa -- carry-save adder cell with two inverted inputs (one bit,
// combinational).
//
// A full adder whose two XOR-side operands a_n and b_n are active low and
// whose carry output co_n is active low; the carry input ci and the sum s are
// true. It is the cell of the multiplier's final carry-propagate adder, where
// both operands are inverted carries: from the last two rows of the MCSA
// array, or from the previous DCSA cell. Each operand is restored by an
// inverter, the pair meets in an XNOR gate, and two 2:1 multiplexers form the
// sum (steered by ci) and the inverted carry (steered by the XNOR output).
//
// Ports: a_n, b_n (inverted operands), ci -> s = a ^ b ^ ci,
//        co_n = ~majority(a, b, ci).
// Timing: purely combinational, no clock.
//
// The gate list (two INV, XNOR, INV, two MX2) follows the published cell
// schematic; the multiplexer pin assignment is chosen here so that the cell
// is a correct full adder.
module dcsa (
  input  logic a_n,
  input  logic b_n,
  input  logic ci,
  output logic s,
  output logic co_n
);
  logic a, b;  // restored operands
  logic xn;    // 1 when the operands are equal

  always_comb begin
    a    = ~a_n;
    b    = ~b_n;
    xn   = ~(a ^ b);
    s    = ci ? xn : ~xn;
    co_n = ~(xn ? a : ci);
  end
endmodule

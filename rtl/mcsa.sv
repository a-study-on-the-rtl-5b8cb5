// mcsa -- modified carry-save adder cell (one bit, combinational).
//
// A full adder whose addend input a_n and carry output co_n are both
// active low. In the multiplier array the inverted carry of one row is wired
// straight into a_n of the cell two rows further down, so the polarities
// match without extra inverters. The addend (a_n, restored by an inverter)
// and the augend b meet in an XNOR gate; a 2:1 multiplexer steered by the
// carry input ci picks the XNOR output or its complement as the sum, and a
// second multiplexer steered by the XNOR output picks the generate value
// (the addend) or ci as the carry, whose output is inverted. ci therefore
// only passes through a multiplexer: the XOR path can settle before the
// carry input arrives, which is what makes a row of these cells fast.
//
// Ports: a_n (inverted addend), b (augend), ci (carry in) ->
//        s = a ^ b ^ ci, co_n = ~majority(a, b, ci).
// Timing: purely combinational, no clock.
//
// The gate list (INV, XNOR, INV, two MX2) follows the published cell
// schematic; which data pin of each multiplexer takes which signal is chosen
// here so that the cell is a correct full adder.
module mcsa (
  input  logic a_n,
  input  logic b,
  input  logic ci,
  output logic s,
  output logic co_n
);
  logic a;    // restored addend
  logic xn;   // XNOR of addend and augend: 1 when they are equal

  always_comb begin
    a    = ~a_n;
    xn   = ~(a ^ b);
    // equal operands: sum is ci; different operands: sum is ~ci
    s    = ci ? xn : ~xn;
    // equal operands generate their own value as carry, otherwise ci propagates
    co_n = ~(xn ? a : ci);
  end
endmodule

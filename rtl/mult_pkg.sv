// mult_pkg -- constants and width rules shared by the multiplier's modules.
//
// The MCSA array delivers product bits 0 .. LO_WEIGHT-1 itself and hands
// everything from weight LO_WEIGHT up to 2N-2 to the final DCSA adder as
// three vectors of final_width(N) bits. Both rules are this design's own
// (for N = 4 they give the 4-bit final adder of the published 4 x 4 array).
package mult_pkg;
  // lowest weight handled by the final carry-propagate adder; fixed by the
  // array's boundary wiring (rows 1 and 2 finish product bits 1 and 2)
  localparam int unsigned LO_WEIGHT = 3;

  // width of the vectors passed from the array to the final adder
  function automatic int unsigned final_width(input int unsigned n);
    return 2*n - 1 - LO_WEIGHT;
  endfunction
endpackage

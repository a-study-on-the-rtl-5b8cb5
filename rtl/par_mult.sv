// par_mult -- N x N unsigned parallel array multiplier with MCSA rows and a
// DCSA carry-propagate adder (top level).
//
// p = x * y, computed by three combinational stages:
//   pp_gen      N*N AND gates form the partial products xi & yj;
//   mcsa_array  N-1 rows of MCSA cells reduce them in carry-save form; each
//               row's inverted carries go to the cells two rows down, so a
//               row costs one multiplexer delay instead of an XOR plus a
//               multiplexer;
//   dcsa_cpa    DCSA cells add the remaining sum vector and the two inverted
//               carry vectors left by the last two rows.
// Product bits 0..2 come straight from the array, bits 3..2N-1 from the
// final adder.
//
// Parameters: N, operand width, at least 4. The default 16 is the largest
//             size the design was evaluated at (4, 8 and 16 bits).
// Ports: x (multiplicand), y (multiplier), N bits each, unsigned;
//        p (product), 2N bits.
// Timing: purely combinational, no clock and no reset. In unit gate delays
//         the array takes about N delays plus the final adder.
module par_mult
  import mult_pkg::*;
#(
  parameter int unsigned N = 16
) (
  input  logic [N-1:0]   x,
  input  logic [N-1:0]   y,
  output logic [2*N-1:0] p
);
  localparam int unsigned W = final_width(N);

  logic [N-1:0][N-1:0] pp;
  logic [LO_WEIGHT-1:0] p_lo;
  logic [W-1:0]        s, ca_n, cb_n;
  logic [W:0]          p_hi;

  pp_gen #(.N(N)) u_pp (
    .x  (x),
    .y  (y),
    .pp (pp)
  );

  mcsa_array #(.N(N)) u_array (
    .pp   (pp),
    .p_lo (p_lo),
    .s    (s),
    .ca_n (ca_n),
    .cb_n (cb_n)
  );

  dcsa_cpa #(.W(W)) u_cpa (
    .s    (s),
    .ca_n (ca_n),
    .cb_n (cb_n),
    .p    (p_hi)
  );

  assign p = {p_hi, p_lo};
endmodule

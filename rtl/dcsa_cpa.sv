// dcsa_cpa -- final carry-propagate adder of the multiplier, built from
// DCSA cells.
//
// The MCSA array leaves three vectors: a sum vector s (true polarity) and two
// carry vectors ca_n, cb_n that are inverted, because the MCSA cell drives
// its carry out inverted. This adder returns p = s + ~ca_n + ~cb_n, W+1 bits
// wide (modulo 2^(W+1); in the multiplier the result always fits).
//
// It has two rows of DCSA cells, which take two inverted operands:
//   compression row  cell k: a_n = ca_n[k], b_n = cb_n[k], ci = s[k]
//                    -> sum t[k], inverted carry u_n[k] (weight k+1)
//   ripple row       cell k: a_n = u_n[k-1], b_n = r_n[k-1], ci = t[k]
//                    -> p[k], inverted ripple carry r_n[k]
// Both operands of a ripple cell are inverted carries, so the chain needs no
// inverters; the carry into bit 0 is zero (a_n = b_n = 1). Cell W of the
// ripple row adds the two carries out of bit W-1 to give p[W].
//
// Parameters: W, vector width (default 28, which is 2N-4 for N = 16; with
//             N = 4 it is the 4-bit adder of the published 4 x 4 design).
// Timing: combinational; the ripple chain is W+1 cells long.
//
// That the final adder is made of DCSA cells fed by the two inverted carry
// vectors of the last two MCSA rows, with a zero carry in, follows the
// published design; its inner arrangement in two rows is this design's own.
module dcsa_cpa #(
  parameter int unsigned W = 28
) (
  input  logic [W-1:0] s,
  input  logic [W-1:0] ca_n,
  input  logic [W-1:0] cb_n,
  output logic [W:0]   p
);
  logic [W-1:0] t;     // compression row sums
  logic [W-1:0] u_n;   // compression row inverted carries, weight k+1
  logic [W:0]   r_n;   // ripple row inverted carries, weight k+1
  logic         unused_r_n;

  for (genvar k = 0; k < W; k++) begin : g_cmp
    dcsa u_cmp (
      .a_n  (ca_n[k]),
      .b_n  (cb_n[k]),
      .ci   (s[k]),
      .s    (t[k]),
      .co_n (u_n[k])
    );
  end

  for (genvar k = 0; k <= W; k++) begin : g_rip
    logic a_n_in, b_n_in, ci_in;
    if (k == 0) begin : g_first
      assign a_n_in = 1'b1;
      assign b_n_in = 1'b1;   // carry in = 0
    end else begin : g_next
      assign a_n_in = u_n[k-1];
      assign b_n_in = r_n[k-1];
    end
    if (k == W) begin : g_last
      assign ci_in = 1'b0;
    end else begin : g_mid
      assign ci_in = t[k];
    end
    dcsa u_rip (
      .a_n  (a_n_in),
      .b_n  (b_n_in),
      .ci   (ci_in),
      .s    (p[k]),
      .co_n (r_n[k])
    );
  end

  // the carry out of the top cell lies beyond the result width
  assign unused_r_n = r_n[W];
endmodule

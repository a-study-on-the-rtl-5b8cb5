// mcsa_array -- carry-save reduction array of the N x N multiplier, built
// from MCSA cells, with carries forwarded two rows down.
//
// Row j (j = 1 .. N-1) holds N-1 MCSA cells at binary weights j .. j+N-2 and
// adds partial product row j into the running sum:
//   b    = partial product bit x[w-j] & y[j]   (ready at time zero)
//   ci   = sum from row j-1 at the same weight  (row 0 is partial product
//          row 0; the top cell of a row takes the top bit x[N-1]&y[j-1]
//          of the row above, which no cell has added yet)
//   a_n  = inverted carry from row j-2 at weight w-1 (the cell two rows up)
// Because a carry skips one row, both XOR inputs of a cell are ready a full
// gate delay before its carry input, and each row after the first adds only
// one multiplexer delay to the critical path (N gate delays for the array
// instead of 2(N-1) in an array where carries go to the next row).
//
// Where no cell two rows up exists the input is tied to logical zero (a_n =
// 1), except in the lowest cell of row 2, which takes the carry of the lowest
// cell of row 1 (row 2 has no row two above it, so that input is free).
// Carries that have no cell two rows below them are not added here but are
// passed to the final adder: those of rows N-2 and N-1, and those of the
// lowest (diagonal) cell of rows 2 .. N-3.
//
// Outputs:
//   p_lo   product bits 0..2, already final (x0y0, and the lowest sums of
//          rows 1 and 2)
//   s      sum vector for weights 3 .. 2N-2 (bit k has weight k+3)
//   ca_n   inverted carries of row N-2 and of the diagonal cells (same
//          weights), 1 where there is none
//   cb_n   inverted carries of row N-1 (same weights), 1 where there is none
// so that x*y = p_lo + ((s + ~ca_n + ~cb_n) << 3).
//
// Parameters: N, operand width, at least 4 (default 16). The width 2N-4
// and the split at weight 3 come from mult_pkg.
// Timing: combinational.
//
// The cell placement (the same triangle of cells as a conventional array),
// the wiring of sum to carry input, partial product to the XOR input and
// inverted carry to the inverted input, and the carry forwarding to the
// second row below follow the published design; the handling of the
// boundary carries and the width of the final vectors are this design's own.
module mcsa_array
  import mult_pkg::*;
#(
  parameter int unsigned N = 16
) (
  input  logic [N-1:0][N-1:0]            pp,
  output logic [LO_WEIGHT-1:0]           p_lo,
  output logic [final_width(N)-1:0]      s,
  output logic [final_width(N)-1:0]      ca_n,
  output logic [final_width(N)-1:0]      cb_n
);
  localparam int unsigned W  = final_width(N);  // width of the final vectors
  localparam int unsigned WT = 2*N - 1;  // number of weights 0 .. 2N-2

  if (N < 4) begin : g_size_check
    $error("mcsa_array: N must be at least 4");
  end

  // sum and inverted carry of cell (row, weight); the carry has weight+1
  logic [WT-1:0] sum_r [N];
  logic [WT-1:0] cyn_r [N];

  // row 0 has no cells; keep its entries defined
  assign sum_r[0] = '0;
  assign cyn_r[0] = '1;

  for (genvar j = 1; j < N; j++) begin : g_row
    for (genvar w = 0; w < WT; w++) begin : g_col
      if (w >= j && w <= j + N - 2) begin : g_cell
        logic a_n_in, ci_in;

        // carry input: the previous row's sum at this weight
        if (j == 1) begin : g_ci_row1
          assign ci_in = pp[0][w];
        end else if (w == j + N - 2) begin : g_ci_top
          assign ci_in = pp[j-1][N-1];
        end else begin : g_ci_sum
          assign ci_in = sum_r[j-1][w];
        end

        // inverted input: the carry from two rows up
        if (j >= 3 && w <= j + N - 3) begin : g_a_skip
          assign a_n_in = cyn_r[j-2][w-1];
        end else if (j == 2 && w == 2) begin : g_a_first
          assign a_n_in = cyn_r[1][1];
        end else begin : g_a_zero
          assign a_n_in = 1'b1;
        end

        mcsa u_mcsa (
          .a_n  (a_n_in),
          .b    (pp[j][w-j]),
          .ci   (ci_in),
          .s    (sum_r[j][w]),
          .co_n (cyn_r[j][w])
        );
      end else begin : g_empty
        assign sum_r[j][w] = 1'b0;
        assign cyn_r[j][w] = 1'b1;
      end
    end
  end

  assign p_lo[0] = pp[0][0];
  assign p_lo[1] = sum_r[1][1];
  assign p_lo[2] = sum_r[2][2];

  for (genvar k = 0; k < W; k++) begin : g_out
    localparam int unsigned WGT = k + LO_WEIGHT;
    // sum: the last row that has a cell at this weight
    if (WGT == 2*N - 2) begin : g_s_top
      assign s[k] = pp[N-1][N-1];
    end else if (WGT < N - 1) begin : g_s_diag
      assign s[k] = sum_r[WGT][WGT];
    end else begin : g_s_last
      assign s[k] = sum_r[N-1][WGT];
    end
    // first carry vector: diagonal cells of rows 2..N-3, then row N-2
    if (WGT <= N - 2) begin : g_ca_diag
      assign ca_n[k] = cyn_r[WGT-1][WGT-1];
    end else if (WGT <= 2*N - 3) begin : g_ca_row
      assign ca_n[k] = cyn_r[N-2][WGT-1];
    end else begin : g_ca_none
      assign ca_n[k] = 1'b1;
    end
    // second carry vector: row N-1
    if (WGT >= N) begin : g_cb_row
      assign cb_n[k] = cyn_r[N-1][WGT-1];
    end else begin : g_cb_none
      assign cb_n[k] = 1'b1;
    end
  end
endmodule

// pp_gen -- partial product generator of the N x N array multiplier.
//
// Forms every product term XiYj as the logical AND of multiplicand bit x[i]
// and multiplier bit y[j]. pp[j][i] has binary weight i+j; row j of pp is
// the multiplicand gated by multiplier bit j. The AND gates are the ones the
// array multiplier uses; nothing else is done here.
//
// Parameters: N, operand width (default 16, the largest size the design was
//             evaluated at).
// Ports: x, y (N bits each) -> pp (N x N bits).
// Timing: combinational, one gate level.
module pp_gen #(
  parameter int unsigned N = 16
) (
  input  logic [N-1:0]         x,
  input  logic [N-1:0]         y,
  output logic [N-1:0][N-1:0]  pp
);
  always_comb begin
    for (int j = 0; j < N; j++)
      for (int i = 0; i < N; i++)
        pp[j][i] = x[i] & y[j];
  end
endmodule

// par_mult_tb -- end-to-end test of the multiplier at its default size
// (16 x 16 bits, no parameter overrides).
//
// Multiplies corner operands, the operand pairs shown in the design's
// published simulation (4 x E and B x 8 at 4 bits, AB x 3D at 8 bits,
// zero-extended, and 918F x 5F33 at 16 bits) and random pairs, and compares every
// product with the integer product computed here. The multiplier is purely
// combinational, so each product is checked in the same time step as its
// operands are applied: the latency is zero clock cycles.
//
// It also counts how often each carry mechanism of the design is exercised
// and fails if one never is:
//   skip     a carry forwarded from a row to the cell two rows down
//   first    the carry of row 1's lowest cell taken by row 2's lowest cell
//   diag     a diagonal-cell carry handed to the final adder
//   two_rows both carry vectors of the last two rows set at one weight
//   ripple   a carry rippling through at least 8 cells of the final adder
module par_mult_tb;
  localparam int N = 16;
  localparam int W = 2*N - 4;

  logic [N-1:0]   x, y;
  logic [2*N-1:0] p;
  int checks = 0, failures = 0;
  int n_skip = 0, n_first = 0, n_diag = 0, n_two_rows = 0, n_ripple = 0;

  par_mult dut (.x(x), .y(y), .p(p));

  initial begin : watchdog
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // longest run of consecutive set ripple carries in the final adder
  function automatic int ripple_run();
    int run = 0, best = 0;
    for (int k = 0; k < W; k++) begin
      if (dut.u_cpa.r_n[k] == 1'b0) run++;
      else run = 0;
      if (run > best) best = run;
    end
    return best;
  endfunction

  task automatic apply(input logic [N-1:0] a, input logic [N-1:0] b);
    logic [2*N-1:0] want;
    x = a;
    y = b;
    #1;
    want = (2*N)'(a) * (2*N)'(b);
    checks++;
    if (p !== want) begin
      failures++;
      $display("FAIL %h * %h = %h, expected %h", a, b, p, want);
    end
    if (dut.u_array.cyn_r[1][2] == 1'b0 || dut.u_array.cyn_r[5][9] == 1'b0) n_skip++;
    if (dut.u_array.cyn_r[1][1] == 1'b0) n_first++;
    if (dut.u_cpa.ca_n[N-4:0] != '1) n_diag++;
    if ((~dut.u_cpa.ca_n & ~dut.u_cpa.cb_n) != '0) n_two_rows++;
    if (ripple_run() >= 8) n_ripple++;
  endtask

  initial begin
    apply('0, '0);
    apply('1, '1);
    apply('1, 16'd1);
    apply(16'd1, '1);
    apply(16'h8000, 16'h8000);
    apply(16'h918F, 16'h5F33);  // operands of the published 16-bit run
    // the published 4-bit and 8-bit runs, zero-extended to 16 bits
    apply(16'h0004, 16'h000E);
    checks++;
    if (p !== 32'h38) begin failures++; $display("FAIL 4 x E, printed product 38"); end
    apply(16'h000B, 16'h0008);
    checks++;
    if (p !== 32'h58) begin failures++; $display("FAIL B x 8, printed product 58"); end
    apply(16'h00AB, 16'h003D);
    for (int k = 0; k < 20000; k++)
      apply(N'($urandom), N'($urandom));
    for (int k = 0; k < 2000; k++)   // sparse operands, long carry chains
      apply(N'($urandom) | N'($urandom), N'($urandom) & N'($urandom) & N'($urandom));

    checks += 5;
    if (n_skip == 0)     begin failures++; $display("FAIL skip-row carry never exercised"); end
    if (n_first == 0)    begin failures++; $display("FAIL row 1 to row 2 carry never exercised"); end
    if (n_diag == 0)     begin failures++; $display("FAIL diagonal carry to final adder never exercised"); end
    if (n_two_rows == 0) begin failures++; $display("FAIL two carry vectors never both set"); end
    if (n_ripple == 0)   begin failures++; $display("FAIL long ripple never exercised"); end
    $display("mechanisms: skip=%0d first=%0d diag=%0d two_rows=%0d ripple=%0d",
             n_skip, n_first, n_diag, n_two_rows, n_ripple);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// par_mult_sizes_tb -- the multiplier at the three operand sizes the design
// was evaluated at: 4, 8 and 16 bits.
//
// The 4-bit and 8-bit multipliers are tested over every operand pair, the
// 16-bit one with random pairs. The operand pairs of the published
// simulation are applied to each size: 4 x E and B x 8 (4 bits, products
// 38 and 58 hexadecimal), AB x 3D (8 bits) and 918F x 5F33 (16 bits). All
// expected products are computed here as integer products.
module par_mult_sizes_tb;
  logic [3:0]  x4, y4;
  logic [7:0]  p4;
  logic [7:0]  x8, y8;
  logic [15:0] p8;
  logic [15:0] x16, y16;
  logic [31:0] p16;
  int checks = 0, failures = 0;

  par_mult #(.N(4))  dut4  (.x(x4),  .y(y4),  .p(p4));
  par_mult #(.N(8))  dut8  (.x(x8),  .y(y8),  .p(p8));
  par_mult #(.N(16)) dut16 (.x(x16), .y(y16), .p(p16));

  initial begin : watchdog
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input int n, input longint unsigned a, input longint unsigned b,
                       input longint unsigned got);
    checks++;
    if (got !== a * b) begin
      failures++;
      $display("FAIL N=%0d: %0h * %0h = %0h, expected %0h", n, a, b, got, a * b);
    end
  endtask

  initial begin
    // published 4-bit operand pairs, with their printed products
    x4 = 4'h4; y4 = 4'hE; #1; check(4, x4, y4, p4);
    checks++; if (p4 !== 8'h38) begin failures++; $display("FAIL 4 x E"); end
    x4 = 4'hB; y4 = 4'h8; #1; check(4, x4, y4, p4);
    checks++; if (p4 !== 8'h58) begin failures++; $display("FAIL B x 8"); end
    x8 = 8'hAB; y8 = 8'h3D; #1; check(8, x8, y8, p8);
    x16 = 16'h918F; y16 = 16'h5F33; #1; check(16, x16, y16, p16);

    for (int v = 0; v < (1 << 8); v++) begin
      x4 = 4'(v); y4 = 4'(v >> 4); #1;
      check(4, x4, y4, p4);
    end
    for (int v = 0; v < (1 << 16); v++) begin
      x8 = 8'(v); y8 = 8'(v >> 8); #1;
      check(8, x8, y8, p8);
    end
    for (int k = 0; k < 20000; k++) begin
      x16 = 16'($urandom); y16 = 16'($urandom); #1;
      check(16, x16, y16, p16);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

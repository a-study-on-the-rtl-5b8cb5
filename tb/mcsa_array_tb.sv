// mcsa_array_tb -- self-checking test of the MCSA carry-save array.
//
// The array's three output vectors and its three low product bits must
// recombine to the product: p_lo + ((s + ~ca_n + ~cb_n) << 3) == x * y.
// The partial products are formed here from random or exhaustive operands.
// Three sizes: 4 (all 256 operand pairs), 5 (all 1024, the first size with
// a diagonal carry handed to the final adder) and the default 16 (random).
// The test also checks the vector entries that must be zero, and counts how
// often a carry forwarded two rows down is actually set.
module mcsa_array_tb;
  int checks = 0, failures = 0;
  int skip_carries = 0;

  // ---- N = 4 ----
  logic [3:0]        x4, y4;
  logic [3:0][3:0]   pp4;
  logic [2:0]        lo4;
  logic [3:0]        s4, ca4, cb4;
  // ---- N = 5 ----
  logic [4:0]        x5, y5;
  logic [4:0][4:0]   pp5;
  logic [2:0]        lo5;
  logic [5:0]        s5, ca5, cb5;
  // ---- N = 16 ----
  logic [15:0]       x16, y16;
  logic [15:0][15:0] pp16;
  logic [2:0]        lo16;
  logic [27:0]       s16, ca16, cb16;

  always_comb for (int j = 0; j < 4; j++) for (int i = 0; i < 4; i++) pp4[j][i] = x4[i] & y4[j];
  always_comb for (int j = 0; j < 5; j++) for (int i = 0; i < 5; i++) pp5[j][i] = x5[i] & y5[j];
  always_comb for (int j = 0; j < 16; j++) for (int i = 0; i < 16; i++) pp16[j][i] = x16[i] & y16[j];

  mcsa_array #(.N(4)) dut4 (.pp(pp4), .p_lo(lo4), .s(s4), .ca_n(ca4), .cb_n(cb4));
  mcsa_array #(.N(5)) dut5 (.pp(pp5), .p_lo(lo5), .s(s5), .ca_n(ca5), .cb_n(cb5));
  mcsa_array          dut16 (.pp(pp16), .p_lo(lo16), .s(s16), .ca_n(ca16), .cb_n(cb16));

  initial begin : watchdog
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic longint unsigned recombine(input logic [2:0] lo, input longint unsigned s,
                                                input longint unsigned ca, input longint unsigned cb);
    return longint'(lo) + ((s + ca + cb) << 3);
  endfunction

  task automatic compare(input int n, input longint unsigned x, input longint unsigned y,
                         input longint unsigned got);
    checks++;
    if (got !== x * y) begin
      failures++;
      $display("FAIL N=%0d x=%0h y=%0h: recombined %0h expected %0h", n, x, y, got, x * y);
    end
  endtask

  initial begin
    // N = 4, exhaustive
    for (int v = 0; v < 256; v++) begin
      x4 = 4'(v); y4 = 4'(v >> 4);
      #1;
      compare(4, x4, y4, recombine(lo4, s4, 4'(~ca4), 4'(~cb4)));
      // top weight (6) has no carry of row 2; weight 3 has none of row 3
      checks++;
      if (ca4[3] !== 1'b1 || cb4[0] !== 1'b1) begin
        failures++;
        $display("FAIL N=4 empty carry slots not zero");
      end
      // the row 1, weight 2 cell adds x2y0 and x1y1 with a zero third input;
      // its carry, forwarded to the row 3 cell, is set when both are one
      if (x4[2] & y4[0] & x4[1] & y4[1]) skip_carries++;
    end
    // N = 5, exhaustive
    for (int v = 0; v < 1024; v++) begin
      x5 = 5'(v); y5 = 5'(v >> 5);
      #1;
      compare(5, x5, y5, recombine(lo5, s5, 6'(~ca5), 6'(~cb5)));
    end
    // N = 16, corners and random
    x16 = '1; y16 = '1; #1;
    compare(16, x16, y16, recombine(lo16, s16, 28'(~ca16), 28'(~cb16)));
    x16 = 16'h918F; y16 = 16'h5F33; #1;
    compare(16, x16, y16, recombine(lo16, s16, 28'(~ca16), 28'(~cb16)));
    for (int k = 0; k < 3000; k++) begin
      x16 = 16'($urandom); y16 = 16'($urandom);
      #1;
      compare(16, x16, y16, recombine(lo16, s16, 28'(~ca16), 28'(~cb16)));
    end
    checks++;
    if (skip_carries == 0) begin
      failures++;
      $display("FAIL no carry was forwarded two rows down");
    end
    $display("carries forwarded two rows down (N=4, row 1 -> row 3): %0d", skip_carries);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

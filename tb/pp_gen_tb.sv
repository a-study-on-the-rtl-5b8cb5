// pp_gen_tb -- self-checking test of the partial product generator at its
// default width (16).
//
// Drives corner operands and random ones and checks every partial product
// bit against the AND of the selected operand bits, looked up by shifting
// the operands rather than by the generator's own indexing.
module pp_gen_tb;
  localparam int N = 16;
  logic [N-1:0]        x, y;
  logic [N-1:0][N-1:0] pp;
  int checks = 0, failures = 0;

  pp_gen dut (.x(x), .y(y), .pp(pp));

  initial begin : watchdog
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_all();
    logic [N-1:0] row_ref;
    for (int j = 0; j < N; j++) begin
      // row j is x when y bit j is set, zero otherwise
      row_ref = ((y >> j) & 1) != 0 ? x : '0;
      checks++;
      if (pp[j] !== row_ref) begin
        failures++;
        $display("FAIL x=%h y=%h row %0d: %h expected %h", x, y, j, pp[j], row_ref);
      end
    end
  endtask

  initial begin
    x = '0; y = '0; #1; check_all();
    x = '1; y = '1; #1; check_all();
    x = 16'hA5A5; y = 16'h0F0F; #1; check_all();
    for (int k = 0; k < 200; k++) begin
      x = N'($urandom);
      y = N'($urandom);
      #1;
      check_all();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

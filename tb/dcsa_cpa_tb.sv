// dcsa_cpa_tb -- self-checking test of the DCSA carry-propagate adder.
//
// Two instances: the 4-bit adder of the 4 x 4 multiplier, tested over all
// 4096 input combinations, and the default 28-bit one, tested with corner
// and random vectors. Expected results are the integer sum of s and of the
// complements of the two inverted carry vectors, modulo 2^(W+1). The test
// also counts vectors on which a carry ripples across the whole default
// adder, so that the long ripple path is known to be exercised.
module dcsa_cpa_tb;
  localparam int WS = 4;
  localparam int WL = 28;

  logic [WS-1:0] s4, ca4, cb4;
  logic [WS:0]   p4;
  logic [WL-1:0] sl, cal, cbl;
  logic [WL:0]   pl;
  int checks = 0, failures = 0;
  int full_ripples = 0;

  dcsa_cpa #(.W(WS)) dut4 (.s(s4), .ca_n(~ca4), .cb_n(~cb4), .p(p4));
  dcsa_cpa            dutl (.s(sl), .ca_n(~cal), .cb_n(~cbl), .p(pl));

  initial begin : watchdog
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_long();
    logic [WL+1:0] want;
    want = {2'b0, sl} + {2'b0, cal} + {2'b0, cbl};
    #1;
    checks++;
    if (pl !== want[WL:0]) begin
      failures++;
      $display("FAIL W=%0d s=%h a=%h b=%h: %h expected %h", WL, sl, cal, cbl, pl, want[WL:0]);
    end
    // a carry that travels from bit 0 to the top: the result is 2^WL
    if (want[WL:0] == ((WL+1)'(1) << WL)) full_ripples++;
  endtask

  initial begin
    logic [WS+1:0] want4;
    for (int v = 0; v < (1 << (3*WS)); v++) begin
      s4  = WS'(v);
      ca4 = WS'(v >> WS);
      cb4 = WS'(v >> (2*WS));
      #1;
      want4 = {2'b0, s4} + {2'b0, ca4} + {2'b0, cb4};
      checks++;
      if (p4 !== want4[WS:0]) begin
        failures++;
        $display("FAIL W=%0d s=%h a=%h b=%h: %h expected %h", WS, s4, ca4, cb4, p4, want4[WS:0]);
      end
    end
    // full-length ripple: all ones plus one
    sl = '1; cal = WL'(1); cbl = '0; check_long();
    sl = '0; cal = '1; cbl = WL'(1); check_long();
    sl = '1; cal = '1; cbl = '1; check_long();
    sl = '0; cal = '0; cbl = '0; check_long();
    for (int k = 0; k < 2000; k++) begin
      sl  = WL'({$urandom, $urandom});
      cal = WL'({$urandom, $urandom});
      cbl = WL'({$urandom, $urandom});
      check_long();
    end
    checks++;
    if (full_ripples == 0) begin
      failures++;
      $display("FAIL no full-length carry ripple was exercised");
    end
    $display("full-length ripples: %0d", full_ripples);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

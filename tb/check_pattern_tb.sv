// check_pattern_tb: exhaustive check of the burst-pattern detector.
//
// All 128 remainders are applied. Expected: 1 when the remainder is zero or
// its lowest and highest 1 bits are at most 2 positions apart (a burst of
// length <= 3), else 0. The number of matching values (1 + 7 + 6 + 10 = 24
// by counting bursts of each length) is checked as well.
module check_pattern_tb;
  localparam int unsigned K = 7;

  logic [K-1:0] rem_in;
  logic         result;
  int checks = 0, failures = 0, n_match = 0;

  check_pattern dut (.rem_in(rem_in), .result(result));

  function automatic logic is_burst(logic [K-1:0] r);
    int lo = -1, hi = -1;
    if (r == '0) return 1'b1;
    for (int b = 0; b < K; b++) if (r[b]) begin
      if (lo < 0) lo = b;
      hi = b;
    end
    return (hi - lo) <= 2;
  endfunction

  initial begin
    for (int v = 0; v < (1 << K); v++) begin
      rem_in = K'(v);
      #1;
      checks++;
      if (result) n_match++;
      if (result !== is_burst(K'(v))) begin
        failures++;
        $display("FAIL rem=%b result=%b", rem_in, result);
      end
    end
    checks++;
    if (n_match != 24) begin
      failures++;
      $display("FAIL %0d patterns matched, expected 24", n_match);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

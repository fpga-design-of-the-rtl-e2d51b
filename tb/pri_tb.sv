// pri_tb: exhaustive check of the highest-bit priority selector.
//
// Every 15-bit request word is applied; the expected grant is found by
// scanning down from bit 14 for the first 1. The grant must also be one-hot
// for every non-zero request.
module pri_tb;
  localparam int unsigned N = 15;

  logic [N-1:0] req, grant;
  int checks = 0, failures = 0;

  pri dut (.req(req), .grant(grant));

  function automatic logic [N-1:0] top_bit(logic [N-1:0] r);
    for (int b = N - 1; b >= 0; b--) if (r[b]) return N'(1) << b;
    return '0;
  endfunction

  initial begin
    for (int v = 0; v < (1 << N); v++) begin
      req = N'(v);
      #1;
      checks++;
      if (grant !== top_bit(req) || (req != 0 && !$onehot(grant))) begin
        failures++;
        if (failures < 10) $display("FAIL req=%b grant=%b", req, grant);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : watchdog
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

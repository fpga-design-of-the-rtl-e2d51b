// remainder_tb: exhaustive check of the GF(2) remainder network.
//
// Every 15-bit word is applied; the expected remainder comes from bit-serial
// polynomial long division by x^7 + x^6 + x^4 + 1 written out here. The
// division-matrix rows for x^7 .. x^14 and the remainder of the known
// codeword 556Fh (data AAh) are also checked against fixed values.
module remainder_tb;
  localparam int unsigned N = 15;
  localparam int unsigned K = 7;
  localparam logic [K:0] G = 8'hD1;

  logic [N-1:0] code;
  logic [K-1:0] rem_out;
  int checks = 0, failures = 0;

  remainder dut (.code(code), .rem_out(rem_out));

  function automatic logic [K-1:0] long_div(logic [N-1:0] v);
    for (int b = N - 1; b >= K; b--)
      if (v[b]) v ^= N'(G) << (b - K);
    return v[K-1:0];
  endfunction

  task automatic check(logic [N-1:0] c, logic [K-1:0] exp, string what);
    code = c;
    #1;
    checks++;
    if (rem_out !== exp) begin
      failures++;
      if (failures < 10) $display("FAIL %s: code=%h rem=%b expected %b", what, c, rem_out, exp);
    end
  endtask

  // Rows x^7 .. x^14 of the division matrix, r6..r0
  localparam logic [K-1:0] ROWS [8] = '{7'b1010001, 7'b1110011, 7'b0110111, 7'b1101110,
                                        7'b0001101, 7'b0011010, 7'b0110100, 7'b1101000};

  initial begin
    for (int j = 0; j < 8; j++) check(N'(1) << (j + 7), ROWS[j], "matrix row");
    check(15'h556F, '0, "codeword 556F");
    for (int v = 0; v < (1 << N); v++) check(N'(v), long_div(N'(v)), "exhaustive");
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

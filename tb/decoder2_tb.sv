// decoder2_tb: checks the correction lane at several shift amounts.
//
// Three lanes (shift 0, 5 and 14) get the same random words and remainders.
// The expected output XORs the remainder into bits 6..0 and then rotates
// right one bit at a time, SHIFT times; with sw low it must be zero. A
// directed case rotates a word left by 5, puts a burst in its check bits and
// expects the original word back from the shift-5 lane.
module decoder2_tb;
  localparam int unsigned N = 15;
  localparam int unsigned K = 7;
  localparam int unsigned SH [3] = '{0, 5, 14};

  logic         sw;
  logic [N-1:0] code;
  logic [K-1:0] rem_in;
  logic [N-1:0] cw [3];
  int checks = 0, failures = 0;

  for (genvar g = 0; g < 3; g++) begin : g_dut
    decoder2 #(.N(N), .K(K), .SHIFT(SH[g])) dut (
      .sw(sw), .code(code), .rem_in(rem_in), .cw(cw[g]));
  end

  function automatic logic [N-1:0] expected(logic s, logic [N-1:0] c,
                                            logic [K-1:0] r, int unsigned sh);
    logic [N-1:0] v;
    if (!s) return '0;
    v = c;
    v[K-1:0] = c[K-1:0] ^ r;
    repeat (sh) v = {v[0], v[N-1:1]};
    return v;
  endfunction

  task automatic check_all();
    #1;
    for (int g = 0; g < 3; g++) begin
      checks++;
      if (cw[g] !== expected(sw, code, rem_in, SH[g])) begin
        failures++;
        if (failures < 10)
          $display("FAIL shift=%0d sw=%b code=%h rem=%b cw=%h", SH[g], sw, code, rem_in, cw[g]);
      end
    end
  endtask

  initial begin
    logic [N-1:0] orig, rot;
    for (int t = 0; t < 2000; t++) begin
      sw     = 1'($urandom);
      code   = N'($urandom);
      rem_in = K'($urandom);
      check_all();
    end
    // Directed: word 556F rotated left by 5 with a burst 101 in bits 3..1.
    orig = 15'h556F;
    rot  = {orig[N-6:0], orig[N-1:N-5]};
    sw = 1'b1;
    code = rot ^ 15'b000_0000_0000_1010;
    rem_in = 7'b0001010;
    #1;
    checks++;
    if (cw[1] !== orig) begin
      failures++;
      $display("FAIL directed: cw=%h expected %h", cw[1], orig);
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

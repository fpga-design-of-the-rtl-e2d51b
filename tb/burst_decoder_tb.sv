// burst_decoder_tb: end-to-end check of the burst-error decoder.
//
// The decoder is run at its default size, the (15,8) code with generator
// x^7 + x^6 + x^4 + 1 correcting bursts of up to 3 bits. Codewords are made
// by a long-division encoder written here. Expected results come from a
// brute-force nearest-codeword search: the received word is decodable when
// some codeword differs from it by a cyclic burst of at most 3 bits, and
// that codeword (unique for this code) is the expected output; otherwise
// error must be high with zero outputs.
//
// Stimulus:
//   - the four words of the reference example for data AAh: 556Fh (clean),
//     5568h (3-bit burst), 546Eh (two errors 8 bits apart), 5560h (4-bit
//     burst, must raise error);
//   - every data byte with no error and with each of the 60 cyclic bursts
//     of length 1..3 (wrapped ones included);
//   - every data byte with each of the 60 cyclic bursts of length 4.
// Each mechanism is counted: clean pass-through, correction in the data
// part, in the check part and across the wrap, the priority selector
// choosing among several matching lanes, and the error flag. A mechanism
// never seen counts as a failure. The design is combinational, so each
// result is sampled 1 time unit after the input is applied.
module burst_decoder_tb;
  localparam int unsigned N = 15;
  localparam int unsigned K = 7;
  localparam logic [K:0] G = 8'hD1;

  logic [N-1:0]   code_in, code_out;
  logic [N-K-1:0] data_out;
  logic           error;
  int checks = 0, failures = 0;
  int n_clean = 0, n_fix_data = 0, n_fix_check = 0, n_fix_wrap = 0;
  int n_multi = 0, n_error = 0;

  burst_decoder dut (.code_in(code_in), .data_out(data_out),
                     .code_out(code_out), .error(error));

  function automatic logic [N-1:0] encode(logic [N-K-1:0] m);
    logic [N-1:0] v = {m, {K{1'b0}}};
    logic [N-1:0] r = v;
    for (int b = N - 1; b >= K; b--)
      if (r[b]) r ^= N'(G) << (b - K);
    return v | r;
  endfunction

  // True when e is zero or a cyclic burst of length <= 3.
  function automatic logic is_short_burst(logic [N-1:0] e);
    logic [N-1:0] rot;
    if (e == '0) return 1'b1;
    for (int s = 0; s < N; s++) begin
      rot = (e >> s) | (e << (N - s));
      if (rot[N-1:3] == '0) return 1'b1;
    end
    return 1'b0;
  endfunction

  function automatic logic [N-1:0] rotl(logic [N-1:0] v, int s);
    return (s == 0) ? v : ((v << s) | (v >> (N - s)));
  endfunction

  task automatic run(logic [N-1:0] word, string what);
    logic [N-1:0] exp_cw = '0;
    logic         exp_err = 1'b1;
    logic [N-1:0] e;
    for (int m = 0; m < (1 << (N - K)); m++) begin
      if (is_short_burst(word ^ encode((N-K)'(m)))) begin
        exp_cw  = encode((N-K)'(m));
        exp_err = 1'b0;
      end
    end
    code_in = word;
    #1;
    checks++;
    if (error !== exp_err || code_out !== exp_cw || data_out !== exp_cw[N-1:K]) begin
      failures++;
      if (failures < 10)
        $display("FAIL %s: in=%h out=%h data=%h err=%b, expected out=%h err=%b",
                 what, word, code_out, data_out, error, exp_cw, exp_err);
    end
    // Mechanism counters
    e = word ^ exp_cw;
    if (exp_err) n_error += int'(error);
    else if (e == '0) n_clean += int'(code_out == word);
    else if (code_out == exp_cw) begin
      if (e[N-1] && e[0])      n_fix_wrap++;
      else if (e[K-1:0] == '0) n_fix_data++;
      else if (e[N-1:K] == '0) n_fix_check++;
    end
    if ($countones(dut.result) > 1 && $countones(dut.result) < N) n_multi++;
  endtask

  task automatic expect_mech(int count, string name);
    checks++;
    $display("  %-28s %0d", name, count);
    if (count == 0) begin
      failures++;
      $display("FAIL mechanism never exercised: %s", name);
    end
  endtask

  task automatic expect_fig(logic [N-1:0] word, logic [N-K-1:0] d, logic err, string what);
    code_in = word;
    #1;
    checks++;
    if (error !== err || (!err && data_out !== d)) begin
      failures++;
      $display("FAIL %s: in=%h data=%h err=%b, expected data=%h err=%b",
               what, word, data_out, error, d, err);
    end
  endtask

  initial begin
    logic [N-1:0] cw;
    // Reference example for data AAh
    expect_fig(15'h556F, 8'hAA, 1'b0, "clean 556F");
    expect_fig(15'h5568, 8'hAA, 1'b0, "burst-3 5568");
    expect_fig(15'h5560, 8'h00, 1'b1, "burst-4 5560");
    run(15'h546E, "double error 546E");
    run(15'h556F, "clean 556F");
    run(15'h5568, "burst-3 5568");
    run(15'h5560, "burst-4 5560");
    // All data bytes, all correctable bursts and all 4-bit bursts
    for (int m = 0; m < (1 << (N - K)); m++) begin
      cw = encode((N-K)'(m));
      run(cw, "clean");
      for (int s = 0; s < N; s++) begin
        run(cw ^ rotl(15'b001, s), "burst-1");
        run(cw ^ rotl(15'b011, s), "burst-2");
        run(cw ^ rotl(15'b101, s), "burst-3");
        run(cw ^ rotl(15'b111, s), "burst-3");
        run(cw ^ rotl(15'b1001, s), "burst-4");
        run(cw ^ rotl(15'b1011, s), "burst-4");
        run(cw ^ rotl(15'b1101, s), "burst-4");
        run(cw ^ rotl(15'b1111, s), "burst-4");
      end
    end
    $display("Mechanisms:");
    expect_mech(n_clean,     "clean pass-through");
    expect_mech(n_fix_data,  "burst fixed in data part");
    expect_mech(n_fix_check, "burst fixed in check part");
    expect_mech(n_fix_wrap,  "burst fixed across wrap");
    expect_mech(n_multi,     "priority among lanes");
    expect_mech(n_error,     "uncorrectable, error set");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : watchdog
    #100000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

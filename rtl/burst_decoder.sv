// burst_decoder: single-stage decoder for a cyclic code correcting bursts.
//
// Error trapping done in parallel over every cyclic shift. Lane i (i = 0 ..
// N-1) rotates the received word left by i bits, divides it by G(x) with a
// remainder matrix and asks check_pattern whether the remainder is a burst
// of at most P bits. Because every cyclic burst of length <= P is moved
// into the check unit by some rotation, and all such bursts have distinct
// remainders, a matching lane's remainder is exactly the error of the
// rotated word. pri keeps the highest matching lane, its decoder2 XORs the
// remainder in and rotates back, and the lane outputs are ORed. The data
// unit is the top N-K bits of the corrected word. When no lane matches, the
// word holds an error the code cannot correct: error goes high and the
// outputs are zero. An error-free word matches on every lane (zero
// remainder) and passes through unchanged.
// The structure (shifts, remainder, check_pattern, pri, decoder2) and the
// (15,8), burst-3 code follow the published design; how the lanes are
// combined and how error is formed are this implementation's choices.
//
// Ports: code_in (N bits) in; data_out (N-K bits), code_out (N bits) and
// error out.
// Timing: purely combinational, no clock or reset; a result is valid one
// propagation delay after code_in changes.
module burst_decoder
  import burst_pkg::*;
#(
  parameter int unsigned N = CW_LEN,
  parameter int unsigned K = CHK_LEN,
  parameter int unsigned P = BURST_LEN,
  parameter logic [K:0]  GEN_POLY = CODE_GEN_POLY
) (
  input  logic [N-1:0]   code_in,
  output logic [N-K-1:0] data_out,
  output logic [N-1:0]   code_out,
  output logic           error
);

  logic [N-1:0] shifted [N];   // lane i: code_in rotated left by i
  logic [K-1:0] rem     [N];
  logic [N-1:0] result;
  logic [N-1:0] grant;
  logic [N-1:0] lane_cw [N];

  for (genvar i = 0; i < N; i++) begin : g_lane
    // Cyclic left shift by i (x^i * c(x) mod x^N + 1): a bit permutation.
    always_comb begin
      for (int unsigned j = 0; j < N; j++)
        shifted[i][(j + i) % N] = code_in[j];
    end

    remainder #(.N(N), .K(K), .GEN_POLY(GEN_POLY)) u_rem (
      .code   (shifted[i]),
      .rem_out(rem[i])
    );

    check_pattern #(.K(K), .P(P)) u_ptn (
      .rem_in(rem[i]),
      .result(result[i])
    );

    decoder2 #(.N(N), .K(K), .SHIFT(i)) u_dec (
      .sw    (grant[i]),
      .code  (shifted[i]),
      .rem_in(rem[i]),
      .cw    (lane_cw[i])
    );
  end

  pri #(.N(N)) u_pri (
    .req  (result),
    .grant(grant)
  );

  always_comb begin
    code_out = '0;
    for (int i = 0; i < N; i++) code_out |= lane_cw[i];
  end

  assign data_out = code_out[N-1:K];
  assign error    = ~|result;

endmodule

// pri: priority selector, keeps only the highest set bit of its input.
//
// The decoder sets one request bit per cyclic shift whose remainder is an
// error pattern; several shifts may match the same burst, and any of them
// corrects it. pri passes on only the highest-numbered request, so exactly
// one correction lane is enabled. grant is one-hot, or zero when req is
// zero. Behaviour follows the published design; the zero case is this
// implementation's choice.
//
// Ports: req (N bits) in, grant (N bits) out.
// Timing: combinational, zero cycles.
module pri
  import burst_pkg::*;
#(
  parameter int unsigned N = CW_LEN
) (
  input  logic [N-1:0] req,
  output logic [N-1:0] grant
);

  always_comb begin
    grant = '0;
    for (int i = 0; i < N; i++)
      if (req[i]) grant = N'(1) << i;  // later (higher) bits override
  end

endmodule

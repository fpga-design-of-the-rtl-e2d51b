// decoder2: correction lane for one cyclic shift of the received word.
//
// Lane SHIFT sees the received word rotated left by SHIFT bits. When the
// burst has been moved into the check unit by that rotation, the lane's
// remainder equals the error itself, so XORing the remainder into the low K
// bits removes it. The corrected word is then rotated right by SHIFT bits
// (a fixed bit permutation) to restore the original bit order. The
// permission flag sw, driven by the priority selector, gates the output
// through a 2-to-1 multiplexer; a disabled lane outputs zero so that all
// lanes can be ORed. The XOR, the shift back and the multiplexer follow the
// published design; the zero output of a disabled lane is this
// implementation's choice.
//
// Ports: sw (permission) in, code (N bits, shifted word) in, rem_in (K bits)
// in, cw (N bits, corrected word in original order) out.
// Timing: combinational, zero cycles.
module decoder2
  import burst_pkg::*;
#(
  parameter int unsigned N     = CW_LEN,
  parameter int unsigned K     = CHK_LEN,
  parameter int unsigned SHIFT = 0
) (
  input  logic         sw,
  input  logic [N-1:0] code,
  input  logic [K-1:0] rem_in,
  output logic [N-1:0] cw
);

  logic [N-1:0] fixed;
  logic [N-1:0] restored;

  assign fixed = code ^ N'(rem_in);

  // Cyclic right shift by SHIFT: bit j moves to bit (j - SHIFT) mod N.
  always_comb begin
    for (int unsigned j = 0; j < N; j++)
      restored[(j + N - (SHIFT % N)) % N] = fixed[j];
  end

  assign cw = sw ? restored : '0;

endmodule

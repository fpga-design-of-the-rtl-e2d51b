// check_pattern: is a remainder one of the burst-error patterns?
//
// A remainder belongs to the pattern set when all of its 1 bits lie inside
// one window of P consecutive bit positions of the K-bit check unit. Each of
// the K-P+1 windows is a constant mask; the remainder is ANDed with the
// inverted mask, a NOR of that says "nothing outside this window", and the
// window results are ORed. The all-zero remainder (no error in this shift)
// also matches, which lets an error-free word pass the decoder unchanged.
// The AND/OR/NOT structure against a matrix of length-3 patterns follows the
// published design; counting the zero remainder as a pattern is this
// implementation's choice.
//
// Ports: rem_in (K bits) in, result out (1 = pattern found).
// Timing: combinational, zero cycles.
module check_pattern
  import burst_pkg::*;
#(
  parameter int unsigned K = CHK_LEN,
  parameter int unsigned P = BURST_LEN
) (
  input  logic [K-1:0] rem_in,
  output logic         result
);

  localparam logic [K-1:0] WINDOW = K'((1 << P) - 1);

  always_comb begin
    result = 1'b0;
    for (int unsigned w = 0; w + P <= K; w++)
      if ((rem_in & ~(WINDOW << w)) == '0) result = 1'b1;
  end

endmodule

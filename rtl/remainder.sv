// remainder: remainder of a codeword polynomial divided by the generator.
//
// Division is done as a vector-by-matrix product over GF(2): row j of the
// matrix is x^j mod G(x), and the remainder is the XOR of the rows selected
// by the 1 bits of the codeword. Rows 0..K-1 are the identity, so the check
// bits pass straight into the sum; rows K..N-1 are worked out at
// elaboration from GEN_POLY by a constant function. The result is a pure XOR
// network with no clock and no state. For the default code the rows are
//   x^7 -> 1010001, x^8 -> 1110011, ..., x^14 -> 1101000 (r6..r0),
// giving, for example, r6 = c6 ^ c7 ^ c8 ^ c10 ^ c14.
// Matrix division and the (15,7) sizes are the published design; building
// the matrix from the polynomial by a function is this implementation's own.
//
// Ports: code (N bits, bit j = x^j) in, rem_out (K bits) out.
// Timing: combinational, zero cycles.
module remainder
  import burst_pkg::*;
#(
  parameter int unsigned N = CW_LEN,
  parameter int unsigned K = CHK_LEN,
  parameter logic [K:0]  GEN_POLY = CODE_GEN_POLY
) (
  input  logic [N-1:0] code,
  output logic [K-1:0] rem_out
);

  typedef logic [K-1:0] row_t;
  typedef row_t matrix_t [N];

  // Row j = x^j mod G(x): each step multiplies by x and reduces once.
  function automatic matrix_t build_matrix();
    matrix_t m;
    row_t    r;
    r = row_t'(1);
    for (int j = 0; j < N; j++) begin
      m[j] = r;
      if (r[K-1]) r = (r << 1) ^ GEN_POLY[K-1:0];
      else        r = r << 1;
    end
    return m;
  endfunction

  localparam matrix_t MATRIX = build_matrix();

  always_comb begin
    rem_out = '0;
    for (int j = 0; j < N; j++)
      if (code[j]) rem_out ^= MATRIX[j];
  end

endmodule

// burst_pkg: code constants shared by the burst-error decoder modules.
//
// The code is a binary cyclic (15,8) code that corrects any single burst of
// up to 3 bit errors, cyclic wrap-around included. A codeword holds the data
// unit in bits 14..7 and the check unit in bits 6..0; bit j is the
// coefficient of x^j. The generator polynomial G(x) = x^7 + x^6 + x^4 + 1
// divides x^15 + 1, and its multiples of degree < 15 are the codewords:
//   CW(x) = M(x)*x^7 + (M(x)*x^7 mod G(x)),
// with M(x) the m = n - k = 8-bit data unit.
// The code length, check length and burst length follow the published
// design; the generator is the one its division matrix implies.
package burst_pkg;
  localparam int unsigned CW_LEN    = 15;  // n, codeword length
  localparam int unsigned CHK_LEN   = 7;   // k, check unit length
  localparam int unsigned BURST_LEN = 3;   // p, correctable burst length
  // G(x) with bit j = coefficient of x^j: x^7 + x^6 + x^4 + 1
  localparam logic [CHK_LEN:0] CODE_GEN_POLY = 8'hD1;
endpackage

// tsd_pkg: shared types and default sizes for the trinary signed-digit (TSD)
// array adder that works on digit-decomposition planes (DDP).
//
// A TSD digit takes one of the five values -2, -1, 0, 1, 2 (radix 3). Inside
// the adder a digit never travels as a number: it is split over five binary
// planes, one per digit value, and exactly one plane holds a 1 at each pixel.
// Outside the adder (at the encoder input and in testbenches) a digit is
// carried as a 3-bit two's-complement number, which is this implementation's
// own choice of code; the codes 3, -3 and -4 are not digits.
//
// Pixel order (used by every plane in the design): the array element in row j
// (0..M-1) and column k (0..N-1) owns ND consecutive pixels, digit i (0 = least
// significant) at pixel index (j*N + k)*ND + i.
package tsd_pkg;

  // Default sizes: a 10 x 2 array of 4-digit TSD numbers, the example the
  // adder was demonstrated on.
  localparam int unsigned DEF_M  = 10;  // rows of the data array
  localparam int unsigned DEF_N  = 2;   // columns of the data array
  localparam int unsigned DEF_ND = 4;   // TSD digits per number (n)

  // One TSD digit as a 3-bit two's-complement code.
  typedef logic signed [2:0] tsd_digit_t;

  localparam tsd_digit_t TSD_P2 = 3'sd2;
  localparam tsd_digit_t TSD_P1 = 3'sd1;
  localparam tsd_digit_t TSD_0  = 3'sd0;
  localparam tsd_digit_t TSD_N1 = -3'sd1;
  localparam tsd_digit_t TSD_N2 = -3'sd2;

  // True for the five codes that are TSD digits.
  function automatic logic tsd_is_digit(tsd_digit_t d);
    return (d >= TSD_N2) && (d <= TSD_P2);
  endfunction

endpackage

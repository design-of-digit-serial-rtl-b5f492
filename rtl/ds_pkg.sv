// ds_pkg: constants shared by the digit-serial FIR filter.
//
// The filter multiplies each input sample by four fixed coefficients, 29, 43,
// 59 and 89, and processes every word one digit of DIGIT_W bits per clock.
// The coefficient values and the digit size of 4 follow the filter this RTL
// implements; the 8-bit sample width follows its 8-bit input port. The 16-bit
// word length is this design's own choice: it is the smallest word that holds
// the full output, 255 * (29 + 43 + 59 + 89) = 56100 < 2^16, so no product or
// sum ever wraps.
package ds_pkg;

  localparam int unsigned DIGIT_W  = 4;   // digit size d
  localparam int unsigned SAMPLE_W = 8;   // input sample width
  localparam int unsigned WORD_W   = 16;  // serial word (frame) length

  // Coefficients, in the order they appear on the transposed-form chain.
  localparam int unsigned H1 = 29;
  localparam int unsigned H2 = 43;
  localparam int unsigned H3 = 59;
  localparam int unsigned H4 = 89;

endpackage

// ds_sub: digit-serial subtracter, s = a - b (two's complement, modulo the
// word length).
//
// It is the digit-serial adder with the D bits of the subtrahend inverted and
// the carry flip-flop initialised to 1 at the start of each word, so that
// a + ~b + 1 is formed across the digits of the word.
//
// Interface and timing are those of ds_add: digits LSB first, first marks
// digit 0 of a word, result in the same cycle.
module ds_sub #(
  parameter int unsigned D = 4
) (
  input  logic         clk,
  input  logic         rst,
  input  logic         first,
  input  logic [D-1:0] a,
  input  logic [D-1:0] b,
  output logic [D-1:0] s
);

  logic [D-1:0] b_n;

  assign b_n = ~b;

  ds_add #(.D(D), .CARRY_INIT(1'b1)) u_add (
    .clk, .rst, .first, .a, .b(b_n), .s
  );

endmodule

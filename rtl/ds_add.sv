// ds_add: digit-serial adder.
//
// Adds two words that arrive one digit of D bits per clock, least significant
// digit first, and returns their sum in the same format, combinationally in the
// same cycle. D full adders form a ripple chain; the carry out of the top one
// is kept in a single flip-flop and fed to the bottom one on the next digit, as
// in the classic digit-serial adder. That flip-flop is initialised at the start
// of every word: when `first` is high the stored carry is ignored and
// CARRY_INIT is used instead (0 for an addition; the subtracter sets it to 1).
// Initialising through `first` rather than through reset lets words follow one
// another without a gap; that mechanism is this design's choice.
//
// Interface: a, b digits in; s digit out; first marks digit 0 of a word.
// Timing: zero-cycle latency per digit, one word every WORD_W/D cycles.
module ds_add #(
  parameter int unsigned D          = 4,
  parameter bit          CARRY_INIT = 1'b0
) (
  input  logic         clk,
  input  logic         rst,
  input  logic         first,
  input  logic [D-1:0] a,
  input  logic [D-1:0] b,
  output logic [D-1:0] s
);

  logic         carry_q;
  logic [D:0]   c;

  assign c[0] = first ? CARRY_INIT : carry_q;

  for (genvar i = 0; i < D; i++) begin : g_fa
    full_adder u_fa (.a(a[i]), .b(b[i]), .ci(c[i]), .s(s[i]), .co(c[i+1]));
  end

  always_ff @(posedge clk) begin
    if (rst) carry_q <= CARRY_INIT;
    else     carry_q <= c[D];
  end

endmodule

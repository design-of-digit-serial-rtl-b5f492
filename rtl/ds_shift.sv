// ds_shift: digit-serial left shift by S bits, with every shift from 0 to S
// available at once.
//
// A left shift of a serial word only delays its bits: the output bit stream is
// the input stream preceded by S zeros. The module keeps the last S bits of the
// stream in S flip-flops (S flip-flops for a shift by S, whatever the digit
// size). Each cycle the current digit is placed above those bits and the
// D-bit window that starts S - k bits up is output k, the word shifted by k.
// The flip-flops are read as zeros on the first digit of a word, so each word
// is shifted in zeros and the bits of the previous word never leak in. Taking
// the smaller shifts from the same flip-flops is the sharing of shift
// registers that keeps a shift-add network small.
//
// Interface: x digit in, first marks digit 0 of a word; y[k] is x << k.
// Timing: combinational per digit; the shifted word is truncated to the word
// length, as it is in any fixed-length serial frame.
module ds_shift #(
  parameter int unsigned D = 4,
  parameter int unsigned S = 2
) (
  input  logic         clk,
  input  logic         rst,
  input  logic         first,
  input  logic [D-1:0] x,
  output logic [D-1:0] y [S+1]
);

  logic [S-1:0]   hist_q;   // last S bits of the stream, most recent at the top
  logic [S-1:0]   hist;
  logic [D+S-1:0] window;

  assign hist   = first ? '0 : hist_q;
  assign window = {x, hist};

  for (genvar k = 0; k <= S; k++) begin : g_tap
    assign y[k] = window[S-k +: D];
  end

  always_ff @(posedge clk) begin
    if (rst) hist_q <= '0;
    else     hist_q <= window[D +: S];
  end

endmodule

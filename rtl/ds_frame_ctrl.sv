// ds_frame_ctrl: word (frame) controller of the digit-serial datapath.
//
// A word of WORD_W bits takes NDIG = WORD_W/D cycles. A counter runs from 0 to
// NDIG-1 and wraps; `first` is high on digit 0 of every word and `last` on
// digit NDIG-1. `first` initialises the carry and shift flip-flops of the
// serial operators and loads a new sample into the input converter; `last`
// tells the output converter that a word is complete. The counter starts at
// digit 0 when reset is released. This controller is this design's own
// construction of the control logic a digit-serial datapath needs.
//
// Interface: first and last. Timing: free-running.
module ds_frame_ctrl #(
  parameter int unsigned D      = 4,
  parameter int unsigned WORD_W = 16
) (
  input  logic                             clk,
  input  logic                             rst,
  output logic                             first,
  output logic                             last
);

  localparam int unsigned NDIG = WORD_W / D;

  logic [$clog2(WORD_W/D+1)-1:0] cnt_q;

  always_ff @(posedge clk) begin
    if (rst)                           cnt_q <= '0;
    else if (cnt_q == $bits(cnt_q)'(NDIG - 1)) cnt_q <= '0;
    else                               cnt_q <= cnt_q + 1'b1;
  end

  assign first = (cnt_q == '0);
  assign last  = (cnt_q == $bits(cnt_q)'(NDIG - 1));

  // A word must span at least two digits and a whole number of them.
  initial begin
    assert (WORD_W % D == 0 && NDIG >= 2) else $error("WORD_W must be a multiple of D, at least 2*D");
  end

endmodule

// ds_word_delay: delays a digit-serial word by one whole word (one sample
// period), the z^-1 register between two taps of a transposed-form FIR filter.
//
// A word of WORD_W bits passes as WORD_W/D digits, so a one-word delay is a
// shift register of WORD_W/D stages of D bits: the digit that enters now
// leaves exactly WORD_W/D cycles later, in the same position of the next
// word. The stages are cleared by reset so that the filter starts from rest.
//
// Interface: x digit in, y digit out. Timing: latency WORD_W/D cycles.
module ds_word_delay #(
  parameter int unsigned D      = 4,
  parameter int unsigned WORD_W = 16
) (
  input  logic         clk,
  input  logic         rst,
  input  logic [D-1:0] x,
  output logic [D-1:0] y
);

  localparam int unsigned NDIG = WORD_W / D;

  logic [D-1:0] stage_q [NDIG];

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int i = 0; i < NDIG; i++) stage_q[i] <= '0;
    end else begin
      stage_q[0] <= x;
      for (int i = 1; i < NDIG; i++) stage_q[i] <= stage_q[i-1];
    end
  end

  assign y = stage_q[NDIG-1];

  initial begin
    assert (WORD_W % D == 0) else $error("WORD_W must be a multiple of D");
  end

endmodule

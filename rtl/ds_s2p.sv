// ds_s2p: serial-to-parallel converter at the output of the digit-serial
// datapath.
//
// Digits arrive least significant first and are shifted in at the top of an
// accumulating register. On the last digit of a word (`last` high) the
// complete word, the register plus the incoming digit, is copied to the
// output register and `valid` is raised for one cycle.
//
// Interface: x digit in, last marks the final digit; word and valid out.
// Timing: word and valid appear the cycle after the last digit and the word
// holds until the next one.
module ds_s2p #(
  parameter int unsigned D      = 4,
  parameter int unsigned WORD_W = 16
) (
  input  logic              clk,
  input  logic              rst,
  input  logic              last,
  input  logic [D-1:0]      x,
  output logic [WORD_W-1:0] word,
  output logic              valid
);

  logic [WORD_W-1:0] acc_q;
  logic [WORD_W-1:0] acc_next;

  assign acc_next = {x, acc_q[WORD_W-1:D]};

  always_ff @(posedge clk) begin
    if (rst) begin
      acc_q <= '0;
      word  <= '0;
      valid <= 1'b0;
    end else begin
      acc_q <= acc_next;
      valid <= last;
      if (last) word <= acc_next;
    end
  end

endmodule

// ds_p2s: parallel-to-serial converter at the input of the digit-serial
// datapath.
//
// On digit 0 of each word (`first` high) it takes a SAMPLE_W-bit sample,
// extends it to WORD_W bits, with zeros for an unsigned sample or copies of
// the sign bit for a two's-complement one (SIGNED), and emits its least
// significant digit in the same cycle. The remaining digits leave one per
// cycle from a shift register. Extending the sample to the full word length is
// what lets the serial network deliver every bit of the products.
//
// Interface: sample in, sampled while first is high; x digit out.
// Timing: one sample per WORD_W/D cycles, zero latency to the first digit.
module ds_p2s #(
  parameter int unsigned D        = 4,
  parameter int unsigned SAMPLE_W = 8,
  parameter int unsigned WORD_W   = 16,
  parameter bit          SIGNED   = 1'b0
) (
  input  logic                clk,
  input  logic                rst,
  input  logic                first,
  input  logic [SAMPLE_W-1:0] sample,
  output logic [D-1:0]        x
);

  logic [WORD_W-1:0] ext;
  logic [WORD_W-1:0] sreg_q;
  logic [WORD_W-1:0] cur;

  assign ext = {{(WORD_W-SAMPLE_W){SIGNED & sample[SAMPLE_W-1]}}, sample};
  assign cur = first ? ext : sreg_q;
  assign x   = cur[D-1:0];

  always_ff @(posedge clk) begin
    if (rst) sreg_q <= '0;
    else     sreg_q <= cur >> D;
  end

endmodule

// fir_ds_gb: four-tap digit-serial FIR filter whose constant multiplications
// share one shift-add network (graph-based multiple constant multiplication).
//
// Structure (transposed direct form, all internal words digit-serial):
//
//   sample -> ds_p2s -> x --> mcm_gb --> 29x, 43x, 59x, 89x
//   s1 = 29x            y1 = s1 delayed one word
//   s2 = 43x + y1       y2 = s2 delayed one word
//   s3 = 89x + y2       y3 = s3 delayed one word
//   s4 = 59x + y3       y  = s4 collected by ds_s2p
//
// so y(n) = 59 x(n) + 89 x(n-1) + 43 x(n-2) + 29 x(n-3). The coefficients and
// this tap order follow the filter's reference simulation, whose step
// response is 59, 148, 191, 220. The tap additions are ds_add operators, the
// delays ds_word_delay shift registers, and ds_frame_ctrl marks word
// boundaries. Digit size 4 and the 8-bit sample follow that filter; the
// 16-bit word (full-precision output) and the converters are this design's
// own choices.
//
// Interface: `sample` is taken in the cycle `sample_take` is high, once every
// WORD_W/D cycles (4 at the defaults); there is no stall. `y` is the full
// WORD_W-bit output and `y_valid` pulses when a new value is placed on it.
// Timing: the output that includes sample x(n) appears, with y_valid, WORD_W/D
// cycles after the cycle in which x(n) was taken. Output is unsigned, or two's
// complement when SIGNED is set; it never wraps at the default sizes.
module fir_ds_gb #(
  parameter int unsigned D        = ds_pkg::DIGIT_W,
  parameter int unsigned SAMPLE_W = ds_pkg::SAMPLE_W,
  parameter int unsigned WORD_W   = ds_pkg::WORD_W,
  parameter bit          SIGNED   = 1'b0
) (
  input  logic                clk,
  input  logic                rst,
  input  logic [SAMPLE_W-1:0] sample,
  output logic                sample_take,
  output logic [WORD_W-1:0]   y,
  output logic                y_valid
);

  logic         first, last;
  logic [D-1:0] x;
  logic [D-1:0] x29, x43, x59, x89;
  logic [D-1:0] s1, s2, s3, s4;
  logic [D-1:0] y1, y2, y3;

  ds_frame_ctrl #(.D(D), .WORD_W(WORD_W)) u_ctrl (
    .clk, .rst, .first, .last
  );

  ds_p2s #(.D(D), .SAMPLE_W(SAMPLE_W), .WORD_W(WORD_W), .SIGNED(SIGNED)) u_p2s (
    .clk, .rst, .first, .sample, .x
  );

  mcm_gb #(.D(D)) u_mcm (
    .clk, .rst, .first, .x, .x29, .x43, .x59, .x89
  );

  assign s1 = x29;

  ds_word_delay #(.D(D), .WORD_W(WORD_W)) u_z1 (.clk, .rst, .x(s1), .y(y1));
  ds_add        #(.D(D))                  u_a2 (.clk, .rst, .first, .a(x43), .b(y1), .s(s2));
  ds_word_delay #(.D(D), .WORD_W(WORD_W)) u_z2 (.clk, .rst, .x(s2), .y(y2));
  ds_add        #(.D(D))                  u_a3 (.clk, .rst, .first, .a(x89), .b(y2), .s(s3));
  ds_word_delay #(.D(D), .WORD_W(WORD_W)) u_z3 (.clk, .rst, .x(s3), .y(y3));
  ds_add        #(.D(D))                  u_a4 (.clk, .rst, .first, .a(x59), .b(y3), .s(s4));

  ds_s2p #(.D(D), .WORD_W(WORD_W)) u_s2p (
    .clk, .rst, .last, .x(s4), .word(y), .valid(y_valid)
  );

  assign sample_take = first;

  // Output words complete on word boundaries, so a new y always appears in
  // the cycle a new sample is taken.
  a_valid_on_boundary: assert property (@(posedge clk) disable iff (rst) y_valid |-> sample_take)
    else $error("y_valid outside a word boundary");

endmodule

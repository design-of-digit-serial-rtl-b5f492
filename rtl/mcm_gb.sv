// mcm_gb: digit-serial multiple constant multiplication of one input by 29,
// 43, 59 and 89, built from shared shift-add operations.
//
// Instead of one multiplier per coefficient, the products are formed from a
// small graph of additions, subtractions and shifts in which each
// intermediate result (a "fundamental") is reused:
//
//     7x  = (x << 3) - x
//     29x = (7x << 2) + x
//     43x = (7x << 1) + 29x
//     59x = 43x + (x << 4)
//     89x = (59x << 1) - 29x
//
// The first three lines are the graph-based solution for 29x and 43x, which
// shares 7x between both products (three operations instead of the six of
// plain binary recoding). The last two, which extend it to 59 and 89 with one
// operation each, are this design's own choice: five distinct odd
// coefficients need at least five operations, so this is a minimum.
//
// Every operation is a digit-serial operator: ds_add, ds_sub (carry flip-flop
// set to 1 at word start) and ds_shift. Shifts that start from the same signal
// share flip-flops: x << 3 and x << 4 use one 4-bit chain, 7x << 1 and 7x << 2
// one 2-bit chain, so the network holds 4 + 2 + 1 = 7 shift flip-flops and
// 5 carry flip-flops, whatever the word length.
//
// Interface: x digit in (LSB first), first marks digit 0 of a word; one digit
// of each product out per cycle. Timing: products are combinational in the
// digit; a product of B bits is complete after ceil(B/D) digits, so the word
// must be long enough to hold it (input padded with zeros or sign bits).
module mcm_gb #(
  parameter int unsigned D = 4
) (
  input  logic         clk,
  input  logic         rst,
  input  logic         first,
  input  logic [D-1:0] x,
  output logic [D-1:0] x29,
  output logic [D-1:0] x43,
  output logic [D-1:0] x59,
  output logic [D-1:0] x89
);

  logic [D-1:0] x_sh   [5];   // x << 0 .. x << 4
  logic [D-1:0] x7;
  logic [D-1:0] x7_sh  [3];   // 7x << 0 .. 7x << 2
  logic [D-1:0] x59_sh [2];   // 59x << 0 .. 59x << 1

  ds_shift #(.D(D), .S(4)) u_sh_x (.clk, .rst, .first, .x(x), .y(x_sh));

  ds_sub #(.D(D)) u_sub_7 (.clk, .rst, .first, .a(x_sh[3]), .b(x), .s(x7));

  ds_shift #(.D(D), .S(2)) u_sh_7 (.clk, .rst, .first, .x(x7), .y(x7_sh));

  ds_add #(.D(D)) u_add_29 (.clk, .rst, .first, .a(x7_sh[2]), .b(x), .s(x29));

  ds_add #(.D(D)) u_add_43 (.clk, .rst, .first, .a(x7_sh[1]), .b(x29), .s(x43));

  ds_add #(.D(D)) u_add_59 (.clk, .rst, .first, .a(x43), .b(x_sh[4]), .s(x59));

  ds_shift #(.D(D), .S(1)) u_sh_59 (.clk, .rst, .first, .x(x59), .y(x59_sh));

  ds_sub #(.D(D)) u_sub_89 (.clk, .rst, .first, .a(x59_sh[1]), .b(x29), .s(x89));

  // The graph wired above, evaluated on the constant 1, must give the
  // filter's coefficients; a mismatch stops elaboration.
  localparam int unsigned F7  = (1 << 3) - 1;
  localparam int unsigned F29 = (F7 << 2) + 1;
  localparam int unsigned F43 = (F7 << 1) + F29;
  localparam int unsigned F59 = F43 + (1 << 4);
  localparam int unsigned F89 = (F59 << 1) - F29;

  if (F29 != ds_pkg::H1 || F43 != ds_pkg::H2 || F59 != ds_pkg::H3 || F89 != ds_pkg::H4)
  begin : g_graph_mismatch
    $error("mcm_gb graph does not produce the coefficients in ds_pkg");
  end

endmodule

// tb_fir_ds_gb: end-to-end testbench of the digit-serial FIR filter at its
// default sizes (digit 4, 8-bit unsigned samples, 16-bit words).
//
// Phases: (1) a constant input of 1 from reset, whose step response must be
// 59, 148, 191, 220 and then stay at 220; (2) a single 1 (impulse response
// 59, 89, 43, 29, then 0); (3) constant 255, the largest output, 56100;
// (4) random samples. fir_scoreboard checks every output word and its latency
// of 4 cycles. The testbench also counts how often the mechanisms of the
// serial datapath were exercised and fails if one never was: words taken and
// returned, a carry passed from one digit to the next in a tap adder, a
// borrow passed between digits in a subtracter, bits shifted from one digit
// into the next, and an output word at or above 2^15 (top bit of the word
// in use).
module tb_fir_ds_gb;
  import ds_pkg::*;

  logic                clk = 1'b0;
  logic                rst = 1'b1;
  logic [SAMPLE_W-1:0] sample = '0;
  logic                sample_take;
  logic [WORD_W-1:0]   y;
  logic                y_valid;
  int                  checks = 0, failures = 0;
  int                  sb_checks, sb_failures, sb_outputs;

  always #5 clk = ~clk;

  fir_ds_gb dut (.clk, .rst, .sample, .sample_take, .y, .y_valid);

  fir_scoreboard #(.D(DIGIT_W), .SAMPLE_W(SAMPLE_W), .WORD_W(WORD_W), .SIGNED(1'b0)) sb (
    .clk, .rst, .sample, .sample_take, .y, .y_valid,
    .checks(sb_checks), .failures(sb_failures), .outputs(sb_outputs));

  // mechanism counters
  int n_take = 0, n_carry = 0, n_borrow = 0, n_shift = 0, n_big = 0;

  always @(posedge clk) if (!rst) begin
    if (sample_take) n_take++;
    if (!dut.first && (dut.u_a2.carry_q || dut.u_a3.carry_q || dut.u_a4.carry_q)) n_carry++;
    if (!dut.first && !dut.u_mcm.u_sub_89.u_add.carry_q) n_borrow++;
    if (!dut.first && dut.u_mcm.u_sh_x.hist_q != '0) n_shift++;
    if (y_valid && y[WORD_W-1]) n_big++;
  end

  // collect the first few outputs of a phase
  task automatic expect_outputs(input int n, input int unsigned exp_vals [$]);
    for (int i = 0; i < n; i++) begin
      @(posedge clk iff y_valid);
      checks++;
      if (y != exp_vals[i]) begin
        failures++;
        $display("FAIL phase output %0d: y=%0d expected %0d", i, y, exp_vals[i]);
      end
    end
  endtask

  initial begin
    int unsigned step_exp [$];
    int unsigned imp_exp [$];
    step_exp = '{59, 148, 191, 220, 220, 220};
    imp_exp  = '{59, 89, 43, 29, 0, 0};

    // phase 1: step of 1 from reset, as in the reference simulation
    sample = 8'd1;
    repeat (2) @(posedge clk);
    #1 rst = 1'b0;
    expect_outputs(6, step_exp);

    // phase 2: impulse, after the filter has settled at 0
    @(negedge clk) sample = 8'd0;
    repeat (8) @(posedge clk iff y_valid);
    @(negedge clk iff sample_take) sample = 8'd1;
    @(negedge clk) sample = 8'd0;
    expect_outputs(6, imp_exp);

    // phase 3: full-scale step
    @(negedge clk iff sample_take) sample = 8'd255;
    repeat (8) @(posedge clk iff y_valid);
    checks++;
    if (y != 16'd56100) begin
      failures++;
      $display("FAIL full-scale output %0d, expected 56100", y);
    end

    // phase 4: random samples, changing every cycle
    for (int i = 0; i < 20000; i++) @(negedge clk) sample = SAMPLE_W'($urandom);
    repeat (2) @(posedge clk);

    $display("samples taken %0d, outputs checked %0d, digit carries %0d, digit borrows %0d, shifted-in bits %0d, outputs above 2^15 %0d",
             n_take, sb_outputs, n_carry, n_borrow, n_shift, n_big);
    checks += 5;
    if (n_take == 0)   begin failures++; $display("FAIL no sample taken"); end
    if (n_carry == 0)  begin failures++; $display("FAIL no inter-digit carry"); end
    if (n_borrow == 0) begin failures++; $display("FAIL no inter-digit borrow"); end
    if (n_shift == 0)  begin failures++; $display("FAIL no bits shifted across digits"); end
    if (n_big == 0)    begin failures++; $display("FAIL no output above 2^15"); end
    checks   += sb_checks;
    failures += sb_failures;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (30000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks + sb_checks, failures + sb_failures);
    $finish;
  end
endmodule

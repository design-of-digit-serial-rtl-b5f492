// tb_ds_shift: self-checking testbench for ds_shift.
//
// A shift of 5 bits with 4-bit digits (so the shift spans more than one digit)
// is driven with random 16-bit words, back to back. Every tap k = 0..5 is
// reassembled and compared with (word << k) modulo 2^16, which checks both the
// delay through the flip-flops and that each word is shifted in zeros, not
// the tail of the previous word.
module tb_ds_shift;
  localparam int D = 4;
  localparam int S = 5;
  localparam int W = 16;
  localparam int N = W / D;

  logic         clk = 1'b0;
  logic         rst = 1'b1;
  logic         first = 1'b0;
  logic [D-1:0] x = '0;
  logic [D-1:0] y [S+1];
  int           checks = 0, failures = 0;

  always #5 clk = ~clk;

  ds_shift #(.D(D), .S(S)) dut (.clk, .rst, .first, .x, .y);

  task automatic run_word(input logic [W-1:0] xw);
    logic [W-1:0] yw [S+1];
    for (int k = 0; k < N; k++) begin
      first = (k == 0);
      x     = xw[k*D +: D];
      #1;
      for (int t = 0; t <= S; t++) yw[t][k*D +: D] = y[t];
      @(posedge clk); #1;
    end
    for (int t = 0; t <= S; t++) begin
      checks++;
      if (yw[t] !== W'(xw << t)) begin
        failures++;
        $display("FAIL x=%h shift %0d got %h expected %h", xw, t, yw[t], W'(xw << t));
      end
    end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    #1 rst = 1'b0;
    run_word(16'hffff);
    run_word(16'h0001);
    run_word(16'hf800);
    run_word(16'h0000);
    for (int i = 0; i < 1000; i++) run_word(W'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

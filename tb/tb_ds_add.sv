// tb_ds_add: self-checking testbench for ds_add.
//
// Streams random 16-bit words through the digit-serial operator, 4 bits per
// cycle and least significant digit first, back to back with no gap between
// words, and compares each reassembled result word with the sum computed
// with ordinary integer arithmetic modulo 2^16. Corner words (all zeros, all
// ones, carries that ripple through every digit) come first.
module tb_ds_add;
  localparam int D = 4;
  localparam int W = 16;
  localparam int N = W / D;

  logic         clk = 1'b0;
  logic         rst = 1'b1;
  logic         first = 1'b0;
  logic [D-1:0] a = '0, b = '0, s;
  int           checks = 0, failures = 0;

  always #5 clk = ~clk;

  ds_add #(.D(D)) dut (.clk, .rst, .first, .a, .b, .s);

  task automatic run_word(input logic [W-1:0] aw, input logic [W-1:0] bw);
    logic [W-1:0] sw, ew;
    for (int k = 0; k < N; k++) begin
      first = (k == 0);
      a     = aw[k*D +: D];
      b     = bw[k*D +: D];
      #1 sw[k*D +: D] = s;
      @(posedge clk); #1;
    end
    ew = aw + bw;
    checks++;
    if (sw !== ew) begin
      failures++;
      $display("FAIL a=%h b=%h got %h expected %h", aw, bw, sw, ew);
    end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    #1 rst = 1'b0;
    run_word(16'h0000, 16'h0000);
    run_word(16'hffff, 16'h0001);
    run_word(16'h0001, 16'hffff);
    run_word(16'h0fff, 16'h0001);
    run_word(16'h8000, 16'h8000);
    run_word(16'h1234, 16'h1234);
    run_word(16'h0000, 16'h0001);
    for (int i = 0; i < 2000; i++) run_word(W'($urandom), W'($urandom));
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

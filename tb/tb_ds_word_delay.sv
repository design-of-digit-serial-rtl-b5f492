// tb_ds_word_delay: self-checking testbench for ds_word_delay.
//
// Feeds a random digit every cycle and checks that each output digit equals
// the input digit of exactly WORD_W/D = 4 cycles before, and zero for the
// first 4 cycles after reset (the filter must start from rest).
module tb_ds_word_delay;
  localparam int D = 4;
  localparam int W = 16;
  localparam int N = W / D;

  logic         clk = 1'b0;
  logic         rst = 1'b1;
  logic [D-1:0] x = '0, y;
  logic [D-1:0] hist [$];
  int           checks = 0, failures = 0;

  always #5 clk = ~clk;

  ds_word_delay #(.D(D), .WORD_W(W)) dut (.clk, .rst, .x, .y);

  initial begin
    for (int i = 0; i < N; i++) hist.push_back('0);
    repeat (2) @(posedge clk);
    #1 rst = 1'b0;
    for (int c = 0; c < 1000; c++) begin
      x = D'($urandom);
      #1;
      checks++;
      if (y !== hist[0]) begin
        failures++;
        $display("FAIL cycle %0d got %h expected %h", c, y, hist[0]);
      end
      void'(hist.pop_front());
      hist.push_back(x);
      @(posedge clk); #1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

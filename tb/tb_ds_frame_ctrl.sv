// tb_ds_frame_ctrl: self-checking testbench for ds_frame_ctrl.
//
// After reset, `first` must be high on cycle 0 and then every WORD_W/D = 4
// cycles, `last` on cycles 3, 7, ..., and never both at once.
module tb_ds_frame_ctrl;
  localparam int D = 4;
  localparam int W = 16;
  localparam int N = W / D;

  logic clk = 1'b0;
  logic rst = 1'b1;
  logic first, last;
  int   checks = 0, failures = 0;

  always #5 clk = ~clk;

  ds_frame_ctrl #(.D(D), .WORD_W(W)) dut (.clk, .rst, .first, .last);

  initial begin
    repeat (2) @(posedge clk);
    #1 rst = 1'b0;
    for (int c = 0; c < 200; c++) begin
      checks++;
      if (first !== (c % N == 0) || last !== (c % N == N - 1)) begin
        failures++;
        $display("FAIL cycle %0d first=%b last=%b", c, first, last);
      end
      @(posedge clk); #1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_ds_p2s: self-checking testbench for ds_p2s.
//
// Two converters, one unsigned and one two's-complement, receive the same
// random 8-bit samples, one every 4 cycles. The digits each emits are
// reassembled into a 16-bit word and compared with the sample extended with
// zeros, or with copies of its sign bit, respectively.
module tb_ds_p2s;
  localparam int D  = 4;
  localparam int SW = 8;
  localparam int W  = 16;
  localparam int N  = W / D;

  logic          clk = 1'b0;
  logic          rst = 1'b1;
  logic          first = 1'b0;
  logic [SW-1:0] sample = '0;
  logic [D-1:0]  xu, xs;
  int            checks = 0, failures = 0;

  always #5 clk = ~clk;

  ds_p2s #(.D(D), .SAMPLE_W(SW), .WORD_W(W), .SIGNED(1'b0)) dut_u (
    .clk, .rst, .first, .sample, .x(xu));
  ds_p2s #(.D(D), .SAMPLE_W(SW), .WORD_W(W), .SIGNED(1'b1)) dut_s (
    .clk, .rst, .first, .sample, .x(xs));

  task automatic run_word(input logic [SW-1:0] v);
    logic [W-1:0] wu, ws;
    for (int k = 0; k < N; k++) begin
      first  = (k == 0);
      // the sample may change after digit 0; the converter must have kept it
      sample = (k == 0) ? v : SW'($urandom);
      #1;
      wu[k*D +: D] = xu;
      ws[k*D +: D] = xs;
      @(posedge clk); #1;
    end
    checks += 2;
    if (wu !== W'(v)) begin
      failures++;
      $display("FAIL unsigned %h got %h", v, wu);
    end
    if (ws !== W'($signed(v))) begin
      failures++;
      $display("FAIL signed %h got %h", v, ws);
    end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    #1 rst = 1'b0;
    run_word(8'h01);
    run_word(8'h80);
    run_word(8'hff);
    run_word(8'h7f);
    for (int i = 0; i < 500; i++) run_word(SW'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_ds_s2p: self-checking testbench for ds_s2p.
//
// Random 16-bit words are sent as 4-bit digits, LSB first, with `last` on the
// fourth digit. `valid` must pulse exactly on the cycle after each last digit
// and nowhere else, `word` must then hold the word that was sent, and it must
// keep that value until the next word completes.
module tb_ds_s2p;
  localparam int D = 4;
  localparam int W = 16;
  localparam int N = W / D;

  logic         clk = 1'b0;
  logic         rst = 1'b1;
  logic         last = 1'b0;
  logic [D-1:0] x = '0;
  logic [W-1:0] word;
  logic         valid;
  logic [W-1:0] prev = '0;
  int           checks = 0, failures = 0;

  always #5 clk = ~clk;

  ds_s2p #(.D(D), .WORD_W(W)) dut (.clk, .rst, .last, .x, .word, .valid);

  task automatic run_word(input logic [W-1:0] v, input bit check_prev);
    for (int k = 0; k < N; k++) begin
      last = (k == N - 1);
      x    = v[k*D +: D];
      #1;
      if (k > 0) begin
        checks++;
        if (valid !== 1'b0 || (check_prev && word !== prev)) begin
          failures++;
          $display("FAIL digit %0d valid=%b word=%h held %h", k, valid, word, prev);
        end
      end
      @(posedge clk); #1;
    end
    checks++;
    if (valid !== 1'b1 || word !== v) begin
      failures++;
      $display("FAIL word %h got %h valid=%b", v, word, valid);
    end
    prev = v;
  endtask

  initial begin
    repeat (2) @(posedge clk);
    #1 rst = 1'b0;
    run_word(16'h1234, 1'b0);
    run_word(16'hffff, 1'b1);
    for (int i = 0; i < 500; i++) run_word(W'($urandom), 1'b1);
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

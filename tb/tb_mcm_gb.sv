// tb_mcm_gb: self-checking testbench for mcm_gb.
//
// Part 1 (digit size 4, 16-bit words): random 8-bit samples, unsigned and
// two's-complement, padded to 16 bits, are streamed back to back; the four
// reassembled products must equal 29x, 43x, 59x and 89x modulo 2^16.
//
// Part 2 (bit-serial, digit size 1): a 16-bit unsigned x is padded with zeros
// and fed one bit per cycle. 29x has at most 21 bits and 43x at most 22, so
// the bits produced in the first 21 and 22 cycles must already form the
// complete products; the test counts the cycle at which each product is
// complete and compares it with 21 and 22 for the largest x.
module tb_mcm_gb;
  import ds_pkg::*;

  localparam int D4 = 4;
  localparam int W4 = 16;

  logic clk = 1'b0;
  logic rst = 1'b1;
  int   checks = 0, failures = 0;

  always #5 clk = ~clk;

  // ---- digit size 4 ----
  logic          first4 = 1'b0;
  logic [D4-1:0] x4 = '0;
  logic [D4-1:0] p4 [4];

  mcm_gb #(.D(D4)) dut4 (.clk, .rst, .first(first4), .x(x4),
                         .x29(p4[0]), .x43(p4[1]), .x59(p4[2]), .x89(p4[3]));

  // ---- bit-serial ----
  logic first1 = 1'b0;
  logic x1 = 1'b0;
  logic p1 [4];

  mcm_gb #(.D(1)) dut1 (.clk, .rst, .first(first1), .x(x1),
                        .x29(p1[0]), .x43(p1[1]), .x59(p1[2]), .x89(p1[3]));

  localparam int unsigned COEF [4] = '{H1, H2, H3, H4};

  task automatic run4(input logic [W4-1:0] xw);
    logic [W4-1:0] pw [4];
    for (int k = 0; k < W4 / D4; k++) begin
      first4 = (k == 0);
      x4     = xw[k*D4 +: D4];
      #1;
      for (int c = 0; c < 4; c++) pw[c][k*D4 +: D4] = p4[c];
      @(posedge clk); #1;
    end
    for (int c = 0; c < 4; c++) begin
      logic [W4-1:0] e;
      e = W4'(xw * COEF[c]);
      checks++;
      if (pw[c] !== e) begin
        failures++;
        $display("FAIL d=4 x=%h coef %0d got %h expected %h", xw, COEF[c], pw[c], e);
      end
    end
  endtask

  // returns the number of cycles after which the bits seen so far equal the
  // complete product, for 29x and 43x
  task automatic run1(input logic [15:0] xv, output int done29, output int done43);
    localparam int WB = 24;
    logic [WB-1:0] xw, got29, got43;
    logic [WB-1:0] e29, e43;
    xw = WB'(xv);
    e29 = WB'(xw * 29);
    e43 = WB'(xw * 43);
    got29 = '0;
    got43 = '0;
    done29 = -1;
    done43 = -1;
    for (int k = 0; k < WB; k++) begin
      first1 = (k == 0);
      x1     = xw[k];
      #1;
      got29[k] = p1[0];
      got43[k] = p1[1];
      if (done29 < 0 && got29 == e29 && (e29 >> (k + 1)) == 0) done29 = k + 1;
      if (done43 < 0 && got43 == e43 && (e43 >> (k + 1)) == 0) done43 = k + 1;
      @(posedge clk); #1;
    end
    checks += 2;
    if (got29 !== e29 || got43 !== e43) begin
      failures++;
      $display("FAIL d=1 x=%h 29x %h/%h 43x %h/%h", xv, got29, e29, got43, e43);
    end
  endtask

  initial begin
    int d29, d43;
    repeat (2) @(posedge clk);
    #1 rst = 1'b0;
    run4(16'h00ff);
    run4(16'h0001);
    run4(16'hff80);   // -128
    for (int i = 0; i < 500; i++) begin
      logic [7:0] v;
      v = 8'($urandom);
      run4(W4'(v));
      run4(W4'($signed(v)));
    end

    run1(16'hffff, d29, d43);
    checks += 2;
    if (d29 != 21) begin
      failures++;
      $display("FAIL 29x of a 16-bit x complete after %0d cycles, expected 21", d29);
    end
    if (d43 != 22) begin
      failures++;
      $display("FAIL 43x of a 16-bit x complete after %0d cycles, expected 22", d43);
    end
    $display("bit-serial latency: 29x %0d cycles, 43x %0d cycles", d29, d43);
    for (int i = 0; i < 100; i++) run1(16'($urandom), d29, d43);

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

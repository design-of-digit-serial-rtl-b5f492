// tb_fir_ds_gb_var: the digit-serial FIR filter at other digit sizes and with
// signed samples.
//
// Four filters run side by side on independent random samples: two's-complement
// samples at digit size 4; bit-serial (digit size 1); digit size 2; and digit
// size 8 (two digits per word). Each is checked word by word, including the
// latency of WORD_W/D cycles, by its own fir_scoreboard. Negative samples must
// be padded with sign bits: the signed filter must produce negative outputs.
module tb_fir_ds_gb_var;
  logic clk = 1'b0;
  logic rst = 1'b1;
  int   checks = 0, failures = 0;

  always #5 clk = ~clk;

  localparam int NV = 4;
  localparam int DV [NV] = '{4, 1, 2, 8};
  localparam bit SV [NV] = '{1'b1, 1'b0, 1'b0, 1'b0};

  int c [NV], f [NV], o [NV];
  int n_neg = 0;

  for (genvar v = 0; v < NV; v++) begin : g_var
    logic [7:0]  sample;
    logic        take, yv;
    logic [15:0] y;

    fir_ds_gb #(.D(DV[v]), .SAMPLE_W(8), .WORD_W(16), .SIGNED(SV[v])) dut (
      .clk, .rst, .sample, .sample_take(take), .y, .y_valid(yv));

    fir_scoreboard #(.D(DV[v]), .SAMPLE_W(8), .WORD_W(16), .SIGNED(SV[v])) sb (
      .clk, .rst, .sample, .sample_take(take), .y, .y_valid(yv),
      .checks(c[v]), .failures(f[v]), .outputs(o[v]));

    always @(negedge clk) sample <= 8'($urandom);
  end

  always @(posedge clk) if (!rst && g_var[0].yv && g_var[0].y[15]) n_neg++;

  initial begin
    repeat (2) @(posedge clk);
    #1 rst = 1'b0;
    repeat (16000) @(posedge clk);
    for (int v = 0; v < NV; v++) begin
      $display("digit size %0d signed %0d: %0d outputs checked, %0d failures", DV[v], SV[v], o[v], f[v]);
      checks   += c[v] + 1;
      failures += f[v];
      if (o[v] < 500) begin
        failures++;
        $display("FAIL too few outputs for variant %0d", v);
      end
    end
    checks++;
    if (n_neg == 0) begin
      failures++;
      $display("FAIL signed filter produced no negative output");
    end
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

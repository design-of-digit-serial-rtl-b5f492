// fir_scoreboard: reference model and checker for fir_ds_gb, used by the
// filter testbenches. It watches only the filter's ports.
//
// Every sample the filter takes (sample_take high) is pushed into a history
// that starts at zero after reset. When y_valid pulses, y must equal
// 59 x(n) + 89 x(n-1) + 43 x(n-2) + 29 x(n-3) modulo 2^WORD_W, where x(n) is
// the most recent sample taken, read as unsigned or two's complement, and the
// pulse must come exactly WORD_W/D cycles after x(n) was taken. Output counts
// are exposed for the testbench to sum and report.
module fir_scoreboard #(
  parameter int unsigned D        = 4,
  parameter int unsigned SAMPLE_W = 8,
  parameter int unsigned WORD_W   = 16,
  parameter bit          SIGNED   = 1'b0
) (
  input  logic                clk,
  input  logic                rst,
  input  logic [SAMPLE_W-1:0] sample,
  input  logic                sample_take,
  input  logic [WORD_W-1:0]   y,
  input  logic                y_valid,
  output int                  checks,
  output int                  failures,
  output int                  outputs
);
  localparam int NDIG = WORD_W / D;

  longint hist [4];
  longint cycle, take_cycle;

  function automatic longint value_of(logic [SAMPLE_W-1:0] v);
    if (SIGNED) return longint'($signed(v));
    else        return longint'(v);
  endfunction

  always @(posedge clk) begin
    if (rst) begin
      hist       = '{default: 0};
      cycle      = 0;
      take_cycle = -1;
      checks     = 0;
      failures   = 0;
      outputs    = 0;
    end else begin
      if (y_valid) begin
        longint e;
        logic [WORD_W-1:0] ew;
        e  = 59 * hist[0] + 89 * hist[1] + 43 * hist[2] + 29 * hist[3];
        ew = WORD_W'(e);
        outputs++;
        checks += 2;
        if (y !== ew) begin
          failures++;
          $display("FAIL output %0d: y=%0d expected %0d", outputs, y, ew);
        end
        if (cycle - take_cycle != NDIG) begin
          failures++;
          $display("FAIL output %0d came %0d cycles after its sample, expected %0d",
                   outputs, cycle - take_cycle, NDIG);
        end
      end
      if (sample_take) begin
        hist[3]    = hist[2];
        hist[2]    = hist[1];
        hist[1]    = hist[0];
        hist[0]    = value_of(sample);
        take_cycle = cycle;
      end
      cycle++;
    end
  end
endmodule

// sample_tick: audio sample-rate strobe derived from the processing clock.
//
// The processing clock runs at 122.88 MHz, a multiple of the usual codec
// master clocks (256 fs and 384 fs at 48 kHz), so one 48 kHz sample period
// is exactly CLK_PER_SAMPLE = 2560 clock cycles. A free-running counter
// counts them and `tick` is high for one cycle at the end of each period.
// The clock and sample rates are those of the design this processor
// reproduces; generating the strobe from a counter is this design's own
// choice (the codec interface that would normally provide it is outside
// this design).
//
// Interface: clk, rst_n (active low, asynchronous), enable; tick pulses
// once every CLK_PER_SAMPLE enabled cycles, the first time CLK_PER_SAMPLE
// cycles after reset.
module sample_tick #(
  parameter int unsigned CLK_PER_SAMPLE = 2560
) (
  input  logic clk,
  input  logic rst_n,
  input  logic enable,
  output logic tick
);

  localparam int unsigned CNT_W = (CLK_PER_SAMPLE > 1) ? $clog2(CLK_PER_SAMPLE) : 1;

  logic [CNT_W-1:0] cnt;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt  <= '0;
      tick <= 1'b0;
    end else if (enable) begin
      tick <= (cnt == CNT_W'(CLK_PER_SAMPLE - 1));
      cnt  <= (cnt == CNT_W'(CLK_PER_SAMPLE - 1)) ? '0 : cnt + 1'b1;
    end else begin
      tick <= 1'b0;
    end
  end

endmodule

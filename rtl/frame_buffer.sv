// frame_buffer: audio buffering between the sample-rate stream and the
// buffer-at-a-time modal kernel.
//
// Samples arrive one per sample strobe (48 kHz). BUFFER of them are
// collected into an input frame; when it is full, and the kernel is idle,
// the frame is handed to the kernel (copied into x_frame, which stays
// constant while the kernel runs), the kernel's previous result is copied
// into the playback frame, and the kernel is started. During the next
// BUFFER strobes the playback frame is sent out, one sample per strobe,
// while the following input frame is collected. The audio path therefore
// has a latency of two buffers, and the kernel has one buffer period
// (BUFFER * CLK_PER_SAMPLE clock cycles) for each run.
// Processing audio in buffers of BUFFER samples, with a real-time deadline
// per buffer, follows the design this processor reproduces; the double
// buffering and the overrun policy are this design's own choices.
//
// Overrun: if the kernel is still busy when a new input frame is full,
// the deadline was missed. The new frame is dropped, the playback frame
// becomes silence (zeros) and `overrun` pulses for one cycle.
//
// Interface: `tick` (one-cycle strobe) samples audio_in and advances
// audio_out (registered). kernel_start is a one-cycle pulse.
module frame_buffer
  import modal_pkg::*;
#(
  parameter int unsigned BUFFER = 64
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  tick,
  input  fp32_t audio_in,
  output fp32_t audio_out,
  // kernel side
  output fp32_t x_frame [BUFFER],
  input  fp32_t y_frame [BUFFER],
  input  logic  kernel_busy,
  output logic  kernel_start,
  output logic  overrun
);

  localparam int unsigned POS_W = (BUFFER > 1) ? $clog2(BUFFER) : 1;

  fp32_t            in_col   [BUFFER];
  fp32_t            out_play [BUFFER];
  logic [POS_W-1:0] pos;
  logic             full;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pos          <= '0;
      full         <= 1'b0;
      kernel_start <= 1'b0;
      overrun      <= 1'b0;
      audio_out    <= FP32_ZERO;
      for (int i = 0; i < BUFFER; i++) begin
        in_col[i]   <= FP32_ZERO;
        out_play[i] <= FP32_ZERO;
        x_frame[i]  <= FP32_ZERO;
      end
    end else begin
      kernel_start <= 1'b0;
      overrun      <= 1'b0;
      full         <= 1'b0;
      if (tick) begin
        in_col[pos] <= audio_in;
        audio_out   <= out_play[pos];
        if (pos == POS_W'(BUFFER - 1)) begin
          pos  <= '0;
          full <= 1'b1;
        end else begin
          pos <= pos + 1'b1;
        end
      end
      if (full) begin
        if (!kernel_busy) begin
          x_frame      <= in_col;
          out_play     <= y_frame;
          kernel_start <= 1'b1;
        end else begin
          for (int i = 0; i < BUFFER; i++) out_play[i] <= FP32_ZERO;
          overrun <= 1'b1;
        end
      end
    end
  end

endmodule

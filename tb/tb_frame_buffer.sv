// tb_frame_buffer: feeds a sample stream through the frame buffer with a
// stand-in kernel (in the testbench) whose result is a recognisable
// function of its input frame, and checks the two-buffer delay, the
// ordering of samples within a buffer, the start pulses and the overrun
// handling (a frame dropped, a buffer of silence) when the stand-in kernel
// is made slower than one buffer period.
module tb_frame_buffer;
  import modal_pkg::*;

  localparam int B = 4;
  localparam int PERIOD = 10;   // clock cycles between sample strobes
  logic clk = 0, rst_n = 0, tick = 0;
  fp32_t audio_in, audio_out;
  fp32_t x_frame [B];
  fp32_t y_frame [B];
  logic kernel_busy = 0, kernel_start, overrun;
  int checks = 0, failures = 0;
  int kernel_len = 15;
  int n_start = 0, n_overrun = 0;
  fp32_t exp_play [B];
  fp32_t pending [B];
  fp32_t frame_in [B];

  always #5 clk = ~clk;

  frame_buffer #(.BUFFER(B)) dut (.*);

  // Stand-in kernel: busy for kernel_len cycles, result y[n] = ~x[n].
  always @(posedge clk) begin
    if (rst_n && kernel_start) begin
      kernel_busy <= 1;
      fork begin
        repeat (kernel_len) @(posedge clk);
        for (int n = 0; n < B; n++) y_frame[n] <= ~x_frame[n];
        kernel_busy <= 0;
      end join_none
    end
  end

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < B; n++) begin
      y_frame[n] = FP32_ZERO; exp_play[n] = FP32_ZERO; pending[n] = FP32_ZERO;
    end
    audio_in = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int s = 0; s < 40 * B; s++) begin
      if (s == 16 * B) kernel_len = 2 * B * PERIOD;   // too slow from here
      if (s == 28 * B) kernel_len = 15;               // fast again
      repeat (PERIOD - 1) @(posedge clk);
      @(negedge clk);
      audio_in = $urandom;
      frame_in[s % B] = audio_in;
      tick = 1;
      @(negedge clk);
      tick = 0;
      checks++;
      if (audio_out !== exp_play[s % B]) begin
        failures++;
        if (failures < 10) $display("sample %0d: got %h expected %h", s, audio_out, exp_play[s % B]);
      end
      if (s % B == B - 1) begin
        // the frame is complete; one cycle later it is handed over
        @(posedge clk); #1;
        if (kernel_start) begin
          n_start++;
          exp_play = pending;               // previous result is played next
          for (int n = 0; n < B; n++) begin
            checks++;
            if (x_frame[n] !== frame_in[n]) failures++;
            pending[n] = ~frame_in[n];
          end
        end else if (overrun) begin
          n_overrun++;
          for (int n = 0; n < B; n++) exp_play[n] = FP32_ZERO;
        end else begin
          failures++;
          $display("frame end without start or overrun");
        end
      end
    end
    checks++;
    if (n_start < 20 || n_overrun < 2) begin
      failures++;
      $display("starts %0d overruns %0d", n_start, n_overrun);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

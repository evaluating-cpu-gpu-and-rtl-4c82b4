// tb_sample_tick: with the default 2560 cycles per sample, checks that
// the strobe is one cycle wide, comes exactly every 2560 enabled cycles
// (48 kHz from 122.88 MHz) and stops while disabled.
module tb_sample_tick;
  logic clk = 0, rst_n = 0, enable = 0, tick;
  int checks = 0, failures = 0;
  longint cyc = 0, last = -1;
  int n_ticks = 0;

  always #4 clk = ~clk;

  sample_tick dut (.*);

  always @(posedge clk) cyc++;

  initial begin
    repeat (60000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    #1 rst_n = 1; enable = 1;
    while (n_ticks < 10) begin
      @(posedge clk);
      #1;
      if (tick) begin
        n_ticks++;
        checks++;
        if (last >= 0 && cyc - last != 2560) begin
          failures++;
          $display("tick interval %0d", cyc - last);
        end
        if (last < 0 && cyc > 2565) begin
          failures++;
          $display("first tick late at %0d", cyc);
        end
        last = cyc;
        @(posedge clk);
        #1 checks++;
        if (tick) failures++;   // one cycle wide
      end
    end
    enable = 0;
    repeat (6000) begin
      @(posedge clk);
      #1 if (tick) failures++;
    end
    checks++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

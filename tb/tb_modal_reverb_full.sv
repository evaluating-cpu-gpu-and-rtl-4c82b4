// tb_modal_reverb_full: the modal reverberator at its full default size: 30,000
// modes, buffers of 64 samples, 2560 clock cycles per 48 kHz sample. It
// runs four buffers, so that the outputs of the first two kernel runs are
// played back and compared, and checks that each run fits in the budget
// of one buffer period (64 x 2560 cycles) so that no overrun happens.
//
// The testbench plays a random float audio stream into the top at its
// sample strobe, serves the coefficient table from a memory model, and
// keeps its own model of the processor: at every kernel start it takes the
// last BUFFER input samples, advances every mode through them with
// reference float arithmetic (mode by mode, sample by sample) and keeps
// the result; that result must come out of audio_out, sample for sample,
// during the buffer after the next start (two buffers of delay). After an
// overrun the next buffer must be silence.
module tb_modal_reverb_full;
  import modal_pkg::*;
  import fp_ref_pkg::*;

  localparam int MAXM = 30000;
  localparam int B = 64;
  localparam int CPS = 2560;
  localparam int FRAMES = 4;
  localparam int FIRST_MODES = MAXM;
  localparam int WATCHDOG = 1200000;
  localparam int IW = (MAXM > 1) ? $clog2(MAXM) : 1;

  logic clk = 0, rst_n = 0;
  logic [IW:0] num_modes;
  logic [31:0] coef_base = 32'h0;
  logic sample_strobe, ready, kernel_busy, buffer_done, coef_resp_err;
  fp32_t audio_in, audio_out;
  logic [15:0] overrun_count;
  logic [31:0] kernel_cycles;
  logic arvalid, arready, rvalid, rready, rlast;
  logic [31:0] araddr, rdata;
  logic [7:0] arlen;
  logic [2:0] arsize;
  logic [1:0] arburst, rresp;

  int checks = 0, failures = 0;
  int n_start = 0, n_overrun = 0, n_clipped = 0, n_switch = 0, n_done = 0;
  int n_samples = 0, pos = 0, chk_pos = -1, frame = 0;
  int max_cycles = 0;
  logic [31:0] ref_u [MAXM];
  logic [31:0] ref_up [MAXM];
  logic [127:0] coef [MAXM];
  fp32_t in_hist [B];
  fp32_t exp_play [B];
  fp32_t pending [B];

  always #4 clk = ~clk;

  modal_reverb_top dut (
    .clk, .rst_n, .num_modes, .coef_base, .sample_strobe, .audio_in, .audio_out,
    .ready, .kernel_busy, .buffer_done, .overrun_count, .kernel_cycles, .coef_resp_err,
    .m_axi_arvalid(arvalid), .m_axi_arready(arready), .m_axi_araddr(araddr),
    .m_axi_arlen(arlen), .m_axi_arsize(arsize), .m_axi_arburst(arburst),
    .m_axi_rvalid(rvalid), .m_axi_rready(rready), .m_axi_rdata(rdata),
    .m_axi_rresp(rresp), .m_axi_rlast(rlast)
  );

  axi_mem_model #(.DEPTH_WORDS(4 * MAXM)) mem (
    .clk, .arvalid, .arready, .araddr, .arlen, .arsize, .arburst,
    .rvalid, .rready, .rdata, .rresp, .rlast
  );

  task automatic fail(string what);
    failures++;
    if (failures < 12) $display("FAIL: %s", what);
  endtask

  // Reference run of the kernel on the buffer just collected.
  task automatic reference_run();
    logic [63:0] r;
    int n;
    n = (int'(num_modes) > MAXM) ? MAXM : int'(num_modes);
    if (int'(num_modes) > MAXM) n_clipped++;
    for (int i = 0; i < B; i++) pending[i] = FP32_ZERO;
    for (int m = 0; m < n; m++) begin
      for (int i = 0; i < B; i++) begin
        r = step(coef[m], ref_u[m], ref_up[m], in_hist[i], pending[i]);
        pending[i] = r[31:0];
        ref_up[m]  = ref_u[m];
        ref_u[m]   = r[63:32];
      end
    end
  endtask

  initial begin
    repeat (WATCHDOG) @(posedge clk);
    failures++;
    $display("watchdog expired after frame %0d", frame);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Everything is observed and driven at the falling edge.
  always @(negedge clk) begin
    if (rst_n && ready) begin
      if (chk_pos >= 0) begin
        checks++;
        if (audio_out !== exp_play[chk_pos])
          fail($sformatf("sample %0d: got %h expected %h", n_samples - 1, audio_out, exp_play[chk_pos]));
        chk_pos = -1;
      end
      if (dut.u_frames.kernel_start) begin
        n_start++;
        exp_play = pending;
        reference_run();
      end
      if (dut.u_frames.overrun) begin
        n_overrun++;
        for (int i = 0; i < B; i++) exp_play[i] = FP32_ZERO;
      end
      if (buffer_done) begin
        n_done++;
        if (int'(kernel_cycles) > max_cycles) max_cycles = int'(kernel_cycles);
      end
      if (sample_strobe) begin
        audio_in = r2f((real'($urandom_range(2000, 0)) / 1000.0) - 1.0);
        in_hist[pos] = audio_in;
        chk_pos = pos;
        n_samples++;
        pos = (pos + 1) % B;
        if (pos == B / 2) begin
          frame++;
          phase_change(frame);
        end
      end
    end
  end

  // One configuration throughout.
  task automatic phase_change(int f);
  endtask

  initial begin
    audio_in = FP32_ZERO;
    num_modes = (IW+1)'(FIRST_MODES);
    for (int i = 0; i < B; i++) begin
      pending[i] = FP32_ZERO; exp_play[i] = FP32_ZERO; in_hist[i] = FP32_ZERO;
    end
    for (int m = 0; m < MAXM; m++) begin
      coef[m] = random_mode(1.0e8);
      ref_u[m] = FP32_ZERO;
      ref_up[m] = FP32_ZERO;
      for (int k = 0; k < 4; k++) mem.mem[4 * m + k] = coef[m][127 - 32 * k -: 32];
    end
    mem.stalls = 0;
    mem.latency = 6;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    checks++;
    if (ready) fail("ready before the state memory was cleared");
    wait (frame == FRAMES);
    @(negedge clk);
    checks++;
    if (n_overrun != 0) fail("overrun at full size");
    checks++;
    if (n_done < 2 || max_cycles >= B * CPS) fail("kernel run does not fit a buffer period");
    checks++;
    if (coef_resp_err) fail("memory error response");
    checks++;
    if (n_start + n_overrun < FRAMES - 2) fail("buffers missing");
    $display("kernel runs %0d, overruns %0d, clipped requests %0d, mode-count switches %0d, memory stall cycles %0d",
             n_start, n_overrun, n_clipped, n_switch, mem.stall_count);
    $display("longest kernel run %0d cycles of a %0d-cycle buffer period (%0d%%)",
             max_cycles, B * CPS, (100 * max_cycles) / (B * CPS));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

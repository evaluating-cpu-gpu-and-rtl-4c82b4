// tb_modal_kernel: runs the modal kernel on several consecutive buffers
// with random plate-like modes, computes the same buffers with reference
// float arithmetic in the loop-swapped order (mode by mode, sample by
// sample), and compares every output sample bit for bit. Covers: the
// state clearing after reset, state carried from buffer to buffer, a run
// with fewer modes (the others keep their state), a request above
// MAX_MODES (clipped), memory stalls, and the run length at full memory
// rate (about four cycles per mode).
module tb_modal_kernel;
  import modal_pkg::*;
  import fp_ref_pkg::*;

  localparam int MAXM = 24;
  localparam int B = 6;
  localparam int IW = 5;
  logic clk = 0, rst_n = 0, start = 0;
  logic [IW:0] num_modes;
  logic [31:0] coef_base;
  fp32_t x_frame [B];
  fp32_t y_frame [B];
  logic ready, busy, done, resp_err;
  logic [31:0] cycles;
  logic arvalid, arready, rvalid, rready, rlast;
  logic [31:0] araddr, rdata;
  logic [7:0] arlen;
  logic [2:0] arsize;
  logic [1:0] arburst, rresp;
  int checks = 0, failures = 0;
  logic [31:0] ref_u [MAXM];
  logic [31:0] ref_up [MAXM];
  logic [127:0] coef [MAXM];

  always #5 clk = ~clk;

  modal_kernel #(.MAX_MODES(MAXM), .BUFFER(B)) dut (
    .clk, .rst_n, .start, .num_modes, .coef_base, .x_frame, .y_frame,
    .ready, .busy, .done, .cycles, .resp_err,
    .m_axi_arvalid(arvalid), .m_axi_arready(arready), .m_axi_araddr(araddr),
    .m_axi_arlen(arlen), .m_axi_arsize(arsize), .m_axi_arburst(arburst),
    .m_axi_rvalid(rvalid), .m_axi_rready(rready), .m_axi_rdata(rdata),
    .m_axi_rresp(rresp), .m_axi_rlast(rlast)
  );

  axi_mem_model #(.DEPTH_WORDS(4 * MAXM + 64)) mem (
    .clk, .arvalid, .arready, .araddr, .arlen, .arsize, .arburst,
    .rvalid, .rready, .rdata, .rresp, .rlast
  );

  task automatic expect_true(bit c, string what);
    checks++;
    if (!c) begin
      failures++;
      if (failures < 10) $display("FAIL: %s", what);
    end
  endtask

  // One buffer through the kernel and through the reference.
  task automatic run_buffer(int n_req, real gain);
    logic [31:0] y_ref [B];
    logic [63:0] r;
    int n;
    n = (n_req > MAXM) ? MAXM : n_req;
    for (int i = 0; i < B; i++) begin
      x_frame[i] = r2f(gain * ((real'($urandom_range(2000, 0)) / 1000.0) - 1.0));
      y_ref[i] = FP32_ZERO;
    end
    for (int m = 0; m < n; m++) begin
      for (int i = 0; i < B; i++) begin
        r = step(coef[m], ref_u[m], ref_up[m], x_frame[i], y_ref[i]);
        y_ref[i]  = r[31:0];
        ref_up[m] = ref_u[m];
        ref_u[m]  = r[63:32];
      end
    end
    @(negedge clk);
    num_modes = (IW+1)'(n_req);
    start = 1;
    @(negedge clk) start = 0;
    expect_true(busy, "busy after start");
    fork
      wait (done);
      begin repeat (20000) @(posedge clk); end
    join_any
    disable fork;
    @(negedge clk);
    expect_true(!busy, "idle after done");
    for (int i = 0; i < B; i++) begin
      checks++;
      if (y_frame[i] !== y_ref[i]) begin
        failures++;
        if (failures < 10) $display("y[%0d]: got %h expected %h", i, y_frame[i], y_ref[i]);
      end
    end
    expect_true(!resp_err, "no memory error");
  endtask

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    coef_base = 32'h100;
    num_modes = 0;
    for (int i = 0; i < B; i++) x_frame[i] = FP32_ZERO;
    for (int m = 0; m < MAXM; m++) begin
      // gain chosen so that the mode amplitudes are of order one
      coef[m] = random_mode(1.0e8);
      ref_u[m] = FP32_ZERO;
      ref_up[m] = FP32_ZERO;
      for (int k = 0; k < 4; k++) mem.mem[64 + 4 * m + k] = coef[m][127 - 32 * k -: 32];
    end
    repeat (2) @(posedge clk);
    rst_n = 1;
    expect_true(!ready, "state clearing after reset");
    wait (ready);
    // full memory rate: run length close to four cycles per mode
    mem.stalls = 0;
    mem.latency = 6;
    run_buffer(MAXM, 1.0);
    expect_true(cycles >= 32'(4 * MAXM) && cycles <= 32'(4 * MAXM + 6 + B + 8),
                $sformatf("run length %0d cycles", cycles));
    for (int k = 0; k < 5; k++) run_buffer(MAXM, 1.0);
    // fewer modes: the rest keep their state
    run_buffer(MAXM / 2, 1.0);
    run_buffer(MAXM, 0.0);
    // memory back-pressure
    mem.stalls = 1;
    mem.latency = 15;
    for (int k = 0; k < 4; k++) run_buffer(MAXM, 1.0);
    expect_true(mem.stall_count > 0, "stalls happened");
    // more modes than the kernel holds: clipped to MAX_MODES
    run_buffer(MAXM + 7, 0.5);
    expect_true(mem.ar_count == 12 * MAXM + MAXM / 2, "bursts fetched");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

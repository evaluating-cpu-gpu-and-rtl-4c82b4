// tb_coef_fetch: fetches per-mode coefficient records from a memory model
// and checks index, contents, order, burst shape, throughput without
// back-pressure, behaviour with random ARREADY/RVALID stalls and the
// error flag for a table that runs past the end of memory.
module tb_coef_fetch;
  import modal_pkg::*;

  localparam int MAXM = 64;
  localparam int WORDS = 4 * 48;       // table for 48 modes only
  logic clk = 0, rst_n = 0, start = 0;
  logic [6:0] num_modes;
  logic [31:0] base_addr;
  logic busy, done, resp_err, rec_valid;
  logic [5:0] rec_idx;
  mode_coef_t rec_coef;
  logic arvalid, arready, rvalid, rready, rlast;
  logic [31:0] araddr, rdata;
  logic [7:0] arlen;
  logic [2:0] arsize;
  logic [1:0] arburst, rresp;
  int checks = 0, failures = 0;
  int got, run_cycles;

  always #5 clk = ~clk;

  coef_fetch #(.MAX_MODES(MAXM)) dut (
    .clk, .rst_n, .start, .num_modes, .base_addr, .busy, .done, .resp_err,
    .rec_valid, .rec_idx, .rec_coef,
    .m_axi_arvalid(arvalid), .m_axi_arready(arready), .m_axi_araddr(araddr),
    .m_axi_arlen(arlen), .m_axi_arsize(arsize), .m_axi_arburst(arburst),
    .m_axi_rvalid(rvalid), .m_axi_rready(rready), .m_axi_rdata(rdata),
    .m_axi_rresp(rresp), .m_axi_rlast(rlast)
  );

  axi_mem_model #(.DEPTH_WORDS(WORDS)) mem (
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

  // Runs one fetch of n modes from word offset off, checking every record.
  task automatic run(int n, int off, bit exp_err);
    int cyc;
    got = 0;
    cyc = 0;
    @(negedge clk);
    num_modes = 7'(n); base_addr = 32'(off * 4); start = 1;
    @(negedge clk) start = 0;
    while (!done) begin
      @(posedge clk);
      #1 cyc++;
      if (rec_valid) begin
        logic [127:0] e;
        int w;
        w = off + 4 * got;
        e = (w + 3 < WORDS) ? {mem.mem[w], mem.mem[w+1], mem.mem[w+2], mem.mem[w+3]} : rec_coef;
        expect_true(int'(rec_idx) == got, "record index in order");
        expect_true(rec_coef == e, "record contents");
        got++;
      end
      if (cyc > 5000) break;
    end
    run_cycles = cyc;
    expect_true(got == n, "record count");
    expect_true(resp_err == exp_err, "response error flag");
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < WORDS; i++) mem.mem[i] = $urandom;
    num_modes = 0; base_addr = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    expect_true(arlen == 8'd3 && arsize == 3'd2 && arburst == 2'b01, "burst shape");
    // full rate: one mode per four cycles plus the memory latency
    mem.stalls = 0;
    mem.latency = 6;
    run(40, 0, 0);
    expect_true(run_cycles <= 4 * 40 + 6 + 8, $sformatf("throughput (%0d cycles)", run_cycles));
    expect_true(mem.ar_count == 40, "one burst per mode");
    // back-pressure on both channels, longer latency, nonzero base
    mem.stalls = 1;
    mem.latency = 20;
    run(44, 16, 0);
    expect_true(mem.stall_count > 0, "stalls happened");
    // zero modes ends at once
    run(0, 0, 0);
    // table runs past the end of memory: error response flagged
    mem.stalls = 0;
    run(50, 0, 1);
    expect_true(mem.bad_burst == 0, "all bursts INCR of 4-byte beats");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

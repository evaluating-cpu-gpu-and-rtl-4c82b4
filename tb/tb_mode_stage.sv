// tb_mode_stage: drives one unrolled modal step with random modes and
// checks the passed-on state, index and coefficients and the output
// accumulator against reference float arithmetic; also checks that clear
// zeroes the accumulator and that invalid cycles change nothing.
module tb_mode_stage;
  import modal_pkg::*;
  import fp_ref_pkg::*;

  logic clk = 0, rst_n = 0, clear = 0, in_valid = 0;
  fp32_t x;
  logic [14:0] in_idx, out_idx;
  mode_coef_t in_coef, out_coef;
  mode_state_t in_state, out_state;
  logic out_valid;
  fp32_t acc;
  int checks = 0, failures = 0;
  logic [31:0] ref_acc;
  logic [63:0] r;

  always #5 clk = ~clk;

  mode_stage #(.IDX_W(15)) dut (.*);

  task automatic expect_eq(logic [31:0] got, logic [31:0] exp, string what);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 10) $display("%s: got %h expected %h", what, got, exp);
    end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    x = 32'h3F00_0000;
    in_idx = '0; in_coef = '0; in_state = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    ref_acc = FP32_ZERO;
    for (int i = 0; i < 600; i++) begin
      @(negedge clk);
      if (i % 200 == 0) begin
        clear = 1; in_valid = 1;        // clear wins over a valid record
        @(negedge clk);
        clear = 0;
        expect_eq(acc, FP32_ZERO, "acc after clear");
        expect_eq({31'd0, out_valid}, 32'd0, "valid suppressed by clear");
        ref_acc = FP32_ZERO;
        x = rand_f32(3);
      end
      in_valid = ($urandom_range(3, 0) != 0);
      in_idx   = 15'($urandom);
      in_coef  = (i % 3 == 0) ? random_mode(1.0) : {rand_f32(2), rand_f32(2), rand_f32(2), rand_f32(2)};
      in_state = {rand_f32(10), rand_f32(10)};
      r = step(in_coef, in_state.u, in_state.up, x, ref_acc);
      @(posedge clk);
      #1;
      expect_eq({31'd0, out_valid}, {31'd0, in_valid}, "out_valid");
      if (in_valid) begin
        ref_acc = r[31:0];
        expect_eq(out_state.u,  r[63:32],     "uNext");
        expect_eq(out_state.up, in_state.u,   "uPrev");
        expect_eq({17'd0, out_idx}, {17'd0, in_idx}, "index");
        expect_eq(out_coef.c1, in_coef.c1, "c1 passed on");
        expect_eq(out_coef.w,  in_coef.w,  "w passed on");
      end
      expect_eq(acc, ref_acc, "accumulator");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

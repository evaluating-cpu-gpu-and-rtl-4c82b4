// tb_fp32_add: checks the float adder against double-precision
// reference arithmetic on directed corner cases and random operands.
module tb_fp32_add;
  import fp_ref_pkg::*;

  logic [31:0] a, b, y, exp_y;
  int checks = 0, failures = 0;

  fp32_add dut (.a(a), .b(b), .y(y));

  task automatic check(logic [31:0] ta, logic [31:0] tb_);
    a = ta;
    b = tb_;
    #1;
    exp_y = fadd(ta, tb_);
    checks++;
    if (y !== exp_y) begin
      failures++;
      if (failures < 10)
        $display("add mismatch %h + %h: got %h expected %h", ta, tb_, y, exp_y);
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    check(32'h3F80_0000, 32'h3F80_0000);   // 1+1
    check(32'h3F80_0000, 32'hBF80_0000);   // exact cancellation
    check(32'h8000_0000, 32'h8000_0000);   // -0 + -0
    check(32'h0000_0000, 32'hC040_0000);   // 0 + -3
    check(32'h3F80_0000, 32'h3380_0000);   // 1 + 2^-24, tie to even
    check(32'h3F80_0001, 32'h3380_0000);   // tie rounds up to even
    check(32'h3F80_0000, 32'hB3800001);    // 1 - just over 2^-24
    check(32'h4B80_0000, 32'hBF80_0000);   // 2^24 - 1, cancellation by one place
    check(32'h7F7F_FFFF, 32'h7F7F_FFFF);   // overflow
    check(32'h0180_0000, 32'h8100_0000);   // result below normal range
    for (int i = 0; i < 5000; i++) begin
      logic [31:0] x;
      x = rand_f32(20);
      check(x, {~x[31], x[30:0]} ^ 32'($urandom_range(3, 0)));  // near cancellation
    end
    for (int i = 0; i < 20000; i++) check(rand_f32(40), rand_f32(40));
    for (int i = 0; i < 2000; i++) check(rand_f32(126), rand_f32(126));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

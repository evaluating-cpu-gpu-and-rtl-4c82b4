// tb_fp32_mul: checks the float multiplier against double-precision
// reference arithmetic on directed corner cases and random operands.
module tb_fp32_mul;
  import fp_ref_pkg::*;

  logic [31:0] a, b, y, exp_y;
  int checks = 0, failures = 0;

  fp32_mul dut (.a(a), .b(b), .y(y));

  task automatic check(logic [31:0] ta, logic [31:0] tb_);
    a = ta;
    b = tb_;
    #1;
    exp_y = fmul(ta, tb_);
    checks++;
    if (y !== exp_y) begin
      failures++;
      if (failures < 10)
        $display("mul mismatch %h * %h: got %h expected %h", ta, tb_, y, exp_y);
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
    check(32'h3F80_0000, 32'h3F80_0000);   // 1*1
    check(32'h4000_0000, 32'hC040_0000);   // 2*-3
    check(32'h0000_0000, 32'h4040_0000);   // 0*3
    check(32'h8000_0000, 32'h4040_0000);   // -0*3
    check(32'h3FFF_FFFF, 32'h3FFF_FFFF);   // carry out of rounding
    check(32'h7F00_0000, 32'h7F00_0000);   // overflow
    check(32'h0100_0000, 32'h0100_0000);   // underflow flushed
    check(32'h3F80_0001, 32'h3F7F_FFFF);   // rounding
    for (int i = 0; i < 20000; i++) check(rand_f32(40), rand_f32(40));
    for (int i = 0; i < 2000; i++) check(rand_f32(126), rand_f32(126));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

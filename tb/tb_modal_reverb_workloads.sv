// tb_modal_reverb_workloads: runs the reverberator at the sizes of two
// more published FPGA builds besides the default one: 12,000 modes with
// 24-sample buffers, and 45,000 modes with 80-sample buffers, both at
// 2,560 clock cycles per sample. For each, every output sample of the
// first kernel runs is compared with a reference model and every run must
// finish within its buffer period (about 78% and 88% of it).
module tb_modal_reverb_workloads;
  bit fin_a, fin_b;
  int chk_a, chk_b, fail_a, fail_b;

  reverb_harness #(.MAXM(12000), .B(24), .CPS(2560), .FRAMES(4), .FIRST_MODES(12000),
                   .WATCHDOG(600000)) build_a (.finished(fin_a), .checks(chk_a), .failures(fail_a));
  reverb_harness #(.MAXM(45000), .B(80), .CPS(2560), .FRAMES(4), .FIRST_MODES(45000),
                   .WATCHDOG(1500000)) build_b (.finished(fin_b), .checks(chk_b), .failures(fail_b));

  initial begin
    wait (fin_a && fin_b);
    $display("TB_RESULT checks=%0d failures=%0d", chk_a + chk_b, fail_a + fail_b);
    $finish;
  end
endmodule

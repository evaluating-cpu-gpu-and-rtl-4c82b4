// tb_state_ram: writes random states to random addresses, reads them back
// with one cycle of read latency, and checks that a read and a write to
// the same address in one cycle return the old word.
module tb_state_ram;
  import modal_pkg::*;

  localparam int DEPTH = 300;
  logic clk = 0, rd_en = 0, wr_en = 0;
  logic [8:0] rd_addr = 0, wr_addr = 0;
  mode_state_t rd_data, wr_data;
  mode_state_t shadow [DEPTH];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  state_ram #(.DEPTH(DEPTH)) dut (.*);

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    wr_data = '0;
    // fill
    for (int a = 0; a < DEPTH; a++) begin
      @(negedge clk);
      wr_en = 1; wr_addr = 9'(a); wr_data = {$urandom, $urandom};
      shadow[a] = wr_data;
    end
    @(negedge clk) wr_en = 0;
    // random reads and writes
    for (int i = 0; i < 3000; i++) begin
      mode_state_t exp_rd;
      @(negedge clk);
      rd_en   = 1;
      rd_addr = 9'($urandom_range(DEPTH - 1, 0));
      wr_en   = ($urandom_range(1, 0) == 1);
      wr_addr = (i % 7 == 0) ? rd_addr : 9'($urandom_range(DEPTH - 1, 0));
      wr_data = {$urandom, $urandom};
      exp_rd  = shadow[rd_addr];
      @(posedge clk);
      #1;
      if (wr_en) shadow[wr_addr] = wr_data;
      checks++;
      if (rd_data !== exp_rd) begin
        failures++;
        if (failures < 10) $display("read %0d: got %h expected %h", rd_addr, rd_data, exp_rd);
      end
    end
    // rd_en low holds the output
    @(negedge clk) begin rd_en = 0; wr_en = 0; rd_addr = 9'd0; end
    begin
      mode_state_t held;
      held = rd_data;
      repeat (3) @(posedge clk);
      #1 checks++;
      if (rd_data !== held) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

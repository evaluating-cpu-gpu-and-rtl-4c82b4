// modal_reverb_top: real-time modal plate reverberator.
//
// A reverberating plate is modelled as MAX_MODES independent damped
// oscillators. Dry audio is projected onto every mode (weight c3), each
// mode rings according to its own two-pole recursion (c1, c2), and the
// wet output is the weighted sum of all modes (weight w = modes_out).
// The coefficients are computed by the host processor and read from
// external memory over AXI4; the mode states are kept on chip.
//
// Structure:
//   sample_tick  - 48 kHz strobe from the 122.88 MHz clock (2560 cycles)
//   frame_buffer - collects BUFFER input samples, hands them to the
//                  kernel, plays the previous result back, detects
//                  missed deadlines
//   modal_kernel - coef_fetch + state_ram + BUFFER chained mode_stage
//                  units built from fp32_mul / fp32_add
// The sizes (30,000 modes, buffers of 64 samples, 2560 cycles per sample)
// are those of a mid-size Zynq-7020 configuration of the design this
// processor reproduces. The audio stream ports (float samples, a strobe)
// stand in for the codec interface, which is outside this design.
//
// Interface:
//   audio_in is sampled and audio_out advances on each sample_strobe
//   pulse; the output lags the input by two buffers (2*BUFFER samples).
//   num_modes and coef_base are read at the start of every buffer.
//   ready goes high when the state memory has been cleared after reset;
//   the sample strobe runs from then on.
//   overrun_count counts buffers dropped because the kernel had not
//   finished (each one plays a buffer of silence); buffer_done pulses when
//   a kernel run ends and kernel_cycles is the
//   length of the last kernel run, to compare with the budget of
//   BUFFER*CLK_PER_SAMPLE cycles. coef_resp_err is set when external
//   memory returned an error response during the last run.
module modal_reverb_top
  import modal_pkg::*;
#(
  parameter int unsigned MAX_MODES       = 30000,
  parameter int unsigned BUFFER          = 64,
  parameter int unsigned CLK_PER_SAMPLE  = 2560,
  parameter int unsigned ADDR_W          = 32,
  parameter int unsigned MAX_OUTSTANDING = 4,
  parameter int unsigned IDX_W           = (MAX_MODES > 1) ? $clog2(MAX_MODES) : 1
) (
  input  logic              clk,
  input  logic              rst_n,
  // configuration from the host
  input  logic [IDX_W:0]    num_modes,
  input  logic [ADDR_W-1:0] coef_base,
  // audio stream
  output logic              sample_strobe,
  input  fp32_t             audio_in,
  output fp32_t             audio_out,
  // status
  output logic              ready,
  output logic              kernel_busy,
  output logic              buffer_done,
  output logic [15:0]       overrun_count,
  output logic [31:0]       kernel_cycles,
  output logic              coef_resp_err,
  // AXI4 read channels to external memory
  output logic              m_axi_arvalid,
  input  logic              m_axi_arready,
  output logic [ADDR_W-1:0] m_axi_araddr,
  output logic [7:0]        m_axi_arlen,
  output logic [2:0]        m_axi_arsize,
  output logic [1:0]        m_axi_arburst,
  input  logic              m_axi_rvalid,
  output logic              m_axi_rready,
  input  logic [31:0]       m_axi_rdata,
  input  logic [1:0]        m_axi_rresp,
  input  logic              m_axi_rlast
);

  fp32_t x_frame [BUFFER];
  fp32_t y_frame [BUFFER];
  logic  kernel_start, overrun;

  sample_tick #(.CLK_PER_SAMPLE(CLK_PER_SAMPLE)) u_tick (
    .clk, .rst_n, .enable(ready), .tick(sample_strobe)
  );

  frame_buffer #(.BUFFER(BUFFER)) u_frames (
    .clk, .rst_n,
    .tick(sample_strobe), .audio_in, .audio_out,
    .x_frame, .y_frame,
    .kernel_busy, .kernel_start, .overrun
  );

  modal_kernel #(
    .MAX_MODES(MAX_MODES), .BUFFER(BUFFER), .ADDR_W(ADDR_W),
    .MAX_OUTSTANDING(MAX_OUTSTANDING), .IDX_W(IDX_W)
  ) u_kernel (
    .clk, .rst_n,
    .start(kernel_start), .num_modes, .coef_base,
    .x_frame, .y_frame,
    .ready, .busy(kernel_busy), .done(buffer_done),
    .cycles(kernel_cycles), .resp_err(coef_resp_err),
    .m_axi_arvalid, .m_axi_arready, .m_axi_araddr, .m_axi_arlen,
    .m_axi_arsize, .m_axi_arburst,
    .m_axi_rvalid, .m_axi_rready, .m_axi_rdata, .m_axi_rresp, .m_axi_rlast
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)       overrun_count <= '0;
    else if (overrun && overrun_count != 16'hFFFF)
                      overrun_count <= overrun_count + 1'b1;
  end

  // Each kernel run that was started must end before the buffer after it
  // is complete, or the frame buffer records an overrun instead.
  a_start_when_idle: assert property (@(posedge clk) disable iff (!rst_n)
    kernel_start |-> !kernel_busy);

endmodule

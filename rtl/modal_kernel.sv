// modal_kernel: the modal synthesis engine. Runs a bank of up to MAX_MODES
// damped oscillators (one per plate mode) over one buffer of BUFFER input
// samples and produces the BUFFER output samples.
//
// Algorithm (loop-swapped form): for each mode m in turn,
//     for n in 0..BUFFER-1:
//         uNext   = c1[m]*u[m] + c2[m]*uPrev[m] + c3[m]*x[n]
//         y[n]   += w[m]*uNext
//         uPrev[m] = u[m];  u[m] = uNext
// The outer loop over modes is pipelined and the inner loop over samples
// is unrolled into a chain of BUFFER mode_stage instances, so all samples
// of the buffer are worked on at once, each stage for a different mode.
// Per-mode coefficients stream in from external memory through
// coef_fetch (one burst per mode); the state (u, uPrev) of every mode is
// kept in state_ram. A mode's state is read when its coefficients arrive,
// travels down the chain with it, and is written back when the mode leaves
// the last stage. Output sample n accumulates in stage n.
// This structure (loop inversion, pipelined mode loop, unrolled sample
// loop, coefficients from external memory, state on chip, float
// arithmetic) follows the design this processor reproduces. The control
// FSM, the state clearing after reset and the handshakes are this
// design's own.
//
// Operation: after reset the kernel first writes zero to every state word
// (MAX_MODES cycles, `ready` low). Then a `start` pulse, with x_frame
// stable, runs one buffer: `busy` is high until the last mode has been
// written back, then `done` pulses and y_frame holds the result until the
// next start. `cycles` reports the length of the last run, start to done.
// A run takes about 4*num_modes + memory latency + BUFFER cycles when
// memory answers at full rate. num_modes above MAX_MODES is clipped.
module modal_kernel
  import modal_pkg::*;
#(
  parameter int unsigned MAX_MODES       = 30000,
  parameter int unsigned BUFFER          = 64,
  parameter int unsigned ADDR_W          = 32,
  parameter int unsigned MAX_OUTSTANDING = 4,
  parameter int unsigned IDX_W           = (MAX_MODES > 1) ? $clog2(MAX_MODES) : 1
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              start,
  input  logic [IDX_W:0]    num_modes,
  input  logic [ADDR_W-1:0] coef_base,
  input  fp32_t             x_frame [BUFFER],
  output fp32_t             y_frame [BUFFER],
  output logic              ready,
  output logic              busy,
  output logic              done,
  output logic [31:0]       cycles,
  output logic              resp_err,
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

  typedef enum logic [1:0] {S_INIT, S_IDLE, S_RUN} state_e;
  state_e st;

  logic [IDX_W-1:0] init_addr;
  logic [IDX_W:0]   n_modes, wb_cnt;
  logic [31:0]      cyc;
  logic             go;

  // coefficient stream
  logic             rec_valid;
  logic [IDX_W-1:0] rec_idx;
  mode_coef_t       rec_coef;
  logic             fetch_busy;

  // stage chain; element n feeds stage n, element BUFFER leaves the chain
  logic             c_valid [BUFFER+1];
  logic [IDX_W-1:0] c_idx   [BUFFER+1];
  mode_coef_t       c_coef  [BUFFER+1];
  mode_state_t      c_state [BUFFER+1];

  // state memory ports
  mode_state_t      rd_data, wr_data;
  logic             wr_en;
  logic [IDX_W-1:0] wr_addr;

  assign go    = (st == S_IDLE) && start;
  assign ready = (st != S_INIT);
  assign busy  = (st == S_RUN);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st        <= S_INIT;
      init_addr <= '0;
      n_modes   <= '0;
      wb_cnt    <= '0;
      cyc       <= '0;
      cycles    <= '0;
      done      <= 1'b0;
    end else begin
      done <= 1'b0;
      unique case (st)
        S_INIT: begin
          init_addr <= init_addr + 1'b1;
          if (init_addr == IDX_W'(MAX_MODES - 1)) st <= S_IDLE;
        end
        S_IDLE: begin
          if (start) begin
            st      <= S_RUN;
            n_modes <= (num_modes > (IDX_W+1)'(MAX_MODES)) ? (IDX_W+1)'(MAX_MODES) : num_modes;
            wb_cnt  <= '0;
            cyc     <= 32'd1;
          end
        end
        S_RUN: begin
          cyc <= cyc + 1'b1;
          if (c_valid[BUFFER]) wb_cnt <= wb_cnt + 1'b1;
          if (wb_cnt == n_modes && !fetch_busy) begin
            st     <= S_IDLE;
            done   <= 1'b1;
            cycles <= cyc;
          end
        end
        default: st <= S_INIT;
      endcase
    end
  end

  coef_fetch #(
    .MAX_MODES(MAX_MODES), .ADDR_W(ADDR_W),
    .MAX_OUTSTANDING(MAX_OUTSTANDING), .IDX_W(IDX_W)
  ) u_fetch (
    .clk, .rst_n,
    .start(go),
    .num_modes((num_modes > (IDX_W+1)'(MAX_MODES)) ? (IDX_W+1)'(MAX_MODES) : num_modes),
    .base_addr(coef_base),
    .busy(fetch_busy), .done(), .resp_err,
    .rec_valid, .rec_idx, .rec_coef,
    .m_axi_arvalid, .m_axi_arready, .m_axi_araddr, .m_axi_arlen,
    .m_axi_arsize, .m_axi_arburst,
    .m_axi_rvalid, .m_axi_rready, .m_axi_rdata, .m_axi_rresp, .m_axi_rlast
  );

  // The record waits one cycle beside the state read it started.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) c_valid[0] <= 1'b0;
    else        c_valid[0] <= rec_valid;
  end
  always_ff @(posedge clk) begin
    if (rec_valid) begin
      c_idx[0]  <= rec_idx;
      c_coef[0] <= rec_coef;
    end
  end
  assign c_state[0] = rd_data;

  assign wr_en   = (st == S_INIT) || c_valid[BUFFER];
  assign wr_addr = (st == S_INIT) ? init_addr : c_idx[BUFFER];
  assign wr_data = (st == S_INIT) ? '0 : c_state[BUFFER];

  state_ram #(.DEPTH(MAX_MODES), .ADDR_W(IDX_W)) u_state (
    .clk,
    .rd_en(rec_valid), .rd_addr(rec_idx), .rd_data,
    .wr_en, .wr_addr, .wr_data
  );

  for (genvar n = 0; n < BUFFER; n++) begin : g_stage
    mode_stage #(.IDX_W(IDX_W)) u_stage (
      .clk, .rst_n,
      .clear(go),
      .x(x_frame[n]),
      .in_valid(c_valid[n]), .in_idx(c_idx[n]),
      .in_coef(c_coef[n]),   .in_state(c_state[n]),
      .out_valid(c_valid[n+1]), .out_idx(c_idx[n+1]),
      .out_coef(c_coef[n+1]),   .out_state(c_state[n+1]),
      .acc(y_frame[n])
    );
  end

  // The run ends only after every fetched mode has been written back.
  a_wb_bound: assert property (@(posedge clk) disable iff (!rst_n)
    busy |-> wb_cnt <= n_modes);
  // A start is only honoured while idle; one that arrives during a run is
  // a protocol error of the caller.
  a_start_idle: assert property (@(posedge clk) disable iff (!rst_n)
    start |-> st == S_IDLE);

endmodule

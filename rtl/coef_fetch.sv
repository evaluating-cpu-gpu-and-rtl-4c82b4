// coef_fetch: AXI4 read master that streams per-mode coefficients from
// external memory.
//
// The coefficient table is computed by the host processor and stored in
// external memory interleaved per mode: c1, c2, c3, modes_out, one 32-bit
// float each, so mode m occupies the 16 bytes at base + 16*m. For each
// mode the fetcher issues one INCR burst of four 32-bit beats (ARLEN = 3,
// ARSIZE = 4 bytes), and assembles the four beats into one mode record.
// The single burst per mode and the interleaving follow the design this
// processor reproduces; the 32-bit data width, the number of bursts kept
// in flight (MAX_OUTSTANDING) and the handshake details are this design's
// own choices. All bursts use one ID, so they return in order and the
// records come out in mode order.
//
// Interface: a `start` pulse with num_modes and base_addr latches a run;
// `busy` stays high until the last record has been delivered, then `done`
// pulses. Records appear on rec_valid/rec_idx/rec_coef one clock after the
// last beat of their burst. RREADY is held high: the consumer (the mode
// pipeline) accepts one record per cycle, more than a 4-beat burst can
// deliver. A non-OKAY RRESP sets the sticky `resp_err` flag (cleared by
// the next start); the data is used as it is.
// Throughput: one mode per four cycles when memory answers at full rate.
module coef_fetch
  import modal_pkg::*;
#(
  parameter int unsigned MAX_MODES       = 30000,
  parameter int unsigned ADDR_W          = 32,
  parameter int unsigned MAX_OUTSTANDING = 4,
  parameter int unsigned IDX_W           = (MAX_MODES > 1) ? $clog2(MAX_MODES) : 1
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              start,
  input  logic [IDX_W:0]    num_modes,
  input  logic [ADDR_W-1:0] base_addr,
  output logic              busy,
  output logic              done,
  output logic              resp_err,
  // mode record stream
  output logic              rec_valid,
  output logic [IDX_W-1:0]  rec_idx,
  output mode_coef_t        rec_coef,
  // AXI4 read address channel
  output logic              m_axi_arvalid,
  input  logic              m_axi_arready,
  output logic [ADDR_W-1:0] m_axi_araddr,
  output logic [7:0]        m_axi_arlen,
  output logic [2:0]        m_axi_arsize,
  output logic [1:0]        m_axi_arburst,
  // AXI4 read data channel
  input  logic              m_axi_rvalid,
  output logic              m_axi_rready,
  input  logic [31:0]       m_axi_rdata,
  input  logic [1:0]        m_axi_rresp,
  input  logic              m_axi_rlast
);

  localparam int unsigned OUT_W = $clog2(MAX_OUTSTANDING + 1);

  logic [IDX_W:0]    n_modes;     // modes in this run
  logic [IDX_W:0]    ar_cnt;      // bursts requested
  logic [IDX_W:0]    rx_cnt;      // records completed
  logic [OUT_W-1:0]  in_flight;   // bursts requested, not yet complete
  logic [ADDR_W-1:0] base;
  logic [1:0]        beat;
  logic [95:0]       words;       // c1, c2, c3 of the burst in progress

  logic ar_hs, r_hs, last_beat;

  assign m_axi_arlen   = 8'(COEF_WORDS - 1);
  assign m_axi_arsize  = 3'd2;
  assign m_axi_arburst = 2'b01;
  assign m_axi_rready  = 1'b1;

  // ARVALID depends only on counters that cannot make it fall before the
  // handshake (in_flight only drops while the request waits).
  assign m_axi_arvalid = busy && (ar_cnt < n_modes) &&
                         (in_flight < OUT_W'(MAX_OUTSTANDING));
  assign m_axi_araddr  = base + ADDR_W'(ar_cnt) * ADDR_W'(COEF_BYTES);

  assign ar_hs     = m_axi_arvalid && m_axi_arready;
  assign r_hs      = m_axi_rvalid && m_axi_rready;
  assign last_beat = r_hs && (beat == 2'(COEF_WORDS - 1));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy      <= 1'b0;
      done      <= 1'b0;
      resp_err  <= 1'b0;
      n_modes   <= '0;
      base      <= '0;
      ar_cnt    <= '0;
      rx_cnt    <= '0;
      in_flight <= '0;
      beat      <= '0;
      rec_valid <= 1'b0;
    end else begin
      done      <= 1'b0;
      rec_valid <= 1'b0;
      if (!busy) begin
        if (start) begin
          busy      <= 1'b1;
          resp_err  <= 1'b0;
          n_modes   <= num_modes;
          base      <= base_addr;
          ar_cnt    <= '0;
          rx_cnt    <= '0;
          in_flight <= '0;
          beat      <= '0;
        end
      end else begin
        if (ar_hs) ar_cnt <= ar_cnt + 1'b1;
        in_flight <= in_flight + OUT_W'(ar_hs) - OUT_W'(last_beat);
        if (r_hs) begin
          beat <= beat + 1'b1;
          if (m_axi_rresp != 2'b00) resp_err <= 1'b1;
        end
        if (last_beat) begin
          rec_valid <= 1'b1;
          rx_cnt    <= rx_cnt + 1'b1;
        end
        if (rx_cnt == n_modes) begin
          busy <= 1'b0;
          done <= 1'b1;
        end
      end
    end
  end

  always_ff @(posedge clk) begin
    if (r_hs && !last_beat) words <= {words[63:0], m_axi_rdata};
    if (last_beat) begin
      rec_idx  <= rx_cnt[IDX_W-1:0];
      rec_coef <= {words, m_axi_rdata};
    end
  end

  // A request, once raised, holds its address until it is accepted.
  a_ar_stable: assert property (@(posedge clk) disable iff (!rst_n)
    m_axi_arvalid && !m_axi_arready |=> m_axi_arvalid && $stable(m_axi_araddr));
  // RLAST marks the fourth beat of every burst.
  a_rlast: assert property (@(posedge clk) disable iff (!rst_n)
    r_hs |-> (m_axi_rlast == (beat == 2'(COEF_WORDS - 1))));
  // No data arrives without a burst outstanding.
  a_no_spurious: assert property (@(posedge clk) disable iff (!rst_n)
    r_hs |-> busy && in_flight != '0);

endmodule

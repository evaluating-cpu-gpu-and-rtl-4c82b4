// mode_stage: one unrolled time step of the modal update for one mode.
//
// The processor runs the loop-swapped form of the modal algorithm: modes
// are taken one after another, and each mode is advanced through a whole
// buffer of time steps before the next one. The time loop is unrolled
// into BUFFER copies of this stage, chained, so that stage n holds the
// n-th sample of the buffer. A mode record enters with its coefficients
// and its state (u[n], u[n-1]); the stage computes
//     uNext = (c1*u + c2*uPrev) + c3*x        (x = input sample n)
//     acc   = acc + uNext*w                    (output sample n)
// and passes the record on with the state shifted (u <- uNext,
// uPrev <- u). The order of the float operations is the order of the C
// code the design was derived from, so results agree bit for bit with a
// sequential float evaluation.
//
// Timing: the update is combinational inside the stage and the outgoing
// record and the accumulator are registered, so a stage accepts one mode
// per clock and adds one cycle of latency. `clear` zeroes the accumulator
// (start of a buffer); it takes priority over a valid record. Splitting
// the float operators over several cycles, as a production design at
// 122.88 MHz would, is left out here: it would only add latency, since
// the mode fetch gives a new mode at most every fourth cycle.
module mode_stage
  import modal_pkg::*;
#(
  parameter int unsigned IDX_W = 15
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              clear,
  input  fp32_t             x,
  input  logic              in_valid,
  input  logic [IDX_W-1:0]  in_idx,
  input  mode_coef_t        in_coef,
  input  mode_state_t       in_state,
  output logic              out_valid,
  output logic [IDX_W-1:0]  out_idx,
  output mode_coef_t        out_coef,
  output mode_state_t       out_state,
  output fp32_t             acc
);

  fp32_t p_u, p_up, p_x, s_uu, u_next, p_w, acc_next;

  fp32_mul m_u  (.a(in_coef.c1), .b(in_state.u),  .y(p_u));
  fp32_mul m_up (.a(in_coef.c2), .b(in_state.up), .y(p_up));
  fp32_mul m_x  (.a(in_coef.c3), .b(x),           .y(p_x));
  fp32_add a_uu (.a(p_u),  .b(p_up), .y(s_uu));
  fp32_add a_un (.a(s_uu), .b(p_x),  .y(u_next));
  fp32_mul m_w  (.a(u_next), .b(in_coef.w), .y(p_w));
  fp32_add a_ac (.a(acc),  .b(p_w),  .y(acc_next));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      acc       <= FP32_ZERO;
    end else begin
      out_valid <= in_valid & ~clear;
      if (clear) acc <= FP32_ZERO;
      else if (in_valid) acc <= acc_next;
    end
  end

  // The record itself needs no reset: it is only looked at when valid.
  always_ff @(posedge clk) begin
    if (in_valid) begin
      out_idx        <= in_idx;
      out_coef       <= in_coef;
      out_state.u    <= u_next;
      out_state.up   <= in_state.u;
    end
  end

endmodule

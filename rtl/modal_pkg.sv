// modal_pkg: types shared by the modal reverberation processor.
//
// Every arithmetic value in the datapath is an IEEE-754 single-precision
// number (the processor computes in float, like the C++ it was derived
// from). A mode is described by four coefficients, stored interleaved in
// external memory in the order c1, c2, c3, modes_out, and by two state
// values, u[n] and u[n-1]. The record that travels down the unrolled
// pipeline carries both, plus the mode's index so that the state can be
// written back when the record leaves the last stage.
package modal_pkg;

  typedef logic [31:0] fp32_t;

  localparam fp32_t FP32_ZERO = 32'h0000_0000;

  // Number of 32-bit words per mode in the interleaved coefficient table.
  localparam int unsigned COEF_WORDS = 4;
  // Bytes per mode in that table.
  localparam int unsigned COEF_BYTES = COEF_WORDS * 4;

  // Coefficients of one mode (Equation 8 and 9): u[n+1] = c1*u[n] +
  // c2*u[n-1] + c3*f[n]; contribution to the output = w*u[n+1].
  typedef struct packed {
    fp32_t c1;
    fp32_t c2;
    fp32_t c3;
    fp32_t w;
  } mode_coef_t;

  // State of one mode: u = u[n], up = u[n-1].
  typedef struct packed {
    fp32_t u;
    fp32_t up;
  } mode_state_t;

endpackage

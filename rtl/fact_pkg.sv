// fact_pkg: widths and the controller state type shared by the factorial unit.
// The operand width is that of the 16x16 Vedic multiplier the unit is built
// around; the running product is the multiplier's full 32-bit result.
package fact_pkg;
  localparam int unsigned N_W = 16;        // width of n and of the up counter
  localparam int unsigned P_W = 2 * N_W;   // width of the running product

  // IDLE: waiting for start. RUN: one multiplication per clock.
  // FIN: the product (or the overflow) is handed to the output register.
  typedef enum logic [1:0] {
    ST_IDLE = 2'd0,
    ST_RUN  = 2'd1,
    ST_FIN  = 2'd2
  } fact_state_e;
endpackage

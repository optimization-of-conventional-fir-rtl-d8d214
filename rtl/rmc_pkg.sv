// rmc_pkg: types and default sizes shared by the reduced-multiplier
// concurrent (RMC) FIR filter.
//
// The filter evaluates a TAPS-tap FIR with symmetric coefficients
// (h[k] == h[TAPS-1-k]) using TAPS/2 multipliers, each used twice per output.
// A three-state controller sequences the two multiplier passes and the output
// load. The default sizes (12 taps, 8-bit input, 18-bit output) are those of
// the reference design; the 8-bit coefficient width is this design's choice.
package rmc_pkg;

  // Default sizes.
  localparam int unsigned TAPS_DEF   = 12;
  localparam int unsigned DATA_W_DEF = 8;
  localparam int unsigned COEF_W_DEF = 8;
  localparam int unsigned OUT_W_DEF  = 18;

  // Controller states, one clock each, visited in this order.
  //   ST_LOAD_ODD : the delay line holds the new input; the odd-numbered
  //                 registers (1,3,5..) are weighted, summed and put in the
  //                 accumulator.
  //   ST_EVEN     : the even-numbered registers (2,4,6..) go through the same
  //                 multipliers; their sum is added to the accumulator.
  //   ST_OUT      : the accumulator is copied to the output register, which
  //                 holds it until the next result; the accumulator is
  //                 cleared and the next input sample is taken.
  typedef enum logic [1:0] {
    ST_LOAD_ODD = 2'd0,
    ST_EVEN     = 2'd1,
    ST_OUT      = 2'd2
  } state_e;

  // Multiplexer select values.
  localparam logic SEL_ODD  = 1'b0;
  localparam logic SEL_EVEN = 1'b1;

endpackage

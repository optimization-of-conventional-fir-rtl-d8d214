// rmc_tap_mux: the bank of 2:1 multiplexers ("2X1" blocks on the SELECT line)
// that feed the shared multipliers of the RMC FIR filter.
//
// The coefficients are symmetric, h[k] == h[TAPS-1-k], so taps k and
// TAPS-1-k share one multiplier and one coefficient b_k. With TAPS even, one
// tap of each such pair sits in an odd-numbered register (1,3,5.. counting the
// newest sample as register 1) and the other in an even-numbered one.
// Multiplexer k therefore chooses between taps[k] and taps[TAPS-1-k]:
//   sel = SEL_ODD  : the member of the pair in an odd-numbered register
//                    (tap index even),
//   sel = SEL_EVEN : the member in an even-numbered register (tap index odd).
// Over the two passes every tap is used exactly once.
//
// Purely combinational. The odd/even split and the symmetric pairing follow
// the reference design; how a multiplexer's two inputs map onto the two
// passes is worked out here from those two rules.
module rmc_tap_mux #(
  parameter int unsigned TAPS   = rmc_pkg::TAPS_DEF,
  parameter int unsigned DATA_W = rmc_pkg::DATA_W_DEF
) (
  input  logic                     sel,
  input  logic signed [DATA_W-1:0] taps     [TAPS],
  output logic signed [DATA_W-1:0] operands [TAPS/2]
);

  localparam int unsigned NMUL = TAPS / 2;

  // TAPS must be even for the two passes to cover the taps exactly.
  if (TAPS % 2 != 0) begin : g_taps_odd
    $error("rmc_tap_mux: TAPS must be even");
  end

  for (genvar k = 0; k < NMUL; k++) begin : g_mux
    // Tap index of each member of pair k in an odd-numbered register
    // (even tap index) and in an even-numbered register (odd tap index).
    localparam int unsigned ODD_REG_TAP  = (k % 2 == 0) ? k : TAPS - 1 - k;
    localparam int unsigned EVEN_REG_TAP = (k % 2 == 0) ? TAPS - 1 - k : k;
    assign operands[k] = (sel == rmc_pkg::SEL_EVEN) ? taps[EVEN_REG_TAP]
                                                    : taps[ODD_REG_TAP];
  end

endmodule

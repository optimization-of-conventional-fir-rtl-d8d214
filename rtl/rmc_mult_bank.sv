// rmc_mult_bank: the shared multipliers of the RMC FIR filter.
//
// NMUL signed multipliers working side by side: products[k] =
// operands[k] * coef[k], full precision (DATA_W + COEF_W bits). Coefficient
// b_k is wired to multiplier k for both passes; only the operand changes.
// With 12 taps there are 6 multipliers, half of what a fully parallel filter
// needs.
//
// Purely combinational (a single-cycle path, as in the reference design).
// Signed two's-complement arithmetic is this design's choice.
module rmc_mult_bank #(
  parameter int unsigned NMUL   = rmc_pkg::TAPS_DEF / 2,
  parameter int unsigned DATA_W = rmc_pkg::DATA_W_DEF,
  parameter int unsigned COEF_W = rmc_pkg::COEF_W_DEF
) (
  input  logic signed [DATA_W-1:0]        operands [NMUL],
  input  logic signed [COEF_W-1:0]        coef     [NMUL],
  output logic signed [DATA_W+COEF_W-1:0] products [NMUL]
);

  for (genvar k = 0; k < NMUL; k++) begin : g_mul
    assign products[k] = operands[k] * coef[k];
  end

endmodule

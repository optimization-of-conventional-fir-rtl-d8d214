// rmc_fir: reduced-multiplier concurrent (RMC) FIR filter, top level.
//
// Computes y(n) = sum_{k=0}^{TAPS-1} h[k] x(n-k) for a filter with symmetric
// coefficients, h[k] == h[TAPS-1-k], using only TAPS/2 multipliers. The
// input registers are split into an odd-numbered set (registers 1,3,5..,
// register 1 holding the newest sample) and an even-numbered set (2,4,6..).
// Because TAPS is even, each symmetric pair has one member in each set, so
// both sets see the same TAPS/2 coefficients b_k = h[k]. A 2:1 multiplexer per
// multiplier picks the odd set, then the even set; each time the products go
// through one adder tree into an accumulator; the total is loaded into the
// output register, which holds it until the next result.
//
//   delay line -> 2:1 muxes -> multipliers (x b_k) -> adder tree
//              -> accumulator -> output register
//   three-state controller: load+odd pass, even pass, load output
//
// Interface:
//   x_in     sampled at the rising edge that ends a cycle with x_take high
//            (every third clock);
//   coef[k]  coefficient b_k = h[k] = h[TAPS-1-k], signed, held steady;
//   y_op     signed result, updated every third clock and held in between;
//   y_valid  high for the cycle after each update.
// Timing: the result for the window ending with a sample taken at edge t
// is in y_op after edge t+3 (the same edge that takes the next sample).
// The first y_valid after reset carries the result for an all-zero history.
// Every pass is a single-cycle combinational path (mux, multiplier, adder
// tree, accumulator adder).
//
// The structure, the multiplier count, the three-state control and the
// 8-bit input / 18-bit output follow the reference design. The coefficient
// width, signed arithmetic, coefficients as input ports, the x_take/y_valid
// strobes and the reset are this design's choices.
module rmc_fir #(
  parameter int unsigned TAPS   = rmc_pkg::TAPS_DEF,
  parameter int unsigned DATA_W = rmc_pkg::DATA_W_DEF,
  parameter int unsigned COEF_W = rmc_pkg::COEF_W_DEF,
  parameter int unsigned OUT_W  = rmc_pkg::OUT_W_DEF
) (
  input  logic                     clk,
  input  logic                     rst,
  input  logic signed [DATA_W-1:0] x_in,
  input  logic signed [COEF_W-1:0] coef [TAPS/2],
  output logic                     x_take,
  output logic signed [OUT_W-1:0]  y_op,
  output logic                     y_valid
);

  localparam int unsigned NMUL   = TAPS / 2;
  localparam int unsigned PROD_W = DATA_W + COEF_W;
  localparam int unsigned TREE_W = PROD_W + $clog2(NMUL);

  logic sel, acc_en, out_load, shift;

  logic signed [DATA_W-1:0] taps     [TAPS];
  logic signed [DATA_W-1:0] operands [NMUL];
  logic signed [PROD_W-1:0] products [NMUL];
  logic signed [TREE_W-1:0] tree_sum;

  rmc_fsm u_fsm (
    .clk, .rst, .sel, .acc_en, .out_load, .shift
  );

  rmc_delay_line #(.TAPS(TAPS), .DATA_W(DATA_W)) u_delay (
    .clk, .rst, .shift, .x_in, .taps
  );

  rmc_tap_mux #(.TAPS(TAPS), .DATA_W(DATA_W)) u_mux (
    .sel, .taps, .operands
  );

  rmc_mult_bank #(.NMUL(NMUL), .DATA_W(DATA_W), .COEF_W(COEF_W)) u_mult (
    .operands, .coef, .products
  );

  rmc_adder_tree #(.N(NMUL), .IN_W(PROD_W)) u_tree (
    .in_vals(products), .sum(tree_sum)
  );

  rmc_accumulator #(.IN_W(TREE_W), .OUT_W(OUT_W)) u_acc (
    .clk, .rst, .acc_en, .out_load, .partial(tree_sum), .y(y_op), .y_valid
  );

  assign x_take = shift;

endmodule

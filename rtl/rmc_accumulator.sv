// rmc_accumulator: the accumulator ("MAC" with its feedback) and the output
// register of the RMC FIR filter.
//
// acc_en    : acc <= acc + partial (the odd pass, then the even pass).
// out_load  : y <= acc, and acc <= 0 ready for the next output. y then holds
//             its value until the next out_load. y_valid is high for the one
//             cycle after each load.
// The accumulator is IN_W+1 bits, which holds the sum of two partial sums
// exactly. y is its low OUT_W bits (sign-extended if OUT_W is wider), so a
// result outside the OUT_W-bit signed range wraps; with 8-bit samples and
// 8-bit coefficients a 12-tap result needs at most 20 bits, so coefficient
// sets whose absolute sum stays below 1024 always fit in the 18-bit output.
// If acc_en and out_load are both high, out_load wins.
//
// Timing: all updates at the rising clock edge; synchronous active-high
// reset clears acc, y and y_valid. Load-and-hold and clearing on load follow
// the reference controller; the widths and the reset are this design's.
module rmc_accumulator #(
  parameter int unsigned IN_W  = rmc_pkg::DATA_W_DEF + rmc_pkg::COEF_W_DEF + 3,
  parameter int unsigned OUT_W = rmc_pkg::OUT_W_DEF
) (
  input  logic                   clk,
  input  logic                   rst,
  input  logic                   acc_en,
  input  logic                   out_load,
  input  logic signed [IN_W-1:0] partial,
  output logic signed [OUT_W-1:0] y,
  output logic                   y_valid
);

  localparam int unsigned ACC_W = IN_W + 1;

  logic signed [ACC_W-1:0] acc;

  always_ff @(posedge clk) begin
    if (rst) begin
      acc     <= '0;
      y       <= '0;
      y_valid <= 1'b0;
    end else begin
      y_valid <= out_load;
      if (out_load) begin
        y   <= OUT_W'(acc);
        acc <= '0;
      end else if (acc_en) begin
        acc <= acc + ACC_W'(partial);
      end
    end
  end

endmodule

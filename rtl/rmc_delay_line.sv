// rmc_delay_line: the chain of input sample registers ("Xt" in the data path)
// of the RMC FIR filter.
//
// TAPS registers of DATA_W bits. When shift is high, x_in enters taps[0] at
// the clock edge and every register passes its value one place down the
// chain; otherwise all registers hold. taps[i] is register i+1 in the
// numbering of the controller (register 1 is the newest sample), so taps[i]
// holds x(n-i) once sample x(n) has been shifted in.
//
// Timing: one clock edge per shift, outputs straight from the registers.
// Reset (synchronous, active high) clears the chain so the first outputs see
// zero history; the reset behaviour is this design's choice.
module rmc_delay_line #(
  parameter int unsigned TAPS   = rmc_pkg::TAPS_DEF,
  parameter int unsigned DATA_W = rmc_pkg::DATA_W_DEF
) (
  input  logic                     clk,
  input  logic                     rst,
  input  logic                     shift,
  input  logic signed [DATA_W-1:0] x_in,
  output logic signed [DATA_W-1:0] taps [TAPS]
);

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int i = 0; i < int'(TAPS); i++) taps[i] <= '0;
    end else if (shift) begin
      taps[0] <= x_in;
      for (int i = 1; i < int'(TAPS); i++) taps[i] <= taps[i-1];
    end
  end

endmodule

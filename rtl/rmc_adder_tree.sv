// rmc_adder_tree: combinational binary adder tree summing N signed values.
//
// Each level adds neighbouring pairs; an element left without a partner is
// passed to the next level unchanged. For N = 6 (the 12-tap filter) this is
// three adders on the first level, then one adder, then a last adder that
// takes the pair sum and the element passed through. The sum is
// IN_W + clog2(N) bits wide, enough that it cannot overflow.
//
// Purely combinational. The tree shape follows the reference data path; the
// widths are this design's choice.
module rmc_adder_tree #(
  parameter int unsigned N    = rmc_pkg::TAPS_DEF / 2,
  parameter int unsigned IN_W = rmc_pkg::DATA_W_DEF + rmc_pkg::COEF_W_DEF,
  localparam int unsigned LEVELS = (N > 1) ? $clog2(N) : 1,
  localparam int unsigned SUM_W  = IN_W + $clog2(N)
) (
  input  logic signed [IN_W-1:0]  in_vals [N],
  output logic signed [SUM_W-1:0] sum
);

  // Number of values left after level l.
  function automatic int unsigned count_at(int unsigned l);
    int unsigned c = N;
    for (int unsigned i = 0; i < l; i++) c = (c + 1) / 2;
    return c;
  endfunction

  logic signed [SUM_W-1:0] lvl [LEVELS+1][N];

  always_comb begin
    for (int unsigned l = 0; l <= LEVELS; l++)
      for (int unsigned i = 0; i < N; i++) lvl[l][i] = '0;
    for (int unsigned i = 0; i < N; i++) lvl[0][i] = SUM_W'(in_vals[i]);
    for (int unsigned l = 1; l <= LEVELS; l++) begin
      for (int unsigned i = 0; i < count_at(l); i++) begin
        if (2*i + 1 < count_at(l-1)) lvl[l][i] = lvl[l-1][2*i] + lvl[l-1][2*i+1];
        else                         lvl[l][i] = lvl[l-1][2*i];
      end
    end
  end

  assign sum = lvl[LEVELS][0];

endmodule

// rmc_fsm: the three-state controller of the RMC FIR filter.
//
// The states follow each other in a fixed ring, one clock each, whatever the
// number of taps:
//   ST_LOAD_ODD -> ST_EVEN -> ST_OUT -> ST_LOAD_ODD ...
// Control outputs (Moore, decoded from the state):
//   ST_LOAD_ODD : sel = SEL_ODD,  acc_en   (odd registers into accumulator)
//   ST_EVEN     : sel = SEL_EVEN, acc_en   (even registers added)
//   ST_OUT      : out_load (output register loads, accumulator clears) and
//                 shift (the next sample enters the delay line at the end of
//                 this cycle, so it is in place for the following
//                 ST_LOAD_ODD)
// One output is produced every three clocks. An assertion checks the order
// of the ring in simulation.
//
// The three states and their order follow the reference controller. Placing
// the delay-line load on the edge that enters ST_LOAD_ODD, so that the odd
// pass sees the new sample, and resetting into ST_OUT are this design's
// choices: after reset the first output carries the zero-history result.
module rmc_fsm (
  input  logic            clk,
  input  logic            rst,
  output logic            sel,
  output logic            acc_en,
  output logic            out_load,
  output logic            shift
);
  import rmc_pkg::*;

  state_e state_q, state_d;

  always_comb begin
    unique case (state_q)
      ST_LOAD_ODD: state_d = ST_EVEN;
      ST_EVEN:     state_d = ST_OUT;
      ST_OUT:      state_d = ST_LOAD_ODD;
      default:     state_d = ST_OUT;
    endcase
  end

  always_ff @(posedge clk) begin
    if (rst) state_q <= ST_OUT;
    else     state_q <= state_d;
  end

  assign sel      = (state_q == ST_EVEN) ? SEL_EVEN : SEL_ODD;
  assign acc_en   = (state_q == ST_LOAD_ODD) || (state_q == ST_EVEN);
  assign out_load = (state_q == ST_OUT);
  assign shift    = (state_q == ST_OUT);

  // Every output load is followed by the odd pass, the even pass and the
  // next output load, in that order.
  a_ring: assert property (@(posedge clk) disable iff (rst)
    out_load |=> (acc_en && sel == SEL_ODD) ##1 (acc_en && sel == SEL_EVEN) ##1 out_load);

endmodule

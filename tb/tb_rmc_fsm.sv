// tb_rmc_fsm: self-checking testbench for the three-state controller.
// After reset it checks, every clock, that the controller steps through
// output-load, load-and-odd, even, output-load, ... with one output load
// every 3 clocks, and that the select line, accumulate, output-load and
// shift strobes match the state: odd pass (sel odd, accumulate), even pass
// (sel even, accumulate), output (load, shift, no accumulate).
module tb_rmc_fsm;
  import rmc_pkg::*;
  logic clk = 1'b0, rst, sel, acc_en, out_load, shift;

  rmc_fsm dut (.clk, .rst, .sel, .acc_en, .out_load, .shift);

  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s", what); end
  endtask

  initial begin
    automatic int phase, last_load = -1;
    rst = 1'b1;
    repeat (2) @(negedge clk);
    rst = 1'b0;
    // Reset state is the output state; then odd, even, output, ...
    for (int c = 0; c < 300; c++) begin
      phase = c % 3;
      case (phase)
        0: chk(out_load && shift && !acc_en, $sformatf("cycle %0d: expected output state", c));
        1: chk(acc_en && sel == SEL_ODD && !out_load && !shift, $sformatf("cycle %0d: expected odd pass", c));
        2: chk(acc_en && sel == SEL_EVEN && !out_load && !shift, $sformatf("cycle %0d: expected even pass", c));
        default: ;
      endcase
      if (out_load) begin
        if (last_load >= 0) chk(c - last_load == 3, "output period");
        last_load = c;
      end
      @(negedge clk);
    end
    // Reset in mid-sequence returns to the output state.
    @(negedge clk);
    rst = 1'b1;
    @(negedge clk);
    rst = 1'b0;
    chk(out_load && shift, "reset state");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

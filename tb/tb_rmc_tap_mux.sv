// tb_rmc_tap_mux: self-checking testbench for the 2:1 multiplexer bank.
// For random register contents and both select values it checks that
// multiplier k receives the member of the symmetric pair {k, 11-k} that sits
// in an odd-numbered register (sel = odd) or an even-numbered one
// (sel = even), registers counted from 1 at the newest sample, and that the
// two passes together use every register exactly once.
module tb_rmc_tap_mux;
  import rmc_pkg::*;
  localparam int TAPS = 12, DATA_W = 8, NMUL = TAPS / 2;
  logic sel;
  logic signed [DATA_W-1:0] taps [TAPS];
  logic signed [DATA_W-1:0] operands [NMUL];

  rmc_tap_mux #(.TAPS(TAPS), .DATA_W(DATA_W)) dut (.sel, .taps, .operands);

  int checks = 0, failures = 0;

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s", what); end
  endtask

  initial begin
    int used [TAPS];
    for (int r = 0; r < 200; r++) begin
      // Distinct values so a picked operand identifies its register.
      for (int i = 0; i < TAPS; i++) taps[i] = DATA_W'(i * 17 + r);
      foreach (used[i]) used[i] = 0;
      for (int s = 0; s < 2; s++) begin
        sel = (s == 0) ? SEL_ODD : SEL_EVEN;
        #1;
        for (int k = 0; k < NMUL; k++) begin
          automatic int exp_reg = -1;
          for (int i = 0; i < TAPS; i++) begin
            automatic int reg_no = i + 1;
            automatic bit in_pair = (i == k) || (i == TAPS - 1 - k);
            automatic bit odd_reg = (reg_no % 2) == 1;
            if (in_pair && (odd_reg == (s == 0))) exp_reg = i;
          end
          chk(operands[k] == taps[exp_reg],
              $sformatf("sel=%0d mux %0d got %0d expected reg %0d", s, k, operands[k], exp_reg + 1));
          for (int i = 0; i < TAPS; i++) if (operands[k] == taps[i]) used[i]++;
        end
      end
      for (int i = 0; i < TAPS; i++) chk(used[i] == 1, $sformatf("register %0d used %0d times", i + 1, used[i]));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

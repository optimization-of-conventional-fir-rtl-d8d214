// tb_rmc_adder_tree: self-checking testbench for the adder tree. Two
// instances, N = 6 (the filter's size) and N = 5 (an odd count at the first
// level), get random signed inputs including all-extreme values; each sum is
// compared with an integer sum.
module tb_rmc_adder_tree;
  localparam int IN_W = 16;
  logic signed [IN_W-1:0] a6 [6];
  logic signed [IN_W-1:0] a5 [5];
  logic signed [IN_W+2:0] s6, s5;

  rmc_adder_tree #(.N(6), .IN_W(IN_W)) dut6 (.in_vals(a6), .sum(s6));
  rmc_adder_tree #(.N(5), .IN_W(IN_W)) dut5 (.in_vals(a5), .sum(s5));

  int checks = 0, failures = 0;

  initial begin
    for (int r = 0; r < 500; r++) begin
      automatic int e6 = 0, e5 = 0;
      for (int i = 0; i < 6; i++) begin
        a6[i] = (r == 0) ? -16'sd32768 : (r == 1) ? 16'sd32767 : IN_W'($urandom);
        e6 += int'(a6[i]);
      end
      for (int i = 0; i < 5; i++) begin
        a5[i] = (r == 0) ? -16'sd32768 : IN_W'($urandom);
        e5 += int'(a5[i]);
      end
      #1;
      checks += 2;
      if (int'(s6) != e6) begin failures++; if (failures < 10) $display("FAIL N=6 sum %0d expected %0d", s6, e6); end
      if (int'(s5) != e5) begin failures++; if (failures < 10) $display("FAIL N=5 sum %0d expected %0d", s5, e5); end
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

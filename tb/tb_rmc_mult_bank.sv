// tb_rmc_mult_bank: self-checking testbench for the six shared multipliers.
// Random signed operands and coefficients, including the extreme values,
// are applied; every product is compared with integer multiplication.
module tb_rmc_mult_bank;
  localparam int NMUL = 6, DATA_W = 8, COEF_W = 8;
  logic signed [DATA_W-1:0] operands [NMUL];
  logic signed [COEF_W-1:0] coef [NMUL];
  logic signed [DATA_W+COEF_W-1:0] products [NMUL];

  rmc_mult_bank #(.NMUL(NMUL), .DATA_W(DATA_W), .COEF_W(COEF_W)) dut (.operands, .coef, .products);

  int checks = 0, failures = 0;

  initial begin
    for (int r = 0; r < 500; r++) begin
      for (int k = 0; k < NMUL; k++) begin
        operands[k] = (r < 4) ? DATA_W'((r % 2 != 0) ? 127 : -128) : DATA_W'($urandom);
        coef[k]     = (r < 4) ? COEF_W'((r / 2 != 0) ? 127 : -128) : COEF_W'($urandom);
      end
      #1;
      for (int k = 0; k < NMUL; k++) begin
        automatic int e = int'(operands[k]) * int'(coef[k]);
        checks++;
        if (int'(products[k]) != e) begin
          failures++;
          if (failures < 10) $display("FAIL mult %0d: %0d * %0d = %0d", k, operands[k], coef[k], products[k]);
        end
      end
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

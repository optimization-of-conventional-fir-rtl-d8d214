// tb_rmc_accumulator: self-checking testbench for the accumulator and output
// register. Random sequences of accumulate, load-output and idle cycles with
// random partial sums are applied; after every clock the output, its valid
// pulse and (through the output at the next load) the accumulator are
// compared with a model: acc += partial on acc_en, y = low 18 bits of acc and
// acc = 0 on out_load, y held otherwise.
module tb_rmc_accumulator;
  localparam int IN_W = 19, OUT_W = 18;
  logic clk = 1'b0, rst, acc_en, out_load, y_valid;
  logic signed [IN_W-1:0] partial;
  logic signed [OUT_W-1:0] y;

  rmc_accumulator #(.IN_W(IN_W), .OUT_W(OUT_W)) dut (.clk, .rst, .acc_en, .out_load, .partial, .y, .y_valid);

  always #5 clk = ~clk;
  int checks = 0, failures = 0, n_load = 0, n_acc = 0;
  longint acc_m;
  logic signed [OUT_W-1:0] y_m;
  bit v_m;

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s", what); end
  endtask

  initial begin
    rst = 1'b1; acc_en = 1'b1; out_load = 1'b0; partial = 19'sd1000;
    repeat (2) @(negedge clk);
    acc_m = 0; y_m = '0; v_m = 0;
    chk(y == 0 && !y_valid, "reset");
    rst = 1'b0;
    repeat (2000) begin
      automatic int op = $urandom_range(3);
      acc_en   = (op != 0);
      out_load = (op == 3);
      partial  = IN_W'($urandom);
      @(posedge clk);
      v_m = out_load;
      if (out_load) begin y_m = OUT_W'(acc_m); acc_m = 0; n_load++; end
      else if (acc_en) begin acc_m += longint'(partial); acc_m = longint'(signed'(20'(acc_m))); n_acc++; end
      @(negedge clk);
      chk(y == y_m, $sformatf("y=%0d expected %0d", y, y_m));
      chk(y_valid == v_m, "y_valid");
    end
    chk(n_load > 0 && n_acc > 0, "coverage");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

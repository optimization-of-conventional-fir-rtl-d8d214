// tb_rmc_delay_line: self-checking testbench for the input sample chain.
// Random samples are shifted in with shift held high on random cycles; after
// every clock the 12 registers are compared with a queue model of the last
// 12 samples taken (zeros before the first), so both shifting and holding
// are checked. Reset clearing the chain is checked first.
module tb_rmc_delay_line;
  localparam int TAPS = 12, DATA_W = 8;
  logic clk = 1'b0, rst, shift;
  logic signed [DATA_W-1:0] x_in;
  logic signed [DATA_W-1:0] taps [TAPS];

  rmc_delay_line #(.TAPS(TAPS), .DATA_W(DATA_W)) dut (.clk, .rst, .shift, .x_in, .taps);

  always #5 clk = ~clk;
  int checks = 0, failures = 0, n_shift = 0, n_hold = 0;
  int model [TAPS];

  task automatic compare();
    for (int i = 0; i < TAPS; i++) begin
      checks++;
      if (int'(taps[i]) != model[i]) begin
        failures++;
        if (failures < 10) $display("FAIL tap %0d = %0d expected %0d", i, taps[i], model[i]);
      end
    end
  endtask

  initial begin
    rst = 1'b1; shift = 1'b1; x_in = 8'sd55;
    repeat (2) @(negedge clk);
    foreach (model[i]) model[i] = 0;
    compare();
    rst = 1'b0;
    repeat (400) begin
      shift = ($urandom_range(2) != 0);
      x_in  = DATA_W'($urandom);
      @(posedge clk);
      if (shift) begin
        for (int i = TAPS - 1; i > 0; i--) model[i] = model[i-1];
        model[0] = int'(x_in);
        n_shift++;
      end else n_hold++;
      @(negedge clk);
      compare();
    end
    checks++;
    if (n_shift == 0 || n_hold == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

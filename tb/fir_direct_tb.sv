// Self-checking testbench for fir_direct at its default size (9 taps,
// {5:11} samples, {2:14} coefficients, 47-bit output).
//
// The expected coefficients are derived here from the real-valued filter
// coefficients (times 2^14, rounded towards minus infinity), and the
// expected output from a 64-bit integer model of the convolution. It checks
// an impulse response, full-scale steps and random samples, with random
// gaps between samples so that the delay line must hold its contents, and
// that out_valid follows in_valid by exactly one clock.
module fir_direct_tb;

  localparam int NT = 9;
  localparam real CREAL [NT] = '{
    0.048455588950058, -0.001999671029421, 0.300730704615709,
   -0.064365833819427,  0.017947456292925, 0.315681787493831,
    0.478,              0.106223795893264, 0.021789901874715 };

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic in_valid = 1'b0;
  logic signed [15:0] in_sample = '0;
  logic out_valid;
  logic signed [46:0] out_sample;

  int checks = 0, failures = 0;
  longint coef [NT];
  longint hist [NT];          // hist[0] newest
  longint expected;

  fir_direct dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s", what);
    end
  endtask

  // watchdog
  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // output monitor: out_valid must be exactly in_valid delayed by one clock
  logic   exp_valid = 1'b0;
  longint exp_value = 0;
  always @(posedge clk) begin
    exp_valid <= rst_n & in_valid;
    exp_value <= expected;
  end
  always @(negedge clk) if (rst_n) begin
    check(out_valid == exp_valid, "out_valid not one clock after in_valid");
    if (exp_valid)
      check(longint'(out_sample) == exp_value,
            $sformatf("out %0d expected %0d", out_sample, exp_value));
  end

  task automatic send(input logic signed [15:0] x, input int gap);
    for (int k = NT - 1; k > 0; k--) hist[k] = hist[k-1];
    hist[0] = longint'(x);
    expected = 0;
    for (int k = 0; k < NT; k++) expected += coef[k] * hist[k];
    @(negedge clk);
    in_valid  = 1'b1;
    in_sample = x;
    @(negedge clk);
    in_valid  = 1'b0;
    in_sample = 16'($urandom);   // must be ignored
    repeat (gap) @(negedge clk);
  endtask

  initial begin
    for (int k = 0; k < NT; k++) begin
      coef[k] = longint'($floor(CREAL[k] * 16384.0));
      hist[k] = 0;
    end
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    repeat (2) @(negedge clk);
    // impulse of 1.0 ({5:11}: 2048): output walks through the coefficients
    send(16'sd2048, 0);
    for (int k = 0; k < NT + 2; k++) send(16'sd0, k % 3);
    // full-scale steps
    for (int k = 0; k < NT + 1; k++) send(16'sh7FFF, 0);
    for (int k = 0; k < NT + 1; k++) send(-16'sh8000, 1);
    // random samples with random gaps
    for (int k = 0; k < 400; k++) send(16'($urandom), $urandom_range(0, 4));
    repeat (3) @(negedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule

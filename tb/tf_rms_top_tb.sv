// End-to-end testbench for tf_rms_top at its default parameters.
//
// It reproduces the published simulation: a sine wave plus uniform random
// noise (variance 0.1) on a constant temperature level, sampled at
// Fs = 100 Hz and quantised to {5:11}, run for 1, 5, 15 and 30 Hz in turn.
// The level is 10.0 so that the sum stays inside the +/-16 range of the
// input format. Each segment is 2 s (200 samples). A fifth, shorter
// segment (5 Hz, level 0) follows so that negative filter outputs reach the
// squarers. Every filtered sample is
// compared with a 64-bit integer model of the 9-tap filter, every mean
// square with floor((y[n]^2 + y[n-1]^2)/2) and every RMS result r with
// r*r <= ms < (r+1)^2. Latencies are checked too: fir_valid 1 clock,
// ms_valid 2 clocks and rms_valid 50 clocks after sample_valid.
//
// Samples are spaced at random from the closest spacing busy allows up to
// a few dozen clocks more. Each mechanism is counted (filtering, mean
// square, square root, a negative filter output squared, a sample taken
// the first clock busy allows, each frequency segment) and one that never
// happened counts as a failure. The mean RMS of each segment is printed.
module tf_rms_top_tb;

  localparam int NT = 9;
  localparam int W  = 47;
  localparam real CREAL [NT] = '{
    0.048455588950058, -0.001999671029421, 0.300730704615709,
   -0.064365833819427,  0.017947456292925, 0.315681787493831,
    0.478,              0.106223795893264, 0.021789901874715 };
  localparam real FS    = 100.0;
  localparam real LEVEL = 10.0;
  localparam real AMP   = 1.0;
  localparam real NOISE_HALF = 0.5477225575;   // uniform, variance 0.1
  localparam int  NSEG  = 200;
  localparam real PI    = 3.14159265358979;
  localparam real FREQS [5] = '{1.0, 5.0, 15.0, 30.0, 5.0};
  localparam int  NSAMP [5] = '{NSEG, NSEG, NSEG, NSEG, 50};

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic sample_valid = 1'b0;
  logic signed [15:0] sample = '0;
  logic fir_valid, ms_valid, rms_valid, busy;
  logic signed [W-1:0] fir_out;
  logic [2*W-2:0] ms_out;
  logic [W-1:0] rms_out;

  int checks = 0, failures = 0;
  int n_fir = 0, n_ms = 0, n_rms = 0, n_neg = 0, n_tight = 0;
  int n_seg [5] = '{0, 0, 0, 0, 0};

  longint coef [NT];
  longint hist [NT];
  longint y_prev = 0, y_exp = 0, ms_exp = 0;

  tf_rms_top dut (.*);

  always #10 clk = ~clk;   // 50 MHz

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s", what);
    end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic signed [15:0] quantise(input real v);
    real q;
    q = $floor(v * 2048.0);
    if (q > 32767.0) q = 32767.0;
    if (q < -32768.0) q = -32768.0;
    return 16'(longint'(q));
  endfunction

  // one sample through the whole chain, checked stage by stage
  task automatic one_sample(input logic signed [15:0] x, output longint rms_val);
    logic [127:0] r, msw;
    int cycles;
    for (int k = NT - 1; k > 0; k--) hist[k] = hist[k-1];
    hist[0] = longint'(x);
    y_exp = 0;
    for (int k = 0; k < NT; k++) y_exp += coef[k] * hist[k];
    ms_exp = (y_exp * y_exp + y_prev * y_prev) >>> 1;
    y_prev = y_exp;

    @(negedge clk);
    check(busy == 1'b0, "busy between samples");
    sample_valid = 1'b1;
    sample       = x;
    @(negedge clk);
    sample_valid = 1'b0;
    sample       = 16'($urandom);
    check(fir_valid == 1'b1, "fir_valid not 1 clock after sample_valid");
    check(longint'(fir_out) == y_exp,
          $sformatf("fir_out %0d expected %0d", fir_out, y_exp));
    n_fir++;
    if (y_exp < 0) n_neg++;
    @(negedge clk);
    check(ms_valid == 1'b1, "ms_valid not 2 clocks after sample_valid");
    check(128'(ms_out) == 128'(ms_exp),
          $sformatf("ms_out %0d expected %0d", ms_out, ms_exp));
    n_ms++;
    cycles = 2;
    while (!rms_valid && cycles < 200) begin
      check(busy == 1'b1, "busy low during the root");
      @(negedge clk);
      cycles++;
    end
    check(cycles == W + 3, $sformatf("rms latency %0d expected %0d", cycles, W + 3));
    r   = 128'(rms_out);
    msw = 128'(ms_exp);
    check(r * r <= msw && msw < (r + 1) * (r + 1),
          $sformatf("rms %0d for ms %0d", rms_out, ms_exp));
    n_rms++;
    rms_val = longint'(rms_out);
  endtask

  initial begin
    real t, v, mean;
    longint rv;
    int gap;
    for (int k = 0; k < NT; k++) begin
      coef[k] = longint'($floor(CREAL[k] * 16384.0));
      hist[k] = 0;
    end
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    repeat (2) @(negedge clk);
    for (int f = 0; f < 5; f++) begin
      mean = 0.0;
      for (int n = 0; n < NSAMP[f]; n++) begin
        t = real'(f * NSEG + n) / FS;
        v = (f < 4 ? LEVEL : 0.0) + AMP * $sin(2.0 * PI * FREQS[f] * t)
          + NOISE_HALF * (2.0 * real'($urandom_range(0, 1000000)) / 1000000.0 - 1.0);
        one_sample(quantise(v), rv);
        mean += real'(rv) / 33554432.0;   // 2^25
        // wait for busy to drop, sometimes a few clocks more
        gap = ($urandom_range(0, 3) == 0) ? 0 : $urandom_range(1, 30);
        if (gap == 0) begin
          // the next sample goes in the first clock busy is low
          if (!busy) n_tight++;
        end else begin
          repeat (gap) @(negedge clk);
        end
      end
      n_seg[f]++;
      $display("segment %0.0f Hz, level %0.0f: mean RMS %f over %0d samples",
               FREQS[f], f < 4 ? LEVEL : 0.0, mean / NSAMP[f], NSAMP[f]);
    end
    repeat (3) @(negedge clk);
    $display("events: filtered=%0d mean_square=%0d root=%0d negative_filter_out=%0d tight_spacing=%0d",
             n_fir, n_ms, n_rms, n_neg, n_tight);
    check(n_fir > 0, "no filtered sample");
    check(n_ms > 0, "no mean square");
    check(n_rms > 0, "no root");
    check(n_neg > 0, "no negative filter output");
    check(n_tight > 0, "no sample at the closest spacing");
    for (int f = 0; f < 5; f++) check(n_seg[f] == 1, "frequency segment not run");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule

// Temperature-fluctuation processing chain: band-pass FIR filter followed
// by a running RMS with a bin of two samples.
//
// A fast thermocouple above a fuel subassembly is digitised (after
// cold-junction compensation) at Fs = 100 Hz into 16-bit {5:11} samples.
// The band-pass filter removes pick-up noise and the RMS unit turns the
// filtered fluctuation into a magnitude that grows with the thermal power
// or with a flow blockage. The thermocouple, the compensation and the ADC
// are outside this module: samples enter on sample_valid/sample.
//
//   sample -> fir_direct (9 taps, {2:14} coefficients) -> 47-bit {22:25}
//          -> rms_bin2 (z^-1, two squarers, sum, x0.5, square root)
//
// Outputs: fir_out is the filtered sample (one clock after sample_valid),
// ms_out the mean square of the last two filtered samples (two clocks
// after), rms_out its square root (RMS_W+3 = 50 clocks after at the default
// widths). Samples must be at least RMS_W+2 clocks apart (49 by default);
// at 100 Hz and any practical clock they are hundreds of thousands apart.
// A sample may be given whenever busy is low (busy is high from the clock
// after a sample until rms_valid). Reset is asynchronous, active
// low.
//
// The chain, the formats and the coefficients follow the published design;
// the strobes, the reset and the iterative square root are this design's
// own choices.
module tf_rms_top
  import tf_pkg::*;
#(
  parameter int unsigned RMS_W = FIR_OUT_W
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    sample_valid,
  input  logic signed [SAMPLE_W-1:0] sample,
  output logic                    fir_valid,
  output logic signed [RMS_W-1:0] fir_out,
  output logic                    ms_valid,
  output logic [2*RMS_W-2:0]      ms_out,
  output logic                    rms_valid,
  output logic [RMS_W-1:0]        rms_out,
  output logic                    busy
);

  logic rms_busy;

  fir_direct #(.OUT_W(RMS_W)) u_bpf (
    .clk        (clk),
    .rst_n      (rst_n),
    .in_valid   (sample_valid),
    .in_sample  (sample),
    .out_valid  (fir_valid),
    .out_sample (fir_out)
  );

  rms_bin2 #(.IN_W(RMS_W)) u_rms (
    .clk       (clk),
    .rst_n     (rst_n),
    .in_valid  (fir_valid),
    .in_sample (fir_out),
    .ms_valid  (ms_valid),
    .ms_out    (ms_out),
    .rms_valid (rms_valid),
    .rms_out   (rms_out),
    .busy      (rms_busy)
  );

  assign busy = rms_busy | fir_valid;

endmodule

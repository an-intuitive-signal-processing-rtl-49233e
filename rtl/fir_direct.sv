// Direct-form FIR filter (the band-pass stage of the processing chain).
//
// Each accepted sample is multiplied by coefficient 0 straight away while
// the previous NTAPS-1 samples, held in a z^-1 delay line, are multiplied by
// coefficients 1..NTAPS-1; the products are summed in one adder tree. The
// products and the sum keep every bit (no truncation or rounding), so with
// {5:11} samples and {2:14} coefficients the output has 25 fractional bits.
// The sum is sign-extended to OUT_W bits, 47 ({22:25}) by default, the width
// the RMS unit takes.
//
// Interface: in_valid/in_sample carry one sample per sampling period (the
// design samples at 100 Hz, far below the clock rate, but the filter
// accepts a sample every clock). out_valid pulses, and out_sample holds the
// filtered value, one clock after in_valid. The delay line only shifts on
// in_valid. rst_n is an asynchronous active-low reset that clears the
// delay line and the output.
//
// The direct-form structure, the formats and the coefficients follow the
// published design; the valid strobe, the reset and the single-cycle adder
// tree are choices of this implementation.
module fir_direct
  import tf_pkg::*;
#(
  parameter int unsigned IN_W   = SAMPLE_W,
  parameter int unsigned CW     = COEF_W,
  parameter int unsigned TAPS   = NTAPS,
  parameter int unsigned OUT_W  = FIR_OUT_W,
  parameter logic signed [CW-1:0] COEFS [TAPS] = BPF_COEFS
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    in_valid,
  input  logic signed [IN_W-1:0]  in_sample,
  output logic                    out_valid,
  output logic signed [OUT_W-1:0] out_sample
);

  localparam int unsigned PROD_W = IN_W + CW;

  if (OUT_W < PROD_W + $clog2(TAPS)) begin : gen_chk_width
    $error("fir_direct: OUT_W too narrow for a full-precision sum");
  end
  if (TAPS < 2) begin : gen_chk_taps
    $error("fir_direct: needs at least two taps");
  end

  // dly[k] holds x[n-1-k]
  logic signed [IN_W-1:0]  dly [TAPS-1];
  logic signed [OUT_W-1:0] acc;

  always_comb begin
    // operands are sign-extended to OUT_W bits, so each product is exact
    acc = OUT_W'(in_sample) * OUT_W'(COEFS[0]);
    for (int k = 1; k < TAPS; k++)
      acc += OUT_W'(dly[k-1]) * OUT_W'(COEFS[k]);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int k = 0; k < TAPS - 1; k++) dly[k] <= '0;
      out_valid  <= 1'b0;
      out_sample <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        dly[0] <= in_sample;
        for (int k = 1; k < TAPS - 1; k++) dly[k] <= dly[k-1];
        out_sample <= acc;
      end
    end
  end

endmodule

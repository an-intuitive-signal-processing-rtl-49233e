// Running RMS over a bin of two samples.
//
//   ms  = (x[n]^2 + x[n-1]^2) / 2        (mean square)
//   rms = sqrt(ms)
//
// The structure mirrors the published RMS unit: a z^-1 register holds the
// previous sample, two squarers form x[n]^2 and x[n-1]^2, an adder sums them
// and a gain of 0.5 halves the sum. The square root of the equation then
// follows in an isqrt_seq unit.
//
// Formats: the input is a signed IN_W-bit number (47 bits, {22:25}, by
// default). With F fractional input bits, ms_out has 2F fractional bits and
// is floor((a^2 + b^2) / 2) of the raw integers; rms_out is unsigned, IN_W
// bits wide with F fractional bits, and equals floor(sqrt(ms)), so it is
// the RMS truncated to the input's resolution.
//
// Timing: ms_valid pulses one clock after in_valid. The root takes IN_W+1
// clocks more: rms_valid pulses IN_W+2 clocks after in_valid. busy is high
// from the clock after in_valid until the root is out; the next sample may
// come at the earliest in the clock where rms_valid pulses (IN_W+2 clocks
// between samples), which an assertion checks. At the 100 Hz sampling rate of the design that is never
// close. The z^-1 register resets to 0, so the first result averages the
// first sample with zero. Reset is asynchronous, active low.
//
// The z^-1 / squarer / adder / 0.5-gain structure and the 47-bit input
// follow the published unit, which stops at the mean square; the square
// root of the RMS equation, the strobes and the reset are this design's
// own choices.
module rms_bin2 #(
  parameter int unsigned IN_W = 47
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    in_valid,
  input  logic signed [IN_W-1:0]  in_sample,
  output logic                    ms_valid,
  output logic [2*IN_W-2:0]       ms_out,
  output logic                    rms_valid,
  output logic [IN_W-1:0]         rms_out,
  output logic                    busy
);

  localparam int unsigned SQ_W = 2 * IN_W;

  logic signed [IN_W-1:0] prev_q;       // z^-1
  logic [SQ_W-1:0]        sq_cur, sq_prev;
  logic [SQ_W-1:0]        sum;          // below 2^(2*IN_W-1)
  logic                   sq_busy;

  // squares are non-negative and below 2^(2*IN_W-2)+1, so unsigned is exact
  always_comb begin
    sq_cur  = SQ_W'(SQ_W'(in_sample) * SQ_W'(in_sample));
    sq_prev = SQ_W'(SQ_W'(prev_q) * SQ_W'(prev_q));
    sum     = sq_cur + sq_prev;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      prev_q   <= '0;
      ms_valid <= 1'b0;
      ms_out   <= '0;
    end else begin
      ms_valid <= in_valid;
      if (in_valid) begin
        prev_q <= in_sample;
        ms_out <= sum[SQ_W-1:1];     // gain 0.5 (drops bit 0)
      end
    end
  end

  isqrt_seq #(.RAD_W(SQ_W)) u_sqrt (
    .clk      (clk),
    .rst_n    (rst_n),
    .start    (ms_valid),
    .radicand ({1'b0, ms_out}),
    .busy     (sq_busy),
    .done     (rms_valid),
    .root     (rms_out)
  );

  assign busy = sq_busy | ms_valid;

  a_sample_spacing: assert property (@(posedge clk) disable iff (!rst_n)
    !(in_valid && busy))
    else $error("rms_bin2: sample arrived before the previous RMS was done");

endmodule

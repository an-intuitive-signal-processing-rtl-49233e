// Sequential integer square root: root = floor(sqrt(radicand)).
//
// Digit-by-digit (restoring) method, one result bit per clock: each step
// brings down the next two radicand bits into a partial remainder and
// subtracts the trial value 4*root+1 when it fits, which sets the next root
// bit. A RAD_W-bit radicand takes RAD_W/2 steps.
//
// Interface: pulse start with the radicand while busy is low. busy goes high
// on the next clock and stays high for RAD_W/2 clocks; RAD_W/2+1 clocks
// after start, done pulses for one clock (busy is then low again) and root
// holds the result (it stays until the next start). A start while
// busy is a protocol error and is flagged by an assertion.
//
// The RMS equation of the design calls for the square root; this iterative
// structure is a choice of this implementation, sized for a 100 Hz sample
// rate where thousands of clocks separate samples.
module isqrt_seq #(
  parameter int unsigned RAD_W = 94  // radicand bits, even
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 start,
  input  logic [RAD_W-1:0]     radicand,
  output logic                 busy,
  output logic                 done,
  output logic [RAD_W/2-1:0]   root
);

  localparam int unsigned ROOT_W = RAD_W / 2;
  localparam int unsigned CNT_W  = $clog2(ROOT_W + 1);

  if (RAD_W % 2 != 0) begin : gen_chk_even
    $error("isqrt_seq: RAD_W must be even");
  end

  logic [RAD_W-1:0]  rad_q;   // radicand bits not yet consumed, MSBs first
  // partial remainder; below 2^ROOT_W before every step but the last,
  // whose remainder is never used
  logic [ROOT_W-1:0] rem_q;
  logic [CNT_W-1:0]  cnt_q;   // steps left

  logic [ROOT_W+1:0] rem_sh, trial, rem_new;
  logic              fits;

  always_comb begin
    rem_sh = {rem_q, rad_q[RAD_W-1 -: 2]};
    trial  = {root, 2'b01};
    fits   = rem_sh >= trial;
    rem_new = fits ? rem_sh - trial : rem_sh;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rad_q <= '0;
      rem_q <= '0;
      cnt_q <= '0;
      root  <= '0;
      busy  <= 1'b0;
      done  <= 1'b0;
    end else begin
      done <= 1'b0;
      if (start && !busy) begin
        rad_q <= radicand;
        rem_q <= '0;
        root  <= '0;
        cnt_q <= CNT_W'(ROOT_W);
        busy  <= 1'b1;
      end else if (busy) begin
        rad_q <= rad_q << 2;
        rem_q <= rem_new[ROOT_W-1:0];
        root  <= {root[ROOT_W-2:0], fits};
        cnt_q <= cnt_q - 1'b1;
        if (cnt_q == CNT_W'(1)) begin
          busy <= 1'b0;
          done <= 1'b1;
        end
      end
    end
  end

  a_no_start_while_busy: assert property (@(posedge clk) disable iff (!rst_n)
    !(start && busy))
    else $error("isqrt_seq: start while busy");

endmodule

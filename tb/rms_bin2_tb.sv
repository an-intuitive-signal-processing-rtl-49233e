// Self-checking testbench for rms_bin2 at its default size (47-bit signed
// input with 25 fractional bits).
//
// A 192-bit integer model forms S = x[n]^2 + x[n-1]^2 and the mean square
// floor(S/2); ms_out must equal it, and rms_out r must satisfy
// r*r <= ms < (r+1)*(r+1). Inputs include zero, the most negative and most
// positive values, sign changes and random values of every length. It
// checks that ms_valid follows in_valid by one clock and rms_valid by
// IN_W+2 clocks, that busy covers the whole computation, and sends samples
// both at the closest allowed spacing and with long gaps.
module rms_bin2_tb;

  localparam int W = 47;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic in_valid = 1'b0;
  logic signed [W-1:0] in_sample = '0;
  logic ms_valid, rms_valid, busy;
  logic [2*W-2:0] ms_out;
  logic [W-1:0] rms_out;

  int checks = 0, failures = 0;
  logic signed [191:0] prev = '0;

  rms_bin2 dut (.*);

  always #5 clk = ~clk;

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

  task automatic send(input logic signed [W-1:0] x, input int gap);
    logic signed [191:0] cur, s, ms, r;
    int cycles;
    cur = 192'(x);
    s   = cur * cur + prev * prev;
    ms  = s >>> 1;
    prev = cur;
    @(negedge clk);
    check(busy == 1'b0, "busy while idle");
    in_valid  = 1'b1;
    in_sample = x;
    @(negedge clk);
    in_valid  = 1'b0;
    in_sample = W'({$urandom, $urandom});   // must be ignored
    check(ms_valid == 1'b1, "ms_valid not one clock after in_valid");
    check(192'(ms_out) == ms, $sformatf("ms %0d expected %0d", ms_out, ms));
    cycles = 1;
    while (!rms_valid) begin
      check(busy == 1'b1, "busy low while computing");
      @(negedge clk);
      cycles++;
      if (ms_valid) check(1'b0, "extra ms_valid");
      if (cycles > 200) break;
    end
    check(cycles == W + 2, $sformatf("rms latency %0d expected %0d", cycles, W + 2));
    r = 192'(rms_out);
    check(r * r <= ms && ms < (r + 1) * (r + 1),
          $sformatf("rms %0d for ms %0d", rms_out, ms));
    // gap 0: the next sample comes in the clock where rms_valid is high
    if (gap == 0) begin
      check(busy == 1'b0, "busy with rms_valid");
    end else begin
      repeat (gap) @(negedge clk);
    end
  endtask

  // send() begins by waiting for a negedge, so gap 0 lands the next
  // in_valid one clock after rms_valid; for the closest spacing drive it
  // here directly
  task automatic send_tight(input logic signed [W-1:0] a, input logic signed [W-1:0] b);
    logic signed [191:0] ca, cb, msb, r;
    int cycles;
    ca = 192'(a);
    cb = 192'(b);
    prev = cb;
    msb = (cb * cb + ca * ca) >>> 1;
    @(negedge clk);
    in_valid = 1'b1;
    in_sample = a;
    @(negedge clk);
    in_valid = 1'b0;
    cycles = 1;
    while (!rms_valid && cycles < 200) begin
      @(negedge clk);
      cycles++;
    end
    // rms_valid is high now: this is the earliest clock for the next sample
    check(busy == 1'b0, "busy still high when rms_valid");
    in_valid = 1'b1;
    in_sample = b;
    @(negedge clk);
    in_valid = 1'b0;
    check(192'(ms_out) == msb, "ms after tight spacing");
    while (!rms_valid && cycles < 400) begin
      @(negedge clk);
      cycles++;
    end
    r = 192'(rms_out);
    check(r * r <= msb && msb < (r + 1) * (r + 1), "rms after tight spacing");
  endtask

  initial begin
    logic signed [W-1:0] v;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    repeat (2) @(negedge clk);
    send('0, 1);
    send(W'(1), 2);
    send(-W'(1), 2);
    send({1'b1, {(W-1){1'b0}}}, 1);   // most negative
    send({1'b1, {(W-1){1'b0}}}, 1);
    send({1'b0, {(W-1){1'b1}}}, 1);   // most positive
    send({1'b1, {(W-1){1'b0}}}, 1);
    send(W'(12) <<< 25, 3);           // 12.0 in {22:25}
    send(-(W'(12) <<< 25), 0);
    for (int k = 0; k < 300; k++) begin
      v = W'({$urandom, $urandom}) >>> $urandom_range(0, W - 1);
      send(v, $urandom_range(0, 5));
    end
    send_tight(W'(3) <<< 24, -(W'(5) <<< 23));
    repeat (3) @(negedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule

// Self-checking testbench for isqrt_seq at its default size (94-bit
// radicand, 47-bit root).
//
// Each result r is checked against the defining property of the integer
// square root, r*r <= x < (r+1)*(r+1), worked out in 192-bit arithmetic.
// Radicands cover 0, 1, perfect squares and their neighbours, the largest
// value and random values of every length. It also checks that done pulses
// exactly RAD_W/2+1 clocks after start, for one clock, and that busy is high
// in between.
module isqrt_seq_tb;

  localparam int RW = 94;
  localparam int QW = RW / 2;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic start = 1'b0;
  logic [RW-1:0] radicand = '0;
  logic busy, done;
  logic [QW-1:0] root;

  int checks = 0, failures = 0;

  isqrt_seq dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s", what);
    end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(input logic [RW-1:0] x);
    logic [191:0] r, lo, hi;
    int cycles;
    @(negedge clk);
    start    = 1'b1;
    radicand = x;
    @(negedge clk);
    start    = 1'b0;
    radicand = RW'({$urandom, $urandom, $urandom});   // must be ignored
    cycles   = 1;
    while (!done) begin
      check(busy == 1'b1, "busy low before done");
      @(negedge clk);
      cycles++;
      if (cycles > 200) break;
    end
    check(cycles == QW + 1, $sformatf("latency %0d expected %0d", cycles, QW + 1));
    r  = 192'(root);
    lo = r * r;
    hi = (r + 1) * (r + 1);
    check(lo <= 192'(x) && 192'(x) < hi,
          $sformatf("sqrt(%0d) gave %0d", x, root));
    @(negedge clk);
    check(done == 1'b0, "done longer than one clock");
    check(busy == 1'b0, "busy after done");
  endtask

  initial begin
    logic [RW-1:0] v;
    logic [QW-1:0] s;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    run('0);
    run(RW'(1));
    run(RW'(2));
    run(RW'(3));
    run(RW'(4));
    run('1);
    for (int k = 0; k < 60; k++) begin
      s = QW'({$urandom, $urandom}) >> $urandom_range(0, QW - 1);
      v = RW'(s) * RW'(s);
      run(v);
      if (v != 0) run(v - 1);
      run(v + 1);
    end
    for (int k = 0; k < 200; k++) begin
      v = RW'({$urandom, $urandom, $urandom}) >> $urandom_range(0, RW - 1);
      run(v);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule

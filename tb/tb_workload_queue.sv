// tb_workload_queue: FIFO occupancy under long increment traces, for the
// two operating points the architecture is evaluated at:
//   A: 4-bit SRAM counters, DRAM 12x slower, 300 FIFO slots
//   B: 5-bit SRAM counters, DRAM 30x slower, 500 FIFO slots
// Each runs two million increments, one per cycle, over 4096 counters:
// half uniformly random, half drawn from a hot set of 32 counters, in
// alternating stretches. It reports the largest and the time-averaged
// FIFO occupancy, checks that no request was ever held and that the
// occupancy stays far below the FIFO size, and finally checks every
// counter. Point A's departure rate 1/12 against an arrival rate near
// 1/16 behaves like a Geom/D/1 queue with load 0.75 (mean about 1.6);
// point B (1/30 against 1/32, load 0.94) queues longer.
module tb_workload_queue;
  logic clk = 1'b0, rst_n;
  always #5 clk = ~clk;

  int checks, failures, checks_a, checks_b, failures_a, failures_b;
  bit done_a, done_b, failures_w = 0;
  assign checks   = checks_a + checks_b;
  assign failures = failures_a + failures_b + int'(failures_w);

  initial begin
    repeat (6_000_000) @(posedge clk);
    $display("watchdog expired");
    failures_w = 1;
    #1;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst_n = 0;
    repeat (4) @(posedge clk);
    @(negedge clk); rst_n = 1;
    wait (done_a && done_b);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  workload_point #(.L(4), .SD_RATIO(12), .K(300), .MEAN_LO(0.3), .MEAN_HI(5.0))
    point_a (.clk, .rst_n, .done(done_a), .checks(checks_a), .failures(failures_a));
  workload_point #(.L(5), .SD_RATIO(30), .K(500), .MEAN_LO(1.0), .MEAN_HI(30.0))
    point_b (.clk, .rst_n, .done(done_b), .checks(checks_b), .failures(failures_b));

endmodule

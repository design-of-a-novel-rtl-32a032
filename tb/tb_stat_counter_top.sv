// tb_stat_counter_top: end-to-end test of the counter manager with the
// DRAM model, at a reduced size (256 counters, 16 FIFO slots).
//
//   1. random initialisation: every A[i] in 0..15 and B[i] = -A[i]
//   2. uniform random increments, one per cycle
//   3. runs of increments to one counter (pipeline bypass)
//   4. an adversarial burst: knowing the initial values, the test first
//      brings every counter to 15, then increments all of them back to
//      back, so 256 counters wrap in a row; the FIFO fills and requests
//      are held (stall), and flushes leave at exactly one per SD_RATIO
//   5. drain, then every counter must read B[i] + A[i] = its increments
//
// Each mechanism is counted, and one that never happened is a failure.
module tb_stat_counter_top;
  localparam int unsigned N = 256, L = 4, DW = 64, K = 16, SD = 12;
  localparam int unsigned AW = 8, CW = 5;

  logic clk = 1'b0, rst_n;
  logic [31:0] seed;
  logic inc_valid, inc_ready;
  logic [AW-1:0] inc_index;
  logic dram_req_valid, dram_req_ready, dram_req_write, dram_rvalid;
  logic [AW-1:0] dram_req_addr;
  logic [DW-1:0] dram_req_wdata, dram_rdata;
  logic init_done, fifo_overflow, ev_wrap, ev_flush, ev_bypass, ev_stall;
  logic [CW-1:0] fifo_count, fifo_max_count;

  stat_counter_top #(.N(N), .L(L), .DW(DW), .K(K), .SD_RATIO(SD)) dut (.*);

  dram_model #(.N(N), .DW(DW), .READ_LAT(4), .STALL_PCT(0)) u_dram (
    .clk, .rst_n, .req_valid(dram_req_valid), .req_ready(dram_req_ready),
    .req_write(dram_req_write), .req_addr(dram_req_addr), .req_wdata(dram_req_wdata),
    .rvalid(dram_rvalid), .rdata(dram_rdata));

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int n_wrap = 0, n_flush = 0, n_bypass = 0, n_stall = 0, n_gap_exact = 0;
  longint cyc = 0, last_flush = -1000;
  longint unsigned cnt [N];
  int a0 [N];

  task automatic fail(input string msg);
    failures++;
    $display("FAIL %s", msg);
  endtask

  initial begin
    repeat (400000) @(posedge clk);
    fail("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (rst_n) begin
    cyc++;
    if (inc_valid && inc_ready) cnt[inc_index]++;
    if (ev_wrap) n_wrap++;
    if (ev_bypass) n_bypass++;
    if (ev_stall) n_stall++;
    if (ev_flush) begin
      n_flush++;
      if (fifo_count != 0 && cyc - last_flush == SD) n_gap_exact++;
      if (cyc - last_flush < SD) begin
        checks++;
        fail("flushes closer than SD_RATIO cycles");
      end
      last_flush = cyc;
    end
    if (fifo_count > CW'(K)) begin
      checks++;
      fail("FIFO count above K");
    end
  end

  function automatic int cur_a(input int i);
    return int'((longint'(a0[i]) + longint'(cnt[i])) % (1 << L));
  endfunction

  // one increment request; waits until it is accepted
  task automatic inc(input int i);
    inc_valid = 1'b1;
    inc_index = AW'(i);
    @(posedge clk);
    while (!inc_ready) @(posedge clk);
    @(negedge clk);
    inc_valid = 1'b0;
  endtask

  // back-to-back requests, one per cycle while accepted
  task automatic burst(input int idx []);
    foreach (idx[k]) begin
      inc_valid = 1'b1;
      inc_index = AW'(idx[k]);
      @(posedge clk);
      while (!inc_ready) @(posedge clk);
      @(negedge clk);
    end
    inc_valid = 1'b0;
  endtask

  initial begin
    int idx [];
    rst_n = 0; seed = 32'h1234_5678; inc_valid = 0; inc_index = 0;
    for (int i = 0; i < int'(N); i++) cnt[i] = 0;
    repeat (4) @(posedge clk);
    @(negedge clk); rst_n = 1;

    // 1. initialisation
    wait (init_done);
    @(negedge clk);
    begin
      int hist [1 << L];
      for (int v = 0; v < (1 << L); v++) hist[v] = 0;
      for (int i = 0; i < int'(N); i++) begin
        longint unsigned b;
        b = u_dram.mem[i];
        a0[i] = int'(-b);
        checks++;
        if (a0[i] < 0 || a0[i] >= (1 << L) || int'(dut.u_sram.mem[i]) != a0[i])
          fail($sformatf("initial A[%0d]=%0d B=%0d", i, dut.u_sram.mem[i], b));
        else hist[a0[i]]++;
      end
      for (int v = 0; v < (1 << L); v++) begin
        checks++;
        if (hist[v] == 0) fail("initial value never drawn");
      end
    end
    checks++;
    if (inc_ready !== 1'b1) fail("not ready after initialisation");

    // 2. uniform random increments
    idx = new[6000];
    foreach (idx[k]) idx[k] = $urandom_range(N - 1);
    burst(idx);

    // 3. runs on one counter
    idx = new[2000];
    foreach (idx[k]) idx[k] = (k % 20 < 10) ? 7 : $urandom_range(N - 1);
    burst(idx);

    // 4. adversarial burst: bring all counters to 15, then all wrap at once
    repeat (400) @(negedge clk);
    for (int i = 0; i < int'(N); i++)
      while (cur_a(i) != (1 << L) - 1) inc(i);
    repeat (400) @(negedge clk);
    checks++;
    if (fifo_overflow) fail("FIFO limit reached before the adversarial burst");
    idx = new[N];
    foreach (idx[k]) idx[k] = k;
    burst(idx);

    // 5. drain and compare
    while (fifo_count != 0) @(negedge clk);
    repeat (40) @(negedge clk);
    for (int i = 0; i < int'(N); i++) begin
      longint unsigned total;
      total = u_dram.mem[i] + longint'(dut.u_sram.mem[i]);
      checks++;
      if (total != cnt[i]) fail($sformatf("counter %0d reads %0d, expected %0d", i, total, cnt[i]));
    end
    checks += 7;
    if (!fifo_overflow) fail("FIFO limit never reached");
    if (fifo_max_count < CW'(K - 1)) fail("FIFO high-water mark too low");
    if (n_wrap == 0) fail("no wrap");
    if (n_flush != n_wrap) fail($sformatf("%0d wraps but %0d flushes", n_wrap, n_flush));
    if (n_bypass == 0) fail("no bypass");
    if (n_stall == 0) fail("no stall");
    if (n_gap_exact == 0) fail("no back-to-back flush at SD_RATIO");
    $display("wraps %0d flushes %0d bypasses %0d stall cycles %0d paced flushes %0d max FIFO %0d",
             n_wrap, n_flush, n_bypass, n_stall, n_gap_exact, fifo_max_count);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

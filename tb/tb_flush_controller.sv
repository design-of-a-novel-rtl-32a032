// tb_flush_controller: the flush controller against the DRAM model.
// A queue in the testbench plays the FIFO. Random indices are queued in
// bursts; every flush must add 2^L to exactly its DRAM word, flushes must
// start at least SD_RATIO cycles apart, and exactly SD_RATIO apart while
// the queue is backlogged and the DRAM is fast. A second phase runs with
// a DRAM that stalls at random to exercise the handshake.
module tb_flush_controller;
  localparam int unsigned N = 32, L = 4, DW = 64, SD = 12, AW = 5;
  logic clk = 1'b0, rst_n;
  logic fifo_empty, fifo_pop, flush_done;
  logic [AW-1:0] fifo_head;
  logic dram_req_valid, dram_req_ready, dram_req_write, dram_rvalid;
  logic [AW-1:0] dram_req_addr;
  logic [DW-1:0] dram_req_wdata, dram_rdata;
  logic stall_mode;

  int q [$];
  longint unsigned expect_b [N];
  int checks = 0, failures = 0, n_flush = 0, n_exact = 0, n_pop = 0;
  longint last_pop = -1000, cyc = 0;

  flush_controller #(.N(N), .L(L), .DW(DW), .SD_RATIO(SD)) dut (.*);

  // two DRAM models: fast, and one that stalls at random
  logic f_ready, s_ready, f_rvalid, s_rvalid;
  logic [DW-1:0] f_rdata, s_rdata;
  dram_model #(.N(N), .DW(DW), .READ_LAT(3), .STALL_PCT(0)) u_fast (
    .clk, .rst_n, .req_valid(dram_req_valid && !stall_mode), .req_ready(f_ready),
    .req_write(dram_req_write), .req_addr(dram_req_addr), .req_wdata(dram_req_wdata),
    .rvalid(f_rvalid), .rdata(f_rdata));
  dram_model #(.N(N), .DW(DW), .READ_LAT(7), .STALL_PCT(60)) u_slow (
    .clk, .rst_n, .req_valid(dram_req_valid && stall_mode), .req_ready(s_ready),
    .req_write(dram_req_write), .req_addr(dram_req_addr), .req_wdata(dram_req_wdata),
    .rvalid(s_rvalid), .rdata(s_rdata));
  assign dram_req_ready = stall_mode ? s_ready : f_ready;
  assign dram_rvalid    = stall_mode ? s_rvalid : f_rvalid;
  assign dram_rdata     = stall_mode ? s_rdata : f_rdata;

  assign fifo_empty = (q.size() == 0);
  assign fifo_head  = fifo_empty ? '0 : AW'(q[0]);

  always #5 clk = ~clk;

  // the model FIFO pops half a cycle after the edge that sampled fifo_pop
  bit pop_pending = 1'b0;
  always @(negedge clk) if (pop_pending) begin
    void'(q.pop_front());
    pop_pending = 1'b0;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    cyc++;
    if (rst_n && fifo_pop) begin
      checks++;
      n_pop++;
      if (cyc - last_pop < SD) begin
        failures++;
        $display("flush started %0d cycles after the last one", cyc - last_pop);
      end
      if (!stall_mode && q.size() > 1 && cyc - last_pop == SD) n_exact++;
      last_pop = cyc;
      pop_pending = 1'b1;
    end
    if (rst_n && flush_done) n_flush++;
  end

  task automatic enqueue(input int i);
    q.push_back(i);
    expect_b[i] += (64'd1 << L);
  endtask

  task automatic check_all(input string phase);
    for (int i = 0; i < int'(N); i++) begin
      longint unsigned got;
      got = stall_mode ? u_slow.mem[i] : u_fast.mem[i];
      checks++;
      if (got != expect_b[i]) begin
        failures++;
        $display("%s: B[%0d]=%0d expected %0d", phase, i, got, expect_b[i]);
      end
    end
  endtask

  initial begin
    rst_n = 0; stall_mode = 0;
    for (int i = 0; i < int'(N); i++) expect_b[i] = 0;
    repeat (3) @(posedge clk);
    @(negedge clk); rst_n = 1;
    for (int phase = 0; phase < 2; phase++) begin
      for (int b = 0; b < 40; b++) begin
        int len;
        len = $urandom_range(12, 1);
        for (int k = 0; k < len; k++) enqueue($urandom_range(N - 1));
        if ($urandom_range(1)) enqueue(int'(q.size() ? q[q.size()-1] : 0)); // repeat
        repeat ($urandom_range(200, 1)) @(negedge clk);
      end
      while (q.size() != 0) @(negedge clk);
      repeat (60) @(negedge clk);
      check_all(phase == 0 ? "fast" : "stalling");
      if (phase == 0) begin
        for (int i = 0; i < int'(N); i++) expect_b[i] = 0;
        stall_mode = 1;
      end
    end
    checks++;
    if (n_flush != n_pop || n_exact == 0) begin
      failures++;
      $display("flushes %0d pops %0d exact-rate gaps %0d", n_flush, n_pop, n_exact);
    end
    $display("flushes %0d, %0d back-to-back at %0d cycles", n_flush, n_exact, SD);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

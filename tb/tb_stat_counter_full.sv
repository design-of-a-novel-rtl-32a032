// tb_stat_counter_full: the counter manager at its default size: 2^20
// 4-bit SRAM counters, 64-bit DRAM counters, a 300-slot FIFO and a DRAM
// 12 times slower than the SRAM. It runs one complete operation: the
// random initialisation of all counters (one DRAM write per 12 cycles),
// one million increments at one per cycle with random indices and a hot
// set of 64 counters, a drain of the FIFO, and a check that every counter
// reads B[i] + A[i] = the number of its increments. It also checks that
// the FIFO never reached its limit, that counters wrap at a rate of about
// one per 2^L increments, and reports the FIFO high-water mark.
module tb_stat_counter_full;
  localparam int unsigned N = sc_pkg::N_DEFAULT, L = sc_pkg::L_DEFAULT;
  localparam int unsigned DW = sc_pkg::DW_DEFAULT, K = sc_pkg::K_DEFAULT;
  localparam int unsigned SD = sc_pkg::SD_RATIO_DEFAULT;
  localparam int unsigned AW = $clog2(N), CW = $clog2(K + 1);
  localparam int unsigned INCS = 1_000_000;

  logic clk = 1'b0, rst_n;
  logic [31:0] seed;
  logic inc_valid, inc_ready;
  logic [AW-1:0] inc_index;
  logic dram_req_valid, dram_req_ready, dram_req_write, dram_rvalid;
  logic [AW-1:0] dram_req_addr;
  logic [DW-1:0] dram_req_wdata, dram_rdata;
  logic init_done, fifo_overflow, ev_wrap, ev_flush, ev_bypass, ev_stall;
  logic [CW-1:0] fifo_count, fifo_max_count;

  stat_counter_top dut (.*);

  dram_model #(.N(N), .DW(DW), .READ_LAT(4), .STALL_PCT(0)) u_dram (
    .clk, .rst_n, .req_valid(dram_req_valid), .req_ready(dram_req_ready),
    .req_write(dram_req_write), .req_addr(dram_req_addr), .req_wdata(dram_req_wdata),
    .rvalid(dram_rvalid), .rdata(dram_rdata));

  always #5 clk = ~clk;

  int checks = 0, failures = 0, n_wrap = 0, n_flush = 0, bad = 0;
  longint cyc = 0, t_init = 0, t_inc = 0;
  int unsigned cnt [N];

  initial begin
    repeat (N * SD + 4 * INCS) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (rst_n) begin
    cyc++;
    if (inc_valid && inc_ready) cnt[inc_index]++;
    if (ev_wrap) n_wrap++;
    if (ev_flush) n_flush++;
  end

  initial begin
    rst_n = 0; seed = 32'h9E37_79B9; inc_valid = 0; inc_index = 0;
    for (int i = 0; i < int'(N); i++) cnt[i] = 0;
    repeat (4) @(posedge clk);
    @(negedge clk); rst_n = 1;
    wait (init_done);
    t_init = cyc;
    @(negedge clk);
    for (int k = 0; k < int'(INCS); k++) begin
      inc_valid = 1'b1;
      inc_index = ($urandom_range(3) == 0) ? AW'($urandom_range(63)) : AW'($urandom);
      @(posedge clk);
      while (!inc_ready) @(posedge clk);
      @(negedge clk);
    end
    inc_valid = 1'b0;
    t_inc = cyc - t_init;
    while (fifo_count != 0) @(negedge clk);
    repeat (40) @(negedge clk);
    for (int i = 0; i < int'(N); i++) begin
      longint unsigned total;
      total = u_dram.mem[i] + longint'(dut.u_sram.mem[i]);
      checks++;
      if (total != longint'(cnt[i])) begin
        failures++;
        if (bad++ < 10) $display("counter %0d reads %0d, expected %0d", i, total, cnt[i]);
      end
    end
    checks += 5;
    // wraps arrive at about one per 2^L increments
    if (n_wrap * (1 << L) < INCS * 97 / 100 || n_wrap * (1 << L) > INCS * 103 / 100) failures++;
    if (t_init < (longint'(N) - 1) * SD) failures++;  // paced at SD_RATIO
    if (fifo_overflow) failures++;
    if (n_wrap == 0 || n_flush != n_wrap) failures++;
    if (t_inc > longint'(INCS) + 10) failures++;  // no request was held
    $display("init %0d cycles, %0d increments in %0d cycles, %0d flushes, max FIFO %0d of %0d",
             t_init, INCS, t_inc, n_flush, fifo_max_count, K);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

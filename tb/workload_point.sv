// workload_point: one operating point of the queue-occupancy workload:
// the counter manager with given SRAM counter width, speed ratio and
// FIFO size, its DRAM model, a two-million-increment trace (stretches of
// uniform random indices alternating with stretches on 32 hot counters)
// and the checks: no request held, FIFO high-water mark below half the
// FIFO, mean occupancy in [MEAN_LO, MEAN_HI], every counter correct.
// done rises when the point has finished; checks and failures add up.
module workload_point #(
  parameter int unsigned N        = 4096,
  parameter int unsigned L        = 4,
  parameter int unsigned SD_RATIO = 12,
  parameter int unsigned K        = 300,
  parameter int unsigned INCS     = 2_000_000,
  parameter real         MEAN_LO  = 0.3,
  parameter real         MEAN_HI  = 5.0,
  localparam int unsigned AW = $clog2(N),
  localparam int unsigned DW = 64,
  localparam int unsigned CW = $clog2(K + 1)
) (
  input  logic clk,
  input  logic rst_n,
  output bit   done,
  output int   checks,
  output int   failures
);

  logic inc_valid, inc_ready;
  logic [AW-1:0] inc_index;
  logic dram_req_valid, dram_req_ready, dram_req_write, dram_rvalid;
  logic [AW-1:0] dram_req_addr;
  logic [DW-1:0] dram_req_wdata, dram_rdata;
  logic init_done, fifo_overflow, ev_wrap, ev_flush, ev_bypass, ev_stall;
  logic [CW-1:0] fifo_count, fifo_max_count;
  int unsigned cnt [N];
  longint occ_sum = 0, occ_cyc = 0;
  bit running = 0;
  stat_counter_top #(.N(N), .L(L), .DW(DW), .K(K), .SD_RATIO(SD_RATIO)) dut (
    .clk, .rst_n, .seed(32'hA5A5_0001 + L), .inc_valid, .inc_ready, .inc_index,
    .dram_req_valid, .dram_req_ready, .dram_req_write, .dram_req_addr, .dram_req_wdata,
    .dram_rvalid, .dram_rdata, .init_done, .fifo_count, .fifo_max_count,
    .fifo_overflow, .ev_wrap, .ev_flush, .ev_bypass, .ev_stall);
  dram_model #(.N(N), .DW(DW), .READ_LAT(4), .STALL_PCT(0)) u_dram (
    .clk, .rst_n, .req_valid(dram_req_valid), .req_ready(dram_req_ready),
    .req_write(dram_req_write), .req_addr(dram_req_addr), .req_wdata(dram_req_wdata),
    .rvalid(dram_rvalid), .rdata(dram_rdata));
  always @(posedge clk) if (rst_n) begin
    if (inc_valid && inc_ready) cnt[inc_index]++;
    if (running) begin occ_sum += longint'(fifo_count); occ_cyc++; end
  end
  initial begin
    real mean;
    int bad;
    bad = 0; checks = 0; failures = 0; done = 0;
    inc_valid = 0; inc_index = 0;
    for (int i = 0; i < int'(N); i++) cnt[i] = 0;
    @(posedge rst_n);
    wait (init_done);
    @(negedge clk);
    running = 1;
    for (int k = 0; k < int'(INCS); k++) begin
      inc_valid = 1'b1;
      inc_index = ((k / 50000) % 2 == 1) ? AW'($urandom_range(31) * 97) : AW'($urandom);
      @(posedge clk);
      while (!inc_ready) @(posedge clk);
      @(negedge clk);
    end
    inc_valid = 1'b0;
    running = 0;
    while (fifo_count != 0) @(negedge clk);
    repeat (80) @(negedge clk);
    for (int i = 0; i < int'(N); i++) begin
      longint unsigned total;
      total = u_dram.mem[i] + longint'(dut.u_sram.mem[i]);
      checks++;
      if (total != longint'(cnt[i])) begin
        failures++;
        if (bad++ < 5) $display("%m: counter %0d reads %0d, expected %0d", i, total, cnt[i]);
      end
    end
    mean = real'(occ_sum) / real'(occ_cyc);
    checks += 3;
    if (fifo_overflow) failures++;
    if (fifo_max_count >= CW'(K / 2)) failures++;
    if (mean < MEAN_LO || mean > MEAN_HI) failures++;
    $display("L=%0d SD=%0d K=%0d: max FIFO %0d, mean %0.2f over %0d cycles",
             L, SD_RATIO, K, fifo_max_count, mean, occ_cyc);
    done = 1;
  end

endmodule

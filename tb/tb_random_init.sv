// tb_random_init: start-up of the counter array. Captures every SRAM and
// DRAM write and checks that each counter i is written exactly once in
// order, that A[i] equals the low L bits of an independently computed
// xorshift32 sequence from the seed, that B[i] = -A[i] in DW bits (so each
// counter reads zero), that all 2^L values occur, that the writes are
// spaced SD_RATIO cycles apart with a ready DRAM and wait for a stalling
// one, and that done rises after the last counter.
module tb_random_init;
  localparam int unsigned N = 512, L = 4, DW = 64, SD = 3, AW = 9;
  logic clk = 1'b0, rst_n;
  logic [31:0] seed;
  logic sram_wr_en, dram_req_valid, dram_req_ready, dram_req_write, done;
  logic [AW-1:0] sram_wr_addr, dram_req_addr;
  logic [L-1:0] sram_wr_data;
  logic [DW-1:0] dram_req_wdata;

  int checks = 0, failures = 0, next_i = 0, hist [1 << L];
  longint cyc = 0, last = -100;
  int gap_exact = 0, gap_long = 0;
  logic [31:0] ref_rng;

  random_init #(.N(N), .L(L), .DW(DW), .SD_RATIO(SD)) dut (.*);

  always #5 clk = ~clk;

  function automatic logic [31:0] step(input logic [31:0] s);
    logic [31:0] x;
    x = s ^ (s << 13);
    x = x ^ (x >> 17);
    return x ^ (x << 5);
  endfunction

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // DRAM ready: always for the first half, random afterwards
  always @(posedge clk) dram_req_ready <= (next_i < int'(N) / 2) ? 1'b1 : ($urandom_range(2) == 0);

  always @(posedge clk) if (rst_n) begin
    cyc++;
    if (dram_req_valid && dram_req_ready) begin
      checks += 4;
      if (!sram_wr_en || sram_wr_addr != AW'(next_i) || dram_req_addr != AW'(next_i) || !dram_req_write) begin
        failures++;
        $display("write order wrong at %0d", next_i);
      end
      if (sram_wr_data != ref_rng[L-1:0]) begin
        failures++;
        $display("A[%0d]=%0d expected %0d", next_i, sram_wr_data, ref_rng[L-1:0]);
      end
      if (dram_req_wdata + DW'(sram_wr_data) != '0) begin
        failures++;
        $display("B[%0d] is not -A", next_i);
      end
      if (cyc - last < SD) failures++;
      if (next_i > 0 && next_i < int'(N) / 2 && cyc - last == SD) gap_exact++;
      if (cyc - last > SD) gap_long++;
      hist[sram_wr_data]++;
      last = cyc;
      next_i++;
      ref_rng = step(ref_rng);
    end else if (sram_wr_en) begin
      checks++;
      failures++;
      $display("SRAM written without a DRAM write");
    end
  end

  initial begin
    rst_n = 0; seed = 32'hC0FF_EE11; ref_rng = 32'hC0FF_EE11;
    for (int v = 0; v < (1 << L); v++) hist[v] = 0;
    repeat (3) @(posedge clk);
    @(negedge clk);
    checks++;
    if (done) failures++;
    rst_n = 1;
    wait (done);
    repeat (5) @(negedge clk);
    checks += 4;
    if (next_i != int'(N)) begin
      failures++;
      $display("%0d counters written", next_i);
    end
    if (dram_req_valid) failures++;
    if (gap_exact < int'(N) / 2 - 2) failures++;
    if (gap_long == 0) failures++;
    for (int v = 0; v < (1 << L); v++) begin
      checks++;
      if (hist[v] == 0) failures++;
    end
    $display("paced gaps %0d, stretched gaps %0d", gap_exact, gap_long);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// random_init: randomised start-up of the counter array.
//
// The key to the architecture: every SRAM counter A[i] starts at an
// independent random value, uniform over 0..2^L-1, and its DRAM counter
// B[i] at -A[i], so every counter still reads zero (B[i] + A[i] = 0).
// Because an adversary cannot know where each counter stands, it cannot
// make many counters wrap at once, and the flush FIFO stays short.
//
// After reset the block walks i = 0..N-1. For each i it draws the low L
// bits of a 32-bit xorshift generator, writes them to A[i] and writes
// their two's-complement negation, DW bits wide, to B[i] over the DRAM
// request channel. The SRAM write is issued in the cycle the DRAM write
// is accepted. Writes start at most once every SD_RATIO cycles, like
// flushes. done rises after the last pair and stays high until reset.
//
// The rule A[i] := uniform, B[i] := -A[i] is the architecture's; the
// generator, its seed input (sampled during reset; 0 selects a fixed
// non-zero seed) and the pacing are this design's choices. A deployment
// should seed the generator from a true random source.
module random_init #(
  parameter int unsigned N        = sc_pkg::N_DEFAULT,
  parameter int unsigned L        = sc_pkg::L_DEFAULT,
  parameter int unsigned DW       = sc_pkg::DW_DEFAULT,
  parameter int unsigned SD_RATIO = sc_pkg::SD_RATIO_DEFAULT,
  localparam int unsigned AW = (N > 1) ? $clog2(N) : 1,
  localparam int unsigned GW = (SD_RATIO > 1) ? $clog2(SD_RATIO) : 1
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic [31:0]   seed,
  // SRAM write of A[i]
  output logic          sram_wr_en,
  output logic [AW-1:0] sram_wr_addr,
  output logic [L-1:0]  sram_wr_data,
  // DRAM write of B[i]
  output logic          dram_req_valid,
  input  logic          dram_req_ready,
  output logic          dram_req_write,
  output logic [AW-1:0] dram_req_addr,
  output logic [DW-1:0] dram_req_wdata,
  output logic          done
);

  logic [31:0]   rng;
  logic [AW-1:0] idx;
  logic [GW-1:0] gap;
  logic [L-1:0]  a0;
  logic          fire;

  function automatic logic [31:0] xorshift32(input logic [31:0] s);
    logic [31:0] x;
    x = s ^ (s << 13);
    x = x ^ (x >> 17);
    x = x ^ (x << 5);
    return x;
  endfunction

  assign a0             = rng[L-1:0];
  assign dram_req_valid = !done && (gap == '0);
  assign dram_req_write = 1'b1;
  assign dram_req_addr  = idx;
  assign dram_req_wdata = '0 - DW'(a0);
  assign fire           = dram_req_valid && dram_req_ready;

  assign sram_wr_en   = fire;
  assign sram_wr_addr = idx;
  assign sram_wr_data = a0;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      rng  <= (seed == '0) ? 32'h2545_F491 : seed;
      idx  <= '0;
      gap  <= '0;
      done <= 1'b0;
    end else begin
      if (fire) begin
        rng <= xorshift32(rng);
        gap <= GW'(SD_RATIO - 1);
        if (idx == AW'(N - 1)) done <= 1'b1;
        else                   idx  <= idx + 1'b1;
      end else if (gap != '0) begin
        gap <= gap - 1'b1;
      end
    end
  end

  assert property (@(posedge clk) disable iff (!rst_n)
    dram_req_valid && !dram_req_ready |=> dram_req_valid && $stable(dram_req_addr));

endmodule

// sram_counter_array: the array of N small SRAM counters A[0..N-1].
//
// Each entry holds the low L bits of one statistics counter. The array has
// one synchronous read port and one write port so that an increment, a
// read followed one cycle later by a write, can start every clock cycle.
//
// Timing: rd_data is the entry at rd_addr as it was before the clock edge
// at which rd_en was sampled; it is held until the next read. A write and
// a read of the same address at the same edge return the old value
// (read-before-write); the increment pipeline forwards around this.
//
// The array itself is what the architecture prescribes (2^20 4-bit
// counters, 512 KB); the 1R1W port arrangement and synchronous read are
// this design's choice. There is no reset: the random initialiser writes
// every entry before the array is used.
module sram_counter_array #(
  parameter int unsigned N  = sc_pkg::N_DEFAULT,
  parameter int unsigned L  = sc_pkg::L_DEFAULT,
  localparam int unsigned AW = (N > 1) ? $clog2(N) : 1
) (
  input  logic          clk,
  input  logic          rd_en,
  input  logic [AW-1:0] rd_addr,
  output logic [L-1:0]  rd_data,
  input  logic          wr_en,
  input  logic [AW-1:0] wr_addr,
  input  logic [L-1:0]  wr_data
);

  logic [L-1:0] mem [N];

  always_ff @(posedge clk) begin
    if (rd_en) rd_data <= mem[rd_addr];
    if (wr_en) mem[wr_addr] <= wr_data;
  end

endmodule

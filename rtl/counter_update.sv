// counter_update: the increment pipeline in front of the SRAM counters.
//
// Each accepted request "increment counter i" adds one to the L-bit SRAM
// counter A[i]. When A[i] is at 2^L-1 the increment wraps it to 0 and the
// index i is pushed into the flush FIFO, which later adds 2^L to the DRAM
// counter B[i]. This +1-or-wrap-and-queue rule is the architecture's; the
// pipeline around it is this design's.
//
// Pipeline (one request per cycle):
//   stage 0  request accepted (inc_valid && inc_ready), SRAM read issued
//   stage 1  old value arrives, A[i]+1 written back, index pushed on wrap
// The SRAM reads before it writes, so a request for the same counter as
// the one just ahead of it would see a stale value; a one-entry bypass
// register holds the last write and is used instead (bypass pulses).
//
// Back-pressure: inc_ready is low until initialisation is done (enable)
// and while the FIFO holds K-1 or more entries (fifo_nearly_full). One
// request may already be in stage 1, so holding new requests at K-1
// guarantees that a push never meets a full FIFO: no flush is ever lost.
// stall pulses for each cycle a request is held for this reason. Holding
// requests is this design's answer to a FIFO overflow, which the
// randomised initialisation makes very unlikely.
//
// While enable is low the SRAM write port belongs to the initialiser
// (init_wr_*).
module counter_update #(
  parameter int unsigned N  = sc_pkg::N_DEFAULT,
  parameter int unsigned L  = sc_pkg::L_DEFAULT,
  localparam int unsigned AW = (N > 1) ? $clog2(N) : 1
) (
  input  logic          clk,
  input  logic          rst_n,
  // increment requests
  input  logic          inc_valid,
  output logic          inc_ready,
  input  logic [AW-1:0] inc_index,
  // control
  input  logic          enable,
  input  logic          fifo_nearly_full,
  // initialiser write port
  input  logic          init_wr_en,
  input  logic [AW-1:0] init_wr_addr,
  input  logic [L-1:0]  init_wr_data,
  // SRAM counter array ports
  output logic          sram_rd_en,
  output logic [AW-1:0] sram_rd_addr,
  input  logic [L-1:0]  sram_rd_data,
  output logic          sram_wr_en,
  output logic [AW-1:0] sram_wr_addr,
  output logic [L-1:0]  sram_wr_data,
  // flush FIFO push
  output logic          push_valid,
  output logic [AW-1:0] push_index,
  // event pulses
  output logic          bypass,
  output logic          stall
);

  logic          s1_valid;
  logic [AW-1:0] s1_idx;
  logic          lw_valid;   // last stage-1 write, for the bypass
  logic [AW-1:0] lw_idx;
  logic [L-1:0]  lw_data;
  logic [L-1:0]  old_val, new_val;
  logic          fire0, use_bypass, wrap;

  assign inc_ready = enable && !fifo_nearly_full;
  assign fire0     = inc_valid && inc_ready;
  assign stall     = inc_valid && enable && fifo_nearly_full;

  assign sram_rd_en   = fire0;
  assign sram_rd_addr = inc_index;

  always_comb begin
    use_bypass = s1_valid && lw_valid && (lw_idx == s1_idx);
    old_val    = use_bypass ? lw_data : sram_rd_data;
    wrap       = (old_val == {L{1'b1}});
    new_val    = old_val + 1'b1;   // wraps to 0 at 2^L
  end

  assign bypass     = use_bypass;
  assign push_valid = s1_valid && wrap;
  assign push_index = s1_idx;

  always_comb begin
    if (enable) begin
      sram_wr_en   = s1_valid;
      sram_wr_addr = s1_idx;
      sram_wr_data = new_val;
    end else begin
      sram_wr_en   = init_wr_en;
      sram_wr_addr = init_wr_addr;
      sram_wr_data = init_wr_data;
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      s1_valid <= 1'b0;
      s1_idx   <= '0;
      lw_valid <= 1'b0;
      lw_idx   <= '0;
      lw_data  <= '0;
    end else begin
      s1_valid <= fire0;
      s1_idx   <= inc_index;
      lw_valid <= s1_valid;
      lw_idx   <= s1_idx;
      lw_data  <= new_val;
    end
  end

endmodule

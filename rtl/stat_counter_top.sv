// stat_counter_top: hybrid SRAM/DRAM statistics counter array.
//
// Keeps N counters that can each be incremented once per clock cycle, in
// any order, while spending only L bits of fast SRAM per counter. The
// full DW-bit counters live in an external DRAM that is SD_RATIO times
// slower than the SRAM, reached over the dram_* request channel.
//
//   random_init       after reset, A[i] := random 0..2^L-1, B[i] := -A[i]
//   counter_update    A[i] := A[i]+1; on wrap to 0, queue index i
//   sram_counter_array  the N x L-bit SRAM counters A[]
//   flush_fifo        K queued indices
//   flush_controller  B[i] := B[i] + 2^L, one flush per SD_RATIO cycles
//
// The value of counter i is B[i] + A[i] + 2^L x (copies of i still in
// the FIFO); once the FIFO is empty it is simply B[i] + A[i].
//
// Interface and timing: increments are a valid/ready channel (inc_*);
// inc_ready is low until init_done and while the FIFO is nearly full, so
// requests are held rather than lost if the FIFO ever fills. The DRAM
// channel carries the initialiser's writes until init_done and the flush
// controller's reads and writes afterwards. Status outputs give the FIFO
// occupancy, its high-water mark, a sticky flag for a held request
// (fifo_overflow: the queue reached its limit) and one-cycle event pulses.
// The structure follows the architecture; the handshakes, the hold on a
// full FIFO and the status outputs are this design's choices.
module stat_counter_top #(
  parameter int unsigned N        = sc_pkg::N_DEFAULT,
  parameter int unsigned L        = sc_pkg::L_DEFAULT,
  parameter int unsigned DW       = sc_pkg::DW_DEFAULT,
  parameter int unsigned K        = sc_pkg::K_DEFAULT,
  parameter int unsigned SD_RATIO = sc_pkg::SD_RATIO_DEFAULT,
  localparam int unsigned AW = (N > 1) ? $clog2(N) : 1,
  localparam int unsigned CW = $clog2(K + 1)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic [31:0]   seed,
  // increment requests
  input  logic          inc_valid,
  output logic          inc_ready,
  input  logic [AW-1:0] inc_index,
  // DRAM counter array channel
  output logic          dram_req_valid,
  input  logic          dram_req_ready,
  output logic          dram_req_write,
  output logic [AW-1:0] dram_req_addr,
  output logic [DW-1:0] dram_req_wdata,
  input  logic          dram_rvalid,
  input  logic [DW-1:0] dram_rdata,
  // status
  output logic          init_done,
  output logic [CW-1:0] fifo_count,
  output logic [CW-1:0] fifo_max_count,
  output logic          fifo_overflow,
  // event pulses
  output logic          ev_wrap,
  output logic          ev_flush,
  output logic          ev_bypass,
  output logic          ev_stall
);

  // initialiser
  logic          ini_sram_we;
  logic [AW-1:0] ini_sram_addr;
  logic [L-1:0]  ini_sram_data;
  logic          ini_req_valid, ini_req_write;
  logic [AW-1:0] ini_req_addr;
  logic [DW-1:0] ini_req_wdata;
  // SRAM
  logic          sram_rd_en, sram_wr_en;
  logic [AW-1:0] sram_rd_addr, sram_wr_addr;
  logic [L-1:0]  sram_rd_data, sram_wr_data;
  // FIFO
  logic          push, pop, f_empty, f_full, f_nearly_full, f_drop;
  logic [AW-1:0] push_index, f_head;
  // flush controller
  logic          fl_req_valid, fl_req_write;
  logic [AW-1:0] fl_req_addr;
  logic [DW-1:0] fl_req_wdata;

  random_init #(.N(N), .L(L), .DW(DW), .SD_RATIO(SD_RATIO)) u_init (
    .clk, .rst_n, .seed,
    .sram_wr_en     (ini_sram_we),
    .sram_wr_addr   (ini_sram_addr),
    .sram_wr_data   (ini_sram_data),
    .dram_req_valid (ini_req_valid),
    .dram_req_ready (dram_req_ready && !init_done),
    .dram_req_write (ini_req_write),
    .dram_req_addr  (ini_req_addr),
    .dram_req_wdata (ini_req_wdata),
    .done           (init_done)
  );

  counter_update #(.N(N), .L(L)) u_update (
    .clk, .rst_n,
    .inc_valid, .inc_ready, .inc_index,
    .enable           (init_done),
    .fifo_nearly_full (f_nearly_full),
    .init_wr_en       (ini_sram_we),
    .init_wr_addr     (ini_sram_addr),
    .init_wr_data     (ini_sram_data),
    .sram_rd_en, .sram_rd_addr, .sram_rd_data,
    .sram_wr_en, .sram_wr_addr, .sram_wr_data,
    .push_valid       (push),
    .push_index       (push_index),
    .bypass           (ev_bypass),
    .stall            (ev_stall)
  );

  sram_counter_array #(.N(N), .L(L)) u_sram (
    .clk,
    .rd_en   (sram_rd_en),
    .rd_addr (sram_rd_addr),
    .rd_data (sram_rd_data),
    .wr_en   (sram_wr_en),
    .wr_addr (sram_wr_addr),
    .wr_data (sram_wr_data)
  );

  flush_fifo #(.K(K), .W(AW)) u_fifo (
    .clk, .rst_n,
    .push, .push_data (push_index),
    .pop,
    .head        (f_head),
    .empty       (f_empty),
    .full        (f_full),
    .nearly_full (f_nearly_full),
    .count       (fifo_count),
    .max_count   (fifo_max_count),
    .overflow    (f_drop)
  );

  flush_controller #(.N(N), .L(L), .DW(DW), .SD_RATIO(SD_RATIO)) u_flush (
    .clk, .rst_n,
    .fifo_empty     (f_empty),
    .fifo_head      (f_head),
    .fifo_pop       (pop),
    .dram_req_valid (fl_req_valid),
    .dram_req_ready (dram_req_ready && init_done),
    .dram_req_write (fl_req_write),
    .dram_req_addr  (fl_req_addr),
    .dram_req_wdata (fl_req_wdata),
    .dram_rvalid, .dram_rdata,
    .flush_done     (ev_flush)
  );

  // DRAM channel: initialiser first, flush controller afterwards.
  always_comb begin
    if (!init_done) begin
      dram_req_valid = ini_req_valid;
      dram_req_write = ini_req_write;
      dram_req_addr  = ini_req_addr;
      dram_req_wdata = ini_req_wdata;
    end else begin
      dram_req_valid = fl_req_valid;
      dram_req_write = fl_req_write;
      dram_req_addr  = fl_req_addr;
      dram_req_wdata = fl_req_wdata;
    end
  end

  assign ev_wrap = push;

  // Sticky: the FIFO reached its limit and requests were held, or (never
  // expected) a flush request was dropped.
  always_ff @(posedge clk) begin
    if (!rst_n) fifo_overflow <= 1'b0;
    else if (ev_stall || f_drop) fifo_overflow <= 1'b1;
  end

  // The hold on a nearly full FIFO means a push never meets a full one.
  assert property (@(posedge clk) disable iff (!rst_n) push |-> !f_full);

endmodule

// flush_controller: moves wrapped SRAM counters into their DRAM counters.
//
// It takes the index i at the head of the flush FIFO and adds 2^L to the
// DRAM counter B[i] with a read-modify-write over the DRAM request
// channel: read B[i], wait for the data, write B[i] + 2^L. Flushes start
// at most once every SD_RATIO cycles, the speed of the DRAM relative to
// the SRAM (12 in the architecture's main example, giving a FIFO
// departure rate of 1/12); if the DRAM is slower than that, the
// handshake stretches the interval.
//
// DRAM channel (this design's choice): a request is {write, addr, wdata}
// held with dram_req_valid until dram_req_ready; read data returns in
// order on dram_rvalid/dram_rdata, any number of cycles later. Only one
// flush is in flight at a time, so a later flush of the same counter
// always reads the result of the earlier one.
//
// Timing: the FIFO entry is popped in the cycle the flush starts;
// flush_done pulses in the cycle the write request is accepted.
module flush_controller #(
  parameter int unsigned N        = sc_pkg::N_DEFAULT,
  parameter int unsigned L        = sc_pkg::L_DEFAULT,
  parameter int unsigned DW       = sc_pkg::DW_DEFAULT,
  parameter int unsigned SD_RATIO = sc_pkg::SD_RATIO_DEFAULT,
  localparam int unsigned AW = (N > 1) ? $clog2(N) : 1,
  localparam int unsigned GW = (SD_RATIO > 1) ? $clog2(SD_RATIO) : 1
) (
  input  logic          clk,
  input  logic          rst_n,
  // flush FIFO
  input  logic          fifo_empty,
  input  logic [AW-1:0] fifo_head,
  output logic          fifo_pop,
  // DRAM request channel
  output logic          dram_req_valid,
  input  logic          dram_req_ready,
  output logic          dram_req_write,
  output logic [AW-1:0] dram_req_addr,
  output logic [DW-1:0] dram_req_wdata,
  input  logic          dram_rvalid,
  input  logic [DW-1:0] dram_rdata,
  // one pulse per completed flush
  output logic          flush_done
);
  import sc_pkg::*;

  flush_state_e  state;
  logic [AW-1:0] idx;
  logic [DW-1:0] sum;
  logic [GW-1:0] gap;     // cycles left before the next flush may start
  logic          start;

  assign start    = (state == FL_IDLE) && !fifo_empty && (gap == '0);
  assign fifo_pop = start;

  assign dram_req_valid = (state == FL_READ) || (state == FL_WRITE);
  assign dram_req_write = (state == FL_WRITE);
  assign dram_req_addr  = idx;
  assign dram_req_wdata = sum;
  assign flush_done     = (state == FL_WRITE) && dram_req_ready;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state <= FL_IDLE;
      idx   <= '0;
      sum   <= '0;
      gap   <= '0;
    end else begin
      if (start)            gap <= GW'(SD_RATIO - 1);
      else if (gap != '0)   gap <= gap - 1'b1;
      unique case (state)
        FL_IDLE: if (start) begin
          idx   <= fifo_head;
          state <= FL_READ;
        end
        FL_READ:  if (dram_req_ready) state <= FL_WAIT;
        FL_WAIT:  if (dram_rvalid) begin
          sum   <= dram_rdata + (DW'(1) << L);
          state <= FL_WRITE;
        end
        FL_WRITE: if (dram_req_ready) state <= FL_IDLE;
        default:  state <= FL_IDLE;
      endcase
    end
  end

  // A request stays on the channel, unchanged, until it is accepted.
  assert property (@(posedge clk) disable iff (!rst_n)
    dram_req_valid && !dram_req_ready |=>
      dram_req_valid && $stable(dram_req_write) && $stable(dram_req_addr) &&
      $stable(dram_req_wdata));

endmodule

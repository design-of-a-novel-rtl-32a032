// flush_fifo: queue of counter indices waiting to be flushed to DRAM.
//
// When an SRAM counter wraps, its index is pushed here; the flush
// controller pops one index per DRAM update. The architecture asks for a
// small FIFO of a few hundred entries (300 in its main example, about
// 1 KB of 20-bit indices); this is a circular buffer of K entries with a
// first-word-fall-through head.
//
// Timing: push and pop are sampled at the clock edge; head/empty/count
// reflect the state after the last edge. A pop of an empty FIFO is
// ignored. A push into a full FIFO (without a simultaneous pop) is
// dropped and sets the sticky overflow flag: the event whose probability
// the architecture bounds. nearly_full (K-1 or more entries) lets the
// producer hold off in time; max_count records the highest occupancy
// since reset, the queue-size statistic the architecture is evaluated by.
// The organisation and the flags are this design's choice.
module flush_fifo #(
  parameter int unsigned K = sc_pkg::K_DEFAULT,
  parameter int unsigned W = $clog2(sc_pkg::N_DEFAULT),
  localparam int unsigned PW = (K > 1) ? $clog2(K) : 1,
  localparam int unsigned CW = $clog2(K + 1)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          push,
  input  logic [W-1:0]  push_data,
  input  logic          pop,
  output logic [W-1:0]  head,
  output logic          empty,
  output logic          full,
  output logic          nearly_full,
  output logic [CW-1:0] count,
  output logic [CW-1:0] max_count,
  output logic          overflow
);

  logic [W-1:0]  mem [K];
  logic [PW-1:0] rd_ptr, wr_ptr;
  logic          do_push, do_pop;

  assign empty       = (count == '0);
  assign full        = (count == CW'(K));
  assign nearly_full = (count >= CW'(K - 1));
  assign head        = mem[rd_ptr];

  assign do_pop  = pop && !empty;
  assign do_push = push && (!full || do_pop);

  function automatic logic [PW-1:0] next_ptr(input logic [PW-1:0] p);
    return (p == PW'(K - 1)) ? '0 : p + 1'b1;
  endfunction

  always_ff @(posedge clk) begin
    if (do_push) mem[wr_ptr] <= push_data;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      rd_ptr    <= '0;
      wr_ptr    <= '0;
      count     <= '0;
      max_count <= '0;
      overflow  <= 1'b0;
    end else begin
      if (do_push) wr_ptr <= next_ptr(wr_ptr);
      if (do_pop)  rd_ptr <= next_ptr(rd_ptr);
      case ({do_push, do_pop})
        2'b10:   count <= count + 1'b1;
        2'b01:   count <= count - 1'b1;
        default: count <= count;
      endcase
      if (count > max_count) max_count <= count;
      if (push && !do_push) overflow <= 1'b1;
    end
  end

endmodule

// sc_pkg: constants shared by the hybrid SRAM/DRAM statistics counter.
//
// The design keeps N counters. The low L bits of each counter live in a
// fast SRAM array A[], the full-width remainder in a slow DRAM array B[].
// An increment touches only A[i]; when A[i] wraps from 2^L-1 to 0 the
// index i is queued in a small FIFO, and a flush controller later adds 2^L
// to B[i]. At start-up every A[i] is set to a random value in 0..2^L-1 and
// B[i] to -A[i], so the true count of counter i is always B[i] + A[i] plus
// 2^L for each queued copy of i. The randomised start spreads the wraps
// out in time, which keeps the FIFO short whatever the increment pattern.
//
// The default sizes below are the main configuration of the architecture:
// 2^20 counters (512 KB of 4-bit SRAM counters), 64-bit DRAM counters, a
// 300-entry FIFO and a DRAM that is 12 times slower than the SRAM.
package sc_pkg;

  localparam int unsigned N_DEFAULT        = 1 << 20; // number of counters
  localparam int unsigned L_DEFAULT        = 4;       // SRAM counter bits
  localparam int unsigned DW_DEFAULT       = 64;      // DRAM counter bits
  localparam int unsigned K_DEFAULT        = 300;     // FIFO slots
  localparam int unsigned SD_RATIO_DEFAULT = 12;      // SRAM/DRAM speed ratio

  // States of the flush controller's DRAM read-modify-write.
  typedef enum logic [1:0] {
    FL_IDLE  = 2'd0,  // waiting for a FIFO entry and a departure slot
    FL_READ  = 2'd1,  // read request of B[i] outstanding on the channel
    FL_WAIT  = 2'd2,  // waiting for the read data
    FL_WRITE = 2'd3   // write request of B[i] + 2^L outstanding
  } flush_state_e;

endpackage

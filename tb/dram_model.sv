// dram_model: behavioural model of the external DRAM counter array B[].
//
// Not synthesizable logic of the design: it stands in for a commodity
// DRAM in the testbenches. It holds N words of DW bits behind the
// request channel the counter manager drives: a request {write, addr,
// wdata} is taken when req_valid && req_ready; a write updates the word
// at that edge, a read returns the word READ_LAT cycles later on
// rvalid/rdata, in order. With STALL_PCT > 0, req_ready is low at random
// in that share of cycles, to exercise the handshake. Contents start at
// zero; testbenches read mem[] directly to check results.
module dram_model #(
  parameter int unsigned N         = 1 << 20,
  parameter int unsigned DW        = 64,
  parameter int unsigned READ_LAT  = 4,
  parameter int unsigned STALL_PCT = 0,
  localparam int unsigned AW = (N > 1) ? $clog2(N) : 1
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          req_valid,
  output logic          req_ready,
  input  logic          req_write,
  input  logic [AW-1:0] req_addr,
  input  logic [DW-1:0] req_wdata,
  output logic          rvalid,
  output logic [DW-1:0] rdata
);

  logic [DW-1:0] mem [N];
  logic          pv [READ_LAT];
  logic [DW-1:0] pd [READ_LAT];
  int unsigned   reads, writes;

  initial begin
    for (int i = 0; i < int'(N); i++) mem[i] = '0;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) req_ready <= 1'b0;
    else        req_ready <= ($urandom_range(99) >= STALL_PCT);
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int s = 0; s < int'(READ_LAT); s++) begin
        pv[s] <= 1'b0;
        pd[s] <= '0;
      end
      reads  <= 0;
      writes <= 0;
    end else begin
      pv[0] <= req_valid && req_ready && !req_write;
      pd[0] <= mem[req_addr];
      for (int s = 1; s < int'(READ_LAT); s++) begin
        pv[s] <= pv[s-1];
        pd[s] <= pd[s-1];
      end
      if (req_valid && req_ready) begin
        if (req_write) begin
          mem[req_addr] <= req_wdata;
          writes <= writes + 1;
        end else begin
          reads <= reads + 1;
        end
      end
    end
  end

  assign rvalid = pv[READ_LAT-1];
  assign rdata  = pd[READ_LAT-1];

endmodule

// tb_sram_counter_array: random reads and writes against a reference
// array, including reads and writes of the same address at the same edge
// (the old value must come back) and reads that are not enabled (the
// output must hold).
module tb_sram_counter_array;
  localparam int unsigned N = 64, L = 4, AW = 6;
  logic clk = 1'b0;
  logic rd_en, wr_en;
  logic [AW-1:0] rd_addr, wr_addr;
  logic [L-1:0]  rd_data, wr_data, expect_q;
  logic [L-1:0]  ref_mem [N];
  int checks = 0, failures = 0, same_addr = 0;
  logic pending;

  sram_counter_array #(.N(N), .L(L)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rd_en = 0; wr_en = 0; rd_addr = 0; wr_addr = 0; wr_data = 0; pending = 0;
    // fill
    for (int i = 0; i < int'(N); i++) begin
      @(negedge clk);
      wr_en = 1; wr_addr = AW'(i); wr_data = L'($urandom);
      ref_mem[i] = wr_data;
    end
    @(negedge clk); wr_en = 0;
    for (int t = 0; t < 5000; t++) begin
      @(negedge clk);
      if (pending) begin
        checks++;
        if (rd_data !== expect_q) begin
          failures++;
          $display("read mismatch: got %0d expected %0d", rd_data, expect_q);
        end
      end
      rd_en   = ($urandom_range(3) != 0);
      wr_en   = ($urandom_range(1) != 0);
      rd_addr = AW'($urandom_range(N - 1));
      wr_addr = ($urandom_range(3) == 0) ? rd_addr : AW'($urandom_range(N - 1));
      wr_data = L'($urandom);
      if (rd_en) begin
        expect_q = ref_mem[rd_addr];   // read-before-write
        pending  = 1;
        if (wr_en && wr_addr == rd_addr) same_addr++;
      end
      if (wr_en) ref_mem[wr_addr] = wr_data;
    end
    @(negedge clk);
    rd_en = 0; wr_en = 0;
    checks++;
    if (same_addr == 0) failures++;
    // final sweep
    for (int i = 0; i < int'(N); i++) begin
      @(negedge clk); rd_en = 1; rd_addr = AW'(i);
      @(negedge clk); rd_en = 0;
      checks++;
      if (rd_data !== ref_mem[i]) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

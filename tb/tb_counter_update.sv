// tb_counter_update: the increment pipeline with its SRAM array.
// The SRAM is first loaded through the initialiser port with random
// values, then random increments are sent, with runs of the same counter
// (to exercise the bypass) and a randomly asserted FIFO nearly-full flag
// (to exercise the hold). A model of A[] predicts which increments wrap;
// the pushed indices must match in order, and the SRAM contents must
// match the model at the end.
module tb_counter_update;
  localparam int unsigned N = 16, L = 4, AW = 4;
  logic clk = 1'b0, rst_n;
  logic inc_valid, inc_ready, enable, fifo_nearly_full;
  logic [AW-1:0] inc_index;
  logic init_wr_en;
  logic [AW-1:0] init_wr_addr;
  logic [L-1:0]  init_wr_data;
  logic sram_rd_en, sram_wr_en;
  logic [AW-1:0] sram_rd_addr, sram_wr_addr;
  logic [L-1:0]  sram_rd_data, sram_wr_data;
  logic push_valid, bypass, stall;
  logic [AW-1:0] push_index;

  int model [N];
  int exp_push [$];
  int checks = 0, failures = 0, n_bypass = 0, n_stall = 0, n_push = 0, n_acc = 0;

  counter_update #(.N(N), .L(L)) dut (.*);
  sram_counter_array #(.N(N), .L(L)) u_sram (
    .clk, .rd_en(sram_rd_en), .rd_addr(sram_rd_addr), .rd_data(sram_rd_data),
    .wr_en(sram_wr_en), .wr_addr(sram_wr_addr), .wr_data(sram_wr_data));

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // observe accepted requests and pushes at each edge
  always @(posedge clk) if (rst_n) begin
    if (inc_valid && inc_ready) begin
      n_acc++;
      if (model[inc_index] == (1 << L) - 1) begin
        model[inc_index] = 0;
        exp_push.push_back(int'(inc_index));
      end else begin
        model[inc_index]++;
      end
    end
    if (bypass) n_bypass++;
    if (stall) n_stall++;
    if (push_valid) begin
      n_push++;
      checks++;
      if (exp_push.size() == 0) begin
        failures++;
        $display("unexpected push of %0d", push_index);
      end else begin
        int e;
        e = exp_push.pop_front();
        if (e != int'(push_index)) begin
          failures++;
          $display("push %0d expected %0d", push_index, e);
        end
      end
    end
    if (stall) begin
      checks++;
      if (inc_ready) failures++;
    end
  end

  initial begin
    rst_n = 0; inc_valid = 0; inc_index = 0; enable = 0; fifo_nearly_full = 0;
    init_wr_en = 0; init_wr_addr = 0; init_wr_data = 0;
    repeat (3) @(posedge clk);
    @(negedge clk); rst_n = 1;
    for (int i = 0; i < int'(N); i++) begin
      init_wr_en = 1; init_wr_addr = AW'(i); init_wr_data = L'($urandom);
      model[i] = int'(init_wr_data);
      @(negedge clk);
    end
    init_wr_en = 0;
    // not yet enabled: requests must be refused
    inc_valid = 1; inc_index = 3;
    @(negedge clk);
    checks++;
    if (inc_ready) failures++;
    enable = 1;
    for (int t = 0; t < 20000; t++) begin
      inc_valid = ($urandom_range(9) != 0);
      if ($urandom_range(2) != 0) inc_index = AW'($urandom_range(N - 1)); // else repeat
      fifo_nearly_full = ($urandom_range(19) == 0);
      @(negedge clk);
    end
    inc_valid = 0; fifo_nearly_full = 0;
    repeat (3) @(negedge clk);
    checks++;
    if (exp_push.size() != 0) begin
      failures++;
      $display("%0d pushes missing", exp_push.size());
    end
    for (int i = 0; i < int'(N); i++) begin
      checks++;
      if (int'(u_sram.mem[i]) != model[i]) begin
        failures++;
        $display("A[%0d]=%0d model %0d", i, u_sram.mem[i], model[i]);
      end
    end
    checks++;
    if (n_bypass == 0 || n_stall == 0 || n_push == 0) failures++;
    $display("accepted %0d pushes %0d bypasses %0d stalls %0d", n_acc, n_push, n_bypass, n_stall);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

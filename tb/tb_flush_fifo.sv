// tb_flush_fifo: random pushes and pops against a queue model; checks
// head, empty, full, nearly_full, count, the high-water mark and the
// sticky overflow flag when a push meets a full FIFO.
module tb_flush_fifo;
  localparam int unsigned K = 5, W = 8, CW = 3;
  logic clk = 1'b0, rst_n;
  logic push, pop;
  logic [W-1:0] push_data, head;
  logic empty, full, nearly_full, overflow;
  logic [CW-1:0] count, max_count;
  logic [W-1:0] q [$];
  int checks = 0, failures = 0, model_max = 0, fulls = 0;
  logic model_ovf = 0;

  flush_fifo #(.K(K), .W(W)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s (count %0d model %0d)", what, count, q.size());
    end
  endtask

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst_n = 0; push = 0; pop = 0; push_data = 0;
    repeat (3) @(posedge clk);
    @(negedge clk); rst_n = 1;
    for (int t = 0; t < 20000; t++) begin
      @(negedge clk);
      check(count == CW'(q.size()), "count");
      check(empty == (q.size() == 0), "empty");
      check(full == (q.size() == K), "full");
      check(nearly_full == (q.size() >= K - 1), "nearly_full");
      if (q.size() > 0) check(head == q[0], "head");
      check(overflow == model_ovf, "overflow");
      check(max_count <= CW'(model_max), "max_count bound");
      if (q.size() == K) fulls++;
      // bias phases towards filling and draining
      push = ($urandom_range(99) < ((t / 500) % 2 ? 70 : 30));
      pop  = ($urandom_range(99) < ((t / 500) % 2 ? 30 : 70));
      if (t > 15000) pop = ($urandom_range(9) == 0) ? 1'b0 : pop; // some overflow attempts
      push_data = W'($urandom);
      @(posedge clk);
      #1;
      begin
        bit popped, had_room;
        popped = pop && q.size() > 0;
        had_room = q.size() < K || popped;
        if (popped) void'(q.pop_front());
        if (push) begin
          if (had_room) q.push_back(push_data);
          else model_ovf = 1;
        end
        if (q.size() > model_max) model_max = q.size();
      end
    end
    @(negedge clk); push = 0; pop = 0;
    @(negedge clk);
    check(max_count == CW'(model_max), "max_count final");
    check(fulls > 0, "fifo reached full");
    check(model_ovf, "overflow exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

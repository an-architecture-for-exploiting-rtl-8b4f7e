// tb_cp_ready_pool: random pushes and pops; the pool must hand out task
// indices first ready, first served, report full at 512 entries, and keep
// its count.
module tb_cp_ready_pool;
  import mlca_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic push = 0, pop = 0, full, valid;
  logic [TQ_W-1:0] push_tq = '0, head_tq;
  logic [$clog2(POOL_SIZE):0] count;
  logic [TQ_W-1:0] q [$];
  int checks = 0, failures = 0;
  bit seen_full = 0;

  cp_ready_pool dut (.*);

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic step(int push_pct);
    @(negedge clk);
    push = !full && ($urandom_range(99, 0) < push_pct);
    push_tq = TQ_W'($urandom);
    pop = valid && ($urandom_range(99, 0) >= push_pct);
    checks++;
    if (valid != (q.size() != 0) || (valid && head_tq !== q[0])) begin
      failures++; $display("head mismatch");
    end
    @(posedge clk); #1;
    if (pop) void'(q.pop_front());
    if (push) q.push_back(push_tq);
    push = 0; pop = 0;
    if (full) seen_full = 1;
    checks++;
    if (32'(count) != q.size() || full != (q.size() == POOL_SIZE)) begin
      failures++; $display("count %0d expected %0d", count, q.size());
    end
  endtask

  initial begin
    repeat (3) @(negedge clk); rst_n = 1;
    repeat (3000) step(50);
    repeat (1200) step(90);   // fills the pool
    checks++;
    if (!seen_full) begin failures++; $display("pool never full"); end
    repeat (1500) step(10);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

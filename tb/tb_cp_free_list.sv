// tb_cp_free_list: a 64-identifier free list with identifiers 8..63 free
// after reset. Allocates until empty (the first 56 must come out in
// order 8, 9, ...), then allocates and returns identifiers at random.
// Checks that every handed-out identifier is free in the model, that
// returned identifiers come back in return order once the fresh ones are
// used up, and that num_free and avail track the model.
module tb_cp_free_list;
  localparam int N = 64, FIRST = 8, W = 6;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic avail, alloc = 0, free_valid = 0;
  logic [W-1:0] alloc_id, free_id = '0;
  logic [W:0] num_free;
  bit in_use [N];
  logic [W-1:0] held [$];
  logic [W-1:0] ret [$];
  int checks = 0, failures = 0, next_fresh = FIRST;

  cp_free_list #(.N(N), .FIRST(FIRST), .W(W)) dut (.*);

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic step(int alloc_pct);
    int k;
    logic [W-1:0] got;
    @(negedge clk);
    checks++;
    if (32'(num_free) != (N - next_fresh) + ret.size() || avail != (32'(num_free) != 0)) begin
      failures++; $display("num_free %0d", num_free);
    end
    alloc = avail && ($urandom_range(99, 0) < alloc_pct);
    free_valid = (held.size() != 0) && ($urandom_range(99, 0) >= alloc_pct);
    got = alloc_id;
    if (alloc) begin
      checks++;
      if (next_fresh < N) begin
        if (32'(alloc_id) != next_fresh) begin failures++; $display("fresh %0d exp %0d", alloc_id, next_fresh); end
      end else if (alloc_id !== ret[0]) begin
        failures++; $display("recycled %0d exp %0d", alloc_id, ret[0]);
      end
      if (in_use[alloc_id]) begin failures++; $display("double alloc %0d", alloc_id); end
    end
    if (free_valid) begin
      k = $urandom_range(held.size() - 1, 0);
      free_id = held[k];
      held.delete(k);
    end
    @(posedge clk); #1;
    if (alloc) begin
      if (next_fresh < N) next_fresh++; else void'(ret.pop_front());
      in_use[got] = 1;
      held.push_back(got);
    end
    if (free_valid) begin
      in_use[free_id] = 0;
      ret.push_back(free_id);
    end
    alloc = 0; free_valid = 0;
  endtask

  initial begin
    repeat (3) @(negedge clk); rst_n = 1;
    repeat (80) step(100);
    checks++;
    if (avail) begin failures++; $display("still available after %0d", N - FIRST); end
    repeat (3000) step(50);
    repeat (200) step(10);
    repeat (200) step(90);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

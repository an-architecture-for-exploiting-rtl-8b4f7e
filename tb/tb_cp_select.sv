// tb_cp_select: ready tasks flow from a pool model to an issue model with
// random acceptance while PUs are released at random. Checks that each task
// goes, in pool order, to the lowest-numbered free PU, that no PU gets two
// tasks at once, and that pu_tq records the assignment.
module tb_cp_select;
  import mlca_pkg::*;
  localparam int NPU = 8;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic rp_valid, rp_pop, is_valid, is_ready = 0;
  logic [TQ_W-1:0] rp_tq, is_tq;
  logic [2:0] is_pu;
  logic [NPU-1:0] pu_release = '0, pu_busy;
  logic [NPU-1:0][TQ_W-1:0] pu_tq;

  cp_select #(.NUM_PU(NPU)) dut (.*);

  logic [TQ_W-1:0] pool [$], exp [$];
  bit m_busy [NPU];
  int checks = 0, failures = 0, n_assigned = 0;

  assign rp_valid = pool.size() != 0;
  assign rp_tq    = pool.size() != 0 ? pool[0] : '0;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (rst_n) begin
    if (rp_pop) begin
      int low;
      low = -1;
      for (int i = NPU - 1; i >= 0; i--) if (!m_busy[i]) low = i;
      checks++;
      if (low < 0) begin failures++; $display("task taken with no free PU"); end
      else begin
        m_busy[low] = 1;
        exp.push_back(pool[0]);
        #1;
        if (is_pu != 3'(low) || pu_tq[low] != exp[$]) begin
          failures++; $display("assigned PU %0d, expected %0d", is_pu, low);
        end
      end
      void'(pool.pop_front());
    end
  end

  always @(posedge clk) if (rst_n && is_valid && is_ready) begin
    checks++;
    if (is_tq != exp.pop_front()) begin failures++; $display("order"); end
    n_assigned++;
  end

  always @(negedge clk) begin
    is_ready = $urandom_range(2, 0) != 0;
    pu_release = '0;
    for (int i = 0; i < NPU; i++)
      if (pu_busy[i] && $urandom_range(15, 0) == 0 && m_busy[i]) pu_release[i] = 1;
  end

  // a release frees the PU from the next cycle on
  always @(posedge clk) begin
    #2;
    for (int i = 0; i < NPU; i++) if (pu_release[i]) m_busy[i] = 0;
  end

  initial begin
    repeat (3) @(negedge clk); rst_n = 1;
    for (int i = 0; i < 2000; i++) pool.push_back(TQ_W'(i));
    while (pool.size() != 0) @(negedge clk);
    repeat (10) @(negedge clk);
    checks++;
    if (n_assigned != 2000) begin failures++; $display("%0d assigned", n_assigned); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

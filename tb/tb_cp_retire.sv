// tb_cp_retire: tasks in a task-queue model finish in random order; the
// retire unit must release them strictly in program order, only once the
// oldest has finished, return each replaced physical register exactly once
// and in order, and report each task's operand counts to dispatch.
module tb_cp_retire;
  import mlca_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic [TQ_W:0] tq_count;
  logic [TQ_W-1:0] tq_idx;
  tq_entry_t tq_entry;
  logic tq_done, free_valid, ret_valid;
  logic [RING_W-1:0] tq_out_addr;
  logic [PREG_W-1:0] tq_old_preg, free_preg;
  logic [IO_W-1:0] ret_n_in, ret_n_out;
  logic [31:0] retired_count;

  cp_retire dut (.*);

  localparam int NT = 300;
  tq_entry_t m_tq [TQ_SIZE];
  out_opnd_t m_out [RING_SIZE];
  bit m_done [TQ_SIZE];
  logic [PREG_W-1:0] exp_free [$];
  int exp_nin [$], exp_nout [$];
  int checks = 0, failures = 0, in_flight = NT, next_ret = 0;

  assign tq_count    = (TQ_W+1)'(in_flight);
  assign tq_entry    = m_tq[tq_idx];
  assign tq_done     = m_done[tq_idx];
  assign tq_old_preg = m_out[tq_out_addr].old_preg;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (rst_n) begin
    if (free_valid) begin
      checks++;
      if (exp_free.size() == 0 || free_preg != exp_free.pop_front()) begin
        failures++; $display("freed p%0d out of order", free_preg);
      end
    end
    if (ret_valid) begin
      checks++;
      if (!m_done[tq_idx] || tq_idx != TQ_W'(next_ret) || ret_n_in != exp_nin.pop_front() ||
          ret_n_out != exp_nout.pop_front()) begin
        failures++; $display("retired task %0d, expected %0d", tq_idx, next_ret);
      end
      next_ret++;
      #1 in_flight--;
    end
  end

  initial begin
    int order [$];
    int base;
    base = 100;
    foreach (m_out[i]) m_out[i] = out_opnd_t'({11'd0, 11'(i + 3)});
    for (int t = 0; t < NT; t++) begin
      m_tq[t] = '0;
      m_tq[t].hdr.n_in = IO_W'($urandom_range(5, 0));
      m_tq[t].hdr.n_out = IO_W'($urandom_range(4, 0));
      m_tq[t].out_base = RING_W'(base);
      for (int k = 0; k < m_tq[t].hdr.n_out; k++) exp_free.push_back(PREG_W'(base + k + 3));
      exp_nin.push_back(m_tq[t].hdr.n_in);
      exp_nout.push_back(m_tq[t].hdr.n_out);
      base += m_tq[t].hdr.n_out;
      m_done[t] = 0;
      order.push_back(t);
    end
    order.shuffle();
    repeat (3) @(negedge clk); rst_n = 1;
    foreach (order[i]) begin
      repeat ($urandom_range(6, 0)) @(negedge clk);
      m_done[order[i]] = 1;
      // nothing younger than an unfinished task may have retired
      checks++;
      for (int t = 0; t < next_ret; t++) if (!m_done[t]) begin
        failures++; $display("task %0d retired before finishing", t);
      end
    end
    repeat (3000) @(negedge clk);
    checks++;
    if (next_ret != NT || retired_count != NT || exp_free.size() != 0) begin
      failures++; $display("retired %0d of %0d", next_ret, NT);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

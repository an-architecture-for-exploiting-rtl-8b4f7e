// tb_cp_wakeup: dispatches 400 tasks with random input registers, some
// ready and some not, while write-back events make registers ready at
// random times, with random back-pressure from the ready pool. A model of
// the register ready bits checks that every task reaches the ready pool
// exactly once, only when all its inputs are ready, and that every task
// whose inputs all became ready did get there. Also checks that WK_OUT makes
// a register not ready again and that both wake-up paths occur: at
// dispatch (nothing missing) and through a list walk.
module tb_cp_wakeup;
  import mlca_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic dq_valid, dq_pop, wb_valid, wb_pop, rp_push, rp_full = 0, busy;
  wk_msg_t dq_msg;
  logic [PREG_W-1:0] wb_preg;
  logic [TQ_W-1:0] rp_tq;

  cp_wakeup dut (.*);

  wk_msg_t dq [$];
  logic [PREG_W-1:0] wbq [$];
  bit mrdy [NUM_PREG];
  int ins_of [TQ_SIZE][$];
  bit pushed [TQ_SIZE];
  bit ended [TQ_SIZE];
  int checks = 0, failures = 0, n_at_end = 0, n_walk = 0;

  assign dq_valid = dq.size() != 0;
  assign dq_msg   = dq.size() != 0 ? dq[0] : '0;
  assign wb_valid = wbq.size() != 0;
  assign wb_preg  = wbq.size() != 0 ? wbq[0] : '0;

  initial begin
    repeat (300000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(negedge clk) rp_full = $urandom_range(7, 0) == 0;

  always @(posedge clk) if (rst_n) begin
    wk_msg_t m;
    logic [PREG_W-1:0] p;
    // pushes are judged on the state before this cycle's updates
    if (rp_push && !rp_full) begin
      checks++;
      if (pushed[rp_tq] || !ended[rp_tq] && !(dq_pop && dq_msg.kind == WK_END)) begin
        failures++; $display("task %0d pushed twice or before its end", rp_tq);
      end
      foreach (ins_of[rp_tq][i]) if (!mrdy[ins_of[rp_tq][i]]) begin
        failures++; $display("task %0d pushed with input p%0d not ready", rp_tq, ins_of[rp_tq][i]);
      end
      pushed[rp_tq] = 1;
      if (dut.state == 1'b1) n_walk++; else n_at_end++;
    end
    if (wb_pop) begin
      p = wbq[0];
      mrdy[p] = 1;
      #1 void'(wbq.pop_front());
    end else if (dq_pop) begin
      m = dq[0];
      if (m.kind == WK_OUT) mrdy[m.preg] = 0;
      if (m.kind == WK_END) ended[m.tq] = 1;
      #1 void'(dq.pop_front());
    end
  end

  initial begin
    int pending [$];
    for (int i = 0; i < NUM_PREG; i++) mrdy[i] = (i < NUM_AREG);
    repeat (3) @(negedge clk); rst_n = 1;
    // registers 300..363 start not ready; 400..409 are made not ready by WK_OUT
    for (int i = 0; i < 10; i++) dq.push_back('{kind: WK_OUT, tq: '0, preg: PREG_W'(400 + i)});
    while (dq.size() != 0) @(negedge clk);
    for (int p = 300; p < 364; p++) pending.push_back(p);
    for (int p = 400; p < 410; p++) pending.push_back(p);
    pending.shuffle();
    for (int t = 0; t < 400; t++) begin
      int ni;
      dq.push_back('{kind: WK_HDR, tq: TQ_W'(t), preg: '0});
      ni = $urandom_range(5, 0);
      for (int i = 0; i < ni; i++) begin
        int p, r;
        r = $urandom_range(3, 0);
        p = (r == 0) ? $urandom_range(255, 0) : (r == 1 ? $urandom_range(409, 400) : $urandom_range(363, 300));
        ins_of[t].push_back(p);
        dq.push_back('{kind: WK_IN, tq: TQ_W'(t), preg: PREG_W'(p)});
      end
      dq.push_back('{kind: WK_END, tq: TQ_W'(t), preg: '0});
    end
    while (pending.size() != 0) begin
      repeat (15) @(negedge clk);
      wbq.push_back(PREG_W'(pending.pop_front()));
    end
    while (dq.size() != 0 || wbq.size() != 0 || busy) @(negedge clk);
    repeat (20) @(negedge clk);
    for (int t = 0; t < 400; t++) begin
      checks++;
      if (!pushed[t]) begin failures++; $display("task %0d never became ready", t); end
    end
    checks++;
    if (n_at_end == 0 || n_walk == 0) begin failures++; $display("at_end %0d walk %0d", n_at_end, n_walk); end
    $display("ready at dispatch %0d, through walk %0d", n_at_end, n_walk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_cp_dispatch: random renamed tasks through the dispatch unit with
// random back-pressure from the wake-up queue. Checks the task-queue
// entries (index, header, operand-ring bases), the operand-ring writes and
// the wake-up message sequence (header, one per operand, end) against a
// model, that dispatch stops when 512 tasks are in flight, and that it
// continues when the retire side frees an entry.
module tb_cp_dispatch;
  import mlca_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic in_valid, in_pop, tq_we, inr_we, outr_we, wk_valid, wk_ready = 1, ret_valid = 0;
  fe_tok_t in_tok;
  logic [TQ_W-1:0] tq_widx;
  tq_entry_t tq_wentry;
  logic [RING_W-1:0] inr_waddr, outr_waddr;
  logic [PREG_W-1:0] inr_wdata;
  out_opnd_t outr_wdata;
  wk_msg_t wk_msg;
  logic [IO_W-1:0] ret_n_in = '0, ret_n_out = '0;
  logic [TQ_W:0] tq_count;

  cp_dispatch dut (.*);

  fe_tok_t inq [$];
  wk_msg_t exp_wk [$];
  tq_entry_t exp_tq [$];
  logic [RING_W-1:0] exp_in_addr [$], exp_out_addr [$];
  logic [PREG_W-1:0] exp_in_data [$];
  out_opnd_t exp_out_data [$];
  int checks = 0, failures = 0;
  int ntask = 0;
  logic [RING_W-1:0] in_tail = 0, out_tail = 0;

  assign in_valid = inq.size() != 0;
  assign in_tok   = inq.size() != 0 ? inq[0] : '0;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (rst_n && in_pop) #1 void'(inq.pop_front());
  always @(negedge clk) wk_ready = $urandom_range(4, 0) != 0;

  always @(posedge clk) if (rst_n) begin
    if (wk_valid && wk_ready) begin
      checks++;
      if (exp_wk.size() == 0 || wk_msg !== exp_wk[0]) begin
        failures++; $display("wake-up message %p", wk_msg);
      end
      if (exp_wk.size() != 0) void'(exp_wk.pop_front());
    end
    if (tq_we) begin
      checks++;
      if (tq_widx != exp_tq[0].hdr.cr_seq[TQ_W-1:0] || tq_wentry.in_base != exp_tq[0].in_base ||
          tq_wentry.out_base != exp_tq[0].out_base || tq_wentry.hdr.task_id != exp_tq[0].hdr.task_id) begin
        failures++; $display("task queue entry %0d", tq_widx);
      end
      void'(exp_tq.pop_front());
    end
    if (inr_we) begin
      checks++;
      if (inr_waddr != exp_in_addr.pop_front() || inr_wdata != exp_in_data.pop_front()) begin
        failures++; $display("in-ring write");
      end
    end
    if (outr_we) begin
      checks++;
      if (outr_waddr != exp_out_addr.pop_front() || outr_wdata != exp_out_data.pop_front()) begin
        failures++; $display("out-ring write");
      end
    end
  end

  // queue one task: tokens in, expectations out
  task automatic add(int ni, int no);
    fe_tok_t t;
    tq_entry_t e;
    logic [TQ_W-1:0] idx;
    idx = TQ_W'(ntask);
    t = '0; t.kind = TK_HDR; t.hdr.task_id = 16'(ntask); t.hdr.n_in = IO_W'(ni); t.hdr.n_out = IO_W'(no);
    inq.push_back(t);
    e = '0; e.hdr.task_id = 16'(ntask); e.hdr.cr_seq = (TQ_W+1)'(idx); e.in_base = in_tail; e.out_base = out_tail;
    exp_tq.push_back(e);
    exp_wk.push_back('{kind: WK_HDR, tq: idx, preg: '0});
    for (int i = 0; i < ni + no; i++) begin
      t = '0; t.kind = (i < ni) ? TK_IN : TK_OUT;
      t.preg = PREG_W'($urandom); t.old_preg = PREG_W'($urandom);
      inq.push_back(t);
      exp_wk.push_back('{kind: (i < ni) ? WK_IN : WK_OUT, tq: idx, preg: t.preg});
      if (i < ni) begin
        exp_in_addr.push_back(in_tail); exp_in_data.push_back(t.preg); in_tail++;
      end else begin
        exp_out_addr.push_back(out_tail); exp_out_data.push_back('{preg: t.preg, old_preg: t.old_preg}); out_tail++;
      end
    end
    exp_wk.push_back('{kind: WK_END, tq: idx, preg: '0});
    ntask++;
  endtask

  initial begin
    repeat (3) @(negedge clk); rst_n = 1;
    // 513 tasks with 0..3 inputs and 0..3 outputs: the last one must wait
    for (int i = 0; i < 513; i++) add($urandom_range(3, 0), $urandom_range(3, 0));
    repeat (20000) @(negedge clk);
    checks++;
    if (tq_count != 512 || inq.size() == 0 || exp_tq.size() != 1) begin
      failures++; $display("task queue limit: count %0d, left %0d", tq_count, exp_tq.size());
    end
    // retire one task
    ret_valid = 1; ret_n_in = 0; ret_n_out = 0;
    @(negedge clk); ret_valid = 0;
    repeat (100) @(negedge clk);
    checks++;
    if (exp_tq.size() != 0 || exp_wk.size() != 0 || tq_count != 512) begin
      failures++; $display("no progress after a retirement");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

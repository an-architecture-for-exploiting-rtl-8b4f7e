// tb_cp_task_queue: writes random task descriptors and operand-ring
// entries, then reads them back through the issue, write-back and retire
// ports; checks that done is cleared by a new descriptor and set by
// write-back.
module tb_cp_task_queue;
  import mlca_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic tq_we = 0, inr_we = 0, outr_we = 0, done_we = 0, rt_done;
  logic [TQ_W-1:0] tq_widx = '0, done_idx = '0, is_idx = '0, wb_idx = '0, rt_idx = '0;
  tq_entry_t tq_wentry = '0, is_entry, wb_entry, rt_entry;
  logic [RING_W-1:0] inr_waddr = '0, outr_waddr = '0, is_in_addr = '0, wb_out_addr = '0, rt_out_addr = '0;
  logic [PREG_W-1:0] inr_wdata = '0, is_in_preg, wb_out_preg, rt_old_preg;
  out_opnd_t outr_wdata = '0;

  cp_task_queue dut (.*);

  tq_entry_t m_entry [TQ_SIZE];
  logic [PREG_W-1:0] m_in [RING_SIZE];
  out_opnd_t m_out [RING_SIZE];
  bit m_done [TQ_SIZE];
  int checks = 0, failures = 0;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(negedge clk); rst_n = 1;
    for (int i = 0; i < TQ_SIZE; i++) begin
      @(negedge clk);
      tq_we = 1; tq_widx = TQ_W'(i); tq_wentry = tq_entry_t'({$urandom, $urandom, $urandom});
      m_entry[i] = tq_wentry; m_done[i] = 0;
    end
    for (int i = 0; i < RING_SIZE; i++) begin
      @(negedge clk);
      tq_we = 0;
      inr_we = 1; inr_waddr = RING_W'(i); inr_wdata = PREG_W'($urandom); m_in[i] = inr_wdata;
      outr_we = 1; outr_waddr = RING_W'(i); outr_wdata = out_opnd_t'($urandom); m_out[i] = outr_wdata;
    end
    @(negedge clk); inr_we = 0; outr_we = 0;
    for (int n = 0; n < 3000; n++) begin
      @(negedge clk);
      tq_we = 0; done_we = 0;
      if ($urandom_range(3, 0) == 0) begin
        done_we = 1; done_idx = TQ_W'($urandom);
      end else if ($urandom_range(7, 0) == 0) begin
        tq_we = 1; tq_widx = TQ_W'($urandom); tq_wentry = tq_entry_t'({$urandom, $urandom, $urandom});
      end
      is_idx = TQ_W'($urandom); wb_idx = TQ_W'($urandom); rt_idx = TQ_W'($urandom);
      is_in_addr = RING_W'($urandom); wb_out_addr = RING_W'($urandom); rt_out_addr = RING_W'($urandom);
      #1;
      checks++;
      if (is_entry !== m_entry[is_idx] || wb_entry !== m_entry[wb_idx] || rt_entry !== m_entry[rt_idx] ||
          rt_done !== m_done[rt_idx] || is_in_preg !== m_in[is_in_addr] ||
          wb_out_preg !== m_out[wb_out_addr].preg || rt_old_preg !== m_out[rt_out_addr].old_preg) begin
        failures++; $display("read mismatch at step %0d", n);
      end
      @(posedge clk); #1;
      if (tq_we) begin m_entry[tq_widx] = tq_wentry; m_done[tq_widx] = 0; end
      if (done_we && !(tq_we && tq_widx == done_idx)) m_done[done_idx] = 1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

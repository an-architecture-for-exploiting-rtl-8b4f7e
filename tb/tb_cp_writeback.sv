// tb_cp_writeback: eight PU output-queue models hold random sequences of
// outputs (in random order), a CR value and a completion per task. Checks
// that every output lands in the physical register given by the task's
// output list, with a wake-up event for it, that CR values carry the CR
// number and write number of the task, that completion marks the right
// task-queue entry and frees the PU, and that wake-up back-pressure holds
// outputs back without losing them. All queues must be served.
module tb_cp_writeback;
  import mlca_pkg::*;
  localparam int NPU = 8;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic [NPU-1:0] po_valid, po_pop, pu_release;
  pu_out_t [NPU-1:0] po_data;
  logic [NPU-1:0][TQ_W-1:0] pu_tq;
  logic [TQ_W-1:0] tq_idx;
  tq_entry_t tq_entry;
  logic [RING_W-1:0] tq_out_addr;
  logic [PREG_W-1:0] tq_out_preg, prf_waddr, ev_preg;
  logic done_we, cr_wb_valid, prf_we, ev_push, ev_full = 0;
  logic [CR_W-1:0] cr_wb_idx;
  logic [TQ_W:0] cr_wb_seq;
  logic [DATA_W-1:0] cr_wb_data, prf_wdata;
  logic [31:0] out_count;

  cp_writeback #(.NUM_PU(NPU)) dut (.*);

  tq_entry_t m_tq [TQ_SIZE];
  out_opnd_t m_out [RING_SIZE];
  pu_out_t q [NPU][$];
  logic [DATA_W-1:0] exp_prf [NUM_PREG];
  bit exp_set [NUM_PREG];
  int checks = 0, failures = 0, n_done = 0, n_out = 0, n_cr = 0, n_ev_stall = 0;

  for (genvar p = 0; p < NPU; p++) begin : g
    assign pu_tq[p] = TQ_W'(p * 10);
  end

  // queue heads, refreshed whenever the queues change
  function automatic void refresh();
    for (int p = 0; p < NPU; p++) begin
      po_valid[p] = q[p].size() != 0;
      po_data[p]  = q[p].size() != 0 ? q[p][0] : '0;
    end
  endfunction
  assign tq_entry    = m_tq[tq_idx];
  assign tq_out_preg = m_out[tq_out_addr].preg;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(negedge clk) ev_full = $urandom_range(3, 0) == 0;

  always @(posedge clk) if (rst_n) begin
    logic [NPU-1:0] popped;
    popped = po_pop;
    if (po_valid != 0 && ev_full && po_pop == 0) n_ev_stall++;
    for (int p = 0; p < NPU; p++) if (popped[p]) begin
      pu_out_t m;
      tq_entry_t e;
      m = q[p][0];
      e = m_tq[p * 10];
      checks++;
      unique case (m.kind)
        PO_OUT: begin
          n_out++;
          if (!prf_we || !ev_push || ev_full || prf_waddr != m_out[RING_W'(e.out_base + m.idx)].preg ||
              ev_preg != prf_waddr || prf_wdata != m.value) begin
            failures++; $display("output %0d of PU %0d", m.idx, p);
          end
        end
        PO_CR: begin
          n_cr++;
          if (!cr_wb_valid || cr_wb_idx != e.hdr.cr_idx || cr_wb_seq != e.hdr.cr_seq || cr_wb_data != m.value) begin
            failures++; $display("CR of PU %0d", p);
          end
        end
        default: begin
          n_done++;
          if (!done_we || tq_idx != TQ_W'(p * 10) || pu_release != (NPU'(1) << p)) begin
            failures++; $display("done of PU %0d", p);
          end
        end
      endcase
    end
    #1;
    for (int p = 0; p < NPU; p++) if (popped[p]) void'(q[p].pop_front());
    refresh();
  end

  initial begin
    foreach (m_out[i]) m_out[i] = out_opnd_t'($urandom);
    foreach (m_tq[i]) begin
      m_tq[i] = tq_entry_t'({$urandom, $urandom, $urandom});
      m_tq[i].hdr.n_out = 64;
    end
    refresh();
    repeat (3) @(negedge clk); rst_n = 1;
    for (int p = 0; p < NPU; p++) begin
      int order [$];
      order.delete();
      for (int k = 0; k < 40; k++) order.push_back(k);
      order.shuffle();
      foreach (order[k]) q[p].push_back('{kind: PO_OUT, idx: IO_W'(order[k]), value: $urandom});
      q[p].push_back('{kind: PO_CR, idx: '0, value: $urandom});
      q[p].push_back('{kind: PO_DONE, idx: '0, value: '0});
    end
    refresh();
    repeat (1000) @(negedge clk);
    checks++;
    if (n_done != NPU || n_cr != NPU || n_out != 40 * NPU || out_count != 40 * NPU) begin
      failures++; $display("done %0d cr %0d out %0d", n_done, n_cr, n_out);
    end
    checks++;
    if (n_ev_stall == 0) begin failures++; $display("never held back"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

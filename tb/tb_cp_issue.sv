// tb_cp_issue: issues random tasks (0..64 inputs) to random PUs from
// task-queue and register-file models, with PU input queues randomly full.
// Each PU must receive the header word and then the input values in order;
// a new task is accepted only when the previous one is sent; without
// back-pressure a task with n inputs occupies the unit for n + 2 cycles.
module tb_cp_issue;
  import mlca_pkg::*;
  localparam int NPU = 8;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic sel_valid = 0, sel_ready;
  logic [TQ_W-1:0] sel_tq = '0, tq_idx;
  logic [2:0] sel_pu = '0;
  tq_entry_t tq_entry;
  logic [RING_W-1:0] tq_in_addr;
  logic [PREG_W-1:0] tq_in_preg, prf_raddr;
  logic [DATA_W-1:0] prf_rdata, pi_data;
  logic [NPU-1:0] pi_push, pi_full = '0;
  logic [31:0] issued_count;

  cp_issue #(.NUM_PU(NPU)) dut (.*);

  tq_entry_t m_tq [TQ_SIZE];
  logic [PREG_W-1:0] m_in [RING_SIZE];
  logic [DATA_W-1:0] m_prf [NUM_PREG];
  logic [DATA_W-1:0] exp [NPU][$];
  int checks = 0, failures = 0;
  bit bp = 1;

  assign tq_entry   = m_tq[tq_idx];
  assign tq_in_preg = m_in[tq_in_addr];
  assign prf_rdata  = m_prf[prf_raddr];

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(negedge clk) for (int i = 0; i < NPU; i++) pi_full[i] = bp && ($urandom_range(3, 0) == 0);

  always @(posedge clk) if (rst_n) for (int p = 0; p < NPU; p++) if (pi_push[p]) begin
    checks++;
    if (pi_full[p] || exp[p].size() == 0 || pi_data !== exp[p][0]) begin
      failures++; $display("PU %0d got %h", p, pi_data);
    end
    if (exp[p].size() != 0) void'(exp[p].pop_front());
  end

  task automatic issue_one(int t, int pu);
    while (!sel_ready) @(negedge clk);
    sel_valid = 1; sel_tq = TQ_W'(t); sel_pu = 3'(pu);
    exp[pu].push_back(pu_hdr_word(m_tq[t].hdr));
    for (int i = 0; i < m_tq[t].hdr.n_in; i++) exp[pu].push_back(m_prf[m_in[RING_W'(m_tq[t].in_base + i)]]);
    @(negedge clk);
    sel_valid = 0;
  endtask

  initial begin
    int t0, busy;
    foreach (m_prf[i]) m_prf[i] = $urandom;
    foreach (m_in[i]) m_in[i] = PREG_W'($urandom);
    foreach (m_tq[i]) begin
      m_tq[i] = '0;
      m_tq[i].hdr.task_id = 16'($urandom);
      m_tq[i].hdr.n_in = IO_W'($urandom_range(64, 0));
      m_tq[i].hdr.n_out = IO_W'($urandom_range(64, 0));
      m_tq[i].in_base = RING_W'($urandom);
    end
    repeat (3) @(negedge clk); rst_n = 1;
    for (int n = 0; n < 300; n++) issue_one($urandom_range(TQ_SIZE - 1, 0), $urandom_range(NPU - 1, 0));
    while (!sel_ready) @(negedge clk);
    // timing without back-pressure
    bp = 0;
    @(negedge clk);
    m_tq[5].hdr.n_in = 10;
    issue_one(5, 3);
    busy = 1;
    while (!sel_ready) begin @(negedge clk); busy++; end
    checks++;
    if (busy != 12) begin failures++; $display("10-input task took %0d cycles", busy); end
    repeat (5) @(negedge clk);
    for (int p = 0; p < NPU; p++) begin
      checks++;
      if (exp[p].size() != 0) begin failures++; $display("PU %0d missing %0d words", p, exp[p].size()); end
    end
    checks++;
    if (issued_count != 301) begin failures++; $display("issued %0d", issued_count); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

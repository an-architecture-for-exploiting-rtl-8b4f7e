// tb_mlca_cp: end-to-end test of the Control Processor with 8 behavioural PUs.
//
// Runs four control programs on the CP at its default configuration and
// compares every URF register and control register with a sequential
// reference interpreter of the same program (in this file):
//   1. the example loop of tasks A..E (the state of B is carried across
//      iterations, R1 is recycled every iteration, E decides the loop);
//   2. a counter-driven loop of random tasks with 0..20 inputs and 1..12
//      outputs, plus tasks with the maximum 64 inputs and 64 outputs;
//   3. the same kind of loop with long-running tasks with many outputs, so
//      that the free physical registers run out;
//   4. a straight-line run of 640 long tasks, so that the task queue
//      (512 entries) fills up.
// It counts how often each mechanism of the CP occurred (renaming, wake-up
// list walks, out-of-order issue, taken branches, CR waits, stalls on a
// full task queue or an empty free list, register recycling, PU output
// overlapping with execution) and fails if one never did. The task-queue
// and ready-pool throughput is checked against the PU count: with short
// tasks all 8 PUs must at some time be busy at once.
module tb_mlca_cp;
  import mlca_pkg::*, mlca_tb_pkg::*;

  localparam int NPU = 8;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic                      prog_we = 1'b0, start = 1'b0;
  logic [PC_W-1:0]           prog_addr = '0;
  logic [WORD_W-1:0]         prog_wdata = '0;
  logic [NPU-1:0]            pu_in_valid, pu_in_pop, pu_out_push, pu_out_full;
  logic [NPU-1:0][DATA_W-1:0] pu_in_data;
  pu_out_t [NPU-1:0]         pu_out_data;
  logic                      halted, idle;
  logic [31:0]               issued_count, retired_count, wb_out_count;
  logic [AREG_W-1:0]         dbg_areg = '0;
  logic [DATA_W-1:0]         dbg_value, dbg_cr_value;
  logic [CR_W-1:0]           dbg_cr = '0;
  int unsigned               pu_tasks [NPU];
  int unsigned               pu_busy_cyc [NPU];

  mlca_cp dut (
    .clk, .rst_n, .prog_we, .prog_addr, .prog_wdata, .start,
    .pu_in_valid, .pu_in_data, .pu_in_pop, .pu_out_push, .pu_out_data, .pu_out_full,
    .halted, .idle, .issued_count, .retired_count, .wb_out_count,
    .dbg_areg, .dbg_value, .dbg_cr, .dbg_cr_value
  );

  for (genvar p = 0; p < NPU; p++) begin : g_pu
    pu_model #(.ID(p)) u_pu (
      .clk, .in_valid(pu_in_valid[p]), .in_data(pu_in_data[p]), .in_pop(pu_in_pop[p]),
      .out_push(pu_out_push[p]), .out_data(pu_out_data[p]), .out_full(pu_out_full[p]),
      .tasks_run(pu_tasks[p]), .busy_cycles(pu_busy_cyc[p])
    );
  end

  int checks = 0, failures = 0;

  // ---------------- watchdog ----------------
  localparam longint WATCHDOG = 4_000_000;
  initial begin
    repeat (WATCHDOG) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- mechanism counters ----------------
  int unsigned n_walk, n_ready_at_end, n_ooo, n_redirect, n_cr_wait, n_tq_full,
               n_fl_empty, n_recycled, n_overlap, n_all_busy, n_pi_full, n_multiword;
  logic [TQ_W-1:0] last_issued_tq;
  logic            any_issued;

  always @(posedge clk) if (rst_n) begin
    if (dut.u_wakeup.state == 1'b1 && dut.u_wakeup.walk_go) n_walk++;
    if (dut.u_wakeup.take_dq && dut.u_wakeup.end_fire) n_ready_at_end++;
    if (dut.u_issue.state == 2'd0 && dut.sel_valid) begin
      if (any_issued && dut.sel_tq != last_issued_tq + 1'b1) n_ooo++;
      last_issued_tq <= dut.sel_tq;
      any_issued     <= 1'b1;
    end
    if (dut.redirect) n_redirect++;
    if (dut.u_decode.state == 2'd1 && dut.fw_valid && !dut.u_decode.cr_free &&
        dut.u_decode.op inside {OP_JZ, OP_JNZ}) n_cr_wait++;
    if (dut.u_dispatch.state == 2'd0 && dut.rq_empty == 1'b0 && !dut.u_dispatch.tq_room) n_tq_full++;
    if (dut.u_rename.state == 2'd1 && dut.u_rename.cur.kind == TK_OUT && !dut.u_rename.fl_avail) n_fl_empty++;
    if (dut.u_rename.fl_alloc && !dut.u_rename.u_free.use_fresh) n_recycled++;
    if (dut.ev_push && dut.u_wb.msg.kind == PO_OUT &&
        dut.u_tq.done == '0 && dut.tq_count > 1) n_overlap++;
    if (dut.u_select.pu_busy == '1) n_all_busy++;
    if (dut.u_issue.state != 2'd0 && dut.ci_full[dut.u_issue.pu]) n_pi_full++;
    if (dut.u_decode.state == 2'd2 && dut.u_decode.slot == 4'd15 && dut.fw_pop) n_multiword++;
  end

  // ---------------- program construction ----------------
  logic [WORD_W-1:0] prog [$];

  task automatic add_task(logic [15:0] tid, int ins[$], int outs[$], bit crw, int cr);
    int ops[$];
    logic [WORD_W-1:0] w;
    prog.push_back(enc_task(tid, ins.size(), outs.size(), crw, cr));
    ops = {ins, outs};
    w = '0;
    foreach (ops[i]) begin
      w[8*(i%16) +: 8] = 8'(ops[i]);
      if (i % 16 == 15 || i == ops.size() - 1) begin
        prog.push_back(w);
        w = '0;
      end
    end
  endtask

  // ---------------- reference interpreter ----------------
  logic [DATA_W-1:0] ref_urf [NUM_AREG];
  logic [DATA_W-1:0] ref_crf [NUM_CR];
  int unsigned       ref_tasks;

  task automatic ref_run();
    int pc, steps;
    foreach (ref_urf[i]) ref_urf[i] = '0;
    foreach (ref_crf[i]) ref_crf[i] = '0;
    ref_tasks = 0;
    pc = 0;
    steps = 0;
    while (steps < 1_000_000) begin
      logic [WORD_W-1:0] w;
      w = prog[pc];
      steps++;
      unique case (opcode_e'(w[127:124]))
        OP_TASK: begin
          int ni, no, nw;
          vec_t ins;
          int outs [MAX_IO];
          logic [DATA_W-1:0] vals [MAX_IO];
          ni = int'(w[106:100]);
          no = int'(w[99:93]);
          nw = (ni + no + 15) / 16;
          for (int i = 0; i < ni + no; i++) begin
            int r;
            r = int'(prog[pc + 1 + i / 16][8*(i%16) +: 8]);
            if (i < ni) ins[i] = ref_urf[r];
            else        outs[i - ni] = r;
          end
          for (int k = 0; k < no; k++) vals[k] = task_out(w[123:108], ins, ni, k);
          for (int k = 0; k < no; k++) ref_urf[outs[k]] = vals[k];
          if (w[92]) ref_crf[w[91:87]] = task_cr(w[123:108], ins, ni);
          ref_tasks++;
          pc += 1 + nw;
        end
        OP_MOVI: begin ref_crf[w[123:119]] = w[31:0]; pc++; end
        OP_JMPA: pc = int'(w[PC_W-1:0]);
        OP_JZ:   pc = (ref_crf[w[123:119]] == '0) ? int'(w[PC_W-1:0]) : pc + 1;
        OP_JNZ:  pc = (ref_crf[w[123:119]] != '0) ? int'(w[PC_W-1:0]) : pc + 1;
        OP_STOP: break;
        default: pc++;
      endcase
    end
  endtask

  // ---------------- run one program on the DUT ----------------
  task automatic run_program(string name, int max_cycles);
    int cyc;
    int unsigned ret0;
    ret0 = retired_count;
    for (int i = 0; i < prog.size(); i++) begin
      @(negedge clk);
      prog_we = 1'b1; prog_addr = PC_W'(i); prog_wdata = prog[i];
    end
    @(negedge clk);
    prog_we = 1'b0;
    start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    cyc = 0;
    while (!idle && cyc < max_cycles) begin
      @(negedge clk);
      cyc++;
    end
    ref_run();
    checks++;
    if (!idle) begin
      failures++;
      $display("[%s] CP did not finish in %0d cycles (retired %0d)", name, max_cycles, retired_count - ret0);
    end
    checks++;
    if (retired_count - ret0 != ref_tasks) begin
      failures++;
      $display("[%s] retired %0d tasks, expected %0d", name, retired_count - ret0, ref_tasks);
    end
    for (int r = 0; r < NUM_AREG; r++) begin
      dbg_areg = AREG_W'(r);
      #1;
      checks++;
      if (dbg_value !== ref_urf[r]) begin
        failures++;
        if (failures < 20) $display("[%s] R%0d = %h, expected %h", name, r, dbg_value, ref_urf[r]);
      end
    end
    for (int c = 0; c < NUM_CR; c++) begin
      dbg_cr = CR_W'(c);
      #1;
      checks++;
      if (dbg_cr_value !== ref_crf[c]) begin
        failures++;
        $display("[%s] CR%0d = %h, expected %h", name, c, dbg_cr_value, ref_crf[c]);
      end
    end
    $display("[%s] %0d tasks in %0d cycles", name, ref_tasks, cyc);
  endtask

  // ---------------- programs ----------------
  task automatic build_example();
    int loop_test, jz_at;
    prog.delete();
    prog.push_back(enc_movi(1, 32'd1));
    loop_test = prog.size();
    jz_at = prog.size();
    prog.push_back('0);   // patched below
    begin
      int none[$];
      add_task(T_A, none, {1}, 1'b0, 0);
    end
    add_task(T_B, {1, 6}, {2, 6}, 1'b0, 0);
    add_task(T_C, {1, 2}, {3}, 1'b0, 0);
    add_task(T_D, {2}, {4}, 1'b0, 0);
    add_task(T_E, {3, 4}, {5}, 1'b1, 1);
    prog.push_back(enc_jump(OP_JMPA, 0, loop_test));
    prog[jz_at] = enc_jump(OP_JZ, 1, prog.size());
    prog.push_back('0 | (WORD_W'(OP_STOP) << 124));
  endtask

  task automatic build_random(int n_body, int max_in, int max_out, bit big);
    int loop_top;
    prog.delete();
    prog.push_back(enc_movi(3, 32'd0));       // overwritten by the counter task
    loop_top = prog.size();
    for (int t = 0; t < n_body; t++) begin
      int ins[$], outs[$];
      int ni, no;
      if (big && t == 2) begin ni = 64; no = 64; end
      else begin
        ni = int'($urandom_range(max_in, 0));
        no = int'($urandom_range(max_out, 1));
      end
      for (int i = 0; i < ni; i++) ins.push_back(int'($urandom_range(63, 0)));
      for (int i = 0; i < no; i++) outs.push_back(int'($urandom_range(63, 0)));
      add_task(16'(100 + t), ins, outs, ($urandom_range(3, 0) == 0), int'($urandom_range(20, 8)));
    end
    add_task(T_CNT, {200}, {200}, 1'b1, 3);
    prog.push_back(enc_jump(OP_JNZ, 3, loop_top));
    prog.push_back('0 | (WORD_W'(OP_STOP) << 124));
  endtask

  // n tasks without a branch; most have no operands (one word each),
  // every eighth reads and writes a register.
  task automatic build_straight(int n);
    int none[$];
    prog.delete();
    for (int t = 0; t < n; t++) begin
      if (t % 8 == 0) add_task(16'(300 + t), {t % 32}, {(t + 1) % 32}, 1'b0, 0);
      else            add_task(16'(300 + t), none, none, 1'b0, 0);
    end
    prog.push_back('0 | (WORD_W'(OP_STOP) << 124));
  endtask

  initial begin
    void'($urandom(32'd12345));
    repeat (5) @(negedge clk);
    rst_n = 1'b1;
    repeat (5) @(negedge clk);

    // 1. example loop from the architecture description
    loop_iters = 20;
    lat_min = 20; lat_max = 300;
    build_example();
    run_program("example", 200_000);

    // 2. random tasks, short to medium execution time
    rst_n = 1'b0; repeat (3) @(negedge clk); rst_n = 1'b1; repeat (3) @(negedge clk);
    cnt_limit = 12;
    lat_min = 30; lat_max = 600;
    build_random(12, 20, 12, 1'b1);
    run_program("random", 1_000_000);

    // 3. long tasks with many outputs: resources run out
    rst_n = 1'b0; repeat (3) @(negedge clk); rst_n = 1'b1; repeat (3) @(negedge clk);
    cnt_limit = 30;
    lat_min = 3000; lat_max = 9000;
    build_random(16, 4, 16, 1'b1);
    run_program("long", 2_000_000);

    // 4. a long straight-line run of long tasks: the task queue fills
    rst_n = 1'b0; repeat (3) @(negedge clk); rst_n = 1'b1; repeat (3) @(negedge clk);
    lat_min = 2000; lat_max = 6000;
    build_straight(640);
    run_program("straight", 2_000_000);

    // mechanism coverage
    $display("walks=%0d ready_at_dispatch=%0d out_of_order=%0d redirects=%0d cr_waits=%0d",
             n_walk, n_ready_at_end, n_ooo, n_redirect, n_cr_wait);
    $display("tq_full=%0d freelist_empty=%0d recycled=%0d overlap=%0d all_busy=%0d pu_in_full=%0d multiword=%0d",
             n_tq_full, n_fl_empty, n_recycled, n_overlap, n_all_busy, n_pi_full, n_multiword);
    check_seen("wake-up list walk", n_walk);
    check_seen("ready at dispatch", n_ready_at_end);
    check_seen("out-of-order issue", n_ooo);
    check_seen("taken branch", n_redirect);
    check_seen("wait for pending CR", n_cr_wait);
    check_seen("task queue full", n_tq_full);
    check_seen("free list empty", n_fl_empty);
    check_seen("physical register recycled", n_recycled);
    check_seen("output before producer retired", n_overlap);
    check_seen("all PUs busy", n_all_busy);
    check_seen("multi-word operand list", n_multiword);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_seen(string what, int unsigned n);
    checks++;
    if (n == 0) begin
      failures++;
      $display("mechanism never exercised: %s", what);
    end
  endtask
endmodule

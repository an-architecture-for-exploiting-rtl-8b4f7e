// synth_rig: one MLCA system for the synthetic-benchmark testbench: a
// Control Processor with NPU processing units (behavioural models), plus
// the synthetic control program, a sequential reference run of it and a
// result check. Not synthesizable.
//
// Program (built here, identical in every rig): a loop of ITERS
// iterations. Each iteration runs CHAINS independent "filter" tasks
// (R[c] = f(R[c], R[CHAINS+c]), two inputs, one output: data parallelism
// inside an iteration, a chain across iterations), CHAINS/2 "combine"
// tasks that each read two filter results (pipeline parallelism between
// the two groups), and a counter task that writes the control register
// tested by the loop branch. That gives 2 inputs and 1 output per task on
// average, as in the benchmark the architecture was evaluated with.
//
// Interface: pulse `go` (at a falling edge) to reset the system, load the
// program and run it; `done` rises when the CP is idle, `cycles` then holds
// the run time from start to idle, and `checks`/`failures` count the
// comparison of every URF register and control register with the
// reference run. `util` is the PU utilization of the run: the cycles the
// PUs spent executing tasks over NPU times the run time. The PU execution
// time is taken from mlca_tb_pkg.
module synth_rig
  import mlca_pkg::*, mlca_tb_pkg::*;
#(
  parameter int NPU    = 8,
  parameter int CHAINS = 16,
  parameter int ITERS  = 6
) (
  input  logic        clk,
  input  logic        go,
  output logic        done,
  output int unsigned cycles,
  output int unsigned checks,
  output int unsigned failures,
  output real         util
);
  logic                      rst_n = 1'b0;
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

  mlca_cp #(.NUM_PU(NPU)) u_cp (
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

  // ---------------- program ----------------
  logic [WORD_W-1:0] prog [$];
  localparam int R_CNT = 200;   // loop counter register
  localparam int CR_LOOP = 2;

  function automatic void add_task(logic [15:0] tid, int ins[$], int outs[$], bit crw, int cr);
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
  endfunction

  function automatic void build();
    int top;
    prog.delete();
    top = 0;
    for (int c = 0; c < CHAINS; c++)
      add_task(16'(400 + c), {c, CHAINS + c}, {c}, 1'b0, 0);
    for (int c = 0; c < CHAINS / 2; c++)
      add_task(16'(500 + c), {2 * c, 2 * c + 1}, {2 * CHAINS + c}, 1'b0, 0);
    add_task(T_CNT, {R_CNT}, {R_CNT}, 1'b1, CR_LOOP);
    prog.push_back(enc_jump(OP_JNZ, CR_LOOP, top));
    prog.push_back('0 | (WORD_W'(OP_STOP) << 124));
  endfunction

  // ---------------- reference run ----------------
  logic [DATA_W-1:0] ref_urf [NUM_AREG];
  logic [DATA_W-1:0] ref_crf [NUM_CR];

  function automatic void ref_run();
    int pc;
    foreach (ref_urf[i]) ref_urf[i] = '0;
    foreach (ref_crf[i]) ref_crf[i] = '0;
    pc = 0;
    for (int steps = 0; steps < 100_000; steps++) begin
      logic [WORD_W-1:0] w;
      w = prog[pc];
      if (opcode_e'(w[127:124]) == OP_STOP) break;
      unique case (opcode_e'(w[127:124]))
        OP_TASK: begin
          int ni, no, o;
          vec_t ins;
          logic [DATA_W-1:0] v;
          ni = int'(w[106:100]);
          no = int'(w[99:93]);
          for (int i = 0; i < ni; i++) ins[i] = ref_urf[prog[pc + 1 + i / 16][8*(i%16) +: 8]];
          for (int k = 0; k < no; k++) begin
            o = int'(prog[pc + 1 + (ni + k) / 16][8*((ni + k)%16) +: 8]);
            v = task_out(w[123:108], ins, ni, k);
            ref_urf[o] = v;
          end
          if (w[92]) ref_crf[w[91:87]] = task_cr(w[123:108], ins, ni);
          pc += 1 + (ni + no + 15) / 16;
        end
        OP_JNZ:  pc = (ref_crf[w[123:119]] != '0) ? int'(w[PC_W-1:0]) : pc + 1;
        default: pc++;
      endcase
    end
  endfunction

  // ---------------- run on request ----------------
  function automatic longint busy_sum();
    longint b;
    b = 0;
    for (int p = 0; p < NPU; p++) b += longint'(pu_busy_cyc[p]);
    return b;
  endfunction

  initial begin
    longint busy0;
    done = 1'b0; cycles = 0; checks = 0; failures = 0; util = 0.0;
    forever begin
      @(negedge clk);
      if (go) begin
        done = 1'b0;
        rst_n = 1'b0;
        repeat (3) @(negedge clk);
        rst_n = 1'b1;
        repeat (2) @(negedge clk);
        build();
        foreach (prog[i]) begin
          prog_we = 1'b1; prog_addr = PC_W'(i); prog_wdata = prog[i];
          @(negedge clk);
        end
        prog_we = 1'b0;
        busy0 = busy_sum();
        start = 1'b1;
        @(negedge clk);
        start = 1'b0;
        cycles = 1;
        while (!idle) begin
          @(negedge clk);
          cycles++;
        end
        util = real'(busy_sum() - busy0) / (real'(NPU) * real'(cycles));
        ref_run();
        for (int r = 0; r < NUM_AREG; r++) begin
          dbg_areg = AREG_W'(r);
          #1;
          checks++;
          if (dbg_value !== ref_urf[r]) begin
            failures++;
            $display("NPU=%0d: R%0d = %h, expected %h", NPU, r, dbg_value, ref_urf[r]);
          end
        end
        for (int c = 0; c < NUM_CR; c++) begin
          dbg_cr = CR_W'(c);
          #1;
          checks++;
          if (dbg_cr_value !== ref_crf[c]) begin
            failures++;
            $display("NPU=%0d: CR%0d = %h, expected %h", NPU, c, dbg_cr_value, ref_crf[c]);
          end
        end
        done = 1'b1;
      end
    end
  end
endmodule

// tb_mlca_synthetic: speed-up of the MLCA system on a synthetic benchmark
// for 1, 4, 8 and 16 processing units and several average task execution
// times, run on four copies of the system (synth_rig).
//
// The relative speed-up is the run time on one PU divided by the run time
// on N PUs. With long tasks (1061 and 530 cycles on average) the CP keeps
// the PUs busy and the speed-up is limited by the program's parallelism;
// as tasks get shorter the CP becomes the limit (renaming takes 3 cycles
// per register, issue is one task at a time), and the speed-up with 16
// PUs falls well below that with long tasks, while 4 PUs hardly suffer.
// Checks: every run gives the same register and CR values as a sequential
// reference run; the speed-up for long tasks is at least 0.75*N for 4 and
// 8 PUs and grows from 8 to 16 PUs; for 16 PUs it drops when the task time
// falls from 1061 to 66 cycles. PU utilization (share of PU time spent
// executing tasks) must exceed 95 % on 1 PU and 85 % on 8 PUs with long
// tasks, and drop for 16 PUs with short ones. The measured speed-ups and
// utilizations are printed.
// Execution times vary by +-10 % around the average.
module tb_mlca_synthetic;
  import mlca_pkg::*, mlca_tb_pkg::*;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  localparam int NCFG = 4;
  localparam int NLAT = 4;
  localparam int PUS  [NCFG] = '{1, 4, 8, 16};
  localparam int LATS [NLAT] = '{1061, 530, 132, 66};

  logic        go [NCFG];
  logic        done [NCFG];
  int unsigned cycles [NCFG], rchecks [NCFG], rfails [NCFG];
  real         util [NCFG];

  for (genvar i = 0; i < NCFG; i++) begin : g_rig
    synth_rig #(.NPU(PUS[i])) u_rig (
      .clk, .go(go[i]), .done(done[i]), .cycles(cycles[i]),
      .checks(rchecks[i]), .failures(rfails[i]), .util(util[i])
    );
  end

  int checks = 0, failures = 0;
  real speedup [NLAT][NCFG];
  real pu_util [NLAT][NCFG];

  initial begin
    repeat (3_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    void'($urandom(32'd777));
    foreach (go[i]) go[i] = 1'b0;
    cnt_limit = 6;
    repeat (3) @(negedge clk);
    for (int l = 0; l < NLAT; l++) begin
      lat_min = LATS[l] * 9 / 10;
      lat_max = LATS[l] * 11 / 10;
      for (int i = 0; i < NCFG; i++) begin
        go[i] = 1'b1;
        @(negedge clk);
        go[i] = 1'b0;
        @(negedge clk);
        while (!done[i]) @(negedge clk);
        checks   += int'(rchecks[i]);
        failures += int'(rfails[i]);
        speedup[l][i] = real'(cycles[0]) / real'(cycles[i]);
        pu_util[l][i] = util[i];
        $display("task time %0d cc, %2d PUs: %0d cycles, speed-up %0.2f, PU utilization %0.1f %%",
                 LATS[l], PUS[i], cycles[i], speedup[l][i], 100.0 * util[i]);
      end
    end
    check(speedup[0][1] >= 0.75 * 4, "4 PUs, long tasks: speed-up below 3");
    check(speedup[0][2] >= 0.75 * 8, "8 PUs, long tasks: speed-up below 6");
    check(speedup[0][3] > speedup[0][2], "16 PUs not faster than 8 PUs with long tasks");
    check(speedup[NLAT-1][3] < 0.8 * speedup[0][3], "16 PUs: short tasks do not lower the speed-up");
    check(speedup[NLAT-1][1] > 0.8 * speedup[0][1], "4 PUs: short tasks lower the speed-up too much");
    check(pu_util[0][0] > 0.95, "1 PU, long tasks: PU utilization below 95 %");
    check(pu_util[0][2] > 0.85, "8 PUs, long tasks: PU utilization below 85 %");
    check(pu_util[NLAT-1][3] < pu_util[0][3], "16 PUs: utilization does not drop with short tasks");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

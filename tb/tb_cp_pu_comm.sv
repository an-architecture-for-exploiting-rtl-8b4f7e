// tb_cp_pu_comm: random traffic through all eight PU input and output
// queues at once, with random reads; every queue must deliver its words in
// order, independently of the others, and report full at its depth.
module tb_cp_pu_comm;
  import mlca_pkg::*;
  localparam int NPU = 8;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic [NPU-1:0] ci_push = '0, ci_full, co_valid, co_pop = '0, pu_in_valid, pu_in_pop = '0, pu_out_push = '0, pu_out_full;
  logic [DATA_W-1:0] ci_data = '0;
  pu_out_t [NPU-1:0] co_data, pu_out_data = '0;
  logic [NPU-1:0][DATA_W-1:0] pu_in_data;

  cp_pu_comm #(.NUM_PU(NPU)) dut (.*);

  logic [DATA_W-1:0] mi [NPU][$];
  pu_out_t mo [NPU][$];
  int checks = 0, failures = 0;
  bit seen_full = 0;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(negedge clk); rst_n = 1;
    for (int n = 0; n < 6000; n++) begin
      @(negedge clk);
      // check heads and flags
      for (int p = 0; p < NPU; p++) begin
        checks++;
        if (pu_in_valid[p] != (mi[p].size() != 0) || (pu_in_valid[p] && pu_in_data[p] !== mi[p][0]) ||
            co_valid[p] != (mo[p].size() != 0) || (co_valid[p] && co_data[p] !== mo[p][0]) ||
            ci_full[p] != (mi[p].size() == 128) || pu_out_full[p] != (mo[p].size() == 64)) begin
          failures++; $display("queue %0d mismatch at %0d", p, n);
        end
        if (ci_full[p]) seen_full = 1;
      end
      ci_push = '0; co_pop = '0; pu_in_pop = '0; pu_out_push = '0;
      ci_data = $urandom;
      begin
        int p;
        p = $urandom_range(NPU - 1, 0);
        if (!ci_full[p] && $urandom_range(9, 0) < ((n < 3000) ? 8 : 3)) ci_push[p] = 1;
      end
      for (int p = 0; p < NPU; p++) begin
        pu_out_data[p] = pu_out_t'({$urandom, $urandom});
        if (!pu_out_full[p] && $urandom_range(1, 0)) pu_out_push[p] = 1;
        if (pu_in_valid[p] && $urandom_range((n < 3000) ? 39 : 3, 0) == 0) pu_in_pop[p] = 1;
        if (co_valid[p] && $urandom_range(1, 0)) co_pop[p] = 1;
      end
      @(posedge clk); #1;
      for (int p = 0; p < NPU; p++) begin
        if (pu_in_pop[p]) void'(mi[p].pop_front());
        if (co_pop[p]) void'(mo[p].pop_front());
        if (ci_push[p]) mi[p].push_back(ci_data);
        if (pu_out_push[p]) mo[p].push_back(pu_out_data[p]);
      end
    end
    checks++;
    if (!seen_full) begin failures++; $display("input queue never full"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

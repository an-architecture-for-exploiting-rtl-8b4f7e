// pu_model: behavioural processing unit for testbenches (not synthesizable).
//
// Stands in for a soft processor running the monitor program: it takes a
// task header and the input values from its input queue, "executes" the
// task for a random time, and writes every output, in a random order at
// random moments during that time, then its control-register value (if the
// task writes one) and a completion message to its output queue.
// Signals change on the falling clock edge.
module pu_model
  import mlca_pkg::*, mlca_tb_pkg::*;
#(
  parameter int ID = 0
) (
  input  logic              clk,
  input  logic              in_valid,
  input  logic [DATA_W-1:0] in_data,
  output logic              in_pop,
  output logic              out_push,
  output pu_out_t           out_data,
  input  logic              out_full,
  output int unsigned       tasks_run,
  output int unsigned       busy_cycles
);
  vec_t            ins;
  logic [15:0]     tid;
  logic            crw;
  int              n_in, n_out;
  int              order [MAX_IO];

  initial begin
    in_pop      = 1'b0;
    out_push    = 1'b0;
    out_data    = '0;
    tasks_run   = 0;
    busy_cycles = 0;
    forever begin
      // header
      @(negedge clk);
      while (!in_valid) @(negedge clk);
      tid   = in_data[31:16];
      crw   = in_data[15];
      n_in  = int'(in_data[14:8]);
      n_out = int'(in_data[6:0]);
      in_pop = 1'b1;
      @(negedge clk);
      in_pop = 1'b0;
      for (int i = 0; i < n_in; i++) begin
        while (!in_valid) @(negedge clk);
        ins[i] = in_data;
        in_pop = 1'b1;
        @(negedge clk);
        in_pop = 1'b0;
      end
      // outputs in random order, spread over the execution time
      for (int i = 0; i < n_out; i++) order[i] = i;
      for (int i = n_out - 1; i > 0; i--) begin
        int j, t;
        j = int'($urandom_range(i, 0));
        t = order[i]; order[i] = order[j]; order[j] = t;
      end
      begin
        int unsigned lat, gap;
        lat = $urandom_range(lat_max, lat_min);
        gap = lat / (n_out + 1);
        for (int i = 0; i < n_out; i++) begin
          repeat (gap) @(negedge clk);
          send('{kind: PO_OUT, idx: IO_W'(order[i]), value: task_out(tid, ins, n_in, order[i])});
        end
        repeat (gap) @(negedge clk);
        busy_cycles += lat;
      end
      if (crw) send('{kind: PO_CR, idx: '0, value: task_cr(tid, ins, n_in)});
      send('{kind: PO_DONE, idx: '0, value: 32'(ID)});
      tasks_run++;
    end
  end

  task automatic send(pu_out_t m);
    while (out_full) @(negedge clk);
    out_data = m;
    out_push = 1'b1;
    @(negedge clk);
    out_push = 1'b0;
  endtask
endmodule

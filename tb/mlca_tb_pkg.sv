// mlca_tb_pkg: task functions executed by the behavioural PUs of the
// testbenches, and the latency settings of those PUs.
//
// The same functions are used by the sequential reference interpreter in
// the testbench, so the parallel run on the CP can be compared value for
// value with a plain in-order execution of the control program.
package mlca_tb_pkg;
  import mlca_pkg::*;

  // Task IDs of the example program (loop of tasks A..E).
  localparam logic [15:0] T_A = 16'd1, T_B = 16'd2, T_C = 16'd3, T_D = 16'd4, T_E = 16'd5;
  localparam logic [15:0] T_CNT = 16'd6;   // loop counter task
  int unsigned loop_iters = 20;            // iterations of the example loop
  int unsigned cnt_limit  = 10;            // iterations of counter-driven loops

  // PU execution time range, in cycles.
  int unsigned lat_min = 20;
  int unsigned lat_max = 300;

  typedef logic [DATA_W-1:0] vec_t [MAX_IO];

  function automatic logic [DATA_W-1:0] mix(logic [DATA_W-1:0] a, logic [DATA_W-1:0] b);
    return (a ^ (b + 32'h9e37_79b9)) * 32'd33 + 32'd7;
  endfunction

  function automatic logic [DATA_W-1:0] task_out(logic [15:0] tid, vec_t ins, int n_in, int k);
    logic [DATA_W-1:0] h;
    unique case (tid)
      T_A:   return 32'd17;
      T_B:   return (k == 0) ? ins[0] + 32'd3 * ins[1] : ins[1] + 32'd1;
      T_C:   return (ins[0] ^ ins[1]) * 32'd5;
      T_D:   return ins[0] + 32'd100;
      T_E:   return ins[0] + ins[1];
      T_CNT: return ins[0] + 32'd1;
      default: begin
        h = {tid, 16'(k)};
        for (int i = 0; i < n_in; i++) h = mix(h, ins[i]);
        return h;
      end
    endcase
  endfunction

  function automatic logic [DATA_W-1:0] task_cr(logic [15:0] tid, vec_t ins, int n_in);
    logic [DATA_W-1:0] h;
    unique case (tid)
      // E sees R4 = 17 + 3*i + 100 in iteration i (0-based)
      T_E:   return ((ins[1] - 32'd117) / 32'd3 + 32'd1 < loop_iters) ? 32'd1 : 32'd0;
      T_CNT: return (ins[0] + 32'd1 < cnt_limit) ? 32'd1 : 32'd0;
      default: begin
        h = {tid, 16'hc0de};
        for (int i = 0; i < n_in; i++) h = mix(h, ins[i]);
        return h;
      end
    endcase
  endfunction
endpackage

// cp_select: select-and-assign unit of the dynamic scheduler.
//
// It keeps a busy bit per PU. When the ready pool is not empty, a PU is
// free and the issue unit can take a request, it takes the oldest ready
// task and assigns it to the free PU with the lowest number, records which
// task runs on that PU (pu_tq, read by the write-back unit) and hands the
// pair to the issue unit (valid/ready). A PU becomes free again when the
// write-back unit has seen its task finish (pu_release). The
// lowest-number choice of PU is this design's own.
module cp_select
  import mlca_pkg::*;
#(
  parameter int NUM_PU = 8
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              rp_valid,
  input  logic [TQ_W-1:0]   rp_tq,
  output logic              rp_pop,
  output logic              is_valid,
  output logic [TQ_W-1:0]   is_tq,
  output logic [((NUM_PU > 1) ? $clog2(NUM_PU) : 1)-1:0] is_pu,
  input  logic              is_ready,
  input  logic [NUM_PU-1:0] pu_release,
  output logic [NUM_PU-1:0] pu_busy,
  output logic [NUM_PU-1:0][TQ_W-1:0] pu_tq
);
  localparam int PW = ((NUM_PU > 1) ? $clog2(NUM_PU) : 1);

  logic          any_free;
  logic [PW-1:0] free_pu;

  always_comb begin
    any_free = 1'b0;
    free_pu  = '0;
    for (int i = NUM_PU - 1; i >= 0; i--) begin
      if (!pu_busy[i]) begin
        any_free = 1'b1;
        free_pu  = PW'(i);
      end
    end
  end

  assign rp_pop = rp_valid && any_free && (!is_valid || is_ready);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pu_busy  <= '0;
      is_valid <= 1'b0;
      is_tq    <= '0;
      is_pu    <= '0;
      pu_tq    <= '0;
    end else begin
      if (is_valid && is_ready) is_valid <= 1'b0;
      if (rp_pop) begin
        is_valid       <= 1'b1;
        is_tq          <= rp_tq;
        is_pu          <= free_pu;
        pu_tq[free_pu] <= rp_tq;
      end
      for (int i = 0; i < NUM_PU; i++) begin
        if (rp_pop && free_pu == PW'(i)) pu_busy[i] <= 1'b1;
        else if (pu_release[i])          pu_busy[i] <= 1'b0;
      end
    end
  end

  a_release_busy: assert property (@(posedge clk) disable iff (!rst_n)
    (pu_release & ~pu_busy) == '0);
endmodule

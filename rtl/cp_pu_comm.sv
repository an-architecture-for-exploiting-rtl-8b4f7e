// cp_pu_comm: CP-PU communication, one input and one output queue per PU.
//
// The issue unit writes task headers and input values into a PU's input
// queue (ci_*); the PU reads them (pu_in_*). The PU writes its outputs,
// its control-register value and its completion into its output queue
// (pu_out_*); the write-back unit reads them (co_*). Every queue is a
// separate FIFO, so each maps onto its own FPGA memory block. IN_DEPTH
// holds a header and the largest number of inputs; both depths are this
// design's choices.
module cp_pu_comm
  import mlca_pkg::*;
#(
  parameter int NUM_PU    = 8,
  parameter int IN_DEPTH  = 128,
  parameter int OUT_DEPTH = 64
) (
  input  logic              clk,
  input  logic              rst_n,
  // CP side
  input  logic [NUM_PU-1:0] ci_push,
  input  logic [DATA_W-1:0] ci_data,
  output logic [NUM_PU-1:0] ci_full,
  output logic [NUM_PU-1:0] co_valid,
  output pu_out_t [NUM_PU-1:0] co_data,
  input  logic [NUM_PU-1:0] co_pop,
  // PU side
  output logic [NUM_PU-1:0] pu_in_valid,
  output logic [NUM_PU-1:0][DATA_W-1:0] pu_in_data,
  input  logic [NUM_PU-1:0] pu_in_pop,
  input  logic [NUM_PU-1:0] pu_out_push,
  input  pu_out_t [NUM_PU-1:0] pu_out_data,
  output logic [NUM_PU-1:0] pu_out_full
);
  for (genvar p = 0; p < NUM_PU; p++) begin : g_pu
    logic in_empty, out_empty;
    logic [$clog2(IN_DEPTH):0]  in_count;
    logic [$clog2(OUT_DEPTH):0] out_count;

    sync_fifo #(.T(logic [DATA_W-1:0]), .DEPTH(IN_DEPTH)) u_in (
      .clk, .rst_n, .clear(1'b0),
      .wr_en(ci_push[p]), .wr_data(ci_data),
      .rd_en(pu_in_pop[p]), .rd_data(pu_in_data[p]),
      .full(ci_full[p]), .empty(in_empty), .count(in_count)
    );
    assign pu_in_valid[p] = !in_empty;

    sync_fifo #(.T(pu_out_t), .DEPTH(OUT_DEPTH)) u_out (
      .clk, .rst_n, .clear(1'b0),
      .wr_en(pu_out_push[p]), .wr_data(pu_out_data[p]),
      .rd_en(co_pop[p]), .rd_data(co_data[p]),
      .full(pu_out_full[p]), .empty(out_empty), .count(out_count)
    );
    assign co_valid[p] = !out_empty;
  end
endmodule

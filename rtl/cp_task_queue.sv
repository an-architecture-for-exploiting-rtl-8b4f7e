// cp_task_queue: the task queue, holding every task instruction in flight.
//
// Like a reorder buffer it is a circular buffer of TQ_SIZE task descriptors
// in program order: the dispatch unit writes entries at the tail, the retire
// unit removes them at the head. Alongside it are two operand rings that
// hold each task's renamed input registers and its output registers (new
// and previous physical register). Per entry the queue also records whether
// the task has finished.
// Writers: dispatch (descriptor, operand lists; clears done), write-back
// (done). Readers: issue (descriptor, inputs), write-back (descriptor,
// output registers), retire (descriptor, done, previous registers). Each reader has its own combinational read port;
// on an FPGA each such port is a replica of the array, so that no memory
// needs more than one write and one read port.
module cp_task_queue
  import mlca_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  // dispatch writes
  input  logic              tq_we,
  input  logic [TQ_W-1:0]   tq_widx,
  input  tq_entry_t         tq_wentry,
  input  logic              inr_we,
  input  logic [RING_W-1:0] inr_waddr,
  input  logic [PREG_W-1:0] inr_wdata,
  input  logic              outr_we,
  input  logic [RING_W-1:0] outr_waddr,
  input  out_opnd_t         outr_wdata,
  // write-back writes
  input  logic              done_we,
  input  logic [TQ_W-1:0]   done_idx,
  // issue read port
  input  logic [TQ_W-1:0]   is_idx,
  output tq_entry_t         is_entry,
  input  logic [RING_W-1:0] is_in_addr,
  output logic [PREG_W-1:0] is_in_preg,
  // write-back read port
  input  logic [TQ_W-1:0]   wb_idx,
  output tq_entry_t         wb_entry,
  input  logic [RING_W-1:0] wb_out_addr,
  output logic [PREG_W-1:0] wb_out_preg,
  // retire read port
  input  logic [TQ_W-1:0]   rt_idx,
  output tq_entry_t         rt_entry,
  output logic              rt_done,
  input  logic [RING_W-1:0] rt_out_addr,
  output logic [PREG_W-1:0] rt_old_preg
);
  tq_entry_t         entry  [TQ_SIZE];
  logic [TQ_SIZE-1:0] done;
  logic [PREG_W-1:0] in_ring  [RING_SIZE];
  out_opnd_t         out_ring [RING_SIZE];

  always_ff @(posedge clk) begin
    if (tq_we)   entry[tq_widx]       <= tq_wentry;
    if (inr_we)  in_ring[inr_waddr]   <= inr_wdata;
    if (outr_we) out_ring[outr_waddr] <= outr_wdata;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) done <= '0;
    else begin
      if (tq_we)   done[tq_widx]   <= 1'b0;
      if (done_we) done[done_idx]  <= 1'b1;
    end
  end

  assign is_entry    = entry[is_idx];
  assign is_in_preg  = in_ring[is_in_addr];
  assign wb_entry    = entry[wb_idx];
  assign wb_out_preg = out_ring[wb_out_addr].preg;
  assign rt_entry    = entry[rt_idx];
  assign rt_done     = done[rt_idx];
  assign rt_old_preg = out_ring[rt_out_addr].old_preg;

  a_no_done_on_new: assert property (@(posedge clk) disable iff (!rst_n)
    !(tq_we && done_we && tq_widx == done_idx));
endmodule

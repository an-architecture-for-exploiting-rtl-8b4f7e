// cp_writeback: write-back unit of the task execution unit.
//
// Serves the PU output queues round robin, one message per cycle. A task
// may write its outputs at any time during its execution and in any order:
// an output message (PO_OUT, argument number, value) is mapped through the
// task's output list in the task queue to its physical register, written
// into the physical register file and reported to the wake-up unit
// (ev_*), so waiting tasks can start while the producer still runs.
// PO_CR passes the task's control-register value, with the CR number and
// write sequence number from its descriptor, to the decode unit.
// PO_DONE marks the task finished and frees its PU. The PU must send all
// its outputs before PO_DONE; the queue keeps that order.
module cp_writeback
  import mlca_pkg::*;
#(
  parameter int NUM_PU = 8
) (
  input  logic              clk,
  input  logic              rst_n,
  // PU output queues
  input  logic [NUM_PU-1:0] po_valid,
  input  pu_out_t [NUM_PU-1:0] po_data,
  output logic [NUM_PU-1:0] po_pop,
  input  logic [NUM_PU-1:0][TQ_W-1:0] pu_tq,
  // task queue
  output logic [TQ_W-1:0]   tq_idx,
  input  tq_entry_t         tq_entry,
  output logic [RING_W-1:0] tq_out_addr,
  input  logic [PREG_W-1:0] tq_out_preg,
  output logic              done_we,
  // control register value to decode
  output logic              cr_wb_valid,
  output logic [CR_W-1:0]   cr_wb_idx,
  output logic [TQ_W:0]     cr_wb_seq,
  output logic [DATA_W-1:0] cr_wb_data,
  // physical register file
  output logic              prf_we,
  output logic [PREG_W-1:0] prf_waddr,
  output logic [DATA_W-1:0] prf_wdata,
  // wake-up events
  output logic              ev_push,
  output logic [PREG_W-1:0] ev_preg,
  input  logic              ev_full,
  // scheduler
  output logic [NUM_PU-1:0] pu_release,
  output logic [31:0]       out_count
);
  localparam int PW = ((NUM_PU > 1) ? $clog2(NUM_PU) : 1);

  logic [PW-1:0] rr, sel;
  logic          any;
  pu_out_t       msg;

  always_comb begin
    any = 1'b0;
    sel = rr;
    for (int j = NUM_PU - 1; j >= 0; j--) begin
      logic [PW-1:0] c;
      c = PW'((32'(rr) + j) % NUM_PU);
      if (po_valid[c]) begin
        any = 1'b1;
        sel = c;
      end
    end
  end

  assign msg         = po_data[sel];
  assign tq_idx      = pu_tq[sel];
  assign tq_out_addr = tq_entry.out_base + RING_W'(msg.idx);

  wire go = any && !((msg.kind == PO_OUT) && ev_full);

  always_comb begin
    po_pop     = '0;
    pu_release = '0;
    if (go) po_pop[sel] = 1'b1;
    if (go && msg.kind == PO_DONE) pu_release[sel] = 1'b1;
  end

  assign prf_we    = go && (msg.kind == PO_OUT);
  assign prf_waddr = tq_out_preg;
  assign prf_wdata = msg.value;
  assign ev_push   = prf_we;
  assign ev_preg   = tq_out_preg;
  assign done_we   = go && (msg.kind == PO_DONE);
  assign cr_wb_valid = go && (msg.kind == PO_CR);
  assign cr_wb_idx   = tq_entry.hdr.cr_idx;
  assign cr_wb_seq   = tq_entry.hdr.cr_seq;
  assign cr_wb_data  = msg.value;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rr        <= '0;
      out_count <= '0;
    end else begin
      if (go) rr <= PW'((32'(sel) + 1) % NUM_PU);
      if (prf_we) out_count <= out_count + 1;
    end
  end

  a_out_in_range: assert property (@(posedge clk) disable iff (!rst_n)
    (go && msg.kind == PO_OUT) |-> (msg.idx < tq_entry.hdr.n_out));
endmodule

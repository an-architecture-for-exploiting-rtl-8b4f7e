// cp_issue: issue unit of the task execution unit.
//
// Takes one (task, PU) pair at a time from the select-and-assign unit and
// sends the task to the PU's input queue: first a header word with the
// task ID and the number of inputs and outputs (pu_hdr_word), then the value
// of every input register, read through the task's renamed input list
// from the physical register file, one word per cycle. Only the task ID
// and the inputs go to the PU; the PU fetches the task code itself. The
// unit is sequential: a new task is accepted once the previous one has been
// sent completely. It waits while the PU's input queue is full.
module cp_issue
  import mlca_pkg::*;
#(
  parameter int NUM_PU = 8
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              sel_valid,
  input  logic [TQ_W-1:0]   sel_tq,
  input  logic [((NUM_PU > 1) ? $clog2(NUM_PU) : 1)-1:0] sel_pu,
  output logic              sel_ready,
  // task queue read port
  output logic [TQ_W-1:0]   tq_idx,
  input  tq_entry_t         tq_entry,
  output logic [RING_W-1:0] tq_in_addr,
  input  logic [PREG_W-1:0] tq_in_preg,
  // physical register file read port
  output logic [PREG_W-1:0] prf_raddr,
  input  logic [DATA_W-1:0] prf_rdata,
  // PU input queues
  output logic [NUM_PU-1:0] pi_push,
  output logic [DATA_W-1:0] pi_data,
  input  logic [NUM_PU-1:0] pi_full,
  output logic [31:0]       issued_count
);
  typedef enum logic [1:0] {S_IDLE, S_HDR, S_ARG} state_e;

  state_e                   state;
  logic [TQ_W-1:0]          tq;
  logic [((NUM_PU > 1) ? $clog2(NUM_PU) : 1)-1:0] pu;
  logic [IO_W-1:0]          k;

  wire can_push = !pi_full[pu];

  assign sel_ready  = (state == S_IDLE);
  assign tq_idx     = tq;
  assign tq_in_addr = tq_entry.in_base + RING_W'(k);
  assign prf_raddr  = tq_in_preg;

  always_comb begin
    pi_push = '0;
    pi_data = (state == S_HDR) ? pu_hdr_word(tq_entry.hdr) : prf_rdata;
    if ((state == S_HDR || state == S_ARG) && can_push) pi_push[pu] = 1'b1;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state        <= S_IDLE;
      tq           <= '0;
      pu           <= '0;
      k            <= '0;
      issued_count <= '0;
    end else begin
      unique case (state)
        S_IDLE: if (sel_valid) begin
          tq    <= sel_tq;
          pu    <= sel_pu;
          state <= S_HDR;
        end
        S_HDR: if (can_push) begin
          k            <= '0;
          issued_count <= issued_count + 1;
          state        <= (tq_entry.hdr.n_in == '0) ? S_IDLE : S_ARG;
        end
        S_ARG: if (can_push) begin
          k <= k + 1'b1;
          if (k == tq_entry.hdr.n_in - 1'b1) state <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end
endmodule

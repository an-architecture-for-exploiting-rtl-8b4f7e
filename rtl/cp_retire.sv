// cp_retire: retire unit, the in-order back end of the CP.
//
// Looks at the oldest task in the task queue. Once it has finished (and so
// has every older task, since they are removed strictly in order), the unit
// returns to the rename free list, one per cycle, the physical registers
// that the task's outputs replaced, and releases the task queue entry and
// the operand-ring space to the dispatch unit. Retiring in
// program order is what would let the CP support precise exceptions and
// recovery from misspeculation; those mechanisms are not part of this
// design.
module cp_retire
  import mlca_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  input  logic [TQ_W:0]     tq_count,
  // task queue read port
  output logic [TQ_W-1:0]   tq_idx,
  input  tq_entry_t         tq_entry,
  input  logic              tq_done,
  output logic [RING_W-1:0] tq_out_addr,
  input  logic [PREG_W-1:0] tq_old_preg,
  // physical registers back to rename
  output logic              free_valid,
  output logic [PREG_W-1:0] free_preg,
  // resources back to dispatch
  output logic              ret_valid,
  output logic [IO_W-1:0]   ret_n_in,
  output logic [IO_W-1:0]   ret_n_out,
  output logic [31:0]       retired_count
);
  typedef enum logic [1:0] {S_CHK, S_FREE, S_FIN} state_e;

  state_e          state;
  logic [TQ_W-1:0] head;
  logic [IO_W-1:0] k;

  assign tq_idx      = head;
  assign tq_out_addr = tq_entry.out_base + RING_W'(k);
  assign free_valid  = (state == S_FREE);
  assign free_preg   = tq_old_preg;
  assign ret_valid   = (state == S_FIN);
  assign ret_n_in    = tq_entry.hdr.n_in;
  assign ret_n_out   = tq_entry.hdr.n_out;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state         <= S_CHK;
      head          <= '0;
      k             <= '0;
      retired_count <= '0;
    end else begin
      unique case (state)
        S_CHK: if (tq_count != '0 && tq_done) begin
          k     <= '0;
          state <= (tq_entry.hdr.n_out != '0) ? S_FREE : S_FIN;
        end
        S_FREE: begin
          k <= k + 1'b1;
          if (k == tq_entry.hdr.n_out - 1'b1) state <= S_FIN;
        end
        S_FIN: begin
          head          <= head + 1'b1;
          retired_count <= retired_count + 1;
          state         <= S_CHK;
        end
        default: state <= S_CHK;
      endcase
    end
  end
endmodule

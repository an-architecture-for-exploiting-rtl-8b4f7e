// cp_dispatch: dispatch unit, the last stage of the CP front end.
//
// For each renamed task it allocates, in program order, a task-queue entry
// and room for its input and output register lists in two operand rings,
// writes the task descriptor and the lists into the task queue, and sends
// the wake-up unit a header message, one message per operand and an end
// message. A task is dispatched only when the task queue and both rings have
// room for the whole task; the retire unit returns room in program order.
// Interface: in_* renamed tokens, tq_/inr_/outr_ write ports of the task
// queue, wk_* to the dispatch queue of the wake-up unit, ret_* frees.
// The header, register numbers and ring addresses it writes are copied
// from the renamed tokens and its own pointers, so many output bits follow
// inputs directly.
module cp_dispatch
  import mlca_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  input  logic              in_valid,
  input  fe_tok_t           in_tok,
  output logic              in_pop,
  // task queue writes
  output logic              tq_we,
  output logic [TQ_W-1:0]   tq_widx,
  output tq_entry_t         tq_wentry,
  output logic              inr_we,
  output logic [RING_W-1:0] inr_waddr,
  output logic [PREG_W-1:0] inr_wdata,
  output logic              outr_we,
  output logic [RING_W-1:0] outr_waddr,
  output out_opnd_t         outr_wdata,
  // to the wake-up unit
  output logic              wk_valid,
  output wk_msg_t           wk_msg,
  input  logic              wk_ready,
  // resources returned by the retire unit
  input  logic              ret_valid,
  input  logic [IO_W-1:0]   ret_n_in,
  input  logic [IO_W-1:0]   ret_n_out,
  output logic [TQ_W:0]     tq_count
);
  typedef enum logic [1:0] {S_HDR, S_OPS, S_END} state_e;

  state_e            state;
  logic [TQ_W-1:0]   tq_tail, cur_tq;
  logic [RING_W-1:0] in_tail, out_tail;
  logic [RING_W:0]   in_count, out_count;
  logic [IO_W:0]     remaining;

  wire tq_room = (tq_count < (TQ_W+1)'(TQ_SIZE));
  wire in_room = (32'(in_count) + 32'(in_tok.hdr.n_in) <= 32'(RING_SIZE));
  wire out_room = (32'(out_count) + 32'(in_tok.hdr.n_out) <= 32'(RING_SIZE));

  wire hdr_go = (state == S_HDR) && in_valid && wk_ready && tq_room && in_room && out_room;
  wire op_go  = (state == S_OPS) && in_valid && wk_ready;
  wire end_go = (state == S_END) && wk_ready;

  assign in_pop = hdr_go || op_go;

  always_comb begin
    tq_we      = hdr_go;
    tq_widx    = tq_tail;
    tq_wentry  = '{hdr: in_tok.hdr, in_base: in_tail, out_base: out_tail};
    inr_we     = op_go && (in_tok.kind == TK_IN);
    inr_waddr  = in_tail;
    inr_wdata  = in_tok.preg;
    outr_we    = op_go && (in_tok.kind == TK_OUT);
    outr_waddr = out_tail;
    outr_wdata = '{preg: in_tok.preg, old_preg: in_tok.old_preg};
    wk_valid   = hdr_go || op_go || end_go;
    wk_msg     = '0;
    if (state == S_HDR) begin
      wk_msg.kind = WK_HDR;
      wk_msg.tq   = tq_tail;
    end else if (state == S_OPS) begin
      wk_msg.kind = (in_tok.kind == TK_IN) ? WK_IN : WK_OUT;
      wk_msg.tq   = cur_tq;
      wk_msg.preg = in_tok.preg;
    end else begin
      wk_msg.kind = WK_END;
      wk_msg.tq   = cur_tq;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= S_HDR;
      tq_tail   <= '0;
      cur_tq    <= '0;
      in_tail   <= '0;
      out_tail  <= '0;
      remaining <= '0;
    end else begin
      unique case (state)
        S_HDR: if (hdr_go) begin
          cur_tq    <= tq_tail;
          tq_tail   <= tq_tail + 1'b1;
          remaining <= (IO_W+1)'(in_tok.hdr.n_in) + (IO_W+1)'(in_tok.hdr.n_out);
          state     <= ((in_tok.hdr.n_in == '0) && (in_tok.hdr.n_out == '0)) ? S_END : S_OPS;
        end
        S_OPS: if (op_go) begin
          if (in_tok.kind == TK_IN) in_tail  <= in_tail + 1'b1;
          else                      out_tail <= out_tail + 1'b1;
          remaining <= remaining - 1'b1;
          if (remaining == 1) state <= S_END;
        end
        S_END: if (end_go) state <= S_HDR;
        default: state <= S_HDR;
      endcase
    end
  end

  // Occupancy: allocated whole at the header, released at retirement.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      tq_count  <= '0;
      in_count  <= '0;
      out_count <= '0;
    end else begin
      tq_count  <= tq_count + (hdr_go ? 1'b1 : 1'b0) - (ret_valid ? 1'b1 : 1'b0);
      in_count  <= in_count + (hdr_go ? (RING_W+1)'(in_tok.hdr.n_in) : '0)
                            - (ret_valid ? (RING_W+1)'(ret_n_in) : '0);
      out_count <= out_count + (hdr_go ? (RING_W+1)'(in_tok.hdr.n_out) : '0)
                             - (ret_valid ? (RING_W+1)'(ret_n_out) : '0);
    end
  end

  a_ops_follow_hdr: assert property (@(posedge clk) disable iff (!rst_n)
    (state == S_OPS && in_valid) |-> (in_tok.kind != TK_HDR));
endmodule

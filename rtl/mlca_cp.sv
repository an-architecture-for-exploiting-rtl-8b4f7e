// mlca_cp: Control Processor (CP) of the Multi-Level Computing Architecture.
//
// The CP runs a sequential control program of task instructions (TIs) and
// extracts the parallelism among tasks the way a superscalar core does
// among instructions: URF registers are renamed onto physical registers,
// tasks wait in a wake-up unit until their inputs exist, ready tasks are
// issued out of order to free processing units (PUs), outputs flow back
// through a write-back unit, and tasks retire in program order.
//
//   in-order front end : fetch -> decode (CRF) -> rename -> dispatch
//   out-of-order unit  : task queue, wake-up -> ready pool -> select/assign,
//                        physical register file, issue, write-back
//   in-order back end  : retire
//
// Every unit is a multi-cycle "macro stage"; units run in parallel and are
// joined by FIFOs. The PUs (soft processors running task functions) are
// outside: each has an input queue (header word, then input values) and an
// output queue (outputs, CR value, completion), brought out as ports.
// Program load: prog_we/prog_addr/prog_wdata, then a start pulse begins
// execution at address 0. halted rises at STOP; idle when, in addition,
// every task has retired. dbg_* read a URF register and a CR.
// Sizes follow the CP configuration the architecture was evaluated with
// (8 PUs); queue depths not fixed by it are this design's choices.
// NUM_PU may be set to any value from 1 up; the other sizes do not depend
// on it.
module mlca_cp
  import mlca_pkg::*;
#(
  parameter int NUM_PU = 8
) (
  input  logic                         clk,
  input  logic                         rst_n,
  // control program load and start
  input  logic                         prog_we,
  input  logic [PC_W-1:0]              prog_addr,
  input  logic [WORD_W-1:0]            prog_wdata,
  input  logic                         start,
  // PU input queues
  output logic [NUM_PU-1:0]            pu_in_valid,
  output logic [NUM_PU-1:0][DATA_W-1:0] pu_in_data,
  input  logic [NUM_PU-1:0]            pu_in_pop,
  // PU output queues
  input  logic [NUM_PU-1:0]            pu_out_push,
  input  pu_out_t [NUM_PU-1:0]         pu_out_data,
  output logic [NUM_PU-1:0]            pu_out_full,
  // status
  output logic                         halted,
  output logic                         idle,
  output logic [31:0]                  issued_count,
  output logic [31:0]                  retired_count,
  output logic [31:0]                  wb_out_count,
  // debug reads
  input  logic [AREG_W-1:0]            dbg_areg,
  output logic [DATA_W-1:0]            dbg_value,
  input  logic [CR_W-1:0]              dbg_cr,
  output logic [DATA_W-1:0]            dbg_cr_value
);
  localparam int DEC_Q = 8;    // decode -> rename, tokens (own choice)
  localparam int EV_Q  = 16;   // write-back -> wake-up events (own choice)

  // ---------------- fetch / program memory ----------------
  logic              pm_rd_en;
  logic [PC_W-1:0]   pm_raddr;
  logic [WORD_W-1:0] pm_rdata;
  logic              fw_valid, fw_pop, redirect, halt;
  logic [WORD_W-1:0] fw_word;
  logic [PC_W-1:0]   redirect_pc;

  cp_prog_mem u_prog (
    .clk, .we(prog_we), .waddr(prog_addr), .wdata(prog_wdata),
    .rd_en(pm_rd_en), .raddr(pm_raddr), .rd_data(pm_rdata)
  );

  cp_fetch u_fetch (
    .clk, .rst_n, .start, .halt, .redirect, .redirect_pc,
    .mem_rd_en(pm_rd_en), .mem_raddr(pm_raddr), .mem_rd_data(pm_rdata),
    .word_valid(fw_valid), .word(fw_word), .word_pop(fw_pop)
  );

  // ---------------- decode ----------------
  logic              dec_valid, dec_ready;
  fe_tok_t           dec_tok;
  logic              crw_valid;
  logic [CR_W-1:0]   crw_idx;
  logic [TQ_W:0]     crw_seq;
  logic [DATA_W-1:0] crw_data;

  cp_decode u_decode (
    .clk, .rst_n, .start,
    .word_valid(fw_valid), .word(fw_word), .word_pop(fw_pop),
    .redirect, .redirect_pc, .halt,
    .tok_valid(dec_valid), .tok(dec_tok), .tok_ready(dec_ready),
    .cr_wb_valid(crw_valid), .cr_wb_idx(crw_idx), .cr_wb_seq(crw_seq), .cr_wb_data(crw_data),
    .halted, .dbg_cr, .dbg_cr_value
  );

  logic    dq_full, dq_empty, dq_pop;
  fe_tok_t dq_tok;
  logic [$clog2(DEC_Q):0] dq_count;
  assign dec_ready = !dq_full;

  sync_fifo #(.T(fe_tok_t), .DEPTH(DEC_Q)) u_dec_q (
    .clk, .rst_n, .clear(1'b0),
    .wr_en(dec_valid && dec_ready), .wr_data(dec_tok),
    .rd_en(dq_pop), .rd_data(dq_tok),
    .full(dq_full), .empty(dq_empty), .count(dq_count)
  );

  // ---------------- rename ----------------
  logic              ren_valid, rq_full, rq_empty, rq_pop;
  fe_tok_t           ren_tok, rq_tok;
  logic              fr_valid;
  logic [PREG_W-1:0] fr_preg, dbg_preg;
  logic [$clog2(RENAME_Q):0] rq_count;

  cp_rename u_rename (
    .clk, .rst_n,
    .in_valid(!dq_empty), .in_tok(dq_tok), .in_pop(dq_pop),
    .out_valid(ren_valid), .out_tok(ren_tok), .out_ready(!rq_full),
    .free_valid(fr_valid), .free_preg(fr_preg),
    .dbg_areg, .dbg_preg
  );

  sync_fifo #(.T(fe_tok_t), .DEPTH(RENAME_Q)) u_ren_q (
    .clk, .rst_n, .clear(1'b0),
    .wr_en(ren_valid && !rq_full), .wr_data(ren_tok),
    .rd_en(rq_pop), .rd_data(rq_tok),
    .full(rq_full), .empty(rq_empty), .count(rq_count)
  );

  // ---------------- dispatch ----------------
  logic              tq_we, inr_we, outr_we;
  logic [TQ_W-1:0]   tq_widx;
  tq_entry_t         tq_wentry;
  logic [RING_W-1:0] inr_waddr, outr_waddr;
  logic [PREG_W-1:0] inr_wdata;
  out_opnd_t         outr_wdata;
  logic              dwk_valid, wq_full, wq_empty, wq_pop;
  wk_msg_t           dwk_msg, wq_msg;
  logic              ret_valid;
  logic [IO_W-1:0]   ret_n_in, ret_n_out;
  logic [TQ_W:0]     tq_count;
  logic [$clog2(DISPATCH_Q):0] wq_count;

  cp_dispatch u_dispatch (
    .clk, .rst_n,
    .in_valid(!rq_empty), .in_tok(rq_tok), .in_pop(rq_pop),
    .tq_we, .tq_widx, .tq_wentry, .inr_we, .inr_waddr, .inr_wdata,
    .outr_we, .outr_waddr, .outr_wdata,
    .wk_valid(dwk_valid), .wk_msg(dwk_msg), .wk_ready(!wq_full),
    .ret_valid, .ret_n_in, .ret_n_out, .tq_count
  );

  sync_fifo #(.T(wk_msg_t), .DEPTH(DISPATCH_Q)) u_disp_q (
    .clk, .rst_n, .clear(1'b0),
    .wr_en(dwk_valid && !wq_full), .wr_data(dwk_msg),
    .rd_en(wq_pop), .rd_data(wq_msg),
    .full(wq_full), .empty(wq_empty), .count(wq_count)
  );

  // ---------------- task queue ----------------
  logic              done_we;
  logic [TQ_W-1:0]   is_idx, wb_idx, rt_idx;
  tq_entry_t         is_entry, wb_entry, rt_entry;
  logic [RING_W-1:0] is_in_addr, wb_out_addr, rt_out_addr;
  logic [PREG_W-1:0] is_in_preg, wb_out_preg, rt_old_preg;
  logic              rt_done;

  cp_task_queue u_tq (
    .clk, .rst_n,
    .tq_we, .tq_widx, .tq_wentry, .inr_we, .inr_waddr, .inr_wdata,
    .outr_we, .outr_waddr, .outr_wdata,
    .done_we, .done_idx(wb_idx),
    .is_idx, .is_entry, .is_in_addr, .is_in_preg,
    .wb_idx, .wb_entry, .wb_out_addr, .wb_out_preg,
    .rt_idx, .rt_entry, .rt_done, .rt_out_addr, .rt_old_preg
  );

  // ---------------- scheduler ----------------
  logic              ev_push, ev_full, ev_empty, ev_pop;
  logic [PREG_W-1:0] ev_preg, ev_head;
  logic              rp_push, rp_full, rp_valid, rp_pop;
  logic [TQ_W-1:0]   rp_tq, rp_head;
  logic              wk_busy;
  logic [$clog2(EV_Q):0] ev_count;
  logic [$clog2(POOL_SIZE):0] rp_count;

  sync_fifo #(.T(logic [PREG_W-1:0]), .DEPTH(EV_Q)) u_ev_q (
    .clk, .rst_n, .clear(1'b0),
    .wr_en(ev_push), .wr_data(ev_preg),
    .rd_en(ev_pop), .rd_data(ev_head),
    .full(ev_full), .empty(ev_empty), .count(ev_count)
  );

  cp_wakeup u_wakeup (
    .clk, .rst_n,
    .dq_valid(!wq_empty), .dq_msg(wq_msg), .dq_pop(wq_pop),
    .wb_valid(!ev_empty), .wb_preg(ev_head), .wb_pop(ev_pop),
    .rp_push, .rp_tq, .rp_full, .busy(wk_busy)
  );

  cp_ready_pool u_pool (
    .clk, .rst_n, .push(rp_push), .push_tq(rp_tq), .full(rp_full),
    .valid(rp_valid), .head_tq(rp_head), .pop(rp_pop), .count(rp_count)
  );

  logic                         sel_valid, sel_ready;
  logic [TQ_W-1:0]              sel_tq;
  logic [((NUM_PU > 1) ? $clog2(NUM_PU) : 1)-1:0]    sel_pu;
  logic [NUM_PU-1:0]            pu_release, pu_busy;
  logic [NUM_PU-1:0][TQ_W-1:0]  pu_tq;

  cp_select #(.NUM_PU(NUM_PU)) u_select (
    .clk, .rst_n, .rp_valid, .rp_tq(rp_head), .rp_pop,
    .is_valid(sel_valid), .is_tq(sel_tq), .is_pu(sel_pu), .is_ready(sel_ready),
    .pu_release, .pu_busy, .pu_tq
  );

  // ---------------- task execution unit ----------------
  logic              prf_we;
  logic [PREG_W-1:0] prf_waddr, prf_raddr;
  logic [DATA_W-1:0] prf_wdata, prf_rdata, dbg_prf;

  cp_prf u_prf (
    .clk, .rst_n, .we(prf_we), .waddr(prf_waddr), .wdata(prf_wdata),
    .raddr(prf_raddr), .rdata(prf_rdata), .dbg_addr(dbg_preg), .dbg_data(dbg_prf)
  );
  assign dbg_value = dbg_prf;

  logic [NUM_PU-1:0]    ci_push, ci_full, co_valid, co_pop;
  logic [DATA_W-1:0]    ci_data;
  pu_out_t [NUM_PU-1:0] co_data;

  cp_issue #(.NUM_PU(NUM_PU)) u_issue (
    .clk, .rst_n, .sel_valid, .sel_tq, .sel_pu, .sel_ready,
    .tq_idx(is_idx), .tq_entry(is_entry), .tq_in_addr(is_in_addr), .tq_in_preg(is_in_preg),
    .prf_raddr, .prf_rdata,
    .pi_push(ci_push), .pi_data(ci_data), .pi_full(ci_full), .issued_count
  );

  cp_writeback #(.NUM_PU(NUM_PU)) u_wb (
    .clk, .rst_n, .po_valid(co_valid), .po_data(co_data), .po_pop(co_pop), .pu_tq,
    .tq_idx(wb_idx), .tq_entry(wb_entry), .tq_out_addr(wb_out_addr), .tq_out_preg(wb_out_preg),
    .done_we, .cr_wb_valid(crw_valid), .cr_wb_idx(crw_idx), .cr_wb_seq(crw_seq), .cr_wb_data(crw_data),
    .prf_we, .prf_waddr, .prf_wdata,
    .ev_push, .ev_preg, .ev_full, .pu_release, .out_count(wb_out_count)
  );

  cp_pu_comm #(.NUM_PU(NUM_PU)) u_comm (
    .clk, .rst_n, .ci_push, .ci_data, .ci_full, .co_valid, .co_data, .co_pop,
    .pu_in_valid, .pu_in_data, .pu_in_pop, .pu_out_push, .pu_out_data, .pu_out_full
  );

  // ---------------- retire ----------------
  cp_retire u_retire (
    .clk, .rst_n, .tq_count,
    .tq_idx(rt_idx), .tq_entry(rt_entry), .tq_done(rt_done),
    .tq_out_addr(rt_out_addr), .tq_old_preg(rt_old_preg),
    .free_valid(fr_valid), .free_preg(fr_preg),
    .ret_valid, .ret_n_in, .ret_n_out, .retired_count
  );

  assign idle = halted && (tq_count == '0) && dq_empty && rq_empty && wq_empty &&
                !ren_valid && !wk_busy;
endmodule

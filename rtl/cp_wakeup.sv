// cp_wakeup: wake-up unit of the dynamic scheduler.
//
// It keeps a ready bit for every physical register and, for every task
// still waiting, the number of its inputs that are not ready. Instead of an
// associative search (expensive in FPGA logic) each not-ready physical
// register heads a linked list of waiting-input entries, WAKEUP_SIZE of
// them in all, each naming the waiting task. Messages from dispatch:
// WK_HDR starts a task, WK_IN adds an input (an entry is linked in if the
// register is not ready), WK_OUT marks an output register not ready,
// WK_END closes the task, which is ready at once if nothing is missing.
// A write-back event for a physical register sets its ready bit and walks
// its list, one entry per cycle, counting down each task; a task whose
// count reaches zero goes to the ready pool (rp_*). Write-back events are
// served before dispatch messages. One message or list step per cycle.
module cp_wakeup
  import mlca_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  // dispatch queue
  input  logic              dq_valid,
  input  wk_msg_t           dq_msg,
  output logic              dq_pop,
  // write-back events
  input  logic              wb_valid,
  input  logic [PREG_W-1:0] wb_preg,
  output logic              wb_pop,
  // ready pool
  output logic              rp_push,
  output logic [TQ_W-1:0]   rp_tq,
  input  logic              rp_full,
  // status
  output logic              busy
);
  typedef enum logic {S_IDLE, S_WALK} state_e;

  state_e              state;
  logic [NUM_PREG-1:0] rdy;
  logic [NUM_PREG-1:0] head_v;
  logic [WK_W-1:0]     head_e  [NUM_PREG];
  logic [TQ_W-1:0]     ent_tq  [WAKEUP_SIZE];
  logic [WK_W-1:0]     ent_nx  [WAKEUP_SIZE];
  logic                ent_nv  [WAKEUP_SIZE];
  logic [IO_W-1:0]     cnt     [TQ_SIZE];
  logic [TQ_SIZE-1:0]  complete;
  logic [WK_W-1:0]     cur;

  logic            fl_avail, fl_alloc, fl_free;
  logic [WK_W-1:0] fl_id;
  logic [WK_W:0]   fl_num;

  // walk step
  wire [TQ_W-1:0] w_tq   = ent_tq[cur];
  wire [IO_W-1:0] w_cnt  = cnt[w_tq];
  wire            w_fire = (w_cnt == 1) && complete[w_tq];
  wire            walk_go = (state == S_WALK) && !(w_fire && rp_full);

  // idle-state choices
  wire take_wb = (state == S_IDLE) && wb_valid;
  wire in_wait = (dq_msg.kind == WK_IN) && !rdy[dq_msg.preg];
  wire end_fire = (dq_msg.kind == WK_END) && (cnt[dq_msg.tq] == '0);
  wire take_dq = (state == S_IDLE) && !wb_valid && dq_valid &&
                 !(in_wait && !fl_avail) && !(end_fire && rp_full);

  assign wb_pop   = take_wb;
  assign dq_pop   = take_dq;
  assign fl_alloc = take_dq && in_wait;
  assign fl_free  = walk_go;
  assign rp_push  = (walk_go && w_fire) || (take_dq && end_fire);
  assign rp_tq    = (state == S_WALK) ? w_tq : dq_msg.tq;
  assign busy     = (state != S_IDLE);

  always_ff @(posedge clk) begin
    if (fl_alloc) begin
      ent_tq[fl_id] <= dq_msg.tq;
      ent_nx[fl_id] <= head_e[dq_msg.preg];
      ent_nv[fl_id] <= head_v[dq_msg.preg];
      head_e[dq_msg.preg] <= fl_id;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state    <= S_IDLE;
      cur      <= '0;
      complete <= '0;
      head_v   <= '0;
      for (int i = 0; i < NUM_PREG; i++) rdy[i] <= (i < NUM_AREG);
      for (int i = 0; i < TQ_SIZE; i++) cnt[i] <= '0;
    end else begin
      unique case (state)
        S_IDLE: begin
          if (take_wb) begin
            rdy[wb_preg] <= 1'b1;
            if (head_v[wb_preg]) begin
              head_v[wb_preg] <= 1'b0;
              cur   <= head_e[wb_preg];
              state <= S_WALK;
            end
          end else if (take_dq) begin
            unique case (dq_msg.kind)
              WK_HDR: begin
                cnt[dq_msg.tq]      <= '0;
                complete[dq_msg.tq] <= 1'b0;
              end
              WK_IN: if (in_wait) begin
                cnt[dq_msg.tq]       <= cnt[dq_msg.tq] + 1'b1;
                head_v[dq_msg.preg]  <= 1'b1;
              end
              WK_OUT: rdy[dq_msg.preg] <= 1'b0;
              WK_END: complete[dq_msg.tq] <= 1'b1;
            endcase
          end
        end
        S_WALK: if (walk_go) begin
          cnt[w_tq] <= w_cnt - 1'b1;
          if (ent_nv[cur]) cur <= ent_nx[cur];
          else             state <= S_IDLE;
        end
      endcase
    end
  end

  cp_free_list #(.N(WAKEUP_SIZE), .FIRST(0), .W(WK_W)) u_free (
    .clk, .rst_n, .avail(fl_avail), .alloc_id(fl_id), .alloc(fl_alloc),
    .free_valid(fl_free), .free_id(cur), .num_free(fl_num)
  );

  a_cnt_nonzero: assert property (@(posedge clk) disable iff (!rst_n)
    (state == S_WALK) |-> (w_cnt != '0));
endmodule

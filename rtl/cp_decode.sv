// cp_decode: decode unit of the CP front end, with the control register file.
//
// Task instructions (TIs) are split into a stream of front-end tokens: one
// header token, then one token per input and per output URF register, one
// token per cycle, in program order. CP instructions are executed here:
// MOVI writes a control register (CR), JMPA jumps, JZ / JNZ jump when the
// tested CR is zero / non-zero, STOP halts the front end.
// A task may write one CR. Each CR carries a write sequence number: a
// decoded task that writes the CR takes the next number (kept in its
// descriptor) and marks the CR not ready; when the write-back unit reports
// the value of write number n, it is taken only if n is still the newest
// write, which makes the CR ready again. MOVI takes a number too, so late
// values from older tasks are ignored. A conditional jump waits until its
// CR is ready, so control flow sees the value of the last earlier writer as
// soon as that task has produced it, without waiting for retirement. (The
// architecture also allows speculation past such jumps; this design waits.)
// Interface: word_* from the fetch buffer, tok_* to the rename unit
// (valid/ready), redirect to fetch, cr_wb_* from the write-back unit.
// The preg / old_preg fields of the tokens are left zero; the rename unit
// fills them in.
module cp_decode
  import mlca_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  input  logic              start,
  // fetch buffer
  input  logic              word_valid,
  input  logic [WORD_W-1:0] word,
  output logic              word_pop,
  output logic              redirect,
  output logic [PC_W-1:0]   redirect_pc,
  output logic              halt,
  // to rename
  output logic              tok_valid,
  output fe_tok_t           tok,
  input  logic              tok_ready,
  // CR value produced by a task, from the write-back unit
  input  logic              cr_wb_valid,
  input  logic [CR_W-1:0]   cr_wb_idx,
  input  logic [TQ_W:0]     cr_wb_seq,
  input  logic [DATA_W-1:0] cr_wb_data,
  // status / debug
  output logic              halted,
  input  logic [CR_W-1:0]   dbg_cr,
  output logic [DATA_W-1:0] dbg_cr_value
);
  typedef enum logic [1:0] {S_IDLE, S_INSTR, S_OPND, S_HALT} state_e;

  state_e              state;
  logic [DATA_W-1:0]   crf     [NUM_CR];
  logic [TQ_W:0]       seq     [NUM_CR];   // newest write number
  logic [NUM_CR-1:0]   cr_rdy;
  td_hdr_t             hdr;       // task being decoded
  logic [IO_W:0]       opnd_k;    // operand number within the task
  logic [3:0]          slot;      // operand slot within the word

  opcode_e           op;
  logic [CR_W-1:0]   ins_cr;
  logic [PC_W-1:0]   ins_target;
  td_hdr_t           ins_hdr;
  logic [IO_W:0]     n_total;

  always_comb begin
    op               = opcode_e'(word[127:124]);
    ins_cr           = word[123:119];
    ins_target       = word[PC_W-1:0];
    ins_hdr.task_id  = word[123:108];
    ins_hdr.n_in     = word[106:100];
    ins_hdr.n_out    = word[99:93];
    ins_hdr.cr_wr    = word[92];
    ins_hdr.cr_idx   = word[91:87];
    ins_hdr.cr_seq   = seq[word[91:87]] + 1'b1;
    n_total          = (IO_W+1)'(hdr.n_in) + (IO_W+1)'(hdr.n_out);
  end

  wire cr_free = cr_rdy[ins_cr];

  // Combinational control for the current cycle.
  always_comb begin
    word_pop    = 1'b0;
    redirect    = 1'b0;
    redirect_pc = ins_target;
    halt        = 1'b0;
    tok_valid   = 1'b0;
    tok         = '0;
    if (state == S_INSTR && word_valid) begin
      unique case (op)
        OP_TASK: begin
          tok_valid = 1'b1;
          tok.kind  = TK_HDR;
          tok.hdr   = ins_hdr;
          word_pop  = tok_ready;
        end
        OP_MOVI: word_pop = 1'b1;
        OP_JMPA: redirect = 1'b1;
        OP_JZ:   if (cr_free) begin
                   if (crf[ins_cr] == '0) redirect = 1'b1;
                   else                   word_pop = 1'b1;
                 end
        OP_JNZ:  if (cr_free) begin
                   if (crf[ins_cr] != '0) redirect = 1'b1;
                   else                   word_pop = 1'b1;
                 end
        OP_STOP: begin
          word_pop = 1'b1;
          halt     = 1'b1;
        end
        default: word_pop = 1'b1;   // NOP and unused opcodes
      endcase
    end else if (state == S_OPND && word_valid) begin
      tok_valid = 1'b1;
      tok.kind  = ((IO_W+1)'(opnd_k) < (IO_W+1)'(hdr.n_in)) ? TK_IN : TK_OUT;
      tok.areg  = word[8*slot +: 8];
      word_pop  = tok_ready && ((opnd_k == n_total - 1'b1) || (slot == 4'd15));
    end
  end

  wire task_accept = (state == S_INSTR) && word_valid && (op == OP_TASK) && tok_ready;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state  <= S_IDLE;
      hdr    <= '0;
      opnd_k <= '0;
      slot   <= '0;
    end else if (start) begin
      state <= S_INSTR;
    end else begin
      unique case (state)
        S_IDLE: ;
        S_INSTR: begin
          if (task_accept) begin
            hdr    <= ins_hdr;
            opnd_k <= '0;
            slot   <= '0;
            if (ins_hdr.n_in != '0 || ins_hdr.n_out != '0) state <= S_OPND;
          end else if (halt) begin
            state <= S_HALT;
          end
        end
        S_OPND: begin
          if (word_valid && tok_ready) begin
            opnd_k <= opnd_k + 1'b1;
            slot   <= slot + 1'b1;
            if (opnd_k == n_total - 1'b1) state <= S_INSTR;
          end
        end
        S_HALT: ;
      endcase
    end
  end

  // Control register file, newest write number and ready bit of each CR.
  wire movi_go = (state == S_INSTR) && word_valid && (op == OP_MOVI);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cr_rdy <= '1;
      for (int i = 0; i < NUM_CR; i++) begin
        crf[i] <= '0;
        seq[i] <= '0;
      end
    end else begin
      if (cr_wb_valid && cr_wb_seq == seq[cr_wb_idx]) begin
        crf[cr_wb_idx]    <= cr_wb_data;
        cr_rdy[cr_wb_idx] <= 1'b1;
      end
      // decode-side updates come later in program order and win
      if (task_accept && ins_hdr.cr_wr) begin
        seq[ins_hdr.cr_idx]    <= ins_hdr.cr_seq;
        cr_rdy[ins_hdr.cr_idx] <= 1'b0;
      end else if (movi_go) begin
        seq[ins_cr]    <= seq[ins_cr] + 1'b1;
        crf[ins_cr]    <= word[31:0];
        cr_rdy[ins_cr] <= 1'b1;
      end
    end
  end

  assign halted       = (state == S_HALT);
  assign dbg_cr_value = crf[dbg_cr];
endmodule

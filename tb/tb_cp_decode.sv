// tb_cp_decode: runs a small control program through the decode unit from
// a fetch-buffer model, with random back-pressure from rename. Checks the
// token stream (headers, inputs then outputs, operand lists spanning two
// words), MOVI, a JZ that must wait for a task's CR value and is then
// taken, a taken JNZ, that a stale CR value (old write number) is ignored,
// and STOP.
// A second phase runs random programs (tasks with 0..40 operands, MOVI,
// forward JZ / JNZ / JMPA, STOP) 20 times. A responder returns each task's
// CR value after a random delay, so values arrive out of order and stale
// ones are common. The full token stream, every header's CR write number
// and the final CR file are compared with a sequential interpretation of
// the same program.
module tb_cp_decode;
  import mlca_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic start = 0, word_valid, word_pop, redirect, halt, tok_valid, tok_ready = 0, halted;
  logic [WORD_W-1:0] word;
  logic [PC_W-1:0] redirect_pc;
  fe_tok_t tok;
  logic cr_wb_valid = 0;
  logic [CR_W-1:0] cr_wb_idx = '0, dbg_cr = '0;
  logic [TQ_W:0] cr_wb_seq = '0;
  logic [DATA_W-1:0] cr_wb_data = '0, dbg_cr_value;

  cp_decode dut (.*);

  localparam int PLEN = 1024;
  logic [WORD_W-1:0] prog [PLEN];
  int pc = 0;
  assign word_valid = (pc < PLEN);
  assign word = prog[pc];
  always @(posedge clk) begin
    if (!rst_n) pc <= 0;
    else if (redirect) pc <= int'(redirect_pc);
    else if (word_pop) pc <= pc + 1;
  end

  int checks = 0, failures = 0;
  fe_tok_t got [$];
  int jz_wait = 0;

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    if (tok_valid && tok_ready) got.push_back(tok);
    if (dut.state == 2'd1 && word_valid && dut.op == OP_JZ && !dut.cr_free) jz_wait++;
  end
  always @(negedge clk) tok_ready = ($urandom_range(3, 0) != 0);

  // ---------------- phase 2: random programs ----------------
  // CR value produced by a task: a function of its ID only.
  function automatic logic [DATA_W-1:0] task_cr_val(logic [15:0] id);
    return id[0] ? 32'(id) * 32'd2654435761 : 32'd0;
  endfunction

  typedef struct {logic [CR_W-1:0] cr; logic [TQ_W:0] seq; logic [DATA_W-1:0] v; int due;} wb_t;
  wb_t pend [$];
  int  cyc = 0;
  bit  responder_on = 0;
  always @(posedge clk) cyc++;
  // take CR-writing headers from the token stream and answer them later
  always @(posedge clk) begin
    if (responder_on && tok_valid && tok_ready && tok.kind == TK_HDR && tok.hdr.cr_wr)
      pend.push_back('{tok.hdr.cr_idx, tok.hdr.cr_seq, task_cr_val(tok.hdr.task_id),
                       cyc + int'($urandom_range(120, 1))});
  end
  always @(negedge clk) begin
    if (responder_on) begin
      cr_wb_valid <= 1'b0;
      for (int i = 0; i < pend.size(); i++) begin
        if (pend[i].due <= cyc && $urandom_range(1, 0) == 0) begin
          cr_wb_valid <= 1'b1;
          cr_wb_idx   <= pend[i].cr;
          cr_wb_seq   <= pend[i].seq;
          cr_wb_data  <= pend[i].v;
          pend.delete(i);
          break;
        end
      end
    end
  end

  fe_tok_t exp_t [$];
  logic [DATA_W-1:0] ref_cr [NUM_CR];
  logic [TQ_W:0]     ref_seq [NUM_CR];

  task automatic random_run(int r);
    int n, plen, lim;
    int ni, no, tgt, bad;
    logic [WORD_W-1:0] w;
    fe_tok_t t;
    // build: forward jumps only, so every program ends at its STOP
    foreach (prog[i]) prog[i] = '0;
    plen = 0;
    n = 60;
    for (int k = 0; k < n; k++) begin
      int kind;
      kind = int'($urandom_range(9, 0));
      case (kind)
        0, 1: prog[plen++] = enc_movi(int'($urandom_range(NUM_CR - 1, 0)),
                                     ($urandom_range(1, 0) == 1) ? 32'($urandom) : 32'd0);
        2:    prog[plen++] = enc_jump(OP_JZ, int'($urandom_range(7, 0)), 0);   // target patched below
        3:    prog[plen++] = enc_jump(OP_JNZ, int'($urandom_range(7, 0)), 0);
        4:    prog[plen++] = enc_jump(OP_JMPA, 0, 0);
        default: begin
          ni = int'($urandom_range(24, 0));
          no = int'($urandom_range(16, 0));
          prog[plen++] = enc_task(16'($urandom), ni, no, ($urandom_range(2, 0) != 0),
                                  int'($urandom_range(7, 0)));
          for (int i = 0; i < (ni + no + 15) / 16; i++) begin
            w = '0;
            for (int j = 0; j < 16; j++) w[8*j +: 8] = 8'($urandom);
            prog[plen++] = w;
          end
        end
      endcase
    end
    prog[plen] = '0;
    prog[plen][127:124] = OP_STOP;
    // patch jump targets to the start of a later instruction (or the STOP)
    for (int i = 0; i < plen; ) begin
      int nxt;
      nxt = i + 1;
      if (prog[i][127:124] == OP_TASK) nxt = i + 1 + (int'(prog[i][106:100]) + int'(prog[i][99:93]) + 15) / 16;
      if (prog[i][127:124] inside {OP_JZ, OP_JNZ, OP_JMPA}) begin
        int hops, j;
        hops = int'($urandom_range(4, 1));
        j = i + 1;
        for (int h = 1; h < hops && j < plen; h++) begin
          if (prog[j][127:124] == OP_TASK) j = j + 1 + (int'(prog[j][106:100]) + int'(prog[j][99:93]) + 15) / 16;
          else j++;
        end
        prog[i][PC_W-1:0] = PC_W'(j);
      end
      i = nxt;
    end
    // reference interpretation
    exp_t.delete();
    foreach (ref_cr[i]) begin ref_cr[i] = '0; ref_seq[i] = '0; end
    for (int p = 0; p <= plen; ) begin
      w = prog[p];
      unique case (opcode_e'(w[127:124]))
        OP_TASK: begin
          ni = int'(w[106:100]); no = int'(w[99:93]);
          t = '0;
          t.kind = TK_HDR;
          t.hdr.task_id = w[123:108]; t.hdr.n_in = IO_W'(ni); t.hdr.n_out = IO_W'(no);
          t.hdr.cr_wr = w[92];
          if (w[92]) begin
            ref_seq[w[91:87]]++;
            ref_cr[w[91:87]] = task_cr_val(w[123:108]);
            t.hdr.cr_idx = w[91:87];
            t.hdr.cr_seq = ref_seq[w[91:87]];
          end
          exp_t.push_back(t);
          for (int i = 0; i < ni + no; i++) begin
            t = '0;
            t.kind = (i < ni) ? TK_IN : TK_OUT;
            t.areg = prog[p + 1 + i / 16][8*(i%16) +: 8];
            exp_t.push_back(t);
          end
          p += 1 + (ni + no + 15) / 16;
        end
        OP_MOVI: begin ref_cr[w[123:119]] = w[31:0]; ref_seq[w[123:119]]++; p++; end
        OP_JMPA: p = int'(w[PC_W-1:0]);
        OP_JZ:   p = (ref_cr[w[123:119]] == '0) ? int'(w[PC_W-1:0]) : p + 1;
        OP_JNZ:  p = (ref_cr[w[123:119]] != '0) ? int'(w[PC_W-1:0]) : p + 1;
        default: break;   // STOP
      endcase
    end
    // run
    pend.delete();
    rst_n = 0; repeat (3) @(negedge clk); rst_n = 1;
    got.delete();
    responder_on = 1;
    @(negedge clk); start = 1; @(negedge clk); start = 0;
    lim = 0;
    while (!(halted && pend.size() == 0 && !cr_wb_valid) && lim < 20000) begin @(negedge clk); lim++; end
    repeat (3) @(negedge clk);
    responder_on = 0;
    checks++;
    if (!halted) begin failures++; $display("run %0d: not halted", r); end
    checks++;
    if (got.size() != exp_t.size()) begin
      failures++; $display("run %0d: %0d tokens, expected %0d", r, got.size(), exp_t.size());
    end
    bad = 0;
    for (int i = 0; i < exp_t.size() && i < got.size(); i++) begin
      checks++;
      if (got[i].kind != exp_t[i].kind ||
          (exp_t[i].kind != TK_HDR && got[i].areg != exp_t[i].areg) ||
          (exp_t[i].kind == TK_HDR && (got[i].hdr.task_id != exp_t[i].hdr.task_id ||
             got[i].hdr.n_in != exp_t[i].hdr.n_in || got[i].hdr.n_out != exp_t[i].hdr.n_out ||
             got[i].hdr.cr_wr != exp_t[i].hdr.cr_wr ||
             (exp_t[i].hdr.cr_wr && (got[i].hdr.cr_idx != exp_t[i].hdr.cr_idx ||
                                     got[i].hdr.cr_seq != exp_t[i].hdr.cr_seq))))) begin
        failures++;
        if (bad++ < 3) $display("run %0d: token %0d differs", r, i);
      end
    end
    for (int c = 0; c < NUM_CR; c++) begin
      dbg_cr = CR_W'(c); #1;
      checks++;
      if (dbg_cr_value !== ref_cr[c]) begin
        failures++; $display("run %0d: CR%0d = %h, expected %h", r, c, dbg_cr_value, ref_cr[c]);
      end
    end
  endtask

  task automatic expect_tok(int i, tok_kind_e k, int areg);
    checks++;
    if (i >= got.size() || got[i].kind != k || (k != TK_HDR && got[i].areg != AREG_W'(areg))) begin
      failures++;
      $display("token %0d wrong (kind %0d areg %0d)", i, k, areg);
    end
  endtask

  initial begin
    logic [WORD_W-1:0] w;
    foreach (prog[i]) prog[i] = '0;
    prog[0] = enc_movi(2, 32'd5);
    prog[1] = enc_task(16'd7, 3, 2, 1'b1, 4);
    prog[2] = {88'd0, 8'd21, 8'd20, 8'd12, 8'd11, 8'd10};
    prog[3] = enc_jump(OP_JZ, 4, 8);
    prog[4] = enc_task(16'd99, 0, 0, 1'b0, 0);
    prog[8] = enc_task(16'd8, 20, 0, 1'b0, 0);
    w = '0; for (int i = 0; i < 16; i++) w[8*i +: 8] = 8'(30 + i);
    prog[9] = w;
    w = '0; for (int i = 0; i < 4; i++) w[8*i +: 8] = 8'(46 + i);
    prog[10] = w;
    prog[11] = enc_jump(OP_JNZ, 2, 13);
    prog[12] = enc_task(16'd98, 0, 0, 1'b0, 0);
    prog[13] = '0; prog[13][127:124] = OP_STOP;

    repeat (3) @(negedge clk); rst_n = 1;
    @(negedge clk); start = 1; @(negedge clk); start = 0;
    repeat (40) @(negedge clk);
    // stale value for CR2 (write number 0, MOVI made it 1): ignored
    cr_wb_valid = 1; cr_wb_idx = 2; cr_wb_seq = 0; cr_wb_data = 32'd0;
    @(negedge clk);
    // task 7's CR4 value, write number 1: zero, so the JZ is taken
    cr_wb_idx = 4; cr_wb_seq = 1; cr_wb_data = 32'd0;
    @(negedge clk); cr_wb_valid = 0;
    repeat (100) @(negedge clk);

    expect_tok(0, TK_HDR, 0);
    checks++;
    if (got[0].hdr.task_id != 7 || got[0].hdr.n_in != 3 || got[0].hdr.n_out != 2 ||
        !got[0].hdr.cr_wr || got[0].hdr.cr_idx != 4 || got[0].hdr.cr_seq != 1) begin
      failures++; $display("header 0 wrong");
    end
    expect_tok(1, TK_IN, 10); expect_tok(2, TK_IN, 11); expect_tok(3, TK_IN, 12);
    expect_tok(4, TK_OUT, 20); expect_tok(5, TK_OUT, 21);
    expect_tok(6, TK_HDR, 0);
    checks++;
    if (got[6].hdr.task_id != 8) begin failures++; $display("JZ not taken"); end
    for (int i = 0; i < 20; i++) expect_tok(7 + i, TK_IN, 30 + i);
    checks++;
    if (got.size() != 27) begin failures++; $display("%0d tokens, expected 27", got.size()); end
    checks++;
    if (jz_wait < 30) begin failures++; $display("JZ did not wait for CR4 (%0d)", jz_wait); end
    checks++;
    if (!halted) begin failures++; $display("not halted"); end
    dbg_cr = 2; #1;
    checks++;
    if (dbg_cr_value != 5) begin failures++; $display("CR2 = %0d", dbg_cr_value); end
    for (int r = 0; r < 20; r++) random_run(r);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

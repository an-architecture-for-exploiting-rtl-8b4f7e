// tb_cp_rename: random header/input/output tokens through the rename unit
// against a map-table model. Inputs must read the newest mapping; outputs
// must get a physical register not in use and report the mapping they
// replace. Replaced registers are given back later, as retirement would.
// Also checks three cycles per input register, that renaming stops when
// all 1792 spare physical registers are taken, and resumes on a free.
module tb_cp_rename;
  import mlca_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic in_valid, in_pop, out_valid, out_ready = 1, free_valid = 0;
  fe_tok_t in_tok, out_tok;
  logic [PREG_W-1:0] free_preg = '0, dbg_preg;
  logic [AREG_W-1:0] dbg_areg = '0;

  cp_rename dut (.*);

  fe_tok_t inq [$], sent [$];
  logic [PREG_W-1:0] refmap [NUM_AREG];
  bit in_use [NUM_PREG];
  logic [PREG_W-1:0] to_free [$];
  int checks = 0, failures = 0;
  int n_out = 0;
  bit hold_free = 0;

  assign in_valid = inq.size() != 0;
  assign in_tok   = inq.size() != 0 ? inq[0] : '0;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (rst_n) begin
    if (in_pop) begin
      fe_tok_t t;
      t = inq[0];
      #1 void'(inq.pop_front());
      sent.push_back(t);
    end
  end

  longint emit_t [$];

  always @(posedge clk) if (rst_n) begin
    if (out_valid && out_ready) begin
      fe_tok_t e;
      emit_t.push_back($time);
      e = sent.pop_front();
      checks++;
      if (out_tok.kind != e.kind || out_tok.areg != e.areg) begin
        failures++; $display("token order");
      end else if (e.kind == TK_IN) begin
        if (out_tok.preg != refmap[e.areg]) begin
          failures++; $display("IN r%0d -> p%0d expected p%0d", e.areg, out_tok.preg, refmap[e.areg]);
        end
      end else if (e.kind == TK_OUT) begin
        if (out_tok.old_preg != refmap[e.areg] || in_use[out_tok.preg]) begin
          failures++; $display("OUT r%0d -> p%0d (old %0d) bad", e.areg, out_tok.preg, out_tok.old_preg);
        end
        in_use[out_tok.preg] = 1;
        refmap[e.areg] = out_tok.preg;
        to_free.push_back(out_tok.old_preg);
        n_out++;
      end
    end
  end

  always @(negedge clk) begin
    free_valid = 0;
    if (!hold_free && to_free.size() > 40 && $urandom_range(1, 0)) begin
      free_preg = to_free.pop_front();
      in_use[free_preg] = 0;
      free_valid = 1;
    end
  end

  function automatic fe_tok_t mk(tok_kind_e k, int a);
    fe_tok_t t;
    t = '0; t.kind = k; t.areg = AREG_W'(a);
    return t;
  endfunction

  initial begin
    int t0;
    for (int i = 0; i < NUM_AREG; i++) begin refmap[i] = PREG_W'(i); in_use[i] = 1; end
    repeat (3) @(negedge clk); rst_n = 1;
    // rate: 20 inputs take 60 cycles
    inq.push_back(mk(TK_HDR, 0));
    for (int i = 0; i < 20; i++) inq.push_back(mk(TK_IN, i));
    @(negedge clk);
    while (inq.size() != 0 || out_valid) @(negedge clk);
    emit_t.delete();
    for (int i = 0; i < 20; i++) inq.push_back(mk(TK_IN, i * 7));
    while (inq.size() != 0 || sent.size() != 0) @(negedge clk);
    // one input every 3 cycles: 20 inputs in 60 cycles
    checks++;
    t0 = int'((emit_t[19] - emit_t[0]) / 10);
    if (t0 != 57) begin failures++; $display("20 inputs spaced over %0d cycles, expected 57", t0); end
    // random mix with back-pressure
    fork
      forever begin @(negedge clk); out_ready = $urandom_range(3, 0) != 0; end
    join_none
    for (int i = 0; i < 4000; i++) begin
      int r;
      r = $urandom_range(9, 0);
      inq.push_back(mk(r == 0 ? TK_HDR : (r < 5 ? TK_IN : TK_OUT), $urandom_range(40, 0)));
    end
    while (inq.size() != 0 || sent.size() != 0) @(negedge clk);
    // exhaustion: hold back frees and rename more outputs than spare registers
    hold_free = 1;
    repeat (5) @(negedge clk);
    for (int i = 0; i < 1900; i++) inq.push_back(mk(TK_OUT, $urandom_range(255, 0)));
    repeat (1900 * 4) @(negedge clk);
    checks++;
    if (inq.size() == 0 || !dut.fl_avail && dut.state != 2'd1) begin
      failures++; $display("no stall on empty free list");
    end
    checks++;
    if (dut.u_free.num_free != 0) begin failures++; $display("free count %0d", dut.u_free.num_free); end
    hold_free = 0;
    while (inq.size() != 0 || sent.size() != 0) @(negedge clk);
    // debug port
    for (int a = 0; a < NUM_AREG; a += 17) begin
      dbg_areg = AREG_W'(a); #1;
      checks++;
      if (dbg_preg != refmap[a]) begin failures++; $display("dbg r%0d", a); end
    end
    $display("outputs renamed: %0d", n_out);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_sync_fifo: random writes and reads against a queue model for a
// 16-entry FIFO of 12-bit words. Checks the head word, full, empty and
// count after every cycle, that the FIFO reaches full, and that clear
// empties it. Writes are only made when not full and reads only when not
// empty, as the design's assertions require.
module tb_sync_fifo;
  localparam int DEPTH = 16;
  typedef logic [11:0] word_t;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic clear = 0, wr_en = 0, rd_en = 0, full, empty;
  word_t wr_data = '0, rd_data;
  logic [$clog2(DEPTH):0] count;
  word_t q [$];
  int checks = 0, failures = 0;
  bit seen_full = 0;

  sync_fifo #(.T(word_t), .DEPTH(DEPTH)) dut (.*);

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic step(int wr_pct, bit do_clear);
    @(negedge clk);
    checks++;
    if (empty != (q.size() == 0) || (!empty && rd_data !== q[0])) begin
      failures++; $display("head mismatch");
    end
    clear   = do_clear;
    wr_en   = !full && ($urandom_range(99, 0) < wr_pct);
    wr_data = word_t'($urandom);
    rd_en   = !empty && ($urandom_range(99, 0) >= wr_pct);
    @(posedge clk); #1;
    if (do_clear) q.delete();
    else begin
      if (rd_en) void'(q.pop_front());
      if (wr_en) q.push_back(wr_data);
    end
    clear = 0; wr_en = 0; rd_en = 0;
    if (full) seen_full = 1;
    checks++;
    if (32'(count) != q.size() || full != (q.size() == DEPTH)) begin
      failures++; $display("count %0d expected %0d", count, q.size());
    end
  endtask

  initial begin
    repeat (3) @(negedge clk); rst_n = 1;
    repeat (2000) step(50, 0);
    repeat (300) step(85, 0);
    step(50, 1);
    repeat (2000) step($urandom_range(90, 10), $urandom_range(99, 0) == 0);
    checks++;
    if (!seen_full) begin failures++; $display("never full"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

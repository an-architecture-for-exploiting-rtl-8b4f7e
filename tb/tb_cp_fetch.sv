// tb_cp_fetch: the fetch unit reads a program memory model (word i holds
// i + 1000 in its low bits). Checks the sequential word stream under random
// decode back-pressure, that the buffer never holds more than 8 words, that
// a redirect restarts the stream at its target with nothing stale, and that
// halt stops fetching.
module tb_cp_fetch;
  import mlca_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic start = 0, halt = 0, redirect = 0, word_pop = 0;
  logic [PC_W-1:0] redirect_pc = '0, mem_raddr;
  logic mem_rd_en, word_valid;
  logic [WORD_W-1:0] mem_rd_data, word;
  int checks = 0, failures = 0;

  cp_fetch dut (.*);

  always_ff @(posedge clk) if (mem_rd_en) mem_rd_data <= WORD_W'(mem_raddr) + 1000;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (rst_n) begin
    checks++;
    if (dut.buf_count > 8) begin failures++; $display("buffer over 8"); end
  end

  task automatic expect_stream(int first, int n);
    int got = 0;
    while (got < n) begin
      @(negedge clk);
      word_pop = 0;
      if (word_valid && ($urandom_range(2, 0) != 0)) begin
        checks++;
        if (word !== WORD_W'(first + got + 1000)) begin
          failures++;
          $display("word %0d: %0d expected %0d", got, word, first + got + 1000);
        end
        word_pop = 1;
        got++;
      end
    end
    @(negedge clk); word_pop = 0;
  endtask

  initial begin
    repeat (3) @(negedge clk); rst_n = 1;
    @(negedge clk); start = 1; @(negedge clk); start = 0;
    expect_stream(0, 50);
    repeat (20) @(negedge clk);   // buffer fills
    checks++;
    if (dut.buf_count != 8) begin failures++; $display("buffer did not fill to 8"); end
    redirect = 1; redirect_pc = 300; @(negedge clk); redirect = 0;
    expect_stream(300, 40);
    redirect = 1; redirect_pc = 7; @(negedge clk); redirect = 0;
    expect_stream(7, 20);
    halt = 1; @(negedge clk); halt = 0;
    repeat (5) @(negedge clk);
    checks++;
    if (dut.running || mem_rd_en) begin failures++; $display("halt ignored"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_cp_prog_mem: writes random words to random addresses of the control
// program memory and reads them back, checking the one-cycle read latency.
module tb_cp_prog_mem;
  import mlca_pkg::*;
  logic clk = 0;
  always #5 clk = ~clk;
  logic we = 0, rd_en = 0;
  logic [PC_W-1:0] waddr = '0, raddr = '0;
  logic [WORD_W-1:0] wdata = '0, rd_data;
  logic [WORD_W-1:0] model [PROG_DEPTH];
  logic [PROG_DEPTH-1:0] written = '0;
  int checks = 0, failures = 0;

  cp_prog_mem dut (.clk, .we, .waddr, .wdata, .rd_en, .raddr, .rd_data);

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 600; i++) begin
      @(negedge clk);
      we = 1; waddr = PC_W'($urandom); wdata = {$urandom, $urandom, $urandom, $urandom};
      model[waddr] = wdata; written[waddr] = 1'b1;
    end
    @(negedge clk); we = 0;
    for (int i = 0; i < 600; i++) begin
      logic [PC_W-1:0] a;
      do a = PC_W'($urandom); while (!written[a]);
      @(negedge clk); rd_en = 1; raddr = a;
      @(negedge clk); rd_en = 0;
      checks++;
      if (rd_data !== model[a]) begin
        failures++;
        $display("addr %0d: %h expected %h", a, rd_data, model[a]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

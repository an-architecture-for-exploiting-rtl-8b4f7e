// tb_cp_prf: random writes and reads of the physical register file against
// a model; registers never written read as zero, on both read ports.
module tb_cp_prf;
  import mlca_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic we = 0;
  logic [PREG_W-1:0] waddr = '0, raddr = '0, dbg_addr = '0;
  logic [DATA_W-1:0] wdata = '0, rdata, dbg_data;
  logic [DATA_W-1:0] model [NUM_PREG];
  int checks = 0, failures = 0;

  cp_prf dut (.*);

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    foreach (model[i]) model[i] = '0;
    repeat (3) @(negedge clk); rst_n = 1;
    for (int i = 0; i < 5000; i++) begin
      @(negedge clk);
      raddr = PREG_W'($urandom); dbg_addr = PREG_W'($urandom);
      #1;
      checks += 2;
      if (rdata !== model[raddr]) begin failures++; $display("r%0d=%h exp %h", raddr, rdata, model[raddr]); end
      if (dbg_data !== model[dbg_addr]) begin failures++; $display("dbg r%0d", dbg_addr); end
      we = $urandom_range(1, 0); waddr = PREG_W'($urandom_range(1023, 0)); wdata = $urandom;
      @(posedge clk); #1;
      if (we) model[waddr] = wdata;
      we = 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

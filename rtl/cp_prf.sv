// cp_prf: physical register file.
//
// Holds the values of the 2048 physical registers onto which the 256 URF
// registers are renamed; together with the rename map it forms the
// Universal Register File. Written by the write-back unit with task
// outputs, read by the issue unit to send task inputs to the PUs, and by a
// debug port. A register never written since reset reads as zero, which is
// the initial value of every URF register. Reads are combinational.
module cp_prf
  import mlca_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  input  logic              we,
  input  logic [PREG_W-1:0] waddr,
  input  logic [DATA_W-1:0] wdata,
  input  logic [PREG_W-1:0] raddr,
  output logic [DATA_W-1:0] rdata,
  input  logic [PREG_W-1:0] dbg_addr,
  output logic [DATA_W-1:0] dbg_data
);
  logic [DATA_W-1:0]   regs [NUM_PREG];
  logic [NUM_PREG-1:0] written;

  always_ff @(posedge clk) if (we) regs[waddr] <= wdata;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)  written <= '0;
    else if (we) written[waddr] <= 1'b1;
  end

  assign rdata    = written[raddr]    ? regs[raddr]    : '0;
  assign dbg_data = written[dbg_addr] ? regs[dbg_addr] : '0;
endmodule

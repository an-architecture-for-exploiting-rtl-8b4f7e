// cp_prog_mem: dedicated on-chip memory holding the MLCA control program.
//
// One write port, used by a host to load the program, and one synchronous
// read port, used by the fetch unit: rd_data holds the word at the address
// presented with rd_en in the previous cycle. 128-bit words; the depth is
// this design's choice (the program size is not fixed by the architecture).
module cp_prog_mem
  import mlca_pkg::*;
#(
  parameter int DEPTH = PROG_DEPTH
) (
  input  logic              clk,
  input  logic              we,
  input  logic [PC_W-1:0]   waddr,
  input  logic [WORD_W-1:0] wdata,
  input  logic              rd_en,
  input  logic [PC_W-1:0]   raddr,
  output logic [WORD_W-1:0] rd_data
);
  logic [WORD_W-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
    if (rd_en) rd_data <= mem[raddr];
  end
endmodule

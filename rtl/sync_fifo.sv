// sync_fifo: single-clock first-word-fall-through FIFO.
//
// The CP's units run concurrently and talk through FIFOs like this one, so
// a stall in one unit does not immediately stall its neighbours. The head
// entry is visible on rd_data while empty is low; rd_en pops it. A write
// to a full FIFO and a read from an empty one are ignored (and flagged by
// assertions). clear empties the FIFO in one cycle. DEPTH must be a power
// of two. Storage is an array with one write and one read port, which maps
// onto a single FPGA memory block.
module sync_fifo #(
  parameter type T     = logic [7:0],
  parameter int  DEPTH = 4
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   clear,
  input  logic                   wr_en,
  input  T                       wr_data,
  input  logic                   rd_en,
  output T                       rd_data,
  output logic                   full,
  output logic                   empty,
  output logic [$clog2(DEPTH):0] count
);
  localparam int AW = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  T              mem [DEPTH];
  logic [AW-1:0] wp, rp;

  wire do_wr = wr_en && !full;
  wire do_rd = rd_en && !empty;

  assign full    = (count == ($clog2(DEPTH)+1)'(DEPTH));
  assign empty   = (count == '0);
  assign rd_data = mem[rp];

  always_ff @(posedge clk) begin
    if (do_wr) mem[wp] <= wr_data;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wp    <= '0;
      rp    <= '0;
      count <= '0;
    end else if (clear) begin
      wp    <= '0;
      rp    <= '0;
      count <= '0;
    end else begin
      if (do_wr) wp <= (DEPTH > 1) ? AW'(wp + 1'b1) : '0;
      if (do_rd) rp <= (DEPTH > 1) ? AW'(rp + 1'b1) : '0;
      count <= count + ($clog2(DEPTH)+1)'(do_wr) - ($clog2(DEPTH)+1)'(do_rd);
    end
  end

  a_no_overflow:  assert property (@(posedge clk) disable iff (!rst_n) !(wr_en && full && !clear));
  a_no_underflow: assert property (@(posedge clk) disable iff (!rst_n) !(rd_en && empty && !clear));
endmodule

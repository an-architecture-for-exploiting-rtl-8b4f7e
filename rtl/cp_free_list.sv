// cp_free_list: allocator for N identifiers, FIRST..N-1 free after reset.
//
// Used for physical registers (rename unit) and for wake-up list entries.
// Identifiers never handed out are produced by a counter, so no
// initialisation pass over a memory is needed; released identifiers go into
// a FIFO and are reused once the counter has run out. avail says an
// identifier can be taken this cycle; alloc takes alloc_id. free_valid
// returns free_id; each identifier is returned at most once.
module cp_free_list #(
  parameter int N     = 2048,
  parameter int FIRST = 256,
  parameter int W     = 11
) (
  input  logic         clk,
  input  logic         rst_n,
  output logic         avail,
  output logic [W-1:0] alloc_id,
  input  logic         alloc,
  input  logic         free_valid,
  input  logic [W-1:0] free_id,
  output logic [W:0]   num_free
);
  logic [W:0]     fresh;      // next never-used identifier
  logic [W-1:0]   rec_data;
  logic           rec_empty, rec_full;
  logic [$clog2(N):0] rec_count;

  wire use_fresh = (fresh < (W+1)'(N));

  assign avail    = use_fresh || !rec_empty;
  assign alloc_id = use_fresh ? fresh[W-1:0] : rec_data;
  assign num_free = (W+1)'((W+1)'(N) - fresh) + (W+1)'(rec_count);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) fresh <= (W+1)'(FIRST);
    else if (alloc && use_fresh) fresh <= fresh + 1'b1;
  end

  sync_fifo #(.T(logic [W-1:0]), .DEPTH(N)) u_recycle (
    .clk, .rst_n, .clear(1'b0),
    .wr_en(free_valid), .wr_data(free_id),
    .rd_en(alloc && !use_fresh), .rd_data(rec_data),
    .full(rec_full), .empty(rec_empty), .count(rec_count)
  );

  a_alloc_avail: assert property (@(posedge clk) disable iff (!rst_n) alloc |-> avail);
endmodule

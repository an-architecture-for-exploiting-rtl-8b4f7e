// cp_ready_pool: pool of task instructions whose inputs are all ready.
//
// The wake-up unit pushes the task-queue index of each task that becomes
// ready; the select-and-assign unit takes them out. The scheduling policy
// is first ready, first served, so the pool is a circular queue of
// POOL_SIZE entries in the order tasks became ready. The head is visible
// while valid is high (first-word-fall-through); pop removes it.
module cp_ready_pool
  import mlca_pkg::*;
#(
  parameter int DEPTH = POOL_SIZE
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            push,
  input  logic [TQ_W-1:0] push_tq,
  output logic            full,
  output logic            valid,
  output logic [TQ_W-1:0] head_tq,
  input  logic            pop,
  output logic [$clog2(DEPTH):0] count
);
  localparam int AW = $clog2(DEPTH);

  logic [TQ_W-1:0] pool [DEPTH];
  logic [AW-1:0]   wp, rp;

  assign full    = (count == ($clog2(DEPTH)+1)'(DEPTH));
  assign valid   = (count != '0);
  assign head_tq = pool[rp];

  wire do_push = push && !full;
  wire do_pop  = pop && valid;

  always_ff @(posedge clk) if (do_push) pool[wp] <= push_tq;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wp <= '0; rp <= '0; count <= '0;
    end else begin
      if (do_push) wp <= wp + 1'b1;
      if (do_pop)  rp <= rp + 1'b1;
      count <= count + (do_push ? 1'b1 : 1'b0) - (do_pop ? 1'b1 : 1'b0);
    end
  end

  a_push_room: assert property (@(posedge clk) disable iff (!rst_n) push |-> !full);
endmodule

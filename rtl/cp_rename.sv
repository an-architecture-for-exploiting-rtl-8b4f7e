// cp_rename: register renaming unit ("register allocation and map").
//
// A map table gives, for each of the 256 URF registers, the physical
// register that holds its newest value; after reset URF register i lives in
// physical register i. A free list hands out the other physical registers.
// For each input token the unit looks up the current mapping; for each
// output token it takes a free physical register, records the mapping it
// replaces (released when the task retires) and updates the map. Header
// tokens pass through. Renaming is a sequence of three cycles per register
// (accept and read the map, resolve and allocate, emit), as in the CP it is
// modelled on; a task with 20 inputs takes 60 cycles to rename its inputs.
// Outputs stall while no physical register is free. free_* returns
// physical registers from the retire unit. dbg_areg / dbg_preg read the map.
module cp_rename
  import mlca_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  input  logic              in_valid,
  input  fe_tok_t           in_tok,
  output logic              in_pop,
  output logic              out_valid,
  output fe_tok_t           out_tok,
  input  logic              out_ready,
  input  logic              free_valid,
  input  logic [PREG_W-1:0] free_preg,
  input  logic [AREG_W-1:0] dbg_areg,
  output logic [PREG_W-1:0] dbg_preg
);
  typedef enum logic [1:0] {S_ACCEPT, S_RESOLVE, S_EMIT} state_e;

  state_e            state;
  fe_tok_t           cur;
  logic [PREG_W-1:0] map     [NUM_AREG];
  logic [NUM_AREG-1:0] mapped;      // map entry written since reset
  logic [PREG_W-1:0] map_q;
  logic              mapped_q;
  logic              fl_avail, fl_alloc;
  logic [PREG_W-1:0] fl_id;
  logic [PREG_W:0]   fl_num;

  wire [PREG_W-1:0] cur_map = mapped_q ? map_q : PREG_W'(cur.areg);

  assign in_pop    = (state == S_ACCEPT) && in_valid;
  assign out_valid = (state == S_EMIT);
  assign out_tok   = cur;
  assign fl_alloc  = (state == S_RESOLVE) && (cur.kind == TK_OUT) && fl_avail;
  assign dbg_preg  = mapped[dbg_areg] ? map[dbg_areg] : PREG_W'(dbg_areg);

  always_ff @(posedge clk) begin
    if (in_pop) map_q <= map[in_tok.areg];
    if (fl_alloc) map[cur.areg] <= fl_id;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state    <= S_ACCEPT;
      cur      <= '0;
      mapped   <= '0;
      mapped_q <= 1'b0;
    end else begin
      unique case (state)
        S_ACCEPT: if (in_valid) begin
          cur      <= in_tok;
          mapped_q <= mapped[in_tok.areg];
          state    <= (in_tok.kind == TK_HDR) ? S_EMIT : S_RESOLVE;
        end
        S_RESOLVE: begin
          if (cur.kind == TK_IN) begin
            cur.preg <= cur_map;
            state    <= S_EMIT;
          end else if (fl_avail) begin
            cur.preg     <= fl_id;
            cur.old_preg <= cur_map;
            mapped[cur.areg] <= 1'b1;
            state        <= S_EMIT;
          end
        end
        S_EMIT: if (out_ready) state <= S_ACCEPT;
        default: state <= S_ACCEPT;
      endcase
    end
  end

  cp_free_list #(.N(NUM_PREG), .FIRST(NUM_AREG), .W(PREG_W)) u_free (
    .clk, .rst_n, .avail(fl_avail), .alloc_id(fl_id), .alloc(fl_alloc),
    .free_valid, .free_id(free_preg), .num_free(fl_num)
  );
endmodule

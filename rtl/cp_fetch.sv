// cp_fetch: fetch unit of the CP front end.
//
// After start it reads the control program sequentially from address 0 and
// keeps up to FETCH_WORDS 128-bit words in a fetch buffer, which the decode
// unit consumes (word_valid / word / word_pop, first-word-fall-through).
// Program memory reads take one cycle; a read is only started while the
// buffer, counting the read in flight, has room. A redirect (a taken jump
// decoded by the decode unit) empties the buffer, discards the read in
// flight and restarts at the target. halt stops fetching after STOP.
// The buffer size follows the CP configuration; the rest is own design.
module cp_fetch
  import mlca_pkg::*;
#(
  parameter int FETCH_DEPTH = FETCH_WORDS
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              start,
  input  logic              halt,
  input  logic              redirect,
  input  logic [PC_W-1:0]   redirect_pc,
  // program memory read port
  output logic              mem_rd_en,
  output logic [PC_W-1:0]   mem_raddr,
  input  logic [WORD_W-1:0] mem_rd_data,
  // to decode
  output logic              word_valid,
  output logic [WORD_W-1:0] word,
  input  logic              word_pop
);
  logic            running;
  logic [PC_W-1:0] pc;
  logic            inflight;
  logic            buf_full, buf_empty;
  logic [$clog2(FETCH_DEPTH):0] buf_count;

  wire room = (32'(buf_count) + (inflight ? 32'd1 : 32'd0)) < 32'(FETCH_DEPTH);

  assign mem_rd_en  = running && !redirect && !halt && room;
  assign mem_raddr  = pc;
  assign word_valid = !buf_empty;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      running  <= 1'b0;
      pc       <= '0;
      inflight <= 1'b0;
    end else begin
      inflight <= mem_rd_en;
      if (start) begin
        running <= 1'b1;
        pc      <= '0;
      end else if (halt) begin
        running <= 1'b0;
      end else if (redirect) begin
        pc <= redirect_pc;
      end else if (mem_rd_en) begin
        pc <= pc + 1'b1;
      end
    end
  end

  sync_fifo #(.T(logic [WORD_W-1:0]), .DEPTH(FETCH_DEPTH)) u_buf (
    .clk, .rst_n, .clear(redirect || start),
    .wr_en(inflight && !redirect && !start), .wr_data(mem_rd_data),
    .rd_en(word_pop), .rd_data(word),
    .full(buf_full), .empty(buf_empty), .count(buf_count)
  );
endmodule

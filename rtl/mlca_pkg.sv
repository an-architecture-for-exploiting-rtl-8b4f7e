// mlca_pkg: sizes, instruction encoding and message types shared by the
// units of the MLCA Control Processor (CP).
//
// Storage sizes follow the CP configuration the design was evaluated with:
// 256 URF and 32 control registers, a 512-entry task queue, 2048 physical
// registers, a 2048-register wake-up unit, a 512-entry ready pool, an
// 8-word fetch buffer, a 64-register rename queue and tasks of up to 64
// inputs and 64 outputs. Word widths, the instruction encoding, the
// operand-ring size and the program-memory depth are this design's own
// choices; they are listed at each definition below.
package mlca_pkg;

  // ---- architectural and storage sizes -----------------------------------
  localparam int NUM_AREG    = 256;   // URF registers
  localparam int AREG_W      = 8;
  localparam int NUM_CR      = 32;    // control registers
  localparam int CR_W        = 5;
  localparam int NUM_PREG    = 2048;  // physical register file
  localparam int PREG_W      = 11;
  localparam int TQ_SIZE     = 512;   // task queue, in task descriptors
  localparam int TQ_W        = 9;
  localparam int MAX_IO      = 64;    // max inputs, and max outputs, of a task
  localparam int IO_W        = 7;     // holds 0..64
  localparam int WAKEUP_SIZE = 2048;  // waiting-input entries in the wake-up unit
  localparam int WK_W        = 11;
  localparam int POOL_SIZE   = 512;   // ready task pool
  localparam int FETCH_WORDS = 8;     // fetch buffer, 128-bit words
  localparam int RENAME_Q    = 64;    // rename queue, registers
  localparam int DISPATCH_Q  = 4;     // dispatch queue into the wake-up unit
  // Own choices: operand rings (one for input, one for output register
  // lists of in-flight tasks) and the control-program memory depth.
  localparam int RING_SIZE   = 2048;
  localparam int RING_W      = 11;
  localparam int PROG_DEPTH  = 1024;
  localparam int PC_W        = 10;

  localparam int WORD_W      = 128;   // control-program word
  localparam int DATA_W      = 32;    // register value (Nios II word)
  localparam int TID_W       = 16;    // task ID
  localparam int OPS_PER_WORD = WORD_W / AREG_W;  // 16 operands per word

  // ---- control-program encoding (own choice) ------------------------------
  // [127:124] opcode
  // TASK : [123:108] task id, [106:100] n_in, [99:93] n_out,
  //        [92] writes a CR, [91:87] that CR. The operand list follows in
  //        ceil((n_in+n_out)/16) words, 8 bits per URF register, inputs
  //        first, slot j in bits [8j+7:8j].
  // MOVI : [123:119] CR, [31:0] immediate
  // JMPA : [9:0] target;  JZ / JNZ : [123:119] CR tested, [9:0] target
  // STOP : halt fetching
  typedef enum logic [3:0] {
    OP_NOP  = 4'd0,
    OP_TASK = 4'd1,
    OP_MOVI = 4'd2,
    OP_JMPA = 4'd3,
    OP_JZ   = 4'd4,
    OP_JNZ  = 4'd5,
    OP_STOP = 4'd6
  } opcode_e;

  // Task descriptor header, carried from decode to the task queue.
  typedef struct packed {
    logic [TID_W-1:0] task_id;
    logic [IO_W-1:0]  n_in;
    logic [IO_W-1:0]  n_out;
    logic             cr_wr;
    logic [CR_W-1:0]  cr_idx;
    logic [TQ_W:0]    cr_seq;   // number of this write among writes to cr_idx
  } td_hdr_t;

  // Front-end token: a task header or one operand register.
  typedef enum logic [1:0] {TK_HDR = 2'd0, TK_IN = 2'd1, TK_OUT = 2'd2} tok_kind_e;

  typedef struct packed {
    tok_kind_e         kind;
    td_hdr_t           hdr;       // valid for TK_HDR
    logic [AREG_W-1:0] areg;      // URF register (TK_IN / TK_OUT)
    logic [PREG_W-1:0] preg;      // physical register after renaming
    logic [PREG_W-1:0] old_preg;  // previous mapping of an output
  } fe_tok_t;

  // Messages from dispatch to the wake-up unit.
  typedef enum logic [1:0] {WK_HDR = 2'd0, WK_IN = 2'd1, WK_OUT = 2'd2, WK_END = 2'd3} wk_kind_e;

  typedef struct packed {
    wk_kind_e          kind;
    logic [TQ_W-1:0]   tq;
    logic [PREG_W-1:0] preg;
  } wk_msg_t;

  // Task queue entry.
  typedef struct packed {
    td_hdr_t           hdr;
    logic [RING_W-1:0] in_base;
    logic [RING_W-1:0] out_base;
  } tq_entry_t;

  // Output-queue message from a PU to the CP.
  typedef enum logic [1:0] {PO_OUT = 2'd0, PO_CR = 2'd1, PO_DONE = 2'd2} po_kind_e;

  typedef struct packed {
    po_kind_e         kind;
    logic [IO_W-1:0]  idx;    // output argument number (PO_OUT)
    logic [DATA_W-1:0] value;
  } pu_out_t;

  // Out-ring entry: new physical register and the one it replaced.
  typedef struct packed {
    logic [PREG_W-1:0] preg;
    logic [PREG_W-1:0] old_preg;
  } out_opnd_t;

  // Header word sent to a PU ahead of the input values:
  // [31:16] task id, [15] task writes a CR, [14:8] n_in, [6:0] n_out.
  function automatic logic [DATA_W-1:0] pu_hdr_word(td_hdr_t h);
    return {h.task_id, h.cr_wr, h.n_in, 1'b0, h.n_out};
  endfunction

  // ---- instruction builders (for programs and testbenches) --------------
  function automatic logic [WORD_W-1:0] enc_task(logic [TID_W-1:0] id, int n_in, int n_out,
                                                 logic cr_wr, int cr);
    logic [WORD_W-1:0] w;
    w = '0;
    w[127:124] = OP_TASK;
    w[123:108] = id;
    w[106:100] = IO_W'(n_in);
    w[99:93]   = IO_W'(n_out);
    w[92]      = cr_wr;
    w[91:87]   = CR_W'(cr);
    return w;
  endfunction

  function automatic logic [WORD_W-1:0] enc_movi(int cr, logic [DATA_W-1:0] imm);
    logic [WORD_W-1:0] w;
    w = '0;
    w[127:124] = OP_MOVI;
    w[123:119] = CR_W'(cr);
    w[31:0]    = imm;
    return w;
  endfunction

  function automatic logic [WORD_W-1:0] enc_jump(opcode_e op, int cr, int target);
    logic [WORD_W-1:0] w;
    w = '0;
    w[127:124] = op;
    w[123:119] = CR_W'(cr);
    w[PC_W-1:0] = PC_W'(target);
    return w;
  endfunction

endpackage

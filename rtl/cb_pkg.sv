// Shared types, constants and arithmetic helpers of the CryptoBooster coprocessor.
//
// IDEA works on 64-bit blocks split into four 16-bit words and uses 52 16-bit
// subkeys (six per regular round, four for the output transformation). The
// pipeline geometry (7 stages per regular round, 3 for the output round, 59
// cycles through the pipeline) follows the described design. The CoreLink
// packet format, the session record layout and the register map are choices
// of this implementation.
package cb_pkg;

  // ---------------------------------------------------------------- IDEA
  localparam int IDEA_ROUNDS      = 8;   // regular rounds of the algorithm
  localparam int ROUND_STAGES     = 7;   // pipeline stages of one regular round
  localparam int OUT_STAGES       = 3;   // pipeline stages of the output round
  localparam int PIPE_LATENCY     = IDEA_ROUNDS * ROUND_STAGES + OUT_STAGES; // 59
  localparam int PASS_W           = 3;   // width of the per-block pass counter
  localparam int TAG_W            = 8;   // width of the chain tag carried with a block

  typedef logic [15:0] word_t;
  typedef logic [63:0] block_t;

  // Control word that travels alongside each data block through the pipeline.
  typedef struct packed {
    logic              valid;   // 0 marks a bubble
    logic [PASS_W-1:0] pass;    // completed trips through the regular-round block
    logic [TAG_W-1:0]  tag;     // chain number assigned by block chaining
  } pipe_ctl_t;

  // Subkey write: IDEA round 1..9 and subkey index 1..6 (1..4 for round 9).
  typedef struct packed {
    logic        we;
    logic [3:0]  round;
    logic [2:0]  idx;
    word_t       data;
  } key_wr_t;

  // Block-chaining modes.
  typedef enum logic [1:0] {MODE_ECB = 2'd0, MODE_CBC = 2'd1, MODE_CFB = 2'd2, MODE_OFB = 2'd3} chain_mode_t;

  // Number of interleaved chains (initial vectors) that keeps the pipeline busy
  // in a feedback mode: a chain can issue its next block only after the
  // previous one left the pipeline (PIPE_LATENCY cycles + 1 to update the
  // feedback register), while the pipeline accepts one new block every
  // IDEA_ROUNDS/n_rounds cycles.
  function automatic int chains_needed(int n_rounds);
    return ((PIPE_LATENCY + 1) * n_rounds + IDEA_ROUNDS - 1) / IDEA_ROUNDS;
  endfunction

  // Multiplication modulo 2^16+1, the all-zero word standing for 2^16,
  // computed with the low-high algorithm. Used by the key schedule
  // (inversion) and as a reference by testbenches.
  function automatic word_t mulmod(word_t a, word_t b);
    logic [31:0] p;
    logic [15:0] lo, hi;
    if (a == 16'h0)      return word_t'(17'h1 - {1'b0, b});
    else if (b == 16'h0) return word_t'(17'h1 - {1'b0, a});
    p  = 32'(a) * 32'(b);
    lo = p[15:0];
    hi = p[31:16];
    return word_t'(lo - hi + ((lo < hi) ? 16'h1 : 16'h0));
  endfunction

  // --------------------------------------------------------------- CoreLink
  // A CoreLink is a unidirectional point-to-point link: a flit plus a
  // valid/ready handshake. A flit is transferred in a cycle where both valid
  // and ready are high.
  typedef enum logic {CL_CTRL = 1'b0, CL_DATA = 1'b1} cl_kind_t;
  typedef struct packed {
    cl_kind_t kind;
    logic     last;
    block_t   data;
  } cl_flit_t;

  // Control packets from SessionControl to the SessionAdapter (carried in
  // cl_flit_t.data): [3:0] opcode, [19:4] session id / word address,
  // response: [0] ok, [63:32] read data of SMEM reads is returned as a
  // second DATA flit.
  typedef enum logic [3:0] {
    SA_NOP = 4'd0, SA_LOAD = 4'd1, SA_SAVE = 4'd2, SA_MEMWR = 4'd3, SA_MEMRD = 4'd4
  } sa_op_t;

  // Command from the host interface to the session controller.
  typedef struct packed {
    sa_op_t      op;
    logic [15:0] arg;     // session id or session-memory word address
    block_t      wdata;   // data of a session-memory write
  } host_cmd_t;

  // ------------------------------------------------------------ SessionMem
  localparam int SMEM_AW = 16;   // 64-bit session-memory word address
  typedef struct packed {
    logic               we;
    logic [SMEM_AW-1:0] addr;
    block_t             wdata;
  } smem_req_t;

  // Session record (64-bit words, at sid * SESSION_WORDS):
  //   word 0 : header  [7:0] algorithm id, [9:8] chain mode, [10] decrypt
  //   word 1 : key[127:64]    word 2 : key[63:0]
  //   word 3+c : initial vector of chain c
  localparam logic [7:0] ALG_IDEA = 8'h01;
  localparam int SESSION_WORDS = 64;

  // Feature words returned by the intelligent modules when queried.
  //   CypherCore : [7:0] algorithm, [15:8] block bits/8, [23:16] key bits/8,
  //                [27:24] regular rounds built, [31:28] supported modes mask
  //   SessionAdapter : [7:0] algorithm, [15:8] chains, [23:16] record words/2
  localparam logic [3:0] MODES_ALL = 4'b1111;

endpackage

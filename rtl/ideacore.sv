// IDEACore: the IDEA CypherCore, made of the scalable IDEA pipeline and the
// block-chaining unit in front of it.
//
// Data blocks arrive and leave on CoreLink valid/ready streams; the block
// chaining unit feeds the pipeline and collects its results. Subkeys (key_wr),
// chaining vectors (iv_*), the chaining mode and the direction are set by the
// session adapter while the core is idle (busy low). When queried, the core
// answers with a constant feature word: algorithm, block and key size,
// regular rounds built and supported chaining modes (layout in cb_pkg).
// The split into pipeline and block chaining follows the described design;
// the feature word layout is this implementation's choice.
module ideacore
  import cb_pkg::*;
#(
  parameter int N_ROUNDS = 8,
  parameter int NCHAIN   = chains_needed(N_ROUNDS)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  chain_mode_t      mode,
  input  logic             decrypt,
  input  logic             restart,
  input  key_wr_t          key_wr,
  input  logic             iv_we,
  input  logic [TAG_W-1:0] iv_idx,
  input  block_t           iv_wdata,
  output block_t           iv_rdata,
  input  logic             in_valid,
  input  block_t           in_data,
  output logic             in_ready,
  output logic             out_valid,
  output block_t           out_data,
  input  logic             out_ready,
  output logic             busy,
  output logic [31:0]      features
);

  logic             p_in_valid, p_in_ready, p_out_valid, p_busy, bc_busy;
  block_t           p_in_data, p_out_data;
  logic [TAG_W-1:0] p_in_tag, p_out_tag;
  logic             chain_wait;

  block_chaining #(.NCHAIN(NCHAIN)) u_bc (
    .clk, .rst_n, .mode, .decrypt, .restart,
    .iv_we, .iv_idx, .iv_wdata, .iv_rdata,
    .in_valid, .in_data, .in_ready,
    .out_valid, .out_data, .out_ready,
    .pipe_in_valid(p_in_valid), .pipe_in_data(p_in_data), .pipe_in_tag(p_in_tag),
    .pipe_in_ready(p_in_ready),
    .pipe_out_valid(p_out_valid), .pipe_out_data(p_out_data), .pipe_out_tag(p_out_tag),
    .busy(bc_busy), .chain_wait(chain_wait));

  idea_pipeline #(.N_ROUNDS(N_ROUNDS)) u_pipe (
    .clk, .rst_n,
    .in_valid(p_in_valid), .in_data(p_in_data), .in_tag(p_in_tag), .in_ready(p_in_ready),
    .key_wr,
    .out_valid(p_out_valid), .out_data(p_out_data), .out_tag(p_out_tag),
    .busy(p_busy));

  assign busy     = bc_busy || p_busy;
  assign features = {MODES_ALL, 4'(N_ROUNDS), 8'd16, 8'd8, ALG_IDEA};

endmodule

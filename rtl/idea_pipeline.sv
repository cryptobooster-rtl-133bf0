// Scalable IDEA pipeline: N_ROUNDS regular rounds (1, 2, 4 or 8) looped back
// on themselves, followed by one output round.
//
// A block entering the pipeline gets a pass counter of 0. Each time it leaves
// the last regular round, the counter decides: after 8/N_ROUNDS trips it goes
// to the output round, otherwise it is fed back to the first regular round
// with the counter incremented. The counter also addresses the subkey
// memories, so physical round j serves IDEA rounds j, j+N, j+2N, ...
// A fed-back block always owns the loop entry; a new block is accepted
// (in_ready) only when no block is being fed back, and an empty slot travels
// on as a bubble (valid = 0), so the pipeline never stalls. Every block takes
// 8*7 + 3 = 59 cycles whatever N_ROUNDS is: in_data accepted in cycle t
// appears on out_data in cycle t+59. A new block can be accepted every cycle
// with 8 rounds and on average every 8/N_ROUNDS cycles otherwise.
// The round count options, the self-controlled control pipeline, the pass
// counter and the bubble mechanism follow the described design; giving the
// loop priority over new blocks is this implementation's choice.
module idea_pipeline
  import cb_pkg::*;
#(
  parameter int N_ROUNDS = 8
) (
  input  logic             clk,
  input  logic             rst_n,
  // new blocks from block chaining
  input  logic             in_valid,
  input  block_t           in_data,
  input  logic [TAG_W-1:0] in_tag,
  output logic             in_ready,
  // subkey writes from the session adapter
  input  key_wr_t          key_wr,
  // finished blocks, one cycle wide, no back-pressure
  output logic             out_valid,
  output block_t           out_data,
  output logic [TAG_W-1:0] out_tag,
  output logic             busy      // a valid block is somewhere in the pipeline
);

  localparam int N_PASS = IDEA_ROUNDS / N_ROUNDS;

  initial begin
    assert (N_ROUNDS == 1 || N_ROUNDS == 2 || N_ROUNDS == 4 || N_ROUNDS == 8)
      else $error("idea_pipeline: N_ROUNDS must be 1, 2, 4 or 8");
  end

  block_t    loop_data;           // input of the first regular round
  pipe_ctl_t loop_ctl;
  block_t    r_data [N_ROUNDS];   // outputs of the regular rounds
  pipe_ctl_t r_ctl  [N_ROUNDS];

  // loop block of the last regular round
  block_t    fb_data;
  pipe_ctl_t fb_ctl;
  logic      fb_loop, fb_exit;
  assign fb_data = r_data[N_ROUNDS-1];
  assign fb_ctl  = r_ctl[N_ROUNDS-1];
  assign fb_loop = fb_ctl.valid && (int'(fb_ctl.pass) != N_PASS - 1);
  assign fb_exit = fb_ctl.valid && (int'(fb_ctl.pass) == N_PASS - 1);

  assign in_ready = !fb_loop;

  always_comb begin
    if (fb_loop) begin
      loop_data      = fb_data;
      loop_ctl       = fb_ctl;
      loop_ctl.pass  = fb_ctl.pass + 1'b1;
    end else begin
      loop_data      = in_data;
      loop_ctl.valid = in_valid;
      loop_ctl.pass  = '0;
      loop_ctl.tag   = in_tag;
    end
  end

  for (genvar j = 0; j < N_ROUNDS; j++) begin : g_round
    idea_round #(.N_ROUNDS(N_ROUNDS), .ROUND_IDX(j)) u_round (
      .clk     (clk),
      .rst_n   (rst_n),
      .in_data ((j == 0) ? loop_data : r_data[(j == 0) ? 0 : j-1]),
      .in_ctl  ((j == 0) ? loop_ctl  : r_ctl[(j == 0) ? 0 : j-1]),
      .key_wr  (key_wr),
      .out_data(r_data[j]),
      .out_ctl (r_ctl[j])
    );
  end

  pipe_ctl_t o_in_ctl, o_ctl;
  always_comb begin
    o_in_ctl       = fb_ctl;
    o_in_ctl.valid = fb_exit;
  end

  idea_output_round u_out (
    .clk     (clk),
    .rst_n   (rst_n),
    .in_data (fb_data),
    .in_ctl  (o_in_ctl),
    .key_wr  (key_wr),
    .out_data(out_data),
    .out_ctl (o_ctl)
  );

  assign out_valid = o_ctl.valid;
  assign out_tag   = o_ctl.tag;

  // Count the valid blocks inside: entered minus left.
  logic [7:0] n_inside;
  always_ff @(posedge clk) begin
    if (!rst_n) n_inside <= '0;
    else n_inside <= n_inside + 8'(in_valid && in_ready) - 8'(out_valid);
  end
  assign busy = (n_inside != 0);

  // There are only PIPE_LATENCY register rows to hold blocks.
  a_no_overflow: assert property (@(posedge clk) disable iff (!rst_n) n_inside <= 8'(PIPE_LATENCY));

endmodule

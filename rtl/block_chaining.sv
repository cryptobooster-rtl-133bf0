// Block-chaining unit in front of the IDEA pipeline: ECB, CBC, CFB and OFB,
// for encryption and decryption, with NCHAIN interleaved chains.
//
// Incoming blocks are dealt to the chains in turn (block i belongs to chain
// i mod NCHAIN) and each chain keeps its own feedback register, loaded with
// its initial vector before a session starts. Chaining needs the previous
// result of the same chain, which is 59 cycles away in the pipeline; with
// enough chains a new block always has a ready chain and the pipeline keeps
// running at full rate. The modes, per block P/C of chain c with feedback fb:
//   ECB        : pipe <- P                        out = pipe
//   CBC enc    : pipe <- P ^ fb                   out = pipe, fb <- out (on exit)
//   CBC dec    : pipe <- C, fb <- C (on entry)    out = pipe ^ old fb
//   CFB enc    : pipe <- fb                       out = pipe ^ P, fb <- out (on exit)
//   CFB dec    : pipe <- fb, fb <- C (on entry)   out = pipe ^ C
//   OFB        : pipe <- fb                       out = pipe ^ P, fb <- pipe (on exit)
// The value to XOR on exit travels in a side FIFO, since blocks leave the
// pipeline in the order they entered. In the modes marked "on exit" a block
// waits until the previous block of its chain has left the pipeline. The
// pipeline cannot stall, so a block is admitted only while the output buffer
// has room for everything in flight (credit). CFB and OFB run the cipher in
// the encryption direction for both directions; the session adapter loads the
// subkeys accordingly.
// Interface: CoreLink-style valid/ready streams of 64-bit blocks in and out;
// iv_* writes and reads feedback registers (only while idle); restart
// returns the chain counter to chain 0.
// The four modes and the use of enough initial vectors to avoid stalling
// follow the described design; round-robin dealing, the side FIFO and the
// credit scheme are this implementation's choices.
module block_chaining
  import cb_pkg::*;
#(
  parameter int NCHAIN     = chains_needed(IDEA_ROUNDS),
  parameter int OUTQ_DEPTH = 64
) (
  input  logic             clk,
  input  logic             rst_n,
  input  chain_mode_t      mode,
  input  logic             decrypt,
  input  logic             restart,
  input  logic             iv_we,
  input  logic [TAG_W-1:0] iv_idx,
  input  block_t           iv_wdata,
  output block_t           iv_rdata,
  // CoreLink data in
  input  logic             in_valid,
  input  block_t           in_data,
  output logic             in_ready,
  // CoreLink data out
  output logic             out_valid,
  output block_t           out_data,
  input  logic             out_ready,
  // towards the IDEA pipeline
  output logic             pipe_in_valid,
  output block_t           pipe_in_data,
  output logic [TAG_W-1:0] pipe_in_tag,
  input  logic             pipe_in_ready,
  input  logic             pipe_out_valid,
  input  block_t           pipe_out_data,
  input  logic [TAG_W-1:0] pipe_out_tag,
  output logic             busy,
  output logic             chain_wait   // a block waits for its chain
);

  localparam int CW  = $clog2(OUTQ_DEPTH + 1);
  localparam int CHW = (NCHAIN > 1) ? $clog2(NCHAIN) : 1;

  initial assert (NCHAIN >= 1 && NCHAIN <= 2**TAG_W && OUTQ_DEPTH >= PIPE_LATENCY)
    else $error("block_chaining: bad parameters");

  block_t           fb [NCHAIN];
  logic [NCHAIN-1:0] chain_busy;
  logic [TAG_W-1:0] cur;
  logic [7:0]       inflight;
  logic [CW-1:0]    outq_count;

  logic [CHW-1:0] cur_i, iv_i, out_i;
  assign cur_i = cur[CHW-1:0];
  assign iv_i  = iv_idx[CHW-1:0];
  assign out_i = pipe_out_tag[CHW-1:0];

  logic dep, upd_on_entry, use_xor;
  always_comb begin
    dep          = (mode == MODE_OFB) || (!decrypt && (mode == MODE_CBC || mode == MODE_CFB));
    upd_on_entry = decrypt && (mode == MODE_CBC || mode == MODE_CFB);
    use_xor      = (mode != MODE_ECB) && !(mode == MODE_CBC && !decrypt);
  end

  logic   credit_ok, accept;
  block_t fb_cur, xv;
  always_comb begin
    fb_cur     = fb[cur_i];
    credit_ok  = (int'(inflight) + int'(outq_count)) < OUTQ_DEPTH;
    chain_wait = in_valid && dep && chain_busy[cur_i];
    accept     = in_valid && pipe_in_ready && credit_ok && !(dep && chain_busy[cur_i]);
    in_ready   = accept;

    unique case (mode)
      MODE_ECB: pipe_in_data = in_data;
      MODE_CBC: pipe_in_data = decrypt ? in_data : (in_data ^ fb_cur);
      default:  pipe_in_data = fb_cur;   // CFB, OFB
    endcase
    if (!use_xor)                          xv = '0;
    else if (mode == MODE_CBC)             xv = fb_cur;  // CBC decryption
    else                                   xv = in_data; // CFB, OFB
  end

  assign pipe_in_valid = accept;
  assign pipe_in_tag   = cur;
  assign iv_rdata      = fb[iv_i];

  // ------------------------------------------------------------ exit side
  block_t xq_head, result;
  logic   xq_valid;
  corelink_fifo #(.WIDTH(64), .DEPTH(OUTQ_DEPTH)) u_xorq (
    .clk, .rst_n,
    .in_valid(accept), .in_data(xv), .in_ready(),
    .out_valid(xq_valid), .out_data(xq_head), .out_ready(pipe_out_valid),
    .count());

  assign result = pipe_out_data ^ xq_head;

  logic outq_in_ready;
  corelink_fifo #(.WIDTH(64), .DEPTH(OUTQ_DEPTH)) u_outq (
    .clk, .rst_n,
    .in_valid(pipe_out_valid), .in_data(result), .in_ready(outq_in_ready),
    .out_valid(out_valid), .out_data(out_data), .out_ready(out_ready),
    .count(outq_count));

  // ------------------------------------------------------------ state
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      cur        <= '0;
      chain_busy <= '0;
      inflight   <= '0;
    end else begin
      inflight <= inflight + 8'(accept) - 8'(pipe_out_valid);
      if (restart) cur <= '0;
      else if (accept) cur <= (int'(cur) == NCHAIN - 1) ? '0 : cur + 1'b1;
      if (pipe_out_valid) chain_busy[out_i] <= 1'b0;
      if (accept && dep)  chain_busy[cur_i] <= 1'b1;
    end
  end

  always_ff @(posedge clk) begin
    if (iv_we) fb[iv_i] <= iv_wdata;
    if (accept && upd_on_entry) fb[cur_i] <= in_data;
    if (pipe_out_valid && dep)
      fb[out_i] <= (mode == MODE_OFB) ? pipe_out_data : result;
  end

  assign busy = (inflight != 0) || out_valid;

  a_exit_has_xor: assert property (@(posedge clk) disable iff (!rst_n) pipe_out_valid |-> xq_valid);
  a_outq_room:    assert property (@(posedge clk) disable iff (!rst_n) pipe_out_valid |-> outq_in_ready);

endmodule

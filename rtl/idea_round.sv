// One regular IDEA round as a seven-stage pipeline with its subkey memories.
//
// Stage k is a register row followed by logic; the block entering the round
// is captured by row 1 and the result of the stage-7 logic leaves the module
// combinationally, to be captured by row 1 of the next round. Per stage:
//   1: M1 := X1 (*) Z1 starts                         (key Z1)
//   2: A := M1; C := X3 (+) Z3; E := A ^ C; M4 := X4 (*) Z4 starts (keys Z3, Z4)
//   3: D := M4; B := X2 (+) Z2; F := B ^ D; M5 := E (*) Z5 starts  (keys Z2, Z5)
//   4: G := M5; H := F (+) G
//   5: M6 := H (*) Z6 starts                          (key Z6)
//   6: I := M6; J := G (+) I
//   7: Y := (A ^ I, C ^ I, B ^ J, D ^ J)
// (*) is multiplication modulo 2^16+1 spanning two stages, (+) addition
// modulo 2^16. The stage in which each subkey enters and the placement of
// multipliers, adders and XORs follow the described datapath; the contents of
// each register row follow from it.
// The control word (valid, pass, tag) moves with the data; the pass counter
// addresses the six key memories. Subkey writes for IDEA round r land in this
// round when (r-1) mod N_ROUNDS == ROUND_IDX, at entry (r-1) / N_ROUNDS.
module idea_round
  import cb_pkg::*;
#(
  parameter int N_ROUNDS  = 8,   // regular rounds built in the pipeline
  parameter int ROUND_IDX = 0    // position of this round, 0-based
) (
  input  logic      clk,
  input  logic      rst_n,
  input  block_t    in_data,
  input  pipe_ctl_t in_ctl,
  input  key_wr_t   key_wr,
  output block_t    out_data,
  output pipe_ctl_t out_ctl
);

  localparam int DEPTH = IDEA_ROUNDS / N_ROUNDS;

  // ------------------------------------------------------------ key memories
  logic             kw_hit;
  logic [PASS_W-1:0] kw_addr;
  always_comb begin
    kw_hit  = key_wr.we && key_wr.round >= 4'd1 && key_wr.round <= 4'(IDEA_ROUNDS)
              && ((int'(key_wr.round) - 1) % N_ROUNDS) == ROUND_IDX;
    kw_addr = PASS_W'((int'(key_wr.round) - 1) / N_ROUNDS);
  end

  pipe_ctl_t ctl [1:7];
  word_t     z   [1:6];
  logic [PASS_W-1:0] z_raddr [1:6];

  // Rows whose logic consumes each key: Z1 row 1, Z3/Z4 row 2, Z2/Z5 row 3, Z6 row 5.
  assign z_raddr[1] = ctl[1].pass;
  assign z_raddr[2] = ctl[3].pass;
  assign z_raddr[3] = ctl[2].pass;
  assign z_raddr[4] = ctl[2].pass;
  assign z_raddr[5] = ctl[3].pass;
  assign z_raddr[6] = ctl[5].pass;

  for (genvar k = 1; k <= 6; k++) begin : g_key
    idea_key_mem #(.DEPTH(DEPTH)) u_mem (
      .clk  (clk),
      .we   (kw_hit && key_wr.idx == 3'(k)),
      .waddr(kw_addr),
      .wdata(key_wr.data),
      .raddr(z_raddr[k]),
      .rdata(z[k])
    );
  end

  // ---------------------------------------------------------- control pipeline
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int k = 1; k <= 7; k++) ctl[k] <= '0;
    end else begin
      ctl[1] <= in_ctl;
      for (int k = 2; k <= 7; k++) ctl[k] <= ctl[k-1];
    end
  end

  // ------------------------------------------------------------- data pipeline
  word_t r1_x1, r1_x2, r1_x3, r1_x4;            // row 1
  word_t r2_x2, r2_x3, r2_x4;                   // row 2 (M1 inside multiplier)
  word_t r3_a, r3_x2, r3_c, r3_e;               // row 3 (M4 inside multiplier)
  word_t r4_a, r4_b, r4_c, r4_d, r4_f;          // row 4 (M5 inside multiplier)
  word_t r5_a, r5_b, r5_c, r5_d, r5_g, r5_h;    // row 5
  word_t r6_a, r6_b, r6_c, r6_d, r6_g;          // row 6 (M6 inside multiplier)
  word_t r7_a, r7_b, r7_c, r7_d, r7_i, r7_j;    // row 7

  word_t m1_y, m4_y, m5_y, m6_y;
  word_t s2_a, s2_c, s2_e;
  word_t s3_b, s3_d, s3_f;
  word_t s4_g, s4_h;
  word_t s6_i, s6_j;

  idea_mulmod u_m1 (.clk(clk), .a(r1_x1), .b(z[1]), .y(m1_y));
  idea_mulmod u_m4 (.clk(clk), .a(r2_x4), .b(z[4]), .y(m4_y));
  idea_mulmod u_m5 (.clk(clk), .a(r3_e),  .b(z[5]), .y(m5_y));
  idea_mulmod u_m6 (.clk(clk), .a(r5_h),  .b(z[6]), .y(m6_y));

  always_comb begin
    s2_a = m1_y;
    s2_c = r2_x3 + z[3];
    s2_e = s2_a ^ s2_c;
    s3_d = m4_y;
    s3_b = r3_x2 + z[2];
    s3_f = s3_b ^ s3_d;
    s4_g = m5_y;
    s4_h = r4_f + s4_g;
    s6_i = m6_y;
    s6_j = r6_g + s6_i;
  end

  always_ff @(posedge clk) begin
    {r1_x1, r1_x2, r1_x3, r1_x4} <= in_data;
    {r2_x2, r2_x3, r2_x4}        <= {r1_x2, r1_x3, r1_x4};
    {r3_a, r3_x2, r3_c, r3_e}    <= {s2_a, r2_x2, s2_c, s2_e};
    {r4_a, r4_b, r4_c, r4_d, r4_f}       <= {r3_a, s3_b, r3_c, s3_d, s3_f};
    {r5_a, r5_b, r5_c, r5_d, r5_g, r5_h} <= {r4_a, r4_b, r4_c, r4_d, s4_g, s4_h};
    {r6_a, r6_b, r6_c, r6_d, r6_g}       <= {r5_a, r5_b, r5_c, r5_d, r5_g};
    {r7_a, r7_b, r7_c, r7_d, r7_i, r7_j} <= {r6_a, r6_b, r6_c, r6_d, s6_i, s6_j};
  end

  assign out_data = {r7_a ^ r7_i, r7_c ^ r7_i, r7_b ^ r7_j, r7_d ^ r7_j};
  assign out_ctl  = ctl[7];

endmodule

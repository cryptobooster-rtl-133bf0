// IDEA output transformation: the first three stages of a regular round.
//
// The incoming block is the output of IDEA round 8, whose two middle words
// are swapped by the round structure; they are swapped back at the entry so
// that the three stages compute exactly the first three stages of a regular
// round with the round-9 subkeys:
//   1: M1 := W1 (*) Z1 starts                              (key Z1)
//   2: Y1 := M1; Y3 := W2 (+) Z3; M4 := W4 (*) Z4 starts   (keys Z3, Z4)
//   3: Y4 := M4; Y2 := W3 (+) Z2                           (key Z2)
// and the result (Y1, Y2, Y3, Y4) leaves combinationally after stage 3.
// The stage of each key follows the described output round; the un-swap at
// the entry is this implementation's way of reusing the regular-round stages.
// Subkeys are written with key_wr.round == 9.
module idea_output_round
  import cb_pkg::*;
(
  input  logic      clk,
  input  logic      rst_n,
  input  block_t    in_data,
  input  pipe_ctl_t in_ctl,
  input  key_wr_t   key_wr,
  output block_t    out_data,
  output pipe_ctl_t out_ctl
);

  word_t z [1:4];
  logic  kw_hit;
  assign kw_hit = key_wr.we && key_wr.round == 4'd9;

  for (genvar k = 1; k <= 4; k++) begin : g_key
    idea_key_mem #(.DEPTH(1)) u_mem (
      .clk  (clk),
      .we   (kw_hit && key_wr.idx == 3'(k)),
      .waddr('0),
      .wdata(key_wr.data),
      .raddr('0),
      .rdata(z[k])
    );
  end

  pipe_ctl_t ctl [1:3];
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int k = 1; k <= 3; k++) ctl[k] <= '0;
    end else begin
      ctl[1] <= in_ctl;
      ctl[2] <= ctl[1];
      ctl[3] <= ctl[2];
    end
  end

  word_t r1_x1, r1_x2, r1_x3, r1_x4;
  word_t r2_x2, r2_x3, r2_x4;
  word_t r3_y1, r3_x2, r3_y3;
  word_t m1_y, m4_y;

  idea_mulmod u_m1 (.clk(clk), .a(r1_x1), .b(z[1]), .y(m1_y));
  idea_mulmod u_m4 (.clk(clk), .a(r2_x4), .b(z[4]), .y(m4_y));

  always_ff @(posedge clk) begin
    // un-swap the middle words of the round-8 output
    {r1_x1, r1_x3, r1_x2, r1_x4} <= in_data;
    {r2_x2, r2_x3, r2_x4}        <= {r1_x2, r1_x3, r1_x4};
    {r3_y1, r3_x2, r3_y3}        <= {m1_y, r2_x2, r2_x3 + z[3]};
  end

  // column 2 now carries W3 and column 3 carries W2
  assign out_data = {r3_y1, r3_x2 + z[2], r3_y3, m4_y};
  assign out_ctl  = ctl[3];

endmodule

// Testbench of one regular IDEA round (as round 2 of a 2-round pipeline,
// so it serves IDEA rounds 2, 4, 6 and 8). Loads random subkeys for all
// rounds, sends one block per cycle with a varying pass counter and checks,
// 7 cycles later, the output against one IDEA round computed from its
// definition with the subkeys of IDEA round 2*pass+2, and that the control
// word arrives unchanged in the same cycle.
module tb_idea_round;
  import cb_pkg::*;
  import idea_ref_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  int cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  block_t    in_data, out_data;
  pipe_ctl_t in_ctl, out_ctl;
  key_wr_t   kw;

  idea_round #(.N_ROUNDS(2), .ROUND_IDX(1)) dut (.clk, .rst_n, .in_data, .in_ctl, .key_wr(kw), .out_data, .out_ctl);

  subkeys_t z;

  function automatic blk_t one_round(blk_t x, int r);
    w16_t a, b, c, d, e, f, g, i, j;
    a = ref_mul(x[63:48], z[zi(r,1)]);
    b = x[47:32] + z[zi(r,2)];
    c = x[31:16] + z[zi(r,3)];
    d = ref_mul(x[15:0], z[zi(r,4)]);
    e = a ^ c; f = b ^ d;
    g = ref_mul(e, z[zi(r,5)]);
    i = ref_mul(f + g, z[zi(r,6)]);
    j = g + i;
    return {a ^ i, c ^ i, b ^ j, d ^ j};
  endfunction

  typedef struct { blk_t exp; pipe_ctl_t ctl; int t; } item_t;
  item_t q[$];

  always @(posedge clk) if (rst_n) begin
    if (out_ctl.valid) begin
      item_t it;
      it = q.pop_front();
      checks++;
      if (out_data != it.exp || out_ctl != it.ctl || cycle - it.t != ROUND_STAGES) begin
        failures++;
        $display("FAIL: out %h exp %h ctl %h/%h after %0d cycles", out_data, it.exp, out_ctl, it.ctl, cycle - it.t);
      end
    end
  end

  initial begin
    in_data = 0; in_ctl = '0; kw = '0;
    foreach (z[i]) z[i] = 16'($urandom);
    z[zi(4,1)] = 16'h0;   // a subkey standing for 2^16
    repeat (2) @(posedge clk);
    rst_n <= 1;
    for (int r = 1; r <= 8; r++)
      for (int i = 1; i <= 6; i++) begin
        kw <= '{we: 1'b1, round: 4'(r), idx: 3'(i), data: z[zi(r,i)]};
        @(posedge clk);
      end
    kw <= '0;
    for (int n = 0; n < 200; n++) begin
      automatic int   p = $urandom_range(0, 3);
      automatic blk_t x = {$urandom, $urandom};
      automatic pipe_ctl_t c = '{valid: ($urandom_range(0, 4) != 0), pass: PASS_W'(p), tag: TAG_W'(n)};
      if (n % 50 == 0) x[63:48] = 16'h0;
      in_data <= x; in_ctl <= c;
      @(posedge clk);
      if (c.valid) q.push_back('{exp: one_round(x, 2 * p + 2), ctl: c, t: cycle});
    end
    in_ctl <= '0;
    repeat (10) @(posedge clk);
    checks++;
    if (q.size() != 0) begin failures++; $display("FAIL: %0d blocks missing", q.size()); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

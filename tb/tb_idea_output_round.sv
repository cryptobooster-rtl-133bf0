// Testbench of the IDEA output round: loads random round-9 subkeys, sends
// one block per cycle (as delivered by round 8, middle words swapped) and
// checks, 3 cycles later, the output transformation computed from its
// definition, and that the control word arrives with it.
module tb_idea_output_round;
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
  w16_t      k [1:4];

  idea_output_round dut (.clk, .rst_n, .in_data, .in_ctl, .key_wr(kw), .out_data, .out_ctl);

  typedef struct { blk_t exp; pipe_ctl_t ctl; int t; } item_t;
  item_t q[$];

  always @(posedge clk) if (rst_n && out_ctl.valid) begin
    item_t it;
    it = q.pop_front();
    checks++;
    if (out_data != it.exp || out_ctl != it.ctl || cycle - it.t != OUT_STAGES) begin
      failures++;
      $display("FAIL: out %h exp %h after %0d cycles", out_data, it.exp, cycle - it.t);
    end
  end

  initial begin
    in_data = 0; in_ctl = '0; kw = '0;
    for (int i = 1; i <= 4; i++) k[i] = 16'($urandom);
    repeat (2) @(posedge clk);
    rst_n <= 1;
    // a write for another round must not land here
    kw <= '{we: 1'b1, round: 4'd8, idx: 3'd1, data: 16'h1234}; @(posedge clk);
    for (int i = 1; i <= 4; i++) begin
      kw <= '{we: 1'b1, round: 4'd9, idx: 3'(i), data: k[i]}; @(posedge clk);
    end
    kw <= '0;
    for (int n = 0; n < 100; n++) begin
      automatic blk_t x = {$urandom, $urandom};
      automatic pipe_ctl_t c = '{valid: ($urandom_range(0, 3) != 0), pass: '0, tag: TAG_W'(n)};
      automatic blk_t e;
      if (n == 7) x[15:0] = 16'h0;
      // W = (W1, W2, W3, W4): Y = (W1*K1, W3+K2, W2+K3, W4*K4)
      e = {ref_mul(x[63:48], k[1]), x[31:16] + k[2], x[47:32] + k[3], ref_mul(x[15:0], k[4])};
      in_data <= x; in_ctl <= c;
      @(posedge clk);
      if (c.valid) q.push_back('{exp: e, ctl: c, t: cycle});
    end
    in_ctl <= '0;
    repeat (5) @(posedge clk);
    checks++;
    if (q.size() != 0) begin failures++; $display("FAIL: %0d blocks missing", q.size()); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

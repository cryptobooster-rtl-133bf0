// Testbench of IDEACore at its default geometry (8 regular rounds, 60
// chains). Loads subkeys and initial vectors directly, then streams random
// blocks at one per cycle in CBC encryption (a mode in which each chain has
// to wait for its previous result) and in ECB, and checks every output
// against the software model, that the input was never refused once the
// stream started (one block per clock), and that the first result appears
// 59 cycles plus the buffer cycle after the first input. Also checks the
// feature word.
// A second instance is built as the smallest geometry (one regular round
// plus the output round, 8 chains). It runs every chaining mode in both
// directions and checks the results, the 59-cycle latency of the first block
// and the rate of one accepted block per 8 cycles.
module tb_ideacore;
  import cb_pkg::*;
  import idea_ref_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask
  int cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  localparam int NCH = chains_needed(IDEA_ROUNDS);
  chain_mode_t mode;
  logic decrypt, restart, iv_we, in_valid, in_ready, out_valid, out_ready, busy;
  key_wr_t kw;
  logic [TAG_W-1:0] iv_idx;
  block_t iv_wdata, iv_rdata, in_data, out_data;
  logic [31:0] features;

  ideacore dut (.clk, .rst_n, .mode, .decrypt, .restart, .key_wr(kw), .iv_we, .iv_idx, .iv_wdata, .iv_rdata,
                .in_valid, .in_data, .in_ready, .out_valid, .out_data, .out_ready, .busy, .features);

  // 1+1 geometry
  localparam int NCH1 = chains_needed(1);
  chain_mode_t mode1;
  logic decrypt1, restart1, iv_we1, in_valid1, in_ready1, out_valid1, busy1;
  key_wr_t kw1;
  logic [TAG_W-1:0] iv_idx1;
  block_t iv_wdata1, iv_rdata1, in_data1, out_data1;
  logic [31:0] features1;

  ideacore #(.N_ROUNDS(1)) dut1 (.clk, .rst_n, .mode(mode1), .decrypt(decrypt1), .restart(restart1), .key_wr(kw1),
                .iv_we(iv_we1), .iv_idx(iv_idx1), .iv_wdata(iv_wdata1), .iv_rdata(iv_rdata1),
                .in_valid(in_valid1), .in_data(in_data1), .in_ready(in_ready1), .out_valid(out_valid1),
                .out_data(out_data1), .out_ready(1'b1), .busy(busy1), .features(features1));

  blk_t got1[$];
  int   t_first_out1;
  always @(posedge clk) if (rst_n && out_valid1) begin
    if (got1.size() == 0) t_first_out1 = cycle;
    got1.push_back(out_data1);
  end

  task automatic run1(int m, bit dec, subkeys_t ze, int n);
    blk_t din[$], exp[$];
    blk_t iv[] = new[NCH1];
    subkeys_t zk;
    int t_first_in, t_last_in;
    zk = (dec && m < 2) ? invert(ze) : ze;
    mode1 = chain_mode_t'(m); decrypt1 = dec;
    for (int r = 1; r <= 9; r++)
      for (int i = 1; i <= ((r == 9) ? 4 : 6); i++) begin
        kw1 <= '{we: 1'b1, round: 4'(r), idx: 3'(i), data: zk[zi(r,i)]}; @(posedge clk);
      end
    kw1 <= '0;
    for (int c = 0; c < NCH1; c++) begin
      iv[c] = {$urandom, $urandom};
      iv_we1 <= 1; iv_idx1 <= TAG_W'(c); iv_wdata1 <= iv[c]; @(posedge clk);
    end
    iv_we1 <= 0; restart1 <= 1; @(posedge clk); restart1 <= 0;
    for (int i = 0; i < n; i++) din.push_back({$urandom, $urandom});
    chain_ref(m, dec, din, iv, NCH1, ze, exp);
    got1.delete();
    for (int i = 0; i < n; i++) begin
      in_valid1 <= 1; in_data1 <= din[i];
      @(posedge clk);
      while (!in_ready1) @(posedge clk);
      if (i == 0) t_first_in = cycle;
      t_last_in = cycle;
    end
    in_valid1 <= 0;
    while (got1.size() < n) @(posedge clk);
    check(t_first_out1 - t_first_in == PIPE_LATENCY + 1,
          $sformatf("1+1 mode %0d dec %0d: first result after %0d cycles", m, dec, t_first_out1 - t_first_in));
    // one block per 8 cycles once the loop is full: n blocks take 8*(n-1) cycles to enter, give or take
    // the loop-filling start
    check(t_last_in - t_first_in <= 8 * (n - 1) && t_last_in - t_first_in >= 8 * (n - 8),
          $sformatf("1+1 mode %0d dec %0d: %0d blocks entered in %0d cycles", m, dec, n, t_last_in - t_first_in));
    for (int i = 0; i < n; i++) check(got1[i] == exp[i], $sformatf("1+1 mode %0d dec %0d block %0d", m, dec, i));
  endtask

  blk_t got[$];
  int   t_first_out;
  always @(posedge clk) if (rst_n && out_valid && out_ready) begin
    if (got.size() == 0) t_first_out = cycle;
    got.push_back(out_data);
  end

  task automatic run(int m, subkeys_t ze, int n);
    blk_t din[$], exp[$];
    blk_t iv[] = new[NCH];
    int refused = 0, t_first_in;
    mode = chain_mode_t'(m); decrypt = 0;
    for (int r = 1; r <= 9; r++)
      for (int i = 1; i <= ((r == 9) ? 4 : 6); i++) begin
        kw <= '{we: 1'b1, round: 4'(r), idx: 3'(i), data: ze[zi(r,i)]}; @(posedge clk);
      end
    kw <= '0;
    for (int c = 0; c < NCH; c++) begin
      iv[c] = {$urandom, $urandom};
      iv_we <= 1; iv_idx <= TAG_W'(c); iv_wdata <= iv[c]; @(posedge clk);
    end
    iv_we <= 0; restart <= 1; @(posedge clk); restart <= 0;
    for (int i = 0; i < n; i++) din.push_back({$urandom, $urandom});
    chain_ref(m, 0, din, iv, NCH, ze, exp);
    got.delete();
    for (int i = 0; i < n; i++) begin
      in_valid <= 1; in_data <= din[i];
      @(posedge clk);
      if (i == 0) t_first_in = cycle;
      while (!in_ready) begin refused++; @(posedge clk); end
    end
    in_valid <= 0;
    while (got.size() < n) @(posedge clk);
    check(refused == 0, $sformatf("mode %0d: input refused %0d times", m, refused));
    check(t_first_out - t_first_in == PIPE_LATENCY + 1, $sformatf("mode %0d: first result after %0d cycles", m, t_first_out - t_first_in));
    for (int i = 0; i < n; i++) check(got[i] == exp[i], $sformatf("mode %0d block %0d", m, i));
  endtask

  initial begin
    subkeys_t ze;
    mode = MODE_ECB; decrypt = 0; restart = 0; iv_we = 0; iv_idx = 0; iv_wdata = 0;
    in_valid = 0; in_data = 0; kw = '0; out_ready = 1;
    mode1 = MODE_ECB; decrypt1 = 0; restart1 = 0; iv_we1 = 0; iv_idx1 = 0; iv_wdata1 = 0;
    in_valid1 = 0; in_data1 = 0; kw1 = '0;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    check(features[7:0] == ALG_IDEA && features[27:24] == 4'd8 && features[31:28] == 4'hF, "feature word");
    ze = expand({$urandom, $urandom, $urandom, $urandom});
    run(1, ze, 200);
    run(0, ze, 100);
    check(features1[27:24] == 4'd1 && features1[7:0] == ALG_IDEA, "1+1 feature word");
    for (int m = 0; m < 4; m++)
      for (int d = 0; d < 2; d++) run1(m, d[0], ze, 40);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

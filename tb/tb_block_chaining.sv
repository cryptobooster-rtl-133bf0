// Testbench of the block-chaining unit, driving a real 2-round IDEA pipeline
// with 3 interleaved chains. For every mode (ECB, CBC, CFB, OFB) and both
// directions it loads the initial vectors, streams random blocks with a
// random gap pattern on the input and random back-pressure on the output,
// and compares every output block with a direct software model of the mode.
// It also requires that the chain-wait and the output-credit throttling
// each happened, and that feedback registers read back the expected final
// chaining values.
module tb_block_chaining;
  import cb_pkg::*;
  import idea_ref_pkg::*;

  localparam int NCH  = 3;
  localparam int R    = 2;
  int NBLK = 30;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  chain_mode_t      mode;
  logic             decrypt, restart, iv_we;
  logic [TAG_W-1:0] iv_idx;
  block_t           iv_wdata, iv_rdata;
  logic             in_valid, in_ready, out_valid, out_ready, busy, chain_wait;
  block_t           in_data, out_data;
  logic             p_in_valid, p_in_ready, p_out_valid, p_busy;
  block_t           p_in_data, p_out_data;
  logic [TAG_W-1:0] p_in_tag, p_out_tag;
  key_wr_t          kw;

  block_chaining #(.NCHAIN(NCH)) dut (
    .clk, .rst_n, .mode, .decrypt, .restart, .iv_we, .iv_idx, .iv_wdata, .iv_rdata,
    .in_valid, .in_data, .in_ready, .out_valid, .out_data, .out_ready,
    .pipe_in_valid(p_in_valid), .pipe_in_data(p_in_data), .pipe_in_tag(p_in_tag),
    .pipe_in_ready(p_in_ready), .pipe_out_valid(p_out_valid), .pipe_out_data(p_out_data),
    .pipe_out_tag(p_out_tag), .busy, .chain_wait);

  idea_pipeline #(.N_ROUNDS(R)) u_pipe (
    .clk, .rst_n, .in_valid(p_in_valid), .in_data(p_in_data), .in_tag(p_in_tag),
    .in_ready(p_in_ready), .key_wr(kw), .out_valid(p_out_valid), .out_data(p_out_data),
    .out_tag(p_out_tag), .busy(p_busy));

  int n_chain_wait = 0, n_credit_stop = 0;
  always @(posedge clk) begin
    if (chain_wait) n_chain_wait++;
    if (in_valid && p_in_ready && !dut.credit_ok) n_credit_stop++;
  end

  task automatic load_keys(subkeys_t z);
    for (int r = 1; r <= 9; r++)
      for (int i = 1; i <= ((r == 9) ? 4 : 6); i++) begin
        kw.we <= 1; kw.round <= 4'(r); kw.idx <= 3'(i); kw.data <= z[zi(r,i)];
        @(posedge clk);
      end
    kw.we <= 0;
  endtask

  blk_t got[$];
  bit   slow_out;
  always @(posedge clk) begin
    if (rst_n && out_valid && out_ready) got.push_back(out_data);
    out_ready <= slow_out ? ($urandom_range(0, 7) == 0) : ($urandom_range(0, 3) != 0);
  end

  task automatic run(int m, bit dec, subkeys_t ze);
    blk_t din[$], exp[$];
    blk_t iv[] = new[NCH];
    int   sent = 0;
    mode = chain_mode_t'(m); decrypt = dec;
    load_keys((dec && (m <= 1)) ? invert(ze) : ze);
    for (int c = 0; c < NCH; c++) begin
      iv[c] = {$urandom, $urandom};
      iv_we <= 1; iv_idx <= TAG_W'(c); iv_wdata <= iv[c];
      @(posedge clk);
    end
    iv_we <= 0; restart <= 1; @(posedge clk); restart <= 0;
    for (int i = 0; i < NBLK; i++) din.push_back({$urandom, $urandom});
    chain_ref(m, dec, din, iv, NCH, ze, exp);
    got.delete();
    while (sent < NBLK) begin
      if ($urandom_range(0, 4) == 0) begin
        in_valid <= 0; @(posedge clk);
      end else begin
        in_valid <= 1; in_data <= din[sent];
        @(posedge clk);
        while (!in_ready) @(posedge clk);
        sent++;
      end
    end
    in_valid <= 0;
    while (busy || got.size() < NBLK) @(posedge clk);
    check(got.size() == NBLK, $sformatf("mode %0d dec %0d count %0d", m, dec, got.size()));
    for (int i = 0; i < NBLK && i < got.size(); i++)
      check(got[i] == exp[i], $sformatf("mode %0d dec %0d block %0d: %h exp %h", m, dec, i, got[i], exp[i]));
    // feedback registers after the run (ECB leaves them untouched)
    if (m == 1 && !dec) begin
      iv_idx <= TAG_W'((NBLK - 1) % NCH); @(posedge clk); #1;
      check(iv_rdata == exp[NBLK-1], "CBC final chaining value read back");
    end
  endtask

  initial begin
    subkeys_t ze;
    mode = MODE_ECB; decrypt = 0; restart = 0; iv_we = 0; iv_idx = 0; iv_wdata = 0;
    in_valid = 0; in_data = 0; kw = '0; slow_out = 0;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    ze = expand({$urandom, $urandom, $urandom, $urandom});
    for (int m = 0; m < 4; m++)
      for (int d = 0; d < 2; d++) begin
        slow_out = (m == 0 && d == 0);   // ECB with a slow reader exercises the credit stop
        NBLK = slow_out ? 150 : 30;
        run(m, d[0], ze);
      end
    check(n_chain_wait > 0, "a block waited for its chain");
    check(n_credit_stop > 0, "output credit throttled the input");
    $display("chain waits %0d, credit stops %0d", n_chain_wait, n_credit_stop);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// Testbench of the scalable IDEA pipeline in all four geometries (1, 2, 4
// and 8 regular rounds). Checks the reference model against the published
// IDEA test vector, then for each geometry loads random subkeys, streams
// random blocks in as fast as in_ready allows, and checks every result
// against the reference model, the 59-cycle latency of every block and the
// accepted rate (8/N_ROUNDS cycles per block on average). Finally the same
// pipelines decrypt with the derived decryption subkeys.
module tb_idea_pipeline;
  import cb_pkg::*;
  import idea_ref_pkg::*;

  localparam int NBLK = 40;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  int checks = 0, failures = 0;
  int done_cnt = 0;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    subkeys_t z = expand(128'h0001_0002_0003_0004_0005_0006_0007_0008);
    check(cipher(64'h0000_0001_0002_0003, z) == 64'h11FB_ED2B_0198_6DE5, "reference test vector");
    check(cipher(64'h11FB_ED2B_0198_6DE5, invert(z)) == 64'h0000_0001_0002_0003, "reference inverse");
  end

  localparam int RCFG [4] = '{1, 2, 4, 8};

  for (genvar g = 0; g < 4; g++) begin : g_cfg
    localparam int R = RCFG[g];
    logic             in_valid, in_ready, out_valid, busy;
    block_t           in_data, out_data;
    logic [TAG_W-1:0] in_tag, out_tag;
    key_wr_t          kw;

    idea_pipeline #(.N_ROUNDS(R)) dut (
      .clk, .rst_n, .in_valid, .in_data, .in_tag, .in_ready, .key_wr(kw),
      .out_valid, .out_data, .out_tag, .busy);

    blk_t exp_q[$];
    int   t_in_q[$];
    int   n_out = 0;
    int   first_in, last_in;

    always @(posedge clk) if (rst_n && out_valid) begin
      blk_t e;
      int   t;
      e = exp_q.pop_front();
      t = t_in_q.pop_front();
      check(out_data == e, $sformatf("R=%0d block %0d data %h exp %h", R, n_out, out_data, e));
      check(cycle - t == PIPE_LATENCY, $sformatf("R=%0d latency %0d", R, cycle - t));
      check(out_tag == TAG_W'(n_out), $sformatf("R=%0d tag", R));
      n_out++;
    end

    task automatic load_keys(subkeys_t z);
      for (int r = 1; r <= 9; r++)
        for (int i = 1; i <= ((r == 9) ? 4 : 6); i++) begin
          kw.we <= 1; kw.round <= 4'(r); kw.idx <= 3'(i); kw.data <= z[zi(r,i)];
          @(posedge clk);
        end
      kw.we <= 0;
    endtask

    task automatic stream(subkeys_t z, int base);
      int sent = 0;
      blk_t b;
      while (sent < NBLK) begin
        b = {$urandom, $urandom};
        in_valid <= 1; in_data <= b; in_tag <= TAG_W'(base + sent);
        @(posedge clk);
        while (!in_ready) @(posedge clk);
        // accepted at this edge
        if (sent == 0) first_in = cycle;
        last_in = cycle;
        exp_q.push_back(cipher(b, z));
        t_in_q.push_back(cycle);
        sent++;
      end
      in_valid <= 0;
    endtask

    initial begin
      subkeys_t z;
      logic [127:0] key;
      in_valid = 0; in_data = 0; in_tag = 0; kw = '0;
      repeat (3) @(posedge clk);
      rst_n <= 1;
      key = {$urandom, $urandom, $urandom, $urandom};
      z = expand(key);
      load_keys(z);
      stream(z, 0);
      // rate: NBLK blocks accepted over (NBLK-1)*(8/R) cycles at most
      check(last_in - first_in <= (NBLK - 1) * (8 / R) + 8,
            $sformatf("R=%0d rate: %0d blocks in %0d cycles", R, NBLK, last_in - first_in + 1));
      if (R == 8) check(last_in - first_in == NBLK - 1, "R=8 accepts one block per cycle");
      while (busy) @(posedge clk);
      check(n_out == NBLK, $sformatf("R=%0d all blocks out", R));
      // decryption with the derived subkeys
      load_keys(invert(z));
      stream(invert(z), NBLK);
      while (busy) @(posedge clk);
      check(n_out == 2 * NBLK, $sformatf("R=%0d all decrypted blocks out", R));
      done_cnt++;
    end
  end

  initial begin
    wait (done_cnt == 4);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// Testbench of the IDEA subkey generator: for the published test key and for
// random keys, in both directions, collects the written subkeys and compares
// them with the reference expansion and inversion; checks that every one of
// the 52 positions is written exactly once and the encryption run time (52
// write cycles plus start and done, 54 cycles).
module tb_idea_key_schedule;
  import cb_pkg::*;
  import idea_ref_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  logic         start, decrypt_keys, busy, done;
  logic [127:0] key;
  key_wr_t      kw;

  idea_key_schedule dut (.clk, .rst_n, .start, .key, .decrypt_keys, .key_wr(kw), .busy, .done);

  w16_t got [52];
  int   hits [52];
  always @(posedge clk) if (rst_n && kw.we) begin
    int j;
    j = zi(int'(kw.round), int'(kw.idx));
    if (j >= 0 && j < 52) begin got[j] = kw.data; hits[j]++; end
  end

  task automatic run(logic [127:0] k, bit dec);
    subkeys_t e;
    int t0, t1;
    foreach (hits[j]) hits[j] = 0;
    key <= k; decrypt_keys <= dec; start <= 1;
    @(posedge clk); start <= 0; t0 = $time;
    while (!done) @(posedge clk);
    t1 = $time;
    e = dec ? invert(expand(k)) : expand(k);
    for (int j = 0; j < 52; j++) begin
      check(hits[j] == 1, $sformatf("dec %0d subkey %0d written %0d times", dec, j, hits[j]));
      check(got[j] == e[j], $sformatf("dec %0d subkey %0d: %h exp %h", dec, j, got[j], e[j]));
    end
    if (!dec) check((t1 - t0) / 10 == 54, $sformatf("encryption schedule took %0d cycles", (t1 - t0) / 10));
  endtask

  initial begin
    start = 0; key = 0; decrypt_keys = 0;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    run(128'h0001_0002_0003_0004_0005_0006_0007_0008, 0);
    run(128'h0001_0002_0003_0004_0005_0006_0007_0008, 1);
    for (int i = 0; i < 4; i++) begin
      automatic logic [127:0] k = {$urandom, $urandom, $urandom, $urandom};
      if (i == 3) k[127:112] = 16'h0;   // a zero subkey (stands for 2^16)
      run(k, 0);
      run(k, 1);
    end
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

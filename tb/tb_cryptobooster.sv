// End-to-end testbench of the coprocessor at its default parameters
// (8 regular rounds, 60 chains). The testbench plays the host: it writes
// session records into the external session memory through the register
// bus, loads sessions, streams blocks through DIN/DOUT and compares every
// result with a software model of IDEA and of the chaining mode.
// It covers: feature query, session-memory write and read by the host,
// session load with encryption and with decryption subkeys, all four
// chaining modes, a session switch that saves the chaining values of the
// running session (checked in memory) and a later resume of that session,
// refusal of a record with a foreign algorithm id, the interrupt, pipeline
// bubbles and output back-pressure (credit stop). Each of these is counted
// and must have happened at least once.
module tb_cryptobooster;
  import cb_pkg::*;
  import idea_ref_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  logic [7:0]  bus_addr;
  logic        bus_we, bus_re, irq;
  logic [31:0] bus_wdata, bus_rdata;
  logic        mem_en, mem_we;
  logic [SMEM_AW:0] mem_addr;
  logic [31:0] mem_wdata, mem_rdata;

  cryptobooster dut (.clk, .rst_n, .bus_addr, .bus_we, .bus_re, .bus_wdata, .bus_rdata, .irq,
                     .mem_en, .mem_we, .mem_addr, .mem_wdata, .mem_rdata);

  ext_session_memory #(.WORDS(1024), .RD_LAT(1), .AW(SMEM_AW + 1)) u_mem (
    .clk, .en(mem_en), .we(mem_we), .addr(mem_addr), .wdata(mem_wdata), .rdata(mem_rdata));

  localparam int NCH = chains_needed(IDEA_ROUNDS);

  // ------------------------------------------------------------ mechanisms
  int n_bubble = 0, n_credit_stop = 0, n_load = 0, n_save = 0, n_keys_dec = 0,
      n_error = 0, n_irq = 0, n_mode[4], n_dec_dir = 0;
  always @(posedge clk) if (rst_n) begin
    if (dut.u_core.u_pipe.busy && !dut.u_core.u_pipe.loop_ctl.valid) n_bubble++;
    if (dut.u_core.u_bc.in_valid && !dut.u_core.u_bc.credit_ok) n_credit_stop++;
    if (irq) n_irq++;
  end

  // ------------------------------------------------------------ host bus
  // bus cycles: inputs change at the falling edge, the write or the pop
  // happens at the next rising edge
  task automatic wr(logic [7:0] a, logic [31:0] d);
    @(negedge clk);
    bus_addr = a; bus_wdata = d; bus_we = 1;
    @(negedge clk);
    bus_we = 0;
  endtask
  task automatic rd(logic [7:0] a, output logic [31:0] d, input bit pop = 0);
    @(negedge clk);
    bus_addr = a; bus_re = pop;
    #1 d = bus_rdata;
    @(negedge clk);
    bus_re = 0;
  endtask
  task automatic wait_cmd();
    logic [31:0] s;
    do rd(8'h04, s); while (s[0]);
  endtask
  task automatic command(sa_op_t op, int arg);
    wr(8'h00, {16'(arg), 12'd0, op});
    wait_cmd();
  endtask
  task automatic mem_write(int a, blk_t d);
    wr(8'h18, d[31:0]); wr(8'h1C, d[63:32]);
    command(SA_MEMWR, a);
  endtask

  // ------------------------------------------------------------ sessions
  typedef struct {
    int mode; bit dec; logic [127:0] key; blk_t iv[];
  } sess_t;

  task automatic write_record(int sid, sess_t s, bit via_bus, logic [7:0] alg = ALG_IDEA);
    int b = sid * SESSION_WORDS;
    blk_t hdr = {53'd0, s.dec, 2'(s.mode), alg};
    if (via_bus) begin
      mem_write(b, hdr); mem_write(b + 1, s.key[127:64]); mem_write(b + 2, s.key[63:0]);
      for (int c = 0; c < NCH; c++) mem_write(b + 3 + c, s.iv[c]);
    end else begin
      u_mem.poke64(b, hdr); u_mem.poke64(b + 1, s.key[127:64]); u_mem.poke64(b + 2, s.key[63:0]);
      for (int c = 0; c < NCH; c++) u_mem.poke64(b + 3 + c, s.iv[c]);
    end
  endtask

  function automatic sess_t new_session(int mode, bit dec);
    sess_t s;
    s.mode = mode; s.dec = dec;
    s.key = {$urandom, $urandom, $urandom, $urandom};
    s.iv = new[NCH];
    foreach (s.iv[c]) s.iv[c] = {$urandom, $urandom};
    return s;
  endfunction

  // Stream blocks; if hold_output, write everything before reading.
  task automatic stream(ref blk_t din[$], ref blk_t dout[$], input bit hold_output);
    logic [31:0] s, lo, hi;
    int sent = 0;
    dout.delete();
    while (dout.size() < din.size()) begin
      rd(8'h04, s);
      if (sent < din.size() && s[3]) begin
        wr(8'h08, din[sent][31:0]); wr(8'h0C, din[sent][63:32]); sent++;
      end else if (s[4] && (!hold_output || sent == din.size() || !s[3])) begin
        rd(8'h10, lo); rd(8'h14, hi, 1); dout.push_back({hi, lo});
      end
    end
  endtask

  blk_t last_exp[$];   // expected output of the last run_session
  task automatic run_session(int sid, sess_t s, int nblk, bit hold_output, string name);
    blk_t din[$], dout[$], exp[$];
    logic [31:0] st;
    command(SA_LOAD, sid);
    rd(8'h04, st);
    check(st[1] && !st[2] && st[31:16] == 16'(sid), $sformatf("%s: session %0d active, status %h", name, sid, st));
    n_load++;
    if (s.dec && s.mode <= 1) n_keys_dec++;
    for (int i = 0; i < nblk; i++) din.push_back({$urandom, $urandom});
    chain_ref(s.mode, s.dec, din, s.iv, NCH, expand(s.key), exp);
    stream(din, dout, hold_output);
    for (int i = 0; i < nblk; i++)
      check(dout[i] == exp[i], $sformatf("%s block %0d: %h exp %h", name, i, dout[i], exp[i]));
    n_mode[s.mode]++;
    if (s.dec) n_dec_dir++;
    last_exp = exp;
  endtask

  initial begin
    sess_t s1, s2, s3, s4, s5, bad;
    logic [31:0] d, lo, hi;
    blk_t s1_out[$];
    bus_addr = 0; bus_we = 0; bus_re = 0; bus_wdata = 0;
    repeat (4) @(posedge clk);
    rst_n <= 1;
    repeat (2) @(posedge clk);

    // feature query
    rd(8'h30, d);
    check(d[7:0] == ALG_IDEA && d[27:24] == 4'(IDEA_ROUNDS) && d[15:8] == 8'd8 && d[23:16] == 8'd16,
          $sformatf("core features %h", d));
    rd(8'h34, d);
    check(d[7:0] == ALG_IDEA && d[15:8] == 8'(NCH), $sformatf("adapter features %h", d));
    wr(8'h2C, 32'h3);   // interrupts on command done and error

    // session 1: CBC encryption, record written through the register bus
    s1 = new_session(1, 0);
    write_record(1, s1, 1);
    // host read-back of one record word
    command(SA_MEMRD, SESSION_WORDS + 1);
    rd(8'h20, lo); rd(8'h24, hi);
    check({hi, lo} == s1.key[127:64], "host read of session memory");
    run_session(1, s1, 150, 0, "CBC-enc");
    s1_out = last_exp;
    check(irq, "interrupt raised on command done");
    wr(8'h28, 32'h3);

    // session 2: CBC decryption of session 1's data (decryption subkeys),
    // loading it saves session 1's chaining values
    s2 = s1; s2.dec = 1; s2.iv = new[NCH]; foreach (s2.iv[c]) s2.iv[c] = s1.iv[c];
    write_record(2, s2, 0);
    run_session(2, s2, 70, 0, "CBC-dec");
    n_save++;
    // saved chaining value of chain c: the last ciphertext block of that chain
    for (int c = 0; c < NCH; c++) begin
      automatic int last = ((150 - 1 - c) / NCH) * NCH + c;
      check(u_mem.peek64(SESSION_WORDS + 3 + c) == s1_out[last], $sformatf("session 1 chain %0d saved %h exp %h (%h)", c, u_mem.peek64(SESSION_WORDS + 3 + c), s1_out[last], s1_out[last-NCH]));
    end

    // ECB with output held back by the host (credit stop), CFB both ways, OFB
    s3 = new_session(0, 0); write_record(3, s3, 0); run_session(3, s3, 100, 1, "ECB-enc");
    s3.dec = 1; write_record(3, s3, 0); run_session(3, s3, 40, 0, "ECB-dec");
    s4 = new_session(2, 0); write_record(4, s4, 0); run_session(4, s4, 70, 0, "CFB-enc");
    s4.dec = 1; write_record(5, s4, 0); run_session(5, s4, 70, 0, "CFB-dec");
    s5 = new_session(3, 0); write_record(6, s5, 0); run_session(6, s5, 70, 0, "OFB");

    // resume session 1 from its saved chaining values (checked above): the
    // continuation is CBC chained on session 1's last ciphertexts
    begin
      blk_t all_exp[$], tail_in[$], tail_out[$];
      sess_t r = s1;
      r.iv = new[NCH];
      for (int c = 0; c < NCH; c++) r.iv[c] = u_mem.peek64(SESSION_WORDS + 3 + c);
      command(SA_LOAD, 1);
      for (int i = 0; i < 60; i++) tail_in.push_back({$urandom, $urandom});
      chain_ref(1, 0, tail_in, r.iv, NCH, expand(s1.key), all_exp);
      stream(tail_in, tail_out, 0);
      for (int i = 0; i < 60; i++) check(tail_out[i] == all_exp[i], $sformatf("resumed block %0d", i));
      n_load++;
    end

    // a record with another algorithm id is refused
    bad = new_session(0, 0);
    write_record(7, bad, 0, 8'h02);
    command(SA_LOAD, 7);
    rd(8'h04, d);
    check(d[2] && !d[1], $sformatf("foreign algorithm refused, status %h", d));
    if (d[2]) n_error++;
    rd(8'h28, d);
    check(d[1], "error interrupt status");

    // mechanisms
    check(n_bubble > 0, "pipeline bubbles");
    check(n_credit_stop > 0, "output credit stop");
    check(n_load >= 7, "session loads");
    check(n_save > 0, "session switch with save");
    check(n_keys_dec > 0, "decryption subkeys");
    check(n_error > 0, "refused session");
    check(n_irq > 0, "interrupt");
    for (int m = 0; m < 4; m++) check(n_mode[m] > 0, $sformatf("mode %0d used", m));
    check(n_dec_dir > 0, "decryption direction");
    $display("bubbles %0d credit stops %0d loads %0d irq cycles %0d", n_bubble, n_credit_stop, n_load, n_irq);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

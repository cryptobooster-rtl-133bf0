// Testbench of the session controller. The session adapter and the
// CypherCore are played by the testbench: the adapter model answers each
// command after a few cycles and records the flits it received; the core
// model accepts blocks and reports busy for a while. Checks: feature query
// and refusal when the algorithms differ; first load (one LOAD flit, no
// SAVE); input gated while no session is active; data passed through;
// a session switch that first waits for the core to drain, then saves the
// old session, then loads the new one; explicit save; memory write (two
// flits) and read (data kept); done pulses; a stream of random blocks in
// each direction under random back-pressure arrives complete and in order.
module tb_session_control;
  import cb_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  logic cmd_valid, cmd_ready, done, error, active;
  host_cmd_t cmd;
  logic [15:0] cur_sid;
  block_t mem_rdata;
  logic [31:0] cfq, afq, core_features, adapter_features;
  logic h_in_valid, h_in_ready, h_out_valid, h_out_ready, c_in_valid, c_in_ready, c_out_valid, c_out_ready;
  block_t h_in_data, h_out_data, c_in_data, c_out_data;
  logic core_busy;
  logic sa_cmd_valid, sa_cmd_ready, sa_rsp_valid;
  cl_flit_t sa_cmd, sa_rsp;

  session_control dut (.clk, .rst_n, .cmd_valid, .cmd, .cmd_ready, .done, .error, .active, .cur_sid,
    .mem_rdata, .core_features_q(cfq), .adapter_features_q(afq),
    .h_in_valid, .h_in_data, .h_in_ready, .h_out_valid, .h_out_data, .h_out_ready,
    .c_in_valid, .c_in_data, .c_in_ready, .c_out_valid, .c_out_data, .c_out_ready,
    .core_busy, .core_features, .sa_cmd_valid, .sa_cmd, .sa_cmd_ready, .sa_rsp_valid, .sa_rsp,
    .adapter_features);

  // adapter model
  cl_flit_t got[$];
  int       busy_left = 0, core_busy_cnt = 0;
  logic     flit_while_busy = 0;
  assign sa_cmd_ready = 1'b1;
  always @(posedge clk) begin
    sa_rsp_valid <= 0;
    if (sa_cmd_valid) begin
      got.push_back(sa_cmd);
      if (core_busy) flit_while_busy <= 1;
      if (sa_cmd.last) begin
        sa_rsp_valid <= 1;
        sa_rsp <= (sa_op_t'(got[0].data[3:0]) == SA_MEMRD) ?
                  '{kind: CL_DATA, last: 1'b1, data: 64'hFEED_0000_0000_BEEF} :
                  '{kind: CL_CTRL, last: 1'b1, data: 64'd1};
      end
    end
  end
  // core model: busy for a while after taking a block
  always @(posedge clk) begin
    if (c_in_valid && c_in_ready) core_busy_cnt <= 20;
    else if (core_busy_cnt > 0) core_busy_cnt <= core_busy_cnt - 1;
  end
  assign core_busy = core_busy_cnt > 0;
  logic c_in_rdy_rand = 1'b1;
  assign c_in_ready = c_in_rdy_rand;

  int n_done = 0;
  always @(posedge clk) if (done) n_done++;

  task automatic issue(sa_op_t op, int arg, block_t d = '0);
    int n0 = n_done;
    got.delete();
    cmd_valid <= 1; cmd <= '{op: op, arg: 16'(arg), wdata: d};
    @(posedge clk);
    while (!cmd_ready) @(posedge clk);
    cmd_valid <= 0;
    while (n_done == n0) @(posedge clk);
    @(posedge clk);
  endtask

  function automatic bit is_op(cl_flit_t f, sa_op_t op, int arg);
    return f.kind == CL_CTRL && f.data[3:0] == op && f.data[19:4] == 16'(arg);
  endfunction

  initial begin
    cmd_valid = 0; cmd = '0; h_in_valid = 0; h_in_data = 0; h_out_ready = 1;
    c_out_valid = 0; c_out_data = 0;
    core_features = 32'hF816_1001; adapter_features = 32'h0040_3C02;   // different algorithms
    repeat (3) @(posedge clk);
    rst_n <= 1;
    repeat (3) @(posedge clk);
    check(cfq == core_features && afq == adapter_features, "features queried");
    issue(SA_LOAD, 1);
    check(error && !active && got.size() == 0, "load refused when algorithms differ");

    core_features = 32'hF816_1001; adapter_features = 32'h0040_3C01;
    rst_n <= 0; repeat (2) @(posedge clk); rst_n <= 1; repeat (3) @(posedge clk);

    // input is gated while no session is active
    h_in_valid <= 1; h_in_data <= 64'h1111;
    repeat (3) @(posedge clk);
    check(!h_in_ready && !c_in_valid, "input gated without a session");

    issue(SA_LOAD, 5);
    check(got.size() == 1 && is_op(got[0], SA_LOAD, 5), "first load sends only LOAD");
    check(active && cur_sid == 16'd5 && !error, "session 5 active");

    // data flows both ways
    @(posedge clk);
    check(c_in_valid && c_in_data == 64'h1111 && h_in_ready, "input passed to the core");
    c_out_valid <= 1; c_out_data <= 64'h2222; h_out_ready <= 1;
    @(posedge clk); #1;
    check(h_out_valid && h_out_data == 64'h2222 && c_out_ready, "output passed to the host");
    c_out_valid <= 0;

    // switch to session 9 while the core is busy
    h_in_valid <= 1;
    @(posedge clk);
    h_in_valid <= 0;
    issue(SA_LOAD, 9);
    check(!flit_while_busy, "no adapter command before the core drained");
    check(got.size() == 2 && is_op(got[0], SA_SAVE, 5) && is_op(got[1], SA_LOAD, 9), "save old, load new");
    check(active && cur_sid == 16'd9, "session 9 active");

    // streams with random back-pressure, both directions at once
    begin
      block_t sent_in[$], sent_out[$], rx_in[$], rx_out[$];
      int ni = 0, no = 0;
      for (int i = 0; i < 100; i++) begin sent_in.push_back({$urandom, $urandom}); sent_out.push_back({$urandom, $urandom}); end
      h_in_valid <= 0; c_out_valid <= 0;
      @(posedge clk);
      while (rx_in.size() < 100 || rx_out.size() < 100) begin
        h_in_valid <= ni < 100; h_in_data <= (ni < 100) ? sent_in[ni] : '0;
        c_out_valid <= no < 100; c_out_data <= (no < 100) ? sent_out[no] : '0;
        c_in_rdy_rand <= $urandom_range(0, 2) != 0;
        h_out_ready <= $urandom_range(0, 2) != 0;
        @(posedge clk);
        if (c_in_valid && c_in_ready) rx_in.push_back(c_in_data);
        if (h_out_valid && h_out_ready) rx_out.push_back(h_out_data);
        if (h_in_valid && h_in_ready) ni++;
        if (c_out_valid && c_out_ready) no++;
      end
      h_in_valid <= 0; c_out_valid <= 0; c_in_rdy_rand <= 1; h_out_ready <= 1;
      for (int i = 0; i < 100; i++) begin
        check(rx_in[i] == sent_in[i], $sformatf("input stream block %0d", i));
        check(rx_out[i] == sent_out[i], $sformatf("output stream block %0d", i));
      end
      repeat (25) @(posedge clk);
    end

    issue(SA_SAVE, 0);
    check(got.size() == 1 && is_op(got[0], SA_SAVE, 9), "explicit save of the running session");

    issue(SA_MEMWR, 300, 64'hABCD);
    check(got.size() == 2 && is_op(got[0], SA_MEMWR, 300) && got[1].kind == CL_DATA && got[1].data == 64'hABCD,
          "memory write: command and data flits");
    issue(SA_MEMRD, 301);
    check(got.size() == 1 && is_op(got[0], SA_MEMRD, 301) && mem_rdata == 64'hFEED_0000_0000_BEEF, "memory read");
    check(n_done == 6, $sformatf("done pulses %0d", n_done));

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

// Testbench of the IDEA session adapter, with the session-memory adapter and
// an external memory model behind it and a model of the chaining registers
// in front. Checks: host-style memory write and read commands; loading a
// record (all 52 subkeys against the reference schedule, encryption subkeys
// for a CBC encryption record and decryption subkeys for an ECB decryption
// record, all initial vectors, mode, direction, one restart pulse); saving
// the chaining registers into the record; refusal of a record with another
// algorithm id; the feature word.
module tb_session_adapter;
  import cb_pkg::*;
  import idea_ref_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  localparam int NCH = 5;
  logic cmd_valid, cmd_ready, rsp_valid;
  cl_flit_t cmd, rsp;
  logic sm_req_valid, sm_req_ready, sm_rsp_valid;
  smem_req_t sm_req;
  block_t sm_rsp_data;
  key_wr_t kw;
  logic iv_we, decrypt, restart;
  logic [TAG_W-1:0] iv_idx;
  block_t iv_wdata, iv_rdata;
  chain_mode_t mode;
  logic [31:0] features;
  logic mem_en, mem_we;
  logic [SMEM_AW:0] mem_addr;
  logic [31:0] mem_wdata, mem_rdata;

  session_adapter #(.NCHAIN(NCH)) dut (
    .clk, .rst_n, .cmd_valid, .cmd, .cmd_ready, .rsp_valid, .rsp,
    .smem_req_valid(sm_req_valid), .smem_req(sm_req), .smem_req_ready(sm_req_ready),
    .smem_rsp_valid(sm_rsp_valid), .smem_rsp_data(sm_rsp_data),
    .key_wr(kw), .iv_we, .iv_idx, .iv_wdata, .iv_rdata, .mode, .decrypt, .restart, .features);
  session_mem u_sm (.clk, .rst_n, .req_valid(sm_req_valid), .req(sm_req), .req_ready(sm_req_ready),
    .rsp_valid(sm_rsp_valid), .rsp_data(sm_rsp_data), .mem_en, .mem_we, .mem_addr, .mem_wdata, .mem_rdata);
  ext_session_memory #(.WORDS(1024), .RD_LAT(1), .AW(SMEM_AW + 1)) u_mem (
    .clk, .en(mem_en), .we(mem_we), .addr(mem_addr), .wdata(mem_wdata), .rdata(mem_rdata));

  // chaining registers model
  block_t ivreg [NCH];
  assign iv_rdata = ivreg[iv_idx];
  w16_t keys [52];
  int   n_restart = 0;
  always @(posedge clk) if (rst_n) begin
    if (iv_we) ivreg[iv_idx] <= iv_wdata;
    if (kw.we) keys[zi(int'(kw.round), int'(kw.idx))] = kw.data;
    if (restart) n_restart++;
  end

  task automatic send(cl_flit_t f);
    cmd_valid <= 1; cmd <= f;
    @(posedge clk);
    while (!cmd_ready) @(posedge clk);
    cmd_valid <= 0;
  endtask
  task automatic op(sa_op_t o, int arg, output cl_flit_t r);
    send('{kind: CL_CTRL, last: 1'b1, data: {44'd0, 16'(arg), o}});
    while (!rsp_valid) @(posedge clk);
    r = rsp;
  endtask

  task automatic put_record(int sid, logic [7:0] alg, int m, bit dec, logic [127:0] key, ref block_t iv[NCH]);
    int b = sid * SESSION_WORDS;
    u_mem.poke64(b, {53'd0, dec, 2'(m), alg});
    u_mem.poke64(b + 1, key[127:64]);
    u_mem.poke64(b + 2, key[63:0]);
    for (int c = 0; c < NCH; c++) u_mem.poke64(b + 3 + c, iv[c]);
  endtask

  initial begin
    cl_flit_t r;
    block_t iv [NCH];
    logic [127:0] key;
    subkeys_t e;
    cmd_valid = 0; cmd = '0;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    check(features[7:0] == ALG_IDEA && features[15:8] == 8'(NCH), "feature word");

    // memory write through two flits, then read back
    send('{kind: CL_CTRL, last: 1'b0, data: {44'd0, 16'd77, SA_MEMWR}});
    send('{kind: CL_DATA, last: 1'b1, data: 64'hDEAD_BEEF_0123_4567});
    while (!rsp_valid) @(posedge clk);
    check(rsp.kind == CL_CTRL && rsp.data[0], "memory write acknowledged");
    repeat (3) @(posedge clk);   // acknowledged once handed to SessionMem
    check(u_mem.peek64(77) == 64'hDEAD_BEEF_0123_4567, "memory write landed");
    op(SA_MEMRD, 77, r);
    check(r.kind == CL_DATA && r.data == 64'hDEAD_BEEF_0123_4567, "memory read");

    // CBC encryption record
    key = {$urandom, $urandom, $urandom, $urandom};
    foreach (iv[c]) iv[c] = {$urandom, $urandom};
    put_record(2, ALG_IDEA, 1, 0, key, iv);
    op(SA_LOAD, 2, r);
    check(r.kind == CL_CTRL && r.data[0] && !r.data[1], "load acknowledged");
    e = expand(key);
    for (int j = 0; j < 52; j++) check(keys[j] == e[j], $sformatf("enc subkey %0d", j));
    for (int c = 0; c < NCH; c++) check(ivreg[c] == iv[c], $sformatf("iv %0d", c));
    check(mode == MODE_CBC && !decrypt && n_restart == 1, "mode, direction, restart");

    // ECB decryption record: decryption subkeys
    put_record(3, ALG_IDEA, 0, 1, key, iv);
    op(SA_LOAD, 3, r);
    e = invert(expand(key));
    for (int j = 0; j < 52; j++) check(keys[j] == e[j], $sformatf("dec subkey %0d", j));
    check(mode == MODE_ECB && decrypt && n_restart == 2, "ECB decrypt mode");

    // save the chaining registers into record 2
    foreach (ivreg[c]) ivreg[c] = {$urandom, $urandom};
    op(SA_SAVE, 2, r);
    repeat (8) @(posedge clk);
    for (int c = 0; c < NCH; c++) check(u_mem.peek64(2 * SESSION_WORDS + 3 + c) == ivreg[c], $sformatf("saved %0d", c));

    // foreign algorithm
    put_record(4, 8'h07, 0, 0, key, iv);
    op(SA_LOAD, 4, r);
    check(r.kind == CL_CTRL && r.data[1] && !r.data[0], "foreign algorithm refused");
    check(n_restart == 2, "no restart on refusal");

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

// Testbench of the session-memory adapter with an external memory model of
// read latency 2: random 64-bit writes and reads, each read compared with a
// model of the written words; checks the split into 32-bit halves in the
// physical memory and the access time of a read (2*(latency+1)+1 cycles
// from acceptance to response).
module tb_session_mem;
  import cb_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  localparam int LAT = 2;
  logic      req_valid, req_ready, rsp_valid;
  smem_req_t req;
  block_t    rsp_data;
  logic      mem_en, mem_we;
  logic [SMEM_AW:0] mem_addr;
  logic [31:0] mem_wdata, mem_rdata;

  session_mem #(.MEM_RD_LAT(LAT)) dut (.clk, .rst_n, .req_valid, .req, .req_ready, .rsp_valid, .rsp_data,
                                       .mem_en, .mem_we, .mem_addr, .mem_wdata, .mem_rdata);
  ext_session_memory #(.WORDS(256), .RD_LAT(LAT), .AW(SMEM_AW + 1)) u_mem (
    .clk, .en(mem_en), .we(mem_we), .addr(mem_addr), .wdata(mem_wdata), .rdata(mem_rdata));

  block_t model [128];

  task automatic access(bit we, int a, block_t d, output block_t r, output int t);
    int t0;
    req_valid <= 1; req <= '{we: we, addr: SMEM_AW'(a), wdata: d};
    @(posedge clk);
    while (!req_ready) @(posedge clk);
    t0 = $time / 10;
    req_valid <= 0;
    if (!we) begin
      while (!rsp_valid) @(posedge clk);
      r = rsp_data;
      t = $time / 10 - t0;
    end else begin
      @(posedge clk);
      while (!req_ready) @(posedge clk);
    end
  endtask

  initial begin
    block_t r;
    int t;
    req_valid = 0; req = '0;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    for (int a = 0; a < 128; a++) begin
      model[a] = {$urandom, $urandom};
      access(1, a, model[a], r, t);
    end
    check(u_mem.peek64(5) == model[5], "word 5 stored as two halves, low half first");
    check(u_mem.mem[10] == model[5][31:0] && u_mem.mem[11] == model[5][63:32], "half order");
    repeat (200) begin
      automatic int a = $urandom_range(0, 127);
      if ($urandom_range(0, 1)) begin
        model[a] = {$urandom, $urandom};
        access(1, a, model[a], r, t);
      end else begin
        access(0, a, '0, r, t);
        check(r == model[a], $sformatf("read %0d: %h exp %h", a, r, model[a]));
        check(t == 2 * (LAT + 1) + 1, $sformatf("read took %0d cycles", t));
      end
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

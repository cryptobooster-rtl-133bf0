// Testbench of the host register interface. The session controller is
// played by the testbench. Checks: CMD write produces one command with the
// memory-write word attached and STATUS busy until done; STATUS fields;
// DIN_LO/DIN_HI queue a block, the buffer reports full and drops a block
// written while full; DOUT_LO/DOUT_HI present the oldest result and a read
// of DOUT_HI removes it; memory read registers; feature registers;
// interrupt status (sticky, write-one-to-clear), enables and the irq line.
module tb_host_interface;
  import cb_pkg::*;

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
  logic        cmd_valid, cmd_ready, cmd_done, cmd_error, active;
  host_cmd_t   cmd;
  logic [15:0] cur_sid;
  block_t      mem_rdata;
  logic        din_valid, din_ready, dout_valid, dout_ready;
  block_t      din_data, dout_data;

  host_interface #(.DIN_DEPTH(4), .DOUT_DEPTH(4)) dut (
    .clk, .rst_n, .bus_addr, .bus_we, .bus_re, .bus_wdata, .bus_rdata, .irq,
    .cmd_valid, .cmd, .cmd_ready, .cmd_done, .cmd_error, .active, .cur_sid, .mem_rdata,
    .core_features(32'hCAFE_0001), .adapter_features(32'hBEEF_0002),
    .din_valid, .din_data, .din_ready, .dout_valid, .dout_data, .dout_ready);

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

  host_cmd_t cmds[$];
  always @(posedge clk) if (cmd_valid && cmd_ready) cmds.push_back(cmd);

  initial begin
    logic [31:0] d, lo, hi;
    bus_addr = 0; bus_we = 0; bus_re = 0; bus_wdata = 0;
    cmd_ready = 0; cmd_done = 0; cmd_error = 0; active = 0; cur_sid = 16'h0042;
    mem_rdata = 64'h1234_5678_9ABC_DEF0; din_ready = 0; dout_valid = 0; dout_data = 0;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);

    rd(8'h30, d); check(d == 32'hCAFE_0001, "core feature register");
    rd(8'h34, d); check(d == 32'hBEEF_0002, "adapter feature register");
    rd(8'h20, lo); rd(8'h24, hi); check({hi, lo} == mem_rdata, "memory read registers");

    // command with memory-write word
    wr(8'h18, 32'h0000_5555); wr(8'h1C, 32'h0000_6666);
    wr(8'h2C, 32'h3);
    wr(8'h00, {16'd300, 12'd0, SA_MEMWR});
    rd(8'h04, d); check(d[0] && d[31:16] == 16'h0042, "status busy and session id");
    cmd_ready <= 1; @(posedge clk); cmd_ready <= 0; @(posedge clk);
    check(cmds.size() == 1 && cmds[0].op == SA_MEMWR && cmds[0].arg == 16'd300 &&
          cmds[0].wdata == 64'h0000_6666_0000_5555, "command contents");
    check(!irq, "no irq before done");
    cmd_done <= 1; cmd_error <= 1; @(posedge clk); cmd_done <= 0; @(posedge clk);
    rd(8'h04, d); check(!d[0] && d[2], "status not busy, error shown");
    check(irq, "irq after done");
    rd(8'h28, d); check(d[1:0] == 2'b11, "irq status sticky");
    wr(8'h28, 32'h1); rd(8'h28, d); check(d[1:0] == 2'b10, "write one to clear");
    wr(8'h28, 32'h2); @(negedge clk); check(!irq, "irq cleared");

    // input buffer: 4 blocks fit, the fifth is dropped
    for (int i = 0; i < 5; i++) begin wr(8'h08, 32'(i)); wr(8'h0C, 32'(100 + i)); end
    rd(8'h04, d); check(!d[3], "input buffer full");
    for (int i = 0; i < 4; i++) begin
      check(din_valid && din_data == {32'(100 + i), 32'(i)}, $sformatf("input block %0d: %h", i, din_data));
      din_ready <= 1; @(posedge clk); din_ready <= 0; @(negedge clk);
    end
    check(!din_valid, "fifth block dropped");

    // output buffer
    wr(8'h2C, 32'h4);
    rd(8'h04, d); check(!d[4] && !irq, "no output yet");
    for (int i = 0; i < 3; i++) begin
      dout_valid <= 1; dout_data <= {32'(200 + i), 32'(50 + i)};
      @(posedge clk); while (!dout_ready) @(posedge clk);
    end
    dout_valid <= 0; @(posedge clk);
    check(irq, "irq for available output");
    for (int i = 0; i < 3; i++) begin
      rd(8'h10, lo); rd(8'h14, hi, 1);
      check({hi, lo} == {32'(200 + i), 32'(50 + i)}, $sformatf("output block %0d", i));
    end
    rd(8'h04, d); check(!d[4] && !irq, "output buffer drained");

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

// Testbench of the stage subkey memory (8 entries, as for a one-round
// pipeline): writes random words, reads every entry back through the
// asynchronous read port, overwrites some and checks again.
module tb_idea_key_mem;
  import cb_pkg::*;

  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic              we;
  logic [PASS_W-1:0] waddr, raddr;
  word_t             wdata, rdata;
  word_t             model [8];

  idea_key_mem #(.DEPTH(8)) dut (.clk, .we, .waddr, .wdata, .raddr, .rdata);

  task automatic readall();
    for (int i = 0; i < 8; i++) begin
      raddr = PASS_W'(i);
      #1;
      checks++;
      if (rdata != model[i]) begin failures++; $display("FAIL: entry %0d %h exp %h", i, rdata, model[i]); end
    end
  endtask

  initial begin
    we = 0; waddr = 0; wdata = 0; raddr = 0;
    for (int i = 0; i < 8; i++) begin
      @(negedge clk); we = 1; waddr = PASS_W'(i); wdata = 16'($urandom); model[i] = wdata;
    end
    @(negedge clk); we = 0;
    readall();
    repeat (20) begin
      @(negedge clk); we = 1; waddr = PASS_W'($urandom_range(0, 7)); wdata = 16'($urandom);
      model[waddr] = wdata;
      @(negedge clk); we = 0;
      readall();
    end
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

// Testbench of the two-stage multiplier modulo 2^16+1: feeds a new operand
// pair every cycle (corner cases with 0 = 2^16, 1 and 2^16-1 first, then
// random pairs) and checks each result one cycle later against a plain
// 34-bit modulo computation.
module tb_idea_mulmod;
  import cb_pkg::*;
  import idea_ref_pkg::*;

  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  word_t a, b, y;
  idea_mulmod dut (.clk, .a, .b, .y);

  word_t pa, pb;
  bit    have = 0;
  localparam word_t CORNER [6] = '{16'h0000, 16'h0001, 16'hFFFF, 16'h8000, 16'h0002, 16'hFFFE};

  always @(posedge clk) begin
    if (have) begin
      checks++;
      if (y != ref_mul(pa, pb)) begin
        failures++;
        $display("FAIL: %h * %h = %h, expected %h", pa, pb, y, ref_mul(pa, pb));
      end
    end
    pa <= a; pb <= b; have <= 1;
  end

  initial begin
    a = 0; b = 0;
    @(posedge clk);
    foreach (CORNER[i]) foreach (CORNER[j]) begin
      a <= CORNER[i]; b <= CORNER[j]; @(posedge clk);
    end
    repeat (5000) begin
      a <= 16'($urandom); b <= 16'($urandom); @(posedge clk);
    end
    @(posedge clk);
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

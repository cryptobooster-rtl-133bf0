// Testbench of the buffered CoreLink: random producer and consumer on both
// handshakes (the producer holds a word until it is taken), every word
// checked in order against a queue model, the fill count checked every
// cycle, and both full and empty reached.
module tb_corelink_fifo;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  localparam int W = 16, D = 5;
  logic         in_valid, in_ready, out_valid, out_ready;
  logic [W-1:0] in_data, out_data;
  logic [$clog2(D+1)-1:0] count;

  corelink_fifo #(.WIDTH(W), .DEPTH(D)) dut (.clk, .rst_n, .in_valid, .in_data, .in_ready,
                                            .out_valid, .out_data, .out_ready, .count);

  logic [W-1:0] model[$];
  int n_full = 0, n_empty = 0, n_in = 0;

  always @(posedge clk) if (rst_n) begin
    checks++;
    if (int'(count) != model.size()) begin failures++; $display("FAIL: count %0d model %0d", count, model.size()); end
    if (!in_ready) n_full++;
    if (!out_valid) n_empty++;
    if (out_valid && out_ready) begin
      checks++;
      if (model.size() == 0 || out_data != model[0]) begin failures++; $display("FAIL: got %h", out_data); end
      void'(model.pop_front());
    end
    if (in_valid && in_ready) begin model.push_back(in_data); n_in++; end
  end

  // producer: keeps a word offered until taken
  always @(posedge clk) begin
    if (!rst_n) begin in_valid <= 0; in_data <= 0; end
    else if (!in_valid || in_ready) begin
      in_valid <= ($urandom_range(0, 2) != 0);
      in_data  <= W'($urandom);
    end
  end
  // consumer: slow in the first half, fast in the second
  int cyc = 0;
  always @(posedge clk) begin
    cyc <= cyc + 1;
    out_ready <= (cyc < 1000) ? ($urandom_range(0, 3) == 0) : ($urandom_range(0, 3) != 0);
  end

  initial begin
    out_ready = 0;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    repeat (2000) @(posedge clk);
    checks++;
    if (n_full == 0 || n_empty == 0 || n_in < 500) begin
      failures++; $display("FAIL: full %0d empty %0d words %0d", n_full, n_empty, n_in);
    end
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

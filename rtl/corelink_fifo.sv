// Buffered CoreLink: a unidirectional point-to-point link with a valid/ready
// handshake on both sides and DEPTH words of storage in between.
//
// A word is written when in_valid && in_ready and read when
// out_valid && out_ready. in_ready is high while the buffer has room;
// out_valid while it holds a word, which is presented on out_data
// (first-word fall-through). count gives the fill level, for credit-based
// flow control by the sender. Reset empties the buffer.
// The point-to-point, unidirectional link carrying control or data packets
// follows the described interconnect; the handshake, the buffering and the
// depth are this implementation's choices. Assertions state the handshake
// rule that a producer must not drop a valid word before it is taken.
module corelink_fifo #(
  parameter int WIDTH = 66,
  parameter int DEPTH = 4
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     in_valid,
  input  logic [WIDTH-1:0]         in_data,
  output logic                     in_ready,
  output logic                     out_valid,
  output logic [WIDTH-1:0]         out_data,
  input  logic                     out_ready,
  output logic [$clog2(DEPTH+1)-1:0] count
);

  localparam int AW = (DEPTH > 1) ? $clog2(DEPTH) : 1;
  localparam int CW = $clog2(DEPTH + 1);

  logic [WIDTH-1:0] mem [DEPTH];
  logic [AW-1:0]    rd_ptr, wr_ptr;

  logic push, pop;
  assign in_ready  = (int'(count) < DEPTH);
  assign out_valid = (count != '0);
  assign push      = in_valid && in_ready;
  assign pop       = out_valid && out_ready;
  assign out_data  = mem[rd_ptr];

  function automatic logic [AW-1:0] inc(logic [AW-1:0] p);
    return (int'(p) == DEPTH - 1) ? '0 : p + 1'b1;
  endfunction

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      rd_ptr <= '0;
      wr_ptr <= '0;
      count  <= '0;
    end else begin
      if (push) wr_ptr <= inc(wr_ptr);
      if (pop)  rd_ptr <= inc(rd_ptr);
      count <= count + CW'(push) - CW'(pop);
    end
  end

  always_ff @(posedge clk)
    if (push) mem[wr_ptr] <= in_data;

  // Producer side of the CoreLink handshake: once offered, a word stays
  // offered and unchanged until accepted.
  a_in_stable: assert property (@(posedge clk) disable iff (!rst_n)
    (in_valid && !in_ready) |=> (in_valid && $stable(in_data)))
    else $error("corelink_fifo: producer withdrew or changed a word before it was taken");

endmodule

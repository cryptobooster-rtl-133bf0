// Subkey memory attached to one pipeline stage.
//
// Holds the DEPTH subkeys one key position (Z1..Z6) takes in the IDEA rounds
// that are mapped onto one physical round: with N regular rounds built, a
// block passes 8/N times, and the entry for the block's current pass is read
// asynchronously (distributed RAM) with the pass counter from the control
// pipeline. Written one word per cycle by the session adapter while the
// pipeline is idle. Memories attached to the stages and addressed by the
// control pipeline follow the described design; asynchronous read and the
// write port are this implementation's choice.
module idea_key_mem
  import cb_pkg::*;
#(
  parameter int DEPTH = 1
) (
  input  logic                  clk,
  input  logic                  we,
  input  logic [PASS_W-1:0]     waddr,
  input  word_t                 wdata,
  input  logic [PASS_W-1:0]     raddr,
  output word_t                 rdata
);

  localparam int AW = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  word_t mem [DEPTH];

  always_ff @(posedge clk)
    if (we && int'(waddr) < DEPTH) mem[waddr[AW-1:0]] <= wdata;

  assign rdata = (int'(raddr) < DEPTH) ? mem[raddr[AW-1:0]] : '0;

endmodule

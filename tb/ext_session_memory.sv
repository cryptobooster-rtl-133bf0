// Behavioural model of the external session memory: a 32-bit synchronous
// memory with WORDS words. A write is performed at the clock edge where
// en && we; a read started at an edge where en && !we delivers its data on
// rdata RD_LAT cycles later.
module ext_session_memory #(
  parameter int WORDS  = 8192,
  parameter int RD_LAT = 1,
  parameter int AW     = 17
) (
  input  logic          clk,
  input  logic          en,
  input  logic          we,
  input  logic [AW-1:0] addr,
  input  logic [31:0]   wdata,
  output logic [31:0]   rdata
);
  logic [31:0] mem [WORDS];
  logic [31:0] pipe [RD_LAT];

  initial foreach (mem[i]) mem[i] = '0;
  initial foreach (pipe[i]) pipe[i] = '0;

  always @(posedge clk) begin
    if (en && we && int'(addr) < WORDS) mem[addr] <= wdata;
    pipe[0] <= (int'(addr) < WORDS) ? mem[addr] : '0;
    for (int i = 1; i < RD_LAT; i++) pipe[i] <= pipe[i-1];
  end
  assign rdata = pipe[RD_LAT-1];

  // direct access for testbenches
  function automatic void poke64(int waddr, logic [63:0] d);
    mem[2*waddr] = d[31:0]; mem[2*waddr+1] = d[63:32];
  endfunction
  function automatic logic [63:0] peek64(int waddr);
    return {mem[2*waddr+1], mem[2*waddr]};
  endfunction
endmodule

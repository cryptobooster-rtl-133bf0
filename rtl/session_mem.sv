// SessionMem: adapter between 64-bit session-memory requests and a physical
// 32-bit synchronous memory port (external SRAM style).
//
// A request (CoreLink valid/ready, smem_req_t) reads or writes one 64-bit
// session word at word address A. The adapter performs two 32-bit accesses,
// low half at 2A and high half at 2A+1. For reads, mem_rdata is sampled
// MEM_RD_LAT cycles after the cycle in which mem_en is high, and the full
// word is returned on rsp_valid/rsp_data (one cycle pulse, no back-pressure).
// Only one request is handled at a time; req_ready is high when idle.
// A write takes 2 cycles, a read 2*(MEM_RD_LAT+1) cycles, plus one to accept.
// The document gives the purpose (interfacing different types and
// configurations of physical memories); the 32-bit SRAM port, the word split
// and the configurable read latency are this implementation's choices.
module session_mem
  import cb_pkg::*;
#(
  parameter int MEM_RD_LAT = 1
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 req_valid,
  input  smem_req_t            req,
  output logic                 req_ready,
  output logic                 rsp_valid,
  output block_t               rsp_data,
  // physical memory port
  output logic                 mem_en,
  output logic                 mem_we,
  output logic [SMEM_AW:0]     mem_addr,
  output logic [31:0]          mem_wdata,
  input  logic [31:0]          mem_rdata
);

  typedef enum logic [1:0] {S_IDLE, S_ACCESS, S_WAIT} state_t;
  state_t    state;
  smem_req_t cur;
  logic      half;       // 0: low 32 bits, 1: high 32 bits
  logic [3:0] wait_cnt;
  logic [31:0] lo_data;

  assign req_ready = (state == S_IDLE);

  always_comb begin
    mem_en    = (state == S_ACCESS);
    mem_we    = (state == S_ACCESS) && cur.we;
    mem_addr  = {cur.addr, half};
    mem_wdata = half ? cur.wdata[63:32] : cur.wdata[31:0];
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state     <= S_IDLE;
      cur       <= '0;
      half      <= 1'b0;
      wait_cnt  <= '0;
      lo_data   <= '0;
      rsp_valid <= 1'b0;
      rsp_data  <= '0;
    end else begin
      rsp_valid <= 1'b0;
      unique case (state)
        S_IDLE: if (req_valid) begin
          cur   <= req;
          half  <= 1'b0;
          state <= S_ACCESS;
        end
        S_ACCESS: begin
          if (cur.we) begin
            half <= 1'b1;
            if (half) state <= S_IDLE;
          end else begin
            wait_cnt <= 4'(MEM_RD_LAT);
            state    <= S_WAIT;
          end
        end
        S_WAIT: begin
          if (wait_cnt > 4'd1) wait_cnt <= wait_cnt - 1'b1;
          else begin
            if (!half) begin
              lo_data <= mem_rdata;
              half    <= 1'b1;
              state   <= S_ACCESS;
            end else begin
              rsp_data  <= {mem_rdata, lo_data};
              rsp_valid <= 1'b1;
              state     <= S_IDLE;
            end
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  initial assert (MEM_RD_LAT >= 1 && MEM_RD_LAT <= 15) else $error("session_mem: MEM_RD_LAT out of range");

endmodule

// HostInterface: the register view of the coprocessor for host software,
// with one interrupt line.
//
// A simple synchronous register bus (address, write strobe, read strobe,
// 32-bit data; read data is combinational) is presented by a bus-specific
// adapter (PCI, VME, ...) that is not part of this design. Register map
// (byte addresses):
//   0x00 CMD       W  [3:0] opcode (1 load, 2 save, 3 mem write, 4 mem read),
//                     [31:16] session id or session-memory word address
//   0x04 STATUS    R  [0] command busy, [1] session active, [2] error,
//                     [3] DIN has room, [4] DOUT holds a block, [31:16] session id
//   0x08 DIN_LO    W  low half of the next input block
//   0x0C DIN_HI    W  high half; writing it queues the block {DIN_HI, DIN_LO}
//   0x10 DOUT_LO   R  low half of the oldest output block
//   0x14 DOUT_HI   R  high half; reading it (bus_re) removes the block
//   0x18 MEMW_LO   W  low half of the word for a session-memory write
//   0x1C MEMW_HI   W  high half
//   0x20 MEMR_LO   R  low half of the last session-memory read
//   0x24 MEMR_HI   R  high half
//   0x28 IRQ_STAT  R/W1C [0] command done, [1] error, [2] output available (level)
//   0x2C IRQ_EN    RW enables of the IRQ_STAT bits
//   0x30 CORE_FEAT R  feature word of the CypherCore
//   0x34 ADPT_FEAT R  feature word of the session adapter
// A block written to DIN_HI while STATUS[3] is low is dropped; a CMD write
// while STATUS[0] is high is ignored. irq = |(IRQ_STAT & IRQ_EN).
// Blocks go to the session controller on a CoreLink stream through a
// DIN_DEPTH-block buffer; results arrive on another stream into a
// DOUT_DEPTH-block buffer.
// Read/write registers and interrupts follow the described design; the map,
// the buffer depths and the bus protocol are this implementation's choices.
module host_interface
  import cb_pkg::*;
#(
  parameter int DIN_DEPTH  = 4,
  parameter int DOUT_DEPTH = 4
) (
  input  logic        clk,
  input  logic        rst_n,
  // register bus
  input  logic [7:0]  bus_addr,
  input  logic        bus_we,
  input  logic        bus_re,
  input  logic [31:0] bus_wdata,
  output logic [31:0] bus_rdata,
  output logic        irq,
  // to/from SessionControl
  output logic        cmd_valid,
  output host_cmd_t   cmd,
  input  logic        cmd_ready,
  input  logic        cmd_done,
  input  logic        cmd_error,
  input  logic        active,
  input  logic [15:0] cur_sid,
  input  block_t      mem_rdata,
  input  logic [31:0] core_features,
  input  logic [31:0] adapter_features,
  output logic        din_valid,
  output block_t      din_data,
  input  logic        din_ready,
  input  logic        dout_valid,
  input  block_t      dout_data,
  output logic        dout_ready
);

  localparam logic [7:0] A_CMD = 8'h00, A_STATUS = 8'h04, A_DIN_LO = 8'h08, A_DIN_HI = 8'h0C,
                         A_DOUT_LO = 8'h10, A_DOUT_HI = 8'h14, A_MEMW_LO = 8'h18, A_MEMW_HI = 8'h1C,
                         A_MEMR_LO = 8'h20, A_MEMR_HI = 8'h24, A_IRQ_STAT = 8'h28, A_IRQ_EN = 8'h2C,
                         A_CORE_FEAT = 8'h30, A_ADPT_FEAT = 8'h34;

  logic [31:0] din_lo;
  block_t      memw;
  logic [1:0]  irq_stat;   // sticky bits: done, error
  logic [2:0]  irq_en;
  logic        cmd_pending;

  // input buffer
  logic din_push, din_room;
  assign din_push = bus_we && bus_addr == A_DIN_HI && din_room;
  corelink_fifo #(.WIDTH(64), .DEPTH(DIN_DEPTH)) u_din (
    .clk, .rst_n,
    .in_valid(din_push), .in_data({bus_wdata, din_lo}), .in_ready(din_room),
    .out_valid(din_valid), .out_data(din_data), .out_ready(din_ready), .count());

  // output buffer
  logic   dout_avail, dout_pop;
  block_t dout_head;
  assign dout_pop = bus_re && bus_addr == A_DOUT_HI && dout_avail;
  corelink_fifo #(.WIDTH(64), .DEPTH(DOUT_DEPTH)) u_dout (
    .clk, .rst_n,
    .in_valid(dout_valid), .in_data(dout_data), .in_ready(dout_ready),
    .out_valid(dout_avail), .out_data(dout_head), .out_ready(dout_pop), .count());

  assign cmd_valid = cmd_pending;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      din_lo      <= '0;
      memw        <= '0;
      irq_stat    <= '0;
      irq_en      <= '0;
      cmd_pending <= 1'b0;
      cmd         <= '0;
    end else begin
      if (cmd_pending && cmd_ready) cmd_pending <= 1'b0;
      if (cmd_done)  irq_stat[0] <= 1'b1;
      if (cmd_done && cmd_error) irq_stat[1] <= 1'b1;
      if (bus_we) begin
        unique case (bus_addr)
          A_CMD: if (!cmd_pending) begin
            cmd         <= '{op: sa_op_t'(bus_wdata[3:0]), arg: bus_wdata[31:16], wdata: memw};
            cmd_pending <= 1'b1;
          end
          A_DIN_LO:   din_lo     <= bus_wdata;
          A_MEMW_LO:  memw[31:0]  <= bus_wdata;
          A_MEMW_HI:  memw[63:32] <= bus_wdata;
          A_IRQ_STAT: irq_stat   <= irq_stat & ~bus_wdata[1:0];
          A_IRQ_EN:   irq_en     <= bus_wdata[2:0];
          default: ;
        endcase
      end
    end
  end

  // command busy: from the write of CMD until the controller reports done
  logic cmd_busy;
  always_ff @(posedge clk) begin
    if (!rst_n) cmd_busy <= 1'b0;
    else if (bus_we && bus_addr == A_CMD && !cmd_pending && !cmd_busy) cmd_busy <= 1'b1;
    else if (cmd_done) cmd_busy <= 1'b0;
  end

  always_comb begin
    unique case (bus_addr)
      A_STATUS:    bus_rdata = {cur_sid, 11'd0, dout_avail, din_room, cmd_error, active, cmd_busy};
      A_DOUT_LO:   bus_rdata = dout_head[31:0];
      A_DOUT_HI:   bus_rdata = dout_head[63:32];
      A_MEMR_LO:   bus_rdata = mem_rdata[31:0];
      A_MEMR_HI:   bus_rdata = mem_rdata[63:32];
      A_IRQ_STAT:  bus_rdata = {29'd0, dout_avail, irq_stat};
      A_IRQ_EN:    bus_rdata = {29'd0, irq_en};
      A_CORE_FEAT: bus_rdata = core_features;
      A_ADPT_FEAT: bus_rdata = adapter_features;
      default:     bus_rdata = '0;
    endcase
  end

  assign irq = |({dout_avail, irq_stat} & irq_en);

endmodule

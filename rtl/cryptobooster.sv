// CryptoBooster: a modular cryptographic coprocessor, here with the IDEA
// CypherCore.
//
// A host drives the coprocessor through a register bus (HostInterface) and
// keeps its session records (algorithm, chaining mode, direction, key and
// initial vectors) in an external session memory, so that switching between
// sessions costs only a reload from that memory. Inside, the CryptoCore is
// made of:
//   SessionControl  - executes host commands, drains the cipher before a
//                     session switch, gates the data stream;
//   SessionAdapter  - IDEA-specific: reads a session record through
//                     SessionMem, computes the 52 subkeys and loads the
//                     subkey memories, initial vectors, mode and direction;
//   IDEACore        - the CypherCore: block chaining (ECB/CBC/CFB/OFB) in
//                     front of a 59-stage IDEA pipeline with N_ROUNDS
//                     regular rounds (1, 2, 4 or 8) and an output round.
// Modules talk over unidirectional valid/ready links (CoreLink).
// Ports: the host register bus and interrupt (see host_interface for the
// map) and a 32-bit synchronous memory port for the external session memory
// (read data MEM_RD_LAT cycles after the access). A bus-specific adapter
// (PCI, VME, ...) would sit in front of the register bus.
// Timing at N_ROUNDS = 8: one 64-bit block per cycle through the pipeline,
// 59 cycles from entering to leaving it.
// The module partitioning and the links follow the described architecture;
// the bus, the register map, the memory port and the command set are this
// implementation's choices.
module cryptobooster
  import cb_pkg::*;
#(
  parameter int N_ROUNDS   = 8,
  parameter int MEM_RD_LAT = 1
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic [7:0]        bus_addr,
  input  logic              bus_we,
  input  logic              bus_re,
  input  logic [31:0]       bus_wdata,
  output logic [31:0]       bus_rdata,
  output logic              irq,
  output logic              mem_en,
  output logic              mem_we,
  output logic [SMEM_AW:0]  mem_addr,
  output logic [31:0]       mem_wdata,
  input  logic [31:0]       mem_rdata
);

  localparam int NCHAIN = chains_needed(N_ROUNDS);

  // HostInterface <-> SessionControl
  logic        hc_valid, hc_ready, hc_done, hc_error, active;
  host_cmd_t   hc;
  logic [15:0] cur_sid;
  block_t      mem_rd_q;
  logic [31:0] core_feat, core_feat_q, adpt_feat, adpt_feat_q;
  logic        hin_valid, hin_ready, hout_valid, hout_ready;
  block_t      hin_data, hout_data;

  // SessionControl <-> IDEACore
  logic        cin_valid, cin_ready, cout_valid, cout_ready, core_busy;
  block_t      cin_data, cout_data;

  // SessionControl <-> SessionAdapter
  logic        sa_cmd_valid, sa_cmd_ready, sa_rsp_valid;
  cl_flit_t    sa_cmd, sa_rsp;

  // SessionAdapter <-> SessionMem
  logic        sm_req_valid, sm_req_ready, sm_rsp_valid;
  smem_req_t   sm_req;
  block_t      sm_rsp_data;

  // SessionAdapter -> IDEACore configuration
  key_wr_t          key_wr;
  logic             iv_we, decrypt, restart;
  logic [TAG_W-1:0] iv_idx;
  block_t           iv_wdata, iv_rdata;
  chain_mode_t      mode;

  host_interface u_host (
    .clk, .rst_n, .bus_addr, .bus_we, .bus_re, .bus_wdata, .bus_rdata, .irq,
    .cmd_valid(hc_valid), .cmd(hc), .cmd_ready(hc_ready), .cmd_done(hc_done),
    .cmd_error(hc_error), .active, .cur_sid, .mem_rdata(mem_rd_q),
    .core_features(core_feat_q), .adapter_features(adpt_feat_q),
    .din_valid(hin_valid), .din_data(hin_data), .din_ready(hin_ready),
    .dout_valid(hout_valid), .dout_data(hout_data), .dout_ready(hout_ready));

  session_control u_ctrl (
    .clk, .rst_n,
    .cmd_valid(hc_valid), .cmd(hc), .cmd_ready(hc_ready), .done(hc_done), .error(hc_error),
    .active, .cur_sid, .mem_rdata(mem_rd_q),
    .core_features_q(core_feat_q), .adapter_features_q(adpt_feat_q),
    .h_in_valid(hin_valid), .h_in_data(hin_data), .h_in_ready(hin_ready),
    .h_out_valid(hout_valid), .h_out_data(hout_data), .h_out_ready(hout_ready),
    .c_in_valid(cin_valid), .c_in_data(cin_data), .c_in_ready(cin_ready),
    .c_out_valid(cout_valid), .c_out_data(cout_data), .c_out_ready(cout_ready),
    .core_busy, .core_features(core_feat),
    .sa_cmd_valid, .sa_cmd, .sa_cmd_ready, .sa_rsp_valid, .sa_rsp,
    .adapter_features(adpt_feat));

  session_adapter #(.NCHAIN(NCHAIN)) u_adapter (
    .clk, .rst_n,
    .cmd_valid(sa_cmd_valid), .cmd(sa_cmd), .cmd_ready(sa_cmd_ready),
    .rsp_valid(sa_rsp_valid), .rsp(sa_rsp),
    .smem_req_valid(sm_req_valid), .smem_req(sm_req), .smem_req_ready(sm_req_ready),
    .smem_rsp_valid(sm_rsp_valid), .smem_rsp_data(sm_rsp_data),
    .key_wr, .iv_we, .iv_idx, .iv_wdata, .iv_rdata, .mode, .decrypt, .restart,
    .features(adpt_feat));

  session_mem #(.MEM_RD_LAT(MEM_RD_LAT)) u_smem (
    .clk, .rst_n,
    .req_valid(sm_req_valid), .req(sm_req), .req_ready(sm_req_ready),
    .rsp_valid(sm_rsp_valid), .rsp_data(sm_rsp_data),
    .mem_en, .mem_we, .mem_addr, .mem_wdata, .mem_rdata);

  ideacore #(.N_ROUNDS(N_ROUNDS), .NCHAIN(NCHAIN)) u_core (
    .clk, .rst_n, .mode, .decrypt, .restart, .key_wr,
    .iv_we, .iv_idx, .iv_wdata, .iv_rdata,
    .in_valid(cin_valid), .in_data(cin_data), .in_ready(cin_ready),
    .out_valid(cout_valid), .out_data(cout_data), .out_ready(cout_ready),
    .busy(core_busy), .features(core_feat));

endmodule

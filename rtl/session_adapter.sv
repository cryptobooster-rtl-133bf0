// SessionAdapter for the IDEA CypherCore: turns session records in session
// memory into the core's configuration, and back.
//
// Commands arrive from the session controller as CoreLink control flits
// (data[3:0] opcode, data[19:4] session id or word address; a memory write
// is followed by one data flit with the word). Each command is answered by
// one flit on rsp: CTRL with data[0] = ok, data[1] = error, or DATA with
// the word read for SA_MEMRD.
//   SA_LOAD  sid : read the header, check the algorithm id, read the 128-bit
//                  key and start the subkey generator (decryption subkeys
//                  for ECB/CBC decryption, encryption subkeys otherwise),
//                  read the NCHAIN initial vectors into the chaining unit,
//                  set mode and direction, restart the chain counter.
//   SA_SAVE  sid : write the current chaining values back into the record,
//                  so that a session can be resumed later.
//   SA_MEMWR a   : write the following data word to session word a.
//   SA_MEMRD a   : read session word a.
// Record layout (64-bit words at sid*SESSION_WORDS): header, key high, key
// low, then one initial vector per chain (see cb_pkg). Commands are only
// issued while the core is idle. features answers the controller's query:
// [7:0] algorithm, [15:8] chains, [23:16] record size in words.
// The adapter's role (cipher-specific session parameter management next to
// the session memory) follows the described architecture; the command set,
// record layout and feature word are this implementation's choices.
module session_adapter
  import cb_pkg::*;
#(
  parameter int NCHAIN = chains_needed(IDEA_ROUNDS)
) (
  input  logic             clk,
  input  logic             rst_n,
  // commands from SessionControl
  input  logic             cmd_valid,
  input  cl_flit_t         cmd,
  output logic             cmd_ready,
  output logic             rsp_valid,
  output cl_flit_t         rsp,
  // SessionMem
  output logic             smem_req_valid,
  output smem_req_t        smem_req,
  input  logic             smem_req_ready,
  input  logic             smem_rsp_valid,
  input  block_t           smem_rsp_data,
  // CypherCore configuration
  output key_wr_t          key_wr,
  output logic             iv_we,
  output logic [TAG_W-1:0] iv_idx,
  output block_t           iv_wdata,
  input  block_t           iv_rdata,
  output chain_mode_t      mode,
  output logic             decrypt,
  output logic             restart,
  output logic [31:0]      features
);

  initial assert (NCHAIN + 3 <= SESSION_WORDS) else $error("session_adapter: record too small for NCHAIN");

  typedef enum logic [3:0] {
    S_IDLE, S_WDATA, S_MEMREQ, S_MEMWAIT, S_HDR, S_KEYHI, S_KEYLO, S_KSCHED,
    S_IV, S_SAVE, S_RESP
  } state_t;
  state_t state;

  sa_op_t             op;
  logic [15:0]        arg;
  logic [SMEM_AW-1:0] base;
  logic [TAG_W-1:0]   cnt;
  logic [127:0]       key;
  chain_mode_t        new_mode;
  logic               new_dec, err;
  block_t             rdata_q;

  logic ks_start, ks_done;
  idea_key_schedule u_ks (
    .clk, .rst_n, .start(ks_start), .key, .decrypt_keys(new_dec && (new_mode == MODE_ECB || new_mode == MODE_CBC)),
    .key_wr, .busy(), .done(ks_done));

  assign cmd_ready = (state == S_IDLE) || (state == S_WDATA);
  assign features  = {8'd0, 8'(SESSION_WORDS), 8'(NCHAIN), ALG_IDEA};

  // one outstanding memory request
  logic req_pending;
  assign smem_req_valid = req_pending;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state       <= S_IDLE;
      op          <= SA_NOP;
      arg         <= '0;
      base        <= '0;
      cnt         <= '0;
      key         <= '0;
      new_mode    <= MODE_ECB;
      new_dec     <= 1'b0;
      mode        <= MODE_ECB;
      decrypt     <= 1'b0;
      err         <= 1'b0;
      rdata_q     <= '0;
      req_pending <= 1'b0;
      smem_req    <= '0;
      ks_start    <= 1'b0;
      iv_we       <= 1'b0;
      iv_idx      <= '0;
      iv_wdata    <= '0;
      restart     <= 1'b0;
      rsp_valid   <= 1'b0;
      rsp         <= '0;
    end else begin
      ks_start  <= 1'b0;
      iv_we     <= 1'b0;
      restart   <= 1'b0;
      rsp_valid <= 1'b0;
      if (req_pending && smem_req_ready) req_pending <= 1'b0;

      unique case (state)
        S_IDLE: if (cmd_valid && cmd.kind == CL_CTRL) begin
          op   <= sa_op_t'(cmd.data[3:0]);
          arg  <= cmd.data[19:4];
          base <= SMEM_AW'(cmd.data[19:4]) * SMEM_AW'(SESSION_WORDS);
          err  <= 1'b0;
          cnt  <= '0;
          unique case (sa_op_t'(cmd.data[3:0]))
            SA_LOAD: begin
              smem_req    <= '{we: 1'b0, addr: SMEM_AW'(cmd.data[19:4]) * SMEM_AW'(SESSION_WORDS), wdata: '0};
              req_pending <= 1'b1;
              state       <= S_HDR;
            end
            SA_SAVE: begin
              iv_idx <= '0;
              state  <= S_SAVE;
            end
            SA_MEMWR: state <= S_WDATA;
            SA_MEMRD: begin
              smem_req    <= '{we: 1'b0, addr: SMEM_AW'(cmd.data[19:4]), wdata: '0};
              req_pending <= 1'b1;
              state       <= S_MEMWAIT;
            end
            default: begin err <= 1'b1; state <= S_RESP; end
          endcase
        end
        S_WDATA: if (cmd_valid) begin
          smem_req    <= '{we: 1'b1, addr: SMEM_AW'(arg), wdata: cmd.data};
          req_pending <= 1'b1;
          state       <= S_MEMREQ;
        end
        S_MEMREQ: if (!req_pending || smem_req_ready) state <= S_RESP;   // write issued
        S_MEMWAIT: if (smem_rsp_valid) begin
          rdata_q <= smem_rsp_data;
          state   <= S_RESP;
        end
        S_HDR: if (smem_rsp_valid) begin
          if (smem_rsp_data[7:0] != ALG_IDEA) begin
            err   <= 1'b1;
            state <= S_RESP;
          end else begin
            new_mode    <= chain_mode_t'(smem_rsp_data[9:8]);
            new_dec     <= smem_rsp_data[10];
            smem_req    <= '{we: 1'b0, addr: base + 1'b1, wdata: '0};
            req_pending <= 1'b1;
            state       <= S_KEYHI;
          end
        end
        S_KEYHI: if (smem_rsp_valid) begin
          key[127:64] <= smem_rsp_data;
          smem_req    <= '{we: 1'b0, addr: base + SMEM_AW'(2), wdata: '0};
          req_pending <= 1'b1;
          state       <= S_KEYLO;
        end
        S_KEYLO: if (smem_rsp_valid) begin
          key[63:0] <= smem_rsp_data;
          ks_start  <= 1'b1;
          state     <= S_KSCHED;
        end
        S_KSCHED: if (ks_done) begin
          smem_req    <= '{we: 1'b0, addr: base + SMEM_AW'(3), wdata: '0};
          req_pending <= 1'b1;
          cnt         <= '0;
          state       <= S_IV;
        end
        S_IV: if (smem_rsp_valid) begin
          iv_we    <= 1'b1;
          iv_idx   <= cnt;
          iv_wdata <= smem_rsp_data;
          if (int'(cnt) == NCHAIN - 1) begin
            mode    <= new_mode;
            decrypt <= new_dec;
            restart <= 1'b1;
            state   <= S_RESP;
          end else begin
            cnt         <= cnt + 1'b1;
            smem_req    <= '{we: 1'b0, addr: base + SMEM_AW'(3) + SMEM_AW'(cnt) + 1'b1, wdata: '0};
            req_pending <= 1'b1;
          end
        end
        S_SAVE: if (!req_pending || smem_req_ready) begin
          // iv_idx selects the chain whose value is on iv_rdata
          smem_req    <= '{we: 1'b1, addr: base + SMEM_AW'(3) + SMEM_AW'(iv_idx), wdata: iv_rdata};
          req_pending <= 1'b1;
          if (int'(iv_idx) == NCHAIN - 1) state <= S_MEMREQ;
          else iv_idx <= iv_idx + 1'b1;
        end
        S_RESP: begin
          rsp_valid <= 1'b1;
          if (op == SA_MEMRD && !err) rsp <= '{kind: CL_DATA, last: 1'b1, data: rdata_q};
          else                         rsp <= '{kind: CL_CTRL, last: 1'b1, data: {62'd0, err, !err}};
          state <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

endmodule

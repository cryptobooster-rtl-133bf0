// SessionControl: central controller of the CryptoCore.
//
// It executes the host's commands and owns the data path between the host
// interface and the CypherCore:
//  * SA_LOAD sid: stop taking new input, wait until the CypherCore has
//    drained (busy low), save the chaining values of the running session
//    (if one is active) into its record, then have the session adapter load
//    session sid. On success the session becomes active and input flows
//    again; on error no session is active.
//  * SA_SAVE: drain, then save the running session's chaining values.
//  * SA_MEMWR / SA_MEMRD: passed to the adapter (host access to session
//    memory); the read word is kept for the host.
// Before the first load it queries the intelligent modules: it compares the
// algorithm the CypherCore implements with the one the session adapter
// serves and refuses to load when they differ (e.g. after replacing one of
// them alone). Results flow from the core to the host without gating.
// done pulses when a command ends; error stays set until the next command.
// The role (central session management, querying the CypherCore and
// SessionAdapter features) follows the described architecture; the command
// set, draining and automatic save on a session switch are this
// implementation's choices.
module session_control
  import cb_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  // from HostInterface
  input  logic        cmd_valid,
  input  host_cmd_t   cmd,
  output logic        cmd_ready,
  output logic        done,
  output logic        error,
  output logic        active,
  output logic [15:0] cur_sid,
  output block_t      mem_rdata,
  output logic [31:0] core_features_q,
  output logic [31:0] adapter_features_q,
  // data stream host -> core -> host
  input  logic        h_in_valid,
  input  block_t      h_in_data,
  output logic        h_in_ready,
  output logic        h_out_valid,
  output block_t      h_out_data,
  input  logic        h_out_ready,
  output logic        c_in_valid,
  output block_t      c_in_data,
  input  logic        c_in_ready,
  input  logic        c_out_valid,
  input  block_t      c_out_data,
  output logic        c_out_ready,
  input  logic        core_busy,
  input  logic [31:0] core_features,
  // SessionAdapter command link
  output logic        sa_cmd_valid,
  output cl_flit_t    sa_cmd,
  input  logic        sa_cmd_ready,
  input  logic        sa_rsp_valid,
  input  cl_flit_t    sa_rsp,
  input  logic [31:0] adapter_features
);

  typedef enum logic [2:0] {S_QUERY, S_IDLE, S_DRAIN, S_SAVE, S_SEND, S_DATA, S_WAIT} state_t;
  state_t    state;
  host_cmd_t cur;
  logic      sent_save;   // the save before a load has been issued

  assign cmd_ready = (state == S_IDLE);

  // data path gating: input only while a session runs and no command drains it
  assign c_in_valid  = h_in_valid && active && (state == S_IDLE);
  assign c_in_data   = h_in_data;
  assign h_in_ready  = c_in_ready && active && (state == S_IDLE);
  assign h_out_valid = c_out_valid;
  assign h_out_data  = c_out_data;
  assign c_out_ready = h_out_ready;

  always_comb begin
    sa_cmd_valid = 1'b0;
    sa_cmd       = '{kind: CL_CTRL, last: 1'b1, data: '0};
    unique case (state)
      S_SAVE: begin
        sa_cmd_valid = 1'b1;
        sa_cmd.data  = {44'd0, cur_sid, SA_SAVE};
      end
      S_SEND: begin
        sa_cmd_valid = 1'b1;
        sa_cmd.last  = (cur.op != SA_MEMWR);
        sa_cmd.data  = {44'd0, cur.arg, cur.op};
      end
      S_DATA: begin
        sa_cmd_valid = 1'b1;
        sa_cmd       = '{kind: CL_DATA, last: 1'b1, data: cur.wdata};
      end
      default: ;
    endcase
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state              <= S_QUERY;
      cur                <= '0;
      done               <= 1'b0;
      error              <= 1'b0;
      active             <= 1'b0;
      cur_sid            <= '0;
      mem_rdata          <= '0;
      sent_save          <= 1'b0;
      core_features_q    <= '0;
      adapter_features_q <= '0;
    end else begin
      done <= 1'b0;
      unique case (state)
        S_QUERY: begin
          core_features_q    <= core_features;
          adapter_features_q <= adapter_features;
          state              <= S_IDLE;
        end
        S_IDLE: if (cmd_valid) begin
          cur       <= cmd;
          error     <= 1'b0;
          sent_save <= 1'b0;
          unique case (cmd.op)
            SA_LOAD:  begin
              if (core_features_q[7:0] != adapter_features_q[7:0]) begin
                error  <= 1'b1;
                active <= 1'b0;
                done   <= 1'b1;
              end else state <= S_DRAIN;
            end
            SA_SAVE:  state <= S_DRAIN;
            SA_MEMWR, SA_MEMRD: state <= S_SEND;
            default:  begin error <= 1'b1; done <= 1'b1; end
          endcase
        end
        S_DRAIN: if (!core_busy) begin
          if (active && !sent_save) state <= S_SAVE;
          else if (cur.op == SA_LOAD) state <= S_SEND;
          else begin done <= 1'b1; state <= S_IDLE; end   // save with no session
        end
        S_SAVE: if (sa_cmd_ready) begin
          sent_save <= 1'b1;
          state     <= S_WAIT;
        end
        S_SEND: if (sa_cmd_ready) state <= (cur.op == SA_MEMWR) ? S_DATA : S_WAIT;
        S_DATA: if (sa_cmd_ready) state <= S_WAIT;
        S_WAIT: if (sa_rsp_valid) begin
          if (sa_rsp.kind == CL_DATA) mem_rdata <= sa_rsp.data;
          if (sent_save && cur.op == SA_LOAD && state == S_WAIT && !sa_rsp.data[1] && active) begin
            // the save of the old session is done: now load the new one
            active <= 1'b0;
            state  <= S_SEND;
          end else begin
            if (sa_rsp.kind == CL_CTRL && sa_rsp.data[1]) error <= 1'b1;
            if (cur.op == SA_LOAD) begin
              active  <= !(sa_rsp.kind == CL_CTRL && sa_rsp.data[1]);
              cur_sid <= cur.arg;
            end
            done  <= 1'b1;
            state <= S_IDLE;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

endmodule

// IDEA subkey generator: derives the 52 subkeys from the 128-bit session key
// and writes them, one per cycle, into the pipeline's subkey memories.
//
// Expansion: the subkeys are the eight 16-bit words of the key, most
// significant first; the key is then rotated left by 25 bits and the next
// eight words are taken, until 52 words exist (round r key i is subkey
// 6(r-1)+i-1). For decryption the keys are replaced by
//   round r key 1/4 : multiplicative inverses (mod 2^16+1) of round 10-r keys 1/4
//   round r key 2/3 : additive inverses (mod 2^16) of round 10-r keys 3/2
//                     (keys 2/3 not exchanged for r = 1 and r = 9)
//   round r key 5/6 : round 9-r keys 5/6
// An inverse is x^(2^16-1) mod 2^16+1, formed in 16 square-and-multiply
// steps, one per cycle. Timing: start (with key and decrypt_keys stable)
// begins a run; encryption keys take 52 cycles, decryption keys about 350;
// done pulses for one cycle at the end. The document states only that the
// 52 subkeys are derived from the 128-bit key; the schedule is the standard
// IDEA one and the sequential structure is this implementation's choice.
module idea_key_schedule
  import cb_pkg::*;
(
  input  logic         clk,
  input  logic         rst_n,
  input  logic         start,
  input  logic [127:0] key,
  input  logic         decrypt_keys,
  output key_wr_t      key_wr,
  output logic         busy,
  output logic         done
);

  typedef enum logic [2:0] {S_IDLE, S_EXPAND, S_DERIVE, S_INVERT, S_DONE} state_t;
  state_t state;

  word_t        ek [52];
  logic [127:0] kreg;
  logic [5:0]   n;          // subkey counter 0..51
  logic [2:0]   w;          // word within the current rotation
  logic         dec;
  // inversion
  word_t        inv_r, inv_p;
  logic [4:0]   inv_step;

  // round / index of subkey n
  logic [3:0] cur_round;
  logic [2:0] cur_idx;
  always_comb begin
    cur_round = 4'(int'(n) / 6 + 1);
    cur_idx   = 3'(int'(n) % 6 + 1);
  end

  // source subkey of the decryption key n
  function automatic int src_index(int r, int i);
    int s = 10 - r;
    case (i)
      1: return (s - 1) * 6 + 0;
      4: return (s - 1) * 6 + 3;
      2: return (r == 1 || r == 9) ? (s - 1) * 6 + 1 : (s - 1) * 6 + 2;
      3: return (r == 1 || r == 9) ? (s - 1) * 6 + 2 : (s - 1) * 6 + 1;
      5: return (r <= 8) ? (8 - r) * 6 + 4 : 0;
      default: return (r <= 8) ? (8 - r) * 6 + 5 : 0;
    endcase
  endfunction

  word_t src;
  always_comb src = ek[src_index(int'(cur_round), int'(cur_idx))];

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state    <= S_IDLE;
      key_wr   <= '0;
      done     <= 1'b0;
      n        <= '0;
      w        <= '0;
      dec      <= 1'b0;
      kreg     <= '0;
      inv_r    <= '0;
      inv_p    <= '0;
      inv_step <= '0;
    end else begin
      key_wr.we <= 1'b0;
      done      <= 1'b0;
      unique case (state)
        S_IDLE: if (start) begin
          kreg  <= key;
          dec   <= decrypt_keys;
          n     <= '0;
          w     <= '0;
          state <= S_EXPAND;
        end
        S_EXPAND: begin
          ek[n] <= kreg[127 - 16*int'(w) -: 16];
          if (!dec) key_wr <= '{we: 1'b1, round: cur_round, idx: cur_idx, data: kreg[127 - 16*int'(w) -: 16]};
          w <= w + 1'b1;
          if (w == 3'd7) kreg <= {kreg[102:0], kreg[127:103]};
          if (n == 6'd51) begin
            n     <= '0;
            state <= dec ? S_DERIVE : S_DONE;
          end else n <= n + 1'b1;
        end
        S_DERIVE: begin
          if ((cur_idx == 3'd1 || cur_idx == 3'd4)) begin
            inv_r    <= 16'd1;
            inv_p    <= src;
            inv_step <= '0;
            state    <= S_INVERT;
          end else begin
            key_wr <= '{we: 1'b1, round: cur_round, idx: cur_idx,
                        data: (cur_idx == 3'd2 || cur_idx == 3'd3) ? word_t'(-src) : src};
            if (n == 6'd51) state <= S_DONE;
            n <= n + 1'b1;
          end
        end
        S_INVERT: begin
          inv_r    <= mulmod(inv_r, inv_p);
          inv_p    <= mulmod(inv_p, inv_p);
          inv_step <= inv_step + 1'b1;
          if (inv_step == 5'd15) begin
            key_wr <= '{we: 1'b1, round: cur_round, idx: cur_idx, data: mulmod(inv_r, inv_p)};
            if (n == 6'd51) state <= S_DONE;
            else            state <= S_DERIVE;
            n <= n + 1'b1;
          end
        end
        S_DONE: begin
          done  <= 1'b1;
          state <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  assign busy = (state != S_IDLE);

endmodule

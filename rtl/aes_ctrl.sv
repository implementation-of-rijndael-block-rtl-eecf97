// aes_ctrl -- sequencer of the Rijndael processor.
//
// Runs one block operation after a start request seen while idle:
//   IDLE      : on start, capture key, data, mode and key length (load).
//   KEY_SETUP : decryption only. Steps the round key generator forward
//               Nr times so that it holds the last round key, Round Key Nr.
//   INIT      : the initial round, Add Round Key only (state ^= round key).
//   ROUND     : rounds 1..Nr, one per clock; the last has final_round = 1.
// Nr is 10, 12 or 14 for 128, 192 and 256-bit keys. During INIT and every
// round but the last the key generator is stepped (forward when encrypting,
// backward when decrypting), so each round finds its key ready. done pulses
// for one cycle after the last round, when the result is in the state
// register.
//
// Timing from the clock edge that samples start to the edge that raises
// done: Nr + 2 cycles for encryption, 2*Nr + 2 for decryption. The round
// counts and the Add-Round-Key-only first round follow the design
// description; the state machine, the decryption key set-up pass and the
// start/busy/done handshake are this implementation's choices.
module aes_ctrl
  import aes_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       start,
  input  logic       decrypt,
  input  key_len_e   key_len,
  output logic       load,
  output logic       key_fwd,
  output logic       key_inv,
  output logic       do_init,
  output logic       do_round,
  output logic       final_round,
  output logic       mode,
  output key_len_e   klen,
  output logic [3:0] round,
  output logic       busy,
  output logic       done
);

  typedef enum logic [1:0] {S_IDLE, S_KEY_SETUP, S_INIT, S_ROUND} ctrl_state_e;

  ctrl_state_e st;
  logic [3:0]  cnt;
  logic [3:0]  nr;

  assign nr          = num_rounds(klen);
  assign load        = (st == S_IDLE) && start;
  assign do_init     = (st == S_INIT);
  assign do_round    = (st == S_ROUND);
  assign final_round = (st == S_ROUND) && (cnt == nr);
  assign key_fwd     = (st == S_KEY_SETUP)
                     || (!mode && (do_init || (do_round && !final_round)));
  assign key_inv     = mode && (do_init || (do_round && !final_round));
  assign round       = (st == S_ROUND) ? cnt : 4'd0;
  assign busy        = (st != S_IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st   <= S_IDLE;
      cnt  <= '0;
      mode <= 1'b0;
      klen <= KEY_128;
      done <= 1'b0;
    end else begin
      done <= 1'b0;
      case (st)
        S_IDLE: if (start) begin
          mode <= decrypt;
          klen <= key_len;
          cnt  <= 4'd1;
          st   <= decrypt ? S_KEY_SETUP : S_INIT;
        end
        S_KEY_SETUP: begin
          cnt <= cnt + 4'd1;
          if (cnt == nr) st <= S_INIT;
        end
        S_INIT: begin
          cnt <= 4'd1;
          st  <= S_ROUND;
        end
        S_ROUND: begin
          cnt <= cnt + 4'd1;
          if (final_round) begin
            st   <= S_IDLE;
            done <= 1'b1;
          end
        end
        default: st <= S_IDLE;
      endcase
    end
  end

  // The key generator is never asked to move both ways at once
  a_key_dir: assert property (@(posedge clk) disable iff (!rst_n) !(key_fwd && key_inv));

endmodule

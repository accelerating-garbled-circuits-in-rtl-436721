// aes128_core: iterative AES-128 encryption, one round per clock.
//
// The garbled AND gates hash wire labels with AES. This core takes a key and a
// plaintext block on `start` (accepted when `busy` is low), does the initial
// AddRoundKey in that cycle, then one full round per cycle while expanding the
// round key on the fly; the tenth round omits MixColumns. `done` pulses for one
// cycle 11 cycles after `start`, and `ct` holds the ciphertext from then until
// the next start. The iterative (one round per cycle) structure is this
// design's choice; the published design only states that the gates use AES cores.
module aes128_core
  import aes_pkg::*;
(
  input  logic         clk,
  input  logic         rst_n,
  input  logic         start,
  input  logic [127:0] key,
  input  logic [127:0] pt,
  output logic         busy,
  output logic         done,
  output logic [127:0] ct
);

  block_t     state_q, rk_q;
  logic [7:0] rcon_q;
  logic [3:0] round_q;

  block_t rk_next, st_sr, st_next;

  always_comb begin
    rk_next = next_round_key(rk_q, rcon_q);
    st_sr   = shift_rows(sub_bytes(state_q));
    st_next = ((round_q == 4'd10) ? st_sr : mix_columns(st_sr)) ^ rk_next;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q <= '0;
      rk_q    <= '0;
      rcon_q  <= 8'h01;
      round_q <= '0;
      busy    <= 1'b0;
      done    <= 1'b0;
    end else begin
      done <= 1'b0;
      if (!busy) begin
        if (start) begin
          state_q <= pt ^ key;
          rk_q    <= key;
          rcon_q  <= 8'h01;
          round_q <= 4'd1;
          busy    <= 1'b1;
        end
      end else begin
        state_q <= st_next;
        rk_q    <= rk_next;
        rcon_q  <= xtime(rcon_q);
        if (round_q == 4'd10) begin
          busy <= 1'b0;
          done <= 1'b1;
        end else begin
          round_q <= round_q + 4'd1;
        end
      end
    end
  end

  assign ct = state_q;

endmodule

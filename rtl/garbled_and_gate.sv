// garbled_and_gate: garbles one AND gate with one AES-128 core.
//
// The overlay garbles with free-XOR (the two labels of a wire differ by the
// global offset `delta`, whose bit 0 is 1), point-and-permute (bit 0 of a label
// is its colour) and row reduction (the table row for colours (0,0) is not
// stored, so three ciphertexts remain). These three techniques are the
// published design's; the hash and the row order are this design's choice:
//   H(X, Y, T) = AES_key(K) ^ K,   K = rotl(X,1) ^ rotl(Y,2) ^ T,
// with T a per-gate tweak. For colour pair (i,j), r = {i,j} = 0..3, the input
// labels are A = a0 ^ ((i^pa)*delta), B = b0 ^ ((j^pb)*delta), pa = a0[0],
// pb = b0[0]. Row 0 defines the output: c0 = H00 ^ ((pa&pb)*delta). Rows 1..3
// give ct[r-1] = Hr ^ c0 ^ (((i^pa)&(j^pb))*delta). An evaluator holding labels
// of colours (i,j) recovers the output label as H(A,B,T) ^ ct[r-1] (or H alone
// for r = 0).
//
// Interface: `start` (accepted while `busy` is low) samples a0, b0, delta,
// tweak and key. The four hashes run one after the other; `done` pulses one
// cycle with c0 and ct valid, 49 cycles after start (one cycle to
// sample, then 12 per hash). Outputs hold until the
// next start.
module garbled_and_gate
  import gc_pkg::*;
(
  input  logic   clk,
  input  logic   rst_n,
  input  logic   start,
  input  label_t a0,
  input  label_t b0,
  input  label_t delta,
  input  label_t tweak,
  input  label_t key,
  output logic   busy,
  output logic   done,
  output label_t c0,
  output label_t ct [3]
);

  typedef enum logic [1:0] {G_IDLE, G_ISSUE, G_WAIT} gstate_e;
  gstate_e state_q;

  label_t a_q, b_q, d_q, t_q, key_q, k_q;
  logic [1:0] row_q;
  logic pa, pb, ci, cj, va, vb;
  label_t x_lbl, y_lbl, k_row, h;
  logic aes_start, aes_busy, aes_done;
  label_t aes_ct;

  always_comb begin
    pa    = a_q[0];
    pb    = b_q[0];
    ci    = row_q[1];
    cj    = row_q[0];
    va    = ci ^ pa;
    vb    = cj ^ pb;
    x_lbl = va ? (a_q ^ d_q) : a_q;
    y_lbl = vb ? (b_q ^ d_q) : b_q;
    k_row = {x_lbl[126:0], x_lbl[127]} ^ {y_lbl[125:0], y_lbl[127:126]} ^ t_q;
    h     = aes_ct ^ k_q;
  end

  assign aes_start = (state_q == G_ISSUE);

  aes128_core u_aes (
    .clk, .rst_n,
    .start (aes_start),
    .key   (key_q),
    .pt    (k_row),
    .busy  (aes_busy),
    .done  (aes_done),
    .ct    (aes_ct)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q <= G_IDLE;
      row_q   <= '0;
      done    <= 1'b0;
      a_q <= '0; b_q <= '0; d_q <= '0; t_q <= '0; key_q <= '0; k_q <= '0;
      c0  <= '0;
      for (int r = 0; r < 3; r++) ct[r] <= '0;
    end else begin
      done <= 1'b0;
      unique case (state_q)
        G_IDLE: if (start) begin
          a_q   <= a0;
          b_q   <= b0;
          d_q   <= delta;
          t_q   <= tweak;
          key_q <= key;
          row_q <= 2'd0;
          state_q <= G_ISSUE;
        end
        G_ISSUE: begin
          k_q     <= k_row;
          state_q <= G_WAIT;
        end
        G_WAIT: if (aes_done) begin
          if (row_q == 2'd0) begin
            c0 <= (pa & pb) ? (h ^ d_q) : h;
          end else begin
            ct[row_q - 2'd1] <= h ^ c0 ^ ((va & vb) ? d_q : '0);
          end
          if (row_q == 2'd3) begin
            state_q <= G_IDLE;
            done    <= 1'b1;
          end else begin
            row_q   <= row_q + 2'd1;
            state_q <= G_ISSUE;
          end
        end
        default: state_q <= G_IDLE;
      endcase
    end
  end

  assign busy = (state_q != G_IDLE);

  // The AES core is idle whenever a new hash is issued.
  assert property (@(posedge clk) disable iff (!rst_n) aes_start |-> !aes_busy);

endmodule

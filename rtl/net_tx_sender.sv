// net_tx_sender: the network state machine that hands labels to the UDP stack.
//
// The batch engine pushes either a handshake (HELLO) or a 128-bit label (DATA)
// into a small FIFO as soon as the label is produced; each entry leaves as one
// packet addressed to `dest_id`. After every packet the sender waits `gap`
// cycles before offering the next one, which is the kernel's
// time_between_packets_to_send argument. One label per packet and the
// destination and gap arguments follow the published design; the FIFO, its depth and
// the packet fields are this design's choices.
//
// Push side: push_valid/push_ready handshake (ready while the FIFO has room).
// Packet side: tx_valid/tx_ready handshake, packet stable while tx_valid is
// high. `throttled` is high in cycles where a packet waits only for the gap.
module net_tx_sender
  import gc_pkg::*;
#(
  parameter int FIFO_DEPTH = 16,
  parameter int GAP_W      = 16
) (
  input  logic             clk,
  input  logic             rst_n,
  input  node_id_t         src_id,
  input  node_id_t         dest_id,
  input  logic [GAP_W-1:0] gap,
  input  logic             push_valid,
  input  pkt_kind_e        push_kind,
  input  label_t           push_data,
  output logic             push_ready,
  output logic             tx_valid,
  output net_pkt_t         tx_pkt,
  input  logic             tx_ready,
  output logic             throttled,
  output logic [31:0]      sent_count
);

  localparam int PW = (FIFO_DEPTH > 1) ? $clog2(FIFO_DEPTH) : 1;

  typedef struct packed {
    pkt_kind_e kind;
    label_t    data;
  } entry_t;

  entry_t           fifo [FIFO_DEPTH];
  logic [PW-1:0]    rd_ptr, wr_ptr;
  logic [PW:0]      used;
  logic [GAP_W-1:0] gap_cnt;
  logic             do_push, do_pop;

  assign push_ready = (32'(used) < FIFO_DEPTH);
  assign do_push    = push_valid && push_ready;
  assign tx_valid   = (used != 0) && (gap_cnt == 0);
  assign do_pop     = tx_valid && tx_ready;
  assign throttled  = (used != 0) && (gap_cnt != 0);

  always_comb begin
    tx_pkt.dest = dest_id;
    tx_pkt.src  = src_id;
    tx_pkt.kind = fifo[rd_ptr].kind;
    tx_pkt.data = fifo[rd_ptr].data;
  end

  always_ff @(posedge clk) begin
    if (do_push) fifo[wr_ptr] <= '{kind: push_kind, data: push_data};
  end

  function automatic logic [PW-1:0] inc(input logic [PW-1:0] p);
    return (32'(p) == FIFO_DEPTH - 1) ? '0 : p + 1'b1;
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rd_ptr     <= '0;
      wr_ptr     <= '0;
      used       <= '0;
      gap_cnt    <= '0;
      sent_count <= '0;
    end else begin
      if (do_push) wr_ptr <= inc(wr_ptr);
      if (do_pop)  rd_ptr <= inc(rd_ptr);
      used <= used + (PW+1)'(do_push) - (PW+1)'(do_pop);
      if (do_pop) begin
        gap_cnt    <= gap;
        sent_count <= sent_count + 32'd1;
      end else if (gap_cnt != 0) begin
        gap_cnt <= gap_cnt - 1'b1;
      end
    end
  end

  // A packet offered to the stack stays until it is taken.
  assert property (@(posedge clk) disable iff (!rst_n)
                   tx_valid && !tx_ready |=> tx_valid && $stable(tx_pkt));

endmodule

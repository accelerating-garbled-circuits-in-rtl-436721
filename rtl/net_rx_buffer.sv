// net_rx_buffer: the separate network BRAM that holds labels received from the
// peer FPGA.
//
// Packets arrive in the order the peer sent them, so no address travels with
// the data: the k-th DATA packet received is stored at address k (a write
// pointer counts arrivals), and the preprocessing gives every remote label
// its arrival index as its network address. `count` is the number of labels
// received so far; a label at address a may be read once a < count (the
// router stalls until then). A HELLO packet sets the sticky `peer_hello` flag
// used by the start-up handshake. DATA packets arriving when the buffer is
// full are dropped and set the sticky `overflow` flag. The buffer always
// accepts packets (`rx_ready` is 1). Reads return `rdata` with `rvalid` one
// cycle after `re`. Pointer and flags clear only on reset. The arrival-order
// addressing follows the published design; the handshake flag, overflow flag and
// one-cycle read latency are this design's choices.
module net_rx_buffer
  import gc_pkg::*;
#(
  parameter int DEPTH = 1024,
  parameter int AW    = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic          clk,
  input  logic          rst_n,
  // from the UDP stack
  input  logic          rx_valid,
  input  net_pkt_t      rx_pkt,
  output logic          rx_ready,
  // read port
  input  logic          re,
  input  logic [AW-1:0] raddr,
  output logic          rvalid,
  output label_t        rdata,
  // status
  output logic [AW:0]   count,
  output logic          peer_hello,
  output logic          overflow
);

  label_t mem [DEPTH];
  logic   wr_data;

  assign rx_ready = 1'b1;
  assign wr_data  = rx_valid && (rx_pkt.kind == PKT_DATA) && (32'(count) < DEPTH);

  always_ff @(posedge clk) begin
    if (wr_data) mem[count[AW-1:0]] <= rx_pkt.data;
    if (re)      rdata <= mem[raddr];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      count      <= '0;
      peer_hello <= 1'b0;
      overflow   <= 1'b0;
      rvalid     <= 1'b0;
    end else begin
      rvalid <= re;
      if (wr_data) count <= count + 1'b1;
      if (rx_valid && rx_pkt.kind == PKT_HELLO) peer_hello <= 1'b1;
      if (rx_valid && rx_pkt.kind == PKT_DATA && 32'(count) >= DEPTH) overflow <= 1'b1;
    end
  end

  // Only labels that have arrived may be read.
  assert property (@(posedge clk) disable iff (!rst_n) re |-> ({1'b0, raddr} < count));

endmodule

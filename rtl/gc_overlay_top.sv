// gc_overlay_top: one FPGA's garbled-circuit overlay kernel.
//
// The overlay garbles any Boolean circuit that has been preprocessed into
// batches of independent gates: the batch engine fetches 16-gate batches from
// HBM, feeds 8 garbled AND gates (each with its own AES-128 core) and 8
// free-XOR gates, and keeps wire labels in the memory chosen by preprocessing:
// on-chip BRAM, on-chip URAM or off-chip HBM. For a circuit split over two
// FPGAs, labels needed by the other FPGA leave through the network sender, one
// 128-bit label per UDP packet, and labels from the other FPGA land, in arrival
// order, in a separate network BRAM from which gates read them (waiting if
// they have not arrived yet).
//
// Ports: the kernel arguments the host sets before `start` (mode, node and
// destination id, packet gap, netlist base, batch count, garbled-table base,
// global offset delta, AES key); status (busy, done, cycle count, gate counts,
// network counters: packets sent, labels received, cycles spent waiting
// for peer labels and for the packet gap); one HBM request/response port (128-bit words); and the
// transmit and receive packet streams of the UDP stack. HBM, the UDP stack and
// the host are outside this module.
//
// Default sizes: BRAM 50,000 labels (the "50k BRAM" configuration with the
// highest clock), URAM 6,400 labels (100 KB), BRAM read latency 4 and URAM 8
// cycles (within the 4-5 and 8-10 cycle ranges stated for the target). The
// network BRAM depth (1024 labels) and the transmit FIFO depth (16) are this
// design's choices.
module gc_overlay_top
  import gc_pkg::*;
#(
  parameter int BRAM_DEPTH    = 50000,
  parameter int BRAM_LATENCY  = 4,
  parameter int URAM_DEPTH    = 6400,
  parameter int URAM_LATENCY  = 8,
  parameter int NET_DEPTH     = 1024,
  parameter int TX_FIFO_DEPTH = 16
) (
  input  logic        clk,
  input  logic        rst_n,
  // kernel arguments
  input  logic        start,
  input  logic        two_fpga,
  input  node_id_t    node_id,
  input  node_id_t    dest_id,
  input  logic [15:0] tx_gap,
  input  addr_t       netlist_base,
  input  logic [31:0] num_batches,
  input  addr_t       gt_base,
  input  label_t      delta,
  input  label_t      aes_key,
  // status
  output logic        busy,
  output logic        done,
  output logic [63:0] cycles,
  output logic [31:0] and_count,
  output logic [31:0] xor_count,
  output logic [31:0] packets_sent,
  output logic [31:0] labels_received,
  output logic [31:0] net_wait_cycles,
  output logic [31:0] tx_gap_cycles,
  output logic        net_overflow,
  // HBM
  output logic        hbm_req_valid,
  output hbm_req_t    hbm_req,
  input  logic        hbm_req_ready,
  input  logic        hbm_rsp_valid,
  input  label_t      hbm_rsp_rdata,
  // UDP stack
  output logic        net_tx_valid,
  output net_pkt_t    net_tx_pkt,
  input  logic        net_tx_ready,
  input  logic        net_rx_valid,
  input  net_pkt_t    net_rx_pkt,
  output logic        net_rx_ready
);

  localparam int BAW = (BRAM_DEPTH > 1) ? $clog2(BRAM_DEPTH) : 1;
  localparam int UAW = (URAM_DEPTH > 1) ? $clog2(URAM_DEPTH) : 1;
  localparam int NAW = (NET_DEPTH  > 1) ? $clog2(NET_DEPTH)  : 1;

  // engine <-> router
  logic     mreq_valid, mreq_ready, mrsp_valid, mrsp_ready;
  mem_req_t mreq;
  label_t   mrsp_rdata;
  // engine <-> network
  logic      push_valid, push_ready, peer_hello, tx_throttled, net_stall;
  pkt_kind_e push_kind;
  label_t    push_data;
  // router <-> memories
  logic           bram_we, bram_re, bram_rvalid, uram_we, uram_re, uram_rvalid;
  logic           net_re, net_rvalid;
  logic [BAW-1:0] bram_waddr, bram_raddr;
  logic [UAW-1:0] uram_waddr, uram_raddr;
  logic [NAW-1:0] net_raddr;
  logic [NAW:0]   net_count;
  label_t         bram_wdata, bram_rdata, uram_wdata, uram_rdata, net_rdata;

  gc_batch_engine u_engine (
    .clk, .rst_n,
    .start, .two_fpga, .node_id, .netlist_base, .num_batches, .gt_base, .delta, .aes_key,
    .busy, .done, .cycles, .and_count, .xor_count,
    .mreq_valid, .mreq, .mreq_ready, .mrsp_valid, .mrsp_rdata, .mrsp_ready,
    .push_valid, .push_kind, .push_data, .push_ready,
    .peer_hello
  );

  wire_mem_router #(.BRAM_AW(BAW), .URAM_AW(UAW), .NET_AW(NAW)) u_router (
    .clk, .rst_n,
    .req_valid (mreq_valid), .req (mreq), .req_ready (mreq_ready),
    .rsp_valid (mrsp_valid), .rsp_rdata (mrsp_rdata), .rsp_ready (mrsp_ready),
    .bram_we, .bram_waddr, .bram_wdata, .bram_re, .bram_raddr, .bram_rvalid, .bram_rdata,
    .uram_we, .uram_waddr, .uram_wdata, .uram_re, .uram_raddr, .uram_rvalid, .uram_rdata,
    .net_re, .net_raddr, .net_rvalid, .net_rdata, .net_count,
    .hbm_req_valid, .hbm_req, .hbm_req_ready, .hbm_rsp_valid, .hbm_rsp_rdata,
    .net_stall
  );

  wire_ram #(.DEPTH(BRAM_DEPTH), .LATENCY(BRAM_LATENCY)) u_bram (
    .clk, .rst_n,
    .we (bram_we), .waddr (bram_waddr), .wdata (bram_wdata),
    .re (bram_re), .raddr (bram_raddr), .rvalid (bram_rvalid), .rdata (bram_rdata)
  );

  wire_ram #(.DEPTH(URAM_DEPTH), .LATENCY(URAM_LATENCY)) u_uram (
    .clk, .rst_n,
    .we (uram_we), .waddr (uram_waddr), .wdata (uram_wdata),
    .re (uram_re), .raddr (uram_raddr), .rvalid (uram_rvalid), .rdata (uram_rdata)
  );

  net_rx_buffer #(.DEPTH(NET_DEPTH)) u_net_rx (
    .clk, .rst_n,
    .rx_valid (net_rx_valid), .rx_pkt (net_rx_pkt), .rx_ready (net_rx_ready),
    .re (net_re), .raddr (net_raddr), .rvalid (net_rvalid), .rdata (net_rdata),
    .count (net_count), .peer_hello, .overflow (net_overflow)
  );

  net_tx_sender #(.FIFO_DEPTH(TX_FIFO_DEPTH)) u_net_tx (
    .clk, .rst_n,
    .src_id (node_id), .dest_id, .gap (tx_gap),
    .push_valid, .push_kind, .push_data, .push_ready,
    .tx_valid (net_tx_valid), .tx_pkt (net_tx_pkt), .tx_ready (net_tx_ready),
    .throttled (tx_throttled), .sent_count (packets_sent)
  );

  assign labels_received = 32'(net_count);

  // Cycles in which a gate input waited for a label from the peer FPGA.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)         net_wait_cycles <= '0;
    else if (start && !busy) net_wait_cycles <= '0;
    else if (net_stall) net_wait_cycles <= net_wait_cycles + 32'd1;
  end

  // Cycles in which a queued packet waited for the inter-packet gap.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)            tx_gap_cycles <= '0;
    else if (start && !busy) tx_gap_cycles <= '0;
    else if (tx_throttled) tx_gap_cycles <= tx_gap_cycles + 32'd1;
  end

endmodule

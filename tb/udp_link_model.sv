// udp_link_model: behavioural model of one direction of the network path
// (UDP stack, 100 GbE switch, UDP stack) between two FPGAs, for simulation.
// Packets are taken with a valid/ready handshake (ready drops at random),
// delivered in order LATENCY cycles later, and must carry the receiver's id
// as destination.
module udp_link_model
  import gc_pkg::*;
#(
  parameter int       LATENCY  = 30,
  parameter node_id_t RX_ID    = '0
) (
  input  logic     clk,
  input  logic     rst_n,
  input  logic     in_valid,
  input  net_pkt_t in_pkt,
  output logic     in_ready,
  output logic     out_valid,
  output net_pkt_t out_pkt,
  input  logic     out_ready
);

  net_pkt_t q [$];
  int       due [$];
  int       cyc = 0;
  int       n_pkts = 0, bad_dest = 0;

  always @(negedge clk) in_ready <= ($urandom % 3) != 0;

  assign out_valid = (q.size() != 0) && (due[0] <= cyc);
  assign out_pkt   = (q.size() != 0) ? q[0] : '0;

  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (rst_n) begin
      if (out_valid && out_ready) begin
        void'(q.pop_front());
        void'(due.pop_front());
      end
      if (in_valid && in_ready) begin
        if (in_pkt.dest != RX_ID) bad_dest++;
        q.push_back(in_pkt);
        due.push_back(cyc + LATENCY);
        n_pkts++;
      end
    end else begin
      q.delete();
      due.delete();
    end
  end

  initial in_ready = 1'b0;

endmodule

// wire_mem_router: steers label reads and writes to the memory named by the
// address's 2-bit type prefix: 00 HBM (off-chip), 01 BRAM, 10 URAM, 11 network
// BRAM (labels received from the peer FPGA).
//
// Memory throughput limits the overlay, so the router keeps up to MAX_OUT
// requests in flight: a request is issued to its memory in the cycle it is
// accepted (req_valid && req_ready), and the next one can follow in the next
// cycle. Every request, read or write, is answered exactly once: `rsp_valid`
// (with `rsp_rdata` for reads) is held until the requester takes the answer
// with `rsp_ready`. Answers come back in request order even though the
// memories have different latencies: a small FIFO records the memory of each
// request in flight, and each memory's read data waits in its own FIFO until
// it is the oldest answer. Addresses and write data go to the memories
// combinationally (the memories register them), so those outputs are plain
// slices of `req`; only the enables and the HBM valid are decoded. On-chip
// writes are answered one cycle after acceptance at the earliest; HBM requests
// are answered by the HBM port's response.
// A network-BRAM read whose label has not yet arrived (address >= count) is
// not accepted and raises `net_stall` for each waiting cycle; this is how a
// gate on one FPGA waits for data computed on the other. Writes to the network
// BRAM are not allowed (it is written only by the receiver) and are answered
// without effect. The type encoding comes from the published design; the
// handshake, the in-order answers and MAX_OUT are this design's choices.
module wire_mem_router
  import gc_pkg::*;
#(
  parameter int BRAM_AW = 16,
  parameter int URAM_AW = 13,
  parameter int NET_AW  = 10,
  parameter int MAX_OUT = 8
) (
  input  logic               clk,
  input  logic               rst_n,
  // engine side
  input  logic               req_valid,
  input  mem_req_t           req,
  output logic               req_ready,
  output logic               rsp_valid,
  output label_t             rsp_rdata,
  input  logic               rsp_ready,
  // BRAM
  output logic               bram_we,
  output logic [BRAM_AW-1:0] bram_waddr,
  output label_t             bram_wdata,
  output logic               bram_re,
  output logic [BRAM_AW-1:0] bram_raddr,
  input  logic               bram_rvalid,
  input  label_t             bram_rdata,
  // URAM
  output logic               uram_we,
  output logic [URAM_AW-1:0] uram_waddr,
  output label_t             uram_wdata,
  output logic               uram_re,
  output logic [URAM_AW-1:0] uram_raddr,
  input  logic               uram_rvalid,
  input  label_t             uram_rdata,
  // network receive BRAM
  output logic               net_re,
  output logic [NET_AW-1:0]  net_raddr,
  input  logic               net_rvalid,
  input  label_t             net_rdata,
  input  logic [NET_AW:0]    net_count,
  // HBM
  output logic               hbm_req_valid,
  output hbm_req_t           hbm_req,
  input  logic               hbm_req_ready,
  input  logic               hbm_rsp_valid,
  input  label_t             hbm_rsp_rdata,
  // status
  output logic               net_stall
);

  localparam int OW = $clog2(MAX_OUT + 1);           // counts 0..MAX_OUT
  localparam int PW = (MAX_OUT > 1) ? $clog2(MAX_OUT) : 1;  // FIFO index

  // Where the answer to a request in flight comes from.
  typedef enum logic [2:0] {SRC_ACK, SRC_BRAM, SRC_URAM, SRC_HBM, SRC_NET} src_e;

  logic    room, net_avail, can_issue, accept;
  src_e    src_new;
  logic [OW-1:0] out_cnt;

  // in-flight order
  src_e          ord_q [MAX_OUT];
  logic [PW-1:0] ord_wr, ord_rd;   // indices modulo MAX_OUT
  // per-memory read data waiting to be answered
  label_t        dq [4][MAX_OUT];  // 0 BRAM, 1 URAM, 2 HBM, 3 NET
  logic [PW-1:0] dq_wr [4], dq_rd [4];
  logic [OW-1:0] dq_cnt [4];
  logic [3:0]    dq_push, dq_pop;
  label_t        dq_in [4];
  src_e          head;
  logic          ack_q;            // an ACK can retire (written a cycle ago)

  function automatic logic [PW-1:0] inc(input logic [PW-1:0] p);
    return (32'(p) == MAX_OUT - 1) ? '0 : p + 1'b1;
  endfunction

  assign room      = (32'(out_cnt) < MAX_OUT);
  assign net_avail = ({{(ADDR_W - NET_AW - 1){1'b0}}, net_count} > req.addr);

  always_comb begin
    unique case (req.mtype)
      MEM_BRAM: src_new = req.we ? SRC_ACK : SRC_BRAM;
      MEM_URAM: src_new = req.we ? SRC_ACK : SRC_URAM;
      MEM_HBM:  src_new = SRC_HBM;
      default:  src_new = req.we ? SRC_ACK : SRC_NET;
    endcase
    unique case (req.mtype)
      MEM_HBM: can_issue = hbm_req_ready;
      MEM_NET: can_issue = req.we || net_avail;
      default: can_issue = 1'b1;
    endcase
  end

  assign req_ready = room && can_issue;
  assign accept    = req_valid && req_ready;
  assign net_stall = req_valid && room && req.mtype == MEM_NET && !req.we && !net_avail;

  // issue to the memories in the cycle of acceptance
  always_comb begin
    bram_we    = accept && req.mtype == MEM_BRAM &&  req.we;
    bram_re    = accept && req.mtype == MEM_BRAM && !req.we;
    uram_we    = accept && req.mtype == MEM_URAM &&  req.we;
    uram_re    = accept && req.mtype == MEM_URAM && !req.we;
    net_re     = accept && req.mtype == MEM_NET  && !req.we;
    bram_waddr = req.addr[BRAM_AW-1:0];
    bram_raddr = req.addr[BRAM_AW-1:0];
    bram_wdata = req.wdata;
    uram_waddr = req.addr[URAM_AW-1:0];
    uram_raddr = req.addr[URAM_AW-1:0];
    uram_wdata = req.wdata;
    net_raddr  = req.addr[NET_AW-1:0];
    hbm_req_valid = req_valid && room && req.mtype == MEM_HBM;
    hbm_req    = '{we: req.we, addr: req.addr, wdata: req.wdata};
  end

  // collect read data per memory
  always_comb begin
    dq_push = {net_rvalid, hbm_rsp_valid, uram_rvalid, bram_rvalid};
    dq_in   = '{bram_rdata, uram_rdata, hbm_rsp_rdata, net_rdata};
  end

  // answer the oldest request when its data is there
  always_comb begin
    head      = ord_q[ord_rd];
    rsp_valid = 1'b0;
    rsp_rdata = '0;
    dq_pop    = '0;
    if (out_cnt != 0) begin
      if (head == SRC_ACK) begin
        rsp_valid = ack_q;
      end else begin
        for (int s = 0; s < 4; s++)
          if (32'(head) == s + 1 && dq_cnt[s] != 0) begin
            rsp_valid = 1'b1;
            rsp_rdata = dq[s][dq_rd[s]];
            dq_pop[s] = rsp_ready;
          end
      end
    end
  end

  always_ff @(posedge clk) begin
    if (accept) ord_q[ord_wr] <= src_new;
    for (int s = 0; s < 4; s++)
      if (dq_push[s]) dq[s][dq_wr[s]] <= dq_in[s];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ord_wr  <= '0;
      ord_rd  <= '0;
      out_cnt <= '0;
      ack_q   <= 1'b0;
      for (int s = 0; s < 4; s++) begin
        dq_wr[s]  <= '0;
        dq_rd[s]  <= '0;
        dq_cnt[s] <= '0;
      end
    end else begin
      if (accept)    ord_wr <= inc(ord_wr);
      if (rsp_valid && rsp_ready) ord_rd <= inc(ord_rd);
      out_cnt <= out_cnt + OW'(accept) - OW'(rsp_valid && rsp_ready);
      // an acknowledged write retires no earlier than the cycle after it is issued
      ack_q <= (out_cnt != 0 || accept);
      for (int s = 0; s < 4; s++) begin
        if (dq_push[s]) dq_wr[s] <= inc(dq_wr[s]);
        if (dq_pop[s])  dq_rd[s] <= inc(dq_rd[s]);
        dq_cnt[s] <= dq_cnt[s] + OW'(dq_push[s]) - OW'(dq_pop[s]);
      end
    end
  end

  assert property (@(posedge clk) disable iff (!rst_n)
                   accept |-> !(req.mtype == MEM_NET && req.we))
    else $error("write to the network receive BRAM");
  // every memory answer belongs to a request in flight, so no FIFO overflows
  for (genvar s = 0; s < 4; s++) begin : g_chk
    assert property (@(posedge clk) disable iff (!rst_n) 32'(dq_cnt[s]) <= MAX_OUT);
  end

endmodule

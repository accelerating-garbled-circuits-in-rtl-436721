// hbm_model: behavioural model of one off-chip HBM channel for simulation.
//
// Word-addressed (128-bit words), DEPTH words. Requests are accepted with a
// valid/ready handshake (ready drops at random when STALL is set) and each
// request, read or write, is answered in order by one rsp_valid cycle LATENCY
// cycles after acceptance; a read returns the word, a write is performed at
// acceptance. Testbenches load and inspect `mem` directly, as the host would
// over PCIe.
module hbm_model
  import gc_pkg::*;
#(
  parameter int DEPTH   = 65536,
  parameter int LATENCY = 20,
  parameter bit STALL   = 1
) (
  input  logic     clk,
  input  logic     rst_n,
  input  logic     req_valid,
  input  hbm_req_t req,
  output logic     req_ready,
  output logic     rsp_valid,
  output label_t   rsp_rdata
);

  label_t mem [DEPTH];
  label_t q_data [$];
  int     q_due [$];
  int     cyc = 0;
  int     n_reads = 0, n_writes = 0;

  always @(negedge clk) req_ready <= STALL ? (($urandom % 4) != 0) : 1'b1;

  always @(posedge clk) begin
    cyc <= cyc + 1;
    rsp_valid <= 1'b0;
    if (rst_n) begin
      if (req_valid && req_ready) begin
        if (req.addr >= DEPTH) $error("hbm_model: address %0d out of range", req.addr);
        else if (req.we) begin
          mem[req.addr] <= req.wdata;
          n_writes++;
        end else n_reads++;
        q_data.push_back(req.we ? '0 : mem[req.addr]);
        q_due.push_back(cyc + LATENCY);
      end
      if (q_due.size() != 0 && q_due[0] <= cyc) begin
        rsp_valid <= 1'b1;
        rsp_rdata <= q_data.pop_front();
        void'(q_due.pop_front());
      end
    end
  end

  initial begin
    req_ready = 1'b0;
    rsp_valid = 1'b0;
    rsp_rdata = '0;
  end

endmodule

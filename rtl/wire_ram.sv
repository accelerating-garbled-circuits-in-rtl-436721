// wire_ram: on-chip label memory, used for the BRAM and the URAM wire stores.
//
// Simple dual-port RAM of DEPTH 128-bit labels with one write port and one read
// port. A read issued with `re` returns `rdata` with `rvalid` exactly LATENCY
// cycles later; the extra pipeline registers model the 4-5 cycle (BRAM) and
// 8-10 cycle (URAM) read latencies that the target FPGA needs to meet timing
// with cascaded memory blocks. A read and a write to the same address in the
// same cycle return the old contents. Contents are not reset: every label is
// written before it is read.
module wire_ram
  import gc_pkg::*;
#(
  parameter int DEPTH   = 50000,
  parameter int LATENCY = 4,
  parameter int AW      = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          we,
  input  logic [AW-1:0] waddr,
  input  label_t        wdata,
  input  logic          re,
  input  logic [AW-1:0] raddr,
  output logic          rvalid,
  output label_t        rdata
);

  label_t mem [DEPTH];

  label_t     pipe_d [LATENCY];
  logic [LATENCY-1:0] pipe_v;

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
    if (re) pipe_d[0] <= mem[raddr];
    for (int i = 1; i < LATENCY; i++) pipe_d[i] <= pipe_d[i-1];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) pipe_v <= '0;
    else        pipe_v <= {pipe_v[LATENCY-2:0], re};
  end

  assign rvalid = pipe_v[LATENCY-1];
  assign rdata  = pipe_d[LATENCY-1];

  initial assert (LATENCY >= 2) else $error("wire_ram: LATENCY must be at least 2");
  assert property (@(posedge clk) disable iff (!rst_n) we |-> 32'(waddr) < DEPTH);
  assert property (@(posedge clk) disable iff (!rst_n) re |-> 32'(raddr) < DEPTH);

endmodule

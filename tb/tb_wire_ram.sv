// tb_wire_ram: writes random labels, reads them back in random order against a
// shadow copy, checks the read latency (LATENCY cycles) and read-during-write
// behaviour, with back-to-back pipelined reads.
module tb_wire_ram;
  import gc_pkg::*;

  localparam int DEPTH = 300;
  localparam int LAT   = 5;
  localparam int AW    = $clog2(DEPTH);
  logic clk = 0, rst_n = 0;
  logic we, re, rvalid;
  logic [AW-1:0] waddr, raddr;
  label_t wdata, rdata;
  label_t shadow [DEPTH];
  label_t expq [$];
  int     issue_cyc [$];
  int     cyc = 0;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;
  always @(posedge clk) cyc++;

  wire_ram #(.DEPTH(DEPTH), .LATENCY(LAT)) dut (.clk, .rst_n, .we, .waddr, .wdata,
                                                .re, .raddr, .rvalid, .rdata);

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // checker for returned data
  always @(negedge clk) if (rst_n && rvalid) begin
    label_t e;
    int ic;
    checks += 2;
    if (expq.size() == 0) begin failures++; $display("FAIL unexpected rvalid"); end
    else begin
      e = expq.pop_front();
      ic = issue_cyc.pop_front();
      if (rdata !== e) begin failures++; $display("FAIL data %h exp %h", rdata, e); end
      if (cyc - ic != LAT) begin failures++; $display("FAIL latency %0d", cyc - ic); end
    end
  end

  initial begin
    int a;
    we = 0; re = 0; waddr = '0; raddr = '0; wdata = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < DEPTH; i++) begin
      @(negedge clk);
      we = 1; waddr = AW'(i); wdata = {$urandom, $urandom, $urandom, $urandom};
      shadow[i] = wdata;
    end
    @(negedge clk); we = 0;
    for (int n = 0; n < 2000; n++) begin
      @(negedge clk);
      re = ($urandom % 4) != 0;
      a  = $urandom % DEPTH;
      raddr = AW'(a);
      if (re) begin expq.push_back(shadow[a]); issue_cyc.push_back(cyc); end
      we = ($urandom % 3) == 0;
      if (we) begin
        int wa;
        wa = ($urandom % 2) ? a : ($urandom % DEPTH);
        waddr = AW'(wa);
        wdata = {$urandom, $urandom, $urandom, $urandom};
        shadow[wa] = wdata;
      end
    end
    @(negedge clk); re = 0; we = 0;
    repeat (LAT + 3) @(negedge clk);
    checks++;
    if (expq.size() != 0) begin failures++; $display("FAIL %0d reads never returned", expq.size()); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

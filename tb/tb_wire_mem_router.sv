// tb_wire_mem_router: connects the router to a BRAM, a URAM, a network receive
// buffer and an HBM model, then issues random reads and writes of every memory
// type against a shadow copy, first one at a time and then as a back-to-back
// burst with many requests in flight. Network labels are delivered late so
// that reads of not-yet-arrived labels must stall; the test checks read data,
// that every request is answered exactly once and in order (with answers
// sometimes refused by `rsp_ready`), that several
// requests were in flight at once, and that stalls occurred.
module tb_wire_mem_router;
  import gc_pkg::*;

  localparam int BD = 128, UD = 64, ND = 32;
  localparam int BAW = $clog2(BD), UAW = $clog2(UD), NAW = $clog2(ND);
  logic clk = 0, rst_n = 0;

  logic req_valid, req_ready, rsp_valid, rsp_ready;
  mem_req_t req;
  label_t rsp_rdata;
  logic bram_we, bram_re, bram_rvalid, uram_we, uram_re, uram_rvalid;
  logic [BAW-1:0] bram_waddr, bram_raddr;
  logic [UAW-1:0] uram_waddr, uram_raddr;
  label_t bram_wdata, bram_rdata, uram_wdata, uram_rdata, net_rdata, hbm_rsp_rdata;
  logic net_re, net_rvalid, hbm_req_valid, hbm_req_ready, hbm_rsp_valid, net_stall;
  logic [NAW-1:0] net_raddr;
  logic [NAW:0] net_count;
  hbm_req_t hbm_req;
  logic rx_valid, rx_ready, peer_hello, overflow;
  net_pkt_t rx_pkt;
  int checks = 0, failures = 0, stalls = 0;
  bit init_done = 0;
  label_t sh_b [BD], sh_u [UD], sh_n [ND], sh_h [256];

  always #5 clk = ~clk;
  always @(posedge clk) if (net_stall) stalls++;

  wire_mem_router #(.BRAM_AW(BAW), .URAM_AW(UAW), .NET_AW(NAW)) dut (.*);
  wire_ram #(.DEPTH(BD), .LATENCY(4)) u_b (.clk, .rst_n, .we(bram_we), .waddr(bram_waddr),
    .wdata(bram_wdata), .re(bram_re), .raddr(bram_raddr), .rvalid(bram_rvalid), .rdata(bram_rdata));
  wire_ram #(.DEPTH(UD), .LATENCY(8)) u_u (.clk, .rst_n, .we(uram_we), .waddr(uram_waddr),
    .wdata(uram_wdata), .re(uram_re), .raddr(uram_raddr), .rvalid(uram_rvalid), .rdata(uram_rdata));
  net_rx_buffer #(.DEPTH(ND)) u_n (.clk, .rst_n, .rx_valid, .rx_pkt, .rx_ready, .re(net_re),
    .raddr(net_raddr), .rvalid(net_rvalid), .rdata(net_rdata), .count(net_count), .peer_hello,
    .overflow);
  hbm_model #(.DEPTH(256), .LATENCY(6)) u_h (.clk, .rst_n, .req_valid(hbm_req_valid), .req(hbm_req),
    .req_ready(hbm_req_ready), .rsp_valid(hbm_rsp_valid), .rsp_rdata(hbm_rsp_rdata));

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // network labels trickle in slowly
  initial begin
    rx_valid = 0; rx_pkt = '0;
    for (int i = 0; i < ND; i++) sh_n[i] = {$urandom, $urandom, $urandom, $urandom};
    wait (init_done);
    for (int i = 0; i < ND; i++) begin
      repeat (80) @(negedge clk);
      rx_valid = 1; rx_pkt.kind = PKT_DATA; rx_pkt.data = sh_n[i];
      @(negedge clk);
      rx_valid = 0;
    end
  end

  task automatic access(input mem_req_t r, output label_t d);
    int n;
    @(negedge clk);
    req = r; req_valid = 1;
    do @(posedge clk); while (!req_ready);
    @(negedge clk);
    req_valid = 0;
    n = 0;
    while (!rsp_valid) begin @(negedge clk); n++; end
    d = rsp_rdata;
    @(negedge clk);
    checks++;
    if (rsp_valid) begin failures++; $display("FAIL response longer than one cycle"); end
  endtask

  initial begin
    label_t d, e;
    mem_req_t r;
    int nread_net = 0;
    req_valid = 0; req = '0; rsp_ready = 1;
    for (int i = 0; i < 256; i++) begin sh_h[i] = {$urandom, $urandom, $urandom, $urandom}; u_h.mem[i] = sh_h[i]; end
    repeat (3) @(negedge clk);
    rst_n = 1;
    // initialise on-chip memories through the router
    for (int i = 0; i < BD; i++) begin
      sh_b[i] = {$urandom, $urandom, $urandom, $urandom};
      access('{we: 1, mtype: MEM_BRAM, addr: i, wdata: sh_b[i]}, d);
    end
    for (int i = 0; i < UD; i++) begin
      sh_u[i] = {$urandom, $urandom, $urandom, $urandom};
      access('{we: 1, mtype: MEM_URAM, addr: i, wdata: sh_u[i]}, d);
    end
    init_done = 1;
    for (int n = 0; n < 600; n++) begin
      r.mtype = mem_type_e'($urandom % 4);
      r.we    = (r.mtype != MEM_NET) && ($urandom % 3 == 0);
      r.wdata = {$urandom, $urandom, $urandom, $urandom};
      unique case (r.mtype)
        MEM_BRAM: r.addr = $urandom % BD;
        MEM_URAM: r.addr = $urandom % UD;
        MEM_HBM:  r.addr = $urandom % 256;
        MEM_NET:  begin r.addr = (nread_net < ND) ? nread_net : $urandom % ND; nread_net++; end
      endcase
      access(r, d);
      if (r.we) begin
        unique case (r.mtype)
          MEM_BRAM: sh_b[r.addr] = r.wdata;
          MEM_URAM: sh_u[r.addr] = r.wdata;
          MEM_HBM:  sh_h[r.addr] = r.wdata;
          default: ;
        endcase
      end else begin
        unique case (r.mtype)
          MEM_BRAM: e = sh_b[r.addr];
          MEM_URAM: e = sh_u[r.addr];
          MEM_HBM:  e = sh_h[r.addr];
          MEM_NET:  e = sh_n[r.addr];
        endcase
        checks++;
        if (d !== e) begin failures++; $display("FAIL read type %0d addr %0d", r.mtype, r.addr); end
      end
    end
    // burst: requests back to back, answers checked in order by a collector
    begin
      label_t expq [$];
      bit     isrd [$];
      int     inflight = 0, max_inflight = 0, answered = 0;
      localparam int NB = 400;
      @(negedge clk);
      fork
        begin
          for (int n = 0; n < NB; n++) begin
            r.mtype = mem_type_e'($urandom % 4);
            r.we    = (r.mtype != MEM_NET) && ($urandom % 3 == 0);
            r.wdata = {$urandom, $urandom, $urandom, $urandom};
            unique case (r.mtype)
              MEM_BRAM: r.addr = $urandom % BD;
              MEM_URAM: r.addr = $urandom % UD;
              MEM_HBM:  r.addr = $urandom % 256;
              MEM_NET:  r.addr = $urandom % ND;
            endcase
            req = r; req_valid = 1;
            do @(posedge clk); while (!req_ready);
            inflight++;
            if (inflight > max_inflight) max_inflight = inflight;
            if (r.we) begin
              unique case (r.mtype)
                MEM_BRAM: sh_b[r.addr] = r.wdata;
                MEM_URAM: sh_u[r.addr] = r.wdata;
                MEM_HBM:  sh_h[r.addr] = r.wdata;
                default: ;
              endcase
              expq.push_back('0); isrd.push_back(0);
            end else begin
              unique case (r.mtype)
                MEM_BRAM: e = sh_b[r.addr];
                MEM_URAM: e = sh_u[r.addr];
                MEM_HBM:  e = sh_h[r.addr];
                MEM_NET:  e = sh_n[r.addr];
              endcase
              expq.push_back(e); isrd.push_back(1);
            end
            #1 req_valid = ($urandom % 8) != 0;
            if (!req_valid) begin @(negedge clk); end
          end
          req_valid = 0;
        end
        begin
          while (answered < NB) begin
            @(posedge clk);
            if (rsp_valid && rsp_ready) begin
              answered++;
              inflight--;
              checks++;
              if (expq.size() == 0) begin
                failures++; $display("FAIL answer with no request in flight");
              end else begin
                e = expq.pop_front();
                if (isrd.pop_front() && rsp_rdata !== e) begin
                  failures++; $display("FAIL burst read data, answer %0d", answered);
                end
              end
            end
            #1 rsp_ready = ($urandom % 4) != 0;
          end
          rsp_ready = 1;
        end
      join
      $display("most requests in flight %0d", max_inflight);
      checks++;
      if (max_inflight < 4) begin failures++; $display("FAIL requests were not overlapped"); end
      repeat (20) @(posedge clk);
      checks++;
      if (rsp_valid || expq.size() != 0) begin failures++; $display("FAIL answers left over"); end
    end
    checks++;
    if (stalls == 0) begin failures++; $display("FAIL no network stall happened"); end
    $display("stall cycles %0d", stalls);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_gc_overlay_top: end-to-end test of the overlay at its default sizes.
//
// The testbench plays the host and the preprocessing: it generates a random
// layered circuit of AND and XOR gates, splits every layer between two FPGAs
// (a horizontal cut), assigns each intermediate label to BRAM, URAM or HBM,
// marks labels that the other FPGA needs for sending and gives them network
// addresses in arrival order, and writes the 16-descriptor batches and the
// global input labels into each FPGA's HBM. Two overlay instances, each with
// its own HBM model, are joined by two link models. After both finish it
// checks every output label where preprocessing placed it, every garbled
// table row, and the gate counters against a reference garbler; it then
// evaluates the circuit from the tables the hardware wrote, for random
// inputs, and checks the decoded outputs against plain Boolean evaluation.
// A second run uses one FPGA alone (single mode).
//
// Mechanisms counted (each must occur): start-up handshake with a late peer,
// waits for peer labels, inter-packet gap, HBM back-pressure, reads from all
// four memory types, writes to three, empty descriptor slots, all 8 AND gates
// busy at once, single-FPGA mode.
module tb_gc_overlay_top;
  import gc_pkg::*;
  import aes_ref_pkg::*;

  localparam int NIN      = 24;      // global inputs
  localparam int NLAYER   = 14;      // layers = batches per FPGA
  localparam addr_t HBM_WIRES = 32'd4096;
  localparam addr_t NETLIST   = 32'd16384;
  localparam addr_t GTAB      = 32'd32768;
  localparam int BRAM_USE = 200, URAM_USE = 100;   // address ranges used for labels

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  // ------------------------------------------------------------ DUTs
  logic        start [2];
  logic        two_fpga;
  logic [31:0] nbat;
  label_t      delta, key;
  logic        busy [2], done [2];
  logic [63:0] cycles [2];
  logic [31:0] and_cnt [2], xor_cnt [2], pk_sent [2], lbl_rx [2], net_wait [2], gap_cyc [2];
  logic        ovf [2];
  logic        hv [2], hr [2], hrv [2];
  hbm_req_t    hq [2];
  label_t      hd [2];
  logic        txv [2], txr [2], rxv [2], rxr [2];
  net_pkt_t    txp [2], rxp [2];

  gc_overlay_top u0 (
    .clk, .rst_n, .start(start[0]), .two_fpga, .node_id(8'd0), .dest_id(8'd1), .tx_gap(16'd40),
    .netlist_base(NETLIST), .num_batches(nbat), .gt_base(GTAB), .delta, .aes_key(key),
    .busy(busy[0]), .done(done[0]), .cycles(cycles[0]), .and_count(and_cnt[0]),
    .xor_count(xor_cnt[0]), .packets_sent(pk_sent[0]), .labels_received(lbl_rx[0]),
    .net_wait_cycles(net_wait[0]), .tx_gap_cycles(gap_cyc[0]), .net_overflow(ovf[0]),
    .hbm_req_valid(hv[0]), .hbm_req(hq[0]), .hbm_req_ready(hr[0]), .hbm_rsp_valid(hrv[0]),
    .hbm_rsp_rdata(hd[0]), .net_tx_valid(txv[0]), .net_tx_pkt(txp[0]), .net_tx_ready(txr[0]),
    .net_rx_valid(rxv[0]), .net_rx_pkt(rxp[0]), .net_rx_ready(rxr[0]));

  gc_overlay_top u1 (
    .clk, .rst_n, .start(start[1]), .two_fpga, .node_id(8'd1), .dest_id(8'd0), .tx_gap(16'd40),
    .netlist_base(NETLIST), .num_batches(nbat), .gt_base(GTAB), .delta, .aes_key(key),
    .busy(busy[1]), .done(done[1]), .cycles(cycles[1]), .and_count(and_cnt[1]),
    .xor_count(xor_cnt[1]), .packets_sent(pk_sent[1]), .labels_received(lbl_rx[1]),
    .net_wait_cycles(net_wait[1]), .tx_gap_cycles(gap_cyc[1]), .net_overflow(ovf[1]),
    .hbm_req_valid(hv[1]), .hbm_req(hq[1]), .hbm_req_ready(hr[1]), .hbm_rsp_valid(hrv[1]),
    .hbm_rsp_rdata(hd[1]), .net_tx_valid(txv[1]), .net_tx_pkt(txp[1]), .net_tx_ready(txr[1]),
    .net_rx_valid(rxv[1]), .net_rx_pkt(rxp[1]), .net_rx_ready(rxr[1]));

  hbm_model #(.DEPTH(65536), .LATENCY(20)) h0 (.clk, .rst_n, .req_valid(hv[0]), .req(hq[0]),
    .req_ready(hr[0]), .rsp_valid(hrv[0]), .rsp_rdata(hd[0]));
  hbm_model #(.DEPTH(65536), .LATENCY(20)) h1 (.clk, .rst_n, .req_valid(hv[1]), .req(hq[1]),
    .req_ready(hr[1]), .rsp_valid(hrv[1]), .rsp_rdata(hd[1]));

  udp_link_model #(.LATENCY(40), .RX_ID(8'd1)) l01 (.clk, .rst_n, .in_valid(txv[0]), .in_pkt(txp[0]),
    .in_ready(txr[0]), .out_valid(rxv[1]), .out_pkt(rxp[1]), .out_ready(rxr[1]));
  udp_link_model #(.LATENCY(40), .RX_ID(8'd0)) l10 (.clk, .rst_n, .in_valid(txv[1]), .in_pkt(txp[1]),
    .in_ready(txr[1]), .out_valid(rxv[0]), .out_pkt(rxp[0]), .out_ready(rxr[0]));

  // ------------------------------------------------------------ bookkeeping
  int checks = 0, failures = 0;
  int ev_handshake = 0, ev_net_wait = 0, ev_gap = 0, ev_hbm_bp = 0, ev_empty = 0;
  int ev_all8 = 0, ev_single = 0;
  int ev_rd [4], ev_wr [4];

  task automatic check(input bit cond, input string msg);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 20) $display("FAIL %s", msg);
    end
  endtask

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (rst_n) begin
    if (u0.mreq_valid && u0.mreq_ready) begin
      if (u0.mreq.we) ev_wr[u0.mreq.mtype]++; else ev_rd[u0.mreq.mtype]++;
    end
    if (u1.mreq_valid && u1.mreq_ready) begin
      if (u1.mreq.we) ev_wr[u1.mreq.mtype]++; else ev_rd[u1.mreq.mtype]++;
    end
    if ((hv[0] && !hr[0]) || (hv[1] && !hr[1])) ev_hbm_bp++;
    if (&u0.u_engine.and_busy || &u1.u_engine.and_busy) ev_all8++;
  end

  // ------------------------------------------------------------ circuit model
  typedef struct {
    label_t    l0;       // zero label (reference)
    int        owner;    // -1: global input
    mem_type_e mtype;    // location on the owner
    int        addr;
    bit        send;
    int        netaddr;  // address in the other FPGA's network BRAM
    bit        value;    // plain value in the evaluation pass
    label_t    elbl;     // evaluator's label in the evaluation pass
  } wire_t;

  typedef struct {
    int     fpga, layer, unit, in0, in1, out;
    bit     is_and;
    label_t ct [3];
  } gate_t;

  wire_t  W [$];
  gate_t  G [$];
  int     next_addr [2][4];
  int     send_ctr [2];

  function automatic label_t rnd128();
    return {$urandom, $urandom, $urandom, $urandom};
  endfunction

  function automatic label_t tweak_of(int node, int batch, int unit);
    return label_t'({8'(node), 32'(batch), 5'd0, 3'(unit)});
  endfunction

  // where FPGA p finds wire w
  function automatic void loc(int p, int w, output mem_type_e t, output int a);
    if (W[w].owner < 0)       begin t = MEM_HBM; a = w; end
    else if (W[w].owner == p) begin t = W[w].mtype; a = W[w].addr; end
    else                      begin t = MEM_NET; a = W[w].netaddr; end
  endfunction

  task automatic build(input int nf);
    label_t d;
    W.delete(); G.delete();
    for (int p = 0; p < 2; p++) begin
      next_addr[p][MEM_HBM] = HBM_WIRES; next_addr[p][MEM_BRAM] = 0; next_addr[p][MEM_URAM] = 0;
      send_ctr[p] = 0;
    end
    d = {delta[127:1], 1'b1};
    for (int i = 0; i < NIN; i++) begin
      wire_t w;
      w = '{l0: rnd128(), owner: -1, mtype: MEM_HBM, addr: i, send: 0, netaddr: 0, value: 0, elbl: '0};
      W.push_back(w);
    end
    for (int L = 0; L < NLAYER; L++) begin
      int nw;
      nw = W.size();   // gates of this layer use only wires from earlier layers
      for (int p = 0; p < nf; p++) begin
        int units_a [8], units_x [8], na, nx;
        for (int u = 0; u < 8; u++) begin units_a[u] = u; units_x[u] = u; end
        units_a.shuffle(); units_x.shuffle();
        na = (L % 3 == 1) ? 8 : $urandom % 8;
        nx = (L % 4 == 2) ? 8 : $urandom % 8;
        for (int k = 0; k < na + nx; k++) begin
          gate_t g;
          wire_t w;
          garbled_t gr;
          int r;
          g.fpga = p; g.layer = L; g.is_and = (k < na);
          g.unit = g.is_and ? units_a[k] : units_x[k - na];
          g.in0 = (L > 0 && $urandom % 3 != 0) ? nw - 1 - ($urandom % (nw - NIN > 30 ? 30 : nw - NIN)) : $urandom % nw;
          g.in1 = $urandom % nw;
          if (g.in1 == g.in0) g.in1 = (g.in0 + 1) % nw;
          r = $urandom % 3;
          w.owner = p;
          w.mtype = (r == 0) ? MEM_BRAM : (r == 1) ? MEM_URAM : MEM_HBM;
          w.addr  = next_addr[p][w.mtype]++;
          if (w.mtype == MEM_BRAM && w.addr >= BRAM_USE) begin w.mtype = MEM_HBM; w.addr = next_addr[p][MEM_HBM]++; end
          if (w.mtype == MEM_URAM && w.addr >= URAM_USE) begin w.mtype = MEM_HBM; w.addr = next_addr[p][MEM_HBM]++; end
          w.send = 0; w.netaddr = 0; w.value = 0; w.elbl = '0;
          if (g.is_and) begin
            gr = garble_and(key, W[g.in0].l0, W[g.in1].l0, d, tweak_of(p, L, g.unit));
            w.l0 = gr.c0;
            g.ct = gr.ct;
          end else begin
            w.l0 = W[g.in0].l0 ^ W[g.in1].l0;
            g.ct = '{default: '0};
          end
          g.out = W.size();
          W.push_back(w);
          G.push_back(g);
        end
      end
    end
    // labels crossing the cut are sent by their owner
    foreach (G[i]) begin
      if (W[G[i].in0].owner >= 0 && W[G[i].in0].owner != G[i].fpga) W[G[i].in0].send = 1;
      if (W[G[i].in1].owner >= 0 && W[G[i].in1].owner != G[i].fpga) W[G[i].in1].send = 1;
    end
    // network addresses in the order the owner sends: batch, then AND units, then XOR units
    for (int p = 0; p < nf; p++)
      for (int L = 0; L < NLAYER; L++)
        for (int e = 0; e < 16; e++)
          foreach (G[i])
            if (G[i].fpga == p && G[i].layer == L && G[i].is_and == (e < 8) && G[i].unit == e % 8
                && W[G[i].out].send)
              W[G[i].out].netaddr = send_ctr[p]++;
  endtask

  task automatic load_hbm(input int p);
    int slot_a, slot_x;
    gate_desc_t dsc;
    mem_type_e t0, t1;
    int a0, a1;
    for (int i = 0; i < NIN; i++)
      if (p == 0) h0.mem[i] = W[i].l0; else h1.mem[i] = W[i].l0;
    for (int L = 0; L < NLAYER; L++) begin
      label_t words [16];
      int perm_a [8], perm_x [8];
      for (int s = 0; s < 16; s++) begin
        words[s] = rnd128();
        words[s][3] = 1'b0;        // empty slot (other fields are don't-care)
      end
      for (int s = 0; s < 8; s++) begin perm_a[s] = s; perm_x[s] = 8 + s; end
      perm_a.shuffle(); perm_x.shuffle();
      slot_a = 0; slot_x = 0;
      foreach (G[i]) if (G[i].fpga == p && G[i].layer == L) begin
        loc(p, G[i].in0, t0, a0);
        loc(p, G[i].in1, t1, a1);
        dsc = '0;
        dsc.in0_addr = addr_t'(a0);
        dsc.in1_addr = addr_t'(a1);
        dsc.out_addr = addr_t'(W[G[i].out].addr);
        dsc.ctrl.in0_type = t0;
        dsc.ctrl.in1_type = t1;
        dsc.ctrl.out_type = W[G[i].out].mtype;
        dsc.ctrl.send  = W[G[i].out].send;
        dsc.ctrl.valid = 1'b1;
        dsc.ctrl.unit  = 3'(G[i].unit);
        if (G[i].is_and) words[perm_a[slot_a++]] = label_t'(dsc);
        else             words[perm_x[slot_x++]] = label_t'(dsc);
      end
      for (int s = 0; s < 16; s++) begin
        if (!words[s][3]) ev_empty++;
        if (p == 0) h0.mem[NETLIST + 16*L + s] = words[s]; else h1.mem[NETLIST + 16*L + s] = words[s];
      end
    end
  endtask

  function automatic label_t rd_loc(int p, mem_type_e t, int a);
    unique case (t)
      MEM_BRAM: return (p == 0) ? u0.u_bram.mem[a] : u1.u_bram.mem[a];
      MEM_URAM: return (p == 0) ? u0.u_uram.mem[a] : u1.u_uram.mem[a];
      default:  return (p == 0) ? h0.mem[a] : h1.mem[a];
    endcase
  endfunction

  task automatic check_results(input int nf);
    label_t d, tab [3], ge;
    int gtp [2], na [2], nx [2];
    d = {delta[127:1], 1'b1};
    gtp[0] = GTAB; gtp[1] = GTAB; na = '{0, 0}; nx = '{0, 0};
    // output labels where the preprocessing put them
    foreach (G[i]) begin
      check(rd_loc(G[i].fpga, W[G[i].out].mtype, W[G[i].out].addr) === W[G[i].out].l0,
            $sformatf("label of gate %0d (fpga %0d layer %0d)", i, G[i].fpga, G[i].layer));
      if (G[i].is_and) na[G[i].fpga]++; else nx[G[i].fpga]++;
    end
    for (int p = 0; p < nf; p++) begin
      check(and_cnt[p] == na[p] && xor_cnt[p] == nx[p], $sformatf("gate counts fpga %0d", p));
      check(!ovf[p], "network BRAM overflow");
      check(cycles[p] > 0, "cycle count");
    end
    // garbled tables in batch / unit order
    for (int p = 0; p < nf; p++)
      for (int L = 0; L < NLAYER; L++)
        for (int u = 0; u < 8; u++)
          foreach (G[i])
            if (G[i].fpga == p && G[i].layer == L && G[i].is_and && G[i].unit == u) begin
              for (int r = 0; r < 3; r++) begin
                G[i].ct[r] = G[i].ct[r];
                check(rd_loc(p, MEM_HBM, gtp[p] + r) === G[i].ct[r],
                      $sformatf("table row %0d of gate %0d", r, i));
              end
              gtp[p] += 3;
            end
    // evaluate from the hardware's tables for random inputs
    for (int trial = 0; trial < 4; trial++) begin
      for (int i = 0; i < NIN; i++) begin
        W[i].value = 1'($urandom);
        W[i].elbl  = W[i].value ? W[i].l0 ^ d : W[i].l0;
      end
      gtp[0] = GTAB; gtp[1] = GTAB;
      for (int L = 0; L < NLAYER; L++)
        for (int p = 0; p < nf; p++)
          for (int e = 0; e < 16; e++)
            foreach (G[i])
              if (G[i].fpga == p && G[i].layer == L && G[i].is_and == (e < 8) && G[i].unit == e % 8) begin
                if (G[i].is_and) begin
                  for (int r = 0; r < 3; r++) tab[r] = rd_loc(p, MEM_HBM, gtp[p] + r);
                  gtp[p] += 3;
                  W[G[i].out].value = W[G[i].in0].value & W[G[i].in1].value;
                  W[G[i].out].elbl  = eval_and(key, W[G[i].in0].elbl, W[G[i].in1].elbl,
                                               tweak_of(p, L, G[i].unit), tab);
                end else begin
                  W[G[i].out].value = W[G[i].in0].value ^ W[G[i].in1].value;
                  W[G[i].out].elbl  = W[G[i].in0].elbl ^ W[G[i].in1].elbl;
                end
              end
      foreach (G[i]) begin
        ge = rd_loc(G[i].fpga, W[G[i].out].mtype, W[G[i].out].addr);
        check(W[G[i].out].elbl === (W[G[i].out].value ? ge ^ d : ge),
              $sformatf("evaluated label of gate %0d, trial %0d", i, trial));
      end
    end
  endtask

  task automatic do_reset();
    rst_n = 0;
    repeat (5) @(negedge clk);
    rst_n = 1;
    repeat (2) @(negedge clk);
  endtask

  // ------------------------------------------------------------ runs
  initial begin
    int t_start, t_end;
    for (int i = 0; i < 4; i++) begin ev_rd[i] = 0; ev_wr[i] = 0; end
    start[0] = 0; start[1] = 0; two_fpga = 1; nbat = NLAYER;
    key = rnd128(); delta = rnd128();
    do_reset();

    // ---- two FPGAs
    build(2);
    load_hbm(0);
    load_hbm(1);
    @(negedge clk) start[0] = 1;
    @(negedge clk) start[0] = 0;
    repeat (200) @(negedge clk);          // the peer starts late
    check(u0.u_engine.state_q == u0.u_engine.E_WAIT_PEER, "FPGA0 waits for the peer's handshake");
    start[1] = 1;
    @(negedge clk) start[1] = 0;
    t_start = $time;
    while (!(done[0] && done[1])) @(negedge clk);
    t_end = $time;
    if (u0.peer_hello && u1.peer_hello) ev_handshake++;
    ev_net_wait = net_wait[0] + net_wait[1];
    ev_gap      = gap_cyc[0] + gap_cyc[1];
    check(l01.bad_dest == 0 && l10.bad_dest == 0, "packet destinations");
    check(pk_sent[0] == send_ctr[0] + 1 && pk_sent[1] == send_ctr[1] + 1, "packets sent");
    check(lbl_rx[1] == send_ctr[0] && lbl_rx[0] == send_ctr[1], "labels received");
    check_results(2);
    $display("two FPGAs: %0d gates, cycles fpga0=%0d fpga1=%0d, labels sent %0d/%0d, wait cycles %0d",
             G.size(), cycles[0], cycles[1], send_ctr[0], send_ctr[1], ev_net_wait);

    // ---- one FPGA
    do_reset();
    two_fpga = 0;
    build(1);
    load_hbm(0);
    @(negedge clk) start[0] = 1;
    @(negedge clk) start[0] = 0;
    while (!done[0]) @(negedge clk);
    check(pk_sent[0] == 0, "no packets in single mode");
    check_results(1);
    ev_single++;
    $display("one FPGA: %0d gates, cycles %0d", G.size(), cycles[0]);

    // ---- every mechanism must have happened
    $display("events: handshake=%0d net_wait=%0d gap=%0d hbm_backpressure=%0d empty_slots=%0d all8=%0d single=%0d",
             ev_handshake, ev_net_wait, ev_gap, ev_hbm_bp, ev_empty, ev_all8, ev_single);
    $display("reads HBM/BRAM/URAM/NET = %0d/%0d/%0d/%0d, writes HBM/BRAM/URAM = %0d/%0d/%0d",
             ev_rd[0], ev_rd[1], ev_rd[2], ev_rd[3], ev_wr[0], ev_wr[1], ev_wr[2]);
    check(ev_handshake > 0, "handshake happened");
    check(ev_net_wait > 0, "a gate waited for a peer label");
    check(ev_gap > 0, "inter-packet gap applied");
    check(ev_hbm_bp > 0, "HBM back-pressure");
    check(ev_empty > 0, "empty descriptor slots");
    check(ev_all8 > 0, "all 8 AND gates busy together");
    check(ev_single > 0, "single-FPGA mode");
    for (int i = 0; i < 4; i++) check(ev_rd[i] > 0, $sformatf("reads of memory type %0d", i));
    for (int i = 0; i < 3; i++) check(ev_wr[i] > 0, $sformatf("writes of memory type %0d", i));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

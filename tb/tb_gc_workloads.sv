// tb_gc_workloads: two-FPGA speed-up on workload-shaped circuits.
//
// The published system's PageRank circuits split into two halves that never
// exchange labels, while its K-means circuits exchange a few dozen labels
// between the FPGAs. This testbench generates one random layered circuit of
// each kind (per layer and per half, 4-8 AND and 4-8 XOR gates; cross-half
// inputs with probability 0 or about 3%), runs it on one overlay (each layer
// as two batches) and on two overlays (each layer's half as one batch), checks
// every output label and table row against the reference garbler in both
// runs, and reports the speed-up: single-FPGA cycles divided by the slower
// FPGA's cycles. The check requires at least 1.8x, the lower bound the
// published two-FPGA results reach. Default sizes are used throughout.
module tb_gc_workloads;
  import gc_pkg::*;
  import aes_ref_pkg::*;

  localparam int NIN      = 32;      // global inputs
  localparam int NLAYER   = 12;      // circuit layers
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

  // circuit structure, independent of the mapping
  int     S_half [$], S_layer [$], S_unit [$], S_in0 [$], S_in1 [$];
  bit     S_and [$];
  label_t GL [NIN];
  int     nbat_cur;

  task automatic gen_structure(input int cross_pct);
    int avail [2][$];
    int fresh [2][$];
    S_half.delete(); S_layer.delete(); S_unit.delete(); S_in0.delete(); S_in1.delete(); S_and.delete();
    for (int i = 0; i < NIN; i++) GL[i] = rnd128();
    for (int L = 0; L < NLAYER; L++) begin
      for (int h = 0; h < 2; h++) fresh[h].delete();
      for (int h = 0; h < 2; h++) begin
        int na, nx;
        na = (L % 3 == 0) ? 8 : 4 + $urandom % 5;
        nx = 4 + $urandom % 5;
        for (int k = 0; k < na + nx; k++) begin
          int ins [2];
          for (int j = 0; j < 2; j++) begin
            int src;
            src = h;
            if (($urandom % 100) < cross_pct) src = 1 - h;
            if (avail[src].size() != 0 && ($urandom % 4) != 0)
              ins[j] = avail[src][avail[src].size() - 1 - ($urandom % (avail[src].size() > 24 ? 24 : avail[src].size()))];
            else
              ins[j] = $urandom % NIN;
          end
          if (ins[1] == ins[0]) ins[1] = (ins[0] + 1) % NIN;
          S_half.push_back(h); S_layer.push_back(L); S_and.push_back(k < na);
          S_unit.push_back(k < na ? k : k - na);
          S_in0.push_back(ins[0]); S_in1.push_back(ins[1]);
          fresh[h].push_back(NIN + S_half.size() - 1);
        end
      end
      for (int h = 0; h < 2; h++) foreach (fresh[h][i]) avail[h].push_back(fresh[h][i]);
    end
  endtask

  // map the structure onto one FPGA (nf = 1) or two (nf = 2)
  task automatic build(input int nf);
    label_t d;
    W.delete(); G.delete();
    for (int p = 0; p < 2; p++) begin
      next_addr[p][MEM_HBM] = HBM_WIRES; next_addr[p][MEM_BRAM] = 0; next_addr[p][MEM_URAM] = 0;
      send_ctr[p] = 0;
    end
    nbat_cur = (nf == 2) ? NLAYER : 2 * NLAYER;
    d = {delta[127:1], 1'b1};
    for (int i = 0; i < NIN; i++) begin
      wire_t w;
      w = '{l0: GL[i], owner: -1, mtype: MEM_HBM, addr: i, send: 0, netaddr: 0, value: 0, elbl: '0};
      W.push_back(w);
    end
    foreach (S_half[i]) begin
      gate_t g;
      wire_t w;
      garbled_t gr;
      int r;
      g.fpga   = (nf == 2) ? S_half[i] : 0;
      g.layer  = (nf == 2) ? S_layer[i] : 2 * S_layer[i] + S_half[i];
      g.is_and = S_and[i];
      g.unit   = S_unit[i];
      g.in0    = S_in0[i];
      g.in1    = S_in1[i];
      r = $urandom % 3;
      w.owner = g.fpga;
      w.mtype = (r == 0) ? MEM_BRAM : (r == 1) ? MEM_URAM : MEM_HBM;
      w.addr  = next_addr[g.fpga][w.mtype]++;
      if (w.mtype == MEM_BRAM && w.addr >= BRAM_USE) begin w.mtype = MEM_HBM; w.addr = next_addr[g.fpga][MEM_HBM]++; end
      if (w.mtype == MEM_URAM && w.addr >= URAM_USE) begin w.mtype = MEM_HBM; w.addr = next_addr[g.fpga][MEM_HBM]++; end
      w.send = 0; w.netaddr = 0; w.value = 0; w.elbl = '0;
      if (g.is_and) begin
        gr = garble_and(key, W[g.in0].l0, W[g.in1].l0, d, tweak_of(g.fpga, g.layer, g.unit));
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
    foreach (G[i]) begin
      if (W[G[i].in0].owner >= 0 && W[G[i].in0].owner != G[i].fpga) W[G[i].in0].send = 1;
      if (W[G[i].in1].owner >= 0 && W[G[i].in1].owner != G[i].fpga) W[G[i].in1].send = 1;
    end
    for (int p = 0; p < nf; p++)
      for (int L = 0; L < nbat_cur; L++)
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
    for (int L = 0; L < nbat_cur; L++) begin
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
      for (int L = 0; L < nbat_cur; L++)
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
      for (int L = 0; L < nbat_cur; L++)
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
  task automatic run_two(output longint c);
    do_reset();
    two_fpga = 1;
    build(2);
    nbat = nbat_cur;
    load_hbm(0);
    load_hbm(1);
    @(negedge clk) begin start[0] = 1; start[1] = 1; end
    @(negedge clk) begin start[0] = 0; start[1] = 0; end
    while (!(done[0] && done[1])) @(negedge clk);
    check(lbl_rx[1] == send_ctr[0] && lbl_rx[0] == send_ctr[1], "labels received");
    check_results(2);
    c = (cycles[0] > cycles[1]) ? cycles[0] : cycles[1];
    $display("  two FPGAs: cycles %0d / %0d, labels exchanged %0d / %0d, wait cycles %0d",
             cycles[0], cycles[1], send_ctr[0], send_ctr[1], net_wait[0] + net_wait[1]);
  endtask

  task automatic run_one(output longint c);
    do_reset();
    two_fpga = 0;
    build(1);
    nbat = nbat_cur;
    load_hbm(0);
    @(negedge clk) start[0] = 1;
    @(negedge clk) start[0] = 0;
    while (!done[0]) @(negedge clk);
    check_results(1);
    c = cycles[0];
    $display("  one FPGA: cycles %0d", c);
  endtask

  initial begin
    longint c1, c2;
    real sp;
    string names [2];
    int xpct [2];
    names = '{"pagerank-like (no cut labels)", "kmeans-like (few cut labels)"};
    xpct = '{0, 3};
    for (int i = 0; i < 4; i++) begin ev_rd[i] = 0; ev_wr[i] = 0; end
    start[0] = 0; start[1] = 0; two_fpga = 1; nbat = 1;
    key = rnd128(); delta = rnd128();
    for (int wkl = 0; wkl < 2; wkl++) begin
      gen_structure(xpct[wkl]);
      $display("%s: %0d gates in %0d layers", names[wkl], S_half.size(), NLAYER);
      run_one(c1);
      run_two(c2);
      sp = real'(c1) / real'(c2);
      $display("  speed-up %0.2f", sp);
      check(sp >= 1.8, $sformatf("%s: speed-up %0.2f below 1.8", names[wkl], sp));
      if (wkl == 0) check(send_ctr[0] == 0 && send_ctr[1] == 0, "no labels cross the cut");
      else          check(send_ctr[0] + send_ctr[1] > 0, "labels cross the cut");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

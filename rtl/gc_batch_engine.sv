// gc_batch_engine: the control of one FPGA's garbling overlay.
//
// The preprocessed netlist sits in HBM as a list of batches. A batch is 16
// gate descriptors (16 bytes each, see gc_pkg): slots 0-7 are garbled AND
// operations, slots 8-15 free-XOR operations, and all gates of a batch are
// independent of each other (they come from one layer of the circuit). For
// every batch the engine
//   1. FETCH   reads the 16 descriptors from HBM at netlist_base + 16*batch,
//              and files each valid one under the hardware gate (`unit`) it
//              is assigned to;
//   2. READ    reads both input labels of every valid operation, each from the
//              memory named by its 2-bit type prefix (HBM, BRAM, URAM or the
//              network BRAM, where a read waits until the peer's label has
//              arrived);
//   3. COMPUTE starts the 8 garbled AND gates and the 8 free-XOR gates
//              together and waits for all of them;
//   4. WRITE   stores each output label at its typed address, appends each AND
//              gate's three table rows to the garbled-table area in HBM
//              (gt_base onwards, 3 words per gate, in batch then unit order),
//              and queues the label for the peer FPGA if the descriptor's send
//              flag is set.
// Within FETCH, READ and WRITE, requests are issued back to back (up to the
// router's limit of requests in flight) by an issue pointer, while a separate
// retire pointer walks the same steps and consumes the in-order answers, so
// the memories' latencies overlap instead of adding up. Label pushes to the
// network happen at retire time. The phases themselves do not overlap: a
// batch's reads start only after all of the previous batch's writes have been
// answered, which keeps every read-after-write between layers safe.
// In two-FPGA mode (`two_fpga`) the engine first sends a HELLO packet and
// waits for the peer's HELLO before the first batch, so both FPGAs start
// together. `cycles` counts clock cycles from the end of the handshake to the
// end of the last batch, as the host reads them back. `done` is set at the end
// and stays set until the next `start`.
//
// What follows the published design: the batch of 8 AND + 8 XOR descriptors, the
// descriptor fields and type prefixes, arrival-order network addressing, the
// start-up handshake, the kernel arguments (mode, destination, packet gap,
// start) and the cycle count. This design's own choices: the phase-by-phase
// fetch/read/compute/write schedule (pipelined memory requests inside each
// phase, no overlap between phases or batches), the per-gate hash tweak {node_id, batch, unit}, where the garbled
// tables go, and that the global offset's bit 0 is forced to 1.
module gc_batch_engine
  import gc_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  // kernel arguments
  input  logic        start,
  input  logic        two_fpga,
  input  node_id_t    node_id,
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
  // label memories (through wire_mem_router)
  output logic        mreq_valid,
  output mem_req_t    mreq,
  input  logic        mreq_ready,
  input  logic        mrsp_valid,
  input  label_t      mrsp_rdata,
  output logic        mrsp_ready,
  // network sender and receiver
  output logic        push_valid,
  output pkt_kind_e   push_kind,
  output label_t      push_data,
  input  logic        push_ready,
  input  logic        peer_hello
);

  typedef enum logic [3:0] {
    E_IDLE, E_HELLO, E_WAIT_PEER, E_FETCH, E_READ, E_COMPUTE, E_WAIT_GATES, E_WRITE
  } estate_e;

  estate_e    state_q;
  logic [4:0] cnt_q;              // retire pointer: slot / operand index
  logic [2:0] sub_q;              // retire pointer: step within one output in E_WRITE
  logic [4:0] icnt_q;             // issue pointer, same meaning
  logic [2:0] isub_q;
  logic       idone_q;            // issue pointer has passed the last step
  logic [31:0] batch_q, nb_q;
  addr_t      nl_q, gt_q;
  label_t     delta_q;   // bit 0 is replaced by 1 (delta_eff)
  label_t     key_q;

  gate_desc_t desc_q [BATCH_SLOTS];
  logic [BATCH_SLOTS-1:0] lane_v;
  label_t     opa_q [BATCH_SLOTS];
  label_t     opb_q [BATCH_SLOTS];
  logic [N_AND-1:0] and_pend;
  logic       xor_pend;

  // gate units
  logic   and_start;
  logic [N_AND-1:0] and_busy, and_done;
  label_t and_c0 [N_AND];
  label_t and_ct [N_AND][3];
  label_t and_tw [N_AND];
  logic   xor_start, xor_done;
  label_t xor_a [N_XOR], xor_b [N_XOR], xor_c [N_XOR];
  label_t delta_eff;

  assign delta_eff = {delta_q[LABEL_W-1:1], 1'b1};
  assign and_start = (state_q == E_COMPUTE);
  assign xor_start = (state_q == E_COMPUTE);

  for (genvar g = 0; g < N_AND; g++) begin : g_and
    assign and_tw[g] = label_t'({node_id, batch_q, 5'd0, 3'(g)});
    garbled_and_gate u_gate (
      .clk, .rst_n,
      .start (and_start && lane_v[g]),
      .a0    (opa_q[g]),
      .b0    (opb_q[g]),
      .delta (delta_eff),
      .tweak (and_tw[g]),
      .key   (key_q),
      .busy  (and_busy[g]),
      .done  (and_done[g]),
      .c0    (and_c0[g]),
      .ct    (and_ct[g])
    );
  end

  for (genvar g = 0; g < N_XOR; g++) begin : g_xor_in
    assign xor_a[g] = opa_q[N_AND + g];
    assign xor_b[g] = opb_q[N_AND + g];
  end

  free_xor_array #(.LANES(N_XOR)) u_xor (
    .clk, .rst_n,
    .start   (xor_start),
    .lane_en (lane_v[BATCH_SLOTS-1:N_AND]),
    .a       (xor_a),
    .b       (xor_b),
    .done    (xor_done),
    .c       (xor_c)
  );

  // ---------------------------------------------------------------- decode
  gate_desc_t fetched;
  logic [3:0] fetch_idx;
  logic [3:0] rd_e;
  logic       rd_op;

  always_comb begin
    fetched   = gate_desc_t'(mrsp_rdata);
    fetch_idx = {cnt_q[3], fetched.ctrl.unit};
    rd_e      = cnt_q[4:1];
    rd_op     = cnt_q[0];
  end

  // Output label of batch slot e.
  function automatic label_t out_label(input logic [3:0] e);
    return e[3] ? xor_c[e[2:0]] : and_c0[e[2:0]];
  endfunction

  // What step (cnt, sub) of the current phase does: skip, a memory request
  // (returned in `r`), or a push of the output label to the network.
  typedef enum logic [1:0] {A_SKIP, A_MEM, A_PUSH} act_e;

  typedef struct packed {
    act_e     a;
    mem_req_t r;
  } step_t;

  function automatic step_t step_of(input estate_e st, input logic [4:0] cnt,
                                    input logic [2:0] sub, input addr_t gt);
    logic [3:0] e;
    act_e       a;
    mem_req_t   r;
    a = A_SKIP;
    r = '0;
    unique case (st)
      E_FETCH: begin
        a = A_MEM;
        r = '{we: 1'b0, mtype: MEM_HBM,
              addr: nl_q + (batch_q << 4) + addr_t'(cnt[3:0]), wdata: '0};
      end
      E_READ: begin
        e = cnt[4:1];
        if (lane_v[e]) begin
          a = A_MEM;
          r = cnt[0] ? '{we: 1'b0, mtype: desc_q[e].ctrl.in1_type,
                         addr: desc_q[e].in1_addr, wdata: '0}
                     : '{we: 1'b0, mtype: desc_q[e].ctrl.in0_type,
                         addr: desc_q[e].in0_addr, wdata: '0};
        end
      end
      E_WRITE: begin
        e = cnt[3:0];
        if (lane_v[e]) begin
          if (sub == 3'd0 && desc_q[e].ctrl.out_type != MEM_NET) begin
            a = A_MEM;
            r = '{we: 1'b1, mtype: desc_q[e].ctrl.out_type,
                  addr: desc_q[e].out_addr, wdata: out_label(e)};
          end else if (sub >= 3'd1 && sub <= 3'd3 && !e[3]) begin
            a = A_MEM;
            r = '{we: 1'b1, mtype: MEM_HBM, addr: gt,
                  wdata: and_ct[e[2:0]][2'(sub - 3'd1)]};
          end else if (sub == 3'd4 && desc_q[e].ctrl.send) begin
            a = A_PUSH;
          end
        end
      end
      default: ;
    endcase
    return '{a: a, r: r};
  endfunction

  // Last step of a phase.
  function automatic logic last_step(input estate_e st, input logic [4:0] cnt,
                                     input logic [2:0] sub);
    unique case (st)
      E_FETCH: return cnt == 5'd15;
      E_READ:  return cnt == 5'd31;
      E_WRITE: return cnt == 5'd15 && sub == 3'd4;
      default: return 1'b1;
    endcase
  endfunction

  step_t    rstep, istep;    // step at the retire / issue pointer
  act_e     act, iact;
  mem_req_t iact_req;
  logic     in_phase, iadv;

  always_comb begin
    rstep    = step_of(state_q, cnt_q, sub_q, gt_q);
    istep    = step_of(state_q, icnt_q, isub_q, gt_q);
    act      = rstep.a;
    iact     = istep.a;
    iact_req = istep.r;
  end

  assign in_phase   = state_q inside {E_FETCH, E_READ, E_WRITE};
  assign mreq_valid = in_phase && !idone_q && (iact == A_MEM);
  assign mreq       = iact_req;
  assign mrsp_ready = in_phase && (act == A_MEM);
  assign iadv       = in_phase && !idone_q && (iact != A_MEM || mreq_ready);
  assign push_valid = (state_q == E_HELLO) || (act == A_PUSH);
  assign push_kind  = (state_q == E_HELLO) ? PKT_HELLO : PKT_DATA;
  assign push_data  = (state_q == E_HELLO) ? label_t'(node_id) : out_label(cnt_q[3:0]);
  assign busy       = (state_q != E_IDLE);

  // step done this cycle
  logic step_done;
  always_comb begin
    unique case (act)
      A_SKIP: step_done = 1'b1;
      A_MEM:  step_done = mrsp_valid;
      A_PUSH: step_done = push_ready;
      default: step_done = 1'b0;
    endcase
  end

  // --------------------------------------------------------------- control
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q   <= E_IDLE;
      cnt_q     <= '0;
      sub_q     <= '0;
      icnt_q    <= '0;
      isub_q    <= '0;
      idone_q   <= 1'b0;
      batch_q   <= '0;
      nb_q      <= '0;
      nl_q      <= '0;
      gt_q      <= '0;
      delta_q   <= '0;
      key_q     <= '0;
      lane_v    <= '0;
      and_pend  <= '0;
      xor_pend  <= 1'b0;
      done      <= 1'b0;
      cycles    <= '0;
      and_count <= '0;
      xor_count <= '0;
      for (int i = 0; i < BATCH_SLOTS; i++) begin
        desc_q[i] <= '0;
        opa_q[i]  <= '0;
        opb_q[i]  <= '0;
      end
    end else begin
      // issue pointer
      if (iadv) begin
        if (iact == A_MEM && state_q == E_WRITE && isub_q != 3'd0) gt_q <= gt_q + 32'd1;
        if (last_step(state_q, icnt_q, isub_q)) begin
          idone_q <= 1'b1;
        end else if (state_q == E_WRITE && isub_q != 3'd4) begin
          isub_q <= isub_q + 3'd1;
        end else begin
          isub_q <= '0;
          icnt_q <= icnt_q + 5'd1;
        end
      end
      // every phase starts with the issue pointer at its first step
      if (in_phase && step_done && last_step(state_q, cnt_q, sub_q)) begin
        icnt_q  <= '0;
        isub_q  <= '0;
        idone_q <= 1'b0;
      end
      if (state_q inside {E_FETCH, E_READ, E_COMPUTE, E_WAIT_GATES, E_WRITE})
        cycles <= cycles + 64'd1;

      unique case (state_q)
        E_IDLE: if (start) begin
          nl_q      <= netlist_base;
          gt_q      <= gt_base;
          nb_q      <= num_batches;
          delta_q   <= delta;
          key_q     <= aes_key;
          batch_q   <= '0;
          cnt_q     <= '0;
          sub_q     <= '0;
          icnt_q    <= '0;
          isub_q    <= '0;
          idone_q   <= 1'b0;
          lane_v    <= '0;
          done      <= 1'b0;
          cycles    <= '0;
          and_count <= '0;
          xor_count <= '0;
          state_q   <= two_fpga ? E_HELLO : (num_batches == 0 ? E_IDLE : E_FETCH);
          if (!two_fpga && num_batches == 0) done <= 1'b1;
        end

        E_HELLO: if (push_ready) state_q <= E_WAIT_PEER;

        E_WAIT_PEER: if (peer_hello) begin
          if (nb_q == 0) begin
            state_q <= E_IDLE;
            done    <= 1'b1;
          end else begin
            state_q <= E_FETCH;
          end
        end

        E_FETCH: if (step_done) begin
          if (fetched.ctrl.valid) begin
            desc_q[fetch_idx] <= fetched;
            lane_v[fetch_idx] <= 1'b1;
          end
          cnt_q <= cnt_q + 5'd1;
          if (cnt_q == 5'd15) begin
            cnt_q   <= '0;
            state_q <= E_READ;
          end
        end

        E_READ: if (step_done) begin
          if (act == A_MEM) begin
            if (rd_op) opb_q[rd_e] <= mrsp_rdata;
            else       opa_q[rd_e] <= mrsp_rdata;
          end
          cnt_q <= cnt_q + 5'd1;
          if (cnt_q == 5'd31) begin
            cnt_q   <= '0;
            state_q <= E_COMPUTE;
          end
        end

        E_COMPUTE: begin
          and_pend  <= lane_v[N_AND-1:0];
          xor_pend  <= 1'b1;
          and_count <= and_count + 32'($countones(lane_v[N_AND-1:0]));
          xor_count <= xor_count + 32'($countones(lane_v[BATCH_SLOTS-1:N_AND]));
          state_q   <= E_WAIT_GATES;
        end

        E_WAIT_GATES: begin
          and_pend <= and_pend & ~and_done;
          if (xor_done) xor_pend <= 1'b0;
          if ((and_pend & ~and_done) == '0 && (!xor_pend || xor_done)) begin
            state_q <= E_WRITE;
            cnt_q   <= '0;
            sub_q   <= '0;
          end
        end

        E_WRITE: if (step_done) begin
          if (sub_q == 3'd4) begin
            sub_q <= '0;
            cnt_q <= cnt_q + 5'd1;
            if (cnt_q == 5'd15) begin
              lane_v  <= '0;
              cnt_q   <= '0;
              batch_q <= batch_q + 32'd1;
              if (batch_q + 32'd1 == nb_q) begin
                state_q <= E_IDLE;
                done    <= 1'b1;
              end else begin
                state_q <= E_FETCH;
              end
            end
          end else begin
            sub_q <= sub_q + 3'd1;
          end
        end

        default: state_q <= E_IDLE;
      endcase
    end
  end

  // A gate unit is only started when idle; a batch names each unit once.
  // The retire pointer never consumes an answer the issue pointer has not asked for.
  assert property (@(posedge clk) disable iff (!rst_n)
                   in_phase && act == A_MEM && mrsp_valid |->
                   idone_q || {icnt_q, isub_q} > {cnt_q, sub_q});
  assert property (@(posedge clk) disable iff (!rst_n) and_start |-> (and_busy & lane_v[N_AND-1:0]) == '0);
  assert property (@(posedge clk) disable iff (!rst_n)
                   state_q == E_FETCH && step_done && fetched.ctrl.valid |-> !lane_v[fetch_idx])
    else $error("two descriptors of a batch name the same gate unit");
  assert property (@(posedge clk) disable iff (!rst_n)
                   state_q == E_WRITE && lane_v[cnt_q[3:0]] && sub_q == 3'd0 |->
                   desc_q[cnt_q[3:0]].ctrl.out_type != MEM_NET)
    else $error("output addressed to the network receive BRAM");

endmodule

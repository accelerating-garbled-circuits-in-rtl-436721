// tb_net_tx_sender: pushes a random mix of HELLO and DATA entries (with bursts
// that fill the FIFO) while the receiver stalls at random, and checks packet
// order, contents, destination/source fields, and that consecutive packets are
// at least gap+1 cycles apart.
module tb_net_tx_sender;
  import gc_pkg::*;

  localparam int FD = 4;
  logic clk = 0, rst_n = 0;
  logic push_valid, push_ready, tx_valid, tx_ready, throttled;
  pkt_kind_e push_kind;
  label_t push_data;
  net_pkt_t tx_pkt;
  logic [15:0] gap;
  logic [31:0] sent_count;
  net_pkt_t exp_q [$];
  int cyc = 0, last_tx = -1000, n_rx = 0, n_full = 0, n_thr = 0;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  net_tx_sender #(.FIFO_DEPTH(FD)) dut (.clk, .rst_n, .src_id(8'd3), .dest_id(8'd7), .gap,
    .push_valid, .push_kind, .push_data, .push_ready, .tx_valid, .tx_pkt, .tx_ready,
    .throttled, .sent_count);

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (rst_n) begin
    cyc++;
    if (throttled) n_thr++;
    if (push_valid && !push_ready) n_full++;
    if (tx_valid && tx_ready) begin
      net_pkt_t e;
      checks += 2;
      e = exp_q.pop_front();
      if (tx_pkt !== e) begin failures++; $display("FAIL packet %0d", n_rx); end
      if (cyc - last_tx < int'(gap) + 1) begin
        failures++; $display("FAIL spacing %0d with gap %0d", cyc - last_tx, gap);
      end
      last_tx = cyc;
      n_rx++;
    end
  end

  always @(negedge clk) tx_ready = ($urandom % 3) != 0;

  initial begin
    int pushed;
    push_valid = 0; push_kind = PKT_DATA; push_data = '0; gap = 16'd0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int phase = 0; phase < 3; phase++) begin
      gap = 16'(phase * 3);
      pushed = 0;
      while (pushed < 60) begin
        @(negedge clk);
        push_valid = (phase == 1) || (($urandom % 2) == 0);
        push_kind  = (($urandom % 8) == 0) ? PKT_HELLO : PKT_DATA;
        push_data  = {$urandom, $urandom, $urandom, $urandom};
        @(posedge clk);
        if (push_valid && push_ready) begin
          exp_q.push_back('{dest: 8'd7, src: 8'd3, kind: push_kind, data: push_data});
          pushed++;
        end
      end
      @(negedge clk) push_valid = 0;
      while (exp_q.size() != 0) @(negedge clk);
      repeat (10) @(negedge clk);
    end
    checks += 3;
    if (n_rx != 180 || sent_count != 180) begin failures++; $display("FAIL count %0d %0d", n_rx, sent_count); end
    if (n_full == 0) begin failures++; $display("FAIL FIFO never filled"); end
    if (n_thr == 0)  begin failures++; $display("FAIL gap never throttled"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

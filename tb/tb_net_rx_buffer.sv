// tb_net_rx_buffer: sends DATA and HELLO packets with random gaps, checks the
// arrival-order addressing by reading each label back, the arrival count, the
// handshake flag, one-cycle read latency and overflow when the buffer fills.
module tb_net_rx_buffer;
  import gc_pkg::*;

  localparam int DEPTH = 64;
  localparam int AW = $clog2(DEPTH);
  logic clk = 0, rst_n = 0;
  logic rx_valid, rx_ready, re, rvalid, peer_hello, overflow;
  net_pkt_t rx_pkt;
  logic [AW-1:0] raddr;
  label_t rdata;
  logic [AW:0] count;
  label_t sent [$];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  net_rx_buffer #(.DEPTH(DEPTH)) dut (.clk, .rst_n, .rx_valid, .rx_pkt, .rx_ready,
    .re, .raddr, .rvalid, .rdata, .count, .peer_hello, .overflow);

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit cond, input string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", msg); end
  endtask

  initial begin
    rx_valid = 0; rx_pkt = '0; re = 0; raddr = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    check(count == 0 && !peer_hello && !overflow, "reset state");
    // 40 data packets with a HELLO in the middle
    for (int i = 0; i < 41; i++) begin
      rx_valid = 1;
      rx_pkt.dest = 8'd1; rx_pkt.src = 8'd0;
      if (i == 20) begin
        rx_pkt.kind = PKT_HELLO; rx_pkt.data = '1;
      end else begin
        rx_pkt.kind = PKT_DATA;
        rx_pkt.data = {$urandom, $urandom, $urandom, $urandom};
        sent.push_back(rx_pkt.data);
      end
      check(rx_ready, "rx_ready");
      @(negedge clk);
      rx_valid = 0;
      repeat ($urandom % 3) @(negedge clk);
    end
    check(count == 40, "count after 40 labels");
    check(peer_hello, "hello seen");
    for (int i = 39; i >= 0; i--) begin
      re = 1; raddr = AW'(i);
      @(negedge clk);
      re = 0;
      check(rvalid, "rvalid after one cycle");
      check(rdata === sent[i], $sformatf("label %0d", i));
    end
    // fill the buffer past its depth
    for (int i = 40; i < DEPTH + 3; i++) begin
      rx_valid = 1; rx_pkt.kind = PKT_DATA; rx_pkt.data = label_t'(i);
      @(negedge clk);
    end
    rx_valid = 0;
    @(negedge clk);
    check(count == DEPTH, "count saturates at depth");
    check(overflow, "overflow flagged");
    re = 1; raddr = AW'(DEPTH - 1);
    @(negedge clk);
    re = 0;
    check(rdata === label_t'(DEPTH - 1), "last stored label");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_free_xor_array: drives random labels and lane masks into the XOR gates and
// checks each enabled lane's result, that disabled lanes hold their value, and
// the one-cycle latency.
module tb_free_xor_array;
  import gc_pkg::*;

  localparam int L = 8;
  logic clk = 0, rst_n = 0;
  logic start;
  logic [L-1:0] lane_en;
  label_t a [L], b [L], c [L], prev [L];
  logic done;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  free_xor_array #(.LANES(L)) dut (.clk, .rst_n, .start, .lane_en, .a, .b, .done, .c);

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    start = 0; lane_en = '0;
    for (int i = 0; i < L; i++) begin a[i] = '0; b[i] = '0; end
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < 100; n++) begin
      @(negedge clk);
      for (int i = 0; i < L; i++) begin
        prev[i] = c[i];
        a[i] = {$urandom, $urandom, $urandom, $urandom};
        b[i] = {$urandom, $urandom, $urandom, $urandom};
      end
      lane_en = L'($urandom);
      start = 1;
      @(negedge clk);
      start = 0;
      checks++;
      if (!done) begin failures++; $display("FAIL done missing"); end
      for (int i = 0; i < L; i++) begin
        checks++;
        if (c[i] !== (lane_en[i] ? (a[i] ^ b[i]) : prev[i])) begin
          failures++;
          $display("FAIL lane %0d", i);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_aes128_core: checks the AES-128 core against the FIPS-197 example vectors
// and against the reference model for random keys and blocks, and checks the
// 11-cycle start-to-done latency.
module tb_aes128_core;
  import aes_ref_pkg::*;

  logic clk = 0, rst_n = 0;
  logic start;
  logic [127:0] key, pt, ct;
  logic busy, done;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  aes128_core dut (.clk, .rst_n, .start, .key, .pt, .busy, .done, .ct);

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(input logic [127:0] k, input logic [127:0] p, input logic [127:0] exp);
    int lat;
    @(negedge clk);
    key = k; pt = p; start = 1;
    @(negedge clk);
    start = 0;
    lat = 1;
    while (!done) begin @(negedge clk); lat++; end
    checks += 2;
    if (ct !== exp) begin
      failures++;
      $display("FAIL ct=%h exp=%h", ct, exp);
    end
    if (lat != 11) begin
      failures++;
      $display("FAIL latency %0d, expected 11", lat);
    end
  endtask

  initial begin
    logic [127:0] k, p;
    start = 0; key = '0; pt = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    run(128'h000102030405060708090a0b0c0d0e0f, 128'h00112233445566778899aabbccddeeff,
        128'h69c4e0d86a7b0430d8cdb78070b4c55a);
    run(128'h2b7e151628aed2a6abf7158809cf4f3c, 128'h3243f6a8885a308d313198a2e0370734,
        128'h3925841d02dc09fbdc118597196a0b32);
    // reference model must agree with the published vectors too
    checks++;
    if (aes128(128'h000102030405060708090a0b0c0d0e0f, 128'h00112233445566778899aabbccddeeff)
        !== 128'h69c4e0d86a7b0430d8cdb78070b4c55a) begin
      failures++;
      $display("FAIL reference model");
    end
    for (int i = 0; i < 50; i++) begin
      k = {$urandom, $urandom, $urandom, $urandom};
      p = {$urandom, $urandom, $urandom, $urandom};
      run(k, p, aes128(k, p));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

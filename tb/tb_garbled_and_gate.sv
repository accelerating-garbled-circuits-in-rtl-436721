// tb_garbled_and_gate: garbles random AND gates and checks the output label and
// the three table rows against the reference garbler, evaluates every one of
// the four input combinations with the reference evaluator to confirm that the
// table yields the label of a AND b, and checks the 49-cycle latency.
module tb_garbled_and_gate;
  import gc_pkg::*;
  import aes_ref_pkg::*;

  logic clk = 0, rst_n = 0;
  logic start;
  label_t a0, b0, delta, tweak, key, c0;
  label_t ct [3];
  logic busy, done;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  garbled_and_gate dut (.clk, .rst_n, .start, .a0, .b0, .delta, .tweak, .key,
                        .busy, .done, .c0, .ct);

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic label_t rnd128();
    return {$urandom, $urandom, $urandom, $urandom};
  endfunction

  initial begin
    garbled_t g;
    label_t tab[3], la, lb, lc;
    int lat;
    start = 0; a0 = '0; b0 = '0; delta = '0; tweak = '0; key = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < 40; n++) begin
      @(negedge clk);
      a0 = rnd128(); b0 = rnd128(); delta = rnd128() | 128'h1;
      tweak = label_t'(n); key = rnd128();
      // make sure all four colour combinations of (pa, pb) are covered
      a0[0] = n[0]; b0[0] = n[1];
      start = 1;
      @(negedge clk);
      start = 0;
      lat = 1;
      while (!done) begin @(negedge clk); lat++; end
      g = garble_and(key, a0, b0, delta, tweak);
      checks += 5;
      if (lat != 49) begin failures++; $display("FAIL latency %0d", lat); end
      if (c0 !== g.c0) begin failures++; $display("FAIL c0 %h exp %h", c0, g.c0); end
      for (int r = 0; r < 3; r++) begin
        tab[r] = ct[r];
        if (ct[r] !== g.ct[r]) begin failures++; $display("FAIL ct%0d", r); end
      end
      for (int va = 0; va < 2; va++)
        for (int vb = 0; vb < 2; vb++) begin
          la = va ? a0 ^ delta : a0;
          lb = vb ? b0 ^ delta : b0;
          lc = eval_and(key, la, lb, tweak, tab);
          checks++;
          if (lc !== ((va & vb) ? c0 ^ delta : c0)) begin
            failures++;
            $display("FAIL evaluation va=%0d vb=%0d", va, vb);
          end
        end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// cfft_agu_tb: checks the BFLY address generator against a model written in
// terms of global data addresses rather than cache indexes.
// For a group g, pass p and butterfly b the model builds the global address
// of the butterfly's A input: in epoch 0 the cache bits are the low address
// bits, A = {g, cache index}; in later epochs they are the high bits,
// A = {cache index, g}. The global stage is the place-holder position in
// A, and the twiddle of a radix-2 DIT stage s is W_(2^(s+1))^(A mod 2^s),
// i.e. ROM address (A mod 2^s) << (9 - s). Cache indexes are checked by
// sweeping a whole pass: the A and B indexes must differ only in bit pos and
// cover the cache exactly once. The post-increment is checked by following
// p_next/b_next through all passes of a group.
// Configurations: balanced 1024 (5 + 5), 256 (4 + 4), unbalanced 128 (4 + 3)
// and modified 64 (4 + 2 passes with a 16-entry cache).
module cfft_agu_tb;
  import cfft_pkg::*;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic [15:0] g = '0, p = '0, b = '0;
  logic [1:0]  e = '0;
  ctr_fields_t ctr = '0;
  logic [4:0]  idx_a, idx_b;
  logic [8:0]  tw_addr;
  logic [15:0] p_next, b_next;
  cfft_agu dut (.*);

  int checks = 0, failures = 0;

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic fail(input string msg);
    failures++;
    if (failures < 15) $display("%s", msg);
  endtask

  // one epoch of an N = 2^lg FFT with 2^cb cache words and np passes
  task automatic run_epoch(input int lg, input int cb, input int np, input int ep);
    int log2g = lg - cb;
    int nbf = 1 << (cb - 1);
    ctr.log2n = 4'(lg); ctr.npass = 3'(np); ctr.log2b = 3'(cb - 1); ctr.log2g = 4'(log2g);
    e = 2'(ep);
    #1;
    for (int gg = 0; gg < (1 << log2g); gg += ((1 << log2g) > 4 ? (1 << log2g) / 4 : 1)) begin
      g = 16'(gg);
      p = '0; b = '0;
      for (int pp = 0; pp < np; pp++) begin
        bit seen [64];
        int pos = (ep == 0) ? pp : pp + cb - np;
        foreach (seen[i]) seen[i] = 0;
        for (int bb = 0; bb < nbf; bb++) begin
          int ga, s, jj, etw;
          #1;
          checks += 3;
          if (p != 16'(pp) || b != 16'(bb)) fail($sformatf("post-increment: p=%0d b=%0d expected %0d %0d", p, b, pp, bb));
          if ((idx_a ^ idx_b) != 5'(1 << pos) || idx_a[pos] != 1'b0)
            fail($sformatf("lg=%0d e=%0d p=%0d b=%0d: A=%0d B=%0d pos=%0d", lg, ep, pp, bb, idx_a, idx_b, pos));
          if (seen[int'(idx_a)] || seen[int'(idx_b)]) fail($sformatf("index used twice in pass %0d", pp));
          seen[int'(idx_a)] = 1; seen[int'(idx_b)] = 1;
          ga = (ep == 0) ? ((gg << cb) | int'(idx_a)) : ((int'(idx_a) << log2g) | gg);
          s  = (ep == 0) ? pos : pos + log2g;
          jj = ga & ((1 << s) - 1);
          etw = jj << (9 - s);
          if (int'(tw_addr) != etw)
            fail($sformatf("lg=%0d e=%0d g=%0d/%0d p=%0d b=%0d: tw=%0d expected %0d", lg, ep, gg, g, pp, bb, tw_addr, etw));
          p = p_next; b = b_next;
        end
      end
      checks++;
      if (p != 16'(np) || b != 0) fail($sformatf("after the group p=%0d b=%0d", p, b));
    end
  endtask

  initial begin
    run_epoch(10, 5, 5, 0); run_epoch(10, 5, 5, 1);
    run_epoch(8, 4, 4, 0);  run_epoch(8, 4, 4, 1);
    run_epoch(7, 4, 4, 0);  run_epoch(7, 4, 3, 1);
    run_epoch(6, 4, 4, 0);  run_epoch(6, 4, 2, 1);
    run_epoch(4, 2, 2, 0);  run_epoch(4, 2, 2, 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// cfht_agu_tb: addressing of the cached FHT, checked against the plain FHT.
// For each configuration (C0, R) and every group of both epochs, the
// testbench maps each cache index back to the global data address it holds:
//   epoch 0: address = {G, index}
//   epoch 1: index < H: address = {index, 0, G};
//            index >= H: address = {index - H, 1, AG}, AG = 2^(C0-1) - G
//            (0 for G = 0)
// and checks every dual butterfly of every pass against the Hartley
// recursion at the global stage (epoch 0: p+1, epoch 1: C0+1+p): X1 and Y1
// are half a block above X0 and Y0, X0 and Y0 are at mirrored indexes k and
// L/2 - k of one block (or k = 0 paired with L/4, plain), and the cos/sin
// address is k * 2048 / L (for k > L/4 the same angle seen from the other
// member: the mirrored pair is accepted). Each pass must touch each cache
// register once, and each stage over all groups each data word once. Also
// checked: the read pointers and the set size H, and the post-increment.
module cfht_agu_tb;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic        e = 1'b0;
  logic [15:0] g = '0, p = '0, b = '0;
  logic [2:0]  c0 = '0, r = '0;
  logic [5:0]  ix0, ix1, iy0, iy1;
  logic [9:0]  cas_addr;
  logic        plain;
  logic [15:0] rp0, rp1, p_next, b_next;
  logic [6:0]  half;
  cfht_agu dut (.*);

  int checks = 0, failures = 0;

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic fail(input string msg);
    failures++;
    if (failures < 15) $display("%s", msg);
  endtask

  function automatic int gaddr(int ep, int cc, int gg, int h, int idx);
    int gmax, ag;
    gmax = 1 << (cc - 1);
    ag = (gg == 0) ? 0 : gmax - gg;
    if (ep == 0) return (gg << cc) | idx;
    if (idx < h) return (idx << cc) | gg;
    return ((idx - h) << cc) | gmax | ag;
  endfunction

  task automatic run_cfg(input int cc, input int rr);
    int lg = cc + rr;
    for (int ep = 0; ep < 2; ep++) begin
      int ngroups = ep ? (1 << (cc - 1)) : (1 << rr);
      int h       = ep ? (1 << rr) : (1 << (cc - 1));
      int npass   = ep ? rr : cc;
      int nbf     = ep ? (1 << (rr - 1)) : (1 << (cc - 2));
      int stage_seen [16][2048];
      foreach (stage_seen[i, j]) stage_seen[i][j] = 0;
      c0 = 3'(cc); r = 3'(rr); e = 1'(ep);
      for (int gg = 0; gg < ngroups; gg++) begin
        g = 16'(gg); p = '0; b = '0;
        #1;
        checks += 2;
        if (int'(half) != h) fail($sformatf("C0=%0d R=%0d e=%0d: H=%0d", cc, rr, ep, half));
        if (ep == 0 ? (rp0 != 16'(gg << cc) || rp1 != 16'((gg << cc) + h))
                    : (rp0 != 16'(gg) || rp1 != 16'(gaddr(1, cc, gg, h, h))))
          fail($sformatf("C0=%0d e=%0d G=%0d: rp0=%0d rp1=%0d", cc, ep, gg, rp0, rp1));
        for (int pp = 0; pp < npass; pp++) begin
          bit used [64];
          int s, l, hb;
          s  = ep ? cc + 1 + pp : pp + 1;
          l  = 1 << s;
          hb = l / 2;
          foreach (used[i]) used[i] = 0;
          for (int bb = 0; bb < nbf; bb++) begin
            int a0, a1, b0, b1, k, ky, kk;
            bit ok;
            #1;
            checks++;
            if (p != 16'(pp) || b != 16'(bb)) fail($sformatf("post-increment p=%0d b=%0d", p, b));
            if (used[ix0] || used[ix1] || used[iy0] || used[iy1] || ix0 == ix1 || ix0 == iy0 ||
                ix0 == iy1 || ix1 == iy0 || ix1 == iy1 || iy0 == iy1)
              fail($sformatf("C0=%0d e=%0d G=%0d p=%0d b=%0d: register reused", cc, ep, gg, pp, bb));
            used[ix0] = 1; used[ix1] = 1; used[iy0] = 1; used[iy1] = 1;
            a0 = gaddr(ep, cc, gg, h, int'(ix0)); a1 = gaddr(ep, cc, gg, h, int'(ix1));
            b0 = gaddr(ep, cc, gg, h, int'(iy0)); b1 = gaddr(ep, cc, gg, h, int'(iy1));
            stage_seen[s][a0]++; stage_seen[s][a1]++; stage_seen[s][b0]++; stage_seen[s][b1]++;
            checks++;
            ok = (a1 - a0 == hb) && (b1 - b0 == hb) && (a0 % l < hb);
            if (s <= 2) ok = ok && plain && (a0 / 4 == b0 / 4) && (a0 / 4 == b1 / 4);
            else begin
              ok = ok && (a0 / l == b0 / l);
              k  = a0 % l;
              ky = (k == 0) ? l / 4 : hb - k;
              ok = ok && (b0 % l == ky) && (plain == (k == 0 || k == l / 4));
              kk = k;
              if (!plain) ok = ok && int'(cas_addr) == kk * (2048 / l);
            end
            if (!ok)
              fail($sformatf("C0=%0d R=%0d e=%0d G=%0d p=%0d b=%0d: s=%0d X=%0d,%0d Y=%0d,%0d cas=%0d plain=%b",
                             cc, rr, ep, gg, pp, bb, s, a0, a1, b0, b1, cas_addr, plain));
            p = p_next; b = b_next;
          end
        end
      end
      for (int s = (ep ? cc + 1 : 1); s <= (ep ? lg : cc); s++)
        for (int a = 0; a < (1 << lg); a++) begin
          checks++;
          if (stage_seen[s][a] != 1)
            fail($sformatf("C0=%0d R=%0d stage %0d: word %0d touched %0d times", cc, rr, s, a, stage_seen[s][a]));
        end
    end
  endtask

  initial begin
    run_cfg(6, 5);
    run_cfg(5, 5);
    run_cfg(4, 4);
    run_cfg(4, 3);
    run_cfg(3, 3);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// fht_agu_tb: the FHT dual-butterfly address generator for a 2048-point
// transform (AW = 11). For every stage and every butterfly number it checks
// the four addresses against the structure of the Hartley recursion rather
// than against the address formula:
//  - X0 and X1 (and Y0 and Y1) are the two inputs of one radix-2 butterfly:
//    they differ by half a block (2^(s-1));
//  - for s >= 3, X0 sits at index k < L/4 of its block of L = 2^s words and
//    Y0 at the mirrored index L/2 - k (L/4 when k = 0), in the same block;
//    the coefficient address is k * 2048/L and the butterfly is plain
//    exactly when k = 0;
//  - stages 1 and 2: plain, all four addresses in one group of 4 words;
//  - over a stage the four addresses touch every data word exactly once.
module fht_agu_tb;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic [3:0]  stage = '0;
  logic [15:0] b = '0;
  logic [10:0] x0, x1, y0, y1;
  logic [9:0]  cas_addr;
  logic        plain;
  fht_agu dut (.*);

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

  initial begin
    for (int s = 1; s <= 11; s++) begin
      bit seen [2048];
      int l, h;
      l = 1 << s;
      h = 1 << (s - 1);
      foreach (seen[i]) seen[i] = 0;
      for (int bb = 0; bb < 512; bb++) begin
        int a [4];
        stage = 4'(s); b = 16'(bb);
        #1;
        a[0] = int'(x0); a[1] = int'(x1); a[2] = int'(y0); a[3] = int'(y1);
        checks++;
        foreach (a[i]) begin
          if (seen[a[i]]) fail($sformatf("s=%0d b=%0d: address %0d used twice", s, bb, a[i]));
          seen[a[i]] = 1;
        end
        checks++;
        if (s <= 2) begin
          if (!plain || (a[0] >> 2) != (a[3] >> 2) || (a[1] >> 2) != (a[0] >> 2) ||
              (a[2] >> 2) != (a[0] >> 2) || a[1] - a[0] != h || a[3] - a[2] != h)
            fail($sformatf("s=%0d b=%0d: %0d %0d %0d %0d plain=%b", s, bb, a[0], a[1], a[2], a[3], plain));
        end else begin
          int k, ky;
          k  = a[0] % l;
          ky = (k == 0) ? l / 4 : h - k;
          if (a[1] - a[0] != h || a[3] - a[2] != h || k >= l / 4 ||
              a[2] != (a[0] / l) * l + ky || plain != (k == 0) ||
              (!plain && int'(cas_addr) != k * (2048 / l)))
            fail($sformatf("s=%0d b=%0d: %0d %0d %0d %0d cas=%0d plain=%b", s, bb,
                           a[0], a[1], a[2], a[3], cas_addr, plain));
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

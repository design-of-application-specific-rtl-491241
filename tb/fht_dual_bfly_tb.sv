// fht_dual_bfly_tb: the FHT dual butterfly. A random operand set enters
// every cycle (with gaps in the second half); each result must come out one
// cycle later with its tag and equal the values computed here:
//   T1 = (c*X1 + s*Y1) >> 15,  T2 = (s*X1 - c*Y1) >> 15  (plain: T1 = X1,
//   T2 = Y1), outputs (X0 + T1)/2, (X0 - T1)/2, (Y0 + T2)/2, (Y0 - T2)/2,
//   saturated to 16 bits.
// A floating-point check follows: for a 16-point block in stage 4 the
// outputs of the dual butterfly with exact cos/sin must match
// H(k) = H1(k) + cos*H2(k) + sin*H2(L/2-k) of the Hartley recursion
// within 2 LSB.
module fht_dual_bfly_tb;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic               in_valid = 1'b0, plain = 1'b0;
  logic signed [15:0] x0 = '0, x1 = '0, y0 = '0, y1 = '0, c = '0, s = '0;
  logic [7:0]         in_tag = '0;
  logic               out_valid;
  logic signed [15:0] x0_o, x1_o, y0_o, y1_o;
  logic [7:0]         out_tag;
  fht_dual_bfly dut (.*);

  int checks = 0, failures = 0;
  int e_q [$];
  int cyc = 0;
  bit float_check = 1'b0;

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int sat(int v);
    return v > 32767 ? 32767 : (v < -32768 ? -32768 : v);
  endfunction

  function automatic logic signed [15:0] rnd16();
    case ($urandom_range(5))
      0: return 16'sh7FFF;
      1: return 16'sh8000;
      default: return 16'($urandom);
    endcase
  endfunction

  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (rst_n && out_valid && !float_check) begin
      checks++;
      if (e_q.size() < 6) begin
        failures++;
        $display("unexpected output");
      end else begin
        int ex0, ex1, ey0, ey1, tg, t0;
        ex0 = e_q.pop_front(); ex1 = e_q.pop_front(); ey0 = e_q.pop_front();
        ey1 = e_q.pop_front(); tg = e_q.pop_front(); t0 = e_q.pop_front();
        if (int'(x0_o) != ex0 || int'(x1_o) != ex1 || int'(y0_o) != ey0 || int'(y1_o) != ey1 ||
            int'(out_tag) != tg || cyc - t0 != 1) begin
          failures++;
          if (failures < 10)
            $display("got %0d %0d %0d %0d tag %0d, expected %0d %0d %0d %0d tag %0d, latency %0d",
                     x0_o, x1_o, y0_o, y1_o, out_tag, ex0, ex1, ey0, ey1, tg, cyc - t0);
        end
      end
    end
  end

  task automatic drive(input bit v, input bit pl);
    @(negedge clk);
    in_valid = v; plain = pl;
    x0 = rnd16(); x1 = rnd16(); y0 = rnd16(); y1 = rnd16(); c = rnd16(); s = rnd16();
    in_tag = 8'($urandom);
    if (v) begin
      int t1, t2;
      if (pl) begin
        t1 = x1; t2 = y1;
      end else begin
        t1 = int'((longint'(c) * x1 + longint'(s) * y1) >>> 15);
        t2 = int'((longint'(s) * x1 - longint'(c) * y1) >>> 15);
      end
      e_q.push_back(sat((x0 + t1) >>> 1)); e_q.push_back(sat((x0 - t1) >>> 1));
      e_q.push_back(sat((y0 + t2) >>> 1)); e_q.push_back(sat((y0 - t2) >>> 1));
      e_q.push_back(int'(in_tag)); e_q.push_back(cyc);
    end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < 3000; i++) drive(1'b1, 1'($urandom_range(3) == 0));
    for (int i = 0; i < 3000; i++) drive(1'($urandom_range(1)), 1'($urandom_range(3) == 0));
    @(negedge clk); in_valid = 1'b0;
    repeat (4) @(posedge clk);
    checks++;
    if (e_q.size() != 0) begin
      failures++;
      $display("%0d results never came out", e_q.size() / 6);
    end
    // Hartley recursion, stage of block length 16, X index k = 1..3
    for (int k = 1; k < 4; k++) begin
      int h [16];
      real ang;
      real r [4];
      ang = 2.0 * 3.14159265358979323846 * k / 16.0;
      float_check = 1'b1;
      foreach (h[i]) h[i] = int'($urandom_range(20000)) - 10000;
      @(negedge clk);
      in_valid = 1'b1; plain = 1'b0;
      x0 = 16'(h[k]); x1 = 16'(h[8 + k]); y0 = 16'(h[8 - k]); y1 = 16'(h[16 - k]);
      c = 16'($rtoi($floor(32767.0 * $cos(ang) + 0.5)));
      s = 16'($rtoi($floor(32767.0 * $sin(ang) + 0.5)));
      // expected: H(k), H(k+8), H(8-k), H(16-k), all halved
      r[0] = (h[k] + $cos(ang) * h[8 + k] + $sin(ang) * h[16 - k]) / 2.0;
      r[1] = (h[k] - $cos(ang) * h[8 + k] - $sin(ang) * h[16 - k]) / 2.0;
      r[2] = (h[8 - k] + $cos(3.14159265358979323846 - ang) * h[16 - k] +
              $sin(3.14159265358979323846 - ang) * h[8 + k]) / 2.0;
      r[3] = (h[8 - k] - $cos(3.14159265358979323846 - ang) * h[16 - k] -
              $sin(3.14159265358979323846 - ang) * h[8 + k]) / 2.0;
      @(negedge clk); in_valid = 1'b0;
      #1;
      begin
        int g [4];
        g[0] = x0_o; g[1] = x1_o; g[2] = y0_o; g[3] = y1_o;
        for (int i = 0; i < 4; i++) begin
          checks++;
          if (real'(g[i]) - r[i] > 2.0 || r[i] - real'(g[i]) > 2.0) begin
            failures++;
            $display("Hartley k=%0d output %0d: %0d, expected %f", k, i, g[i], r[i]);
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

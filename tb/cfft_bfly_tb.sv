// cfft_bfly_tb: the radix-2 butterfly X = (A + B*W)/2, Y = (A - B*W)/2 of
// the single-issue processor (default FUSED = 0: two pipeline registers).
// A new random operand set enters every cycle, including full-scale values
// that saturate; each result is compared with the value computed here with
// the same arithmetic (B*W real and imaginary parts summed from full
// products and truncated by 15 bits, then halved and saturated), and must
// leave exactly 2 cycles after it entered, with its tag. A second pass with
// gaps in in_valid checks that out_valid follows in_valid.
module cfft_bfly_tb;
  import cfft_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic        in_valid = 1'b0;
  cplx_t       a = '0, b = '0, w = '0;
  logic [9:0]  in_tag = '0;
  logic        out_valid;
  cplx_t       x, y;
  logic [9:0]  out_tag;
  cfft_bfly dut (.*);

  int checks = 0, failures = 0;
  cplx_t ex_q [$];
  cplx_t ey_q [$];
  int    tag_q [$];
  int    t_q [$];
  int    cyc = 0;

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
    case ($urandom_range(4))
      0: return 16'sh7FFF;
      1: return 16'sh8000;
      default: return 16'($urandom);
    endcase
  endfunction

  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (rst_n && out_valid) begin
      checks++;
      if (ex_q.size() == 0) begin
        failures++;
        $display("unexpected output");
      end else begin
        cplx_t ex, ey;
        int tg, t0;
        ex = ex_q.pop_front(); ey = ey_q.pop_front(); tg = tag_q.pop_front(); t0 = t_q.pop_front();
        if (x != ex || y != ey || int'(out_tag) != tg || cyc - t0 != 2) begin
          failures++;
          if (failures < 10)
            $display("x=%0d,%0d y=%0d,%0d exp %0d,%0d %0d,%0d tag %0d/%0d latency %0d",
                     x.re, x.im, y.re, y.im, ex.re, ex.im, ey.re, ey.im, out_tag, tg, cyc - t0);
        end
      end
    end
  end

  task automatic drive(input bit v);
    @(negedge clk);
    in_valid = v;
    a.re = rnd16(); a.im = rnd16(); b.re = rnd16(); b.im = rnd16();
    w.re = rnd16(); w.im = rnd16();
    in_tag = 10'($urandom);
    if (v) begin
      longint pr, pi;
      int bwr, bwi;
      cplx_t ex, ey;
      pr  = longint'(b.re) * w.re - longint'(b.im) * w.im;
      pi  = longint'(b.re) * w.im + longint'(b.im) * w.re;
      bwr = int'(pr >>> 15);
      bwi = int'(pi >>> 15);
      ex.re = 16'(sat((a.re + bwr) >>> 1)); ex.im = 16'(sat((a.im + bwi) >>> 1));
      ey.re = 16'(sat((a.re - bwr) >>> 1)); ey.im = 16'(sat((a.im - bwi) >>> 1));
      ex_q.push_back(ex); ey_q.push_back(ey); tag_q.push_back(int'(in_tag));
      t_q.push_back(cyc);
    end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < 3000; i++) drive(1'b1);
    for (int i = 0; i < 3000; i++) drive(1'($urandom_range(1)));
    @(negedge clk); in_valid = 1'b0;
    repeat (5) @(posedge clk);
    checks++;
    if (ex_q.size() != 0) begin
      failures++;
      $display("%0d results never came out", ex_q.size());
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// cfft_s_proc_tb: runs cached-FFT programs on the single-issue processor and
// compares the result, word for word, with a plain radix-2 FFT written here
// in the testbench (same Q1.15 arithmetic: products truncated by 15 bits,
// each butterfly output halved and saturated), so the check does not depend
// on the processor's cached addressing.
//
// Sizes run: 16 (4-point cache, passes hazard on each other, so the
// interlock stalls), 64 and 256 balanced, 128 unbalanced (4 + 3 passes),
// 64 modified (16-point cache in both epochs, 4 + 2 passes), 1024 balanced
// (full 32-register cache). A micro-program checks the butterfly latency:
// a WRITE of a butterfly's destination must wait exactly 3 cycles in EX1,
// and 16 repeated butterflies of one pass must issue on 16 consecutive
// cycles without a stall.
module cfft_s_proc_tb;
  import cfft_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic        start, busy, done, pm_we, dm_we;
  logic [7:0]  pm_addr;
  logic [23:0] pm_wdata;
  logic [9:0]  dm_addr;
  logic [31:0] dm_wdata, dm_rdata;
  logic [31:0] cnt_cycles, cnt_bfly, cnt_stall, cnt_flush, cnt_rpt;

  cfft_s_proc dut (.*);

  int checks = 0, failures = 0;
  int n_stall_runs = 0, n_flush_runs = 0, n_rpt_runs = 0;

  initial begin : watchdog
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [23:0] prog [256];
  int          plen;

  function automatic int bitrev(int v, int bits);
    int r = 0;
    for (int i = 0; i < bits; i++) if (v & (1 << i)) r |= 1 << (bits - 1 - i);
    return r;
  endfunction

  task automatic emit(input logic [23:0] ins);
    prog[plen] = ins;
    plen++;
  endtask

  // one epoch: c cache bits used, np passes, g group bits
  task automatic gen_epoch(input int lg, input int e, input int c, input int np, input int g);
    int loop;
    emit(i_setctr(4'(lg), 3'(np), 3'(c - 1), 4'(g)));
    emit(i_ldi(3'd0, 16'd0));
    emit(i_ldi(3'd7, 16'(1 << g)));
    loop = plen;
    emit(i_setrp(3'd0, (e == 0) ? 4'(c) : 4'd0));
    emit(i_setcp(5'd0));
    emit(i_rpt(16'(1 << c)));
    emit(i_read(1'b1, (e == 0) ? 10'd1 : 10'(1 << g)));
    emit(i_ldi(3'd1, 16'd0));
    emit(i_ldi(3'd2, 16'd0));
    emit(i_rpt(16'(np * (1 << (c - 1)))));
    emit(i_bfly(3'd0, 3'd1, 3'd2, 2'(e)));
    emit(i_setrp(3'd0, (e == 0) ? 4'(c) : 4'd0));
    emit(i_setcp(5'd0));
    emit(i_rpt(16'(1 << c)));
    emit(i_write(1'b1, (e == 0) ? 10'd1 : 10'(1 << g)));
    emit(i_addi(3'd0, 16'd1));
    emit(i_dbnz(3'd7, 8'(loop)));
  endtask

  task automatic load_and_run(output int cycles);
    for (int i = 0; i < plen; i++) begin
      @(negedge clk); pm_we = 1'b1; pm_addr = 8'(i); pm_wdata = prog[i];
    end
    @(negedge clk); pm_we = 1'b0; start = 1'b1;
    @(negedge clk); start = 1'b0;
    while (!done) @(posedge clk);
    cycles = cnt_cycles;
    @(negedge clk);
  endtask

  // reference
  typedef struct { int re; int im; } ci_t;

  function automatic int sat(int v);
    if (v > 32767) return 32767;
    if (v < -32768) return -32768;
    return v;
  endfunction

  function automatic ci_t tw_ref(int k);
    ci_t w;
    real ph = 2.0 * 3.14159265358979323846 * k / 1024.0;
    w.re = $rtoi($floor(32767.0 * $cos(ph) + 0.5));
    w.im = $rtoi($floor(-32767.0 * $sin(ph) + 0.5));
    return w;
  endfunction

  task automatic run_fft(input string name, input int lg, input int c0, input int np0,
                         input int c1, input int np1);
    int n = 1 << lg;
    ci_t x [1024];
    ci_t r [1024];
    int cycles, bad;
    // program
    plen = 0;
    gen_epoch(lg, 0, c0, np0, lg - c0);
    gen_epoch(lg, 1, c1, np1, lg - c1);
    emit(i_halt());
    // data, |re|,|im| < 0.5
    for (int i = 0; i < n; i++) begin
      x[i].re = int'($urandom_range(32767)) - 16384;
      x[i].im = int'($urandom_range(32767)) - 16384;
      @(negedge clk); dm_we = 1'b1; dm_addr = 10'(i);
      dm_wdata = {x[i].re[15:0], x[i].im[15:0]};
    end
    @(negedge clk); dm_we = 1'b0;
    // reference radix-2 DIT, bit-reversed input
    for (int i = 0; i < n; i++) r[i] = x[bitrev(i, lg)];
    for (int s = 0; s < lg; s++) begin
      int h = 1 << s;
      for (int blk = 0; blk < n; blk += 2 * h)
        for (int j = 0; j < h; j++) begin
          ci_t a, b, w, o1, o2;
          longint pr, pi;
          int br, bi;
          a = r[blk + j]; b = r[blk + j + h];
          w = tw_ref(j << (9 - s));
          pr = longint'(b.re) * w.re - longint'(b.im) * w.im;
          pi = longint'(b.re) * w.im + longint'(b.im) * w.re;
          br = int'(pr >>> 15); bi = int'(pi >>> 15);
          o1.re = sat((a.re + br) >>> 1); o1.im = sat((a.im + bi) >>> 1);
          o2.re = sat((a.re - br) >>> 1); o2.im = sat((a.im - bi) >>> 1);
          r[blk + j] = o1; r[blk + j + h] = o2;
        end
    end
    load_and_run(cycles);
    bad = 0;
    for (int k = 0; k < n; k++) begin
      logic [31:0] got;
      @(negedge clk); dm_addr = 10'(bitrev(k, lg));
      #1 got = dm_rdata;
      checks++;
      if ($signed(got[31:16]) != r[k].re || $signed(got[15:0]) != r[k].im) begin
        failures++;
        if (bad < 5) $display("%s: X[%0d] got %0d,%0d expected %0d,%0d", name, k,
                              $signed(got[31:16]), $signed(got[15:0]), r[k].re, r[k].im);
        bad++;
      end
    end
    checks++;
    if (cnt_bfly != 32'(n / 2 * lg)) begin
      failures++;
      $display("%s: %0d butterflies, expected %0d", name, cnt_bfly, n / 2 * lg);
    end
    if (cnt_stall != 0) n_stall_runs++;
    if (cnt_flush != 0) n_flush_runs++;
    if (cnt_rpt != 0)   n_rpt_runs++;
    $display("%s: N=%0d cycles=%0d butterflies=%0d stalls=%0d flushes=%0d mismatches=%0d",
             name, n, cycles, cnt_bfly, cnt_stall, cnt_flush, bad);
  endtask

  initial begin
    int cycles;
    start = 0; pm_we = 0; dm_we = 0; pm_addr = 0; pm_wdata = 0; dm_addr = 0; dm_wdata = 0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    run_fft("fft16",        4, 2, 2, 2, 2);
    run_fft("fft64",        6, 3, 3, 3, 3);
    run_fft("fft128_unbal", 7, 4, 4, 3, 3);
    run_fft("fft64_mod",    6, 4, 4, 4, 2);
    run_fft("fft256",       8, 4, 4, 4, 4);
    run_fft("fft1024",     10, 5, 5, 5, 5);

    // latency: one BFLY then WRITE of CR[0] waits 3 cycles
    plen = 0;
    emit(i_setctr(4'd5, 3'd5, 3'd4, 4'd0));
    emit(i_ldi(3'd0, 16'd0)); emit(i_ldi(3'd1, 16'd0)); emit(i_ldi(3'd2, 16'd0));
    emit(i_setrp(3'd0, 4'd0)); emit(i_setcp(5'd0));
    emit(i_bfly(3'd0, 3'd1, 3'd2, 2'd0));
    emit(i_write(1'b0, 10'd1));
    emit(i_halt());
    load_and_run(cycles);
    checks++;
    if (cnt_stall != 3) begin
      failures++;
      $display("BFLY->WRITE interlock: %0d stall cycles, expected 3", cnt_stall);
    end
    // rate: 16 butterflies of one pass back to back, then 16 of the next
    // pass (no overlap with a 32-register cache), no stall
    plen = 0;
    emit(i_setctr(4'd5, 3'd5, 3'd4, 4'd0));
    emit(i_ldi(3'd0, 16'd0)); emit(i_ldi(3'd1, 16'd0)); emit(i_ldi(3'd2, 16'd0));
    emit(i_rpt(16'd32));
    emit(i_bfly(3'd0, 3'd1, 3'd2, 2'd0));
    emit(i_halt());
    load_and_run(cycles);
    checks++;
    if (cnt_stall != 0 || cnt_bfly != 32) begin
      failures++;
      $display("BFLY rate: %0d stalls, %0d butterflies", cnt_stall, cnt_bfly);
    end
    // FE, DC, RPT(1 DC slot), 32 issues, HALT in EX1 then drain EX2-EX4
    checks++;
    if (cycles != 2 + 4 + 32 + 1 + 3 + 1) begin
      failures++;
      $display("BFLY rate: %0d cycles", cycles);
    end
    $display("runs with stalls=%0d with flushes=%0d with repeats=%0d",
             n_stall_runs, n_flush_runs, n_rpt_runs);
    checks++;
    if (n_stall_runs == 0 || n_flush_runs == 0 || n_rpt_runs == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

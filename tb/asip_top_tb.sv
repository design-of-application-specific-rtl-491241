// asip_top_tb: end-to-end test of the four processors in asip_top, at the
// top's default sizes, all four running concurrently.
//
// Each processor runs the same programs as its own testbench, generated
// here (cached FFTs of 16 to 1024 points on the single-issue and the VLIW
// processor, FHTs of 16 to 2048 points on the FHT processor, cached FHTs of
// 64 to 2048 points on the cached-FHT processor), and every output word is
// compared with a reference transform computed here with the same
// fixed-point arithmetic. On every done pulse the processor's counters are
// added up, and the test fails if one of the mechanisms the processors are
// built around never happened:
//   CFFT-S  interlock stall, branch flush, zero-overhead repeat
//   CFFT-V  four butterflies in one bundle, branch flush, repeat, and the
//           hazard a badly scheduled program runs into (no interlock)
//   FHT     memory-port stall between dual butterflies, register stall of a
//           STORE, branch flush
//   CFHT    dual butterflies from the cache, repeat, branch flush, and the
//           hazard of a badly scheduled program
module asip_top_tb;
  import cfft_pkg::*;
  import fht_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic        cs_start, cs_busy, cs_done, cs_pm_we, cs_dm_we;
  logic [7:0]  cs_pm_addr;
  logic [23:0] cs_pm_wdata;
  logic [9:0]  cs_dm_addr;
  logic [31:0] cs_dm_wdata, cs_dm_rdata;
  logic [31:0] cs_cnt_cycles, cs_cnt_bfly, cs_cnt_stall, cs_cnt_flush, cs_cnt_rpt;
  logic        cv_start, cv_busy, cv_done, cv_pm_we, cv_dm_we;
  logic [7:0]  cv_pm_addr;
  logic [95:0] cv_pm_wdata;
  logic [9:0]  cv_dm_addr;
  logic [31:0] cv_dm_wdata, cv_dm_rdata;
  logic [31:0] cv_cnt_cycles, cv_cnt_bfly, cv_cnt_hazard, cv_cnt_conflict, cv_cnt_flush, cv_cnt_rpt;
  logic        fh_start, fh_busy, fh_done, fh_pm_we, fh_dm_we;
  logic [7:0]  fh_pm_addr;
  logic [23:0] fh_pm_wdata;
  logic [10:0] fh_dm_addr;
  logic [15:0] fh_dm_wdata, fh_dm_rdata;
  logic [31:0] fh_cnt_cycles, fh_cnt_dbf, fh_cnt_mem_stall, fh_cnt_data_stall, fh_cnt_flush;
  logic        ch_start, ch_busy, ch_done, ch_pm_we, ch_dm_we;
  logic [7:0]  ch_pm_addr;
  logic [23:0] ch_pm_wdata;
  logic [10:0] ch_dm_addr;
  logic [15:0] ch_dm_wdata, ch_dm_rdata;
  logic [31:0] ch_cnt_cycles, ch_cnt_dbf, ch_cnt_hazard, ch_cnt_flush, ch_cnt_rpt;

  asip_top dut (.*);

  int checks = 0, failures = 0;

  initial begin : watchdog
    repeat (2000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // mechanism totals, gathered when each run ends
  longint cs_stalls = 0, cs_flushes = 0, cs_rpts = 0;
  longint cv_bflys = 0, cv_bundles = 0, cv_hazards = 0, cv_flushes = 0, cv_rpts = 0;
  longint fh_mem_stalls = 0, fh_data_stalls = 0, fh_flushes = 0;
  longint ch_dbfs = 0, ch_hazards = 0, ch_flushes = 0, ch_rpts = 0;
  always @(posedge clk) begin
    if (cs_done) begin
      cs_stalls += cs_cnt_stall; cs_flushes += cs_cnt_flush; cs_rpts += cs_cnt_rpt;
    end
    if (cv_done) begin
      cv_bflys += cv_cnt_bfly; cv_hazards += cv_cnt_hazard;
      cv_flushes += cv_cnt_flush; cv_rpts += cv_cnt_rpt;
    end
    if (fh_done) begin
      fh_mem_stalls += fh_cnt_mem_stall; fh_data_stalls += fh_cnt_data_stall;
      fh_flushes += fh_cnt_flush;
    end
    if (ch_done) begin
      ch_dbfs += ch_cnt_dbf; ch_hazards += ch_cnt_hazard;
      ch_flushes += ch_cnt_flush; ch_rpts += ch_cnt_rpt;
    end
  end
  // a bundle with all four butterfly slots valid
  always @(posedge clk)
    if (dut.u_cfft_v.ex_go && &dut.u_cfft_v.s_bfly) cv_bundles++;

  task automatic mechanism(input string name, input longint count);
    checks++;
    $display("mechanism %-28s happened %0d times", name, count);
    if (count == 0) begin
      failures++;
      $display("mechanism %s never happened", name);
    end
  endtask

  // ---------------------------------------------------------- cfft_s_proc_tb

  int cs_n_stall_runs = 0, cs_n_flush_runs = 0, cs_n_rpt_runs = 0;


  logic [23:0] cs_prog [256];
  int          cs_plen;

  function automatic int cs_bitrev(int v, int bits);
    int r = 0;
    for (int i = 0; i < bits; i++) if (v & (1 << i)) r |= 1 << (bits - 1 - i);
    return r;
  endfunction

  task automatic cs_emit(input logic [23:0] ins);
    cs_prog[cs_plen] = ins;
    cs_plen++;
  endtask

  // one epoch: c cache bits used, np passes, g group bits
  task automatic cs_gen_epoch(input int lg, input int e, input int c, input int np, input int g);
    int loop;
    cs_emit(i_setctr(4'(lg), 3'(np), 3'(c - 1), 4'(g)));
    cs_emit(i_ldi(3'd0, 16'd0));
    cs_emit(i_ldi(3'd7, 16'(1 << g)));
    loop = cs_plen;
    cs_emit(i_setrp(3'd0, (e == 0) ? 4'(c) : 4'd0));
    cs_emit(i_setcp(5'd0));
    cs_emit(i_rpt(16'(1 << c)));
    cs_emit(i_read(1'b1, (e == 0) ? 10'd1 : 10'(1 << g)));
    cs_emit(i_ldi(3'd1, 16'd0));
    cs_emit(i_ldi(3'd2, 16'd0));
    cs_emit(i_rpt(16'(np * (1 << (c - 1)))));
    cs_emit(i_bfly(3'd0, 3'd1, 3'd2, 2'(e)));
    cs_emit(i_setrp(3'd0, (e == 0) ? 4'(c) : 4'd0));
    cs_emit(i_setcp(5'd0));
    cs_emit(i_rpt(16'(1 << c)));
    cs_emit(i_write(1'b1, (e == 0) ? 10'd1 : 10'(1 << g)));
    cs_emit(i_addi(3'd0, 16'd1));
    cs_emit(i_dbnz(3'd7, 8'(loop)));
  endtask

  task automatic cs_load_and_run(output int cycles);
    for (int i = 0; i < cs_plen; i++) begin
      @(negedge clk); cs_pm_we = 1'b1; cs_pm_addr = 8'(i); cs_pm_wdata = cs_prog[i];
    end
    @(negedge clk); cs_pm_we = 1'b0; cs_start = 1'b1;
    @(negedge clk); cs_start = 1'b0;
    while (!cs_done) @(posedge clk);
    cycles = cs_cnt_cycles;
    @(negedge clk);
  endtask

  // reference
  typedef struct { int re; int im; } cs_ci_t;

  function automatic int cs_sat(int v);
    if (v > 32767) return 32767;
    if (v < -32768) return -32768;
    return v;
  endfunction

  function automatic cs_ci_t cs_tw_ref(int k);
    cs_ci_t w;
    real ph = 2.0 * 3.14159265358979323846 * k / 1024.0;
    w.re = $rtoi($floor(32767.0 * $cos(ph) + 0.5));
    w.im = $rtoi($floor(-32767.0 * $sin(ph) + 0.5));
    return w;
  endfunction

  task automatic cs_run_fft(input string name, input int lg, input int c0, input int np0,
                         input int c1, input int np1);
    int n = 1 << lg;
    cs_ci_t x [1024];
    cs_ci_t r [1024];
    int cycles, bad;
    // program
    cs_plen = 0;
    cs_gen_epoch(lg, 0, c0, np0, lg - c0);
    cs_gen_epoch(lg, 1, c1, np1, lg - c1);
    cs_emit(i_halt());
    // data, |re|,|im| < 0.5
    for (int i = 0; i < n; i++) begin
      x[i].re = int'($urandom_range(32767)) - 16384;
      x[i].im = int'($urandom_range(32767)) - 16384;
      @(negedge clk); cs_dm_we = 1'b1; cs_dm_addr = 10'(i);
      cs_dm_wdata = {x[i].re[15:0], x[i].im[15:0]};
    end
    @(negedge clk); cs_dm_we = 1'b0;
    // reference radix-2 DIT, bit-reversed input
    for (int i = 0; i < n; i++) r[i] = x[cs_bitrev(i, lg)];
    for (int s = 0; s < lg; s++) begin
      int h = 1 << s;
      for (int blk = 0; blk < n; blk += 2 * h)
        for (int j = 0; j < h; j++) begin
          cs_ci_t a, b, w, o1, o2;
          longint pr, pi;
          int br, bi;
          a = r[blk + j]; b = r[blk + j + h];
          w = cs_tw_ref(j << (9 - s));
          pr = longint'(b.re) * w.re - longint'(b.im) * w.im;
          pi = longint'(b.re) * w.im + longint'(b.im) * w.re;
          br = int'(pr >>> 15); bi = int'(pi >>> 15);
          o1.re = cs_sat((a.re + br) >>> 1); o1.im = cs_sat((a.im + bi) >>> 1);
          o2.re = cs_sat((a.re - br) >>> 1); o2.im = cs_sat((a.im - bi) >>> 1);
          r[blk + j] = o1; r[blk + j + h] = o2;
        end
    end
    cs_load_and_run(cycles);
    bad = 0;
    for (int k = 0; k < n; k++) begin
      logic [31:0] got;
      @(negedge clk); cs_dm_addr = 10'(cs_bitrev(k, lg));
      #1 got = cs_dm_rdata;
      checks++;
      if ($signed(got[31:16]) != r[k].re || $signed(got[15:0]) != r[k].im) begin
        failures++;
        if (bad < 5) $display("[cs] %s: X[%0d] got %0d,%0d expected %0d,%0d", name, k,
                              $signed(got[31:16]), $signed(got[15:0]), r[k].re, r[k].im);
        bad++;
      end
    end
    checks++;
    if (cs_cnt_bfly != 32'(n / 2 * lg)) begin
      failures++;
      $display("[cs] %s: %0d butterflies, expected %0d", name, cs_cnt_bfly, n / 2 * lg);
    end
    if (cs_cnt_stall != 0) cs_n_stall_runs++;
    if (cs_cnt_flush != 0) cs_n_flush_runs++;
    if (cs_cnt_rpt != 0)   cs_n_rpt_runs++;
    $display("[cs] %s: N=%0d cycles=%0d butterflies=%0d stalls=%0d flushes=%0d mismatches=%0d",
             name, n, cycles, cs_cnt_bfly, cs_cnt_stall, cs_cnt_flush, bad);
  endtask

  task automatic cs_main();
    int cycles;
    cs_start = 0; cs_pm_we = 0; cs_dm_we = 0; cs_pm_addr = 0; cs_pm_wdata = 0; cs_dm_addr = 0; cs_dm_wdata = 0;
    cs_run_fft("fft16",        4, 2, 2, 2, 2);
    cs_run_fft("fft64",        6, 3, 3, 3, 3);
    cs_run_fft("fft128_unbal", 7, 4, 4, 3, 3);
    cs_run_fft("fft64_mod",    6, 4, 4, 4, 2);
    cs_run_fft("fft256",       8, 4, 4, 4, 4);
    cs_run_fft("fft1024",     10, 5, 5, 5, 5);

    // latency: one BFLY then WRITE of CR[0] waits 3 cycles
    cs_plen = 0;
    cs_emit(i_setctr(4'd5, 3'd5, 3'd4, 4'd0));
    cs_emit(i_ldi(3'd0, 16'd0)); cs_emit(i_ldi(3'd1, 16'd0)); cs_emit(i_ldi(3'd2, 16'd0));
    cs_emit(i_setrp(3'd0, 4'd0)); cs_emit(i_setcp(5'd0));
    cs_emit(i_bfly(3'd0, 3'd1, 3'd2, 2'd0));
    cs_emit(i_write(1'b0, 10'd1));
    cs_emit(i_halt());
    cs_load_and_run(cycles);
    checks++;
    if (cs_cnt_stall != 3) begin
      failures++;
      $display("[cs] BFLY->WRITE interlock: %0d stall cycles, expected 3", cs_cnt_stall);
    end
    // rate: 16 butterflies of one pass back to back, then 16 of the next
    // pass (no overlap with a 32-register cache), no stall
    cs_plen = 0;
    cs_emit(i_setctr(4'd5, 3'd5, 3'd4, 4'd0));
    cs_emit(i_ldi(3'd0, 16'd0)); cs_emit(i_ldi(3'd1, 16'd0)); cs_emit(i_ldi(3'd2, 16'd0));
    cs_emit(i_rpt(16'd32));
    cs_emit(i_bfly(3'd0, 3'd1, 3'd2, 2'd0));
    cs_emit(i_halt());
    cs_load_and_run(cycles);
    checks++;
    if (cs_cnt_stall != 0 || cs_cnt_bfly != 32) begin
      failures++;
      $display("[cs] BFLY rate: %0d stalls, %0d butterflies", cs_cnt_stall, cs_cnt_bfly);
    end
    // FE, DC, RPT(1 DC slot), 32 issues, HALT in EX1 then drain EX2-EX4
    checks++;
    if (cycles != 2 + 4 + 32 + 1 + 3 + 1) begin
      failures++;
      $display("[cs] BFLY rate: %0d cycles", cycles);
    end
    $display("[cs] runs with stalls=%0d with flushes=%0d with repeats=%0d",
             cs_n_stall_runs, cs_n_flush_runs, cs_n_rpt_runs);
    checks++;
    if (cs_n_stall_runs == 0 || cs_n_flush_runs == 0 || cs_n_rpt_runs == 0) failures++;
  endtask

  // ---------------------------------------------------------- cfft_vliw_proc_tb

  int cv_n_hazard_runs = 0, cv_n_flush_runs = 0, cv_n_rpt_runs = 0;


  logic [95:0] cv_prog [256];
  int          cv_plen;

  function automatic int cv_bitrev(int v, int bits);
    int r = 0;
    for (int i = 0; i < bits; i++) if (v & (1 << i)) r |= 1 << (bits - 1 - i);
    return r;
  endfunction

  task automatic cv_emit(input logic [23:0] ins);
    cv_prog[cv_plen] = {72'd0, ins};
    cv_plen++;
  endtask

  task automatic cv_emit4(input logic [23:0] s0, input logic [23:0] s1,
                       input logic [23:0] s2, input logic [23:0] s3);
    cv_prog[cv_plen] = {s3, s2, s1, s0};
    cv_plen++;
  endtask

  // one epoch of the modified algorithm with a 32-register cache
  task automatic cv_gen_epoch(input int lg, input int e, input int np, input int g, input bit nops);
    int loop;
    cv_emit(i_setctr(4'(lg), 3'(np), 3'd4, 4'(g)));
    cv_emit(i_ldi(3'd0, 16'd0));
    cv_emit(i_ldi(3'd7, 16'(1 << g)));
    loop = cv_plen;
    cv_emit(i_setrp(3'd0, (e == 0) ? 4'd5 : 4'd0));
    cv_emit(i_setcp(5'd0));
    cv_emit(i_rpt(16'd32));
    cv_emit(i_read(1'b1, (e == 0) ? 10'd1 : 10'(1 << g)));
    cv_emit(i_ldi(3'd1, 16'd0));
    cv_emit(i_ldi(3'd2, 16'd0));
    cv_emit(i_ldi(3'd3, 16'd4));
    cv_emit(i_ldi(3'd4, 16'd8));
    cv_emit(i_ldi(3'd5, 16'd12));
    if (nops) begin
      // one RPT per pass: the RPT slot in DC separates the passes by a cycle
      for (int p = 0; p < np; p++) begin
        cv_emit(i_rpt(16'd4));
        cv_emit4(i_bfly(3'd0, 3'd1, 3'd2, 2'(e)), i_bfly(3'd0, 3'd1, 3'd3, 2'(e)),
              i_bfly(3'd0, 3'd1, 3'd4, 2'(e)), i_bfly(3'd0, 3'd1, 3'd5, 2'(e)));
      end
    end else begin
      // all passes back to back: pass p+1 reads what pass p is still writing
      cv_emit(i_rpt(16'(4 * np)));
      cv_emit4(i_bfly(3'd0, 3'd1, 3'd2, 2'(e)), i_bfly(3'd0, 3'd1, 3'd3, 2'(e)),
            i_bfly(3'd0, 3'd1, 3'd4, 2'(e)), i_bfly(3'd0, 3'd1, 3'd5, 2'(e)));
    end
    cv_emit(i_nop());
    cv_emit(i_setrp(3'd0, (e == 0) ? 4'd5 : 4'd0));
    cv_emit(i_setcp(5'd0));
    cv_emit(i_rpt(16'd32));
    cv_emit(i_write(1'b1, (e == 0) ? 10'd1 : 10'(1 << g)));
    cv_emit(i_addi(3'd0, 16'd1));
    cv_emit(i_dbnz(3'd7, 8'(loop)));
  endtask

  task automatic cv_load_and_run(output int cycles);
    for (int i = 0; i < cv_plen; i++) begin
      @(negedge clk); cv_pm_we = 1'b1; cv_pm_addr = 8'(i); cv_pm_wdata = cv_prog[i];
    end
    @(negedge clk); cv_pm_we = 1'b0; cv_start = 1'b1;
    @(negedge clk); cv_start = 1'b0;
    while (!cv_done) @(posedge clk);
    cycles = cv_cnt_cycles;
    @(negedge clk);
  endtask

  // reference
  typedef struct { int re; int im; } cv_ci_t;

  function automatic int cv_sat(int v);
    if (v > 32767) return 32767;
    if (v < -32768) return -32768;
    return v;
  endfunction

  function automatic cv_ci_t cv_tw_ref(int k);
    cv_ci_t w;
    real ph = 2.0 * 3.14159265358979323846 * k / 1024.0;
    w.re = $rtoi($floor(32767.0 * $cos(ph) + 0.5));
    w.im = $rtoi($floor(-32767.0 * $sin(ph) + 0.5));
    return w;
  endfunction

  task automatic cv_run_fft(input string name, input int lg, input bit nops);
    int n = 1 << lg;
    cv_ci_t x [1024];
    cv_ci_t r [1024];
    int cycles, bad;
    // program
    cv_plen = 0;
    cv_gen_epoch(lg, 0, 5, lg - 5, nops);
    cv_gen_epoch(lg, 1, lg - 5, lg - 5, nops);
    cv_emit(i_halt());
    // data, |re|,|im| < 0.5
    for (int i = 0; i < n; i++) begin
      x[i].re = int'($urandom_range(32767)) - 16384;
      x[i].im = int'($urandom_range(32767)) - 16384;
      @(negedge clk); cv_dm_we = 1'b1; cv_dm_addr = 10'(i);
      cv_dm_wdata = {x[i].re[15:0], x[i].im[15:0]};
    end
    @(negedge clk); cv_dm_we = 1'b0;
    // reference radix-2 DIT, bit-reversed input
    for (int i = 0; i < n; i++) r[i] = x[cv_bitrev(i, lg)];
    for (int s = 0; s < lg; s++) begin
      int h = 1 << s;
      for (int blk = 0; blk < n; blk += 2 * h)
        for (int j = 0; j < h; j++) begin
          cv_ci_t a, b, w, o1, o2;
          longint pr, pi;
          int br, bi;
          a = r[blk + j]; b = r[blk + j + h];
          w = cv_tw_ref(j << (9 - s));
          pr = longint'(b.re) * w.re - longint'(b.im) * w.im;
          pi = longint'(b.re) * w.im + longint'(b.im) * w.re;
          br = int'(pr >>> 15); bi = int'(pi >>> 15);
          o1.re = cv_sat((a.re + br) >>> 1); o1.im = cv_sat((a.im + bi) >>> 1);
          o2.re = cv_sat((a.re - br) >>> 1); o2.im = cv_sat((a.im - bi) >>> 1);
          r[blk + j] = o1; r[blk + j + h] = o2;
        end
    end
    cv_load_and_run(cycles);
    bad = 0;
    for (int k = 0; k < n; k++) begin
      logic [31:0] got;
      @(negedge clk); cv_dm_addr = 10'(cv_bitrev(k, lg));
      #1 got = cv_dm_rdata;
      checks++;
      if ($signed(got[31:16]) != r[k].re || $signed(got[15:0]) != r[k].im) begin
        failures++;
        if (bad < 5 && nops) $display("[cv] %s: X[%0d] got %0d,%0d expected %0d,%0d", name, k,
                              $signed(got[31:16]), $signed(got[15:0]), r[k].re, r[k].im);
        bad++;
      end
    end
    if (!nops) begin
      // only the hazard is checked; the data are expected to be wrong
      checks = checks - n + 1;
      failures = failures - bad;
      if (cv_cnt_hazard == 0) failures++;
      else cv_n_hazard_runs++;
    end else begin
      checks += 3;
      if (cv_cnt_bfly != 32'(n / 2 * lg)) begin
        failures++;
        $display("[cv] %s: %0d butterflies, expected %0d", name, cv_cnt_bfly, n / 2 * lg);
      end
      if (cv_cnt_hazard != 0) begin
        failures++;
        $display("[cv] %s: %0d hazards", name, cv_cnt_hazard);
      end
      if (cv_cnt_conflict != 0) begin
        failures++;
        $display("[cv] %s: %0d twiddle bank conflicts", name, cv_cnt_conflict);
      end
    end
    if (cv_cnt_flush != 0) cv_n_flush_runs++;
    if (cv_cnt_rpt != 0)   cv_n_rpt_runs++;
    $display("[cv] %s: N=%0d cycles=%0d butterflies=%0d hazards=%0d conflicts=%0d mismatches=%0d",
             name, n, cycles, cv_cnt_bfly, cv_cnt_hazard, cv_cnt_conflict, bad);
  endtask

  task automatic cv_main();
    int cycles;
    cv_start = 0; cv_pm_we = 0; cv_dm_we = 0; cv_pm_addr = 0; cv_pm_wdata = 0; cv_dm_addr = 0; cv_dm_wdata = 0;
    cv_run_fft("fft64",    6, 1'b1);
    cv_run_fft("fft256",   8, 1'b1);
    cv_run_fft("fft1024", 10, 1'b1);
    cv_run_fft("fft256_back_to_back", 8, 1'b0);
    $display("[cv] runs with detected hazards=%0d with flushes=%0d with repeats=%0d",
             cv_n_hazard_runs, cv_n_flush_runs, cv_n_rpt_runs);
    checks++;
    if (cv_n_hazard_runs == 0 || cv_n_flush_runs == 0 || cv_n_rpt_runs == 0) failures++;
  endtask

  // ---------------------------------------------------------- fht_proc_tb

  int fh_runs_mem_stall = 0, fh_runs_data_stall = 0, fh_runs_flush = 0;


  logic [23:0] fh_prog [256];
  int fh_plen;
  task automatic fh_emit(input logic [23:0] ins);
    fh_prog[fh_plen] = ins;
    fh_plen++;
  endtask

  function automatic int fh_bitrev(int v, int bits);
    int r = 0;
    for (int i = 0; i < bits; i++) if (v & (1 << i)) r |= 1 << (bits - 1 - i);
    return r;
  endfunction

  function automatic int fh_sat(int v);
    if (v > 32767) return 32767;
    if (v < -32768) return -32768;
    return v;
  endfunction

  function automatic int fh_rnd(real v);
    return $rtoi($floor(32767.0 * v + 0.5));
  endfunction

  task automatic fh_run_fht(input int lg);
    int n = 1 << lg;
    int bsz = (n / 4 < 8) ? n / 4 : 8;
    int x [2048];
    int h [2048];
    int nh [2048];
    int loop_s, loop_b, bad, cycles;
    // program
    fh_plen = 0;
    fh_emit(f_ldi(3'd0, 16'd1));
    fh_emit(f_ldi(3'd6, 16'(lg)));
    loop_s = fh_plen;
    fh_emit(f_ldi(3'd1, 16'd0));
    fh_emit(f_ldi(3'd7, 16'(n / 4 / bsz)));
    loop_b = fh_plen;
    for (int q = 0; q < bsz; q++) fh_emit(f_dbf(3'd0, 3'd1, 3'(q)));
    for (int r = 0; r < 2 * bsz; r++) fh_emit(f_store(4'(r)));
    fh_emit(f_dbnz(3'd7, 8'(loop_b)));
    fh_emit(f_addi(3'd0, 16'd1));
    fh_emit(f_dbnz(3'd6, 8'(loop_s)));
    fh_emit(f_halt());
    for (int i = 0; i < fh_plen; i++) begin
      @(negedge clk); fh_pm_we = 1'b1; fh_pm_addr = 8'(i); fh_pm_wdata = fh_prog[i];
    end
    @(negedge clk); fh_pm_we = 1'b0;
    // data, |x| < 0.5, stored bit-reversed
    for (int i = 0; i < n; i++) x[i] = int'($urandom_range(32767)) - 16384;
    for (int i = 0; i < n; i++) begin
      @(negedge clk); fh_dm_we = 1'b1; fh_dm_addr = 11'(i); fh_dm_wdata = 16'(x[fh_bitrev(i, lg)]);
    end
    @(negedge clk); fh_dm_we = 1'b0;
    // reference
    for (int i = 0; i < n; i++) h[i] = x[fh_bitrev(i, lg)];
    for (int s = 1; s <= lg; s++) begin
      int l = 1 << s, half = 1 << (s - 1);
      for (int blk = 0; blk < n; blk += l) begin
        for (int k = 0; k < half; k++) begin
          int t, m, c, sn;
          m = (half - k) % half;
          if (k == 0) t = h[blk + half];
          else if (s >= 2 && k == l / 4) t = h[blk + half + k];
          else begin
            if (k < l / 4) begin
              c  = fh_rnd($cos(2.0 * 3.14159265358979323846 * k / l));
              sn = fh_rnd($sin(2.0 * 3.14159265358979323846 * k / l));
            end else begin
              c  = -fh_rnd($cos(2.0 * 3.14159265358979323846 * m / l));
              sn = fh_rnd($sin(2.0 * 3.14159265358979323846 * m / l));
            end
            t = int'((longint'(c) * h[blk + half + k] + longint'(sn) * h[blk + half + m]) >>> 15);
          end
          nh[blk + k]        = fh_sat((h[blk + k] + t) >>> 1);
          nh[blk + half + k] = fh_sat((h[blk + k] - t) >>> 1);
        end
      end
      for (int i = 0; i < n; i++) h[i] = nh[i];
    end
    // run
    @(negedge clk); fh_start = 1'b1;
    @(negedge clk); fh_start = 1'b0;
    while (!fh_done) @(posedge clk);
    cycles = fh_cnt_cycles;
    bad = 0;
    for (int k = 0; k < n; k++) begin
      @(negedge clk); fh_dm_addr = 11'(k);
      #1;
      checks++;
      if ($signed(fh_dm_rdata) != h[k]) begin
        failures++;
        if (bad < 5) $display("[fh] N=%0d H[%0d] got %0d expected %0d", n, k, $signed(fh_dm_rdata), h[k]);
        bad++;
      end
      if (lg == 6) begin
        real acc = 0.0;
        for (int i = 0; i < n; i++)
          acc += real'(x[i]) * ($cos(2.0 * 3.14159265358979323846 * i * k / n) +
                                $sin(2.0 * 3.14159265358979323846 * i * k / n));
        acc = acc / n;
        checks++;
        if (acc - real'($signed(fh_dm_rdata)) > 12.0 || real'($signed(fh_dm_rdata)) - acc > 12.0) begin
          failures++;
          if (bad < 5) $display("[fh] N=64 H[%0d] got %0d, DHT/N = %f", k, $signed(fh_dm_rdata), acc);
          bad++;
        end
      end
    end
    checks += 2;
    if (fh_cnt_dbf != 32'(n / 4 * lg)) begin
      failures++;
      $display("[fh] N=%0d: %0d dual butterflies, expected %0d", n, fh_cnt_dbf, n / 4 * lg);
    end
    // every DBF after the first of a batch waits one cycle for the ports
    if (fh_cnt_mem_stall < 32'((bsz - 1) * (n / 4 / bsz) * lg)) begin
      failures++;
      $display("[fh] N=%0d: %0d memory stalls", n, fh_cnt_mem_stall);
    end
    if (fh_cnt_mem_stall != 0)  fh_runs_mem_stall++;
    if (fh_cnt_data_stall != 0) fh_runs_data_stall++;
    if (fh_cnt_flush != 0)      fh_runs_flush++;
    $display("[fh] FHT N=%0d cycles=%0d dbf=%0d mem_stalls=%0d data_stalls=%0d mismatches=%0d",
             n, cycles, fh_cnt_dbf, fh_cnt_mem_stall, fh_cnt_data_stall, bad);
  endtask

  task automatic fh_main();
    fh_start = 0; fh_pm_we = 0; fh_dm_we = 0; fh_pm_addr = 0; fh_pm_wdata = 0; fh_dm_addr = 0; fh_dm_wdata = 0;
    fh_run_fht(4);
    fh_run_fht(6);
    fh_run_fht(8);
    fh_run_fht(10);
    fh_run_fht(11);
    // STORE right behind the DBF that writes its registers: one port stall
    // (DBF in MEM), then two register stalls (DBF in MEM&MUL and ADD)
    begin
      int m [4];
      int e [4];
      fh_plen = 0;
      fh_emit(f_ldi(3'd0, 16'd3));
      fh_emit(f_ldi(3'd1, 16'd0));
      fh_emit(f_dbf(3'd0, 3'd1, 3'd0));
      fh_emit(f_store(4'd0));
      fh_emit(f_store(4'd1));
      fh_emit(f_halt());
      for (int i = 0; i < fh_plen; i++) begin
        @(negedge clk); fh_pm_we = 1'b1; fh_pm_addr = 8'(i); fh_pm_wdata = fh_prog[i];
      end
      @(negedge clk); fh_pm_we = 1'b0;
      // stage 3, butterfly 0: X0 = 0, X1 = 4, Y0 = 2, Y1 = 6, no multiplication
      foreach (m[i]) begin
        @(negedge clk); fh_dm_addr = 11'((i == 0) ? 0 : (i == 1) ? 4 : (i == 2) ? 2 : 6);
        #1 m[i] = $signed(fh_dm_rdata);
      end
      e[0] = (m[0] + m[1]) >>> 1; e[1] = (m[0] - m[1]) >>> 1;
      e[2] = (m[2] + m[3]) >>> 1; e[3] = (m[2] - m[3]) >>> 1;
      @(negedge clk); fh_start = 1'b1;
      @(negedge clk); fh_start = 1'b0;
      while (!fh_done) @(posedge clk);
      checks++;
      if (fh_cnt_data_stall != 2 || fh_cnt_mem_stall != 1) begin
        failures++;
        $display("[fh] STORE after DBF: %0d register stalls, %0d port stalls", fh_cnt_data_stall, fh_cnt_mem_stall);
      end
      if (fh_cnt_data_stall != 0) fh_runs_data_stall++;
      foreach (e[i]) begin
        @(negedge clk); fh_dm_addr = 11'((i == 0) ? 0 : (i == 1) ? 4 : (i == 2) ? 2 : 6);
        #1;
        checks++;
        if ($signed(fh_dm_rdata) != e[i]) begin
          failures++;
          $display("[fh] STORE after DBF: word %0d got %0d expected %0d", i, $signed(fh_dm_rdata), e[i]);
        end
      end
    end
    checks++;
    if (fh_runs_mem_stall == 0 || fh_runs_data_stall == 0 || fh_runs_flush == 0) begin
      failures++;
      $display("[fh] a mechanism never happened: mem=%0d data=%0d flush=%0d",
               fh_runs_mem_stall, fh_runs_data_stall, fh_runs_flush);
    end
  endtask

  // ---------------------------------------------------------- cfht_proc_tb



  logic [23:0] ch_prog [256];
  int ch_plen;
  task automatic ch_emit(input logic [23:0] ins);
    ch_prog[ch_plen] = ins;
    ch_plen++;
  endtask

  function automatic int ch_bitrev(int v, int bits);
    int r = 0;
    for (int i = 0; i < bits; i++) if (v & (1 << i)) r |= 1 << (bits - 1 - i);
    return r;
  endfunction

  function automatic int ch_sat(int v);
    if (v > 32767) return 32767;
    if (v < -32768) return -32768;
    return v;
  endfunction

  function automatic int ch_rnd(real v);
    return $rtoi($floor(32767.0 * v + 0.5));
  endfunction

  // one epoch: r0 = G, r1 = pass, r2 = butterfly, r7 = group counter
  task automatic ch_gen_epoch(input logic e, input int c0, input int r, input int lg,
                           input int gap);
    int ngroups = e ? (1 << (c0 - 1)) : (1 << (lg - c0));
    int h       = e ? (1 << r) : (1 << (c0 - 1));
    int npass   = e ? r : c0;
    int nbf     = e ? (1 << (r - 1)) : (1 << (c0 - 2));
    int inc     = e ? (1 << c0) : 1;
    int loop_g;
    ch_emit(f_ldi(3'd0, 16'd0));
    ch_emit(f_ldi(3'd7, 16'(ngroups)));
    loop_g = ch_plen;
    ch_emit(f_setrp(3'd0, e));
    ch_emit(f_setcp(5'd0));
    ch_emit(f_rpt(16'(h)));
    ch_emit(f_read2(12'(inc)));
    ch_emit(f_ldi(3'd1, 16'd0));
    ch_emit(f_ldi(3'd2, 16'd0));
    if (gap != 0) begin
      for (int p = 0; p < npass; p++) begin
        ch_emit(f_rpt(16'(nbf)));
        ch_emit(f_cdbf(3'd0, 3'd1, 3'd2, e));
        ch_emit(f_nop());
      end
    end else begin
      ch_emit(f_rpt(16'(nbf * npass)));
      ch_emit(f_cdbf(3'd0, 3'd1, 3'd2, e));
    end
    ch_emit(f_setrp(3'd0, e));
    ch_emit(f_setcp(5'd0));
    ch_emit(f_rpt(16'(h)));
    ch_emit(f_write2(12'(inc)));
    ch_emit(f_addi(3'd0, 16'd1));
    ch_emit(f_dbnz(3'd7, 8'(loop_g)));
  endtask

  task automatic ch_run_cfht(input int lg, input int c0, input int gap);
    int n = 1 << lg;
    int r = lg - c0;
    int x [2048];
    int h [2048];
    int nh [2048];
    int bad, cycles;
    ch_plen = 0;
    ch_emit(f_setctr(3'(c0), 3'(r)));
    ch_gen_epoch(1'b0, c0, r, lg, gap);
    ch_gen_epoch(1'b1, c0, r, lg, gap);
    ch_emit(f_halt());
    for (int i = 0; i < ch_plen; i++) begin
      @(negedge clk); ch_pm_we = 1'b1; ch_pm_addr = 8'(i); ch_pm_wdata = ch_prog[i];
    end
    @(negedge clk); ch_pm_we = 1'b0;
    for (int i = 0; i < n; i++) x[i] = int'($urandom_range(32767)) - 16384;
    for (int i = 0; i < n; i++) begin
      @(negedge clk); ch_dm_we = 1'b1; ch_dm_addr = 11'(i); ch_dm_wdata = 16'(x[ch_bitrev(i, lg)]);
    end
    @(negedge clk); ch_dm_we = 1'b0;
    // reference
    for (int i = 0; i < n; i++) h[i] = x[ch_bitrev(i, lg)];
    for (int s = 1; s <= lg; s++) begin
      int l = 1 << s, half = 1 << (s - 1);
      for (int blk = 0; blk < n; blk += l) begin
        for (int k = 0; k < half; k++) begin
          int t, m, c, sn;
          m = (half - k) % half;
          if (k == 0) t = h[blk + half];
          else if (s >= 2 && k == l / 4) t = h[blk + half + k];
          else begin
            if (k < l / 4) begin
              c  = ch_rnd($cos(2.0 * 3.14159265358979323846 * k / l));
              sn = ch_rnd($sin(2.0 * 3.14159265358979323846 * k / l));
            end else begin
              c  = -ch_rnd($cos(2.0 * 3.14159265358979323846 * m / l));
              sn = ch_rnd($sin(2.0 * 3.14159265358979323846 * m / l));
            end
            t = int'((longint'(c) * h[blk + half + k] + longint'(sn) * h[blk + half + m]) >>> 15);
          end
          nh[blk + k]        = ch_sat((h[blk + k] + t) >>> 1);
          nh[blk + half + k] = ch_sat((h[blk + k] - t) >>> 1);
        end
      end
      for (int i = 0; i < n; i++) h[i] = nh[i];
    end
    @(negedge clk); ch_start = 1'b1;
    @(negedge clk); ch_start = 1'b0;
    while (!ch_done) @(posedge clk);
    cycles = ch_cnt_cycles;
    bad = 0;
    for (int k = 0; k < n; k++) begin
      @(negedge clk); ch_dm_addr = 11'(k);
      #1;
      if (gap != 0) begin
        checks++;
        if ($signed(ch_dm_rdata) != h[k]) begin
          failures++;
          if (bad < 5) $display("[ch] N=%0d H[%0d] got %0d expected %0d", n, k, $signed(ch_dm_rdata), h[k]);
          bad++;
        end
      end else if ($signed(ch_dm_rdata) != h[k]) bad++;
      if (lg == 6) begin
        real acc = 0.0;
        for (int i = 0; i < n; i++)
          acc += real'(x[i]) * ($cos(2.0 * 3.14159265358979323846 * i * k / n) +
                                $sin(2.0 * 3.14159265358979323846 * i * k / n));
        acc = acc / n;
        checks++;
        if (acc - real'($signed(ch_dm_rdata)) > 12.0 || real'($signed(ch_dm_rdata)) - acc > 12.0) begin
          failures++;
          if (bad < 5) $display("[ch] N=64 H[%0d] got %0d, DHT/N = %f", k, $signed(ch_dm_rdata), acc);
          bad++;
        end
      end
    end
    checks += 2;
    if (ch_cnt_dbf != 32'(n / 4 * lg)) begin
      failures++;
      $display("[ch] N=%0d: %0d dual butterflies, expected %0d", n, ch_cnt_dbf, n / 4 * lg);
    end
    if (gap != 0 && ch_cnt_hazard != 0) begin
      failures++;
      $display("[ch] N=%0d: %0d hazards in a program scheduled to have none", n, ch_cnt_hazard);
    end
    if (gap == 0) begin
      checks++;
      if (ch_cnt_hazard == 0) begin
        failures++;
        $display("[ch] N=%0d back to back: no hazard counted", n);
      end
    end
    checks++;
    if (ch_cnt_rpt == 0 || ch_cnt_flush == 0) begin
      failures++;
      $display("[ch] N=%0d: rpt=%0d flush=%0d", n, ch_cnt_rpt, ch_cnt_flush);
    end
    $display("[ch] CFHT N=%0d C0=%0d R=%0d gap=%0d cycles=%0d dbf=%0d hazards=%0d mismatches=%0d",
             n, c0, r, gap, cycles, ch_cnt_dbf, ch_cnt_hazard, bad);
  endtask

  task automatic ch_main();
    ch_start = 0; ch_pm_we = 0; ch_dm_we = 0; ch_pm_addr = 0; ch_pm_wdata = 0; ch_dm_addr = 0; ch_dm_wdata = 0;
    ch_run_cfht(11, 6, 1);
    ch_run_cfht(10, 5, 1);
    ch_run_cfht(8, 4, 1);
    ch_run_cfht(7, 4, 1);
    ch_run_cfht(6, 3, 1);
    ch_run_cfht(8, 4, 0);
  endtask

  initial begin
    cs_start = 0; cs_pm_we = 0; cs_dm_we = 0; cs_pm_addr = 0; cs_pm_wdata = 0; cs_dm_addr = 0; cs_dm_wdata = 0;
    cv_start = 0; cv_pm_we = 0; cv_dm_we = 0; cv_pm_addr = 0; cv_pm_wdata = 0; cv_dm_addr = 0; cv_dm_wdata = 0;
    fh_start = 0; fh_pm_we = 0; fh_dm_we = 0; fh_pm_addr = 0; fh_pm_wdata = 0; fh_dm_addr = 0; fh_dm_wdata = 0;
    ch_start = 0; ch_pm_we = 0; ch_dm_we = 0; ch_pm_addr = 0; ch_pm_wdata = 0; ch_dm_addr = 0; ch_dm_wdata = 0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    fork
      cs_main();
      cv_main();
      fh_main();
      ch_main();
    join
    repeat (2) @(posedge clk);
    mechanism("CFFT-S interlock stall", cs_stalls);
    mechanism("CFFT-S branch flush", cs_flushes);
    mechanism("CFFT-S repeat", cs_rpts);
    mechanism("CFFT-V butterflies", cv_bflys);
    mechanism("CFFT-V four-butterfly bundle", cv_bundles);
    mechanism("CFFT-V hazard (bad schedule)", cv_hazards);
    mechanism("CFFT-V branch flush", cv_flushes);
    mechanism("CFFT-V repeat", cv_rpts);
    mechanism("FHT memory-port stall", fh_mem_stalls);
    mechanism("FHT register stall", fh_data_stalls);
    mechanism("FHT branch flush", fh_flushes);
    mechanism("CFHT dual butterflies", ch_dbfs);
    mechanism("CFHT hazard (bad schedule)", ch_hazards);
    mechanism("CFHT branch flush", ch_flushes);
    mechanism("CFHT repeat", ch_rpts);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

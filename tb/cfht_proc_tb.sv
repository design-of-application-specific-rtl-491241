// cfht_proc_tb: runs the cached fast Hartley transform on the cached-FHT
// processor and checks the result word for word against a stage-by-stage
// FHT computed here with the same Q1.15 arithmetic (the reference of
// fht_proc_tb: products summed, truncated by 15 bits, outputs halved and
// saturated). For N = 64 it is also checked against a direct floating-point
// DHT / N within 12 LSB.
// The program is generated here: two epochs, unrolled as in the document.
//  epoch 0: 2^C0-word groups (N / 2^C0 of them), each loaded with READ2
//    through the group pointers, C0 passes of 2^(C0-2) DBFs, dumped with
//    WRITE2;
//  epoch 1: 2^(C0-1) groups, each a group G and its auxiliary group AG
//    (2^(R+1) words), R = log2 N - C0 passes of 2^(R-1) DBFs.
// Each pass is one RPT'd DBF followed by a NOP so that no DBF reads a
// register still in flight: the run must show cnt_hazard = 0 (the
// processor has no interlock). A last test runs passes back to back and
// must show hazards. Sizes: 2048 (C0 = 6, R = 5, the document's maximum),
// 1024, 256, 128, 64. The input is stored bit-reversed, output natural.
module cfht_proc_tb;
  import fht_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic        start, busy, done, pm_we, dm_we;
  logic [7:0]  pm_addr;
  logic [23:0] pm_wdata;
  logic [10:0] dm_addr;
  logic [15:0] dm_wdata, dm_rdata;
  logic [31:0] cnt_cycles, cnt_dbf, cnt_hazard, cnt_flush, cnt_rpt;

  cfht_proc dut (.*);

  int checks = 0, failures = 0;

  initial begin : watchdog
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [23:0] prog [256];
  int plen;
  task automatic emit(input logic [23:0] ins);
    prog[plen] = ins;
    plen++;
  endtask

  function automatic int bitrev(int v, int bits);
    int r = 0;
    for (int i = 0; i < bits; i++) if (v & (1 << i)) r |= 1 << (bits - 1 - i);
    return r;
  endfunction

  function automatic int sat(int v);
    if (v > 32767) return 32767;
    if (v < -32768) return -32768;
    return v;
  endfunction

  function automatic int rnd(real v);
    return $rtoi($floor(32767.0 * v + 0.5));
  endfunction

  // one epoch: r0 = G, r1 = pass, r2 = butterfly, r7 = group counter
  task automatic gen_epoch(input logic e, input int c0, input int r, input int lg,
                           input int gap);
    int ngroups = e ? (1 << (c0 - 1)) : (1 << (lg - c0));
    int h       = e ? (1 << r) : (1 << (c0 - 1));
    int npass   = e ? r : c0;
    int nbf     = e ? (1 << (r - 1)) : (1 << (c0 - 2));
    int inc     = e ? (1 << c0) : 1;
    int loop_g;
    emit(f_ldi(3'd0, 16'd0));
    emit(f_ldi(3'd7, 16'(ngroups)));
    loop_g = plen;
    emit(f_setrp(3'd0, e));
    emit(f_setcp(5'd0));
    emit(f_rpt(16'(h)));
    emit(f_read2(12'(inc)));
    emit(f_ldi(3'd1, 16'd0));
    emit(f_ldi(3'd2, 16'd0));
    if (gap != 0) begin
      for (int p = 0; p < npass; p++) begin
        emit(f_rpt(16'(nbf)));
        emit(f_cdbf(3'd0, 3'd1, 3'd2, e));
        emit(f_nop());
      end
    end else begin
      emit(f_rpt(16'(nbf * npass)));
      emit(f_cdbf(3'd0, 3'd1, 3'd2, e));
    end
    emit(f_setrp(3'd0, e));
    emit(f_setcp(5'd0));
    emit(f_rpt(16'(h)));
    emit(f_write2(12'(inc)));
    emit(f_addi(3'd0, 16'd1));
    emit(f_dbnz(3'd7, 8'(loop_g)));
  endtask

  task automatic run_cfht(input int lg, input int c0, input int gap);
    int n = 1 << lg;
    int r = lg - c0;
    int x [2048];
    int h [2048];
    int nh [2048];
    int bad, cycles;
    plen = 0;
    emit(f_setctr(3'(c0), 3'(r)));
    gen_epoch(1'b0, c0, r, lg, gap);
    gen_epoch(1'b1, c0, r, lg, gap);
    emit(f_halt());
    for (int i = 0; i < plen; i++) begin
      @(negedge clk); pm_we = 1'b1; pm_addr = 8'(i); pm_wdata = prog[i];
    end
    @(negedge clk); pm_we = 1'b0;
    for (int i = 0; i < n; i++) x[i] = int'($urandom_range(32767)) - 16384;
    for (int i = 0; i < n; i++) begin
      @(negedge clk); dm_we = 1'b1; dm_addr = 11'(i); dm_wdata = 16'(x[bitrev(i, lg)]);
    end
    @(negedge clk); dm_we = 1'b0;
    // reference
    for (int i = 0; i < n; i++) h[i] = x[bitrev(i, lg)];
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
              c  = rnd($cos(2.0 * 3.14159265358979323846 * k / l));
              sn = rnd($sin(2.0 * 3.14159265358979323846 * k / l));
            end else begin
              c  = -rnd($cos(2.0 * 3.14159265358979323846 * m / l));
              sn = rnd($sin(2.0 * 3.14159265358979323846 * m / l));
            end
            t = int'((longint'(c) * h[blk + half + k] + longint'(sn) * h[blk + half + m]) >>> 15);
          end
          nh[blk + k]        = sat((h[blk + k] + t) >>> 1);
          nh[blk + half + k] = sat((h[blk + k] - t) >>> 1);
        end
      end
      for (int i = 0; i < n; i++) h[i] = nh[i];
    end
    @(negedge clk); start = 1'b1;
    @(negedge clk); start = 1'b0;
    while (!done) @(posedge clk);
    cycles = cnt_cycles;
    bad = 0;
    for (int k = 0; k < n; k++) begin
      @(negedge clk); dm_addr = 11'(k);
      #1;
      if (gap != 0) begin
        checks++;
        if ($signed(dm_rdata) != h[k]) begin
          failures++;
          if (bad < 5) $display("N=%0d H[%0d] got %0d expected %0d", n, k, $signed(dm_rdata), h[k]);
          bad++;
        end
      end else if ($signed(dm_rdata) != h[k]) bad++;
      if (lg == 6) begin
        real acc = 0.0;
        for (int i = 0; i < n; i++)
          acc += real'(x[i]) * ($cos(2.0 * 3.14159265358979323846 * i * k / n) +
                                $sin(2.0 * 3.14159265358979323846 * i * k / n));
        acc = acc / n;
        checks++;
        if (acc - real'($signed(dm_rdata)) > 12.0 || real'($signed(dm_rdata)) - acc > 12.0) begin
          failures++;
          if (bad < 5) $display("N=64 H[%0d] got %0d, DHT/N = %f", k, $signed(dm_rdata), acc);
          bad++;
        end
      end
    end
    checks += 2;
    if (cnt_dbf != 32'(n / 4 * lg)) begin
      failures++;
      $display("N=%0d: %0d dual butterflies, expected %0d", n, cnt_dbf, n / 4 * lg);
    end
    if (gap != 0 && cnt_hazard != 0) begin
      failures++;
      $display("N=%0d: %0d hazards in a program scheduled to have none", n, cnt_hazard);
    end
    if (gap == 0) begin
      checks++;
      if (cnt_hazard == 0) begin
        failures++;
        $display("N=%0d back to back: no hazard counted", n);
      end
    end
    checks++;
    if (cnt_rpt == 0 || cnt_flush == 0) begin
      failures++;
      $display("N=%0d: rpt=%0d flush=%0d", n, cnt_rpt, cnt_flush);
    end
    $display("CFHT N=%0d C0=%0d R=%0d gap=%0d cycles=%0d dbf=%0d hazards=%0d mismatches=%0d",
             n, c0, r, gap, cycles, cnt_dbf, cnt_hazard, bad);
  endtask

  initial begin
    start = 0; pm_we = 0; dm_we = 0; pm_addr = 0; pm_wdata = 0; dm_addr = 0; dm_wdata = 0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    run_cfht(11, 6, 1);
    run_cfht(10, 5, 1);
    run_cfht(8, 4, 1);
    run_cfht(7, 4, 1);
    run_cfht(6, 3, 1);
    run_cfht(8, 4, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

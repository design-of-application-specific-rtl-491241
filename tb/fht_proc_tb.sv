// fht_proc_tb: runs the fast Hartley transform on the FHT processor for
// N = 16, 64, 256, 1024 and 2048 and checks the result two ways:
//  - word for word against a stage-by-stage FHT computed here from the
//    Hartley recursion H(k) = H1(k) + cos*H2(k) + sin*H2(half-k) with the
//    same Q1.15 arithmetic (products summed, truncated by 15 bits, outputs
//    halved and saturated; angles 0 and pi/2 taken exactly);
//  - for N = 64, against a direct floating-point DHT / N, within 12 LSB.
// The input is stored bit-reversed, the output is read in natural order.
// Also checked: N/4 dual butterflies per stage, and that back-to-back dual
// butterflies each cost one memory-port stall (the document's reason for
// this processor being slower than the cached one).
module fht_proc_tb;
  import fht_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic        start, busy, done, pm_we, dm_we;
  logic [7:0]  pm_addr;
  logic [23:0] pm_wdata;
  logic [10:0] dm_addr;
  logic [15:0] dm_wdata, dm_rdata;
  logic [31:0] cnt_cycles, cnt_dbf, cnt_mem_stall, cnt_data_stall, cnt_flush;

  fht_proc dut (.*);

  int checks = 0, failures = 0;
  int runs_mem_stall = 0, runs_data_stall = 0, runs_flush = 0;

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

  task automatic run_fht(input int lg);
    int n = 1 << lg;
    int bsz = (n / 4 < 8) ? n / 4 : 8;
    int x [2048];
    int h [2048];
    int nh [2048];
    int loop_s, loop_b, bad, cycles;
    // program
    plen = 0;
    emit(f_ldi(3'd0, 16'd1));
    emit(f_ldi(3'd6, 16'(lg)));
    loop_s = plen;
    emit(f_ldi(3'd1, 16'd0));
    emit(f_ldi(3'd7, 16'(n / 4 / bsz)));
    loop_b = plen;
    for (int q = 0; q < bsz; q++) emit(f_dbf(3'd0, 3'd1, 3'(q)));
    for (int r = 0; r < 2 * bsz; r++) emit(f_store(4'(r)));
    emit(f_dbnz(3'd7, 8'(loop_b)));
    emit(f_addi(3'd0, 16'd1));
    emit(f_dbnz(3'd6, 8'(loop_s)));
    emit(f_halt());
    for (int i = 0; i < plen; i++) begin
      @(negedge clk); pm_we = 1'b1; pm_addr = 8'(i); pm_wdata = prog[i];
    end
    @(negedge clk); pm_we = 1'b0;
    // data, |x| < 0.5, stored bit-reversed
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
    // run
    @(negedge clk); start = 1'b1;
    @(negedge clk); start = 1'b0;
    while (!done) @(posedge clk);
    cycles = cnt_cycles;
    bad = 0;
    for (int k = 0; k < n; k++) begin
      @(negedge clk); dm_addr = 11'(k);
      #1;
      checks++;
      if ($signed(dm_rdata) != h[k]) begin
        failures++;
        if (bad < 5) $display("N=%0d H[%0d] got %0d expected %0d", n, k, $signed(dm_rdata), h[k]);
        bad++;
      end
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
    // every DBF after the first of a batch waits one cycle for the ports
    if (cnt_mem_stall < 32'((bsz - 1) * (n / 4 / bsz) * lg)) begin
      failures++;
      $display("N=%0d: %0d memory stalls", n, cnt_mem_stall);
    end
    if (cnt_mem_stall != 0)  runs_mem_stall++;
    if (cnt_data_stall != 0) runs_data_stall++;
    if (cnt_flush != 0)      runs_flush++;
    $display("FHT N=%0d cycles=%0d dbf=%0d mem_stalls=%0d data_stalls=%0d mismatches=%0d",
             n, cycles, cnt_dbf, cnt_mem_stall, cnt_data_stall, bad);
  endtask

  initial begin
    start = 0; pm_we = 0; dm_we = 0; pm_addr = 0; pm_wdata = 0; dm_addr = 0; dm_wdata = 0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    run_fht(4);
    run_fht(6);
    run_fht(8);
    run_fht(10);
    run_fht(11);
    // STORE right behind the DBF that writes its registers: one port stall
    // (DBF in MEM), then two register stalls (DBF in MEM&MUL and ADD)
    begin
      int m [4];
      int e [4];
      plen = 0;
      emit(f_ldi(3'd0, 16'd3));
      emit(f_ldi(3'd1, 16'd0));
      emit(f_dbf(3'd0, 3'd1, 3'd0));
      emit(f_store(4'd0));
      emit(f_store(4'd1));
      emit(f_halt());
      for (int i = 0; i < plen; i++) begin
        @(negedge clk); pm_we = 1'b1; pm_addr = 8'(i); pm_wdata = prog[i];
      end
      @(negedge clk); pm_we = 1'b0;
      // stage 3, butterfly 0: X0 = 0, X1 = 4, Y0 = 2, Y1 = 6, no multiplication
      foreach (m[i]) begin
        @(negedge clk); dm_addr = 11'((i == 0) ? 0 : (i == 1) ? 4 : (i == 2) ? 2 : 6);
        #1 m[i] = $signed(dm_rdata);
      end
      e[0] = (m[0] + m[1]) >>> 1; e[1] = (m[0] - m[1]) >>> 1;
      e[2] = (m[2] + m[3]) >>> 1; e[3] = (m[2] - m[3]) >>> 1;
      @(negedge clk); start = 1'b1;
      @(negedge clk); start = 1'b0;
      while (!done) @(posedge clk);
      checks++;
      if (cnt_data_stall != 2 || cnt_mem_stall != 1) begin
        failures++;
        $display("STORE after DBF: %0d register stalls, %0d port stalls", cnt_data_stall, cnt_mem_stall);
      end
      if (cnt_data_stall != 0) runs_data_stall++;
      foreach (e[i]) begin
        @(negedge clk); dm_addr = 11'((i == 0) ? 0 : (i == 1) ? 4 : (i == 2) ? 2 : 6);
        #1;
        checks++;
        if ($signed(dm_rdata) != e[i]) begin
          failures++;
          $display("STORE after DBF: word %0d got %0d expected %0d", i, $signed(dm_rdata), e[i]);
        end
      end
    end
    checks++;
    if (runs_mem_stall == 0 || runs_data_stall == 0 || runs_flush == 0) begin
      failures++;
      $display("a mechanism never happened: mem=%0d data=%0d flush=%0d",
               runs_mem_stall, runs_data_stall, runs_flush);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

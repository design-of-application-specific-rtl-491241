// twiddle_rom_tb: checks every entry of the 512-entry twiddle table
// (NMAX = 1024) against exp(-j*2*pi*k/1024) computed here in floating point.
// Each part must be within 1 LSB of 32767*cos and -32767*sin, be exactly the
// rounded value, and the symmetries W^(k+256) = -j*W^k must hold exactly
// (they do when each entry is rounded on its own).
module twiddle_rom_tb;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic [8:0]  addr = '0;
  logic [31:0] w;
  twiddle_rom dut (.*);

  int checks = 0, failures = 0;

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int re [512];
    int im [512];
    for (int k = 0; k < 512; k++) begin
      real c, s;
      addr = 9'(k);
      #1;
      re[k] = int'($signed(w[31:16]));
      im[k] = int'($signed(w[15:0]));
      c = 32767.0 * $cos(2.0 * 3.14159265358979323846 * k / 1024.0);
      s = -32767.0 * $sin(2.0 * 3.14159265358979323846 * k / 1024.0);
      checks += 2;
      if (real'(re[k]) - c > 0.5001 || c - real'(re[k]) > 0.5001) begin
        failures++;
        if (failures < 10) $display("k=%0d re=%0d expected %f", k, re[k], c);
      end
      if (real'(im[k]) - s > 0.5001 || s - real'(im[k]) > 0.5001) begin
        failures++;
        if (failures < 10) $display("k=%0d im=%0d expected %f", k, im[k], s);
      end
    end
    checks += 2;
    if (re[0] != 32767 || im[0] != 0) failures++;
    if (re[256] != 0 || im[256] != -32767) failures++;
    for (int k = 1; k < 256; k++) begin
      checks++;
      // W^(k+256) = -j * W^k : re' = im, im' = -re
      if (re[k + 256] != im[k] || im[k + 256] != -re[k]) begin
        failures++;
        if (failures < 10) $display("symmetry at k=%0d", k);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

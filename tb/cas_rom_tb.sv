// cas_rom_tb: checks every entry of the 1024-entry cos/sin table of the FHT
// processors (NMAX = 2048, angle 2*pi*k/2048) against floating point: each
// half within 0.5 LSB of 32767*cos and 32767*sin, the exact values at 0 and
// pi/2, and the symmetry sin(k) = cos(512-k).
module cas_rom_tb;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic [9:0]  addr = '0;
  logic [31:0] cs;
  cas_rom dut (.*);

  int checks = 0, failures = 0;

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int co [1024];
    int si [1024];
    for (int k = 0; k < 1024; k++) begin
      real c, s;
      addr = 10'(k);
      #1;
      co[k] = int'($signed(cs[31:16]));
      si[k] = int'($signed(cs[15:0]));
      c = 32767.0 * $cos(2.0 * 3.14159265358979323846 * k / 2048.0);
      s = 32767.0 * $sin(2.0 * 3.14159265358979323846 * k / 2048.0);
      checks += 2;
      if (real'(co[k]) - c > 0.5001 || c - real'(co[k]) > 0.5001) begin
        failures++;
        if (failures < 10) $display("k=%0d cos=%0d expected %f", k, co[k], c);
      end
      if (real'(si[k]) - s > 0.5001 || s - real'(si[k]) > 0.5001) begin
        failures++;
        if (failures < 10) $display("k=%0d sin=%0d expected %f", k, si[k], s);
      end
    end
    checks += 2;
    if (co[0] != 32767 || si[0] != 0) failures++;
    if (co[512] != 0 || si[512] != 32767) failures++;
    for (int k = 1; k < 512; k++) begin
      checks++;
      if (si[k] != co[512 - k]) begin
        failures++;
        if (failures < 10) $display("symmetry at k=%0d", k);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

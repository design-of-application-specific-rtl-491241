// twiddle_rom: FFT twiddle coefficients W_NMAX^k = exp(-j*2*pi*k/NMAX) for
// k = 0 .. NMAX/2-1, one 32-bit word per entry: real part in bits [31:16],
// imaginary part in bits [15:0], both Q1.15 rounded to nearest, with +1.0
// stored as 32767.
//
// The document stores precomputed twiddles in a 32 x 512 ROM (NMAX = 1024);
// it does not give the number format, so the rounding and Q1.15 scaling are
// this design's choice. The table is computed at elaboration from the formula
// above. An optional offset/stride lets the VLIW processor build its four
// 128-entry banks from the same module: entry i holds k = BASE + i.
// Read is combinational.
module twiddle_rom #(
  parameter int NMAX  = 1024,
  parameter int DEPTH = NMAX / 2,
  parameter int BASE  = 0,
  localparam int AW = $clog2(DEPTH)
) (
  input  logic [AW-1:0] addr,
  output logic [31:0]   w
);
  typedef logic [31:0] rom_t [DEPTH];

  function automatic rom_t gen_table();
    rom_t r;
    for (int i = 0; i < DEPTH; i++) begin
      real ph;
      int  c, s;
      ph = 2.0 * 3.14159265358979323846 * real'(BASE + i) / real'(NMAX);
      c  = $rtoi($floor(32767.0 * $cos(ph) + 0.5));
      s  = $rtoi($floor(-32767.0 * $sin(ph) + 0.5));
      r[i] = {c[15:0], s[15:0]};
    end
    return r;
  endfunction

  localparam rom_t ROM = gen_table();

  assign w = ROM[addr];
endmodule

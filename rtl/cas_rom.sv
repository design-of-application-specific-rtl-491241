// cas_rom: coefficient memory of the FHT processors. Entry k holds
// {cos(2*pi*k/NMAX), sin(2*pi*k/NMAX)} as two Q1.15 halves (cos in
// [31:16]), rounded to nearest with +1.0 stored as 32767, for
// k = 0 .. NMAX/2-1 (angles below pi, which covers every angle a dual
// butterfly needs). The document names a single-port coefficient memory and
// says the cos and sin values are read from it; its size and format are
// this design's choice. The table is computed at elaboration from the
// formula above. Read is combinational.
module cas_rom #(
  parameter int NMAX  = 2048,
  localparam int DEPTH = NMAX / 2,
  localparam int AW    = $clog2(DEPTH)
) (
  input  logic [AW-1:0] addr,
  output logic [31:0]   cs
);
  typedef logic [31:0] rom_t [DEPTH];

  function automatic rom_t gen_table();
    rom_t r;
    for (int k = 0; k < DEPTH; k++) begin
      real ph;
      int  c, s;
      ph = 2.0 * 3.14159265358979323846 * real'(k) / real'(NMAX);
      c  = $rtoi($floor(32767.0 * $cos(ph) + 0.5));
      s  = $rtoi($floor(32767.0 * $sin(ph) + 0.5));
      r[k] = {c[15:0], s[15:0]};
    end
    return r;
  endfunction

  localparam rom_t ROM = gen_table();

  assign cs = ROM[addr];
endmodule

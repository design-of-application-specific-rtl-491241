// fht_agu: address generator of the FHT dual butterfly.
//
// A dual butterfly reads four values and writes four results. For stage s
// (1-based, block length L = 2^s, half = 2^(s-1)) and dual-butterfly number
// b (AW-2 bits), it returns the four addresses X0, X1, Y0, Y1, the address of
// the cos/sin pair in the coefficient table, and whether the operation is
// plain (two add/subtract butterflies, no multiplication).
//
//   s >= 3 (the document's addressing table): IndexX = {0, b[s-3:0]}
//     (s-1 bits, MSB 0), upper = b >> (s-2);
//     X0 = {upper, 0, IndexX}, X1 = {upper, 1, IndexX};
//     IndexY = half - IndexX if IndexX != 0, else L/4;
//     Y0 = {upper, 0, IndexY}, Y1 = {upper, 1, IndexY};
//     plain when IndexX = 0; coefficient angle 2*pi*IndexX / 2^s.
//   s = 1, 2: no T blocks; the document counts single butterflies there.
//     This design lets one instruction do two of them:
//     s = 1: X0 = {b,0,0}, X1 = {b,0,1}, Y0 = {b,1,0}, Y1 = {b,1,1}
//     s = 2: X0 = {b,0,0}, X1 = {b,1,0}, Y0 = {b,0,1}, Y1 = {b,1,1}
// The coefficient table holds angle 2*pi*k/NMAX at entry k, so the
// coefficient address is IndexX << (log2(NMAX) - s). Combinational.
module fht_agu #(
  parameter int AW   = 11,      // address bits of the data being transformed
  parameter int NMAX = 2048,    // angle resolution of the coefficient table
  localparam int KW  = $clog2(NMAX) - 1
) (
  input  logic [3:0]    stage,
  input  logic [15:0]   b,
  output logic [AW-1:0] x0,
  output logic [AW-1:0] x1,
  output logic [AW-1:0] y0,
  output logic [AW-1:0] y1,
  output logic [KW-1:0] cas_addr,
  output logic          plain
);
  localparam int LN = $clog2(NMAX);

  logic [31:0] ixx, ixy, upper, half, lowm, bb;
  logic [4:0]  s;

  always_comb begin
    s     = 5'(stage);
    bb    = 32'(b);
    ixx   = '0;
    ixy   = '0;
    upper = '0;
    lowm  = '0;
    half  = 32'd1 << (s - 5'd1);
    x0 = '0; x1 = '0; y0 = '0; y1 = '0;
    cas_addr = '0;
    plain    = 1'b1;
    if (s == 5'd1) begin
      x0 = AW'((bb << 2) | 32'd0);
      x1 = AW'((bb << 2) | 32'd1);
      y0 = AW'((bb << 2) | 32'd2);
      y1 = AW'((bb << 2) | 32'd3);
    end else if (s == 5'd2) begin
      x0 = AW'((bb << 2) | 32'd0);
      x1 = AW'((bb << 2) | 32'd2);
      y0 = AW'((bb << 2) | 32'd1);
      y1 = AW'((bb << 2) | 32'd3);
    end else begin
      lowm  = (32'd1 << (s - 5'd2)) - 32'd1;
      ixx   = bb & lowm;
      upper = bb >> (s - 5'd2);
      ixy   = (ixx != 0) ? half - ixx : (half >> 1);
      x0    = AW'((upper << s) | ixx);
      x1    = AW'((upper << s) | half | ixx);
      y0    = AW'((upper << s) | ixy);
      y1    = AW'((upper << s) | half | ixy);
      plain = (ixx == 0);
      cas_addr = KW'(ixx << (5'(LN) - s));
    end
  end
endmodule

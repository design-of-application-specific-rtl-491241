// cfht_agu: addressing of the cached fast Hartley transform.
//
// The cache holds a block of 2*H data words (H = 2^(C0-1) in epoch 0 and
// 2^R in epoch 1; with C0 = 6, R = 5 both are 32: the 32 cache and the 32
// auxiliary cache registers). For a DBF it returns the four cache indexes,
// the coefficient address and the plain flag; for SETRP the two memory read
// pointers of a group; and the post-incremented pass and butterfly.
//
// Epoch 0 (stages 1..C0, the document's first-epoch loading): the cache
// holds 2^C0 consecutive words, so the cache index is the low C0 bits of the
// data address and the indexes are those of the plain FHT (fht_agu) at
// stage p+1. Read pointers: RP0 = G << C0, RP1 = RP0 + H.
//
// Epoch 1 (stages C0+1..C0+R): group G (C0-1 bits) is loaded together with
// its auxiliary group AG = 2^(C0-1) - G (AG = 0 for G = 0), as in the
// document. The G set is every address whose low C0 bits are {0,G}, the AG
// set every address whose low C0 bits are {1,AG}: RP0 = G, RP1 = 2^(C0-1)+AG,
// stride 2^C0. Cache index = address bits above C0, plus H for the AG set.
//  G != 0, pass p: star at bit p of the index, butterfly b (R-1 bits):
//    X0 = ins(b,p,0), X1 = ins(b,p,1),
//    Y0 = H + ins(b',p,0), Y1 = H + ins(b',p,1), b' = b with its p low bits
//    inverted (the document's cache-addressing table, "-" marks the
//    inversion); angle 2*pi*m/2^s with m = {b[p-1:0], 0, G}, s = C0+1+p.
//  G = 0: the two sets close on themselves; as the document says, they are
//    indexed as in the first epoch: the 2H words form a sequence i = {hi, x}
//    (x = set bit) on which pass p is FHT stage p+2 (fht_agu); the cache
//    index of i is x*H + hi.
// Butterflies per pass: 2^(C0-2) in epoch 0, 2^(R-1) in epoch 1; the
// post-increment wraps b at that count and then advances the pass (this
// design's choice, as in the cached-FFT processors). Combinational.
module cfht_agu #(
  parameter int CACHE = 64,
  parameter int NMAX  = 2048,
  localparam int CB = $clog2(CACHE),
  localparam int KW = $clog2(NMAX) - 1
) (
  input  logic          e,
  input  logic [15:0]   g,
  input  logic [15:0]   p,
  input  logic [15:0]   b,
  input  logic [2:0]    c0,
  input  logic [2:0]    r,
  output logic [CB-1:0] ix0,
  output logic [CB-1:0] ix1,
  output logic [CB-1:0] iy0,
  output logic [CB-1:0] iy1,
  output logic [KW-1:0] cas_addr,
  output logic          plain,
  output logic [15:0]   rp0,
  output logic [15:0]   rp1,
  output logic [15:0]   p_next,
  output logic [15:0]   b_next,
  output logic [6:0]    half
);
  localparam int LN = $clog2(NMAX);

  // plain-FHT indexing for epoch 0 and for the G = 0 case of epoch 1
  logic [CB-1:0] fx0, fx1, fy0, fy1;
  logic [KW-1:0] fka;
  logic          fplain;
  logic [3:0]    fstage;
  assign fstage = e ? 4'(p) + 4'd2 : 4'(p) + 4'd1;
  fht_agu #(.AW(CB), .NMAX(NMAX)) u_fht (
    .stage(fstage), .b(b), .x0(fx0), .x1(fx1), .y0(fy0), .y1(fy1),
    .cas_addr(fka), .plain(fplain));

  logic [15:0] hsz, gmax, ag, bmask, lowm, bx, m, s;
  logic [15:0] hi_mask;

  function automatic logic [15:0] ins(input logic [15:0] v, input logic [15:0] pos,
                                      input logic bitv);
    logic [15:0] lm;
    lm = (16'd1 << pos) - 16'd1;
    return ((v & ~lm) << 1) | (v & lm) | (bitv ? (16'd1 << pos) : 16'd0);
  endfunction

  // sequence index {hi, x} -> cache index x*H + hi
  function automatic logic [CB-1:0] seq2c(input logic [CB-1:0] i, input logic [15:0] h);
    return CB'((i[0] ? h : 16'd0) + 16'(i >> 1));
  endfunction

  always_comb begin
    hsz   = e ? (16'd1 << r) : (16'd1 << (c0 - 3'd1));
    half  = 7'(hsz);
    gmax  = 16'd1 << (c0 - 3'd1);
    ag    = (g == 16'd0) ? 16'd0 : gmax - g;
    if (!e) begin
      rp0 = g << c0;
      rp1 = (g << c0) + hsz;
    end else begin
      rp0 = g;
      rp1 = gmax + ag;
    end
    bmask   = e ? ((16'd1 << (r - 3'd1)) - 16'd1) : ((16'd1 << (c0 - 3'd2)) - 16'd1);
    lowm    = (16'd1 << p) - 16'd1;
    bx      = (b & ~lowm) | (~b & lowm);
    hi_mask = hsz - 16'd1;
    m       = ((b & lowm) << c0) | g;
    s       = 16'(c0) + 16'd1 + p;
    if (!e) begin
      ix0 = fx0; ix1 = fx1; iy0 = fy0; iy1 = fy1;
      cas_addr = fka;
      plain    = fplain;
    end else if (g == 16'd0) begin
      ix0 = seq2c(fx0, hsz); ix1 = seq2c(fx1, hsz);
      iy0 = seq2c(fy0, hsz); iy1 = seq2c(fy1, hsz);
      cas_addr = fka;
      plain    = fplain;
    end else begin
      ix0 = CB'(ins(b, p, 1'b0) & hi_mask);
      ix1 = CB'(ins(b, p, 1'b1) & hi_mask);
      iy0 = CB'(hsz + (ins(bx, p, 1'b0) & hi_mask));
      iy1 = CB'(hsz + (ins(bx, p, 1'b1) & hi_mask));
      cas_addr = KW'(m << (16'(LN) - s));
      plain    = 1'b0;
    end
    b_next = (b + 16'd1) & bmask;
    p_next = (b_next == 16'd0) ? p + 16'd1 : p;
  end
endmodule

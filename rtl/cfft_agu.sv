// cfft_agu: address calculation of the BFLY instruction (the "A,B CALC" and
// "W Fetch" boxes of the BFLY datapath).
//
// From the group g, pass p and butterfly b (general-purpose register values),
// the 2-bit epoch immediate e and the control register CTR it computes the two
// cache register indexes of the butterfly and the twiddle ROM address.
// Purely combinational.
//
// Cache indexes (the document's cache addressing table): the butterfly
// number b has LOG2B bits; a place-holder bit is inserted at position
// pos = p (+ offset in later epochs), giving A with a 0 and B with a 1 there.
// Twiddle address: the bits of the global data address below the place
// holder form j (in epoch 0 the cache bits below pos; in later epochs those
// bits followed by the LOG2G group bits). The global stage is s = pos
// (epoch 0) or LOG2G + pos (later epochs), and the twiddle is
// W_{2^(s+1)}^j = W_NMAX^(j << (log2(NMAX)-1-s)), which reproduces the
// document's twiddle table (zeros on the right, butterfly bits then group
// bits on the left).
//
// Post-increment (document: "automatic post-increment addressing mode"):
// the butterflies of a pass are split evenly over SLOTS issue slots (1 in the
// single-issue processor, 4 in the VLIW one, whose slots start 0, 4, 8, 12
// apart as in the document's example); b_next = b + 1 within the slot's
// share, and when it wraps back to the start of the share, p_next = p + 1,
// so one repeated BFLY can sweep all passes of a group. Advancing the
// pass on wrap, and the later-epoch offset pos = p + (LOG2B+1-NPASS) that
// supports the modified and unbalanced algorithms (fewer passes than cache
// bits), are this design's choices.
module cfft_agu
  import cfft_pkg::*;
#(
  parameter int CACHE = 32,
  parameter int NMAX  = 1024,
  parameter int SLOTS = 1,
  localparam int CB  = $clog2(CACHE),
  localparam int TWB = $clog2(NMAX) - 1
) (
  input  logic [15:0]   g,
  input  logic [15:0]   p,
  input  logic [15:0]   b,
  input  logic [1:0]    e,
  input  ctr_fields_t   ctr,
  output logic [CB-1:0] idx_a,
  output logic [CB-1:0] idx_b,
  output logic [TWB-1:0] tw_addr,
  output logic [15:0]   p_next,
  output logic [15:0]   b_next
);
  logic [4:0]  pos, s;
  logic [15:0] bmask, lowmask, gmask, a_full, j, qmask;
  logic [3:0]  cbits;

  always_comb begin
    cbits   = 4'(ctr.log2b) + 4'd1;
    if (e == 2'd0) pos = p[4:0];
    else           pos = p[4:0] + 5'(cbits) - 5'(ctr.npass);
    bmask   = (16'd1 << ctr.log2b) - 16'd1;
    lowmask = (16'd1 << pos) - 16'd1;
    gmask   = (16'd1 << ctr.log2g) - 16'd1;
    // insert a 0 at bit pos of b
    a_full  = (((b & bmask) & ~lowmask) << 1) | ((b & bmask) & lowmask);
    idx_a   = a_full[CB-1:0];
    idx_b   = idx_a | CB'(16'd1 << pos);
    if (e == 2'd0) begin
      j = a_full & lowmask;
      s = pos;
    end else begin
      j = ((a_full & lowmask) << ctr.log2g) | (g & gmask);
      s = pos + 5'(ctr.log2g);
    end
    tw_addr = TWB'(j << (5'(TWB) - s));
    // share of one slot: 2^(LOG2B - log2(SLOTS)) butterflies, at least 1
    if (int'(ctr.log2b) > $clog2(SLOTS))
      qmask = (16'd1 << (int'(ctr.log2b) - $clog2(SLOTS))) - 16'd1;
    else
      qmask = 16'd0;
    b_next  = ((b & ~qmask) | ((b + 16'd1) & qmask)) & bmask;
    p_next  = (((b + 16'd1) & qmask) == 16'd0) ? p + 16'd1 : p;
  end
endmodule

// cfft_bfly: pipelined radix-2 decimation-in-time butterfly
//   X = (A + B*W) / 2,   Y = (A - B*W) / 2
// on complex Q1.15 operands packed as cfft_pkg::cplx_t.
//
// Stages, as the document describes the BFLY execution: four parallel real
// multiplications (Br*Wr, Bi*Wi, Br*Wi, Bi*Wr); then two additions forming
// the real and imaginary parts of B*W; then the addition to and subtraction
// from A. With FUSED = 0 these take three cycles (the single-issue
// processor's EX2, EX3, EX4); with FUSED = 1 the last two share one cycle
// (the VLIW processor's EX2, EX3). The inputs are expected to come from a
// pipeline register; the multiplications and the B*W additions end in
// registers, and the final add/subtract is combinational, so that the caller
// writes x and y into the cache at the clock edge that ends the last stage.
// out_valid follows in_valid by 2 cycles (FUSED = 0) or 1 cycle (FUSED = 1).
//
// This design's choices, where the document is silent on number format:
// products are truncated to Q2.15 (arithmetic shift right by 15), each
// butterfly output is halved (truncating) so an N-point transform returns
// DFT/N, and the result saturates to 16 bits. A tag (the destination cache
// register indexes) travels with the data. No reset on the data path; the
// valid bits reset to 0.
module cfft_bfly
  import cfft_pkg::*;
#(
  parameter bit FUSED = 1'b0,
  parameter int TAGW  = 10
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            in_valid,
  input  cplx_t           a,
  input  cplx_t           b,
  input  cplx_t           w,
  input  logic [TAGW-1:0] in_tag,
  output logic            out_valid,
  output cplx_t           x,
  output cplx_t           y,
  output logic [TAGW-1:0] out_tag
);
  // stage 1: multiplications
  logic               v1;
  cplx_t              a1;
  logic [TAGW-1:0]    t1;
  logic signed [31:0] p_rr, p_ii, p_ri, p_ir;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) v1 <= 1'b0;
    else        v1 <= in_valid;
  end
  always_ff @(posedge clk) begin
    a1   <= a;
    t1   <= in_tag;
    p_rr <= b.re * w.re;
    p_ii <= b.im * w.im;
    p_ri <= b.re * w.im;
    p_ir <= b.im * w.re;
  end

  // B*W from the four products
  logic signed [32:0] sum_re, sum_im;
  logic signed [17:0] bw_re_c, bw_im_c;
  always_comb begin
    sum_re  = 33'(p_rr) - 33'(p_ii);
    sum_im  = 33'(p_ri) + 33'(p_ir);
    bw_re_c = 18'(sum_re >>> 15);
    bw_im_c = 18'(sum_im >>> 15);
  end

  // final add/subtract, halving and saturation
  function automatic cplx_t addsub(input cplx_t av, input logic signed [17:0] br,
                                   input logic signed [17:0] bi, input logic sub);
    logic signed [19:0] r, i;
    cplx_t o;
    r = sub ? (20'(av.re) - 20'(br)) : (20'(av.re) + 20'(br));
    i = sub ? (20'(av.im) - 20'(bi)) : (20'(av.im) + 20'(bi));
    o.re = sat16(r >>> 1);
    o.im = sat16(i >>> 1);
    return o;
  endfunction

  if (FUSED) begin : g_fused
    assign out_valid = v1;
    assign x         = addsub(a1, bw_re_c, bw_im_c, 1'b0);
    assign y         = addsub(a1, bw_re_c, bw_im_c, 1'b1);
    assign out_tag   = t1;
  end else begin : g_split
    logic               v2;
    cplx_t              a2;
    logic [TAGW-1:0]    t2;
    logic signed [17:0] bw_re, bw_im;
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) v2 <= 1'b0;
      else        v2 <= v1;
    end
    always_ff @(posedge clk) begin
      a2    <= a1;
      t2    <= t1;
      bw_re <= bw_re_c;
      bw_im <= bw_im_c;
    end
    assign out_valid = v2;
    assign x         = addsub(a2, bw_re, bw_im, 1'b0);
    assign y         = addsub(a2, bw_re, bw_im, 1'b1);
    assign out_tag   = t2;
  end
endmodule

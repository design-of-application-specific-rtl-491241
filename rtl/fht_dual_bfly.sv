// fht_dual_bfly: the FHT dual butterfly (a T block and two butterflies).
//
// From four real inputs X0, X1, Y0, Y1 and the coefficient pair
// c = cos(phi), s = sin(phi) it computes
//   T1 = c*X1 + s*Y1            T2 = s*X1 - c*Y1
//   X0' = (X0 + T1)/2   X1' = (X0 - T1)/2
//   Y0' = (Y0 + T2)/2   Y1' = (Y0 - T2)/2
// and, when `plain` is set (phi = 0, and the first two stages),
//   T1 = X1, T2 = Y1 (two independent butterflies, no multiplication).
// T2 follows from the Hartley shift rule (the second term of
// H(k) = H1(k) + cos H2(k) + sin H2(-k), taken at the partner index
// half - k, whose cosine is -c and sine is s); the document's printed form of
// the Y equations has the roles of X1 and Y1 swapped, which does not give a
// Hartley transform, so this design follows the derivation.
//
// Fixed point (this design's choice): Q1.15 inputs and coefficients,
// products summed at full precision and truncated by 15 bits, outputs halved
// (so an N-point transform returns DHT/N) and saturated to 16 bits.
//
// Timing: two stages, as the processors' ADD and ADD&SUB stages. The inputs
// are registered with in_valid at the clock edge that starts the first stage
// (the multiply-add, ending in a register); the add/subtract is
// combinational after that register, so out_valid follows in_valid by one
// cycle and the caller stores the results at the following edge. A tag (the
// destination) travels with the data.
module fht_dual_bfly #(
  parameter int TAGW = 8
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               in_valid,
  input  logic               plain,
  input  logic signed [15:0] x0,
  input  logic signed [15:0] x1,
  input  logic signed [15:0] y0,
  input  logic signed [15:0] y1,
  input  logic signed [15:0] c,
  input  logic signed [15:0] s,
  input  logic [TAGW-1:0]    in_tag,
  output logic               out_valid,
  output logic signed [15:0] x0_o,
  output logic signed [15:0] x1_o,
  output logic signed [15:0] y0_o,
  output logic signed [15:0] y1_o,
  output logic [TAGW-1:0]    out_tag
);
  logic signed [33:0] t1_full, t2_full;
  logic signed [17:0] t1_c, t2_c;
  always_comb begin
    t1_full = 34'(x1 * c) + 34'(y1 * s);
    t2_full = 34'(x1 * s) - 34'(y1 * c);
    t1_c    = plain ? 18'(x1) : 18'(t1_full >>> 15);
    t2_c    = plain ? 18'(y1) : 18'(t2_full >>> 15);
  end

  logic               v1;
  logic signed [15:0] x0_r, y0_r;
  logic signed [17:0] t1_r, t2_r;
  logic [TAGW-1:0]    tag_r;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) v1 <= 1'b0;
    else        v1 <= in_valid;
  end
  always_ff @(posedge clk) begin
    x0_r  <= x0;
    y0_r  <= y0;
    t1_r  <= t1_c;
    t2_r  <= t2_c;
    tag_r <= in_tag;
  end

  function automatic logic signed [15:0] half_sat(input logic signed [19:0] v);
    logic signed [19:0] h;
    h = v >>> 1;
    if (h > 20'sd32767)       return 16'sh7FFF;
    else if (h < -20'sd32768) return 16'sh8000;
    else                      return h[15:0];
  endfunction

  assign out_valid = v1;
  assign x0_o      = half_sat(20'(x0_r) + 20'(t1_r));
  assign x1_o      = half_sat(20'(x0_r) - 20'(t1_r));
  assign y0_o      = half_sat(20'(y0_r) + 20'(t2_r));
  assign y1_o      = half_sat(20'(y0_r) - 20'(t2_r));
  assign out_tag   = tag_r;
endmodule

// cfft_pkg: types, constants and the instruction encoding shared by the
// cached-FFT processors (single-issue and VLIW).
//
// Data and coefficients are complex numbers whose 16-bit real and imaginary
// parts are packed into one 32-bit word (real part in the upper half), as in
// the document's memories (32-bit words of two 16-bit halves). Both halves are
// two's complement Q1.15. Which half holds the real part is this design's
// choice.
//
// The document lists the instructions (BFLY, READ, WRITE, RPT, pointer set-up
// instructions) but gives no binary encoding; the 24-bit encoding below is
// this design's own. The 24-bit width follows the 24x256 program memory.
//
//   [23:20] opcode
//   LDI    rd[19:17]            imm[15:0]     GPR[rd] = imm
//   ADDI   rd[19:17]            imm[15:0]     GPR[rd] += imm (mod 2^16)
//   DBNZ   rd[19:17]            tgt[7:0]      GPR[rd] -= 1; branch if not 0
//   JMP                         tgt[7:0]
//   SETCTR                      imm[15:0]     CTR = imm
//   SETRP  rs[19:17] sh[3:0]                  RP = GPR[rs] << sh
//   SETCP                       imm[4:0]      CP = imm
//   READ   br[16]               inc[9:0]      CR[CP] = DM[br ? rev(RP) : RP];
//                                             CP += 1; RP += inc
//   WRITE  br[16]               inc[9:0]      DM[br ? rev(RP) : RP] = CR[CP];
//                                             CP += 1; RP += inc
//   BFLY   rg[19:17] rp[16:14] rb[13:11] e[1:0]
//                                             butterfly on the cache, post-
//                                             increments GPR[rb] (see cfft_agu)
//   RPT                         n[15:0]       issue the next instruction n times
//   HALT, NOP
//
// CTR (16 bits) holds the parameters of the current epoch:
//   [3:0]   LOG2N  number of address bits reversed by READ/WRITE with br=1
//   [6:4]   NPASS  passes per group in this epoch
//   [9:7]   LOG2B  log2 of butterflies per pass (cache bits used minus one)
//   [13:10] LOG2G  log2 of groups (group bits)
package cfft_pkg;

  localparam int DW = 16;                 // real / imaginary part width
  localparam int WW = 2 * DW;             // packed complex word

  typedef struct packed {
    logic signed [DW-1:0] re;
    logic signed [DW-1:0] im;
  } cplx_t;

  typedef enum logic [3:0] {
    OP_NOP    = 4'h0,
    OP_HALT   = 4'h1,
    OP_LDI    = 4'h2,
    OP_ADDI   = 4'h3,
    OP_DBNZ   = 4'h4,
    OP_JMP    = 4'h5,
    OP_SETCTR = 4'h6,
    OP_SETRP  = 4'h7,
    OP_SETCP  = 4'h8,
    OP_READ   = 4'h9,
    OP_WRITE  = 4'hA,
    OP_BFLY   = 4'hB,
    OP_RPT    = 4'hC
  } opcode_t;

  typedef struct packed {
    logic [3:0] log2g;
    logic [2:0] log2b;
    logic [2:0] npass;
    logic [3:0] log2n;
  } ctr_fields_t;

  // Instruction builders, used by testbenches and by anyone writing programs.
  function automatic logic [23:0] i_nop();
    return {OP_NOP, 20'd0};
  endfunction
  function automatic logic [23:0] i_halt();
    return {OP_HALT, 20'd0};
  endfunction
  function automatic logic [23:0] i_ldi(input logic [2:0] rd, input logic [15:0] imm);
    return {OP_LDI, rd, 1'b0, imm};
  endfunction
  function automatic logic [23:0] i_addi(input logic [2:0] rd, input logic [15:0] imm);
    return {OP_ADDI, rd, 1'b0, imm};
  endfunction
  function automatic logic [23:0] i_dbnz(input logic [2:0] rd, input logic [7:0] tgt);
    return {OP_DBNZ, rd, 9'd0, tgt};
  endfunction
  function automatic logic [23:0] i_jmp(input logic [7:0] tgt);
    return {OP_JMP, 12'd0, tgt};
  endfunction
  function automatic logic [23:0] i_setctr(input logic [3:0] log2n, input logic [2:0] npass,
                                           input logic [2:0] log2b, input logic [3:0] log2g);
    return {OP_SETCTR, 4'd0, 2'd0, log2g, log2b, npass, log2n};
  endfunction
  function automatic logic [23:0] i_setrp(input logic [2:0] rs, input logic [3:0] sh);
    return {OP_SETRP, rs, 13'd0, sh};
  endfunction
  function automatic logic [23:0] i_setcp(input logic [4:0] imm);
    return {OP_SETCP, 15'd0, imm};
  endfunction
  function automatic logic [23:0] i_read(input logic br, input logic [9:0] inc);
    return {OP_READ, 3'd0, br, 6'd0, inc};
  endfunction
  function automatic logic [23:0] i_write(input logic br, input logic [9:0] inc);
    return {OP_WRITE, 3'd0, br, 6'd0, inc};
  endfunction
  function automatic logic [23:0] i_bfly(input logic [2:0] rg, input logic [2:0] rp,
                                         input logic [2:0] rb, input logic [1:0] e);
    return {OP_BFLY, rg, rp, rb, 9'd0, e};
  endfunction
  function automatic logic [23:0] i_rpt(input logic [15:0] n);
    return {OP_RPT, 4'd0, n};
  endfunction

  // Saturate a wider two's complement value to a 16-bit part.
  function automatic logic signed [DW-1:0] sat16(input logic signed [DW+3:0] v);
    if (v > 20'sd32767)       return 16'sh7FFF;
    else if (v < -20'sd32768) return 16'sh8000;
    else                      return v[DW-1:0];
  endfunction

endpackage

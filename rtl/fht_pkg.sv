// fht_pkg: instruction encoding shared by the FHT and cached-FHT processors.
//
// The document gives the processors' pipelines and their special
// dual-butterfly instruction but no instruction set or encoding; the 24-bit
// encoding below is this design's own, kept close to the cached-FFT one.
// Data are 16-bit two's complement Q1.15 real numbers.
//
//   [23:20] opcode
//   LDI    rd[19:17] imm[15:0]     GPR[rd] = imm
//   ADDI   rd[19:17] imm[15:0]     GPR[rd] += imm
//   DBNZ   rd[19:17] tgt[7:0]      GPR[rd] -= 1; branch if not 0
//   JMP    tgt[7:0]
//   RPT    n[15:0]                 issue the next instruction n times
//   DBF    rs[19:17] rb[16:14] q[2:0]
//        FHT:  dual butterfly of stage GPR[rs], butterfly GPR[rb] (post-
//              incremented); results and their addresses go to data/address
//              registers 4q .. 4q+3
//   STORE  r[3:0]                  FHT: M[A[2r]] = D[2r], M[A[2r+1]] = D[2r+1]
//   DBF    rg[19:17] rp[16:14] rb[13:11] e[0]
//        CFHT: dual butterfly on the cache, group GPR[rg], pass GPR[rp],
//              butterfly GPR[rb] (post-incremented), epoch e
//   SETCTR imm[15:0]               CFHT: [2:0] C0 = cache bits of epoch 0,
//                                        [5:3] R = passes of epoch 1
//   SETRP  rg[19:17] e[0]          CFHT: set both read pointers for group
//                                        GPR[rg] of epoch e
//   SETCP  imm[4:0]                CFHT: CP = imm
//   READ2  inc[11:0]               CFHT: C[CP] = M[RP0], AUX[CP] = M[RP1];
//                                        CP += 1; RP0 += inc; RP1 += inc
//   WRITE2 inc[11:0]               CFHT: the reverse
//   HALT, NOP
package fht_pkg;

  typedef enum logic [3:0] {
    F_NOP    = 4'h0,
    F_HALT   = 4'h1,
    F_LDI    = 4'h2,
    F_ADDI   = 4'h3,
    F_DBNZ   = 4'h4,
    F_JMP    = 4'h5,
    F_RPT    = 4'h6,
    F_DBF    = 4'h7,
    F_STORE  = 4'h8,
    F_SETCTR = 4'h9,
    F_SETRP  = 4'hA,
    F_SETCP  = 4'hB,
    F_READ2  = 4'hC,
    F_WRITE2 = 4'hD
  } fop_t;

  function automatic logic [23:0] f_nop();
    return {F_NOP, 20'd0};
  endfunction
  function automatic logic [23:0] f_halt();
    return {F_HALT, 20'd0};
  endfunction
  function automatic logic [23:0] f_ldi(input logic [2:0] rd, input logic [15:0] imm);
    return {F_LDI, rd, 1'b0, imm};
  endfunction
  function automatic logic [23:0] f_addi(input logic [2:0] rd, input logic [15:0] imm);
    return {F_ADDI, rd, 1'b0, imm};
  endfunction
  function automatic logic [23:0] f_dbnz(input logic [2:0] rd, input logic [7:0] tgt);
    return {F_DBNZ, rd, 9'd0, tgt};
  endfunction
  function automatic logic [23:0] f_jmp(input logic [7:0] tgt);
    return {F_JMP, 12'd0, tgt};
  endfunction
  function automatic logic [23:0] f_rpt(input logic [15:0] n);
    return {F_RPT, 4'd0, n};
  endfunction
  function automatic logic [23:0] f_dbf(input logic [2:0] rs, input logic [2:0] rb,
                                        input logic [2:0] q);
    return {F_DBF, rs, rb, 11'd0, q};
  endfunction
  function automatic logic [23:0] f_store(input logic [3:0] r);
    return {F_STORE, 16'd0, r};
  endfunction
  function automatic logic [23:0] f_cdbf(input logic [2:0] rg, input logic [2:0] rp,
                                         input logic [2:0] rb, input logic e);
    return {F_DBF, rg, rp, rb, 10'd0, e};
  endfunction
  function automatic logic [23:0] f_setctr(input logic [2:0] c0, input logic [2:0] r);
    return {F_SETCTR, 14'd0, r, c0};
  endfunction
  function automatic logic [23:0] f_setrp(input logic [2:0] rg, input logic e);
    return {F_SETRP, rg, 16'd0, e};
  endfunction
  function automatic logic [23:0] f_setcp(input logic [4:0] imm);
    return {F_SETCP, 15'd0, imm};
  endfunction
  function automatic logic [23:0] f_read2(input logic [11:0] inc);
    return {F_READ2, 8'd0, inc};
  endfunction
  function automatic logic [23:0] f_write2(input logic [11:0] inc);
    return {F_WRITE2, 8'd0, inc};
  endfunction

endpackage

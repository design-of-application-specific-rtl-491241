// cfft_s_proc: single-issue (SISD) application-specific processor for the
// cached FFT.
//
// The cached FFT loads a small block ("group") of the data memory into a
// cache, runs as many butterfly stages ("passes") on it as the cache allows,
// and writes it back; all groups of an epoch do this, and two epochs cover
// all log2(N) stages. Here the cache is a file of 32 complex registers, so
// transforms of up to 32*32 = 1024 points fit in two epochs.
//
// Pipeline (as the document draws it): FE, DC, EX1, EX2, EX3, EX4.
//   FE   reads the 24-bit instruction at PC from the program memory.
//   DC   decodes; it also implements RPT: after "RPT n" the next instruction
//        is issued n times back to back while FE and DC hold (zero-overhead
//        repeat). RPT itself takes one DC slot.
//   EX1  reads and writes the 8 general-purpose registers and the special
//        registers (CTR, RP, CP), accesses the data memory (READ, WRITE),
//        resolves branches (DBNZ, JMP), and for BFLY computes the cache
//        indexes and twiddle address (cfft_agu), reads both cache operands
//        and fetches the twiddle.
//   EX2-EX4  the butterfly (cfft_bfly): multiplications, additions,
//        add/subtract; the two results are written to the cache at the end
//        of EX4.
// Instruction encoding and CTR layout: see cfft_pkg.
//
// Hazards. A taken branch in EX1 flushes the two younger instructions (FE and
// DC). An instruction in EX1 that touches a cache register still to be
// written by a butterfly in EX2-EX4 is held in EX1 (interlock) until the
// write is done. The document states that the single-issue processor has no
// hazards between passes for its programs; the interlock makes small caches
// (fewer than 8 butterflies per pass) safe too and is this design's choice.
//
// READ/WRITE with br = 1 bit-reverse the low LOG2N bits of RP. Using br on
// every transfer keeps each group's loads and stores on the same addresses,
// so the transform runs in place with input in natural order and output in
// bit-reversed order (this design's convention; the document only says the
// RP address is bit reversed for decimation in time).
//
// Host interface: while the processor is idle the host owns the program
// memory write port and the data memory port. A one-cycle start pulse
// begins execution at address 0; busy stays high until HALT has left EX1 and
// the butterfly pipeline is empty; done pulses for one cycle then.
// Memory reads are combinational (this design's choice).
// Counters (cycles, butterflies, interlock stall cycles, flushes, repeated
// issues) are kept for performance measurement.
module cfft_s_proc
  import cfft_pkg::*;
#(
  parameter int PM_DEPTH = 256,
  parameter int DM_DEPTH = 1024,
  parameter int CACHE    = 32,
  parameter int NMAX     = 1024,
  parameter int NGPR     = 8,
  localparam int PAW = $clog2(PM_DEPTH),
  localparam int DAW = $clog2(DM_DEPTH),
  localparam int CB  = $clog2(CACHE),
  localparam int TWB = $clog2(NMAX) - 1
) (
  input  logic            clk,
  input  logic            rst_n,
  // host
  input  logic            start,
  output logic            busy,
  output logic            done,
  input  logic            pm_we,
  input  logic [PAW-1:0]  pm_addr,
  input  logic [23:0]     pm_wdata,
  input  logic            dm_we,
  input  logic [DAW-1:0]  dm_addr,
  input  logic [31:0]     dm_wdata,
  output logic [31:0]     dm_rdata,
  // performance counters
  output logic [31:0]     cnt_cycles,
  output logic [31:0]     cnt_bfly,
  output logic [31:0]     cnt_stall,
  output logic [31:0]     cnt_flush,
  output logic [31:0]     cnt_rpt
);
  // ---------------------------------------------------------------- state
  logic             running, halted;
  logic [PAW-1:0]   pc;
  logic             fd_valid;
  logic [23:0]      fd_instr;
  logic             de_valid;
  logic [23:0]      de_instr;
  logic [15:0]      rpt_cnt;
  logic [15:0]      gpr [NGPR];
  ctr_fields_t      ctr;
  logic [DAW-1:0]   rp;
  logic [CB-1:0]    cp;

  // ---------------------------------------------------------------- FE
  logic [23:0] pm_rdata;
  sp_ram #(.WIDTH(24), .DEPTH(PM_DEPTH)) u_pm (
    .clk(clk), .we(pm_we && !running), .addr(running ? pc : pm_addr),
    .wdata(pm_wdata), .rdata(pm_rdata));

  // ---------------------------------------------------------------- EX1 decode
  opcode_t          op;
  logic [2:0]       f_r1, f_r2, f_r3;
  logic [15:0]      f_imm;
  logic             f_br;
  logic [9:0]       f_inc;
  logic [1:0]       f_e;
  logic [7:0]       f_tgt;
  logic [3:0]       f_sh;

  always_comb begin
    op    = opcode_t'(de_instr[23:20]);
    f_r1  = de_instr[19:17];
    f_r2  = de_instr[16:14];
    f_r3  = de_instr[13:11];
    f_imm = de_instr[15:0];
    f_br  = de_instr[16];
    f_inc = de_instr[9:0];
    f_e   = de_instr[1:0];
    f_tgt = de_instr[7:0];
    f_sh  = de_instr[3:0];
  end

  // BFLY address generation
  logic [CB-1:0]  idx_a, idx_b;
  logic [TWB-1:0] tw_addr;
  logic [15:0]    p_next, b_next;
  cfft_agu #(.CACHE(CACHE), .NMAX(NMAX)) u_agu (
    .g(gpr[f_r1]), .p(gpr[f_r2]), .b(gpr[f_r3]), .e(f_e), .ctr(ctr),
    .idx_a(idx_a), .idx_b(idx_b), .tw_addr(tw_addr), .p_next(p_next), .b_next(b_next));

  logic [31:0] tw;
  twiddle_rom #(.NMAX(NMAX)) u_tw (.addr(tw_addr), .w(tw));

  // cache registers: read 0 = A or CR[CP], read 1 = B;
  // write 0 = X, write 1 = Y, write 2 = READ
  logic [1:0][CB-1:0] cr_raddr;
  logic [1:0][31:0]   cr_rdata;
  logic [2:0]         cr_we;
  logic [2:0][CB-1:0] cr_waddr;
  logic [2:0][31:0]   cr_wdata;
  cache_regfile #(.ENTRIES(CACHE), .WIDTH(32), .NR(2), .NW(3)) u_cr (
    .clk(clk), .rst_n(rst_n), .raddr(cr_raddr), .rdata(cr_rdata),
    .we(cr_we), .waddr(cr_waddr), .wdata(cr_wdata));

  // data memory
  function automatic logic [DAW-1:0] bitrev(input logic [DAW-1:0] a, input logic [3:0] n);
    logic [DAW-1:0] r;
    r = '0;
    for (int i = 0; i < DAW; i++)
      if (i < int'(n)) r[int'(n) - 1 - i] = a[i];
    return r;
  endfunction

  logic           ex_read, ex_write, ex_bfly, ex_go;
  logic [DAW-1:0] ex_maddr;
  logic [31:0]    dm_q;
  sp_ram #(.WIDTH(32), .DEPTH(DM_DEPTH)) u_dm (
    .clk(clk),
    .we(running ? (ex_go && ex_write) : dm_we),
    .addr(running ? ex_maddr : dm_addr),
    .wdata(running ? cr_rdata[0] : dm_wdata),
    .rdata(dm_q));
  assign dm_rdata = dm_q;

  // butterfly pipeline EX2..EX4
  logic               ex2_valid;
  cplx_t              ex2_a, ex2_b, ex2_w;
  logic [2*CB-1:0]    ex2_tag;
  logic               bf_valid;
  cplx_t              bf_x, bf_y;
  logic [2*CB-1:0]    bf_tag;
  cfft_bfly #(.FUSED(1'b0), .TAGW(2*CB)) u_bfly (
    .clk(clk), .rst_n(rst_n), .in_valid(ex2_valid), .a(ex2_a), .b(ex2_b), .w(ex2_w),
    .in_tag(ex2_tag), .out_valid(bf_valid), .x(bf_x), .y(bf_y), .out_tag(bf_tag));

  // destinations of butterflies in flight: [0] EX2, [1] EX3, [2] EX4
  logic [2:0]            pend_v;
  logic [2:0][2*CB-1:0]  pend_tag;

  // ---------------------------------------------------------------- EX1
  logic          uses_cr;
  logic [CB-1:0] use0, use1;
  logic          hazard, stall, branch;
  logic [PAW-1:0] br_tgt;
  logic [15:0]   dec;

  always_comb begin
    ex_read  = de_valid && op == OP_READ;
    ex_write = de_valid && op == OP_WRITE;
    ex_bfly  = de_valid && op == OP_BFLY;
    ex_maddr = f_br ? bitrev(rp, ctr.log2n) : rp;
    cr_raddr[0] = ex_bfly ? idx_a : cp;
    cr_raddr[1] = idx_b;
    // interlock against pending butterfly results
    uses_cr = ex_read || ex_write || ex_bfly;
    use0    = ex_bfly ? idx_a : cp;
    use1    = ex_bfly ? idx_b : cp;
    hazard  = 1'b0;
    for (int k = 0; k < 3; k++)
      if (pend_v[k] && uses_cr &&
          (pend_tag[k][2*CB-1:CB] == use0 || pend_tag[k][CB-1:0] == use0 ||
           pend_tag[k][2*CB-1:CB] == use1 || pend_tag[k][CB-1:0] == use1))
        hazard = 1'b1;
    stall  = running && hazard;
    ex_go  = running && de_valid && !stall;
    dec    = gpr[f_r1] - 16'd1;
    branch = ex_go && ((op == OP_JMP) || (op == OP_DBNZ && dec != 16'd0));
    br_tgt = PAW'(f_tgt);
    // cache writes
    cr_we[0]    = bf_valid;
    cr_waddr[0] = bf_tag[2*CB-1:CB];
    cr_wdata[0] = bf_x;
    cr_we[1]    = bf_valid;
    cr_waddr[1] = bf_tag[CB-1:0];
    cr_wdata[1] = bf_y;
    cr_we[2]    = ex_go && ex_read;
    cr_waddr[2] = cp;
    cr_wdata[2] = dm_q;
  end

  logic halt_ex;
  assign halt_ex = ex_go && op == OP_HALT;

  // GPRs and special registers
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < NGPR; i++) gpr[i] <= '0;
      ctr <= '0;
      rp  <= '0;
      cp  <= '0;
    end else if (ex_go) begin
      unique case (op)
        OP_LDI:    gpr[f_r1] <= f_imm;
        OP_ADDI:   gpr[f_r1] <= gpr[f_r1] + f_imm;
        OP_DBNZ:   gpr[f_r1] <= dec;
        OP_SETCTR: ctr <= ctr_fields_t'(f_imm[13:0]);
        OP_SETRP:  rp  <= DAW'(gpr[f_r1] << f_sh);
        OP_SETCP:  cp  <= f_imm[CB-1:0];
        OP_READ, OP_WRITE: begin
          cp <= cp + CB'(1);
          rp <= rp + DAW'(f_inc);
        end
        OP_BFLY: begin
          gpr[f_r2] <= p_next;
          gpr[f_r3] <= b_next;
        end
        default: ;
      endcase
    end
  end

  // EX1 -> EX2 register and pending destinations
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ex2_valid <= 1'b0;
      pend_v    <= '0;
    end else begin
      ex2_valid <= ex_go && ex_bfly;
      pend_v    <= {pend_v[1:0], ex_go && ex_bfly};
    end
  end
  always_ff @(posedge clk) begin
    ex2_a    <= cr_rdata[0];
    ex2_b    <= cr_rdata[1];
    ex2_w    <= tw;
    ex2_tag  <= {idx_a, idx_b};
    pend_tag <= {pend_tag[1:0], {idx_a, idx_b}};
  end

  // ---------------------------------------------------------------- FE / DC / control
  logic de_is_rpt, de_issue, fd_hold, fetch_en;
  always_comb begin
    de_is_rpt = fd_valid && opcode_t'(fd_instr[23:20]) == OP_RPT;
    // the instruction in DC is repeated while rpt_cnt is not zero
    fd_hold   = fd_valid && !de_is_rpt && rpt_cnt != 16'd0;
    de_issue  = fd_valid && !de_is_rpt;
    fetch_en  = running && !halted && !halt_ex;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      running  <= 1'b0;
      halted   <= 1'b0;
      done     <= 1'b0;
      pc       <= '0;
      fd_valid <= 1'b0;
      fd_instr <= '0;
      de_valid <= 1'b0;
      de_instr <= '0;
      rpt_cnt  <= '0;
    end else begin
      done <= 1'b0;
      if (!running) begin
        if (start) begin
          running  <= 1'b1;
          halted   <= 1'b0;
          pc       <= '0;
          fd_valid <= 1'b0;
          de_valid <= 1'b0;
          rpt_cnt  <= '0;
        end
      end else if (halted) begin
        if (!ex2_valid && pend_v == '0) begin
          running <= 1'b0;
          done    <= 1'b1;
        end
      end else if (branch || halt_ex) begin
        pc       <= br_tgt;
        fd_valid <= 1'b0;
        de_valid <= 1'b0;
        rpt_cnt  <= '0;
        halted   <= halt_ex;
      end else if (!stall) begin
        // DC -> EX1
        de_valid <= de_issue;
        de_instr <= fd_instr;
        if (de_is_rpt)
          rpt_cnt <= (fd_instr[15:0] == 16'd0) ? 16'd0 : fd_instr[15:0] - 16'd1;
        else if (fd_hold)
          rpt_cnt <= rpt_cnt - 16'd1;
        // FE -> DC
        if (!fd_hold) begin
          fd_valid <= fetch_en;
          fd_instr <= pm_rdata;
          if (fetch_en) pc <= pc + PAW'(1);
        end
      end
    end
  end

  assign busy = running;

  // ---------------------------------------------------------------- counters
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt_cycles <= '0;
      cnt_bfly   <= '0;
      cnt_stall  <= '0;
      cnt_flush  <= '0;
      cnt_rpt    <= '0;
    end else if (!running && start) begin
      cnt_cycles <= '0;
      cnt_bfly   <= '0;
      cnt_stall  <= '0;
      cnt_flush  <= '0;
      cnt_rpt    <= '0;
    end else if (running) begin
      cnt_cycles <= cnt_cycles + 1;
      if (ex_go && ex_bfly)                  cnt_bfly  <= cnt_bfly + 1;
      if (stall)                             cnt_stall <= cnt_stall + 1;
      if (branch)                            cnt_flush <= cnt_flush + 1;
      if (!stall && !branch && !halt_ex && !halted && fd_hold) cnt_rpt <= cnt_rpt + 1;
    end
  end

  // the host must not write the memories while the processor runs
  assert property (@(posedge clk) disable iff (!rst_n) running |-> !(pm_we || dm_we))
    else $error("host memory write while the processor is running");
endmodule

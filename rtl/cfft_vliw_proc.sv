// cfft_vliw_proc: VLIW application-specific processor for the cached FFT,
// with four issue slots that can each execute a BFLY.
//
// Same instruction set and cache organisation as cfft_s_proc (see cfft_pkg),
// but an instruction word is a bundle of SLOTS 24-bit instructions, slot 0 in
// bits [23:0]. Slot 0 executes every instruction; slots 1..3 execute BFLY
// and treat anything else as NOP (which instructions the other slots accept
// is this design's choice; the document only says each slot can execute a
// BFLY). RPT in slot 0 repeats the next bundle.
//
// Pipeline: FE, DC, EX1, EX2, EX3. The butterfly uses 3 stages instead of 4:
// EX1 computes the addresses and reads the cache and twiddle, EX2
// multiplies, EX3 adds, adds/subtracts and writes the cache at its end (as
// the document describes, the last two butterfly operations share a stage so
// results are ready sooner).
//
// Twiddles: the 512-entry table is split into SLOTS physically separate
// banks of 128 words (bank k holds W_1024^(128k .. 128k+127)); each slot
// reaches every bank through twiddle_xbar, the bank being the 2 MSBs of the
// twiddle address. Conflicts are avoided by the program.
//
// As in the document there is no interlock and no forwarding: the program
// must keep a bundle from reading a cache register that a BFLY issued 1 or 2
// bundles earlier will write (NOPs between passes). Such reads are counted
// on cnt_hazard, and twiddle bank conflicts on cnt_conflict, so a test can
// show a program to be free of them.
//
// Host interface and counters as in cfft_s_proc.
module cfft_vliw_proc
  import cfft_pkg::*;
#(
  parameter int PM_DEPTH = 256,
  parameter int DM_DEPTH = 1024,
  parameter int CACHE    = 32,
  parameter int NMAX     = 1024,
  parameter int NGPR     = 8,
  parameter int SLOTS    = 4,
  localparam int PAW = $clog2(PM_DEPTH),
  localparam int DAW = $clog2(DM_DEPTH),
  localparam int CB  = $clog2(CACHE),
  localparam int TWB = $clog2(NMAX) - 1,
  localparam int BKW = TWB - $clog2(SLOTS),
  localparam int IW  = 24 * SLOTS
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            start,
  output logic            busy,
  output logic            done,
  input  logic            pm_we,
  input  logic [PAW-1:0]  pm_addr,
  input  logic [IW-1:0]   pm_wdata,
  input  logic            dm_we,
  input  logic [DAW-1:0]  dm_addr,
  input  logic [31:0]     dm_wdata,
  output logic [31:0]     dm_rdata,
  output logic [31:0]     cnt_cycles,
  output logic [31:0]     cnt_bfly,
  output logic [31:0]     cnt_hazard,
  output logic [31:0]     cnt_conflict,
  output logic [31:0]     cnt_flush,
  output logic [31:0]     cnt_rpt
);
  logic             running, halted;
  logic [PAW-1:0]   pc;
  logic             fd_valid;
  logic [IW-1:0]    fd_instr;
  logic             de_valid;
  logic [IW-1:0]    de_instr;
  logic [15:0]      rpt_cnt;
  logic [15:0]      gpr [NGPR];
  ctr_fields_t      ctr;
  logic [DAW-1:0]   rp;
  logic [CB-1:0]    cp;

  // ---------------------------------------------------------------- FE
  logic [IW-1:0] pm_rdata;
  sp_ram #(.WIDTH(IW), .DEPTH(PM_DEPTH)) u_pm (
    .clk(clk), .we(pm_we && !running), .addr(running ? pc : pm_addr),
    .wdata(pm_wdata), .rdata(pm_rdata));

  // ---------------------------------------------------------------- EX1, slot 0 fields
  opcode_t      op;
  logic [2:0]   f_r1;
  logic [15:0]  f_imm;
  logic         f_br;
  logic [9:0]   f_inc;
  logic [7:0]   f_tgt;
  logic [3:0]   f_sh;
  always_comb begin
    op    = opcode_t'(de_instr[23:20]);
    f_r1  = de_instr[19:17];
    f_imm = de_instr[15:0];
    f_br  = de_instr[16];
    f_inc = de_instr[9:0];
    f_tgt = de_instr[7:0];
    f_sh  = de_instr[3:0];
  end

  // per-slot BFLY decode and address generation
  logic [SLOTS-1:0]           s_bfly;
  logic [SLOTS-1:0][2:0]      s_rg, s_rp, s_rb;
  logic [SLOTS-1:0][CB-1:0]   s_ia, s_ib;
  logic [SLOTS-1:0][TWB-1:0]  s_tw;
  logic [SLOTS-1:0][15:0]     s_pn, s_bn;
  logic [SLOTS-1:0][31:0]     s_w;

  for (genvar k = 0; k < SLOTS; k++) begin : g_slot
    logic [23:0] ins;
    assign ins      = de_instr[24*k +: 24];
    assign s_bfly[k] = de_valid && opcode_t'(ins[23:20]) == OP_BFLY;
    assign s_rg[k]  = ins[19:17];
    assign s_rp[k]  = ins[16:14];
    assign s_rb[k]  = ins[13:11];
    cfft_agu #(.CACHE(CACHE), .NMAX(NMAX), .SLOTS(SLOTS)) u_agu (
      .g(gpr[s_rg[k]]), .p(gpr[s_rp[k]]), .b(gpr[s_rb[k]]), .e(ins[1:0]), .ctr(ctr),
      .idx_a(s_ia[k]), .idx_b(s_ib[k]), .tw_addr(s_tw[k]),
      .p_next(s_pn[k]), .b_next(s_bn[k]));
  end

  // twiddle banks behind the crossbar
  logic [SLOTS-1:0][BKW-1:0] bank_addr;
  logic [SLOTS-1:0][31:0]    bank_data;
  logic                      tw_conflict;
  for (genvar k = 0; k < SLOTS; k++) begin : g_bank
    twiddle_rom #(.NMAX(NMAX), .DEPTH(NMAX / 2 / SLOTS), .BASE(k * NMAX / 2 / SLOTS)) u_rom (
      .addr(bank_addr[k]), .w(bank_data[k]));
  end
  twiddle_xbar #(.SLOTS(SLOTS), .BANKS(SLOTS), .AW(TWB), .WIDTH(32)) u_xbar (
    .slot_valid(s_bfly), .slot_addr(s_tw), .slot_data(s_w),
    .bank_addr(bank_addr), .bank_data(bank_data), .conflict(tw_conflict));

  // cache registers: reads 2k, 2k+1 for slot k (read 0 doubles as CR[CP]);
  // writes 2k, 2k+1 for slot k's results, write 2*SLOTS for READ
  localparam int NR = 2 * SLOTS;
  localparam int NW = 2 * SLOTS + 1;
  logic [NR-1:0][CB-1:0] cr_raddr;
  logic [NR-1:0][31:0]   cr_rdata;
  logic [NW-1:0]         cr_we;
  logic [NW-1:0][CB-1:0] cr_waddr;
  logic [NW-1:0][31:0]   cr_wdata;
  cache_regfile #(.ENTRIES(CACHE), .WIDTH(32), .NR(NR), .NW(NW)) u_cr (
    .clk(clk), .rst_n(rst_n), .raddr(cr_raddr), .rdata(cr_rdata),
    .we(cr_we), .waddr(cr_waddr), .wdata(cr_wdata));

  function automatic logic [DAW-1:0] bitrev(input logic [DAW-1:0] a, input logic [3:0] n);
    logic [DAW-1:0] r;
    r = '0;
    for (int i = 0; i < DAW; i++)
      if (i < int'(n)) r[int'(n) - 1 - i] = a[i];
    return r;
  endfunction

  logic           ex_read, ex_write, ex_go;
  logic [DAW-1:0] ex_maddr;
  logic [31:0]    dm_q;
  sp_ram #(.WIDTH(32), .DEPTH(DM_DEPTH)) u_dm (
    .clk(clk),
    .we(running ? (ex_go && ex_write) : dm_we),
    .addr(running ? ex_maddr : dm_addr),
    .wdata(running ? cr_rdata[0] : dm_wdata),
    .rdata(dm_q));
  assign dm_rdata = dm_q;

  // butterfly units (EX2, EX3)
  logic [SLOTS-1:0]             ex2_valid;
  cplx_t [SLOTS-1:0]            ex2_a, ex2_b, ex2_w;
  logic [SLOTS-1:0][2*CB-1:0]   ex2_tag;
  logic [SLOTS-1:0]             bf_valid;
  cplx_t [SLOTS-1:0]            bf_x, bf_y;
  logic [SLOTS-1:0][2*CB-1:0]   bf_tag;
  for (genvar k = 0; k < SLOTS; k++) begin : g_bf
    cfft_bfly #(.FUSED(1'b1), .TAGW(2*CB)) u_bfly (
      .clk(clk), .rst_n(rst_n), .in_valid(ex2_valid[k]), .a(ex2_a[k]), .b(ex2_b[k]),
      .w(ex2_w[k]), .in_tag(ex2_tag[k]), .out_valid(bf_valid[k]), .x(bf_x[k]),
      .y(bf_y[k]), .out_tag(bf_tag[k]));
  end

  logic hazard, branch, halt_ex, any_bfly;
  logic [PAW-1:0] br_tgt;
  logic [15:0] dec;

  function automatic logic hits(input logic [SLOTS-1:0] v, input logic [SLOTS-1:0][2*CB-1:0] t,
                                input logic [CB-1:0] r);
    logic h;
    h = 1'b0;
    for (int k = 0; k < SLOTS; k++)
      if (v[k] && (t[k][2*CB-1:CB] == r || t[k][CB-1:0] == r)) h = 1'b1;
    return h;
  endfunction

  always_comb begin
    ex_read  = de_valid && op == OP_READ;
    ex_write = de_valid && op == OP_WRITE;
    ex_maddr = f_br ? bitrev(rp, ctr.log2n) : rp;
    ex_go    = running && de_valid;
    any_bfly = |s_bfly;
    for (int k = 0; k < SLOTS; k++) begin
      cr_raddr[2*k]   = s_ia[k];
      cr_raddr[2*k+1] = s_ib[k];
      cr_we[2*k]      = bf_valid[k];
      cr_waddr[2*k]   = bf_tag[k][2*CB-1:CB];
      cr_wdata[2*k]   = bf_x[k];
      cr_we[2*k+1]    = bf_valid[k];
      cr_waddr[2*k+1] = bf_tag[k][CB-1:0];
      cr_wdata[2*k+1] = bf_y[k];
    end
    if (!s_bfly[0]) cr_raddr[0] = cp;
    cr_we[NW-1]    = ex_go && ex_read;
    cr_waddr[NW-1] = cp;
    cr_wdata[NW-1] = dm_q;
    // reads of registers still in flight in EX2 or EX3 (program error)
    hazard = 1'b0;
    if (ex_go) begin
      for (int k = 0; k < SLOTS; k++)
        if (s_bfly[k] && (hits(ex2_valid, ex2_tag, s_ia[k]) || hits(ex2_valid, ex2_tag, s_ib[k]) ||
                          hits(bf_valid, bf_tag, s_ia[k])  || hits(bf_valid, bf_tag, s_ib[k])))
          hazard = 1'b1;
      if ((ex_read || ex_write) && (hits(ex2_valid, ex2_tag, cp) || hits(bf_valid, bf_tag, cp)))
        hazard = 1'b1;
    end
    dec     = gpr[f_r1] - 16'd1;
    branch  = ex_go && ((op == OP_JMP) || (op == OP_DBNZ && dec != 16'd0));
    br_tgt  = PAW'(f_tgt);
    halt_ex = ex_go && op == OP_HALT;
  end

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
        default: ;
      endcase
      for (int k = 0; k < SLOTS; k++)
        if (s_bfly[k]) begin
          gpr[s_rp[k]] <= s_pn[k];
          gpr[s_rb[k]] <= s_bn[k];
        end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) ex2_valid <= '0;
    else        ex2_valid <= ex_go ? s_bfly : '0;
  end
  always_ff @(posedge clk) begin
    for (int k = 0; k < SLOTS; k++) begin
      ex2_a[k]   <= cr_rdata[2*k];
      ex2_b[k]   <= cr_rdata[2*k+1];
      ex2_w[k]   <= s_w[k];
      ex2_tag[k] <= {s_ia[k], s_ib[k]};
    end
  end

  // ---------------------------------------------------------------- FE / DC / control
  logic de_is_rpt, de_issue, fd_hold, fetch_en;
  always_comb begin
    de_is_rpt = fd_valid && opcode_t'(fd_instr[23:20]) == OP_RPT;
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
        if (ex2_valid == '0 && bf_valid == '0) begin
          running <= 1'b0;
          done    <= 1'b1;
        end
      end else if (branch || halt_ex) begin
        pc       <= br_tgt;
        fd_valid <= 1'b0;
        de_valid <= 1'b0;
        rpt_cnt  <= '0;
        halted   <= halt_ex;
      end else begin
        de_valid <= de_issue;
        de_instr <= fd_instr;
        if (de_is_rpt)
          rpt_cnt <= (fd_instr[15:0] == 16'd0) ? 16'd0 : fd_instr[15:0] - 16'd1;
        else if (fd_hold)
          rpt_cnt <= rpt_cnt - 16'd1;
        if (!fd_hold) begin
          fd_valid <= fetch_en;
          fd_instr <= pm_rdata;
          if (fetch_en) pc <= pc + PAW'(1);
        end
      end
    end
  end

  assign busy = running;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt_cycles   <= '0;
      cnt_bfly     <= '0;
      cnt_hazard   <= '0;
      cnt_conflict <= '0;
      cnt_flush    <= '0;
      cnt_rpt      <= '0;
    end else if (!running && start) begin
      cnt_cycles   <= '0;
      cnt_bfly     <= '0;
      cnt_hazard   <= '0;
      cnt_conflict <= '0;
      cnt_flush    <= '0;
      cnt_rpt      <= '0;
    end else if (running) begin
      cnt_cycles <= cnt_cycles + 1;
      if (ex_go) cnt_bfly <= cnt_bfly + 32'($countones(s_bfly));
      if (hazard) cnt_hazard <= cnt_hazard + 1;
      if (ex_go && any_bfly && tw_conflict) cnt_conflict <= cnt_conflict + 1;
      if (branch) cnt_flush <= cnt_flush + 1;
      if (!branch && !halt_ex && !halted && fd_hold) cnt_rpt <= cnt_rpt + 1;
    end
  end

  assert property (@(posedge clk) disable iff (!rst_n) running |-> !(pm_we || dm_we))
    else $error("host memory write while the processor is running");
endmodule

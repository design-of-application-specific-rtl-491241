// fht_proc: application-specific processor for the (non-cached) fast
// Hartley transform, built around a dual-butterfly instruction.
//
// A dual butterfly needs four data words but the data memory has two ports,
// so the words are read in two consecutive pipeline stages. Pipeline (as the
// document draws it): FE, DE, ADR, MEM, MEM&MUL, ADD, ADD&SUB.
//   FE       fetch (24-bit instructions, encoding in fht_pkg)
//   DE       decode; RPT repeats the next instruction
//   ADR      general-purpose registers, branches; for DBF the four data
//            addresses and the coefficient address (fht_agu), with post-
//            increment of the butterfly register
//   MEM      DBF reads X0 and X1 (both memory ports) and the cos/sin pair;
//            STORE writes two data registers to their addresses
//   MEM&MUL  DBF reads Y0 and Y1 (both memory ports)
//   ADD      multiply-add of the T block (fht_dual_bfly)
//   ADD&SUB  add/subtract; the four results go to data registers 4q..4q+3
//            and their addresses to address registers 4q..4q+3
// There are 32 data and 32 address registers: after 8 DBFs the program
// writes the results back with 16 STOREs, two words each.
//
// Interlock (decided in ADR): an instruction that uses the memory may not
// enter MEM while a DBF is leaving MEM for MEM&MUL, because both need both
// ports; so back-to-back DBFs cost a stall cycle each, which the document
// gives as the reason this processor is slower than the cached one. A STORE
// also waits in ADR while a DBF that will write its data registers is in
// MEM, MEM&MUL or ADD (this second check is this design's choice). Branches
// resolve in ADR and flush FE and DE.
//
// In the document the MEM&MUL stage already multiplies X1 by cos and sin;
// here all four products are formed in ADD (this design's choice; the
// result is the same). The input must be placed in bit-reversed order
// (decimation in time, as in the document's flow graph); the output is in
// natural order. Host interface and counters as in cfft_s_proc.
module fht_proc
  import fht_pkg::*;
#(
  parameter int PM_DEPTH = 256,
  parameter int DM_DEPTH = 2048,
  parameter int NMAX     = 2048,
  parameter int NGPR     = 8,
  localparam int PAW = $clog2(PM_DEPTH),
  localparam int DAW = $clog2(DM_DEPTH),
  localparam int KW  = $clog2(NMAX) - 1
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            start,
  output logic            busy,
  output logic            done,
  input  logic            pm_we,
  input  logic [PAW-1:0]  pm_addr,
  input  logic [23:0]     pm_wdata,
  input  logic            dm_we,
  input  logic [DAW-1:0]  dm_addr,
  input  logic [15:0]     dm_wdata,
  output logic [15:0]     dm_rdata,
  output logic [31:0]     cnt_cycles,
  output logic [31:0]     cnt_dbf,
  output logic [31:0]     cnt_mem_stall,
  output logic [31:0]     cnt_data_stall,
  output logic [31:0]     cnt_flush
);
  typedef struct packed {
    logic           valid;
    logic           dbf;
    logic           store;
    logic           plain;
    logic [2:0]     q;
    logic [3:0]     r;
    logic [DAW-1:0] x0, x1, y0, y1;
    logic [KW-1:0]  ka;
  } mop_t;

  logic             running, halted;
  logic [PAW-1:0]   pc;
  logic             fd_valid, de_valid;
  logic [23:0]      fd_instr, de_instr;
  logic [15:0]      rpt_cnt;
  logic [15:0]      gpr [NGPR];
  logic [15:0]      dreg [32];
  logic [DAW-1:0]   areg [32];

  // ---------------------------------------------------------------- FE
  logic [23:0] pm_rdata;
  sp_ram #(.WIDTH(24), .DEPTH(PM_DEPTH)) u_pm (
    .clk(clk), .we(pm_we && !running), .addr(running ? pc : pm_addr),
    .wdata(pm_wdata), .rdata(pm_rdata));

  // ---------------------------------------------------------------- ADR
  fop_t        op;
  logic [2:0]  f_r1, f_r2, f_q;
  logic [15:0] f_imm;
  logic [3:0]  f_r;
  logic [7:0]  f_tgt;
  always_comb begin
    op    = fop_t'(de_instr[23:20]);
    f_r1  = de_instr[19:17];
    f_r2  = de_instr[16:14];
    f_imm = de_instr[15:0];
    f_q   = de_instr[2:0];
    f_r   = de_instr[3:0];
    f_tgt = de_instr[7:0];
  end

  logic [DAW-1:0] ax0, ax1, ay0, ay1;
  logic [KW-1:0]  aka;
  logic           aplain;
  fht_agu #(.AW(DAW), .NMAX(NMAX)) u_agu (
    .stage(gpr[f_r1][3:0]), .b(gpr[f_r2]), .x0(ax0), .x1(ax1), .y0(ay0), .y1(ay1),
    .cas_addr(aka), .plain(aplain));

  mop_t mem_s, mm_s;       // operations in MEM and MEM&MUL
  logic       bf_out_valid;
  logic [4*DAW+2:0] bf_in_tag, bf_out_tag;
  logic [2:0] add_q;
  logic       add_valid;

  logic a_mem, mem_hazard, data_hazard, stall, go, branch, halt_ex;
  logic [15:0] dec;
  always_comb begin
    a_mem = de_valid && (op == F_DBF || op == F_STORE);
    mem_hazard  = a_mem && mem_s.valid && mem_s.dbf;
    data_hazard = 1'b0;
    if (de_valid && op == F_STORE) begin
      if (mem_s.valid && mem_s.dbf && mem_s.q == f_r[3:1]) data_hazard = 1'b1;
      if (mm_s.valid  && mm_s.dbf  && mm_s.q  == f_r[3:1]) data_hazard = 1'b1;
      if (add_valid && add_q == f_r[3:1])                  data_hazard = 1'b1;
    end
    stall   = running && (mem_hazard || data_hazard);
    go      = running && de_valid && !stall;
    dec     = gpr[f_r1] - 16'd1;
    branch  = go && ((op == F_JMP) || (op == F_DBNZ && dec != 16'd0));
    halt_ex = go && op == F_HALT;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < NGPR; i++) gpr[i] <= '0;
    end else if (go) begin
      unique case (op)
        F_LDI:  gpr[f_r1] <= f_imm;
        F_ADDI: gpr[f_r1] <= gpr[f_r1] + f_imm;
        F_DBNZ: gpr[f_r1] <= dec;
        F_DBF:  gpr[f_r2] <= gpr[f_r2] + 16'd1;
        default: ;
      endcase
    end
  end

  // ADR -> MEM -> MEM&MUL
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      mem_s <= '0;
      mm_s  <= '0;
    end else begin
      mem_s.valid <= go && (op == F_DBF || op == F_STORE);
      mem_s.dbf   <= go && op == F_DBF;
      mem_s.store <= go && op == F_STORE;
      mem_s.plain <= aplain;
      mem_s.q     <= f_q;
      mem_s.r     <= f_r;
      mem_s.x0    <= ax0;
      mem_s.x1    <= ax1;
      mem_s.y0    <= ay0;
      mem_s.y1    <= ay1;
      mem_s.ka    <= aka;
      mm_s        <= mem_s;
      mm_s.valid  <= mem_s.valid && mem_s.dbf;
    end
  end

  // ---------------------------------------------------------------- memories
  logic           we_a, we_b;
  logic [DAW-1:0] addr_a, addr_b;
  logic [15:0]    wd_a, wd_b, rd_a, rd_b;
  always_comb begin
    we_a = 1'b0; we_b = 1'b0;
    addr_a = '0; addr_b = '0;
    wd_a = '0;   wd_b = '0;
    if (!running) begin
      we_a = dm_we; addr_a = dm_addr; wd_a = dm_wdata;
    end else if (mm_s.valid) begin
      addr_a = mm_s.y0; addr_b = mm_s.y1;
    end else if (mem_s.valid && mem_s.dbf) begin
      addr_a = mem_s.x0; addr_b = mem_s.x1;
    end else if (mem_s.valid && mem_s.store) begin
      we_a = 1'b1; addr_a = areg[{mem_s.r, 1'b0}]; wd_a = dreg[{mem_s.r, 1'b0}];
      we_b = 1'b1; addr_b = areg[{mem_s.r, 1'b1}]; wd_b = dreg[{mem_s.r, 1'b1}];
    end
  end
  dp_ram #(.WIDTH(16), .DEPTH(DM_DEPTH)) u_dm (
    .clk(clk), .we_a(we_a), .addr_a(addr_a), .wdata_a(wd_a), .rdata_a(rd_a),
    .we_b(we_b), .addr_b(addr_b), .wdata_b(wd_b), .rdata_b(rd_b));
  assign dm_rdata = rd_a;

  logic [31:0] cs;
  cas_rom #(.NMAX(NMAX)) u_cas (.addr(mem_s.ka), .cs(cs));

  // values read in MEM, held for MEM&MUL
  logic [15:0] xv0, xv1, cv, sv;
  always_ff @(posedge clk) begin
    xv0 <= rd_a;
    xv1 <= rd_b;
    cv  <= cs[31:16];
    sv  <= cs[15:0];
  end

  // ---------------------------------------------------------------- ADD, ADD&SUB
  // operands collected by the end of MEM&MUL
  logic               add_plain;
  logic [DAW-1:0]     add_a [4];
  logic signed [15:0] add_x0, add_x1, add_y0, add_y1, add_c, add_s;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) add_valid <= 1'b0;
    else        add_valid <= mm_s.valid;
  end
  always_ff @(posedge clk) begin
    add_q     <= mm_s.q;
    add_plain <= mm_s.plain;
    add_a[0]  <= mm_s.x0; add_a[1] <= mm_s.x1; add_a[2] <= mm_s.y0; add_a[3] <= mm_s.y1;
    add_x0    <= xv0;
    add_x1    <= xv1;
    add_y0    <= rd_a;
    add_y1    <= rd_b;
    add_c     <= cv;
    add_s     <= sv;
  end

  logic signed [15:0] o_x0, o_x1, o_y0, o_y1;
  assign bf_in_tag = {add_q, add_a[0], add_a[1], add_a[2], add_a[3]};
  fht_dual_bfly #(.TAGW(4*DAW+3)) u_dbf (
    .clk(clk), .rst_n(rst_n), .in_valid(add_valid), .plain(add_plain),
    .x0(add_x0), .x1(add_x1), .y0(add_y0), .y1(add_y1), .c(add_c), .s(add_s),
    .in_tag(bf_in_tag), .out_valid(bf_out_valid), .x0_o(o_x0), .x1_o(o_x1),
    .y0_o(o_y0), .y1_o(o_y1), .out_tag(bf_out_tag));

  // ADD&SUB: results to data registers 4q..4q+3, their addresses alongside
  logic [2:0] as_q;
  assign as_q = bf_out_tag[4*DAW+2:4*DAW];
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < 32; i++) begin
        dreg[i] <= '0;
        areg[i] <= '0;
      end
    end else if (bf_out_valid) begin
      dreg[{as_q, 2'd0}] <= o_x0;
      dreg[{as_q, 2'd1}] <= o_x1;
      dreg[{as_q, 2'd2}] <= o_y0;
      dreg[{as_q, 2'd3}] <= o_y1;
      areg[{as_q, 2'd0}] <= bf_out_tag[4*DAW-1:3*DAW];
      areg[{as_q, 2'd1}] <= bf_out_tag[3*DAW-1:2*DAW];
      areg[{as_q, 2'd2}] <= bf_out_tag[2*DAW-1:DAW];
      areg[{as_q, 2'd3}] <= bf_out_tag[DAW-1:0];
    end
  end

  // ---------------------------------------------------------------- FE / DE / control
  logic de_is_rpt, de_issue, fd_hold, fetch_en;
  always_comb begin
    de_is_rpt = fd_valid && fop_t'(fd_instr[23:20]) == F_RPT;
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
        if (!mem_s.valid && !mm_s.valid && !add_valid && !bf_out_valid) begin
          running <= 1'b0;
          done    <= 1'b1;
        end
      end else if (branch || halt_ex) begin
        pc       <= PAW'(f_tgt);
        fd_valid <= 1'b0;
        de_valid <= 1'b0;
        rpt_cnt  <= '0;
        halted   <= halt_ex;
      end else if (!stall) begin
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
      cnt_cycles <= '0; cnt_dbf <= '0; cnt_mem_stall <= '0; cnt_data_stall <= '0; cnt_flush <= '0;
    end else if (!running && start) begin
      cnt_cycles <= '0; cnt_dbf <= '0; cnt_mem_stall <= '0; cnt_data_stall <= '0; cnt_flush <= '0;
    end else if (running) begin
      cnt_cycles <= cnt_cycles + 1;
      if (go && op == F_DBF)              cnt_dbf <= cnt_dbf + 1;
      if (running && mem_hazard)          cnt_mem_stall <= cnt_mem_stall + 1;
      if (running && data_hazard && !mem_hazard) cnt_data_stall <= cnt_data_stall + 1;
      if (branch)                         cnt_flush <= cnt_flush + 1;
    end
  end

  assert property (@(posedge clk) disable iff (!rst_n) running |-> !(pm_we || dm_we))
    else $error("host memory write while the processor is running");
endmodule

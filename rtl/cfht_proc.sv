// cfht_proc: application-specific processor for the cached fast Hartley
// transform.
//
// Like the cached FFT, the cached FHT loads a block of the data into
// registers and runs several stages of dual butterflies on it before writing
// it back; the Hartley T blocks make each block need a partner ("auxiliary")
// group in the second epoch (see cfht_agu). The 64 registers (cache and
// auxiliary cache, 32 each) hold 2^6 words, so transforms of up to 2048
// points fit in two epochs (6 passes + 5 passes), as in the document.
//
// Pipeline (as the document draws it): FE, DE, ADR, MEM, ADD, ADD&SUB.
//   FE, DE   fetch and decode (24-bit instructions, fht_pkg); RPT repeats
//            the next instruction
//   ADR      general-purpose registers, branches, CTR/RP0/RP1/CP; for DBF
//            the four cache indexes and the coefficient address (cfht_agu)
//            with post-increment of pass and butterfly
//   MEM      DBF reads its four operands from the cache (4 read ports) and
//            the cos/sin pair; READ2 reads two words through the two data
//            memory ports (RP0 for the group, RP1 for the auxiliary group)
//            into C[CP] and C[CP+H]; WRITE2 does the reverse
//   ADD      the products and T-block sums (fht_dual_bfly computes them
//            from the MEM operands and registers them at the MEM/ADD edge;
//            putting the multipliers at the end of MEM is this design's
//            choice, the document names the stage only by its adder)
//   ADD&SUB  add/subtract result (registered at the ADD/ADD&SUB edge) is
//            written back to the cache (4 write ports) at the end of the stage
// The cache therefore has 4 read and 4 write ports for the dual butterfly,
// as in the document, plus 2 write ports for READ2 (this design's choice).
//
// As in the document there is no interlock: the program must not read in
// MEM a register that a DBF in ADD or ADD&SUB is about to write. Such reads
// are counted on cnt_hazard so a test can show a program free of them.
// Input is stored bit-reversed, output comes out in natural order.
// Host interface and counters as in fht_proc.
module cfht_proc
  import fht_pkg::*;
#(
  parameter int PM_DEPTH = 256,
  parameter int DM_DEPTH = 2048,
  parameter int NMAX     = 2048,
  parameter int CACHE    = 64,
  parameter int NGPR     = 8,
  localparam int PAW = $clog2(PM_DEPTH),
  localparam int DAW = $clog2(DM_DEPTH),
  localparam int CB  = $clog2(CACHE),
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
  output logic [31:0]     cnt_hazard,
  output logic [31:0]     cnt_flush,
  output logic [31:0]     cnt_rpt
);
  typedef struct packed {
    logic           valid;
    logic           dbf;
    logic           rd;
    logic           wr;
    logic           plain;
    logic [CB-1:0]  i0, i1, i2, i3;
    logic [KW-1:0]  ka;
    logic [DAW-1:0] m0, m1;
  } mop_t;

  logic             running, halted;
  logic [PAW-1:0]   pc;
  logic             fd_valid, de_valid;
  logic [23:0]      fd_instr, de_instr;
  logic [15:0]      rpt_cnt;
  logic [15:0]      gpr [NGPR];
  logic [2:0]       c0, rr;
  logic [DAW-1:0]   rp0, rp1;
  logic [CB-1:0]    cp;

  // ---------------------------------------------------------------- FE
  logic [23:0] pm_rdata;
  sp_ram #(.WIDTH(24), .DEPTH(PM_DEPTH)) u_pm (
    .clk(clk), .we(pm_we && !running), .addr(running ? pc : pm_addr),
    .wdata(pm_wdata), .rdata(pm_rdata));

  // ---------------------------------------------------------------- ADR
  fop_t        op;
  logic [2:0]  f_r1, f_r2, f_r3;
  logic [15:0] f_imm;
  logic [11:0] f_inc;
  logic        f_e;
  logic [7:0]  f_tgt;
  always_comb begin
    op    = fop_t'(de_instr[23:20]);
    f_r1  = de_instr[19:17];
    f_r2  = de_instr[16:14];
    f_r3  = de_instr[13:11];
    f_imm = de_instr[15:0];
    f_inc = de_instr[11:0];
    f_e   = de_instr[0];
    f_tgt = de_instr[7:0];
  end

  logic [CB-1:0] ix0, ix1, iy0, iy1;
  logic [KW-1:0] ka;
  logic          aplain;
  logic [15:0]   arp0, arp1, p_next, b_next;
  logic [6:0]    half;
  cfht_agu #(.CACHE(CACHE), .NMAX(NMAX)) u_agu (
    .e(f_e), .g(gpr[f_r1]), .p(gpr[f_r2]), .b(gpr[f_r3]), .c0(c0), .r(rr),
    .ix0(ix0), .ix1(ix1), .iy0(iy0), .iy1(iy1), .cas_addr(ka), .plain(aplain),
    .rp0(arp0), .rp1(arp1), .p_next(p_next), .b_next(b_next), .half(half));

  // the set half H of the loaded block, kept from the last SETRP
  logic [6:0] hcur;

  logic go, branch, halt_ex;
  logic [15:0] dec;
  always_comb begin
    go      = running && de_valid;
    dec     = gpr[f_r1] - 16'd1;
    branch  = go && ((op == F_JMP) || (op == F_DBNZ && dec != 16'd0));
    halt_ex = go && op == F_HALT;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < NGPR; i++) gpr[i] <= '0;
      c0   <= 3'd6;
      rr   <= 3'd5;
      rp0  <= '0;
      rp1  <= '0;
      cp   <= '0;
      hcur <= 7'd32;
    end else if (go) begin
      unique case (op)
        F_LDI:    gpr[f_r1] <= f_imm;
        F_ADDI:   gpr[f_r1] <= gpr[f_r1] + f_imm;
        F_DBNZ:   gpr[f_r1] <= dec;
        F_SETCTR: begin
          c0 <= f_imm[2:0];
          rr <= f_imm[5:3];
        end
        F_SETRP: begin
          rp0  <= DAW'(arp0);
          rp1  <= DAW'(arp1);
          hcur <= half;
        end
        F_SETCP:  cp <= f_imm[CB-1:0];
        F_READ2, F_WRITE2: begin
          cp  <= cp + CB'(1);
          rp0 <= rp0 + DAW'(f_inc);
          rp1 <= rp1 + DAW'(f_inc);
        end
        F_DBF: begin
          gpr[f_r2] <= p_next;
          gpr[f_r3] <= b_next;
        end
        default: ;
      endcase
    end
  end

  mop_t mem_s;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) mem_s <= '0;
    else begin
      mem_s.valid <= go && (op == F_DBF || op == F_READ2 || op == F_WRITE2);
      mem_s.dbf   <= go && op == F_DBF;
      mem_s.rd    <= go && op == F_READ2;
      mem_s.wr    <= go && op == F_WRITE2;
      mem_s.plain <= aplain;
      mem_s.ka    <= ka;
      mem_s.m0    <= rp0;
      mem_s.m1    <= rp1;
      if (op == F_DBF) begin
        mem_s.i0 <= ix0; mem_s.i1 <= ix1; mem_s.i2 <= iy0; mem_s.i3 <= iy1;
      end else begin
        mem_s.i0 <= cp; mem_s.i1 <= cp + CB'(hcur);
        mem_s.i2 <= '0; mem_s.i3 <= '0;
      end
    end
  end

  // ---------------------------------------------------------------- MEM
  logic [3:0][CB-1:0] cr_raddr;
  logic [3:0][15:0]   cr_rdata;
  logic [5:0]         cr_we;
  logic [5:0][CB-1:0] cr_waddr;
  logic [5:0][15:0]   cr_wdata;
  cache_regfile #(.ENTRIES(CACHE), .WIDTH(16), .NR(4), .NW(6)) u_cr (
    .clk(clk), .rst_n(rst_n), .raddr(cr_raddr), .rdata(cr_rdata),
    .we(cr_we), .waddr(cr_waddr), .wdata(cr_wdata));
  assign cr_raddr = {mem_s.i3, mem_s.i2, mem_s.i1, mem_s.i0};

  logic           we_a, we_b;
  logic [DAW-1:0] addr_a, addr_b;
  logic [15:0]    rd_a, rd_b;
  always_comb begin
    if (!running) begin
      we_a = dm_we; addr_a = dm_addr; we_b = 1'b0; addr_b = '0;
    end else begin
      we_a = mem_s.valid && mem_s.wr; addr_a = mem_s.m0;
      we_b = mem_s.valid && mem_s.wr; addr_b = mem_s.m1;
    end
  end
  dp_ram #(.WIDTH(16), .DEPTH(DM_DEPTH)) u_dm (
    .clk(clk), .we_a(we_a), .addr_a(addr_a), .wdata_a(running ? cr_rdata[0] : dm_wdata),
    .rdata_a(rd_a), .we_b(we_b), .addr_b(addr_b), .wdata_b(cr_rdata[1]), .rdata_b(rd_b));
  assign dm_rdata = rd_a;

  logic [31:0] cs;
  cas_rom #(.NMAX(NMAX)) u_cas (.addr(mem_s.ka), .cs(cs));

  // ---------------------------------------------------------------- ADD, ADD&SUB
  logic        bf_valid;
  logic signed [15:0] o_x0, o_x1, o_y0, o_y1;
  logic [4*CB-1:0] bf_tag;
  fht_dual_bfly #(.TAGW(4*CB)) u_dbf (
    .clk(clk), .rst_n(rst_n), .in_valid(mem_s.valid && mem_s.dbf), .plain(mem_s.plain),
    .x0(cr_rdata[0]), .x1(cr_rdata[1]), .y0(cr_rdata[2]), .y1(cr_rdata[3]),
    .c(cs[31:16]), .s(cs[15:0]), .in_tag({mem_s.i0, mem_s.i1, mem_s.i2, mem_s.i3}),
    .out_valid(bf_valid), .x0_o(o_x0), .x1_o(o_x1), .y0_o(o_y0), .y1_o(o_y1),
    .out_tag(bf_tag));

  // the multiply-add of fht_dual_bfly ends in a register (ADD); its
  // add/subtract output is registered once more here so that the cache is
  // written at the end of ADD&SUB
  logic               as_valid;
  logic signed [15:0] as_d [4];
  logic [4*CB-1:0]    as_tag;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) as_valid <= 1'b0;
    else        as_valid <= bf_valid;
  end
  always_ff @(posedge clk) begin
    as_d[0] <= o_x0; as_d[1] <= o_x1; as_d[2] <= o_y0; as_d[3] <= o_y1;
    as_tag  <= bf_tag;
  end

  always_comb begin
    for (int k = 0; k < 4; k++) begin
      cr_we[k]    = as_valid;
      cr_waddr[k] = as_tag[(3-k)*CB +: CB];
      cr_wdata[k] = as_d[k];
    end
    cr_we[4]    = running && mem_s.valid && mem_s.rd;
    cr_waddr[4] = mem_s.i0;
    cr_wdata[4] = rd_a;
    cr_we[5]    = running && mem_s.valid && mem_s.rd;
    cr_waddr[5] = mem_s.i1;
    cr_wdata[5] = rd_b;
  end

  // reads in MEM of registers still to be written by DBFs in ADD or ADD&SUB
  logic hazard;
  function automatic logic in_tag(input logic [4*CB-1:0] t, input logic [CB-1:0] r);
    return t[4*CB-1:3*CB] == r || t[3*CB-1:2*CB] == r || t[2*CB-1:CB] == r || t[CB-1:0] == r;
  endfunction
  always_comb begin
    hazard = 1'b0;
    if (running && mem_s.valid) begin
      if (bf_valid && (in_tag(bf_tag, mem_s.i0) || in_tag(bf_tag, mem_s.i1) ||
                       (mem_s.dbf && (in_tag(bf_tag, mem_s.i2) || in_tag(bf_tag, mem_s.i3)))))
        hazard = 1'b1;
      if (as_valid && (in_tag(as_tag, mem_s.i0) || in_tag(as_tag, mem_s.i1) ||
                       (mem_s.dbf && (in_tag(as_tag, mem_s.i2) || in_tag(as_tag, mem_s.i3)))))
        hazard = 1'b1;
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
        if (!mem_s.valid && !bf_valid && !as_valid) begin
          running <= 1'b0;
          done    <= 1'b1;
        end
      end else if (branch || halt_ex) begin
        pc       <= PAW'(f_tgt);
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
      cnt_cycles <= '0; cnt_dbf <= '0; cnt_hazard <= '0; cnt_flush <= '0; cnt_rpt <= '0;
    end else if (!running && start) begin
      cnt_cycles <= '0; cnt_dbf <= '0; cnt_hazard <= '0; cnt_flush <= '0; cnt_rpt <= '0;
    end else if (running) begin
      cnt_cycles <= cnt_cycles + 1;
      if (go && op == F_DBF) cnt_dbf <= cnt_dbf + 1;
      if (hazard)            cnt_hazard <= cnt_hazard + 1;
      if (branch)            cnt_flush <= cnt_flush + 1;
      if (!branch && !halt_ex && !halted && fd_hold) cnt_rpt <= cnt_rpt + 1;
    end
  end

  assert property (@(posedge clk) disable iff (!rst_n) running |-> !(pm_we || dm_we))
    else $error("host memory write while the processor is running");
endmodule

// asip_top: the four processors of the document side by side.
//
//   u_cfft_s  cfft_s_proc     cached FFT, single-issue (CFFT-S), up to 1024 points
//   u_cfft_v  cfft_vliw_proc  cached FFT, 4-slot VLIW (CFFT-V), up to 1024 points
//   u_fht     fht_proc        FHT with dual-butterfly instruction, up to 2048 points
//   u_cfht    cfht_proc       cached FHT, up to 2048 points
//
// The document describes them as separate ASIPs that are compared with each
// other; putting them in one top level is only for building and simulating
// them together. They share the clock and the active-low asynchronous reset
// and nothing else: each has its own host port (prefix cs_, cv_, fh_, ch_)
// through which the host loads its program memory and data memory while it
// is idle, pulses start, waits for done and reads the data memory back. The
// cnt_* outputs are the performance counters of each processor (cycles,
// butterflies, stalls, flushes, repeats, hazards), cleared by start.
// Timing of each port is described in the processor's own file.
// All parameters stay at the document's sizes (see each processor).
module asip_top (
  input  logic clk,
  input  logic rst_n,
  // CFFT-S: cached FFT, single-issue
  input  logic cs_start,
  output logic cs_busy,
  output logic cs_done,
  input  logic cs_pm_we,
  input  logic [7:0] cs_pm_addr,
  input  logic [23:0] cs_pm_wdata,
  input  logic cs_dm_we,
  input  logic [9:0] cs_dm_addr,
  input  logic [31:0] cs_dm_wdata,
  output logic [31:0] cs_dm_rdata,
  output logic [31:0] cs_cnt_cycles,
  output logic [31:0] cs_cnt_bfly,
  output logic [31:0] cs_cnt_stall,
  output logic [31:0] cs_cnt_flush,
  output logic [31:0] cs_cnt_rpt,
  // CFFT-V: cached FFT, 4-slot VLIW
  input  logic cv_start,
  output logic cv_busy,
  output logic cv_done,
  input  logic cv_pm_we,
  input  logic [7:0] cv_pm_addr,
  input  logic [95:0] cv_pm_wdata,
  input  logic cv_dm_we,
  input  logic [9:0] cv_dm_addr,
  input  logic [31:0] cv_dm_wdata,
  output logic [31:0] cv_dm_rdata,
  output logic [31:0] cv_cnt_cycles,
  output logic [31:0] cv_cnt_bfly,
  output logic [31:0] cv_cnt_hazard,
  output logic [31:0] cv_cnt_conflict,
  output logic [31:0] cv_cnt_flush,
  output logic [31:0] cv_cnt_rpt,
  // FHT: dual-butterfly FHT with memory-port interlock
  input  logic fh_start,
  output logic fh_busy,
  output logic fh_done,
  input  logic fh_pm_we,
  input  logic [7:0] fh_pm_addr,
  input  logic [23:0] fh_pm_wdata,
  input  logic fh_dm_we,
  input  logic [10:0] fh_dm_addr,
  input  logic [15:0] fh_dm_wdata,
  output logic [15:0] fh_dm_rdata,
  output logic [31:0] fh_cnt_cycles,
  output logic [31:0] fh_cnt_dbf,
  output logic [31:0] fh_cnt_mem_stall,
  output logic [31:0] fh_cnt_data_stall,
  output logic [31:0] fh_cnt_flush,
  // CFHT: cached FHT, 64 cache registers
  input  logic ch_start,
  output logic ch_busy,
  output logic ch_done,
  input  logic ch_pm_we,
  input  logic [7:0] ch_pm_addr,
  input  logic [23:0] ch_pm_wdata,
  input  logic ch_dm_we,
  input  logic [10:0] ch_dm_addr,
  input  logic [15:0] ch_dm_wdata,
  output logic [15:0] ch_dm_rdata,
  output logic [31:0] ch_cnt_cycles,
  output logic [31:0] ch_cnt_dbf,
  output logic [31:0] ch_cnt_hazard,
  output logic [31:0] ch_cnt_flush,
  output logic [31:0] ch_cnt_rpt
);

  cfft_s_proc u_cfft_s (
    .clk(clk),
    .rst_n(rst_n),
    .start(cs_start),
    .busy(cs_busy),
    .done(cs_done),
    .pm_we(cs_pm_we),
    .pm_addr(cs_pm_addr),
    .pm_wdata(cs_pm_wdata),
    .dm_we(cs_dm_we),
    .dm_addr(cs_dm_addr),
    .dm_wdata(cs_dm_wdata),
    .dm_rdata(cs_dm_rdata),
    .cnt_cycles(cs_cnt_cycles),
    .cnt_bfly(cs_cnt_bfly),
    .cnt_stall(cs_cnt_stall),
    .cnt_flush(cs_cnt_flush),
    .cnt_rpt(cs_cnt_rpt)
  );

  cfft_vliw_proc u_cfft_v (
    .clk(clk),
    .rst_n(rst_n),
    .start(cv_start),
    .busy(cv_busy),
    .done(cv_done),
    .pm_we(cv_pm_we),
    .pm_addr(cv_pm_addr),
    .pm_wdata(cv_pm_wdata),
    .dm_we(cv_dm_we),
    .dm_addr(cv_dm_addr),
    .dm_wdata(cv_dm_wdata),
    .dm_rdata(cv_dm_rdata),
    .cnt_cycles(cv_cnt_cycles),
    .cnt_bfly(cv_cnt_bfly),
    .cnt_hazard(cv_cnt_hazard),
    .cnt_conflict(cv_cnt_conflict),
    .cnt_flush(cv_cnt_flush),
    .cnt_rpt(cv_cnt_rpt)
  );

  fht_proc u_fht (
    .clk(clk),
    .rst_n(rst_n),
    .start(fh_start),
    .busy(fh_busy),
    .done(fh_done),
    .pm_we(fh_pm_we),
    .pm_addr(fh_pm_addr),
    .pm_wdata(fh_pm_wdata),
    .dm_we(fh_dm_we),
    .dm_addr(fh_dm_addr),
    .dm_wdata(fh_dm_wdata),
    .dm_rdata(fh_dm_rdata),
    .cnt_cycles(fh_cnt_cycles),
    .cnt_dbf(fh_cnt_dbf),
    .cnt_mem_stall(fh_cnt_mem_stall),
    .cnt_data_stall(fh_cnt_data_stall),
    .cnt_flush(fh_cnt_flush)
  );

  cfht_proc u_cfht (
    .clk(clk),
    .rst_n(rst_n),
    .start(ch_start),
    .busy(ch_busy),
    .done(ch_done),
    .pm_we(ch_pm_we),
    .pm_addr(ch_pm_addr),
    .pm_wdata(ch_pm_wdata),
    .dm_we(ch_dm_we),
    .dm_addr(ch_dm_addr),
    .dm_wdata(ch_dm_wdata),
    .dm_rdata(ch_dm_rdata),
    .cnt_cycles(ch_cnt_cycles),
    .cnt_dbf(ch_cnt_dbf),
    .cnt_hazard(ch_cnt_hazard),
    .cnt_flush(ch_cnt_flush),
    .cnt_rpt(ch_cnt_rpt)
  );
endmodule

// cache_regfile: the register file that serves as the FFT cache (CR[0..N-1]).
//
// NR combinational read ports and NW write ports. Writes happen at the rising
// clock edge; when several write ports address the same register in one
// cycle, the higher-numbered port wins. A read in the same cycle as a write
// to the same register returns the old value (the processor's interlock keeps
// that case from mattering). Registers reset to zero.
//
// The document gives the size (32 complex registers of 32 bits in the
// cached-FFT processors) and the use; the port counts are this design's.
module cache_regfile #(
  parameter int ENTRIES = 32,
  parameter int WIDTH   = 32,
  parameter int NR      = 2,
  parameter int NW      = 3,
  localparam int AW = $clog2(ENTRIES)
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic [NR-1:0][AW-1:0]    raddr,
  output logic [NR-1:0][WIDTH-1:0] rdata,
  input  logic [NW-1:0]            we,
  input  logic [NW-1:0][AW-1:0]    waddr,
  input  logic [NW-1:0][WIDTH-1:0] wdata
);
  logic [WIDTH-1:0] regs [ENTRIES];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < ENTRIES; i++) regs[i] <= '0;
    end else begin
      for (int p = 0; p < NW; p++)
        if (we[p]) regs[waddr[p]] <= wdata[p];
    end
  end

  always_comb begin
    for (int p = 0; p < NR; p++) rdata[p] = regs[raddr[p]];
  end
endmodule

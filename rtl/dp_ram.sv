// dp_ram: dual-port data memory of the FHT processors. Two independent
// ports, each with a combinational read and a write at the rising clock
// edge; if both ports write the same word in one cycle, port B wins. The
// document specifies a dual-ported data memory; its width (16-bit real
// data) follows the processors' 16-bit data path, the read timing is this
// design's choice. Contents are not reset.
module dp_ram #(
  parameter int WIDTH = 16,
  parameter int DEPTH = 2048,
  localparam int AW = $clog2(DEPTH)
) (
  input  logic             clk,
  input  logic             we_a,
  input  logic [AW-1:0]    addr_a,
  input  logic [WIDTH-1:0] wdata_a,
  output logic [WIDTH-1:0] rdata_a,
  input  logic             we_b,
  input  logic [AW-1:0]    addr_b,
  input  logic [WIDTH-1:0] wdata_b,
  output logic [WIDTH-1:0] rdata_b
);
  logic [WIDTH-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we_a) mem[addr_a] <= wdata_a;
    if (we_b) mem[addr_b] <= wdata_b;
  end

  assign rdata_a = mem[addr_a];
  assign rdata_b = mem[addr_b];
endmodule

// sp_ram: single-port memory with a combinational read and a clocked write.
//
// Used for the program memory (24 x 256) and the data memory (32 x 1024) of
// the cached-FFT processors. The document gives only the sizes; the read
// timing is this design's choice: the address is presented and the word is
// read in the same cycle (the execute stage that owns the memory), and a
// write takes effect at the next rising clock edge. Contents are not reset.
module sp_ram #(
  parameter int WIDTH = 32,
  parameter int DEPTH = 1024,
  localparam int AW = $clog2(DEPTH)
) (
  input  logic             clk,
  input  logic             we,
  input  logic [AW-1:0]    addr,
  input  logic [WIDTH-1:0] wdata,
  output logic [WIDTH-1:0] rdata
);
  logic [WIDTH-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[addr] <= wdata;
  end

  assign rdata = mem[addr];
endmodule

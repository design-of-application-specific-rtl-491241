// twiddle_xbar: crossbar between the butterfly slots of the VLIW cached-FFT
// processor and its physically separate twiddle memories.
//
// Each slot presents a twiddle address; its most significant bits select the
// bank (the document: "The most significant 2 bits are used to select the
// twiddle memory") and the rest the word within the bank. Each bank is
// given the address of the lowest-numbered active slot that selects it, and
// every slot receives the word of the bank it selected. Slots that select
// the same bank with the same word share it. Two active slots that select
// the same bank with different words are a conflict: the document leaves
// conflicts to the software (butterfly numbers 4 apart never conflict), so
// the crossbar only reports them on `conflict`. Purely combinational.
module twiddle_xbar #(
  parameter int SLOTS = 4,
  parameter int BANKS = 4,
  parameter int AW    = 9,
  parameter int WIDTH = 32,
  localparam int BB = $clog2(BANKS),
  localparam int CW = AW - BB
) (
  input  logic [SLOTS-1:0]             slot_valid,
  input  logic [SLOTS-1:0][AW-1:0]     slot_addr,
  output logic [SLOTS-1:0][WIDTH-1:0]  slot_data,
  output logic [BANKS-1:0][CW-1:0]     bank_addr,
  input  logic [BANKS-1:0][WIDTH-1:0]  bank_data,
  output logic                         conflict
);
  always_comb begin
    logic [BANKS-1:0]         taken;
    logic [BANKS-1:0][CW-1:0] ba;
    taken    = '0;
    conflict = 1'b0;
    ba       = '0;
    for (int s = 0; s < SLOTS; s++) begin
      logic [BB-1:0] bk;
      bk = slot_addr[s][AW-1:CW];
      if (slot_valid[s]) begin
        if (!taken[bk]) begin
          taken[bk]     = 1'b1;
          ba[bk] = slot_addr[s][CW-1:0];
        end else if (ba[bk] != slot_addr[s][CW-1:0]) begin
          conflict = 1'b1;
        end
      end
    end
    bank_addr = ba;
  end

  always_comb begin
    for (int s = 0; s < SLOTS; s++) slot_data[s] = bank_data[slot_addr[s][AW-1:CW]];
  end
endmodule

// sram_bank: one single-ported memory bank.
//
// One access per cycle: when `we` is high the word at `addr` is written at
// the clock edge, otherwise `rdata` shows the word at `addr`. The read is
// asynchronous so that the engine can read and process its operands in the
// same cycle, as its read-process/write pipeline assumes; a synchronous macro
// would add one pipeline stage in front of the butterflies. The contents are
// not reset.
module sram_bank #(
  parameter int unsigned WORDS = 256,
  parameter int unsigned W     = 32,
  parameter int unsigned AW    = (WORDS > 1) ? $clog2(WORDS) : 1
) (
  input  logic          clk,
  input  logic          we,
  input  logic [AW-1:0] addr,
  input  logic [W-1:0]  wdata,
  output logic [W-1:0]  rdata
);
  logic [W-1:0] mem [WORDS];

  always_ff @(posedge clk) begin
    if (we) mem[addr] <= wdata;
  end

  assign rdata = mem[addr];
endmodule

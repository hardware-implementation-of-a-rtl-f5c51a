// sp_ram: single-port synchronous RAM, one read or write per cycle.
//
// A write stores `wdata` at `addr`; a read returns the word at `addr` on
// `rdata` one cycle later (rdata keeps the last word read while `re` is
// low). The decoder builds its message memories (one bank per edge slot)
// and its channel memory from it; the document specifies single-ported
// memory banks, the read latency of one cycle is this design's choice.
module sp_ram #(
  parameter int DW    = 42,
  parameter int DEPTH = 1000,
  parameter int AW    = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic          clk,
  input  logic          we,
  input  logic          re,
  input  logic [AW-1:0] addr,
  input  logic [DW-1:0] wdata,
  output logic [DW-1:0] rdata
);

  logic [DW-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we)      mem[addr] <= wdata;
    else if (re) rdata     <= mem[addr];
  end

endmodule

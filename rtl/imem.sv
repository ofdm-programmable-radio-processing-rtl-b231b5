// imem: instruction memory, 32 bits wide.
//
// One synchronous read port, addressed by the 32-bit word address (PCP without
// its lowest bit); the word appears on rdata in the cycle after the address,
// which is the Fetch stage. A write port lets a host or testbench load the
// program. DEPTH defaults to 32768 words, the whole range of a 16-bit halfword
// PC; the size of the memory itself is this design's choice.
// When re is low the output holds its previous value (used to stall Fetch).
module imem #(
  parameter int unsigned DEPTH = 32768,
  parameter int unsigned AW    = $clog2(DEPTH)
) (
  input  logic          clk,
  input  logic          re,
  input  logic [AW-1:0] raddr,
  output logic [31:0]   rdata,
  input  logic          we,
  input  logic [AW-1:0] waddr,
  input  logic [31:0]   wdata
);
  logic [31:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
    if (re) rdata <= mem[raddr];
  end
endmodule

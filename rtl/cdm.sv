// cdm: complex data memory (two instances: CDM0 on the X buses, CDM1 on the Y
// buses).
//
// Each word is one complex number {re, im} of 2 x 16 bits. The memory has one
// port used by the processor in Execute: a write (we) takes effect at the end of
// Execute; a read returns its data in the next cycle (Writeback), where it is
// "mrdata". A second write-only port lets a host load data. DEPTH defaults to
// 4096 words; the description gives no size, so this is this design's choice.
module cdm
  import rpe_pkg::*;
#(
  parameter int unsigned DEPTH = 4096,
  parameter int unsigned AW    = $clog2(DEPTH)
) (
  input  logic          clk,
  input  logic          en,
  input  logic          we,
  input  logic [AW-1:0] addr,
  input  cplx_t         wdata,
  output cplx_t         rdata,
  input  logic          hwe,
  input  logic [AW-1:0] haddr,
  input  cplx_t         hwdata
);
  cplx_t mem [DEPTH];

  always_ff @(posedge clk) begin
    if (hwe) mem[haddr] <= hwdata;
    if (en) begin
      if (we) mem[addr] <= wdata;
      else    rdata <= mem[addr];
    end
  end
endmodule

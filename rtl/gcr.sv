// gcr: general registers, four complex GCR0-3 or eight real GR0-7.
//
// The same storage serves both modes: in complex mode it is read and written as
// four complex registers for intermediate results, in real mode as eight real
// registers that the four CUs read and write over their GR buses. GR(2k) is the
// real part of GCR k and GR(2k+1) its imaginary part (this pairing is this
// design's choice; the description only says one complex register is two real
// ones).
//
// Interface: four write slots (we[i], idx[i], data[i]) act at the clock edge in
// Execute; a complex write uses two slots. When two slots name the same register
// the higher slot wins. All registers are visible at gr/gcr without delay.
module gcr
  import rpe_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  input  logic [3:0]        we,
  input  logic [3:0][2:0]   idx,
  input  rdata_t [3:0]      data,
  output rdata_t [7:0]      gr,
  output cplx_t [3:0]       gcrs
);

  rdata_t regs [8];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int k = 0; k < 8; k++) regs[k] <= '0;
    end else begin
      for (int i = 0; i < 4; i++)
        if (we[i]) regs[idx[i]] <= data[i];
    end
  end

  always_comb begin
    for (int k = 0; k < 8; k++) gr[k] = regs[k];
    for (int k = 0; k < 4; k++) begin
      gcrs[k].re = regs[2*k];
      gcrs[k].im = regs[2*k+1];
    end
  end

endmodule

// io_ports: the eight I/O ports between the processor and external peripherals
// in real mode.
//
// Each port has an input side (pin, driven by a peripheral) and an output
// register (pout). In Execute the core asks for reads (rd_en) and writes
// (wr_en/wr_data) on any set of ports. At the end of that cycle a read samples
// pin into rd_q, which the core uses in Writeback as its read data, and a write
// updates pout. For each port touched, a one-cycle pulse on rd_stb or wr_stb in
// the following cycle tells the peripheral that the port was read or written,
// as the description asks. Port count follows the description; the strobe
// pulses and the sampling register are this design's choices.
module io_ports
  import rpe_pkg::*;
#(
  parameter int unsigned NPORT = 8
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  rdata_t [NPORT-1:0]   pin,
  input  logic   [NPORT-1:0]   rd_en,
  input  logic   [NPORT-1:0]   wr_en,
  input  rdata_t [NPORT-1:0]   wr_data,
  output rdata_t [NPORT-1:0]   rd_q,
  output rdata_t [NPORT-1:0]   pout,
  output logic   [NPORT-1:0]   rd_stb,
  output logic   [NPORT-1:0]   wr_stb
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rd_q   <= '0;
      pout   <= '0;
      rd_stb <= '0;
      wr_stb <= '0;
    end else begin
      rd_stb <= rd_en;
      wr_stb <= wr_en;
      for (int p = 0; p < int'(NPORT); p++) begin
        if (rd_en[p]) rd_q[p] <= pin[p];
        if (wr_en[p]) pout[p] <= wr_data[p];
      end
    end
  end
endmodule

// dag: data address generator (two instances, DAG0 for CDM0 and DAG1 for CDM1).
//
// Holds four index (I), four modify (M) and four length (L) registers. An access
// reads I[idx] as the memory address and post-modifies it: I[idx] <= I[idx] +
// M[idx]. With L[idx] = 0 the buffer is linear; with L[idx] != 0 the update
// wraps inside a circular buffer of L words. The address can be sent through a
// bit reverser (for FFT-ordered data). Register files, post-modify adder,
// modulo stage and bit reverser follow the architecture description.
//
// Design choices (the description gives no base register or pairing rule):
//  * I[k] is modified by M[k] (same number), as in the I/M register naming.
//  * The circular buffer starts at I rounded down to a multiple of the smallest
//    power of two >= L (the usual rule for DSPs with only I, M and L), and
//    |M| < L is assumed.
//  * Bit reversal swaps the order of the low BREV bits of the address (BREV is
//    the data memory address width).
//
// Timing: addr is combinational from the registers during Execute; the
// post-modify and register writes (we/sel/n/val, sel 0 I, 1 M, 2 L) take
// effect at the clock edge. An explicit register write wins over a post-modify
// of the same register.
module dag
  import rpe_pkg::*;
#(
  parameter int unsigned AW   = 16,
  parameter int unsigned BREV = 12
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          acc_en,
  input  logic [1:0]    acc_idx,
  input  logic          acc_brev,
  output logic [AW-1:0] addr,
  input  logic          we,
  input  logic [1:0]    sel,
  input  logic [1:0]    n,
  input  logic [AW-1:0] val,
  output logic [AW-1:0] i_regs [4]
);

  logic [AW-1:0] ir [4], mr [4], lr [4];
  assign i_regs = ir;

  function automatic logic [AW-1:0] brev_f(logic [AW-1:0] a);
    logic [AW-1:0] o;
    o = a;
    for (int b = 0; b < int'(BREV); b++) o[b] = a[BREV-1-b];
    return o;
  endfunction

  function automatic logic [AW-1:0] next_index(logic [AW-1:0] i, logic [AW-1:0] m, logic [AW-1:0] l);
    logic [AW-1:0] mask, base;
    logic signed [AW+1:0] off;
    if (l == '0) return i + m;
    mask = l - 1'b1;
    for (int s = 1; s < int'(AW); s = s * 2) mask = mask | (mask >> s);
    base = i & ~mask;
    off  = $signed((AW+2)'(i - base)) + (AW+2)'($signed(m));
    if (off >= $signed((AW+2)'(l)))  off = off - $signed((AW+2)'(l));
    else if (off < 0)                off = off + $signed((AW+2)'(l));
    return base + AW'(off);
  endfunction

  logic [AW-1:0] cur;
  assign cur  = ir[acc_idx];
  assign addr = acc_brev ? brev_f(cur) : cur;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int k = 0; k < 4; k++) begin ir[k] <= '0; mr[k] <= '0; lr[k] <= '0; end
    end else begin
      if (acc_en) ir[acc_idx] <= next_index(cur, mr[acc_idx], lr[acc_idx]);
      if (we) begin
        unique case (sel)
          2'd0: ir[n] <= val;
          2'd1: mr[n] <= val;
          default: lr[n] <= val;
        endcase
      end
    end
  end

endmodule

// cu: one real computational unit of real mode (four of them run in SIMD).
//
// Holds MX, MY (source), MF (feedback) and MR (result). Like the complex unit it
// has a multiplier feeding an adder whose other input is MR, a barrel shifter
// beside them and a result mux; the result goes to MR or MF. Operations: X+Y,
// X-Y, X*Y, MR+X*Y, MR-X*Y, X^2, MR+X^2, MR-X^2, abs(X), -X, X>>imm, X<<imm,
// and two division steps. The register set, the operation list and the
// structure follow the architecture description; the division steps implement
// the non-restoring algorithm the description names, in this design's own form:
//
//   DIV (step divide), on R = {A, Q} with A the upper and Q the lower W/2 bits
//   and divisor D = X[W/2-1:0]:  A:Q <<= 1;  A = (old A >= 0) ? A - D : A + D;
//   Q[0] = (new A >= 0).  Starting from R = {0, dividend}, W/2 steps leave the
//   quotient in Q; ADN ("add if R < 0") then adds D to a negative A to give the
//   remainder. Valid for dividend < 2^(W/2) and 0 < D < 2^(W/2-1).
//
// Interface and timing: op/r/x/y/shamt are the operation of the instruction in
// Execute (enabled by en); result and flags are combinational and registered
// at the end of Execute. w_we/w_data write registers in Execute (moves,
// immediates, reset); l_we/l_data write them in Writeback from input-port data
// and are forwarded to the operands in the same cycle. Register index order is
// 0 MX, 1 MY, 2 MF, 3 MR. Execute writes win over Writeback loads.
// Design choices: 16-bit data, products shifted right by FRAC (default 0:
// integer arithmetic in real mode), wrap-around sums with an overflow flag.
module cu
  import rpe_pkg::*;
#(
  parameter int unsigned FRAC = 0
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              en,
  input  uop_e              op,
  input  logic              r,       // 0: MR, 1: MF
  input  logic [1:0]        x,       // register code of X
  input  logic              y,       // 0: MY, 1: MF
  input  logic [3:0]        shamt,
  input  logic [3:0]        w_we,
  input  rdata_t [3:0]      w_data,
  input  logic [3:0]        l_we,
  input  rdata_t [3:0]      l_data,
  output rdata_t [3:0]      regs_fwd,
  output rdata_t            result,
  output logic              flag_z,
  output logic              flag_n,
  output logic              flag_v,
  output logic              flag_we
);

  localparam int unsigned H  = W/2;
  localparam int unsigned AW = 2*W + 2;
  typedef logic signed [AW-1:0] acc_t;

  rdata_t regs [4];

  always_comb
    for (int i = 0; i < 4; i++) regs_fwd[i] = l_we[i] ? l_data[i] : regs[i];

  rdata_t xv, yv, rv, mr;
  assign xv = regs_fwd[x];
  assign yv = y ? regs_fwd[2] : regs_fwd[1];
  assign rv = r ? regs_fwd[2] : regs_fwd[3];
  assign mr = regs_fwd[3];

  acc_t prod, ex;
  logic sh_ov, is_sh;
  rdata_t dstep;

  always_comb begin
    logic [W-1:0] d, t;
    d    = {{H{1'b0}}, xv[H-1:0]};
    t    = {rv[W-2:0], 1'b0};
    if (!rv[W-1]) t = t - (d << H);
    else          t = t + (d << H);
    t[0] = ~t[W-1];
    dstep = t;
  end

  always_comb begin
    logic signed [W-1:0] m2;
    logic signed [2*W-1:0] tl;
    m2 = (op == UOP_SQR || op == UOP_SQA || op == UOP_SQS) ? xv : yv;
    prod = (acc_t'(xv) * acc_t'(m2)) >>> FRAC;
    ex = '0; sh_ov = 1'b0; is_sh = 1'b0;
    tl = '0;
    unique case (op)
      UOP_ADD: ex = acc_t'(xv) + acc_t'(yv);
      UOP_SUB: ex = acc_t'(xv) - acc_t'(yv);
      UOP_MUL, UOP_SQR: ex = prod;
      UOP_MAC, UOP_SQA: ex = acc_t'(mr) + prod;
      UOP_MSU, UOP_SQS: ex = acc_t'(mr) - prod;
      UOP_ABS: ex = xv[W-1] ? -acc_t'(xv) : acc_t'(xv);
      UOP_NEG: ex = -acc_t'(xv);
      UOP_DIV: begin ex = acc_t'(dstep); is_sh = 1'b1; end
      UOP_ADN: ex = rv[W-1] ? acc_t'(rv) + acc_t'({xv[H-1:0], {H{1'b0}}}) : acc_t'(rv);
      UOP_SHR: begin ex = acc_t'(rdata_t'(xv >>> shamt)); is_sh = 1'b1; end
      UOP_SHL: begin
        tl = (2*W)'(xv) <<< shamt;
        ex = acc_t'($signed(tl[W-1:0]));
        sh_ov = (tl != (2*W)'($signed(tl[W-1:0])));
        is_sh = 1'b1;
      end
      default: ;
    endcase
  end

  assign result  = ex[W-1:0];
  assign flag_we = en && op != UOP_NOP;
  assign flag_z  = (result == 0);
  assign flag_n  = result[W-1];
  assign flag_v  = is_sh ? sh_ov : (op == UOP_ADN) ? 1'b0 : (ex != acc_t'(result));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < 4; i++) regs[i] <= '0;
    end else begin
      for (int i = 0; i < 4; i++) begin
        if (l_we[i]) regs[i] <= l_data[i];
        if (w_we[i]) regs[i] <= w_data[i];
      end
      if (flag_we) begin
        if (r) regs[2] <= result;
        else   regs[3] <= result;
      end
    end
  end

endmodule

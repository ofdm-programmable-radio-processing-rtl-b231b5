// ccu: complex computational unit of complex mode.
//
// Holds the four complex registers MCX, MCY (source), MCF (feedback) and MCR
// (result). In the Execute stage it selects X from MCX or any register and Y
// from MCY or MCF, and computes one of: X+Y, X-Y, X*Y, MCR+X*Y, MCR-X*Y, X^2,
// MCR+X^2, MCR-X^2, conj(X), -X, X>>imm, X<<imm. The complex multiplier
// (CMUL) feeds the complex adder (CADD), whose other input is MCR; the barrel
// shifter works beside them; a final mux picks the result, which is written to
// MCR or MCF at the end of the cycle. This structure and the operation list
// follow the architecture description.
//
// Interface and timing:
//  * op/c_r/c_x/c_y/shamt describe the operation of the instruction in Execute;
//    the result and the status flags (asta_new, asta_we) are combinational and
//    registered at the clock edge that ends Execute.
//  * w_*: a register write in Execute (register move or immediate), one cycle.
//  * l0_*/l1_*: register writes from memory read data in Writeback. Operands of
//    the instruction in Execute see these values in the same cycle (the
//    forwarding muxes), and regs_fwd shows all four registers with forwarding
//    applied, for stores and moves.
//  If a Writeback load and an Execute write hit the same register, the Execute
//  write (younger instruction) wins.
//
// Design choices (not given in the description): 16-bit two's-complement parts;
// products are full precision, shifted right by FRAC (Q1.15 by default,
// truncating); sums wrap to 16 bits and the overflow flag records that the
// exact value did not fit; shifts are arithmetic right and logical left, with
// shift amounts of 16 or more giving sign fill or zero.
module ccu
  import rpe_pkg::*;
#(
  parameter int unsigned FRAC = 15
) (
  input  logic        clk,
  input  logic        rst_n,
  // operation in Execute
  input  cop_e        op,
  input  logic        c_r,
  input  logic [1:0]  c_x,
  input  logic        c_y,
  input  logic [7:0]  shamt,
  // register write in Execute
  input  logic        w_en,
  input  logic [1:0]  w_sel,
  input  logic [1:0]  w_part,
  input  cplx_t       w_data,
  // register loads in Writeback
  input  logic        l0_en,
  input  logic [1:0]  l0_sel,
  input  cplx_t       l0_data,
  input  logic        l1_en,
  input  logic [1:0]  l1_sel,
  input  cplx_t       l1_data,
  // outputs
  output cplx_t [3:0] regs_fwd,
  output cplx_t       result,
  output asta_t       asta_new,
  output logic        asta_we
);

  localparam int unsigned AW = 2*W + 4;   // width of exact intermediate results
  typedef logic signed [AW-1:0] acc_t;

  cplx_t regs [4];

  // forwarding of Writeback loads into Execute
  always_comb begin
    for (int r = 0; r < 4; r++) begin
      regs_fwd[r] = regs[r];
      if (l0_en && l0_sel == 2'(r)) regs_fwd[r] = l0_data;
      if (l1_en && l1_sel == 2'(r)) regs_fwd[r] = l1_data;
    end
  end

  cplx_t xv, yv, mcr;
  assign xv  = regs_fwd[c_x];
  assign yv  = c_y ? regs_fwd[CR_MCF] : regs_fwd[CR_MCY];
  assign mcr = regs_fwd[CR_MCR];

  function automatic acc_t sx(logic signed [W-1:0] v);
    return acc_t'(v);
  endfunction

  function automatic logic fits(acc_t v);
    return v == sx(v[W-1:0]);
  endfunction

  // barrel shifter on one part; returns {overflow, value}
  function automatic logic [W:0] bshift(logic signed [W-1:0] v, logic [7:0] s, logic left);
    logic signed [2*W-1:0] t;
    logic [W-1:0] o;
    logic ov;
    if (left) begin
      if (s >= 8'(W)) begin o = '0; ov = (v != 0); end
      else begin
        t  = (2*W)'(v) <<< s;
        o  = t[W-1:0];
        ov = (t != (2*W)'($signed(t[W-1:0])));
      end
    end else begin
      if (s >= 8'(W)) o = {W{v[W-1]}};
      else            o = W'(v >>> s);
      ov = 1'b0;
    end
    return {ov, o};
  endfunction

  acc_t          ex_re, ex_im;     // exact results
  logic          sh_ov_re, sh_ov_im;
  logic          is_shift;
  cplx_t         mx, my;           // multiplier inputs
  acc_t          prod_re, prod_im; // CMUL output, scaled

  always_comb begin
    mx = xv;
    my = (op == COP_SQR || op == COP_SQA || op == COP_SQS) ? xv : yv;
    prod_re = (acc_t'(mx.re) * acc_t'(my.re) - acc_t'(mx.im) * acc_t'(my.im)) >>> FRAC;
    prod_im = (acc_t'(mx.re) * acc_t'(my.im) + acc_t'(mx.im) * acc_t'(my.re)) >>> FRAC;
  end

  logic [W:0] shr_re, shr_im;
  assign shr_re = bshift(xv.re, shamt, op == COP_SHL);
  assign shr_im = bshift(xv.im, shamt, op == COP_SHL);

  always_comb begin
    ex_re = '0; ex_im = '0;
    is_shift = 1'b0;
    sh_ov_re = 1'b0; sh_ov_im = 1'b0;
    unique case (op)
      COP_ADD:  begin ex_re = sx(xv.re) + sx(yv.re); ex_im = sx(xv.im) + sx(yv.im); end
      COP_SUB:  begin ex_re = sx(xv.re) - sx(yv.re); ex_im = sx(xv.im) - sx(yv.im); end
      COP_MUL, COP_SQR: begin ex_re = prod_re; ex_im = prod_im; end
      COP_MAC, COP_SQA: begin ex_re = sx(mcr.re) + prod_re; ex_im = sx(mcr.im) + prod_im; end
      COP_MSU, COP_SQS: begin ex_re = sx(mcr.re) - prod_re; ex_im = sx(mcr.im) - prod_im; end
      COP_CONJ: begin ex_re = sx(xv.re); ex_im = -sx(xv.im); end
      COP_NEG:  begin ex_re = -sx(xv.re); ex_im = -sx(xv.im); end
      COP_SHR, COP_SHL: begin
        is_shift = 1'b1;
        ex_re = sx(shr_re[W-1:0]); ex_im = sx(shr_im[W-1:0]);
        sh_ov_re = shr_re[W]; sh_ov_im = shr_im[W];
      end
      default: ;
    endcase
  end

  assign result.re = ex_re[W-1:0];
  assign result.im = ex_im[W-1:0];
  assign asta_we   = (op != COP_NOP);
  always_comb begin
    asta_new.re_z = (result.re == 0);
    asta_new.re_n = result.re[W-1];
    asta_new.re_v = is_shift ? sh_ov_re : ~fits(ex_re);
    asta_new.im_z = (result.im == 0);
    asta_new.im_n = result.im[W-1];
    asta_new.im_v = is_shift ? sh_ov_im : ~fits(ex_im);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int r = 0; r < 4; r++) regs[r] <= '0;
    end else begin
      if (l0_en) regs[l0_sel] <= l0_data;
      if (l1_en) regs[l1_sel] <= l1_data;
      if (w_en) begin
        if (w_part[1]) regs[w_sel].re <= w_data.re;
        if (w_part[0]) regs[w_sel].im <= w_data.im;
      end
      if (op != COP_NOP) regs[c_r ? CR_MCF : CR_MCR] <= result;
    end
  end

endmodule

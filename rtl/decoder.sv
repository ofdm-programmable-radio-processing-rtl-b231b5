// decoder: instruction decoder of the Decode stage, for both instruction sets.
//
// Turns a 16-bit complex-mode instruction (mode = 0) or a 32-bit real-mode
// instruction (mode = 1) into the control fields of dop_t. The classes and
// their operand choices are those of the architecture description; the bit
// layouts are this design's own (see rpe_pkg for the opcode numbers):
//
//  complex mode, opcode [15:11]
//    ADDSUB  [10]sub [9]R(MCR/MCF) [8]X(MCX/MCR) [7]Y(MCY/MCF)
//    MAC     [10:9]0 mul,1 mac,2 msu [8]R [7]X [6]Y
//    SQR     [10:9]mode [8]R [7:6]X(MCX,MCY,MCF,MCR)
//    CNJNEG  [10]neg [9]R [8:7]X           SHR/SHL [10]R [9:8]X [7:0]imm
//    LDST    [10]store [9:8]reg [7:5]Ix [4]bitrev   (Ix 0-3 CDM0, 4-7 CDM1)
//    LDD/STD [10:9]reg [8]n [7:0]addr      MOVE [10:8]dst [7:5]src (4-7 = GCR)
//    LDIM    [10]im [9:8]reg [7:0]imm      LDIMC [10:9]reg [7:4]re [3:0]im
//    ADDSUB2 [10]sub [9]R [8]X [7]Y [6:5]Ix(DAG0) [4:3]Iy(DAG1)
//    MAC2    [10:9]mode [8]R [7]X [6]Y [5:4]Ix [3:2]Iy
//    SQR1    [10:9]mode [8]R [7:6]X [5:3]Ix            (loads MCX)
//    ADDSUB1 [10]sub [9]R [8]X [7]Y [6]Z(MCX/MCY) [5:3]Ix
//    MAC1    [10:9]mode [8]R [7]X [6]Y [5]Z [4:2]Ix
//    LDI/LDM/LDL [10:8]n [7:0]imm          LCR [7:0]imm
//    CALL    [10]push-regs [7:0]offset     JUMP [10:6]cond [5:0]offset
//    MISC    [10:8]0 nop,1 rts,2 rti,3 sleep,4 mode [4:0]cond
//  The "_L" opcodes take the next 16-bit word as an extension: the immediate
//  becomes {ext, field}, truncated to the destination width.
//
//  real mode, opcode [31:28]
//    ALU/ALUP [27:24]CU enable [23:20]func [19]R(MR/MF) [18:17]X [16]Y
//             [15:12]shift CU0/1 [11:8]shift CU2/3
//    LDP/STP/GR2CU/CU2GR four slots {reg[3:0], port-or-GR[2:0]} at [27:21],
//             [20:14], [13:7], [6:0]; reg = {MX,MY,MF,MR}[1:0] x 4 + CU
//             (repeat a slot to use fewer than four); LDP8 takes a second
//             32-bit word with slots 4-7.
//    LDIMM   [27]two [26:23]reg1 [22:19]reg2 [15:0]imm or [15:8]imm1 [7:0]imm2
//    LCR [15:0]   CALL [27]push-regs [20:16]cond [15:0]offset
//    JUMP [20:16]cond [15:0]offset   SETCR [23:0] ports X0,Y0,X1,..,Y3
//    MISC [27:25]0 nop,1 rts,2 rti,3 sleep,4 mode,5 reset [20:16]cond
//                [1]reset MR [0]reset MF
//
// Branch offsets count instructions from the branch's own address. Decoding is
// combinational; need_ext asks the Decode stage to hold the first word of a
// two-word instruction until its extension word arrives.
module decoder
  import rpe_pkg::*;
(
  input  logic            mode,
  input  logic [31:0]     ins,
  input  logic [PCW-1:0]  pc,
  input  logic            pend_v,
  input  logic [31:0]     pend,
  input  logic [PCW-1:0]  pend_pc,
  output dop_t            d,
  output logic            need_ext
);

  function automatic cop_e mac_mode(logic [1:0] m, logic sq);
    if (sq) return (m == 2'd1) ? COP_SQA : (m == 2'd2) ? COP_SQS : COP_SQR;
    return (m == 2'd1) ? COP_MAC : (m == 2'd2) ? COP_MSU : COP_MUL;
  endfunction

  function automatic logic [W-1:0] sx8(logic [7:0] v);
    return W'($signed(v));
  endfunction

  logic [31:0]    w, ext;
  logic [PCW-1:0] pc0, inc;

  always_comb begin
    logic [4:0] cop5;
    logic [3:0] rop;
    logic       lng;
    logic [W-1:0] v;
    logic [23:0]  l24;

    w   = pend_v ? pend : ins;
    ext = ins;
    pc0 = pend_v ? pend_pc : pc;
    inc = mode ? PCW'(2) : PCW'(1);
    d   = '0;
    d.valid     = 1'b1;
    d.cond      = CND_ALWAYS;
    d.retaddr   = pc + inc;
    d.cop       = COP_NOP;
    d.uop       = UOP_NOP;
    d.c_x       = CR_MCX;
    need_ext    = 1'b0;
    cop5 = w[15:11];
    rop  = w[31:28];
    lng  = 1'b0;
    l24  = '0;
    v    = '0;

    if (!mode) begin
      // ------------------------------------------------------- complex mode
      lng = c_is_long(cop5);
      l24 = {ext[15:0], w[7:0]};
      if (lng && !pend_v) begin
        need_ext = 1'b1;
        d.valid  = 1'b0;
      end else begin
        unique case (copc_e'(cop5))
          CO_MISC: begin
            unique case (w[10:8])
              MS_RTS, MS_RTI: begin d.ret = 1'b1; d.cond = w[4:0]; end
              MS_SLEEP: d.sleep = 1'b1;
              MS_MODE: begin d.mode_sw = 1'b1; d.target = (pc0 + PCW'(2)) & ~PCW'(1); end
              default: ;
            endcase
          end
          CO_ADDSUB: begin
            d.cop = w[10] ? COP_SUB : COP_ADD;
            d.c_r = w[9]; d.c_x = w[8] ? CR_MCR : CR_MCX; d.c_y = w[7];
          end
          CO_MAC: begin
            d.cop = mac_mode(w[10:9], 1'b0);
            d.c_r = w[8]; d.c_x = w[7] ? CR_MCR : CR_MCX; d.c_y = w[6];
          end
          CO_SQR: begin
            d.cop = mac_mode(w[10:9], 1'b1); d.c_r = w[8]; d.c_x = w[7:6];
          end
          CO_CNJNEG: begin
            d.cop = w[10] ? COP_NEG : COP_CONJ; d.c_r = w[9]; d.c_x = w[8:7];
          end
          CO_SHR, CO_SHL: begin
            d.cop = (cop5 == CO_SHL) ? COP_SHL : COP_SHR;
            d.c_r = w[10]; d.c_x = w[9:8]; d.shamt = w[7:0];
          end
          CO_LDST: begin
            d.ma_en = 1'b1; d.ma_we = w[10];
            d.ma_sreg = w[9:8]; d.ma_lreg = w[9:8];
            d.ma_idx = w[7:5]; d.ma_n = w[7]; d.ma_brev = w[4];
          end
          CO_LDD, CO_LDD_L, CO_STD, CO_STD_L: begin
            d.ma_en = 1'b1; d.ma_imm = 1'b1;
            d.ma_we = (cop5 == CO_STD || cop5 == CO_STD_L);
            d.ma_sreg = w[10:9]; d.ma_lreg = w[10:9]; d.ma_n = w[8];
            d.ma_addr = lng ? l24 : {16'h0, w[7:0]};
          end
          CO_MOVE: begin
            d.cw_en = 1'b1; d.cw_move = 1'b1; d.cw_dst = w[10:8]; d.cw_src = w[7:5];
            d.cw_part = 2'b11;
          end
          CO_LDIM, CO_LDIM_L: begin
            v = lng ? l24[W-1:0] : W'(w[7:0]);
            d.cw_en = 1'b1; d.cw_dst = {1'b0, w[9:8]};
            d.cw_part = w[10] ? 2'b01 : 2'b10;
            d.cw_imm.re = v; d.cw_imm.im = v;
          end
          CO_LDIMC: begin
            d.cw_en = 1'b1; d.cw_dst = {1'b0, w[10:9]}; d.cw_part = 2'b11;
            d.cw_imm.re = W'(w[7:4]); d.cw_imm.im = W'(w[3:0]);
          end
          CO_ADDSUB2, CO_MAC2: begin
            if (cop5 == CO_ADDSUB2) begin
              d.cop = w[10] ? COP_SUB : COP_ADD;
              d.c_r = w[9]; d.c_x = w[8] ? CR_MCR : CR_MCX; d.c_y = w[7];
              d.ma_idx = {1'b0, w[6:5]}; d.mb_idx = w[4:3];
            end else begin
              d.cop = mac_mode(w[10:9], 1'b0);
              d.c_r = w[8]; d.c_x = w[7] ? CR_MCR : CR_MCX; d.c_y = w[6];
              d.ma_idx = {1'b0, w[5:4]}; d.mb_idx = w[3:2];
            end
            d.ma_en = 1'b1; d.ma_n = 1'b0; d.ma_lreg = CR_MCX;
            d.mb_en = 1'b1; d.mb_lreg = CR_MCY;
          end
          CO_SQR1: begin
            d.cop = mac_mode(w[10:9], 1'b1); d.c_r = w[8]; d.c_x = w[7:6];
            d.ma_en = 1'b1; d.ma_idx = w[5:3]; d.ma_n = w[5]; d.ma_lreg = CR_MCX;
          end
          CO_ADDSUB1: begin
            d.cop = w[10] ? COP_SUB : COP_ADD;
            d.c_r = w[9]; d.c_x = w[8] ? CR_MCR : CR_MCX; d.c_y = w[7];
            d.ma_en = 1'b1; d.ma_lreg = w[6] ? CR_MCY : CR_MCX;
            d.ma_idx = w[5:3]; d.ma_n = w[5];
          end
          CO_MAC1: begin
            d.cop = mac_mode(w[10:9], 1'b0);
            d.c_r = w[8]; d.c_x = w[7] ? CR_MCR : CR_MCX; d.c_y = w[6];
            d.ma_en = 1'b1; d.ma_lreg = w[5] ? CR_MCY : CR_MCX;
            d.ma_idx = w[4:2]; d.ma_n = w[4];
          end
          CO_LDI, CO_LDI_L, CO_LDM, CO_LDM_L, CO_LDL: begin
            d.dag_we = 1'b1; d.dag_n = w[10:8];
            d.dag_sel = (cop5 == CO_LDL) ? 2'd2 :
                        (cop5 == CO_LDM || cop5 == CO_LDM_L) ? 2'd1 : 2'd0;
            if (lng)                d.dag_val = l24[W-1:0];
            else if (cop5 == CO_LDM) d.dag_val = sx8(w[7:0]);
            else                    d.dag_val = W'(w[7:0]);
          end
          CO_LCR, CO_LCR_L: begin
            d.lcr_we = 1'b1; d.lcr_val = lng ? l24[W-1:0] : W'(w[7:0]);
          end
          CO_CALL, CO_CALL_L: begin
            d.call = 1'b1; d.pushregs = w[10];
            d.target = pc0 + (lng ? PCW'(l24) : PCW'(sx8(w[7:0])));
          end
          CO_JUMP, CO_JUMP_L: begin
            d.br = 1'b1; d.cond = w[10:6];
            d.target = pc0 + (lng ? PCW'({ext[15:0], w[5:0]}) : PCW'($signed(w[5:0])));
          end
          default: ;
        endcase
      end
    end else begin
      // ---------------------------------------------------------- real mode
      if (rop == RO_LDP8 && !pend_v) begin
        need_ext = 1'b1;
        d.valid  = 1'b0;
      end else begin
        unique case (rop)
          RO_MISC: begin
            unique case (w[27:25])
              MS_RTS, MS_RTI: begin d.ret = 1'b1; d.cond = w[20:16]; end
              MS_SLEEP: d.sleep = 1'b1;
              MS_MODE: begin d.mode_sw = 1'b1; d.target = pc0 + PCW'(2); end
              MS_RESET: begin d.rst_mr = w[1]; d.rst_mf = w[0]; end
              default: ;
            endcase
          end
          RO_ALU, RO_ALUP: begin
            d.u_en = w[27:24]; d.uop = uop_e'(w[23:20]); d.u_r = w[19];
            d.u_y = w[16]; d.imm0 = w[15:12]; d.imm1 = w[11:8];
            if (w[23:20] inside {UOP_ADD, UOP_SUB, UOP_MUL, UOP_MAC, UOP_MSU})
              d.u_x = w[17] ? 2'd3 : 2'd0;
            else
              d.u_x = w[18:17];
            d.alup = (rop == RO_ALUP);
          end
          RO_LDP, RO_LDP8: begin
            for (int i = 0; i < 4; i++) begin
              d.lp_reg[i]  = w[27-7*i -: 4];
              d.lp_port[i] = w[23-7*i -: 3];
              d.lp_reg[i+4]  = ext[27-7*i -: 4];
              d.lp_port[i+4] = ext[23-7*i -: 3];
            end
            d.lp_en = (rop == RO_LDP8) ? 8'hFF : 8'h0F;
          end
          RO_STP: begin
            d.sp_en = 4'hF;
            for (int i = 0; i < 4; i++) begin
              d.sp_reg[i] = w[27-7*i -: 4]; d.sp_port[i] = w[23-7*i -: 3];
            end
          end
          RO_GR2CU, RO_CU2GR: begin
            if (rop == RO_GR2CU) d.g2c_en = 4'hF; else d.c2g_en = 4'hF;
            for (int i = 0; i < 4; i++) begin
              d.mv_reg[i] = w[27-7*i -: 4]; d.mv_gr[i] = w[23-7*i -: 3];
            end
          end
          RO_LDIMM: begin
            d.ui_reg[0] = w[26:23]; d.ui_reg[1] = w[22:19];
            if (w[27]) begin
              d.ui_en = 2'b11; d.ui_val[0] = sx8(w[15:8]); d.ui_val[1] = sx8(w[7:0]);
            end else begin
              d.ui_en = 2'b01; d.ui_val[0] = w[15:0];
            end
          end
          RO_LCR: begin d.lcr_we = 1'b1; d.lcr_val = w[15:0]; end
          RO_CALL: begin
            d.call = 1'b1; d.pushregs = w[27]; d.cond = w[20:16];
            d.target = pc0 + PCW'({w[15:0], 1'b0});
          end
          RO_JUMP: begin
            d.br = 1'b1; d.cond = w[20:16];
            d.target = pc0 + PCW'({w[15:0], 1'b0});
          end
          RO_SETCR: begin d.setcr = 1'b1; d.cr_val = w[23:0]; end
          default: ;
        endcase
      end
    end
  end

endmodule

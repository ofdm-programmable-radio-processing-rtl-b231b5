// rpe_pkg: types and constants shared by the radio processing engine.
//
// The engine is a four-stage (Fetch, Decode, Execute, Writeback) RISC core with
// two instruction sets: a 16-bit "complex mode" set that runs one complex
// operation per cycle on a complex computational unit (CCU), and a 32-bit "real
// mode" set that runs up to four real operations per cycle on four
// computational units (CUs) in SIMD fashion.
//
// The instruction classes, register names, immediate ranges and pipeline
// follow the architecture description. The bit-level encodings below are this
// design's own: no binary encoding was published, so each class was given a
// field layout that fits the stated immediate ranges into 16 or 32 bits.
// Data are 16-bit two's complement; a complex word is {re, im}.
package rpe_pkg;

  localparam int unsigned W   = 16;  // real data width
  localparam int unsigned PCW = 16;  // program counter width (16-bit halfword address)

  typedef logic signed [W-1:0] rdata_t;

  typedef struct packed {
    logic signed [W-1:0] re;
    logic signed [W-1:0] im;
  } cplx_t;

  // Arithmetic status of the last computation (ASTA), per real/imag part.
  typedef struct packed {
    logic re_z, re_n, re_v;
    logic im_z, im_n, im_v;
  } asta_t;

  // ---------------------------------------------------------------- conditions
  typedef enum logic [4:0] {
    CND_I_GT = 5'd0,  CND_I_LE = 5'd1,  CND_I_EQ = 5'd2,  CND_I_NE = 5'd3,
    CND_I_LT = 5'd4,  CND_I_GE = 5'd5,  CND_I_OV = 5'd6,  CND_I_NOV = 5'd7,
    CND_R_GT = 5'd8,  CND_R_LE = 5'd9,  CND_R_EQ = 5'd10, CND_R_NE = 5'd11,
    CND_R_LT = 5'd12, CND_R_GE = 5'd13, CND_R_OV = 5'd14, CND_R_NOV = 5'd15,
    CND_C_EQ = 5'd16, CND_C_NE = 5'd17, CND_C_OV = 5'd18, CND_C_NOV = 5'd19,
    CND_CNT  = 5'd20, CND_ALWAYS = 5'd21
  } cond_e;

  function automatic logic cond_uses_asta(logic [4:0] c);
    return c < 5'd20;
  endfunction

  function automatic logic eval_cond(logic [4:0] c, asta_t a, logic lcr_nz);
    logic z, n, v;
    logic r;
    if (c[3]) begin z = a.re_z; n = a.re_n; v = a.re_v; end
    else      begin z = a.im_z; n = a.im_n; v = a.im_v; end
    case (c)
      CND_C_EQ:   r = a.re_z & a.im_z;
      CND_C_NE:   r = ~(a.re_z & a.im_z);
      CND_C_OV:   r = a.re_v | a.im_v;
      CND_C_NOV:  r = ~(a.re_v | a.im_v);
      CND_CNT:    r = lcr_nz;
      CND_ALWAYS: r = 1'b1;
      default: begin
        if (c >= 5'd16) r = 1'b0;
        else case (c[2:0])
          3'd0: r = ~z & ~n;
          3'd1: r = z | n;
          3'd2: r = z;
          3'd3: r = ~z;
          3'd4: r = n;
          3'd5: r = ~n;
          3'd6: r = v;
          default: r = ~v;
        endcase
      end
    endcase
    return r;
  endfunction

  // --------------------------------------------------------- CCU operations
  typedef enum logic [3:0] {
    COP_NOP, COP_ADD, COP_SUB, COP_MUL, COP_MAC, COP_MSU,
    COP_SQR, COP_SQA, COP_SQS, COP_CONJ, COP_NEG, COP_SHR, COP_SHL
  } cop_e;

  // ---------------------------------------------------------- CU operations
  // The numeric value is also the "func" field of real-mode ALU instructions.
  typedef enum logic [3:0] {
    UOP_NOP = 4'd0, UOP_ADD = 4'd1, UOP_SUB = 4'd2, UOP_MUL = 4'd3,
    UOP_MAC = 4'd4, UOP_MSU = 4'd5, UOP_SQR = 4'd6, UOP_SQA = 4'd7,
    UOP_SQS = 4'd8, UOP_ABS = 4'd9, UOP_NEG = 4'd10, UOP_DIV = 4'd11,
    UOP_ADN = 4'd12, UOP_SHR = 4'd13, UOP_SHL = 4'd14
  } uop_e;

  // Complex register codes (2 bits) and extended codes with GCRs (3 bits).
  localparam logic [1:0] CR_MCX = 2'd0, CR_MCY = 2'd1, CR_MCF = 2'd2, CR_MCR = 2'd3;

  // ------------------------------------------------- complex-mode opcodes [15:11]
  typedef enum logic [4:0] {
    CO_MISC = 5'd0,  CO_ADDSUB = 5'd1, CO_MAC = 5'd2,  CO_SQR = 5'd3,
    CO_CNJNEG = 5'd4, CO_SHR = 5'd5,  CO_SHL = 5'd6,  CO_LDST = 5'd7,
    CO_LDD = 5'd8,   CO_LDD_L = 5'd9, CO_STD = 5'd10, CO_STD_L = 5'd11,
    CO_MOVE = 5'd12, CO_LDIM = 5'd13, CO_LDIM_L = 5'd14, CO_LDIMC = 5'd15,
    CO_ADDSUB2 = 5'd16, CO_MAC2 = 5'd17, CO_SQR1 = 5'd18, CO_ADDSUB1 = 5'd19,
    CO_MAC1 = 5'd20, CO_LDI = 5'd21, CO_LDI_L = 5'd22, CO_LDM = 5'd23,
    CO_LDM_L = 5'd24, CO_LDL = 5'd25, CO_LCR = 5'd26, CO_LCR_L = 5'd27,
    CO_CALL = 5'd28, CO_CALL_L = 5'd29, CO_JUMP = 5'd30, CO_JUMP_L = 5'd31
  } copc_e;

  // ---------------------------------------------------- real-mode opcodes [31:28]
  typedef enum logic [3:0] {
    RO_MISC = 4'd0, RO_ALU = 4'd1, RO_LDP = 4'd2, RO_LDP8 = 4'd3,
    RO_STP = 4'd4, RO_GR2CU = 4'd5, RO_CU2GR = 4'd6, RO_LDIMM = 4'd7,
    RO_ALUP = 4'd8, RO_LCR = 4'd9, RO_CALL = 4'd10, RO_JUMP = 4'd11,
    RO_SETCR = 4'd12
  } ropc_e;

  // MISC sub-operations (complex [10:8], real [27:25])
  typedef enum logic [2:0] {
    MS_NOP = 3'd0, MS_RTS = 3'd1, MS_RTI = 3'd2, MS_SLEEP = 3'd3,
    MS_MODE = 3'd4, MS_RESET = 3'd5
  } misc_e;

  // Does a complex-mode opcode take a 16-bit extension word?
  function automatic logic c_is_long(logic [4:0] op);
    case (op)
      CO_LDD_L, CO_STD_L, CO_LDIM_L, CO_LDI_L, CO_LDM_L, CO_LCR_L,
      CO_CALL_L, CO_JUMP_L: return 1'b1;
      default: return 1'b0;
    endcase
  endfunction

  // ------------------------------------------------------------ decoded op
  // Everything the Execute and Writeback stages need, produced in Decode.
  typedef struct packed {
    logic              valid;
    // program flow
    logic              br;        // jump
    logic              call;
    logic              ret;       // RTS or RTI
    logic              pushregs;  // CallPR
    logic [4:0]        cond;
    logic [PCW-1:0]    target;
    logic [PCW-1:0]    retaddr;
    logic              sleep;
    logic              mode_sw;
    logic              deferred;  // condition resolved in Execute (set by the PCU)
    logic              lcr_we;
    logic [W-1:0]      lcr_val;
    // complex mode: CCU
    cop_e              cop;
    logic              c_r;       // 0: MCR, 1: MCF
    logic [1:0]        c_x;       // X operand register code
    logic              c_y;       // 0: MCY, 1: MCF
    logic [7:0]        shamt;
    // complex register write in Execute (move / immediate)
    logic              cw_en;
    logic [2:0]        cw_dst;    // 0-3 CCU regs, 4-7 GCR0-3
    logic              cw_move;   // 1: source is register cw_src, 0: cw_imm
    logic [2:0]        cw_src;
    logic [1:0]        cw_part;   // bit1: write re, bit0: write im
    cplx_t             cw_imm;
    // data memory port A (either CDM) and port B (CDM1 only)
    logic              ma_en;
    logic              ma_we;
    logic              ma_n;      // CDM select
    logic              ma_imm;    // address from ma_addr instead of the DAG
    logic [2:0]        ma_idx;    // index register 0-7
    logic              ma_brev;
    logic [23:0]       ma_addr;
    logic [1:0]        ma_sreg;   // store source register
    logic [1:0]        ma_lreg;   // load destination register
    logic              mb_en;
    logic [1:0]        mb_idx;    // DAG1 index register (I4+mb_idx)
    logic [1:0]        mb_lreg;
    // DAG register write
    logic              dag_we;
    logic [1:0]        dag_sel;   // 0: I, 1: M, 2: L
    logic [2:0]        dag_n;
    logic [W-1:0]      dag_val;
    // real mode: CUs
    uop_e              uop;
    logic [3:0]        u_en;
    logic              u_r;
    logic [1:0]        u_x;
    logic              u_y;
    logic [3:0]        imm0, imm1;
    logic              alup;      // load MX/MY of active CUs from configured ports
    logic [7:0]        lp_en;     // input-port loads
    logic [7:0][3:0]   lp_reg;
    logic [7:0][2:0]   lp_port;
    logic [3:0]        sp_en;     // output-port stores
    logic [3:0][3:0]   sp_reg;
    logic [3:0][2:0]   sp_port;
    logic [3:0]        g2c_en;    // GR -> CU moves
    logic [3:0]        c2g_en;    // CU -> GR moves
    logic [3:0][3:0]   mv_reg;
    logic [3:0][2:0]   mv_gr;
    logic [1:0]        ui_en;     // immediate loads into CU registers
    logic [1:0][3:0]   ui_reg;
    logic [1:0][W-1:0] ui_val;
    logic              rst_mr, rst_mf;
    logic              setcr;
    logic [23:0]       cr_val;
  } dop_t;

endpackage

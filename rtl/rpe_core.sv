// rpe_core: programmable radio processing engine for OFDM transceivers (top).
//
// A small RISC core with two instruction sets that share one pipeline:
//  * complex mode (16-bit instructions): one complex operation per cycle on the
//    CCU (e.g. a complex multiply-accumulate), with two complex data memories
//    CDM0/CDM1 addressed by the data address generators DAG0/DAG1 and four
//    general complex registers;
//  * real mode (32-bit instructions): up to four real operations per cycle on
//    four CUs (SIMD), fed from eight I/O ports, immediates and eight general
//    registers (the same storage as the four complex ones).
//
// Pipeline (four stages, as in the architecture description):
//  Fetch     imem is read at PCP; the word and PCF are registered.
//  Decode    ins_sel picks the 16- or 32-bit instruction into IRD; the decoder
//            and the PCU choose the next PCP (sequential, stack, IRD target or
//            IRE target). Taken branches squash the instruction behind them.
//  Execute   computation, register moves, DAG address update, data memory and
//            port access (reads are registered), stores; results and ASTA are
//            written at the end of the stage.
//  Writeback memory or port read data (mrdata) is written into MCX..MCR or
//            MX..MR; the instruction in Execute sees it through forwarding.
// Latencies: a taken branch costs one bubble, two when its condition depends on
// the instruction right before it; loads and stores cost none; a two-word
// instruction takes two cycles; SLEEP halts fetch until wake.
//
// Host ports (imem_*, cdm*_h*) load program and data; pin/pout/rd_stb/wr_stb
// are the I/O ports towards external peripherals. Decoded instructions travel
// down the pipe as dop_t rather than as raw instruction bits (a choice of this
// design). The bit encodings are this design's own (see decoder).
module rpe_core
  import rpe_pkg::*;
#(
  parameter int unsigned IMEM_DEPTH  = 32768,
  parameter int unsigned CDM_DEPTH   = 4096,
  parameter int unsigned CFRAC       = 15,
  parameter int unsigned RFRAC       = 0,
  parameter int unsigned STACK_DEPTH = 8
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic                      wake,
  // program load
  input  logic                      imem_we,
  input  logic [$clog2(IMEM_DEPTH)-1:0] imem_waddr,
  input  logic [31:0]               imem_wdata,
  // data load
  input  logic                      cdm0_hwe,
  input  logic                      cdm1_hwe,
  input  logic [$clog2(CDM_DEPTH)-1:0] cdm_haddr,
  input  cplx_t                     cdm_hwdata,
  // I/O ports
  input  rdata_t [7:0]              pin,
  output rdata_t [7:0]              pout,
  output logic   [7:0]              rd_stb,
  output logic   [7:0]              wr_stb,
  // status
  output logic                      mode,
  output logic                      sleeping
);

  localparam int unsigned IAW = $clog2(IMEM_DEPTH);
  localparam int unsigned DAW = $clog2(CDM_DEPTH);

  // ------------------------------------------------------------ PCU
  logic [PCW-1:0] pcp;
  logic           stall, kill_f, kill_d, d_defer, e_take, d_take;
  logic [W-1:0]   lcr;
  asta_t          asta, e_asta_new;
  logic           e_asta_we;
  dop_t           dd, de, e_next;
  logic           d_live;

  pcu #(.STACK_DEPTH(STACK_DEPTH)) u_pcu (
    .clk, .rst_n, .wake,
    .d_live, .d(dd), .e(de), .e_asta_we, .e_asta_new,
    .pcp, .mode, .stall, .kill_f, .kill_d, .d_defer, .lcr, .asta,
    .e_take, .d_take
  );
  assign sleeping = stall;

  // ------------------------------------------------------------ Fetch
  logic [31:0]    imem_q;
  logic [PCW-1:0] pcf;
  logic           f_valid;

  imem #(.DEPTH(IMEM_DEPTH)) u_imem (
    .clk, .re(~stall), .raddr(IAW'(pcp[PCW-1:1])), .rdata(imem_q),
    .we(imem_we), .waddr(imem_waddr), .wdata(imem_wdata)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pcf     <= '0;
      f_valid <= 1'b0;
    end else if (!stall) begin
      pcf     <= pcp;
      f_valid <= 1'b1;
    end
  end

  // ------------------------------------------------------------ Decode
  logic [31:0]    ins, ird, pend_w;
  logic [PCW-1:0] pcd, pend_pc;
  logic           d_valid, pend_v, need_ext;

  ins_sel u_ins_sel (.word(imem_q), .mode, .pc_s(pcf[0]), .ins);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ird     <= '0;
      pcd     <= '0;
      d_valid <= 1'b0;
    end else if (!stall) begin
      ird     <= ins;
      pcd     <= pcf;
      d_valid <= f_valid & ~kill_f;
    end
  end

  assign d_live = d_valid & ~stall;

  decoder u_dec (
    .mode, .ins(ird), .pc(pcd), .pend_v, .pend(pend_w), .pend_pc,
    .d(dd), .need_ext
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pend_v  <= 1'b0;
      pend_w  <= '0;
      pend_pc <= '0;
    end else if (kill_d) begin
      pend_v  <= 1'b0;
    end else if (d_live) begin
      if (need_ext) begin
        pend_v  <= 1'b1;
        pend_w  <= ird;
        pend_pc <= pcd;
      end else begin
        pend_v  <= 1'b0;
      end
    end
  end

  always_comb begin
    e_next = '0;
    e_next.cop = COP_NOP;
    e_next.uop = UOP_NOP;
    if (d_live && !kill_d) begin
      e_next = dd;
      e_next.deferred = d_defer;
    end
  end

  // ------------------------------------------------------------ Execute
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      de     <= '0;
      de.cop <= COP_NOP;
      de.uop <= UOP_NOP;
    end else begin
      de <= e_next;
    end
  end

  logic ev;
  assign ev = de.valid;

  // CCU
  cplx_t [3:0] c_regs;
  cplx_t       c_result;
  asta_t       c_asta;
  logic        c_asta_we;
  cplx_t [3:0] gcrs;
  rdata_t [7:0] grs;
  cplx_t       cw_val;
  logic        l0_en, l1_en;
  logic [1:0]  l0_sel, l1_sel;
  cplx_t       l0_data, l1_data;

  assign cw_val = de.cw_move ? (de.cw_src[2] ? gcrs[de.cw_src[1:0]] : c_regs[de.cw_src[1:0]])
                             : de.cw_imm;

  ccu #(.FRAC(CFRAC)) u_ccu (
    .clk, .rst_n,
    .op(ev ? de.cop : COP_NOP), .c_r(de.c_r), .c_x(de.c_x), .c_y(de.c_y), .shamt(de.shamt),
    .w_en(ev && de.cw_en && !de.cw_dst[2]), .w_sel(de.cw_dst[1:0]), .w_part(de.cw_part),
    .w_data(cw_val),
    .l0_en, .l0_sel, .l0_data, .l1_en, .l1_sel, .l1_data,
    .regs_fwd(c_regs), .result(c_result), .asta_new(c_asta), .asta_we(c_asta_we)
  );

  // DAGs and complex data memories
  logic            a_n;
  logic [15:0]     a_addr, dag_addr [2];
  logic [15:0]     dag_i0 [4], dag_i1 [4];
  logic            dag0_acc, dag1_acc;
  logic [1:0]      dag1_idx;
  logic            dag1_brev;
  cplx_t           cdm0_q, cdm1_q;

  assign a_n       = de.ma_imm ? de.ma_n : de.ma_idx[2];
  assign dag0_acc  = ev && de.ma_en && !de.ma_imm && !de.ma_idx[2];
  assign dag1_acc  = ev && ((de.ma_en && !de.ma_imm && de.ma_idx[2]) || de.mb_en);
  assign dag1_idx  = de.mb_en ? de.mb_idx : de.ma_idx[1:0];
  assign dag1_brev = de.mb_en ? 1'b0 : de.ma_brev;
  assign a_addr    = de.ma_imm ? de.ma_addr[15:0] : dag_addr[a_n];

  dag #(.AW(16), .BREV(DAW)) u_dag0 (
    .clk, .rst_n, .acc_en(dag0_acc), .acc_idx(de.ma_idx[1:0]), .acc_brev(de.ma_brev),
    .addr(dag_addr[0]),
    .we(ev && de.dag_we && !de.dag_n[2]), .sel(de.dag_sel), .n(de.dag_n[1:0]), .val(de.dag_val),
    .i_regs(dag_i0)
  );
  dag #(.AW(16), .BREV(DAW)) u_dag1 (
    .clk, .rst_n, .acc_en(dag1_acc), .acc_idx(dag1_idx), .acc_brev(dag1_brev),
    .addr(dag_addr[1]),
    .we(ev && de.dag_we && de.dag_n[2]), .sel(de.dag_sel), .n(de.dag_n[1:0]), .val(de.dag_val),
    .i_regs(dag_i1)
  );

  cdm #(.DEPTH(CDM_DEPTH)) u_cdm0 (
    .clk, .en(ev && de.ma_en && !a_n), .we(de.ma_we), .addr(DAW'(a_addr)),
    .wdata(c_regs[de.ma_sreg]), .rdata(cdm0_q),
    .hwe(cdm0_hwe), .haddr(cdm_haddr), .hwdata(cdm_hwdata)
  );
  cdm #(.DEPTH(CDM_DEPTH)) u_cdm1 (
    .clk, .en(ev && ((de.ma_en && a_n) || de.mb_en)), .we(de.ma_we && !de.mb_en),
    .addr(DAW'(de.mb_en ? dag_addr[1] : a_addr)),
    .wdata(c_regs[de.ma_sreg]), .rdata(cdm1_q),
    .hwe(cdm1_hwe), .haddr(cdm_haddr), .hwdata(cdm_hwdata)
  );

  // real mode: CUs, GRs, I/O ports
  rdata_t [3:0][3:0] u_regs;        // [cu][MX,MY,MF,MR]
  rdata_t [3:0]      u_res;
  logic   [3:0]      u_z, u_n, u_v, u_fwe;
  logic   [3:0][3:0] u_wwe, u_lwe;
  rdata_t [3:0][3:0] u_wdata, u_ldata;
  logic   [23:0]     cfg;           // SETCR port configuration
  logic   [7:0]      x_lp_en;       // port loads of the instruction in Execute
  logic   [7:0][3:0] x_lp_reg;
  logic   [7:0][2:0] x_lp_port;
  logic   [7:0]      p_rd, p_wr;
  rdata_t [7:0]      p_wdata, p_q;

  function automatic rdata_t cu_reg(rdata_t [3:0][3:0] r, logic [3:0] code);
    return r[code[1:0]][code[3:2]];
  endfunction

  // port loads: explicit slots, or the configured ports for ALU-with-read
  always_comb begin
    x_lp_en   = ev ? de.lp_en : '0;
    x_lp_reg  = de.lp_reg;
    x_lp_port = de.lp_port;
    if (ev && de.alup) begin
      for (int c = 0; c < 4; c++) begin
        x_lp_en[2*c]     = de.u_en[c];
        x_lp_reg[2*c]    = {2'd0, 2'(c)};
        x_lp_port[2*c]   = cfg[23-6*c -: 3];
        x_lp_en[2*c+1]   = de.u_en[c] && !(de.uop inside {UOP_SQR, UOP_SQA, UOP_SQS});
        x_lp_reg[2*c+1]  = {2'd1, 2'(c)};
        x_lp_port[2*c+1] = cfg[20-6*c -: 3];
      end
    end
    p_rd = '0;
    for (int s = 0; s < 8; s++) if (x_lp_en[s]) p_rd[x_lp_port[s]] = 1'b1;
    p_wr = '0;
    p_wdata = '0;
    for (int s = 0; s < 4; s++)
      if (ev && de.sp_en[s]) begin
        p_wr[de.sp_port[s]]    = 1'b1;
        p_wdata[de.sp_port[s]] = cu_reg(u_regs, de.sp_reg[s]);
      end
  end

  // Execute-stage writes into CU registers
  always_comb begin
    u_wwe   = '0;
    u_wdata = '0;
    if (ev) begin
      for (int s = 0; s < 4; s++)
        if (de.g2c_en[s]) begin
          u_wwe[de.mv_reg[s][1:0]][de.mv_reg[s][3:2]]   = 1'b1;
          u_wdata[de.mv_reg[s][1:0]][de.mv_reg[s][3:2]] = grs[de.mv_gr[s]];
        end
      for (int s = 0; s < 2; s++)
        if (de.ui_en[s]) begin
          u_wwe[de.ui_reg[s][1:0]][de.ui_reg[s][3:2]]   = 1'b1;
          u_wdata[de.ui_reg[s][1:0]][de.ui_reg[s][3:2]] = de.ui_val[s];
        end
      for (int c = 0; c < 4; c++) begin
        if (de.rst_mf) begin u_wwe[c][2] = 1'b1; u_wdata[c][2] = '0; end
        if (de.rst_mr) begin u_wwe[c][3] = 1'b1; u_wdata[c][3] = '0; end
      end
    end
  end

  for (genvar c = 0; c < 4; c++) begin : g_cu
    cu #(.FRAC(RFRAC)) u_cu (
      .clk, .rst_n,
      .en(ev && de.u_en[c]), .op(ev && de.u_en[c] ? de.uop : UOP_NOP),
      .r(de.u_r), .x(de.u_x), .y(de.u_y), .shamt(c < 2 ? de.imm0 : de.imm1),
      .w_we(u_wwe[c]), .w_data(u_wdata[c]), .l_we(u_lwe[c]), .l_data(u_ldata[c]),
      .regs_fwd(u_regs[c]), .result(u_res[c]),
      .flag_z(u_z[c]), .flag_n(u_n[c]), .flag_v(u_v[c]), .flag_we(u_fwe[c])
    );
  end

  io_ports #(.NPORT(8)) u_io (
    .clk, .rst_n, .pin, .rd_en(p_rd), .wr_en(p_wr), .wr_data(p_wdata),
    .rd_q(p_q), .pout, .rd_stb, .wr_stb
  );

  // general registers: complex moves use slots 0/1, real moves slots 0-3
  logic   [3:0]      g_we;
  logic   [3:0][2:0] g_idx;
  rdata_t [3:0]      g_data;
  always_comb begin
    g_we = '0; g_idx = '0; g_data = '0;
    if (ev && de.cw_en && de.cw_dst[2]) begin
      g_we[0]   = de.cw_part[1]; g_idx[0] = {de.cw_dst[1:0], 1'b0}; g_data[0] = cw_val.re;
      g_we[1]   = de.cw_part[0]; g_idx[1] = {de.cw_dst[1:0], 1'b1}; g_data[1] = cw_val.im;
    end
    if (ev)
      for (int s = 0; s < 4; s++)
        if (de.c2g_en[s]) begin
          g_we[s] = 1'b1; g_idx[s] = de.mv_gr[s]; g_data[s] = cu_reg(u_regs, de.mv_reg[s]);
        end
  end

  gcr u_gcr (.clk, .rst_n, .we(g_we), .idx(g_idx), .data(g_data), .gr(grs), .gcrs);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                   cfg <= '0;
    else if (ev && de.setcr)      cfg <= de.cr_val;
  end

  // arithmetic status: CCU in complex mode, CU0 in real mode
  always_comb begin
    if (ev && c_asta_we) begin
      e_asta_we  = 1'b1;
      e_asta_new = c_asta;
    end else begin
      e_asta_we  = u_fwe[0];
      e_asta_new = '{re_z: u_z[0], re_n: u_n[0], re_v: u_v[0], im_z: 1'b1, im_n: 1'b0, im_v: 1'b0};
    end
  end

  // ------------------------------------------------------------ Writeback
  logic              w_la, w_lb, w_an;
  logic [1:0]        w_la_reg, w_lb_reg;
  logic [7:0]        w_lp_en;
  logic [7:0][3:0]   w_lp_reg;
  logic [7:0][2:0]   w_lp_port;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      w_la <= 1'b0; w_lb <= 1'b0; w_an <= 1'b0;
      w_la_reg <= '0; w_lb_reg <= '0;
      w_lp_en <= '0; w_lp_reg <= '0; w_lp_port <= '0;
    end else begin
      w_la      <= ev && de.ma_en && !de.ma_we;
      w_an      <= a_n;
      w_la_reg  <= de.ma_lreg;
      w_lb      <= ev && de.mb_en;
      w_lb_reg  <= de.mb_lreg;
      w_lp_en   <= x_lp_en;
      w_lp_reg  <= x_lp_reg;
      w_lp_port <= x_lp_port;
    end
  end

  assign l0_en   = w_la;
  assign l0_sel  = w_la_reg;
  assign l0_data = w_an ? cdm1_q : cdm0_q;
  assign l1_en   = w_lb;
  assign l1_sel  = w_lb_reg;
  assign l1_data = cdm1_q;

  always_comb begin
    u_lwe   = '0;
    u_ldata = '0;
    for (int s = 0; s < 8; s++)
      if (w_lp_en[s]) begin
        u_lwe[w_lp_reg[s][1:0]][w_lp_reg[s][3:2]]   = 1'b1;
        u_ldata[w_lp_reg[s][1:0]][w_lp_reg[s][3:2]] = p_q[w_lp_port[s]];
      end
  end

endmodule

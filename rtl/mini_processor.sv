// mini_processor: one of the two microcoded mini-processors of the DMC
// (instantiated as mini-processor A for local commands and B for remote
// commands).
//
// A start pulse hands it a command (entry microinstruction, target microcode
// address, address, burst length, data words). It then
// fetches and executes horizontal microinstructions from its Control Store
// port until an `end` micro-operation, and reports the end code on `done`.
//
// Pipeline (five stages, as in the document; the split is this design's):
//   IF  : the Control Store is addressed with the PC (synchronous read)
//   ID  : decode; operands read with forwarding; branches and end resolved
//   EX  : Adder Unit (add, sub, set, pfe, pfm)
//   MEM : Local Memory access (lw, sw, lfrw, ll, sc), Synchronization
//         Supporter check, Message Passing Unit output (mp)
//   WB  : register writes; loaded words sent to the result stream
// No interlocks: the microcode is scheduled so that a load result is used
// no sooner than three microinstructions later (forwarded from WB), which is
// how the published microcode places its nops. Adder results are forwarded
// from EX and MEM. Branches (beq, bneqz, jmp) have one delay slot; the
// microinstruction fetched behind an `end` is discarded. The first
// microinstruction reaches ID two cycles after start (pipeline fill,
// T_f = 2); done is raised when the end micro-operation reaches WB, i.e.
// 2 + N + 2 cycles after start for N issued microinstructions.
//
// Addresses: lw/sw/ll/sc take byte addresses (word = addr[AW+1:2]); lfrw
// takes a word address into the V2P table. pfe splits an address into the
// V2P table index of its page (page number * V2P_ENTRY) and the page offset;
// pfm joins a frame number and an offset. A failed sc makes the command end
// with END_RETRY whatever code its end carries.
// The message type and source of an outgoing request are fixed (request,
// this node), so those bits of msg are constants or cfg.
module mini_processor
  import dmc_pkg::*;
#(
  parameter int unsigned AW = 14   // local memory word-address width
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  dmc_cfg_t              cfg,
  // command
  input  logic                  start,
  input  mp_cmd_t               cmd,
  output logic                  busy,
  output logic                  done,
  output logic [3:0]            end_code,
  // control store port
  output logic                  cs_ren,
  output logic [CS_AW-1:0]      cs_raddr,
  input  uinstr_t               cs_rdata,
  // register file
  input  logic [7:0][DW-1:0]    regs,
  output logic [2:0]            rf_we,
  output logic [2:0][2:0]       rf_waddr,
  output logic [2:0][DW-1:0]    rf_wdata,
  // local memory port
  output logic                  lm_en,
  output logic                  lm_we,
  output logic [AW-1:0]         lm_addr,
  output logic [DW-1:0]         lm_wdata,
  input  logic [DW-1:0]         lm_rdata,
  // synchronization supporter
  output logic                  ss_valid,
  output logic                  ss_ll,
  output logic                  ss_sc,
  output logic                  ss_wr,
  input  logic                  ss_wr_ok,
  // result stream (lw ... , cpu_core)
  output logic                  out_valid,
  output logic [DW-1:0]         out_data,
  // message passing unit
  output logic                  msg_valid,
  output msg_t                  msg
);
  // ---------------- special registers ----------------
  // operands of the running command (entry point and source node are not
  // needed after the start)
  logic [DW-1:0]            cq_addr;
  burst_t                   cq_data;
  logic [CS_AW-1:0]         cq_start;
  logic [NB_W-1:0]          cq_n;
  logic [$clog2(MAX_BURST)-1:0] dptr;
  logic                     sc_fail;

  // ---------------- fetch ----------------
  logic             fetch_en, if_q;
  logic [CS_AW-1:0] pc;

  // ---------------- pipeline registers ----------------
  typedef struct packed {
    logic        v;
    au_op_e      au_op;
    logic [DW-1:0] a, b;
    logic [2:0]  rd, rd2;
    lsu_op_e     lsu_op;
    logic [DW-1:0] ls_addr, ls_wdata;
    logic [2:0]  ls_rd;
    logic        tocore;
    logic        is_end;
    logic [3:0]  code;
    logic        mp;
    msg_t        m;
  } ex_t;

  typedef struct packed {
    logic        v;
    logic        we0, we1;
    logic [2:0]  rd, rd2;
    logic [DW-1:0] r0, r1;
    lsu_op_e     lsu_op;
    logic [DW-1:0] ls_addr, ls_wdata;
    logic [2:0]  ls_rd;
    logic        tocore;
    logic        is_end;
    logic [3:0]  code;
    logic        mp;
    msg_t        m;
  } mem_t;

  typedef struct packed {
    logic        v;
    logic        we0, we1;
    logic [2:0]  rd, rd2;
    logic [DW-1:0] r0, r1;
    logic        ld_we;
    logic [2:0]  ld_rd;
    logic        tocore;
    logic        is_end;
    logic [3:0]  code;
  } wb_t;

  ex_t  ex_q;
  mem_t mem_q;
  wb_t  wb_q;

  // ---------------- EX: adder unit ----------------
  localparam logic [DW-1:0] OFS_MASK = (DW'(1) << PAGE_BITS) - 1;
  logic          ex_we0, ex_we1;
  logic [DW-1:0] ex_r0, ex_r1;

  always_comb begin
    ex_we0 = ex_q.v && ex_q.au_op != AU_NOP;
    ex_we1 = ex_q.v && ex_q.au_op == AU_PFE;
    ex_r1  = ex_q.a & OFS_MASK;
    unique case (ex_q.au_op)
      AU_ADD:  ex_r0 = ex_q.a + ex_q.b;
      AU_SUB:  ex_r0 = ex_q.a - ex_q.b;
      AU_SET:  ex_r0 = ex_q.b;
      AU_PFE:  ex_r0 = (ex_q.a >> PAGE_BITS) * V2P_ENTRY;
      AU_PFM:  ex_r0 = (ex_q.a << PAGE_BITS) | (ex_q.b & OFS_MASK);
      default: ex_r0 = '0;
    endcase
  end

  // ---------------- forwarding ----------------
  logic [7:0][DW-1:0] fr;
  always_comb begin
    fr = regs;
    for (int p = 0; p < 3; p++)
      if (rf_we[p]) fr[rf_waddr[p]] = rf_wdata[p];
    if (mem_q.v && mem_q.we0) fr[mem_q.rd]  = mem_q.r0;
    if (mem_q.v && mem_q.we1) fr[mem_q.rd2] = mem_q.r1;
    if (ex_we0) fr[ex_q.rd]  = ex_r0;
    if (ex_we1) fr[ex_q.rd2] = ex_r1;
  end

  function automatic logic [DW-1:0] opnd(input logic [4:0] sel, input logic [11:0] imm,
                                         input logic [7:0][DW-1:0] r,
                                         input logic [DW-1:0] laddr, input logic [DW-1:0] dval,
                                         input logic [CS_AW-1:0] cstart, input logic [NB_W-1:0] nb,
                                         input dmc_cfg_t cf);
    if (sel < 5'd8) return r[sel[2:0]];
    unique case (sel)
      SEL_LADDR: return laddr;
      SEL_DATA:  return dval;
      SEL_BADDR: return cf.baddr;
      SEL_V2P:   return cf.v2p;
      SEL_SNODE: return DW'(cf.node);
      SEL_START: return DW'(cstart);
      SEL_NB:    return DW'(nb);
      SEL_ONE:   return DW'(1);
      SEL_ZERO:  return '0;
      SEL_IMM:   return DW'(imm);
      default:   return '0;
    endcase
  endfunction

  // ---------------- ID ----------------
  uinstr_t          u;
  logic             id_v, taken, id_end;
  logic [CS_AW-1:0] target;
  ex_t              ex_d;

  assign u    = cs_rdata;
  assign id_v = if_q;

  always_comb begin
    logic [DW-1:0] ra_v;
    ra_v   = fr[u.cu.ra];
    taken  = 1'b0;
    // beq / bneqz branch to the field's target; jmp to the target or to
    // the value of its selector (jmp START_ADDR)
    target = (u.cu.op == CU_JMP && u.cu.sb != SEL_IMM)
           ? opnd(u.cu.sb, 12'd0, fr, cq_addr, cq_data[dptr], cq_start, cq_n, cfg)[CS_AW-1:0] : u.cu.target;
    unique case (u.cu.op)
      CU_BEQ:   taken = ra_v == opnd(u.cu.sb, {2'b0, u.cu.target}, fr, cq_addr, cq_data[dptr], cq_start, cq_n, cfg);
      CU_BNEQZ: taken = ra_v != '0;
      CU_JMP:   taken = 1'b1;
      default:  taken = 1'b0;
    endcase
    taken  = taken && id_v;
    id_end = id_v && u.cu.op == CU_END;

    ex_d          = '0;
    ex_d.v        = id_v;
    ex_d.au_op    = u.au.op;
    ex_d.a        = opnd(u.au.sa, u.au.imm, fr, cq_addr, cq_data[dptr], cq_start, cq_n, cfg);
    ex_d.b        = opnd(u.au.sb, u.au.imm, fr, cq_addr, cq_data[dptr], cq_start, cq_n, cfg);
    ex_d.rd       = u.au.rd;
    ex_d.rd2      = u.au.rd2;
    ex_d.lsu_op   = u.lsu.op;
    ex_d.ls_addr  = fr[u.lsu.ra];
    ex_d.ls_wdata = opnd(u.lsu.sd, 12'd0, fr, cq_addr, cq_data[dptr], cq_start, cq_n, cfg);
    ex_d.ls_rd    = u.lsu.rd;
    ex_d.tocore   = u.lsu.tocore;
    ex_d.is_end   = u.cu.op == CU_END;
    ex_d.code     = u.cu.code;
    ex_d.mp       = u.mpu.op == MPU_MP;
    ex_d.m.mtype  = MSG_REQ;
    ex_d.m.src    = cfg.node;
    ex_d.m.dst    = fr[u.mpu.rdst][NODE_W-1:0];
    ex_d.m.qos    = fr[u.mpu.rqos][1:0];
    ex_d.m.start  = cq_start;
    ex_d.m.addr   = fr[u.mpu.raddr];
    ex_d.m.n      = cq_n;
    ex_d.m.status = '0;
    ex_d.m.data   = cq_data;
  end

  // ---------------- sequential ----------------
  assign cs_ren   = fetch_en;
  assign cs_raddr = pc;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy     <= 1'b0;
      fetch_en <= 1'b0;
      if_q     <= 1'b0;
      pc       <= '0;
      cq_addr  <= '0;
      cq_data  <= '0;
      cq_start <= '0;
      cq_n     <= '0;
      dptr     <= '0;
      sc_fail  <= 1'b0;
      ex_q     <= '0;
      mem_q    <= '0;
      wb_q     <= '0;
    end else begin
      // fetch
      if (start && !busy) begin
        busy     <= 1'b1;
        fetch_en <= 1'b1;
        pc       <= cmd.entry;
        cq_addr  <= cmd.addr;
        cq_data  <= cmd.data;
        cq_start <= cmd.start;
        cq_n     <= cmd.n;
        dptr     <= '0;
        sc_fail  <= 1'b0;
        if_q     <= 1'b0;
      end else begin
        if (done) busy <= 1'b0;
        if (id_end) begin
          fetch_en <= 1'b0;
          if_q     <= 1'b0;
        end else begin
          if_q <= fetch_en;
          if (fetch_en) pc <= taken ? target : pc + 1'b1;
        end
      end
      if (id_v && (u.lsu.op == LSU_SW || u.lsu.op == LSU_SC) && u.lsu.sd == SEL_DATA)
        dptr <= dptr + 1'b1;

      // ID -> EX
      ex_q <= ex_d;

      // EX -> MEM
      mem_q.v        <= ex_q.v;
      mem_q.we0      <= ex_we0;
      mem_q.we1      <= ex_we1;
      mem_q.rd       <= ex_q.rd;
      mem_q.rd2      <= ex_q.rd2;
      mem_q.r0       <= ex_r0;
      mem_q.r1       <= ex_r1;
      mem_q.lsu_op   <= ex_q.lsu_op;
      mem_q.ls_addr  <= ex_q.ls_addr;
      mem_q.ls_wdata <= ex_q.ls_wdata;
      mem_q.ls_rd    <= ex_q.ls_rd;
      mem_q.tocore   <= ex_q.tocore;
      mem_q.is_end   <= ex_q.is_end;
      mem_q.code     <= ex_q.code;
      mem_q.mp       <= ex_q.mp;
      mem_q.m        <= ex_q.m;

      // MEM -> WB
      if (ss_valid && ss_sc && !ss_wr_ok) sc_fail <= 1'b1;
      wb_q.v      <= mem_q.v;
      wb_q.we0    <= mem_q.we0;
      wb_q.we1    <= mem_q.we1;
      wb_q.rd     <= mem_q.rd;
      wb_q.rd2    <= mem_q.rd2;
      wb_q.r0     <= mem_q.r0;
      wb_q.r1     <= mem_q.r1;
      wb_q.ld_we  <= mem_q.v && ((mem_q.lsu_op == LSU_LW && !mem_q.tocore) ||
                                 mem_q.lsu_op == LSU_LFRW || mem_q.lsu_op == LSU_LL);
      wb_q.ld_rd  <= mem_q.ls_rd;
      wb_q.tocore <= mem_q.v && mem_q.lsu_op == LSU_LW && mem_q.tocore;
      wb_q.is_end <= mem_q.is_end;
      wb_q.code   <= mem_q.code;
    end
  end

  // ---------------- MEM: memory, sync, message ----------------
  logic mem_ls;
  assign mem_ls   = mem_q.v && mem_q.lsu_op != LSU_NOP;
  assign ss_valid = mem_ls;
  assign ss_ll    = mem_q.lsu_op == LSU_LL;
  assign ss_sc    = mem_q.lsu_op == LSU_SC;
  assign ss_wr    = mem_q.lsu_op == LSU_SW || mem_q.lsu_op == LSU_SC;
  assign lm_en    = mem_ls;
  assign lm_we    = mem_ls && ss_wr && ss_wr_ok;
  assign lm_addr  = (mem_q.lsu_op == LSU_LFRW) ? mem_q.ls_addr[AW-1:0] : mem_q.ls_addr[AW+1:2];
  assign lm_wdata = mem_q.ls_wdata;
  assign msg_valid = mem_q.v && mem_q.mp;
  assign msg       = mem_q.m;

  // ---------------- WB ----------------
  assign rf_we[0]    = wb_q.v && wb_q.we0;
  assign rf_waddr[0] = wb_q.rd;
  assign rf_wdata[0] = wb_q.r0;
  assign rf_we[1]    = wb_q.v && wb_q.we1;
  assign rf_waddr[1] = wb_q.rd2;
  assign rf_wdata[1] = wb_q.r1;
  assign rf_we[2]    = wb_q.ld_we;
  assign rf_waddr[2] = wb_q.ld_rd;
  assign rf_wdata[2] = lm_rdata;
  assign out_valid   = wb_q.tocore;
  assign out_data    = lm_rdata;
  assign done        = wb_q.v && wb_q.is_end;
  assign end_code    = sc_fail ? END_RETRY : wb_q.code;
endmodule

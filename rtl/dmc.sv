// dmc: the Dual Microcoded Controller, the hardware module of each node that
// sits between the core, the node's Local Memory and the network.
//
// It contains the six parts of the document's architecture: the Core
// Interface Control Unit (cicu), the Network Interface Control Unit (nicu),
// the Control Store, mini-processor A with Register File A, mini-processor B
// with Register File B, and the Synchronization Supporter. Commands from the
// local core run on mini-processor A, commands from remote cores on
// mini-processor B, so both are served at the same time. The Control Store
// and the Local Memory are dual ported: port A serves the core side
// (mini-processor A, or the cicu while A is idle), port B the network side
// (mini-processor B, or the nicu while B is idle). The Local Memory itself
// is outside (dp_ram in the node).
//
// Interface: core command (valid/ready) and one-cycle response pulse; network
// message in/out with valid/ready; the two Local Memory ports (read data one
// cycle after the address). cfg holds this node's number, the boundary
// address of the shared logical space and the word address of the V2P table.
// ev_* are one-cycle event pulses for observation (upload, requeue of a
// command whose lock was busy, ll/sc write collision).
module dmc
  import dmc_pkg::*;
#(
  parameter int unsigned AW     = 14,
  parameter int unsigned CQ_DEPTH = 4,    // core command queue
  parameter int unsigned NQ_DEPTH = 16    // network request queue
) (
  input  logic            clk,
  input  logic            rst_n,
  input  dmc_cfg_t        cfg,
  // core
  input  logic            core_cmd_valid,
  input  core_cmd_t       core_cmd,
  output logic            core_cmd_ready,
  output logic            core_resp_valid,
  output core_resp_t      core_resp,
  // network
  input  logic            net_in_valid,
  input  msg_t            net_in,
  output logic            net_in_ready,
  output logic            net_out_valid,
  output msg_t            net_out,
  input  logic            net_out_ready,
  // local memory
  output logic            lma_en,
  output logic            lma_we,
  output logic [AW-1:0]   lma_addr,
  output logic [DW-1:0]   lma_wdata,
  input  logic [DW-1:0]   lma_rdata,
  output logic            lmb_en,
  output logic            lmb_we,
  output logic [AW-1:0]   lmb_addr,
  output logic [DW-1:0]   lmb_wdata,
  input  logic [DW-1:0]   lmb_rdata,
  // events
  output logic [1:0]      ev_upload,     // [0] cicu, [1] nicu
  output logic [1:0]      ev_requeue,    // [0] cicu, [1] nicu
  output logic            ev_collision
);
  // ---------------- mini-processor signals ----------------
  logic        a_start, b_start, a_busy, b_busy, a_done, b_done;
  mp_cmd_t     a_cmd, b_cmd;
  logic [3:0]  a_code, b_code;
  logic        a_csren, b_csren;
  logic [CS_AW-1:0] a_csraddr, b_csraddr;
  uinstr_t     a_csrdata, b_csrdata;
  logic [7:0][DW-1:0] a_regs, b_regs;
  logic [2:0]  a_rfwe, b_rfwe;
  logic [2:0][2:0] a_rfwa, b_rfwa;
  logic [2:0][DW-1:0] a_rfwd, b_rfwd;
  logic        a_lmen, a_lmwe, b_lmen, b_lmwe;
  logic [AW-1:0] a_lmaddr, b_lmaddr;
  logic [DW-1:0] a_lmwd, b_lmwd;
  logic        a_ssv, a_ssll, a_sssc, a_sswr, a_ok;
  logic        b_ssv, b_ssll, b_sssc, b_sswr, b_ok;
  logic        a_outv, b_outv;
  logic [DW-1:0] a_outd, b_outd;
  logic        a_msgv, b_msgv;
  msg_t        a_msg, b_msg;

  // ---------------- interface unit signals ----------------
  logic        ci_lmen, ci_lmwe, ni_lmen, ni_lmwe;
  logic [AW-1:0] ci_lmaddr, ni_lmaddr;
  logic [DW-1:0] ci_lmwd, ni_lmwd;
  logic        ci_cswe, ni_cswe, ci_setres, ni_setres;
  logic [CS_AW+1:0] ci_cswa, ni_cswa;
  logic [DW-1:0] ci_cswd, ni_cswd;
  logic [SLOT_W-1:0] ci_slot, ni_slot;
  logic [NSLOT-1:0]  resident;
  logic        rem_v;
  core_resp_t  rem_resp;

  cicu #(.AW(AW), .QDEPTH(CQ_DEPTH)) u_cicu (
    .clk, .rst_n,
    .core_cmd_valid, .core_cmd, .core_cmd_ready, .core_resp_valid, .core_resp,
    .lm_en(ci_lmen), .lm_we(ci_lmwe), .lm_addr(ci_lmaddr), .lm_wdata(ci_lmwd), .lm_rdata(lma_rdata),
    .cs_we(ci_cswe), .cs_waddr(ci_cswa), .cs_wdata(ci_cswd), .resident,
    .set_res(ci_setres), .set_slot(ci_slot),
    .mp_start(a_start), .mp_cmd(a_cmd), .mp_done(a_done), .mp_end_code(a_code),
    .mp_out_valid(a_outv), .mp_out_data(a_outd),
    .remote_valid(rem_v), .remote_resp(rem_resp),
    .ev_requeue(ev_requeue[0]), .ev_upload(ev_upload[0])
  );

  nicu #(.AW(AW), .QDEPTH(NQ_DEPTH)) u_nicu (
    .clk, .rst_n, .node(cfg.node),
    .net_in_valid, .net_in, .net_in_ready, .net_out_valid, .net_out, .net_out_ready,
    .lm_en(ni_lmen), .lm_we(ni_lmwe), .lm_addr(ni_lmaddr), .lm_wdata(ni_lmwd), .lm_rdata(lmb_rdata),
    .cs_we(ni_cswe), .cs_waddr(ni_cswa), .cs_wdata(ni_cswd), .resident,
    .set_res(ni_setres), .set_slot(ni_slot),
    .mp_start(b_start), .mp_cmd(b_cmd), .mp_done(b_done), .mp_end_code(b_code),
    .mp_out_valid(b_outv), .mp_out_data(b_outd),
    .mpb_msg_valid(b_msgv), .mpb_msg(b_msg),
    .mpa_msg_valid(a_msgv), .mpa_msg(a_msg),
    .remote_valid(rem_v), .remote_resp(rem_resp),
    .ev_requeue(ev_requeue[1]), .ev_upload(ev_upload[1])
  );

  control_store u_cs (
    .clk, .rst_n,
    .a_ren(a_csren), .a_raddr(a_csraddr), .a_rdata(a_csrdata),
    .a_we(ci_cswe), .a_waddr(ci_cswa), .a_wdata(ci_cswd),
    .b_ren(b_csren), .b_raddr(b_csraddr), .b_rdata(b_csrdata),
    .b_we(ni_cswe), .b_waddr(ni_cswa), .b_wdata(ni_cswd),
    .set_res_a(ci_setres), .set_slot_a(ci_slot),
    .set_res_b(ni_setres), .set_slot_b(ni_slot),
    .resident
  );

  mini_processor #(.AW(AW)) u_mpa (
    .clk, .rst_n, .cfg,
    .start(a_start), .cmd(a_cmd), .busy(a_busy), .done(a_done), .end_code(a_code),
    .cs_ren(a_csren), .cs_raddr(a_csraddr), .cs_rdata(a_csrdata),
    .regs(a_regs), .rf_we(a_rfwe), .rf_waddr(a_rfwa), .rf_wdata(a_rfwd),
    .lm_en(a_lmen), .lm_we(a_lmwe), .lm_addr(a_lmaddr), .lm_wdata(a_lmwd), .lm_rdata(lma_rdata),
    .ss_valid(a_ssv), .ss_ll(a_ssll), .ss_sc(a_sssc), .ss_wr(a_sswr), .ss_wr_ok(a_ok),
    .out_valid(a_outv), .out_data(a_outd), .msg_valid(a_msgv), .msg(a_msg)
  );

  mini_processor #(.AW(AW)) u_mpb (
    .clk, .rst_n, .cfg,
    .start(b_start), .cmd(b_cmd), .busy(b_busy), .done(b_done), .end_code(b_code),
    .cs_ren(b_csren), .cs_raddr(b_csraddr), .cs_rdata(b_csrdata),
    .regs(b_regs), .rf_we(b_rfwe), .rf_waddr(b_rfwa), .rf_wdata(b_rfwd),
    .lm_en(b_lmen), .lm_we(b_lmwe), .lm_addr(b_lmaddr), .lm_wdata(b_lmwd), .lm_rdata(lmb_rdata),
    .ss_valid(b_ssv), .ss_ll(b_ssll), .ss_sc(b_sssc), .ss_wr(b_sswr), .ss_wr_ok(b_ok),
    .out_valid(b_outv), .out_data(b_outd), .msg_valid(b_msgv), .msg(b_msg)
  );

  regfile u_rfa (.clk, .rst_n, .we(a_rfwe), .waddr(a_rfwa), .wdata(a_rfwd), .regs(a_regs));
  regfile u_rfb (.clk, .rst_n, .we(b_rfwe), .waddr(b_rfwa), .wdata(b_rfwd), .regs(b_regs));

  sync_supporter #(.AW(AW)) u_sync (
    .clk, .rst_n,
    .a_valid(a_ssv), .a_ll(a_ssll), .a_sc(a_sssc), .a_wr(a_sswr), .a_addr(a_lmaddr),
    .b_valid(b_ssv), .b_ll(b_ssll), .b_sc(b_sssc), .b_wr(b_sswr), .b_addr(b_lmaddr),
    .wr_ok_a(a_ok), .wr_ok_b(b_ok), .collision(ev_collision)
  );

  // Local Memory port muxes: the processor owns its port while busy.
  assign lma_en    = a_busy ? a_lmen    : ci_lmen;
  assign lma_we    = a_busy ? a_lmwe    : ci_lmwe;
  assign lma_addr  = a_busy ? a_lmaddr  : ci_lmaddr;
  assign lma_wdata = a_busy ? a_lmwd    : ci_lmwd;
  assign lmb_en    = b_busy ? b_lmen    : ni_lmen;
  assign lmb_we    = b_busy ? b_lmwe    : ni_lmwe;
  assign lmb_addr  = b_busy ? b_lmaddr  : ni_lmaddr;
  assign lmb_wdata = b_busy ? b_lmwd    : ni_lmwd;
endmodule

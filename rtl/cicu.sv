// cicu: Core Interface Control Unit of the DMC.
//
// It is the DMC's interface to the local core. Commands from the core enter
// a command queue. The unit takes the oldest command and
//   * private read / write: accesses the private Local Memory directly, by
//     physical address, through Local Memory port A (no microcode);
//   * shared command: makes sure that the V2P microcode (slot 0) and the
//     command's own microcode (slot = command code) are in the Control Store,
//     uploading them from the Local Memory through port A if not, then starts
//     mini-processor A at slot 0 with START_ADDR = code * SLOT_UI, and
//     collects the words the microcode sends to the core. End code 1 returns
//     the result; 2 (lock not acquired) puts the command back at the tail of
//     the queue; 3 (remote access) waits for the reply the network interface
//     forwards, then returns it.
// Results go back to the core as a one-cycle response pulse.
//
// The five functions of the unit follow the document. The queue depth, the
// one-command-at-a-time processing, the slot layout of the microprogram in
// Local Memory (UCODE_BASE + slot * 128 words, four words per
// microinstruction) and the upload of whole slots are this design's choices.
// Local Memory port A belongs to this unit whenever mini-processor A is idle;
// the two never need it at the same time because the unit waits for the
// processor to finish.
// Some mp_cmd bits are fixed (the entry point is always slot 0). The Local
// Memory write data of a private write comes straight from the queued
// command, and the Control Store write data during an upload is the Local
// Memory read data passed through unchanged.
module cicu
  import dmc_pkg::*;
#(
  parameter int unsigned AW       = 14,
  parameter int unsigned QDEPTH   = 4
) (
  input  logic                  clk,
  input  logic                  rst_n,
  // core side
  input  logic                  core_cmd_valid,
  input  core_cmd_t             core_cmd,
  output logic                  core_cmd_ready,
  output logic                  core_resp_valid,
  output core_resp_t            core_resp,
  // local memory port A (when mini-processor A is idle)
  output logic                  lm_en,
  output logic                  lm_we,
  output logic [AW-1:0]         lm_addr,
  output logic [DW-1:0]         lm_wdata,
  input  logic [DW-1:0]         lm_rdata,
  // control store port A, upload
  output logic                  cs_we,
  output logic [CS_AW+1:0]      cs_waddr,
  output logic [DW-1:0]         cs_wdata,
  input  logic [NSLOT-1:0]      resident,
  output logic                  set_res,
  output logic [SLOT_W-1:0]     set_slot,
  // mini-processor A
  output logic                  mp_start,
  output mp_cmd_t               mp_cmd,
  input  logic                  mp_done,
  input  logic [3:0]            mp_end_code,
  input  logic                  mp_out_valid,
  input  logic [DW-1:0]         mp_out_data,
  // reply of a remote access, from the network interface
  input  logic                  remote_valid,
  input  core_resp_t            remote_resp,
  // events
  output logic                  ev_requeue,
  output logic                  ev_upload
);
  typedef enum logic [2:0] { S_IDLE, S_PRIV, S_CHECK, S_UPLOAD, S_RUN, S_REMOTE, S_RESP } state_e;
  localparam int unsigned UP_WORDS = SLOT_UI * UI_WORDS;
  localparam int unsigned UPW      = $clog2(UP_WORDS);

  state_e            st;
  core_cmd_t         cur, q_head;
  logic              q_empty, q_pop, q_push;
  core_cmd_t         q_wdata;
  logic [$clog2(QDEPTH):0] q_count;
  logic [SLOT_W-1:0] up_slot;
  logic [UPW:0]      up_i;
  logic              up_wr;
  logic [UPW-1:0]    up_wi;
  logic [NB_W:0]     pi, pc_cap;
  logic              p_cap;
  logic [NB_W-1:0]   rcnt;
  logic              r_early;   // reply received while still running
  burst_t            rbuf;
  logic [3:0]        rstat;

  assign ev_requeue = (st == S_RUN) && mp_done && mp_end_code == END_RETRY;
  assign q_push     = ev_requeue || (core_cmd_valid && core_cmd_ready);
  assign q_wdata    = ev_requeue ? cur : core_cmd;
  assign core_cmd_ready = !ev_requeue && (32'(q_count) + 32'(st != S_IDLE) < QDEPTH);
  assign q_pop      = (st == S_IDLE) && !q_empty;

  sync_fifo #(.T(core_cmd_t), .DEPTH(QDEPTH)) u_q (
    .clk, .rst_n, .push(q_push), .wr_data(q_wdata), .pop(q_pop),
    .rd_data(q_head), .empty(q_empty), .count(q_count)
  );

  // local memory / control store drive
  always_comb begin
    lm_en = 1'b0; lm_we = 1'b0; lm_addr = '0; lm_wdata = '0;
    if (st == S_PRIV && pi < {1'b0, cur.n}) begin
      lm_en    = 1'b1;
      lm_we    = cur.kind == CMD_PRIV_WR;
      lm_addr  = cur.addr[AW+1:2] + AW'(pi);
      lm_wdata = cur.data[pi[NB_W-2:0]];
    end else if (st == S_UPLOAD && up_i < (UPW+1)'(UP_WORDS)) begin
      lm_en   = 1'b1;
      lm_addr = AW'(UCODE_BASE) + AW'(up_slot) * AW'(UP_WORDS) + AW'(up_i);
    end
  end
  assign cs_we    = up_wr;
  assign cs_waddr = (CS_AW+2)'(up_slot) * (CS_AW+2)'(UP_WORDS) + (CS_AW+2)'(up_wi);
  assign cs_wdata = lm_rdata;
  assign set_res  = (st == S_UPLOAD) && up_i == (UPW+1)'(UP_WORDS) && up_wr;
  assign set_slot = up_slot;
  assign ev_upload = set_res;

  assign mp_start     = (st == S_CHECK) && resident[0] && resident[cur.code];
  assign mp_cmd.entry = '0;
  assign mp_cmd.start = CS_AW'(cur.code) * CS_AW'(SLOT_UI);
  assign mp_cmd.addr  = cur.addr;
  assign mp_cmd.n     = cur.n;
  assign mp_cmd.data  = cur.data;

  assign core_resp_valid = (st == S_RESP);
  assign core_resp.status = rstat;
  assign core_resp.n      = rcnt;
  assign core_resp.data   = rbuf;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= S_IDLE; cur <= '0; up_slot <= '0; up_i <= '0; up_wr <= 1'b0; up_wi <= '0;
      pi <= '0; pc_cap <= '0; p_cap <= 1'b0; r_early <= 1'b0; rcnt <= '0; rbuf <= '0; rstat <= '0;
    end else begin
      up_wr <= 1'b0;
      p_cap <= 1'b0;
      unique case (st)
        S_IDLE: if (!q_empty) begin
          cur  <= q_head;
          rcnt <= '0;
          rbuf <= '0;
          pi   <= '0;
          pc_cap <= '0;
          r_early <= 1'b0;
          st   <= (q_head.kind == CMD_SHARED) ? S_CHECK : S_PRIV;
        end
        S_PRIV: begin
          if (pi < {1'b0, cur.n}) begin
            pi    <= pi + 1'b1;
            p_cap <= cur.kind == CMD_PRIV_RD;
          end
          if (p_cap) begin
            rbuf[pc_cap[NB_W-2:0]] <= lm_rdata;
            pc_cap <= pc_cap + 1'b1;
            rcnt   <= rcnt + 1'b1;
          end
          if (pi == {1'b0, cur.n} && !p_cap) begin
            rstat <= END_DONE;
            st    <= S_RESP;
          end
        end
        S_CHECK: begin
          if (!resident[0] || !resident[cur.code]) begin
            up_slot <= !resident[0] ? '0 : cur.code;
            up_i    <= '0;
            st      <= S_UPLOAD;
          end else begin
            st <= S_RUN;
          end
        end
        S_UPLOAD: begin
          if (up_i < (UPW+1)'(UP_WORDS)) begin
            up_i  <= up_i + 1'b1;
            up_wr <= 1'b1;
            up_wi <= up_i[UPW-1:0];
          end else if (up_wr) begin
            st <= S_CHECK;
          end
        end
        S_RUN: begin
          if (mp_out_valid) begin
            rbuf[rcnt[NB_W-2:0]] <= mp_out_data;
            rcnt <= rcnt + 1'b1;
          end
          // a reply may come back before the microprogram has ended
          if (remote_valid) begin
            rbuf    <= remote_resp.data;
            rcnt    <= remote_resp.n;
            rstat   <= remote_resp.status;
            r_early <= 1'b1;
          end
          if (mp_done) begin
            if (!(mp_end_code == END_REMOTE && (r_early || remote_valid))) rstat <= mp_end_code;
            unique case (mp_end_code)
              END_RETRY:  st <= S_IDLE;
              END_REMOTE: st <= (r_early || remote_valid) ? S_RESP : S_REMOTE;
              default:    st <= S_RESP;
            endcase
          end
        end
        S_REMOTE: if (remote_valid) begin
          rbuf  <= remote_resp.data;
          rcnt  <= remote_resp.n;
          rstat <= remote_resp.status;
          st    <= S_RESP;
        end
        S_RESP: st <= S_IDLE;
        default: st <= S_IDLE;
      endcase
    end
  end
endmodule

// nicu: Network Interface Control Unit of the DMC.
//
// It is the DMC's interface to the network. Messages arriving from the
// router are of two kinds:
//   * request (REQ): a command from a remote node, already translated to a
//     physical address. It enters the command queue. The unit takes the
//     oldest one, makes sure the remote-entry microcode (slot 1) and the
//     target microcode are in the Control Store (uploading through port B if
//     not), and starts mini-processor B at slot 1. End code 1 sends a reply
//     (RESP) with the words the microcode produced back to the requesting
//     node; end code 2 (lock not acquired) puts the request back at the tail
//     of the queue, so the lock is polled locally.
//   * reply (RESP): the answer to a request that mini-processor A of this
//     node sent. It is forwarded at once to the core interface.
// Outgoing, it sends the requests that mini-processor A (or B) issue with
// the mp micro-operation, and the replies of B, alternating between the two
// when both wait.
//
// The request queue holds QDEPTH messages (16 by default; the mesh top sets
// one place per node): each node has at most one request outstanding, so a
// lock release always finds a place behind requests that keep polling the
// lock, and the network never has to hold back a request.
// The four functions follow the document. The message format (one message =
// one network flit), the reply for every request (also for writes), the
// queue depth and the output alternation are this design's choices.
// A reply for the core interface is passed on in the cycle it arrives:
// remote_valid / remote_resp are wired from the network input, not stored.
module nicu
  import dmc_pkg::*;
#(
  parameter int unsigned AW     = 14,
  parameter int unsigned QDEPTH = 16
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic [NODE_W-1:0]     node,
  // network
  input  logic                  net_in_valid,
  input  msg_t                  net_in,
  output logic                  net_in_ready,
  output logic                  net_out_valid,
  output msg_t                  net_out,
  input  logic                  net_out_ready,
  // local memory port B (when mini-processor B is idle)
  output logic                  lm_en,
  output logic                  lm_we,
  output logic [AW-1:0]         lm_addr,
  output logic [DW-1:0]         lm_wdata,
  input  logic [DW-1:0]         lm_rdata,
  // control store port B, upload
  output logic                  cs_we,
  output logic [CS_AW+1:0]      cs_waddr,
  output logic [DW-1:0]         cs_wdata,
  input  logic [NSLOT-1:0]      resident,
  output logic                  set_res,
  output logic [SLOT_W-1:0]     set_slot,
  // mini-processor B
  output logic                  mp_start,
  output mp_cmd_t               mp_cmd,
  input  logic                  mp_done,
  input  logic [3:0]            mp_end_code,
  input  logic                  mp_out_valid,
  input  logic [DW-1:0]         mp_out_data,
  input  logic                  mpb_msg_valid,
  input  msg_t                  mpb_msg,
  // requests issued by mini-processor A
  input  logic                  mpa_msg_valid,
  input  msg_t                  mpa_msg,
  // replies for the core interface
  output logic                  remote_valid,
  output core_resp_t            remote_resp,
  // events
  output logic                  ev_requeue,
  output logic                  ev_upload
);
  typedef enum logic [2:0] { S_IDLE, S_CHECK, S_UPLOAD, S_RUN, S_SEND } state_e;
  localparam int unsigned UP_WORDS = SLOT_UI * UI_WORDS;
  localparam int unsigned UPW      = $clog2(UP_WORDS);
  localparam logic [SLOT_W-1:0] SLOT_REMOTE = SLOT_W'(1);

  state_e            st;
  msg_t              cur, q_head, q_wdata;
  logic              q_empty, q_pop, q_push;
  logic [$clog2(QDEPTH):0] q_count;
  logic [SLOT_W-1:0] up_slot, tslot;
  logic [UPW:0]      up_i;
  logic              up_wr;
  logic [UPW-1:0]    up_wi;
  logic [NB_W-1:0]   rcnt;
  burst_t            rbuf;
  // output holding registers: 0 = requests of A (and B), 1 = replies of B
  logic              ha_v, hb_v, prio_b;
  msg_t              ha, hb;
  logic              send_b;

  assign tslot = cur.start[CS_AW-1 -: SLOT_W];

  // ---------------- input ----------------
  logic in_resp, in_req;
  assign in_resp      = net_in_valid && net_in.mtype == MSG_RESP;
  assign in_req       = net_in_valid && net_in.mtype == MSG_REQ;
  assign ev_requeue   = (st == S_RUN) && mp_done && mp_end_code == END_RETRY;
  // A request is taken only while a place stays free for the request in
  // service, so a requeue never meets a full queue.
  assign net_in_ready = (net_in.mtype == MSG_RESP) ||
                        (!ev_requeue && (32'(q_count) + 32'(st != S_IDLE) < QDEPTH));
  assign q_push       = ev_requeue || (in_req && net_in_ready);
  assign q_wdata      = ev_requeue ? cur : net_in;
  assign q_pop        = (st == S_IDLE) && !q_empty;

  assign remote_valid       = in_resp;
  assign remote_resp.status = net_in.status;
  assign remote_resp.n      = net_in.n;
  assign remote_resp.data   = net_in.data;

  sync_fifo #(.T(msg_t), .DEPTH(QDEPTH)) u_q (
    .clk, .rst_n, .push(q_push), .wr_data(q_wdata), .pop(q_pop),
    .rd_data(q_head), .empty(q_empty), .count(q_count)
  );

  // ---------------- upload / processor ----------------
  always_comb begin
    lm_en = 1'b0; lm_we = 1'b0; lm_addr = '0; lm_wdata = '0;
    if (st == S_UPLOAD && up_i < (UPW+1)'(UP_WORDS)) begin
      lm_en   = 1'b1;
      lm_addr = AW'(UCODE_BASE) + AW'(up_slot) * AW'(UP_WORDS) + AW'(up_i);
    end
  end
  assign cs_we     = up_wr;
  assign cs_waddr  = (CS_AW+2)'(up_slot) * (CS_AW+2)'(UP_WORDS) + (CS_AW+2)'(up_wi);
  assign cs_wdata  = lm_rdata;
  assign set_res   = (st == S_UPLOAD) && up_i == (UPW+1)'(UP_WORDS) && up_wr;
  assign set_slot  = up_slot;
  assign ev_upload = set_res;

  assign mp_start     = (st == S_CHECK) && resident[SLOT_REMOTE] && resident[tslot];
  assign mp_cmd.entry = CS_AW'(SLOT_REMOTE) * CS_AW'(SLOT_UI);
  assign mp_cmd.start = cur.start;
  assign mp_cmd.addr  = cur.addr;
  assign mp_cmd.n     = cur.n;
  assign mp_cmd.data  = cur.data;

  // ---------------- output ----------------
  assign send_b        = hb_v && (!ha_v || prio_b);
  assign net_out_valid = ha_v || hb_v;
  assign net_out       = send_b ? hb : ha;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= S_IDLE; cur <= '0; up_slot <= '0; up_i <= '0; up_wr <= 1'b0; up_wi <= '0;
      rcnt <= '0; rbuf <= '0; ha_v <= 1'b0; hb_v <= 1'b0; ha <= '0; hb <= '0; prio_b <= 1'b0;
    end else begin
      assert (!(mpa_msg_valid && ha_v))
        else $error("nicu: request of mini-processor A while one is still waiting");
      up_wr <= 1'b0;
      // output holding registers
      if (net_out_valid && net_out_ready) begin
        if (send_b) hb_v <= 1'b0; else ha_v <= 1'b0;
        prio_b <= !send_b;
      end
      if (mpa_msg_valid) begin
        ha_v <= 1'b1;
        ha   <= mpa_msg;
      end else if (mpb_msg_valid) begin
        ha_v <= 1'b1;
        ha   <= mpb_msg;
      end

      unique case (st)
        S_IDLE: if (!q_empty) begin
          cur  <= q_head;
          rcnt <= '0;
          rbuf <= '0;
          st   <= S_CHECK;
        end
        S_CHECK: begin
          if (!resident[SLOT_REMOTE] || !resident[tslot]) begin
            up_slot <= !resident[SLOT_REMOTE] ? SLOT_REMOTE : tslot;
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
          if (mp_done) begin
            if (mp_end_code == END_RETRY) begin
              st <= S_IDLE;
            end else begin
              hb_v      <= 1'b1;
              hb.mtype  <= MSG_RESP;
              hb.src    <= node;
              hb.dst    <= cur.src;
              hb.qos    <= cur.qos;
              hb.start  <= cur.start;
              hb.addr   <= cur.addr;
              hb.n      <= mp_out_valid ? rcnt + 1'b1 : rcnt;
              hb.status <= END_DONE;
              hb.data   <= rbuf;
              if (mp_out_valid) hb.data[rcnt[NB_W-2:0]] <= mp_out_data;
              st        <= S_SEND;
            end
          end
        end
        S_SEND: if (!hb_v) st <= S_IDLE;
        default: st <= S_IDLE;
      endcase
    end
  end

endmodule

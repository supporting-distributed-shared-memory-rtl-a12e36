// tb_dmc: one Dual Microcoded Controller with its Local Memory; the network
// side is played by the testbench.
//
// The microprogram and a two-entry V2P table (logical page 0 -> frame 32 of
// this node, page 1 -> frame 33 of node 9) are written with private stores.
// Checked:
//   - local shared burst store/load: data reaches the physical word the
//     table names and comes back to the core;
//   - remote shared store/load: the request leaves with the right target
//     node, physical address, words and target microcode, and the core gets
//     its answer only after the testbench's reply arrives;
//   - a request from the network runs on mini-processor B and is answered
//     to the requesting node (store, then load of the stored words);
//   - a lock taken by a remote node makes the local test-and-set retry in
//     the core interface until the remote node releases it;
//   - microcode upload happens in both interface units.
module tb_dmc;
  import dmc_pkg::*;
  import dmc_ucode_pkg::*;
  localparam int AW = 14;
  localparam logic [31:0] BADDR = 32'h8000_0000;
  localparam int V2P = 'h800;
  localparam int ME = 6, FAR = 9, PEER = 3;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  dmc_cfg_t cfg;
  logic core_cmd_valid, core_cmd_ready, core_resp_valid;
  core_cmd_t core_cmd; core_resp_t core_resp;
  logic net_in_valid, net_in_ready, net_out_valid, net_out_ready;
  msg_t net_in, net_out;
  logic lma_en, lma_we, lmb_en, lmb_we;
  logic [AW-1:0] lma_addr, lmb_addr;
  logic [31:0] lma_wdata, lma_rdata, lmb_wdata, lmb_rdata;
  logic [1:0] ev_upload, ev_requeue;
  logic ev_collision;

  dmc #(.AW(AW)) dut (.*);
  dp_ram #(.AW(AW)) u_lm (.clk,
    .a_en(lma_en), .a_we(lma_we), .a_addr(lma_addr), .a_wdata(lma_wdata), .a_rdata(lma_rdata),
    .b_en(lmb_en), .b_we(lmb_we), .b_addr(lmb_addr), .b_wdata(lmb_wdata), .b_rdata(lmb_rdata));

  int checks = 0, failures = 0, n_up_c = 0, n_up_n = 0, n_rq_c = 0;
  msg_t outq [$];
  bit resp_seen;

  always @(posedge clk) if (rst_n) begin
    if (net_out_valid && net_out_ready) outq.push_back(net_out);
    n_up_c += int'(ev_upload[0]); n_up_n += int'(ev_upload[1]); n_rq_c += int'(ev_requeue[0]);
    if (core_resp_valid) resp_seen = 1;
  end

  task automatic chk(input bit ok, input string s);
    checks++; if (!ok) begin failures++; $display("FAIL %s", s); end
  endtask

  task automatic put_cmd(input core_cmd_t c);
    @(posedge clk); #1 core_cmd = c; core_cmd_valid = 1;
    @(negedge clk); while (!core_cmd_ready) @(negedge clk);
    @(posedge clk); #1 core_cmd_valid = 0; resp_seen = 0;
  endtask
  task automatic get_resp(output core_resp_t r);
    @(negedge clk); while (!core_resp_valid) @(negedge clk);
    r = core_resp;
  endtask
  task automatic issue(input core_cmd_t c, output core_resp_t r);
    put_cmd(c); get_resp(r);
  endtask
  task automatic send(input msg_t m);
    @(posedge clk); #1 net_in = m; net_in_valid = 1;
    @(negedge clk); while (!net_in_ready) @(negedge clk);
    @(posedge clk); #1 net_in_valid = 0;
  endtask
  task automatic wait_out(input int k);
    int t = 0;
    while (outq.size() < k && t < 2000) begin @(negedge clk); t++; end
  endtask

  function automatic logic [31:0] laddr(int page, int word);
    return BADDR + 32'(page * 1024 + word * 4);
  endfunction
  function automatic int pword(int frame, int word);
    return frame * 256 + word;
  endfunction

  initial begin
    core_cmd_t c; core_resp_t r; msg_t m; burst_t d; int k, nmsg;
    cfg.node = 8'(ME); cfg.baddr = BADDR; cfg.v2p = 32'(V2P);
    core_cmd_valid = 0; core_cmd = '0; net_in_valid = 0; net_in = '0; net_out_ready = 1;
    repeat (3) @(negedge clk); rst_n = 1;

    // microprogram and V2P table by private stores
    for (int s = 0; s < NUSED; s++) begin
      k = 0; d = '0;
      for (int w = 0; w < slot_len(s) * 4; w++) begin
        d[k] = ucode_word(s, w); k++;
        if (k == 8 || w == slot_len(s) * 4 - 1) begin
          c = '0; c.kind = CMD_PRIV_WR; c.addr = 32'((int'(UCODE_BASE) + s * 128 + w - k + 1) * 4);
          c.n = NB_W'(k); c.data = d;
          issue(c, r);
          k = 0; d = '0;
        end
      end
    end
    c = '0; c.kind = CMD_PRIV_WR; c.addr = 32'(V2P * 4); c.n = 8;
    c.data[0] = 32; c.data[3] = ME; c.data[4] = 33; c.data[7] = FAR;
    issue(c, r);
    chk(u_lm.mem[V2P + 4] == 33 && u_lm.mem[V2P + 7] == FAR, "private store");
    c = '0; c.kind = CMD_PRIV_WR; c.addr = 32'(pword(32, 100) * 4); c.n = 1;   // the lock starts free
    issue(c, r);

    // local burst store and load
    c = '0; c.kind = CMD_SHARED; c.code = C_BSTORE; c.addr = laddr(0, 10); c.n = 5;
    for (int i = 0; i < 5; i++) c.data[i] = $urandom;
    d = c.data;
    issue(c, r);
    chk(r.status == END_DONE, "local store status");
    k = 0;
    for (int i = 0; i < 5; i++) if (u_lm.mem[pword(32, 10 + i)] != d[i]) k++;
    chk(k == 0, "local store reached the mapped frame");
    c.code = C_BLOAD; c.data = '0;
    issue(c, r);
    chk(r.status == END_DONE && r.n == 5 && r.data[4:0] == d[4:0], "local load data");
    chk(outq.size() == 0, "local accesses stay off the network");

    // remote store: request out, reply by the testbench
    c = '0; c.kind = CMD_SHARED; c.code = C_BSTORE; c.addr = laddr(1, 3); c.n = 3;
    for (int i = 0; i < 3; i++) c.data[i] = $urandom;
    d = c.data;
    put_cmd(c);
    wait_out(1);
    chk(outq.size() == 1 && outq[0].mtype == MSG_REQ && outq[0].dst == FAR && outq[0].src == ME &&
        outq[0].addr == 32'(pword(33, 3) * 4) && outq[0].n == 3 && outq[0].data[2:0] == d[2:0] &&
        outq[0].start == 10'(C_BSTORE * SLOT_UI), "remote store request");
    repeat (20) @(negedge clk);
    chk(!resp_seen, "core waits for the reply");
    m = '0; m.mtype = MSG_RESP; m.src = FAR; m.dst = ME; m.status = END_DONE;
    send(m);
    get_resp(r);
    chk(r.status == END_DONE, "remote store status");

    // remote load
    c.code = C_BLOAD; c.data = '0;
    put_cmd(c);
    wait_out(2);
    chk(outq.size() == 2 && outq[1].start == 10'(C_BLOAD * SLOT_UI) && outq[1].dst == FAR, "remote load request");
    m = '0; m.mtype = MSG_RESP; m.src = FAR; m.dst = ME; m.status = END_DONE; m.n = 3; m.data = d;
    send(m);
    get_resp(r);
    chk(r.status == END_DONE && r.n == 3 && r.data[2:0] == d[2:0], "remote load data");

    // request from node PEER: store then load in this node's frame 32
    nmsg = outq.size();
    m = '0; m.mtype = MSG_REQ; m.src = PEER; m.dst = ME; m.start = 10'(C_BSTORE * SLOT_UI);
    m.addr = 32'(pword(32, 50) * 4); m.n = 4;
    for (int i = 0; i < 4; i++) m.data[i] = $urandom;
    d = m.data;
    send(m);
    wait_out(nmsg + 1);
    chk(outq.size() == nmsg + 1 && outq[nmsg].mtype == MSG_RESP && outq[nmsg].dst == PEER &&
        outq[nmsg].status == END_DONE, "reply to remote store");
    k = 0;
    for (int i = 0; i < 4; i++) if (u_lm.mem[pword(32, 50 + i)] != d[i]) k++;
    chk(k == 0, "remote store written");
    m.start = 10'(C_BLOAD * SLOT_UI); m.data = '0;
    send(m);
    wait_out(nmsg + 2);
    chk(outq.size() == nmsg + 2 && outq[nmsg + 1].n == 4 && outq[nmsg + 1].data[3:0] == d[3:0],
        "reply to remote load");

    // lock: PEER takes it, the local core must retry until PEER releases
    nmsg = outq.size();
    m = '0; m.mtype = MSG_REQ; m.src = PEER; m.dst = ME; m.start = 10'(C_TAS * SLOT_UI);
    m.addr = 32'(pword(32, 100) * 4); m.n = 1;
    send(m);
    wait_out(nmsg + 1);
    chk(outq[nmsg].status == END_DONE && u_lm.mem[pword(32, 100)] == 1, "remote acquire");
    c = '0; c.kind = CMD_SHARED; c.code = C_TAS; c.addr = laddr(0, 100); c.n = 1;
    put_cmd(c);
    repeat (150) @(negedge clk);
    chk(!resp_seen && n_rq_c > 2, "local acquire retries while held");
    m.start = 10'(C_REL * SLOT_UI);
    send(m);
    get_resp(r);
    chk(r.status == END_DONE && u_lm.mem[pword(32, 100)] == 1, "local acquire after release");
    chk(n_up_c > 0 && n_up_n > 0, "microcode uploaded by both interface units");
    $display("events: upload core=%0d net=%0d retry core=%0d", n_up_c, n_up_n, n_rq_c);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

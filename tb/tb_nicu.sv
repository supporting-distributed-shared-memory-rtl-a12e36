// tb_nicu: the network interface unit with a Local Memory and a scripted
// stand-in for mini-processor B.
//
// Checked: a request from the network uploads the remote-entry slot and the
// target slot (each Control Store write compared with Local Memory), starts
// the processor at the remote entry with the message's operands, and sends a
// reply with the produced words back to the requesting node; a request whose
// lock is busy (end code 2) is requeued and run again before one reply is
// sent; a reply from the network is passed to the core interface at once;
// a request from mini-processor A is sent out unchanged, also while the
// network stalls.
module tb_nicu;
  import dmc_pkg::*;
  localparam int AW = 14;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic net_in_valid, net_in_ready, net_out_valid, net_out_ready;
  msg_t net_in, net_out;
  logic lm_en, lm_we; logic [AW-1:0] lm_addr; logic [31:0] lm_wdata, lm_rdata;
  logic cs_we; logic [CS_AW+1:0] cs_waddr; logic [31:0] cs_wdata;
  logic [NSLOT-1:0] resident; logic set_res; logic [SLOT_W-1:0] set_slot;
  logic mp_start, mp_done, mp_out_valid; mp_cmd_t mp_cmd; logic [3:0] mp_end_code; logic [31:0] mp_out_data;
  logic mpb_msg_valid, mpa_msg_valid; msg_t mpb_msg, mpa_msg;
  logic remote_valid; core_resp_t remote_resp;
  logic ev_requeue, ev_upload;
  logic tb_en, tb_we; logic [AW-1:0] tb_addr; logic [31:0] tb_wdata, tb_rdata;

  nicu #(.AW(AW)) dut (.clk, .rst_n, .node(8'd6), .*);
  dp_ram #(.AW(AW)) u_lm (.clk, .a_en(tb_en), .a_we(tb_we), .a_addr(tb_addr), .a_wdata(tb_wdata), .a_rdata(tb_rdata),
    .b_en(lm_en), .b_we(lm_we), .b_addr(lm_addr), .b_wdata(lm_wdata), .b_rdata(lm_rdata));

  int checks = 0, failures = 0, n_csw = 0, n_csbad = 0, n_start = 0, n_rq = 0, n_up = 0, n_rem = 0;
  mp_cmd_t started [$];
  msg_t outq [$];
  core_resp_t remq [$];
  logic [3:0] script_code [$];
  int script_words [$];

  task automatic chk(input bit ok, input string s);
    checks++; if (!ok) begin failures++; $display("FAIL %s", s); end
  endtask
  function automatic logic [31:0] lm_pat(int a);
    return 32'hBEEF_0000 ^ 32'(a * 5);
  endfunction

  always @(posedge clk) begin
    if (!rst_n) resident <= '0;
    else if (set_res) resident[set_slot] <= 1'b1;
    if (rst_n && cs_we) begin
      n_csw++;
      if (cs_wdata != lm_pat(int'(UCODE_BASE) + int'(cs_waddr))) n_csbad++;
    end
    if (rst_n) begin
      if (net_out_valid && net_out_ready) outq.push_back(net_out);
      if (remote_valid) remq.push_back(remote_resp);
      n_rq += int'(ev_requeue); n_up += int'(ev_upload);
    end
  end

  initial begin
    mp_done = 0; mp_out_valid = 0; mp_out_data = 0; mp_end_code = 0;
    forever begin
      @(posedge clk);
      if (mp_start) begin
        int nw; logic [3:0] c;
        started.push_back(mp_cmd); n_start++;
        nw = script_words.pop_front(); c = script_code.pop_front();
        repeat (3) @(posedge clk);
        for (int i = 0; i < nw; i++) begin
          #1 mp_out_valid = 1; mp_out_data = 32'hE000 + 32'(i);
          @(posedge clk);
        end
        #1 mp_out_valid = 0; mp_done = 1; mp_end_code = c;
        @(posedge clk); #1 mp_done = 0;
      end
    end
  end

  task automatic send(input msg_t m);
    @(posedge clk); #1 net_in = m; net_in_valid = 1;
    @(negedge clk); while (!net_in_ready) @(negedge clk);
    @(posedge clk); #1 net_in_valid = 0;
  endtask

  initial begin
    msg_t m;
    net_in_valid = 0; net_in = '0; net_out_ready = 1; mpb_msg_valid = 0; mpb_msg = '0;
    mpa_msg_valid = 0; mpa_msg = '0;
    tb_en = 0; tb_we = 0; tb_addr = 0; tb_wdata = 0;
    repeat (2) @(negedge clk); rst_n = 1;
    for (int a = int'(UCODE_BASE); a < int'(UCODE_BASE) + 8 * 128; a++) begin
      @(negedge clk); tb_en = 1; tb_we = 1; tb_addr = AW'(a); tb_wdata = lm_pat(a);
    end
    @(negedge clk); tb_en = 0; tb_we = 0;
    // 1. remote burst load request from node 5
    script_words.push_back(3); script_code.push_back(END_DONE);
    m = '0; m.mtype = MSG_REQ; m.src = 5; m.dst = 6; m.start = 10'(2 * SLOT_UI); m.addr = 32'hA040; m.n = 3;
    send(m);
    while (outq.size() < 1) @(negedge clk);
    chk(n_up == 2 && resident[1] && resident[2], "remote entry and target slot uploaded");
    chk(n_csw == 256 && n_csbad == 0, "upload copies Local Memory");
    chk(started.size() == 1 && started[0].entry == 10'(SLOT_UI) && started[0].start == 10'(2 * SLOT_UI) &&
        started[0].addr == 32'hA040 && started[0].n == 3, "processor B command");
    chk(outq[0].mtype == MSG_RESP && outq[0].dst == 5 && outq[0].src == 6 && outq[0].n == 3 &&
        outq[0].data[0] == 32'hE000 && outq[0].data[2] == 32'hE002 && outq[0].status == END_DONE, "reply message");
    // 2. lock busy twice, then acquired: one reply
    script_words.push_back(0); script_code.push_back(END_RETRY);
    script_words.push_back(0); script_code.push_back(END_RETRY);
    script_words.push_back(0); script_code.push_back(END_DONE);
    m.src = 9; m.start = 10'(2 * SLOT_UI); m.n = 1;
    send(m);
    while (outq.size() < 2) @(negedge clk);
    chk(n_rq == 2 && n_start == 4 && outq[1].dst == 9, "requeued twice, then one reply");
    // 3. reply from the network goes to the core interface
    m = '0; m.mtype = MSG_RESP; m.src = 2; m.dst = 6; m.n = 2; m.data[1] = 32'h1234; m.status = END_DONE;
    send(m);
    repeat (2) @(negedge clk);
    chk(remq.size() == 1 && remq[0].n == 2 && remq[0].data[1] == 32'h1234, "reply forwarded");
    // 4. request of mini-processor A while the network stalls
    net_out_ready = 0;
    @(posedge clk); #1 mpa_msg = '0; mpa_msg.mtype = MSG_REQ; mpa_msg.src = 6; mpa_msg.dst = 12;
    mpa_msg.addr = 32'h5555; mpa_msg_valid = 1;
    @(posedge clk); #1 mpa_msg_valid = 0;
    repeat (5) @(negedge clk);
    chk(net_out_valid && net_out.dst == 12, "request held while stalled");
    net_out_ready = 1;
    repeat (3) @(negedge clk);
    chk(outq.size() == 3 && outq[2].dst == 12 && outq[2].addr == 32'h5555 && outq[2].mtype == MSG_REQ,
        "request of A sent");
    chk(!net_out_valid, "nothing else sent");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

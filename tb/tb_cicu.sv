// tb_cicu: the core interface unit with a Local Memory and a scripted
// stand-in for mini-processor A.
//
// Checked: private writes and reads go straight to memory; a shared command
// whose microcode is not resident uploads slot 0 and then its own slot (every
// Control Store write compared with the Local Memory word it copies) and
// starts the processor with the right entry, target address and operands;
// end code 1 returns the words the processor produced; end code 2 puts the
// command back in the queue and runs it again; end code 3 waits for the
// remote reply and returns it; several queued commands are served in order.
module tb_cicu;
  import dmc_pkg::*;
  localparam int AW = 14;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic core_cmd_valid, core_cmd_ready, core_resp_valid;
  core_cmd_t core_cmd; core_resp_t core_resp;
  logic lm_en, lm_we; logic [AW-1:0] lm_addr; logic [31:0] lm_wdata, lm_rdata;
  logic cs_we; logic [CS_AW+1:0] cs_waddr; logic [31:0] cs_wdata;
  logic [NSLOT-1:0] resident; logic set_res; logic [SLOT_W-1:0] set_slot;
  logic mp_start, mp_done, mp_out_valid; mp_cmd_t mp_cmd; logic [3:0] mp_end_code; logic [31:0] mp_out_data;
  logic remote_valid; core_resp_t remote_resp;
  logic ev_requeue, ev_upload;
  logic tb_en, tb_we; logic [AW-1:0] tb_addr; logic [31:0] tb_wdata, tb_rdata;

  cicu #(.AW(AW)) dut (.clk, .rst_n, .*);
  dp_ram #(.AW(AW)) u_lm (.clk, .a_en(lm_en), .a_we(lm_we), .a_addr(lm_addr), .a_wdata(lm_wdata), .a_rdata(lm_rdata),
    .b_en(tb_en), .b_we(tb_we), .b_addr(tb_addr), .b_wdata(tb_wdata), .b_rdata(tb_rdata));

  int checks = 0, failures = 0, n_csw = 0, n_csbad = 0, n_start = 0, n_rq = 0, n_up = 0;
  mp_cmd_t started [$];
  logic [3:0] script_code [$];
  int script_words [$];

  task automatic chk(input bit ok, input string s);
    checks++; if (!ok) begin failures++; $display("FAIL %s", s); end
  endtask

  function automatic logic [31:0] lm_pat(int a);
    return 32'hC0DE_0000 ^ 32'(a * 7);
  endfunction

  // resident bits and Control Store write check
  always @(posedge clk) begin
    if (!rst_n) resident <= '0;
    else if (set_res) resident[set_slot] <= 1'b1;
    if (rst_n) begin
      if (cs_we) begin
        n_csw++;
        if (cs_wdata != lm_pat(int'(UCODE_BASE) + int'(cs_waddr))) n_csbad++;
      end
      n_rq += int'(ev_requeue); n_up += int'(ev_upload);
    end
  end

  // stand-in processor: after a few cycles, emits the scripted words and end code
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
          #1 mp_out_valid = 1; mp_out_data = 32'hD000 + 32'(i);
          @(posedge clk);
        end
        #1 mp_out_valid = 0; mp_done = 1; mp_end_code = c;
        @(posedge clk); #1 mp_done = 0;
      end
    end
  end

  task automatic issue(input core_cmd_t c, output core_resp_t r);
    @(posedge clk); #1 core_cmd = c; core_cmd_valid = 1;
    @(negedge clk); while (!core_cmd_ready) @(negedge clk);
    @(posedge clk); #1 core_cmd_valid = 0;
    @(negedge clk); while (!core_resp_valid) @(negedge clk);
    r = core_resp;
  endtask

  initial begin
    core_cmd_t c; core_resp_t r;
    core_cmd_valid = 0; core_cmd = '0; remote_valid = 0; remote_resp = '0;
    tb_en = 0; tb_we = 0; tb_addr = 0; tb_wdata = 0;
    repeat (2) @(negedge clk); rst_n = 1;
    // microprogram area pattern, slots 0 and 6
    for (int a = int'(UCODE_BASE); a < int'(UCODE_BASE) + 8 * 128; a++) begin
      @(negedge clk); tb_en = 1; tb_we = 1; tb_addr = AW'(a); tb_wdata = lm_pat(a);
    end
    @(negedge clk); tb_en = 0; tb_we = 0;
    // 1. private write and read
    c = '0; c.kind = CMD_PRIV_WR; c.addr = 32'h400; c.n = 4;
    for (int i = 0; i < 4; i++) c.data[i] = 32'hA0 + 32'(i);
    issue(c, r); chk(r.status == END_DONE, "private write status");
    c.kind = CMD_PRIV_RD; c.data = '0; c.n = 4;
    issue(c, r);
    chk(r.n == 4 && r.data[0] == 32'hA0 && r.data[3] == 32'hA3, "private read data");
    // 2. shared command, nothing resident: two uploads, then run
    script_words.push_back(2); script_code.push_back(END_DONE);
    c = '0; c.kind = CMD_SHARED; c.code = 5'd6; c.addr = 32'h8000_0010; c.n = 2; c.data[0] = 32'h55;
    issue(c, r);
    chk(n_up == 2 && resident[0] && resident[6], "two slots uploaded");
    chk(n_csw == 256 && n_csbad == 0, $sformatf("upload copies Local Memory (%0d writes, %0d wrong)", n_csw, n_csbad));
    chk(started.size() == 1, "processor started once");
    if (started.size() == 1)
      chk(started[0].entry == 0 && started[0].start == 10'(6 * SLOT_UI) && started[0].addr == 32'h8000_0010 &&
          started[0].n == 2 && started[0].data[0] == 32'h55, "processor command");
    chk(r.status == END_DONE && r.n == 2 && r.data[0] == 32'hD000 && r.data[1] == 32'hD001, "shared result");
    // 3. lock busy once: requeue, then success; no new upload
    script_words.push_back(0); script_code.push_back(END_RETRY);
    script_words.push_back(1); script_code.push_back(END_DONE);
    issue(c, r);
    chk(n_rq == 1 && n_start == 3 && n_up == 2, "requeued and run again without upload");
    chk(r.status == END_DONE && r.n == 1, "result after retry");
    // 4. remote access: wait for the reply
    script_words.push_back(0); script_code.push_back(END_REMOTE);
    fork
      issue(c, r);
      begin
        while (n_start < 4) @(negedge clk);
        repeat (15) @(negedge clk);
        chk(!core_resp_valid, "no response before the remote reply");
        remote_resp = '0; remote_resp.status = END_DONE; remote_resp.n = 3;
        remote_resp.data[2] = 32'hFEED; remote_valid = 1;
        @(negedge clk); remote_valid = 0;
      end
    join
    chk(r.status == END_DONE && r.n == 3 && r.data[2] == 32'hFEED, "remote reply returned");
    // 5. queued private writes then read back
    for (int k = 0; k < 3; k++) begin
      @(posedge clk); #1 core_cmd = '0; core_cmd.kind = CMD_PRIV_WR; core_cmd.addr = 32'(32'h800 + 4 * k);
      core_cmd.n = 1; core_cmd.data[0] = 32'h77 + 32'(k); core_cmd_valid = 1;
      @(negedge clk); while (!core_cmd_ready) @(negedge clk);
    end
    @(posedge clk); #1 core_cmd_valid = 0;
    repeat (30) @(negedge clk);
    c = '0; c.kind = CMD_PRIV_RD; c.addr = 32'h800; c.n = 3;
    issue(c, r);
    chk(r.data[0] == 32'h77 && r.data[1] == 32'h78 && r.data[2] == 32'h79, "queued commands served in order");
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

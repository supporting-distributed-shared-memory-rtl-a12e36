// tb_mini_processor: one mini-processor with its Control Store, Register File,
// Local Memory and Synchronization Supporter, running the real microprogram.
//
// The microcode is written into the Control Store and the V2P table and data
// into the Local Memory through their second ports. Node 3 owns logical page
// 0 (frame 40); page 1 belongs to node 9 (frame 41). Checked, each against a
// reference computed here: single and burst loads and stores of local shared
// data, the request message of a remote access, test-and-set on a free and
// on a taken lock, an sc that loses its reservation to a write of the other
// port, and the remote-entry path. The cycle count from start to done is
// checked for every command: pipeline fill (2) + issued microinstructions +
// 2 cycles from ID to WB of the end micro-operation.
module tb_mini_processor;
  import dmc_pkg::*;
  import dmc_ucode_pkg::*;
  localparam int AW = 14;
  localparam logic [31:0] BADDR = 32'h8000_0000;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  dmc_cfg_t cfg;
  logic start, busy, done;
  mp_cmd_t cmd;
  logic [3:0] end_code;
  logic cs_ren; logic [CS_AW-1:0] cs_raddr; uinstr_t cs_rdata, cs_bq;
  logic [7:0][31:0] regs; logic [2:0] rf_we; logic [2:0][2:0] rf_waddr; logic [2:0][31:0] rf_wdata;
  logic lm_en, lm_we; logic [AW-1:0] lm_addr; logic [31:0] lm_wdata, lm_rdata;
  logic ss_valid, ss_ll, ss_sc, ss_wr, ss_wr_ok;
  logic out_valid; logic [31:0] out_data;
  logic msg_valid; msg_t msg;
  // tb side ports
  logic cs_we; logic [CS_AW+1:0] cs_waddr; logic [31:0] cs_wdata;
  logic tb_en, tb_we; logic [AW-1:0] tb_addr; logic [31:0] tb_wdata, tb_rdata;
  logic tb_ss;
  logic okb_unused, coll_unused;
  logic [NSLOT-1:0] res_unused;

  mini_processor #(.AW(AW)) dut (.*);
  control_store u_cs (
    .clk, .rst_n, .a_ren(cs_ren), .a_raddr(cs_raddr), .a_rdata(cs_rdata),
    .a_we(1'b0), .a_waddr('0), .a_wdata('0),
    .b_ren(1'b0), .b_raddr('0), .b_rdata(cs_bq), .b_we(cs_we), .b_waddr(cs_waddr), .b_wdata(cs_wdata),
    .set_res_a(1'b0), .set_slot_a('0), .set_res_b(1'b0), .set_slot_b('0), .resident(res_unused));
  regfile u_rf (.clk, .rst_n, .we(rf_we), .waddr(rf_waddr), .wdata(rf_wdata), .regs);
  dp_ram #(.AW(AW)) u_lm (.clk, .a_en(lm_en), .a_we(lm_we), .a_addr(lm_addr), .a_wdata(lm_wdata), .a_rdata(lm_rdata),
    .b_en(tb_en), .b_we(tb_we), .b_addr(tb_addr), .b_wdata(tb_wdata), .b_rdata(tb_rdata));
  sync_supporter #(.AW(AW)) u_ss (.clk, .rst_n,
    .a_valid(ss_valid), .a_ll(ss_ll), .a_sc(ss_sc), .a_wr(ss_wr), .a_addr(lm_addr),
    .b_valid(tb_ss), .b_ll(1'b0), .b_sc(1'b0), .b_wr(1'b1), .b_addr(tb_addr),
    .wr_ok_a(ss_wr_ok), .wr_ok_b(okb_unused), .collision(coll_unused));

  int checks = 0, failures = 0;
  int cyc = 0, t_start, t_done, n_out;
  logic [31:0] outs [$];
  msg_t msgs [$];
  always @(posedge clk) begin
    cyc++;
    if (rst_n) begin
      if (start && !busy) t_start = cyc;
      if (done) t_done = cyc;
      if (out_valid) outs.push_back(out_data);
      if (msg_valid) msgs.push_back(msg);
    end
  end

  task automatic chk(input bit ok, input string s);
    checks++; if (!ok) begin failures++; $display("FAIL %s", s); end
  endtask

  task automatic mem_wr(input int a, input logic [31:0] d);
    @(negedge clk); tb_en = 1; tb_we = 1; tb_addr = AW'(a); tb_wdata = d;
    @(negedge clk); tb_en = 0; tb_we = 0;
  endtask
  task automatic mem_rd(input int a, output logic [31:0] d);
    @(negedge clk); tb_en = 1; tb_we = 0; tb_addr = AW'(a);
    @(negedge clk); tb_en = 0; d = tb_rdata;
  endtask

  // run a command and check end code and cycle count
  task automatic run(input int entry, input int slot, input logic [31:0] addr, input int n,
                     input burst_t data, input logic [3:0] exp_code, input int exp_cycles, input string what);
    outs.delete(); msgs.delete();
    @(negedge clk);
    cmd = '0; cmd.entry = CS_AW'(entry); cmd.start = CS_AW'(slot * SLOT_UI); cmd.addr = addr;
    cmd.n = NB_W'(n); cmd.data = data; start = 1;
    @(negedge clk); start = 0;
    while (!done) @(negedge clk);
    @(negedge clk);
    chk(code_seen == exp_code, $sformatf("%s: end code %0d", what, code_seen));
    chk(t_done - t_start == exp_cycles, $sformatf("%s: %0d cycles, expected %0d", what, t_done - t_start, exp_cycles));
  endtask

  function automatic logic [31:0] la(int page, int word);
    return BADDR + 32'(page * 1024 + word * 4);
  endfunction

  logic [3:0] code_seen;
  always @(posedge clk) if (rst_n && done) code_seen = end_code;

  initial begin
    burst_t d;
    logic [31:0] v;
    start = 0; cmd = '0; cs_we = 0; cs_waddr = 0; cs_wdata = 0;
    tb_en = 0; tb_we = 0; tb_addr = 0; tb_wdata = 0; tb_ss = 0;
    cfg.node = 8'd3; cfg.baddr = BADDR; cfg.v2p = 32'h800;
    repeat (2) @(negedge clk); rst_n = 1;
    for (int s = 0; s < NUSED; s++)
      for (int w = 0; w < slot_len(s) * 4; w++) begin
        @(negedge clk); cs_we = 1; cs_waddr = (CS_AW+2)'(s * 128 + w); cs_wdata = ucode_word(s, w);
      end
    @(negedge clk); cs_we = 0;
    mem_wr('h800 + 0, 40); mem_wr('h800 + 3, 3);   // page 0: frame 40, node 3
    mem_wr('h800 + 4, 41); mem_wr('h800 + 7, 9);   // page 1: frame 41, node 9
    for (int i = 0; i < 16; i++) mem_wr(40 * 256 + i, 32'h1000 + i);

    // 1. single local load: 18 microinstructions
    run(0, C_LOAD, la(0, 5), 1, '0, END_DONE, 22, "local load");
    chk(outs.size() == 1 && outs[0] == 32'h1005, "local load data");
    // 2. burst store of 8 words, then burst load: 11+2+2+18 = 33
    for (int i = 0; i < 8; i++) d[i] = $urandom;
    run(0, C_BSTORE, la(0, 16), 8, d, END_DONE, 37, "local burst store");
    for (int i = 0; i < 8; i++) begin mem_rd(40 * 256 + 16 + i, v); chk(v == d[i], "burst store word"); end
    run(0, C_BLOAD, la(0, 16), 8, '0, END_DONE, 37, "local burst load");
    chk(outs.size() == 8, "burst load word count");
    for (int i = 0; i < 8 && i < outs.size(); i++) chk(outs[i] == d[i], "burst load word");
    run(0, C_BLOAD, la(0, 2), 3, '0, END_DONE, 27, "local burst load of 3");
    chk(outs.size() == 3 && outs[2] == 32'h1004, "burst load of 3 data");
    // 3. remote store: 11 + 2 + 2 + end = 16
    run(0, C_BSTORE, la(1, 7), 2, d, END_REMOTE, 20, "remote store");
    chk(msgs.size() == 1, "one request message");
    if (msgs.size() == 1) begin
      chk(msgs[0].dst == 9 && msgs[0].src == 3 && msgs[0].mtype == MSG_REQ, "message header");
      chk(msgs[0].addr == ((32'd41 << 10) | 32'd28), "physical address in message");
      chk(msgs[0].start == 10'(C_BSTORE * SLOT_UI) && msgs[0].n == 2 && msgs[0].data == d, "message body");
    end
    // 4. test-and-set: free lock (11+2+2+8 = 23), taken lock, release
    mem_wr(40 * 256 + 100, 0);
    run(0, C_TAS, la(0, 100), 1, '0, END_DONE, 27, "acquire free lock");
    mem_rd(40 * 256 + 100, v); chk(v == 1, "lock taken");
    run(0, C_TAS, la(0, 100), 1, '0, END_RETRY, 27, "acquire taken lock");
    mem_rd(40 * 256 + 100, v); chk(v == 1, "lock still taken");
    run(0, C_REL, la(0, 100), 1, '0, END_DONE, 22, "release");
    mem_rd(40 * 256 + 100, v); chk(v == 0, "lock free");
    // 5. the other port writes the lock between ll and sc: the sc must fail
    fork
      run(0, C_TAS, la(0, 100), 1, '0, END_RETRY, 27, "acquire with interfering write");
      begin
        while (!(ss_valid && ss_ll)) @(negedge clk);
        tb_en = 1; tb_we = 1; tb_addr = AW'(40 * 256 + 100); tb_wdata = 0; tb_ss = 1;
        @(negedge clk); tb_en = 0; tb_we = 0; tb_ss = 0;
      end
    join
    mem_rd(40 * 256 + 100, v); chk(v == 0, "failed sc did not write");
    // 6. remote entry (as mini-processor B): physical address, 2 + 4 + 2*3 = 12
    run(32, C_BLOAD, 32'(40 * 1024 + 4 * 8), 3, '0, END_DONE, 14, "remote-entry burst load");
    chk(outs.size() == 3 && outs[0] == 32'h1008 && outs[2] == 32'h100A, "remote-entry data");
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

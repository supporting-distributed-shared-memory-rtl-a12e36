// tb_dsm_noc: end-to-end test of the whole mesh at its default size
// (4 x 4 nodes).
//
// Every core first writes, with private stores, the microprogram and the
// V2P table into its Local Memory (logical page p belongs to node p % 16 as
// frame 32 + p / 16). Then all cores run at once:
//   1. burst stores of 1..8 words to a page of every other node (remote) and
//      to their own page (local), then burst and single loads of the same
//      words, checked against a reference model of the shared space;
//   2. two rounds of test-and-set / release on one lock in node 0 (all
//      nodes contend for the same lock: hot spot), checking that never more
//      than one core holds the lock.
// Counted mechanisms: private access, local shared access, remote shared
// access, microcode upload by both interface units, lock retry in the core
// interface (local) and in the network interface (remote); each must occur.
module tb_dsm_noc;
  import dmc_pkg::*;
  import dmc_ucode_pkg::*;

  localparam int MX = 4, MY = 4, N = MX * MY;
  localparam logic [31:0] BADDR = 32'h8000_0000;
  localparam int V2P = 'h800;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic      [N-1:0] cmd_v, cmd_rdy, resp_v;
  core_cmd_t [N-1:0] cmd;
  core_resp_t [N-1:0] resp;
  logic [N-1:0][1:0] ev_up, ev_rq;
  logic [N-1:0]      ev_col;

  dsm_noc dut (
    .clk, .rst_n, .core_cmd_valid(cmd_v), .core_cmd(cmd), .core_cmd_ready(cmd_rdy),
    .core_resp_valid(resp_v), .core_resp(resp),
    .ev_upload(ev_up), .ev_requeue(ev_rq), .ev_collision(ev_col)
  );

  int checks = 0, failures = 0;
  int n_priv = 0, n_local = 0, n_remote = 0, n_up_c = 0, n_up_n = 0, n_rq_c = 0, n_rq_n = 0;
  int holders = 0, max_holders = 0;
  longint cyc = 0;
  int ndone;
  logic [31:0] model [logic [31:0]];   // logical word address -> value

  always @(posedge clk) begin
    cyc++;
    if (rst_n) for (int i = 0; i < N; i++) begin
      n_up_c += int'(ev_up[i][0]); n_up_n += int'(ev_up[i][1]);
      n_rq_c += int'(ev_rq[i][0]); n_rq_n += int'(ev_rq[i][1]);
    end
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s (cycle %0d)", what, cyc);
    end
  endtask

  task automatic issue(input int n, input core_cmd_t c, output core_resp_t r);
    @(posedge clk); #1;
    cmd[n] = c; cmd_v[n] = 1'b1;
    @(negedge clk);
    while (!cmd_rdy[n]) @(negedge clk);
    @(posedge clk); #1 cmd_v[n] = 1'b0;
    @(negedge clk);
    while (!resp_v[n]) @(negedge clk);
    r = resp[n];
  endtask

  task automatic priv_write(input int n, input int waddr, input burst_t d, input int cnt);
    core_cmd_t c; core_resp_t r;
    c = '0; c.kind = CMD_PRIV_WR; c.addr = 32'(waddr * 4); c.n = NB_W'(cnt); c.data = d;
    issue(n, c, r);
    n_priv++;
  endtask

  function automatic logic [31:0] laddr(int page, int word);
    return BADDR + 32'(page * 1024 + word * 4);
  endfunction

  task automatic node_init(input int n);
    burst_t d; int k;
    core_cmd_t c; core_resp_t r;
    for (int s = 0; s < NUSED; s++) begin
      k = 0; d = '0;
      for (int w = 0; w < slot_len(s) * 4; w++) begin
        d[k] = ucode_word(s, w); k++;
        if (k == 8 || w == slot_len(s) * 4 - 1) begin
          priv_write(n, int'(UCODE_BASE) + s * 128 + w - k + 1, d, k);
          k = 0; d = '0;
        end
      end
    end
    for (int p = 0; p < 2 * N; p++) begin
      d = '0; d[0] = 32'(32 + p / N); d[3] = 32'(p % N);
      priv_write(n, V2P + 4 * p, d, 4);
    end
    // private read-back of one table entry
    c = '0; c.kind = CMD_PRIV_RD; c.addr = 32'((V2P + 4 * n) * 4); c.n = 4;
    issue(n, c, r);
    n_priv++;
    check(r.n == 4 && r.data[0] == 32'(32 + n / N) && r.data[3] == 32'(n % N), "private read");
  endtask

  // Shared traffic of node n: write then read a few words in page n + N*? of every node.
  task automatic node_traffic(input int n);
    core_cmd_t c; core_resp_t r;
    for (int t = 0; t < N; t++) begin
      int dst = (n + t) % N;
      int page = dst + N;                // second page of node dst, private to writer n by offset
      int nb = 1 + (n + t) % MAX_BURST;
      int w0 = n * 8;                    // word offset inside the page: unique per writer
      c = '0; c.kind = CMD_SHARED; c.code = (nb == 1) ? C_STORE : C_BSTORE;
      c.addr = laddr(page, w0); c.n = NB_W'(nb);
      for (int i = 0; i < nb; i++) begin
        c.data[i] = $urandom;
        model[laddr(page, w0 + i)] = c.data[i];
      end
      issue(n, c, r);
      check(r.status == END_DONE, $sformatf("store status node %0d -> %0d", n, dst));
      c.code = (nb == 1) ? C_LOAD : C_BLOAD; c.data = '0;
      issue(n, c, r);
      check(r.status == END_DONE && r.n == NB_W'(nb), $sformatf("load status node %0d -> %0d st=%0d n=%0d", n, dst, r.status, r.n));
      for (int i = 0; i < nb; i++)
        check(r.data[i] == model[laddr(page, w0 + i)],
              $sformatf("load data node %0d -> %0d word %0d", n, dst, i));
      if (dst == n) n_local += 2; else n_remote += 2;
    end
  endtask

  task automatic node_lock(input int n);
    core_cmd_t c; core_resp_t r;
    for (int round = 0; round < 2; round++) begin
      c = '0; c.kind = CMD_SHARED; c.code = C_TAS; c.addr = laddr(0, 100); c.n = 1;
      issue(n, c, r);
      check(r.status == END_DONE, $sformatf("acquire node %0d", n));
      holders++;
      if (holders > max_holders) max_holders = holders;
      repeat (20 + n) @(posedge clk);
      holders--;
      c.code = C_REL;
      issue(n, c, r);
      check(r.status == END_DONE, $sformatf("release node %0d", n));
    end
  endtask

  initial begin
    cmd_v = '0; cmd = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    // the lock word starts free
    ndone = 0;
    for (int n = 0; n < N; n++) fork
      automatic int nn = n;
      begin
        node_init(nn);
        if (nn == 0) begin
          burst_t d = '0;
          priv_write(0, 32 * 256 + 100, d, 1);   // frame 32, word 100: the lock
        end
        ndone++;
      end
    join_none
    wait (ndone == N);
    repeat (5) @(posedge clk);
    for (int n = 0; n < N; n++) fork
      automatic int nn = n;
      begin node_traffic(nn); ndone++; end
    join_none
    wait (ndone == 2 * N);
    $display("traffic done at cycle %0d", cyc);
    for (int n = 0; n < N; n++) fork
      automatic int nn = n;
      begin node_lock(nn); ndone++; end
    join_none
    wait (ndone == 3 * N);
    $display("locks done at cycle %0d", cyc);
    check(max_holders == 1, "mutual exclusion of the lock");
    $display("events: private=%0d local=%0d remote=%0d upload_cicu=%0d upload_nicu=%0d retry_cicu=%0d retry_nicu=%0d",
             n_priv, n_local, n_remote, n_up_c, n_up_n, n_rq_c, n_rq_n);
    check(n_priv > 0, "private access happened");
    check(n_local > 0, "local shared access happened");
    check(n_remote > 0, "remote shared access happened");
    check(n_up_c > 0, "upload by core interface happened");
    check(n_up_n > 0, "upload by network interface happened");
    check(n_rq_c > 0, "local lock retry happened");
    check(n_rq_n > 0, "remote lock retry happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

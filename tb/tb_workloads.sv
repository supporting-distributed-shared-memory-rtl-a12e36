// tb_workloads: the synthetic workloads of the published evaluation on an
// 8 x 8 mesh (64 nodes).
//
// Shared reads (every node's page p = its node number is first filled by
// private writes with the pattern {page, word}):
//   * uniform: every node reads from all other nodes, one after the other,
//     each read waiting for the previous one, all nodes starting together;
//   * hotspot: every node other than (0,0) reads from node (0,0);
// each for burst lengths 1, 2, 4, 6 and 8 words, after a warm-up that makes
// all microcode resident (as in the published measurements). Every word read is
// checked and the average read latency (command to answer, in cycles) is
// printed per workload and burst length.
// Synchronization (test-and-set, then release), four scenarios: uniform
// traffic (node n takes, in turn, a lock in each of the next four nodes)
// or hotspot traffic (all nodes take a lock in node (0,0)), each with
// one lock per requester or one lock for all. Mutual exclusion is checked
// for every lock and the average acquire latency printed.
// Expected behaviour that is checked: latency grows with burst length;
// hotspot reads are slower than uniform ones; the same-lock hotspot case is
// the slowest synchronization case and makes locks retry at the owner.
module tb_workloads;
  import dmc_pkg::*;
  import dmc_ucode_pkg::*;

  localparam int MX = 8, MY = 8, N = MX * MY;
  localparam logic [31:0] BADDR = 32'h8000_0000;
  localparam int V2P = 'h800;
  localparam int NBL = 5;
  localparam int BLEN [NBL] = '{1, 2, 4, 6, 8};

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic      [N-1:0] cmd_v, cmd_rdy, resp_v;
  core_cmd_t [N-1:0] cmd;
  core_resp_t [N-1:0] resp;
  logic [N-1:0][1:0] ev_up, ev_rq;
  logic [N-1:0]      ev_col;

  dsm_noc #(.MESH_X(MX), .MESH_Y(MY)) dut (
    .clk, .rst_n, .core_cmd_valid(cmd_v), .core_cmd(cmd), .core_cmd_ready(cmd_rdy),
    .core_resp_valid(resp_v), .core_resp(resp),
    .ev_upload(ev_up), .ev_requeue(ev_rq), .ev_collision(ev_col)
  );

  int checks = 0, failures = 0, ndone, n_rq_n = 0;
  longint cyc = 0;
  longint lat_sum, lat_cnt;
  int holders [int];
  int max_holders;

  always @(posedge clk) begin
    cyc++;
    if (rst_n) for (int i = 0; i < N; i++) n_rq_n += int'(ev_rq[i][1]);
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s (cycle %0d)", what, cyc); end
  endtask

  task automatic issue(input int n, input core_cmd_t c, output core_resp_t r, output int lat);
    longint t0;
    @(posedge clk); #1;
    cmd[n] = c; cmd_v[n] = 1'b1; t0 = cyc;
    @(negedge clk);
    while (!cmd_rdy[n]) @(negedge clk);
    @(posedge clk); #1 cmd_v[n] = 1'b0;
    @(negedge clk);
    while (!resp_v[n]) @(negedge clk);
    r = resp[n];
    lat = int'(cyc - t0);
  endtask

  task automatic priv_write(input int n, input int waddr, input burst_t d, input int cnt);
    core_cmd_t c; core_resp_t r; int l;
    c = '0; c.kind = CMD_PRIV_WR; c.addr = 32'(waddr * 4); c.n = NB_W'(cnt); c.data = d;
    issue(n, c, r, l);
  endtask

  function automatic logic [31:0] laddr(int page, int word);
    return BADDR + 32'(page * 1024 + word * 4);
  endfunction
  function automatic logic [31:0] pat(int page, int word);
    return {16'(page), 16'(word)};
  endfunction

  task automatic node_init(input int n);
    burst_t d; int k;
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
    for (int p = 0; p < N; p++) begin
      d = '0; d[0] = 32; d[3] = 32'(p);
      priv_write(n, V2P + 4 * p, d, 4);
    end
    // own page (frame 32): data pattern, then free locks
    for (int w = 0; w < 256; w += 8) begin
      for (int i = 0; i < 8; i++) d[i] = pat(n, w + i);
      priv_write(n, 32 * 256 + w, d, 8);
    end
    d = '0;
    for (int w = 160; w < 240; w += 8) priv_write(n, 32 * 256 + w, d, 8);
  endtask

  task automatic node_read(input int n, input int dst, input int nb);
    core_cmd_t c; core_resp_t r; int l, w0;
    w0 = (n * 3) % (128 - nb);
    c = '0; c.kind = CMD_SHARED; c.code = (nb == 1) ? C_LOAD : C_BLOAD;
    c.addr = laddr(dst, w0); c.n = NB_W'(nb);
    issue(n, c, r, l);
    lat_sum += l; lat_cnt++;
    check(r.status == END_DONE && r.n == NB_W'(nb), $sformatf("read %0d -> %0d status", n, dst));
    for (int i = 0; i < nb; i++)
      check(r.data[i] == pat(dst, w0 + i), $sformatf("read %0d -> %0d word %0d", n, dst, i));
  endtask

  task automatic node_lock(input int n, input int dst, input int word);
    core_cmd_t c; core_resp_t r; int l, key;
    key = dst * 256 + word;
    c = '0; c.kind = CMD_SHARED; c.code = C_TAS; c.addr = laddr(dst, word); c.n = 1;
    issue(n, c, r, l);
    lat_sum += l; lat_cnt++;
    check(r.status == END_DONE, $sformatf("acquire %0d -> %0d", n, dst));
    if (!holders.exists(key)) holders[key] = 0;
    holders[key]++;
    if (holders[key] > max_holders) max_holders = holders[key];
    repeat (10) @(posedge clk);
    holders[key]--;
    c.code = C_REL;
    issue(n, c, r, l);
    check(r.status == END_DONE, $sformatf("release %0d -> %0d", n, dst));
  endtask

  real rd_lat [2][NBL];
  real sy_lat [4];
  int  sy_rq [4];

  initial begin
    cmd_v = '0; cmd = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    ndone = 0;
    for (int n = 0; n < N; n++) fork
      automatic int nn = n;
      begin node_init(nn); ndone++; end
    join_none
    wait (ndone == N);
    $display("init done at cycle %0d", cyc);
    // warm-up: every microcode used below becomes resident on both sides of
    // every node, so the measurements below exclude uploads
    ndone = 0;
    for (int n = 0; n < N; n++) fork
      automatic int nn = n;
      begin
        node_read(nn, (nn + 1) % N, 1);
        node_read(nn, (nn + 1) % N, 2);
        node_lock(nn, (nn + 1) % N, 160 + nn);
        ndone++;
      end
    join_none
    wait (ndone == N);
    for (int hot = 0; hot < 2; hot++)
      for (int b = 0; b < NBL; b++) begin
        lat_sum = 0; lat_cnt = 0; ndone = 0;
        for (int n = 0; n < N; n++) fork
          automatic int nn = n, bb = BLEN[b], hh = hot;
          begin
            if (hh == 0) begin
              for (int t = 1; t < N; t++) node_read(nn, (nn + t) % N, bb);
            end else if (nn != 0) begin
              node_read(nn, 0, bb);
            end
            ndone++;
          end
        join_none
        wait (ndone == N);
        rd_lat[hot][b] = real'(lat_sum) / real'(lat_cnt);
        $display("%s read, burst %0d: %0d reads, average latency %.2f cycles",
                 hot ? "hotspot" : "uniform", BLEN[b], lat_cnt, rd_lat[hot][b]);
      end
    for (int sc = 0; sc < 4; sc++) begin
      int rq0;
      lat_sum = 0; lat_cnt = 0; ndone = 0; max_holders = 0; rq0 = n_rq_n;
      for (int n = 0; n < N; n++) fork
        automatic int nn = n, ss = sc;
        begin
          int word;
          word = (ss % 2 == 0) ? 160 + nn : 232;   // different locks / same lock
          if (ss < 2) for (int t = 1; t <= 4; t++) node_lock(nn, (nn + t) % N, word);
          else node_lock(nn, 0, word);
          ndone++;
        end
      join_none
      wait (ndone == N);
      sy_lat[sc] = real'(lat_sum) / real'(lat_cnt);
      sy_rq[sc] = n_rq_n - rq0;
      $display("%s, %s lock: %0d acquires, average latency %.2f cycles, %0d retries at the owner",
               sc < 2 ? "uniform" : "hotspot", sc % 2 == 0 ? "different" : "same", lat_cnt, sy_lat[sc], sy_rq[sc]);
      check(max_holders == 1, $sformatf("mutual exclusion, scenario %0d", sc));
    end
    for (int b = 1; b < NBL; b++) begin
      check(rd_lat[0][b] > rd_lat[0][b-1], "uniform latency grows with burst length");
      check(rd_lat[1][b] > rd_lat[1][b-1], "hotspot latency grows with burst length");
    end
    for (int b = 0; b < NBL; b++) check(rd_lat[1][b] > rd_lat[0][b], "hotspot slower than uniform");
    check(sy_lat[3] > sy_lat[0] && sy_lat[3] > sy_lat[1] && sy_lat[3] > sy_lat[2], "hotspot same lock slowest");
    check(sy_rq[3] > 0, "locks retried at the owner");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3000000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

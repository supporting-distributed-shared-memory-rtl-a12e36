// tb_noc_router: one router at position (1,1) of a 4 x 4 mesh. Messages to
// every destination are injected on every input; each must leave on the
// XY-routed output (X first), once, with its contents intact. Outputs are
// randomly stalled; contention (two inputs for one output in one cycle) must
// occur and every message must still get through, in order per input and
// output. An uncontended message crosses in one cycle.
module tb_noc_router;
  import dmc_pkg::*;
  localparam int MX = 4, MY = 4, ME = 5;   // node 5 = (1,1)
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic [4:0] in_valid, in_ready, out_valid, out_ready;
  msg_t [4:0] in_msg, out_msg;
  int checks = 0, failures = 0, n_cont = 0, sent = 0, recvd = 0;
  msg_t exp_q [5][5][$];   // expected per output port and input port

  noc_router #(.MESH_X(MX)) dut (.clk, .rst_n, .node(NODE_W'(ME)), .*);

  function automatic int route(int dst);
    int mx, my, dx, dy;
    mx = ME % MX; my = ME / MX; dx = dst % MX; dy = dst / MX;
    if (dx > mx) return 2; if (dx < mx) return 4;
    if (dy > my) return 3; if (dy < my) return 1;
    return 0;
  endfunction

  task automatic chk(input bit ok, input string s);
    checks++; if (!ok) begin failures++; $display("FAIL %s", s); end
  endtask

  // receivers
  always @(posedge clk) if (rst_n) begin
    for (int o = 0; o < 5; o++) if (out_valid[o] && out_ready[o]) begin
      msg_t e;
      recvd++;
      if (exp_q[o][out_msg[o].src].size() == 0) chk(0, $sformatf("unexpected message on port %0d", o));
      else begin
        e = exp_q[o][out_msg[o].src].pop_front();
        chk(out_msg[o] == e, $sformatf("message on port %0d: dst %0d/%0d addr %h/%h", o, out_msg[o].dst, e.dst, out_msg[o].addr, e.addr));
      end
    end
    for (int o = 0; o < 5; o++) begin
      int w = 0;
      for (int i = 0; i < 5; i++) if (!dut.empty[i] && dut.want[i] == 3'(o)) w++;
      if (w > 1) n_cont++;
    end
  end

  initial begin
    in_valid = 0; in_msg = '0; out_ready = '1;
    repeat (2) @(negedge clk); rst_n = 1;
    // one uncontended message: input West -> output East, 1 cycle
    @(negedge clk);
    in_msg[4] = '0; in_msg[4].src = 8'd4; in_msg[4].dst = 8'd7; in_msg[4].addr = 32'hC0DE; in_valid[4] = 1;
    exp_q[2][4].push_back(in_msg[4]); sent++;
    @(negedge clk); in_valid[4] = 0;
    chk(out_valid[2] && out_msg[2].addr == 32'hC0DE, "one-cycle hop");
    @(negedge clk);
    // ordered traffic: input i sends to all destinations; random output stalls
    fork
      for (int i = 0; i < 5; i++) fork
        automatic int ii = i;
        for (int d = 0; d < MX * MY; d++) begin
          automatic msg_t m;
          // only destinations reachable from this input under XY routing
          if ((ii == 2 && (d % MX) > ME % MX) || (ii == 4 && (d % MX) < ME % MX)) continue;
          if ((ii == 1 || ii == 3) && ((d % MX) != ME % MX)) continue;
          if (ii == 1 && d / MX < ME / MX) continue;
          if (ii == 3 && d / MX > ME / MX) continue;
          @(posedge clk); #1;
          m = '0; m.dst = NODE_W'(d); m.src = NODE_W'(ii); m.addr = $urandom; m.data[0] = $urandom;
          in_msg[ii] = m; in_valid[ii] = 1;
          @(negedge clk);
          while (!in_ready[ii]) @(negedge clk);
          exp_q[route(d)][ii].push_back(m); sent++;
          @(posedge clk); #1 in_valid[ii] = 0;
        end
      join_none
    join_none
    repeat (300) begin
      @(negedge clk); out_ready = 5'($urandom) | 5'b00001;
    end
    out_ready = '1;
    repeat (20) @(negedge clk);
    chk(recvd == sent, $sformatf("all %0d messages delivered (%0d)", sent, recvd));
    chk(n_cont > 0, "output contention occurred");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

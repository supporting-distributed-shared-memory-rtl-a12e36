// noc_router: five-port mesh router with dimension-order XY routing.
//
// Ports 0..4 are Local, North, East, South, West. One message is one flit.
// Each input has a FIFO; the head of each input asks for one output (first
// move along X until the column matches, then along Y), and each output
// selects one input, round robin, and offers its message; the message
// leaves when the downstream side is ready (the choice does not depend on
// ready, so ready may depend on the offered message). A message therefore
// advances one hop per cycle when there is no contention, and deterministic routing with FIFOs keeps messages between a
// pair of nodes in order. Node number = y * MESH_X + x; north is y-1. Only
// the mesh width is needed here; the height is set by the top level.
// XY routing, best-effort service, in-order delivery and one cycle per hop
// are the document's; buffer depth and arbitration are this design's.
module noc_router
  import dmc_pkg::*;
#(
  parameter int unsigned MESH_X = 4,
  parameter int unsigned DEPTH  = 2
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [NODE_W-1:0] node,
  input  logic [4:0]       in_valid,
  input  msg_t [4:0]       in_msg,
  output logic [4:0]       in_ready,
  output logic [4:0]       out_valid,
  output msg_t [4:0]       out_msg,
  input  logic [4:0]       out_ready
);
  localparam int unsigned P_L = 0, P_N = 1, P_E = 2, P_S = 3, P_W = 4;

  msg_t [4:0]       head;
  logic [4:0]       empty, full, pop;
  logic [4:0][$clog2(DEPTH):0] cnt;
  logic [4:0][2:0]  want;
  logic [4:0][4:0]  gnt;      // gnt[out][in]
  logic [4:0][2:0]  rr;       // last granted input per output

  for (genvar i = 0; i < 5; i++) begin : g_in
    sync_fifo #(.T(msg_t), .DEPTH(DEPTH)) u_f (
      .clk, .rst_n, .push(in_valid[i] && !full[i]), .wr_data(in_msg[i]), .pop(pop[i]),
      .rd_data(head[i]), .empty(empty[i]), .count(cnt[i])
    );
    assign full[i]     = (cnt[i] == (DEPTH[$clog2(DEPTH):0]));
    assign in_ready[i] = !full[i];
  end

  // route computation
  always_comb begin
    int mx, my, dx, dy;
    mx = int'(node) % MESH_X;
    my = int'(node) / MESH_X;
    for (int i = 0; i < 5; i++) begin
      dx = int'(head[i].dst) % MESH_X;
      dy = int'(head[i].dst) / MESH_X;
      if (dx > mx)      want[i] = 3'(P_E);
      else if (dx < mx) want[i] = 3'(P_W);
      else if (dy > my) want[i] = 3'(P_S);
      else if (dy < my) want[i] = 3'(P_N);
      else              want[i] = 3'(P_L);
    end
  end

  // round-robin arbitration per output
  always_comb begin
    gnt = '0;
    for (int o = 0; o < 5; o++) begin
      for (int k = 1; k <= 5; k++) begin
        int i;
        i = (int'(rr[o]) + k) % 5;
        if (gnt[o] == '0 && !empty[i] && want[i] == 3'(o))
          gnt[o][i] = 1'b1;
      end
      out_valid[o] = 1'b0;
      out_msg[o]   = head[0];
      for (int i = 0; i < 5; i++)
        if (gnt[o][i]) begin
          out_valid[o] = 1'b1;
          out_msg[o]   = head[i];
        end
    end
  end

  // an input leaves its buffer when its granted output is ready; kept apart
  // from the arbitration so that ready never feeds the outgoing message
  always_comb begin
    pop = '0;
    for (int o = 0; o < 5; o++)
      for (int i = 0; i < 5; i++)
        if (gnt[o][i] && out_ready[o]) pop[i] = 1'b1;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) rr <= '0;
    else
      for (int o = 0; o < 5; o++)
        for (int i = 0; i < 5; i++)
          if (gnt[o][i] && out_ready[o]) rr[o] <= 3'(i);
  end
endmodule

// dsm_noc: a multi-core Network-on-Chip with distributed shared memory.
//
// MESH_X x MESH_Y Processor-Memory nodes on a mesh (4 x 4 = 16 nodes by
// default, the example system of the document). Each node holds a Dual
// Microcoded Controller (dmc), its dual-port Local Memory (dp_ram) and a
// router (noc_router). The cores themselves are outside: each node's core
// command / response interface is brought out as ports, indexed by node
// number (y * MESH_X + x).
//
// The Local Memory of every node is split into a private and a shared part.
// Private accesses use physical addresses and go straight to memory; shared
// accesses use logical addresses that the microcode translates through the
// node's V2P table (at word address V2P_HADDR) into a node number and a
// physical address, and are then served locally by mini-processor A or sent
// to the owner node, where mini-processor B serves them. BADDR is the first
// logical address of the shared space. Both are the same for every node
// here; the node number is the node's position. The network request queue
// of each node has a place for every node (rounded up to a power of two).
module dsm_noc
  import dmc_pkg::*;
#(
  parameter int unsigned MESH_X    = 4,
  parameter int unsigned MESH_Y    = 4,
  parameter int unsigned AW        = 14,
  parameter logic [31:0] BADDR     = 32'h8000_0000,
  parameter logic [31:0] V2P_HADDR = 32'h0000_0800
) (
  input  logic                         clk,
  input  logic                         rst_n,
  input  logic      [MESH_X*MESH_Y-1:0] core_cmd_valid,
  input  core_cmd_t [MESH_X*MESH_Y-1:0] core_cmd,
  output logic      [MESH_X*MESH_Y-1:0] core_cmd_ready,
  output logic      [MESH_X*MESH_Y-1:0] core_resp_valid,
  output core_resp_t [MESH_X*MESH_Y-1:0] core_resp,
  output logic      [MESH_X*MESH_Y-1:0][1:0] ev_upload,
  output logic      [MESH_X*MESH_Y-1:0][1:0] ev_requeue,
  output logic      [MESH_X*MESH_Y-1:0] ev_collision
);
  localparam int unsigned N = MESH_X * MESH_Y;
  // Each core has at most one shared access in flight and only the core
  // side sends requests, so a request queue with a place for every node
  // never has to refuse one: the network cannot block on requests.
  localparam int unsigned NQ_DEPTH = 1 << $clog2(N);

  // router port signals, [node][port]
  logic [N-1:0][4:0] r_in_v, r_in_rdy, r_out_v, r_out_rdy;
  msg_t [N-1:0][4:0] r_in_m, r_out_m;

  for (genvar n = 0; n < N; n++) begin : g_node
    localparam int X = n % MESH_X;
    localparam int Y = n / MESH_X;
    dmc_cfg_t cfg;
    logic lma_en, lma_we, lmb_en, lmb_we;
    logic [AW-1:0] lma_addr, lmb_addr;
    logic [DW-1:0] lma_wd, lmb_wd, lma_rd, lmb_rd;

    assign cfg.node  = NODE_W'(n);
    assign cfg.baddr = BADDR;
    assign cfg.v2p   = V2P_HADDR;

    dmc #(.AW(AW), .NQ_DEPTH(NQ_DEPTH)) u_dmc (
      .clk, .rst_n, .cfg,
      .core_cmd_valid(core_cmd_valid[n]), .core_cmd(core_cmd[n]), .core_cmd_ready(core_cmd_ready[n]),
      .core_resp_valid(core_resp_valid[n]), .core_resp(core_resp[n]),
      .net_in_valid(r_out_v[n][0]), .net_in(r_out_m[n][0]), .net_in_ready(r_out_rdy[n][0]),
      .net_out_valid(r_in_v[n][0]), .net_out(r_in_m[n][0]), .net_out_ready(r_in_rdy[n][0]),
      .lma_en, .lma_we, .lma_addr, .lma_wdata(lma_wd), .lma_rdata(lma_rd),
      .lmb_en, .lmb_we, .lmb_addr, .lmb_wdata(lmb_wd), .lmb_rdata(lmb_rd),
      .ev_upload(ev_upload[n]), .ev_requeue(ev_requeue[n]), .ev_collision(ev_collision[n])
    );

    dp_ram #(.AW(AW), .DW(DW)) u_lmem (
      .clk,
      .a_en(lma_en), .a_we(lma_we), .a_addr(lma_addr), .a_wdata(lma_wd), .a_rdata(lma_rd),
      .b_en(lmb_en), .b_we(lmb_we), .b_addr(lmb_addr), .b_wdata(lmb_wd), .b_rdata(lmb_rd)
    );

    noc_router #(.MESH_X(MESH_X)) u_rtr (
      .clk, .rst_n, .node(NODE_W'(n)),
      .in_valid(r_in_v[n]), .in_msg(r_in_m[n]), .in_ready(r_in_rdy[n]),
      .out_valid(r_out_v[n]), .out_msg(r_out_m[n]), .out_ready(r_out_rdy[n])
    );

    // links: port 1 N, 2 E, 3 S, 4 W
    if (Y > 0) begin : g_n
      assign r_in_v[n][1]    = r_out_v[n-MESH_X][3];
      assign r_in_m[n][1]    = r_out_m[n-MESH_X][3];
      assign r_out_rdy[n][1] = r_in_rdy[n-MESH_X][3];
    end else begin : g_nn
      assign r_in_v[n][1] = 1'b0; assign r_in_m[n][1] = '0; assign r_out_rdy[n][1] = 1'b0;
    end
    if (Y < MESH_Y-1) begin : g_s
      assign r_in_v[n][3]    = r_out_v[n+MESH_X][1];
      assign r_in_m[n][3]    = r_out_m[n+MESH_X][1];
      assign r_out_rdy[n][3] = r_in_rdy[n+MESH_X][1];
    end else begin : g_ns
      assign r_in_v[n][3] = 1'b0; assign r_in_m[n][3] = '0; assign r_out_rdy[n][3] = 1'b0;
    end
    if (X < MESH_X-1) begin : g_e
      assign r_in_v[n][2]    = r_out_v[n+1][4];
      assign r_in_m[n][2]    = r_out_m[n+1][4];
      assign r_out_rdy[n][2] = r_in_rdy[n+1][4];
    end else begin : g_ne
      assign r_in_v[n][2] = 1'b0; assign r_in_m[n][2] = '0; assign r_out_rdy[n][2] = 1'b0;
    end
    if (X > 0) begin : g_w
      assign r_in_v[n][4]    = r_out_v[n-1][2];
      assign r_in_m[n][4]    = r_out_m[n-1][2];
      assign r_out_rdy[n][4] = r_in_rdy[n-1][2];
    end else begin : g_nw
      assign r_in_v[n][4] = 1'b0; assign r_in_m[n][4] = '0; assign r_out_rdy[n][4] = 1'b0;
    end
  end
endmodule

// dmc_pkg: types and constants shared by the Dual Microcoded Controller (DMC),
// its mesh network and the testbenches.
//
// The controller executes horizontal microinstructions of 128 bits. Each
// microinstruction holds one 32-bit field per function unit of the
// mini-processor: Adder Unit (AU), Load/Store Unit (LSU), Condition Unit (CU)
// and Message Passing Unit (MPU). The four fields map onto the four 32-bit
// wide banks of the Control Store. The names of the micro-operations (sub,
// add, set, pfe, pfm, lw, sw, lfrw, ll, sc, beq, bneqz, jmp, end, mp) follow
// the published microcode; their bit encodings are this design's own.
package dmc_pkg;

  // ------------------------------------------------------------------
  // Sizes
  // ------------------------------------------------------------------
  localparam int unsigned DW        = 32;    // data word width
  localparam int unsigned NODE_W    = 8;     // node number width
  localparam int unsigned MAX_BURST = 8;     // longest burst, in words
  localparam int unsigned NB_W      = 4;     // burst-count width (1..8)
  localparam int unsigned CS_AW     = 10;    // control store: 1024 microinstructions
  localparam int unsigned SLOT_UI   = 32;    // microinstructions per microcode slot
  localparam int unsigned NSLOT     = 32;    // slots in the control store (32*32 = 1024)
  localparam int unsigned SLOT_W    = 5;
  localparam int unsigned UI_WORDS  = 4;     // 32-bit words per microinstruction
  localparam int unsigned PAGE_BITS = 10;    // 1 KiB pages (byte addresses)
  localparam int unsigned V2P_ENTRY = 4;     // words per V2P table entry

  // Word address, in local memory, of the microprogram: slot s starts at
  // UCODE_BASE + s*SLOT_UI*UI_WORDS.
  localparam logic [31:0] UCODE_BASE = 32'h0000_1000;

  // ------------------------------------------------------------------
  // Operand selectors (5 bits), used by all fields
  // ------------------------------------------------------------------
  localparam logic [4:0] SEL_LADDR = 5'd8;   // command address (logical or physical)
  localparam logic [4:0] SEL_DATA  = 5'd9;   // next word of the command's data
  localparam logic [4:0] SEL_BADDR = 5'd10;  // boundary address of the shared space
  localparam logic [4:0] SEL_V2P   = 5'd11;  // word address of the V2P table
  localparam logic [4:0] SEL_SNODE = 5'd12;  // this node's number
  localparam logic [4:0] SEL_START = 5'd13;  // address of the target microcode
  localparam logic [4:0] SEL_ZERO  = 5'd14;
  localparam logic [4:0] SEL_NB    = 5'd15;  // burst length of the command
  localparam logic [4:0] SEL_ONE   = 5'd16;
  localparam logic [4:0] SEL_IMM   = 5'd31;  // immediate of the field

  // ------------------------------------------------------------------
  // Micro-operations
  // ------------------------------------------------------------------
  typedef enum logic [3:0] {
    AU_NOP = 4'd0, AU_ADD = 4'd1, AU_SUB = 4'd2, AU_SET = 4'd3,
    AU_PFE = 4'd4, AU_PFM = 4'd5
  } au_op_e;

  typedef enum logic [3:0] {
    LSU_NOP = 4'd0, LSU_LW = 4'd1, LSU_SW = 4'd2, LSU_LFRW = 4'd3,
    LSU_LL  = 4'd4, LSU_SC = 4'd5
  } lsu_op_e;

  typedef enum logic [3:0] {
    CU_NOP = 4'd0, CU_BEQ = 4'd1, CU_BNEQZ = 4'd2, CU_JMP = 4'd3, CU_END = 4'd4
  } cu_op_e;

  typedef enum logic [3:0] {
    MPU_NOP = 4'd0, MPU_MP = 4'd1
  } mpu_op_e;

  // AU: rd = f(sa, sb); pfe also writes rd2.
  typedef struct packed {
    au_op_e     op;     // [31:28]
    logic [2:0] rd;     // [27:25]
    logic [2:0] rd2;    // [24:22]
    logic [4:0] sa;     // [21:17]
    logic [4:0] sb;     // [16:12]
    logic [11:0] imm;   // [11:0]
  } au_field_t;

  // LSU: address register ra; load destination rd or the result stream
  // (tocore); store data selector sd.
  typedef struct packed {
    lsu_op_e    op;     // [31:28]
    logic [2:0] ra;     // [27:25]
    logic [2:0] rd;     // [24:22]
    logic       tocore; // [21]
    logic [4:0] sd;     // [20:16]
    logic [15:0] rsv;
  } lsu_field_t;

  // CU: beq ra==sb, bneqz ra!=0, jmp (target or selector), end code.
  typedef struct packed {
    cu_op_e     op;     // [31:28]
    logic [2:0] ra;     // [27:25]
    logic [4:0] sb;     // [24:20]
    logic [3:0] code;   // [19:16]
    logic [5:0] rsv;    // [15:10]
    logic [9:0] target; // [9:0]
  } cu_field_t;

  // MPU: mp dst(reg), qos(reg), physical address(reg), data selector.
  typedef struct packed {
    mpu_op_e    op;     // [31:28]
    logic [2:0] rdst;   // [27:25]
    logic [2:0] rqos;   // [24:22]
    logic [2:0] raddr;  // [21:19]
    logic [4:0] sd;     // [18:14]
    logic [13:0] rsv;
  } mpu_field_t;

  // Bank 0 = AU, 1 = LSU, 2 = CU, 3 = MPU.
  typedef struct packed {
    mpu_field_t mpu;
    cu_field_t  cu;
    lsu_field_t lsu;
    au_field_t  au;
  } uinstr_t;

  // End codes reported by the end micro-operation.
  localparam logic [3:0] END_DONE   = 4'd1;  // finished, results ready
  localparam logic [3:0] END_RETRY  = 4'd2;  // lock not acquired: requeue command
  localparam logic [3:0] END_REMOTE = 4'd3;  // request sent, data comes back later

  typedef logic [MAX_BURST-1:0][DW-1:0] burst_t;

  // ------------------------------------------------------------------
  // Core command / response
  // ------------------------------------------------------------------
  typedef enum logic [1:0] {
    CMD_PRIV_RD = 2'd0, CMD_PRIV_WR = 2'd1, CMD_SHARED = 2'd2
  } cmd_kind_e;

  typedef struct packed {
    cmd_kind_e         kind;
    logic [SLOT_W-1:0] code;   // microcode slot of a shared command
    logic [DW-1:0]     addr;   // byte address (physical if private)
    logic [NB_W-1:0]   n;      // words, 1..MAX_BURST
    burst_t            data;
  } core_cmd_t;

  typedef struct packed {
    logic [3:0]      status;   // END_DONE, or the code of the failed step
    logic [NB_W-1:0] n;        // words returned
    burst_t          data;
  } core_resp_t;

  // What a mini-processor starts with.
  typedef struct packed {
    logic [CS_AW-1:0]  entry;   // first microinstruction
    logic [CS_AW-1:0]  start;   // target microcode (START_ADDR)
    logic [DW-1:0]     addr;    // L_ADDR
    logic [NB_W-1:0]   n;
    burst_t            data;
  } mp_cmd_t;

  // Static per-node configuration.
  typedef struct packed {
    logic [NODE_W-1:0] node;    // SNODE
    logic [DW-1:0]     baddr;   // BADDR
    logic [DW-1:0]     v2p;     // V2P_HADDR (word address)
  } dmc_cfg_t;

  // ------------------------------------------------------------------
  // Network message: one message travels as one flit.
  // ------------------------------------------------------------------
  typedef enum logic [0:0] { MSG_REQ = 1'b0, MSG_RESP = 1'b1 } msg_type_e;

  typedef struct packed {
    msg_type_e         mtype;
    logic [NODE_W-1:0] src;
    logic [NODE_W-1:0] dst;
    logic [1:0]        qos;
    logic [CS_AW-1:0]  start;   // target microcode in the destination
    logic [DW-1:0]     addr;    // physical byte address in the destination
    logic [NB_W-1:0]   n;
    logic [3:0]        status;
    burst_t            data;
  } msg_t;

  // Microinstruction field builders (used to assemble microprograms).
  function automatic au_field_t f_au(au_op_e op, logic [2:0] rd, logic [2:0] rd2,
                                     logic [4:0] sa, logic [4:0] sb, logic [11:0] imm);
    f_au = '{op: op, rd: rd, rd2: rd2, sa: sa, sb: sb, imm: imm};
  endfunction

  function automatic lsu_field_t f_lsu(lsu_op_e op, logic [2:0] ra, logic [2:0] rd,
                                       logic tocore, logic [4:0] sd);
    f_lsu = '{op: op, ra: ra, rd: rd, tocore: tocore, sd: sd, rsv: '0};
  endfunction

  function automatic cu_field_t f_cu(cu_op_e op, logic [2:0] ra, logic [4:0] sb,
                                     logic [3:0] code, logic [9:0] target);
    f_cu = '{op: op, ra: ra, sb: sb, code: code, rsv: '0, target: target};
  endfunction

  function automatic mpu_field_t f_mpu(mpu_op_e op, logic [2:0] rdst, logic [2:0] rqos,
                                       logic [2:0] raddr, logic [4:0] sd);
    f_mpu = '{op: op, rdst: rdst, rqos: rqos, raddr: raddr, sd: sd, rsv: '0};
  endfunction

endpackage

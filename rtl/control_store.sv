// control_store: the DMC's microcode store, shared by both mini-processors.
//
// It is built, as in the document, from four 1024 x 32-bit dual-port SRAM
// banks. One microinstruction is one word of every bank (bank 0 holds the
// Adder Unit field, bank 1 the Load/Store field, bank 2 the Condition field,
// bank 3 the Message Passing field), so a 128-bit microinstruction is read
// in one cycle. Port A feeds mini-processor A and port B mini-processor B;
// each port can instead write one 32-bit bank word per cycle, which is how
// the core interface (port A) and the network interface (port B) upload
// microcode from the Local Memory. A write address is {microinstruction, bank}.
//
// The store is divided into NSLOT slots of SLOT_UI microinstructions, one
// per command. A resident bit per slot records which microcodes have been
// uploaded; an interface unit sets it after finishing an upload. The slot
// organisation and resident bits are this design's way of answering the
// question "is the microcode of the command in the control store?".
// Read data appears one clock after the read address.
module control_store
  import dmc_pkg::*;
#(
  parameter int unsigned AW     = CS_AW,
  parameter int unsigned NSLOTS = NSLOT
) (
  input  logic                 clk,
  input  logic                 rst_n,
  // port A
  input  logic                 a_ren,
  input  logic [AW-1:0]        a_raddr,
  output uinstr_t              a_rdata,
  input  logic                 a_we,
  input  logic [AW+1:0]        a_waddr,
  input  logic [DW-1:0]        a_wdata,
  // port B
  input  logic                 b_ren,
  input  logic [AW-1:0]        b_raddr,
  output uinstr_t              b_rdata,
  input  logic                 b_we,
  input  logic [AW+1:0]        b_waddr,
  input  logic [DW-1:0]        b_wdata,
  // residency
  input  logic                 set_res_a,
  input  logic [$clog2(NSLOTS)-1:0] set_slot_a,
  input  logic                 set_res_b,
  input  logic [$clog2(NSLOTS)-1:0] set_slot_b,
  output logic [NSLOTS-1:0]    resident
);
  logic [3:0][DW-1:0] a_q, b_q;

  for (genvar k = 0; k < 4; k++) begin : g_bank
    logic a_bank_we, b_bank_we;
    assign a_bank_we = a_we && (a_waddr[1:0] == k[1:0]);
    assign b_bank_we = b_we && (b_waddr[1:0] == k[1:0]);
    dp_ram #(.AW(AW), .DW(DW)) u_bank (
      .clk    (clk),
      .a_en   (a_ren || a_bank_we),
      .a_we   (a_bank_we),
      .a_addr (a_bank_we ? a_waddr[AW+1:2] : a_raddr),
      .a_wdata(a_wdata),
      .a_rdata(a_q[k]),
      .b_en   (b_ren || b_bank_we),
      .b_we   (b_bank_we),
      .b_addr (b_bank_we ? b_waddr[AW+1:2] : b_raddr),
      .b_wdata(b_wdata),
      .b_rdata(b_q[k])
    );
  end

  assign a_rdata = uinstr_t'({a_q[3], a_q[2], a_q[1], a_q[0]});
  assign b_rdata = uinstr_t'({b_q[3], b_q[2], b_q[1], b_q[0]});

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) resident <= '0;
    else begin
      if (set_res_a) resident[set_slot_a] <= 1'b1;
      if (set_res_b) resident[set_slot_b] <= 1'b1;
    end
  end
endmodule

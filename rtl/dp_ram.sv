// dp_ram: true dual-port synchronous RAM, used as the node's Local Memory and
// as each of the four banks of the Control Store.
//
// Ports A and B are independent: each has an enable, a write enable, a word
// address and write data, and returns the read word one clock after the
// address (registered read, read-before-write on the same port). If both
// ports write the same word in the same cycle, port A's data is kept; the
// Synchronization Supporter prevents that case for shared data. The document
// gives the two ports (A for mini-processor A and the core interface, B for
// mini-processor B and the network interface) but not the size of the
// Local Memory: the default of 16384 words (64 KiB) is this design's choice.
// There is no reset on the array; its contents are written before use.
module dp_ram #(
  parameter int unsigned AW = 14,
  parameter int unsigned DW = 32
) (
  input  logic          clk,
  input  logic          a_en,
  input  logic          a_we,
  input  logic [AW-1:0] a_addr,
  input  logic [DW-1:0] a_wdata,
  output logic [DW-1:0] a_rdata,
  input  logic          b_en,
  input  logic          b_we,
  input  logic [AW-1:0] b_addr,
  input  logic [DW-1:0] b_wdata,
  output logic [DW-1:0] b_rdata
);
  logic [DW-1:0] mem [2**AW];

  always_ff @(posedge clk) begin
    if (b_en) begin
      if (b_we && !(a_en && a_we && a_addr == b_addr)) mem[b_addr] <= b_wdata;
      b_rdata <= mem[b_addr];
    end
    if (a_en) begin
      if (a_we) mem[a_addr] <= a_wdata;
      a_rdata <= mem[a_addr];
    end
  end
endmodule

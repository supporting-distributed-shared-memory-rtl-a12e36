// sync_fifo: small synchronous FIFO used for the command queues of the core
// and network interface units and for the router input buffers.
//
// push/pop with an occupancy count and an empty flag (a push while the
// count equals DEPTH is dropped and flagged by an assertion); the head is visible on rd_data while not
// empty (first-word fall-through from a register array) and all zero while
// empty. A push and a pop in the same cycle are both taken. Depth must be a power of two.
module sync_fifo #(
  parameter type         T     = logic [31:0],
  parameter int unsigned DEPTH = 4
) (
  input  logic clk,
  input  logic rst_n,
  input  logic push,
  input  T     wr_data,
  input  logic pop,
  output T     rd_data,
  output logic empty,
  output logic [$clog2(DEPTH):0] count
);
  localparam int unsigned PW = $clog2(DEPTH);
  T mem [DEPTH];
  logic [PW-1:0] rp, wp;

  assign empty   = (count == 0);
  logic full;
  assign full    = (count == DEPTH[PW:0]);
  assign rd_data = empty ? T'(0) : mem[rp];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rp <= '0; wp <= '0; count <= '0;
    end else begin
      if (push && !full) begin
        mem[wp] <= wr_data;
        wp <= wp + 1'b1;
      end
      if (pop && !empty) rp <= rp + 1'b1;
      count <= count + {{PW{1'b0}}, (push && !full)} - {{PW{1'b0}}, (pop && !empty)};
      assert (!(push && full)) else $error("sync_fifo: push while full");
    end
  end
endmodule

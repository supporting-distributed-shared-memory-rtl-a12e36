// sync_supporter: the Synchronization Supporter between mini-processor A and B.
//
// It gives the pair of micro-operations ll (load-linked) and sc
// (store-conditional) their atomic meaning across the two processors that
// share the Local Memory, and keeps the two processors from writing the same
// word in the same cycle. Each processor presents, during its memory stage,
// the operation it performs (valid, is-ll, is-sc, is-write) and the word
// address. Rules:
//   * ll by X records a reservation of X on the address;
//   * sc by X succeeds only if X still holds a reservation on that address;
//     any sc ends X's reservation;
//   * a write (sw or a successful sc) by one processor cancels the other's
//     reservation on the same address;
//   * if both write the same word in the same cycle (collision is flagged),
//     an sc loses to a plain sw, and of two sc's the one of A wins; two
//     plain sw's both complete and the memory keeps A's word.
// wr_ok_a / wr_ok_b tell each processor whether its write may reach memory;
// for an sc this is also the success flag. Purely combinational decisions,
// reservations are registers cleared by reset. The ll/sc pair and the
// hardware support for atomic read-and-modify follow the document; the exact
// rules and the priority of A are this design's choice.
module sync_supporter #(
  parameter int unsigned AW = 14
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          a_valid,
  input  logic          a_ll,
  input  logic          a_sc,
  input  logic          a_wr,     // sw or sc
  input  logic [AW-1:0] a_addr,
  input  logic          b_valid,
  input  logic          b_ll,
  input  logic          b_sc,
  input  logic          b_wr,
  input  logic [AW-1:0] b_addr,
  output logic          wr_ok_a,
  output logic          wr_ok_b,
  output logic          collision
);
  logic          resv_a_v, resv_b_v;
  logic [AW-1:0] resv_a, resv_b;
  logic          a_w, b_w, same, a_base, b_base;

  assign same      = a_addr == b_addr;
  assign a_base    = !a_sc || (resv_a_v && resv_a == a_addr);
  assign b_base    = !b_sc || (resv_b_v && resv_b == b_addr);
  assign collision = a_valid && a_wr && b_valid && b_wr && same;
  assign wr_ok_a   = a_base && !(collision && a_sc && !b_sc);
  assign wr_ok_b   = b_base && !(collision && b_sc && (!a_sc || wr_ok_a));
  assign a_w       = a_valid && a_wr && wr_ok_a;
  assign b_w       = b_valid && b_wr && wr_ok_b;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      resv_a_v <= 1'b0; resv_b_v <= 1'b0;
      resv_a   <= '0;   resv_b   <= '0;
    end else begin
      // processor A
      if (a_valid && a_ll) begin
        resv_a   <= a_addr;
        resv_a_v <= !(b_w && same);
      end else if ((a_valid && a_sc) || (b_w && resv_a_v && resv_a == b_addr)) begin
        resv_a_v <= 1'b0;
      end
      // processor B
      if (b_valid && b_ll) begin
        resv_b   <= b_addr;
        resv_b_v <= !(a_w && same);
      end else if ((b_valid && b_sc) || (a_w && resv_b_v && resv_b == a_addr)) begin
        resv_b_v <= 1'b0;
      end
    end
  end
endmodule

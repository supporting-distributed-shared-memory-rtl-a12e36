// tb_sync_supporter: directed ll / sc scenarios between the two processors:
// plain sc success, sc without reservation, reservation cancelled by the
// other processor's write, sc against sw and sc against sc in the same
// cycle, and an ll that meets a write of the other side.
module tb_sync_supporter;
  localparam int AW = 14;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic a_valid, a_ll, a_sc, a_wr, b_valid, b_ll, b_sc, b_wr;
  logic [AW-1:0] a_addr, b_addr;
  logic wr_ok_a, wr_ok_b, collision;
  int checks = 0, failures = 0, n_coll = 0;

  sync_supporter #(.AW(AW)) dut (.*);

  typedef enum { NONE, LL, SC, SW } op_e;

  // drive one cycle: ops for A and B, then sample outputs before the edge
  task automatic step(input op_e oa, input int aa, input op_e ob, input int ab,
                      output bit oka, output bit okb);
    @(negedge clk);
    a_valid = oa != NONE; a_ll = oa == LL; a_sc = oa == SC; a_wr = oa == SC || oa == SW; a_addr = AW'(aa);
    b_valid = ob != NONE; b_ll = ob == LL; b_sc = ob == SC; b_wr = ob == SC || ob == SW; b_addr = AW'(ab);
    #1; oka = wr_ok_a; okb = wr_ok_b; n_coll += int'(collision);
    @(posedge clk);
  endtask

  task automatic chk(input bit ok, input string s);
    checks++; if (!ok) begin failures++; $display("FAIL %s", s); end
  endtask

  bit oa, ob;
  initial begin
    {a_valid, a_ll, a_sc, a_wr, b_valid, b_ll, b_sc, b_wr} = '0; a_addr = 0; b_addr = 0;
    repeat (2) @(negedge clk); rst_n = 1;
    step(LL, 10, NONE, 0, oa, ob);
    step(SC, 10, NONE, 0, oa, ob);   chk(oa, "A sc after ll succeeds");
    step(SC, 10, NONE, 0, oa, ob);   chk(!oa, "A second sc fails (reservation used)");
    step(NONE, 0, SC, 11, oa, ob);   chk(!ob, "B sc without ll fails");
    step(LL, 20, LL, 20, oa, ob);
    step(NONE, 0, SW, 20, oa, ob);   chk(ob, "B sw always writes");
    step(SC, 20, NONE, 0, oa, ob);   chk(!oa, "A sc fails after B wrote the word");
    step(NONE, 0, SC, 20, oa, ob);   chk(ob, "B sc after its own ll still succeeds");
    step(LL, 30, LL, 31, oa, ob);
    step(SC, 30, SC, 31, oa, ob);    chk(oa && ob, "sc on different words both succeed");
    step(LL, 40, LL, 40, oa, ob);
    step(SC, 40, SC, 40, oa, ob);    chk(oa && !ob, "sc against sc: A wins");
    step(LL, 50, LL, 50, oa, ob);
    step(SC, 50, SW, 50, oa, ob);    chk(!oa && ob, "sc of A loses to sw of B");
    step(SW, 50, SC, 50, oa, ob);    chk(oa && !ob, "sc of B without reservation, sw of A writes");
    step(LL, 60, SW, 60, oa, ob);
    step(SC, 60, NONE, 0, oa, ob);   chk(!oa, "ll meeting a write of B gets no reservation");
    step(LL, 70, NONE, 0, oa, ob);
    step(NONE, 0, SW, 71, oa, ob);
    step(SC, 70, NONE, 0, oa, ob);   chk(oa, "write to another word keeps the reservation");
    chk(n_coll == 3, "collisions counted");
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

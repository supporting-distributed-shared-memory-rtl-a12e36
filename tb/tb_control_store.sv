// tb_control_store: uploads microinstructions one 32-bit bank word at a time
// through port A and through port B, reads them back as 128-bit
// microinstructions on both ports (one-cycle latency, bank k = bits
// 32k+31..32k), and checks the resident bits set by both ports.
module tb_control_store;
  import dmc_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic a_ren, b_ren, a_we, b_we, set_res_a, set_res_b;
  logic [CS_AW-1:0] a_raddr, b_raddr;
  logic [CS_AW+1:0] a_waddr, b_waddr;
  logic [31:0] a_wdata, b_wdata;
  uinstr_t a_rdata, b_rdata;
  logic [4:0] set_slot_a, set_slot_b;
  logic [NSLOT-1:0] resident;
  logic [127:0] model [64];
  int checks = 0, failures = 0;

  control_store dut (.*);

  task automatic chk(input bit ok, input string s);
    checks++; if (!ok) begin failures++; $display("FAIL %s", s); end
  endtask

  initial begin
    {a_ren, b_ren, a_we, b_we, set_res_a, set_res_b} = '0;
    a_raddr = 0; b_raddr = 0; a_waddr = 0; b_waddr = 0; a_wdata = 0; b_wdata = 0;
    set_slot_a = 0; set_slot_b = 0;
    repeat (2) @(negedge clk);
    chk(resident == '0, "nothing resident after reset");
    rst_n = 1;
    // microinstructions 0..31 through A, 32..63 through B, in parallel
    for (int w = 0; w < 128; w++) begin
      @(negedge clk);
      a_we = 1; a_waddr = (CS_AW+2)'(w);       a_wdata = $urandom;
      model[w/4][32*(w%4) +: 32] = a_wdata;
      b_we = 1; b_waddr = (CS_AW+2)'(128 + w); b_wdata = $urandom;
      model[32 + w/4][32*(w%4) +: 32] = b_wdata;
    end
    @(negedge clk);
    a_we = 0; b_we = 0;
    set_res_a = 1; set_slot_a = 0; set_res_b = 1; set_slot_b = 1;
    @(negedge clk);
    set_res_a = 0; set_res_b = 0;
    chk(resident == 32'h3, "slots 0 and 1 resident");
    for (int k = 0; k < 100; k++) begin
      int ia, ib;
      ia = $urandom_range(63); ib = $urandom_range(63);
      a_ren = 1; b_ren = 1; a_raddr = CS_AW'(ia); b_raddr = CS_AW'(ib);
      @(negedge clk);
      chk(a_rdata == model[ia], $sformatf("port A reads microinstruction %0d", ia));
      chk(b_rdata == model[ib], $sformatf("port B reads microinstruction %0d", ib));
    end
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

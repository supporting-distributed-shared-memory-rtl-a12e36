// tb_regfile: random writes on the three write ports of a register file,
// with deliberate same-register clashes, compared with a reference model
// (highest port wins); reset clears all registers.
module tb_regfile;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic [2:0] we;
  logic [2:0][2:0] waddr;
  logic [2:0][31:0] wdata;
  logic [7:0][31:0] regs, model;
  int checks = 0, failures = 0;

  regfile dut (.*);

  initial begin
    we = 0; waddr = 0; wdata = 0;
    repeat (2) @(negedge clk);
    checks++; if (regs != '0) failures++;
    rst_n = 1; model = '0;
    for (int k = 0; k < 500; k++) begin
      @(negedge clk);
      for (int p = 0; p < 3; p++) begin
        we[p] = 1'($urandom); waddr[p] = 3'($urandom); wdata[p] = $urandom;
      end
      if (k % 5 == 0) begin waddr[1] = waddr[0]; waddr[2] = waddr[0]; we = 3'b111; end
      for (int p = 0; p < 3; p++) if (we[p]) model[waddr[p]] = wdata[p];
      @(posedge clk); #1;
      checks++;
      if (regs != model) begin failures++; $display("FAIL step %0d", k); end
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

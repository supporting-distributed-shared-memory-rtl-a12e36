// tb_dp_ram: checks the dual-port RAM used as Local Memory and Control Store
// bank: independent reads and writes on both ports against a reference
// array, one-cycle read latency, and port A's priority when both ports write
// the same word.
module tb_dp_ram;
  localparam int AW = 6, DW = 32;
  logic clk = 0;
  always #5 clk = ~clk;
  logic a_en, a_we, b_en, b_we;
  logic [AW-1:0] a_addr, b_addr;
  logic [DW-1:0] a_wdata, b_wdata, a_rdata, b_rdata;
  logic [DW-1:0] model [2**AW];
  int checks = 0, failures = 0;

  dp_ram #(.AW(AW), .DW(DW)) dut (.*);

  task automatic chk(input bit ok, input string s);
    checks++; if (!ok) begin failures++; $display("FAIL %s", s); end
  endtask

  initial begin
    a_en = 0; a_we = 0; b_en = 0; b_we = 0; a_addr = 0; b_addr = 0; a_wdata = 0; b_wdata = 0;
    // fill: even words through A, odd through B
    for (int i = 0; i < 2**AW; i += 2) begin
      @(negedge clk);
      a_en = 1; a_we = 1; a_addr = AW'(i);   a_wdata = $urandom; model[i]   = a_wdata;
      b_en = 1; b_we = 1; b_addr = AW'(i+1); b_wdata = $urandom; model[i+1] = b_wdata;
    end
    @(negedge clk); a_we = 0; b_we = 0;
    // random reads on both ports
    for (int k = 0; k < 200; k++) begin
      int ra, rb;
      ra = $urandom_range(2**AW-1); rb = $urandom_range(2**AW-1);
      a_addr = AW'(ra); b_addr = AW'(rb);
      @(negedge clk);
      chk(a_rdata == model[ra], $sformatf("A read %0d", ra));
      chk(b_rdata == model[rb], $sformatf("B read %0d", rb));
    end
    // same-word write on both ports: A wins
    a_we = 1; b_we = 1; a_addr = 5; b_addr = 5; a_wdata = 32'hAAAA_0005; b_wdata = 32'hBBBB_0005;
    @(negedge clk); a_we = 0; b_we = 0;
    @(negedge clk);
    chk(a_rdata == 32'hAAAA_0005 && b_rdata == 32'hAAAA_0005, "write collision keeps port A");
    // read-before-write on one port
    b_we = 1; b_addr = 7; b_wdata = 32'h1234_5678;
    @(negedge clk); b_we = 0;
    chk(b_rdata == model[7], "read-before-write returns old word");
    @(negedge clk);
    chk(b_rdata == 32'h1234_5678, "new word after write");
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

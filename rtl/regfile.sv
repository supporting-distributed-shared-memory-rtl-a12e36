// regfile: Register File A / B of a mini-processor, eight 32-bit registers
// A0..A7 (the register names used by the published microcode).
//
// All eight registers are visible at once on `regs`, so the mini-processor
// can read any number of operands in its decode stage. Three write ports are
// written at the clock edge: port 0 and 1 by the Adder Unit (pfe writes two
// registers), port 2 by the Load/Store Unit. On a clash the higher-numbered
// port wins. The document shows the register files but not their size or
// ports; both are this design's choice. Reset clears all registers.
module regfile #(
  parameter int unsigned NREG = 8,
  parameter int unsigned DW   = 32,
  parameter int unsigned NWP  = 3
) (
  input  logic                            clk,
  input  logic                            rst_n,
  input  logic [NWP-1:0]                  we,
  input  logic [NWP-1:0][$clog2(NREG)-1:0] waddr,
  input  logic [NWP-1:0][DW-1:0]          wdata,
  output logic [NREG-1:0][DW-1:0]         regs
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      regs <= '0;
    end else begin
      for (int p = 0; p < NWP; p++)
        if (we[p]) regs[waddr[p]] <= wdata[p];
    end
  end
endmodule

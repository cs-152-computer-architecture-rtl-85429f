// regfile: the general-purpose register file (GPRs) of the pipeline.
//
// Two combinational read ports (rs1/rd1, rs2/rd2) serve the instruction in
// ID; one synchronous write port (ws/wd/we) is driven from WB. Register 0
// always reads as zero and ignores writes (MIPS convention, a choice of this
// design). There is no write-before-read path: the interlock stalls ID while
// the producing instruction is still in WB, so a value written at the end of
// WB is read the following cycle. Reset clears every register.
module regfile
  import pipe5_pkg::*;
#(
  parameter int unsigned W  = XLEN,
  parameter int unsigned N  = NREG
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic [$clog2(N)-1:0] rs1,
  input  logic [$clog2(N)-1:0] rs2,
  output logic [W-1:0]         rd1,
  output logic [W-1:0]         rd2,
  input  logic                 we,
  input  logic [$clog2(N)-1:0] ws,
  input  logic [W-1:0]         wd
);
  logic [W-1:0] regs [N];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < int'(N); i++) regs[i] <= '0;
    end else if (we && ws != '0) begin
      regs[ws] <= wd;
    end
  end

  assign rd1 = (rs1 == '0) ? '0 : regs[rs1];
  assign rd2 = (rs2 == '0) ? '0 : regs[rs2];
endmodule

// imem: instruction memory, read by the PC in the IF stage.
//
// A word-organised array with a combinational read port (addr -> inst), so
// an instruction fetched in IF is in the ID register at the next edge. The
// byte address is word-aligned by dropping its two low bits and wraps
// modulo the memory size. A synchronous write port (we/waddr/wdata) loads
// the program; the pipeline itself never writes it. The size is this
// design's choice.
module imem
  import pipe5_pkg::*;
#(
  parameter int unsigned WORDS = 1024
) (
  input  logic        clk,
  input  logic [31:0] addr,
  output logic [31:0] inst,
  input  logic        we,
  input  logic [31:0] waddr,
  input  logic [31:0] wdata
);
  localparam int unsigned AW = $clog2(WORDS);
  logic [31:0] mem [WORDS];

  always_ff @(posedge clk) begin
    if (we) mem[waddr[AW+1:2]] <= wdata;
  end

  assign inst = mem[addr[AW+1:2]];
endmodule

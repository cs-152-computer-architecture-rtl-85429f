// dmem: data memory, accessed in the MA stage.
//
// Word-organised, combinational read (a load's data is ready within MA) and
// synchronous write at the end of MA. The pipeline only raises `we` for a
// store that commits, so a store killed by an exception leaves memory
// untouched. The byte address drops its two low bits and wraps modulo the
// size; misaligned addresses are trapped before they reach here. Word
// accesses only; the size is this design's choice.
module dmem
  import pipe5_pkg::*;
#(
  parameter int unsigned WORDS = 1024
) (
  input  logic        clk,
  input  logic [31:0] addr,
  input  logic        we,
  input  logic [31:0] wdata,
  output logic [31:0] rdata
);
  localparam int unsigned AW = $clog2(WORDS);
  logic [31:0] mem [WORDS];

  always_ff @(posedge clk) begin
    if (we) mem[addr[AW+1:2]] <= wdata;
  end

  assign rdata = mem[addr[AW+1:2]];
endmodule

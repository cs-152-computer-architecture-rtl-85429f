// irq_prio: masking and prioritising of the interrupt request lines.
//
// Combinational. An I/O device asserts one of NIRQ interrupt request lines.
// A line is pending when it is asserted and its mask bit is set; a request
// is raised to the commit logic only while interrupts are globally enabled.
// Among pending lines, line 0 has the highest priority; `id` names the
// winner and `pending` is the masked vector for the Cause register. That
// the lines are prioritised is the document's; the mask, the global enable
// and the order of priority are this design's choices.
module irq_prio
  import pipe5_pkg::*;
#(
  parameter int unsigned N = NIRQ
) (
  input  logic [N-1:0]         irq,
  input  logic [N-1:0]         mask,
  input  logic                 ie,
  output logic                 req,
  output logic [$clog2(N)-1:0] id,
  output logic [N-1:0]         pending
);
  assign pending = irq & mask;
  assign req     = ie && (pending != '0);

  always_comb begin
    id = '0;
    for (int i = int'(N) - 1; i >= 0; i--) begin
      if (pending[i]) id = ($clog2(N))'(i);
    end
  end
endmodule

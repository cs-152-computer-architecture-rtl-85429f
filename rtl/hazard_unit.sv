// hazard_unit: the interlock (stall) signal of the ID stage.
//
// Combinational. Implements the stall equation of the pipeline without
// bypassing: the instruction in ID stalls when a register it reads (rs with
// re1, rt with re2) is the destination of a writing instruction in EX, MA or
// WB; the stall is suppressed when a BEQZ/BNEZ in EX is taken, because the
// instruction in ID is then on the wrong path and is killed anyway. The
// equation is the document's; only the port names are this design's.
module hazard_unit
  import pipe5_pkg::*;
(
  input  reg_idx_t rs_d,
  input  reg_idx_t rt_d,
  input  logic     re1_d,
  input  logic     re2_d,
  input  reg_idx_t ws_e,
  input  logic     we_e,
  input  reg_idx_t ws_m,
  input  logic     we_m,
  input  reg_idx_t ws_w,
  input  logic     we_w,
  input  logic     br_taken_e,
  output logic     stall
);
  logic hz_rs, hz_rt;

  assign hz_rs = ((rs_d == ws_e) && we_e) || ((rs_d == ws_m) && we_m) || ((rs_d == ws_w) && we_w);
  assign hz_rt = ((rt_d == ws_e) && we_e) || ((rt_d == ws_m) && we_m) || ((rt_d == ws_w) && we_w);
  assign stall = ((hz_rs && re1_d) || (hz_rt && re2_d)) && !br_taken_e;
endmodule

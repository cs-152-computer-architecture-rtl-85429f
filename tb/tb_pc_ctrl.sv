// tb_pc_ctrl: all 128 combinations of the seven control inputs against the
// expected PCSrc, enables and nop selects, worked out from the priority
// order: exception > RFE > taken branch in EX > stall > taken branch in ID
// > jabs > rind > pc+4.
module tb_pc_ctrl;
  import pipe5_pkg::*;
  logic    exc_take, rfe_take, br_taken_d, br_taken_e, jabs_d, rind_d, stall;
  pc_src_t pc_src;
  logic    pc_en, d_en, ir_d_nop, ir_e_nop, kill_e, kill_wb;
  int checks = 0, failures = 0;

  pc_ctrl dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 128; v++) begin
      pc_src_t es;
      bit epc_en, ed_en, edn, een, eke, ekw;
      {br_taken_d, exc_take, rfe_take, br_taken_e, jabs_d, rind_d, stall} = 7'(v);
      #1;
      epc_en = 1; ed_en = 1; edn = 0; een = 0; eke = 0; ekw = 0; es = PC_PLUS4;
      if (exc_take)        begin es = PC_HND; edn = 1; een = 1; eke = 1; ekw = 1; end
      else if (rfe_take)   begin es = PC_EPC; edn = 1; een = 1; eke = 1; end
      else if (br_taken_e) begin es = PC_BR; edn = 1; een = 1; end
      else if (stall)      begin epc_en = 0; ed_en = 0; een = 1; end
      else if (br_taken_d) begin es = PC_BR; edn = 1; end
      else if (jabs_d)     begin es = PC_JABS; edn = 1; end
      else if (rind_d)     begin es = PC_RIND; edn = 1; end
      checks++;
      if ((epc_en && pc_src !== es) || pc_en !== epc_en || d_en !== ed_en || ir_d_nop !== edn ||
          ir_e_nop !== een || kill_e !== eke || kill_wb !== ekw) begin
        failures++;
        $display("FAIL inputs %b: src %s en %b%b nop %b%b kill %b%b", 7'(v), pc_src.name(),
                 pc_en, d_en, ir_d_nop, ir_e_nop, kill_e, kill_wb);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_hazard_unit: random register numbers drawn from a small set (so that
// matches are frequent) against the stall rule evaluated here stage by
// stage: stall if a read source equals the destination of a writing
// instruction in EX, MA or WB, unless the branch in EX is taken.
module tb_hazard_unit;
  import pipe5_pkg::*;
  reg_idx_t rs_d, rt_d, ws_e, ws_m, ws_w;
  logic     re1_d, re2_d, we_e, we_m, we_w, br_taken_e, stall;
  int checks = 0, failures = 0, n_stall = 0;

  hazard_unit dut (.*);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 20000; n++) begin
      reg_idx_t ws [3];
      bit       we [3];
      bit       exp_s;
      rs_d = 5'($urandom_range(0, 3)); rt_d = 5'($urandom_range(0, 3));
      ws_e = 5'($urandom_range(0, 3)); ws_m = 5'($urandom_range(0, 3)); ws_w = 5'($urandom_range(0, 3));
      {re1_d, re2_d, we_e, we_m, we_w} = 5'($urandom);
      br_taken_e = ($urandom_range(0, 3) == 0);
      #1;
      ws = '{ws_e, ws_m, ws_w};
      we = '{we_e, we_m, we_w};
      exp_s = 0;
      foreach (ws[i]) begin
        if (we[i] && re1_d && ws[i] == rs_d) exp_s = 1;
        if (we[i] && re2_d && ws[i] == rt_d) exp_s = 1;
      end
      if (br_taken_e) exp_s = 0;
      n_stall += exp_s;
      checks++;
      if (stall !== exp_s) begin
        failures++;
        if (failures < 10) $display("FAIL rs %0d rt %0d re %b%b ws %0d/%0d/%0d we %b%b%b br %b: stall %b",
                                    rs_d, rt_d, re1_d, re2_d, ws_e, ws_m, ws_w, we_e, we_m, we_w, br_taken_e, stall);
      end
    end
    checks++;
    if (n_stall == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

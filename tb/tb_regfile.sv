// tb_regfile: random writes and reads against a reference array; checks
// that reset clears the registers, that r0 always reads zero, that a
// disabled write changes nothing, and that a write is visible on both read
// ports after the clock edge (not before).
module tb_regfile;
  logic        clk = 1'b0, rst_n = 1'b0;
  logic [4:0]  rs1, rs2, ws;
  logic [31:0] rd1, rd2, wd;
  logic        we;
  logic [31:0] ref_r [32];
  int checks = 0, failures = 0;

  regfile dut (.*);
  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    we = 0; ws = 0; wd = 0; rs1 = 0; rs2 = 0;
    for (int i = 0; i < 32; i++) ref_r[i] = 0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < 32; i++) begin
      rs1 = 5'(i); #1;
      check(rd1 == 0, $sformatf("r%0d not cleared by reset", i));
    end
    for (int n = 0; n < 2000; n++) begin
      @(negedge clk);
      we  = ($urandom_range(0, 3) != 0);
      ws  = 5'($urandom);
      wd  = $urandom;
      rs1 = 5'($urandom);
      rs2 = ws;
      #1;
      check(rd1 == ref_r[rs1], $sformatf("rd1 r%0d", rs1));
      check(rd2 == ref_r[rs2], $sformatf("rd2 r%0d before write", rs2));
      @(posedge clk);
      if (we && ws != 0) ref_r[ws] = wd;
      #1;
      check(rd2 == ref_r[rs2], $sformatf("rd2 r%0d after write", rs2));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

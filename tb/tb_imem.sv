// tb_imem: loads random words through the load port and reads them back
// through the fetch port, in a different order, at word-aligned byte
// addresses; checks that the low address bits are ignored.
module tb_imem;
  localparam int W = 1024;
  logic        clk = 1'b0, we;
  logic [31:0] addr, inst, waddr, wdata;
  logic [31:0] ref_m [W];
  int checks = 0, failures = 0;

  imem dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    we = 0; addr = 0; waddr = 0; wdata = 0;
    for (int i = 0; i < W; i++) begin
      @(negedge clk);
      we = 1; waddr = 32'(i * 4); wdata = $urandom; ref_m[i] = wdata;
    end
    @(negedge clk);
    we = 0;
    for (int n = 0; n < 3000; n++) begin
      int i;
      i = $urandom_range(0, W - 1);
      addr = 32'(i * 4) | 32'($urandom_range(0, 3));
      #1;
      checks++;
      if (inst !== ref_m[i]) begin failures++; $display("FAIL word %0d", i); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

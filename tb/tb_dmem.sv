// tb_dmem: random stores and loads against a reference array; a load reads
// the word in the same cycle, a store takes effect at the clock edge, and
// no store happens while `we` is low.
module tb_dmem;
  localparam int W = 1024;
  logic        clk = 1'b0, we;
  logic [31:0] addr, wdata, rdata;
  logic [31:0] ref_m [W];
  int checks = 0, failures = 0;

  dmem dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    we = 0; addr = 0; wdata = 0;
    for (int i = 0; i < W; i++) begin
      @(negedge clk);
      we = 1; addr = 32'(i * 4); wdata = $urandom; ref_m[i] = wdata;
    end
    for (int n = 0; n < 5000; n++) begin
      int i;
      @(negedge clk);
      i     = $urandom_range(0, 63);
      addr  = 32'(i * 4);
      we    = $urandom_range(0, 1);
      wdata = $urandom;
      #1;
      checks++;
      if (rdata !== ref_m[i]) begin failures++; $display("FAIL load %0d", i); end
      @(posedge clk);
      if (we) ref_m[i] = wdata;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
